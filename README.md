# Viterbi decoder (k = 3, rate 1/2) and a six-symbol Huffman coder

This repository holds two small datapaths for a communication link, written in
synthesizable SystemVerilog:

* **Channel coding.** A rate 1/2, constraint length 3 convolutional encoder and
  a hard-decision Viterbi decoder for it. The decoder uses trace back: a
  survivor memory stores one decision bit per state per step, a trace back
  unit walks these decisions backwards, and a small LIFO puts the decoded bits
  back into time order. It takes one received symbol per clock and delivers
  one decoded bit per clock.
* **Source coding.** A Huffman encoder and decoder for the fixed prefix code
  of six symbols `a..f`: `a=0, b=101, c=100, d=111, e=1101, f=1100`. This is the
  code for occurrence counts 45, 13, 12, 16, 9 and 5. Both sides work serially,
  one code bit per clock.

The two designs share nothing but clock and reset. The top module
`viterbi_huffman_top` places them side by side, each with its own ports.

## The code and its trellis

The encoder has two memory bits. A state is written as those bits, newest
first: `00` is S0, `10` is S1, `01` is S2 and `11` is S3. As a 2-bit number,
state = `{u[t-2], u[t-1]}`:

* bit 0 holds the newest input;
* input `u` moves state `{a,b}` to `{b,u}`.

Each input bit yields the symbol `{c0, c1}`:

* `c0 = u ^ u[t-1] ^ u[t-2]` (generator 7, octal);
* `c1 = u ^ u[t-2]` (generator 5, octal).

This generator pair is the usual one for k = 3. The design does not depend on
it beyond the two functions in `viterbi_pkg`.

Every state n has two predecessors:

* the upper one, `{0, n[1]}`;
* the lower one, `{1, n[1]}`.

Both branches into n carry the input bit `n[0]`. The four add-compare-select
(ACS) nodes therefore form two butterflies:

* sources S0 and S2 feed destinations S0 and S1;
* sources S1 and S3 feed destinations S2 and S3.

A decision bit is the oldest bit of the surviving predecessor. Trace back
relies on this: from state n with decision d, the decoded bit is `n[0]` and
the previous state is `{d, n[1]}`.

## Decoder data path

```
 sym ─► BMU ─► ACSU ──dec[3:0]──► SPMU 32x4 ──► TBU ──bits, newest first──► LIFO 32x1 ─► out_bit
               │  ▲ path metrics               ▲
               └──┴─► best-metric select ──start state
```

| Block | File | What it does |
|---|---|---|
| BMU | `bmu.sv` | Hamming distance (XOR, then count the ones) of the received symbol to each of the four possible symbols. |
| ACSU | `acsu.sv`, `acs_node.sv` | Four ACS nodes. Each adds the branch metrics to its two predecessors' path metrics, keeps the smaller sum and outputs which one it kept. The unit also holds the path metric registers. |
| Best-metric select | `pm_min_select.sv` | Finds the state with the smallest path metric. |
| SPMU | `spmu.sv` | Survivor path memory: a 32 x 4 simple dual-port RAM with one word per trellis step. |
| TBU | `tbu.sv` | Walks 16 steps of decisions backwards and emits 16 decoded bits. |
| LIFO | `lifo.sv` | Reverses each group of 16 bits. |

### Groups of 16 steps and the double-buffered memory

The trellis length is 16, and the survivor memory is twice that deep. The
column counter writes step t to word `t mod 32`, so the two halves of the
memory alternate every 16 steps. When the write to column 15 of a half
completes a group, two things happen one clock later:

1. the best-metric selector picks the state with the smallest path metric
   at the end of the group;
2. the TBU starts tracing that half back from this state.

Meanwhile the ACSU fills the other half. The TBU reads one word per clock, so
it finishes its 16 reads exactly when the next group is complete. Trace backs
can therefore run back to back with the input arriving at full rate.
Internally the TBU passes the start state down its pipeline along with the
first read. As a result, a new trace back may start in the same clock in
which the previous one processes its last word.

Each group is traced on its own. The path metrics, however, run on across
groups: the trellis is never restarted and no tail bits are needed. The last
bits of a group are decided from the best state at the group's end. This
design does not look further ahead to let the survivor paths merge. With
noise, the bits near a group's end are thus somewhat less reliable than a
decoder with a longer trace back would make them.

### LIFO addressing

The TBU produces the newest bit of a group first. The LIFO is a 32 x 1
dual-port RAM:

* **Writing.** A 5-bit up counter addresses the write port, so group g lands in
  addresses `16*(g mod 2) .. +15`.
* **Reading.** A 5-bit down counter starts at 15 and addresses the read port.
  It reads 15..0, wraps to 31 and reads 31..16, then wraps to 15 again.

Each group therefore leaves oldest first, and one half is read while the other
is written. A small counter of complete groups holds reads back until a whole
group is present. `cs` gates both ports.

### Path metrics

Path metrics are 5 bits wide. At reset S0 starts at 0 and the other states at
4, since the encoder starts in S0.

The metrics are normalised after every step. If all four new metrics have
bit 4 set, that bit is cleared in all of them. This subtracts the same 16
from every metric, which changes no comparison. The metrics of this trellis
never spread by more than 4, so no metric can overflow.

On a tie the upper predecessor survives (decision 0). The best-metric
selector breaks ties towards the lower state number.

### Timing

* **Throughput.** One symbol per clock. Idle clocks between symbols are
  allowed: `sym_valid` low simply holds the trellis.
* **Latency.** The first bit of a group appears on `out_bit` 21 clocks after
  the clock that took the group's last symbol. The other 15 bits follow on
  consecutive clocks.
* **Partial groups.** A group that is never completed is never released.

## Huffman coder

`huffman_pkg` holds the code twice:

* `CODE_TABLE`: the code word and its length for each symbol;
* `TREE`: the full binary tree of the code, with 5 internal nodes and 6 leaves.
  Bit 0 selects the left child and bit 1 the right child.

**Encoder** (`huffman_encoder.sv`):

* It looks the symbol up in `CODE_TABLE` and left-aligns the code word in a
  4-bit shift register.
* It shifts the word out first bit first, one bit per clock.
* `sym_ready` is high during the last bit of a word, so the next symbol is
  loaded without a gap. The output is the plain concatenation of the code
  words: "abc" gives `0101100`.
* `last` marks the final bit of each word.
* Symbol indices 6 and 7 are not symbols. An assertion flags them, and they
  would be coded as `a`.

**Decoder** (`huffman_decoder.sv`):

* It keeps the internal node reached so far and moves to a child on each bit.
* On reaching a leaf it outputs that symbol one clock later and returns to
  the root.
* Because the code is prefix-free, the stream needs no separators:
  `001011101` decodes to "aabe".

For a message with the counts above (100 symbols), the code needs
45·1 + 13·3 + 12·3 + 16·3 + 9·4 + 5·4 = 224 bits, or 2.24 bits per symbol,
against 3 bits for a fixed-length code.

The code is fixed in the hardware. The Huffman tree is built from the symbol
frequencies beforehand, not on chip. To use another prefix code, change
`CODE_TABLE`, `TREE` and the size constants in `huffman_pkg`.

## Top level

`viterbi_huffman_top` brings out four port groups:

| Group | Ports |
|---|---|
| Convolutional encoder | `enc_valid`, `enc_bit`, `enc_sym_valid`, `enc_sym` |
| Viterbi decoder | `dec_sym_valid`, `dec_sym`, `dec_out_valid`, `dec_out_bit` |
| Huffman encoder | `henc_sym_valid`, `henc_sym`, `henc_sym_ready`, `henc_bit_valid`, `henc_bit`, `henc_last` |
| Huffman decoder | `hdec_bit_valid`, `hdec_bit`, `hdec_sym_valid`, `hdec_sym` |

The encoder output and the decoder input are separate ports, so a channel
model (or real hardware) sits between them. All registers use one clock `clk`
and the asynchronous active-low reset `rst_n`.

## Where this design makes its own choices

These points are not fixed by the original architecture and were chosen here:

* the generator polynomials (7, 5);
* the path metric width, normalisation and start values;
* the tie rules in the ACS nodes and the best-metric selector;
* the trace back starting from the best-metric state, with each 16-step group
  traced on its own and the path metrics carried across groups;
* the read latency of both RAMs, the group counter in the LIFO and the exact
  control timing;
* the serial valid/ready interfaces of the Huffman encoder and decoder.

The following are not included:

* Register exchange. It is the usual alternative to trace back, and this
  decoder uses trace back.
* Mapping onto a multi-level constellation for trellis coded modulation, and
  soft-decision metrics. The decoder is hard decision only.
* Any on-chip construction of Huffman trees.
* A variant for constraint length 7.

Area and clock-rate figures for an FPGA implementation depend on the device
and tools and were not reproduced.

## Verification

Every module has a self-checking testbench in `tb/`. The reference models are
in `tb/tb_ref_pkg.sv` and are written independently of the RTL: an encoder,
an integer-metric Viterbi decoder and the code words as strings.

| Testbench | What it shows |
|---|---|
| `tb_conv_encoder` | 400 random bits with idle clocks; every symbol is checked. |
| `tb_bmu` | All symbol pairs. |
| `tb_acsu` | 600 random steps. Decisions and metrics are checked against unbounded integer metrics, which the hardware must match modulo the normalisation. Normalisation must occur. |
| `tb_pm_min_select` | Random and tie-heavy metric sets. |
| `tb_spmu` | Random dual-port traffic, including reading the word being written. |
| `tb_tbu` | 40 trace backs, back to back and with gaps, on both halves. The first bit must appear 3 clocks after start. |
| `tb_lifo` | 20 groups, reversed order checked, pointer wrap, chip select. |
| `tb_viterbi_decoder` | 120 groups: 40 error-free groups must reproduce the data, then random single-bit errors and idle clocks. Every bit is checked against the reference decoder, along with the 21-clock latency and error correction. |
| `tb_huffman_encoder` | "abc" gives `0101100`; random symbols with idle clocks; a gap-free back-to-back burst. |
| `tb_huffman_decoder` | `001011101` gives "aabe"; 400 random symbols with idle clocks. |
| `tb_viterbi_huffman_top` | Both designs end to end at default sizes. 64 groups go through encoder, channel errors (including a 3-symbol burst) and decoder. The 100-symbol message with the counts above must take 224 bits and return intact. It counts corrected groups, normalisations, back-to-back trace backs, LIFO wraps, back-to-back Huffman words and each decoded symbol, and fails if any count is zero. |

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if the design hangs.

Running one with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/viterbi_pkg.sv rtl/huffman_pkg.sv tb/tb_ref_pkg.sv \
    tb/tb_viterbi_huffman_top.sv --top-module tb_viterbi_huffman_top
./obj_dir/Vtb_viterbi_huffman_top
```

Replace the last testbench file and top name to run another. Assertions in
`tbu`, `lifo`, `huffman_encoder` and `huffman_decoder` check the control rules:

* no trace back overlap;
* no LIFO overrun;
* symbol range;
* tree node range.

## Files

* `rtl/viterbi_pkg.sv`: sizes, types and trellis functions.
* `rtl/huffman_pkg.sv`: the code book and the code tree.
* `rtl/conv_encoder.sv`, `bmu.sv`, `acs_node.sv`, `acsu.sv`, `pm_min_select.sv`,
  `spmu.sv`, `tbu.sv`, `lifo.sv`, `viterbi_decoder.sv`: the Viterbi path.
* `rtl/huffman_encoder.sv`, `rtl/huffman_decoder.sv`: the Huffman path.
* `rtl/viterbi_huffman_top.sv`: the top level.
* `tb/`: the testbenches and `tb_ref_pkg.sv`.
