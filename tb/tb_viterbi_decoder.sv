// tb_viterbi_decoder: encodes random data with the reference encoder, adds
// channel bit errors and feeds the symbols to the decoder. Checks:
//   * every decoded bit against the reference Viterbi decoder;
//   * the first 40 groups are error free and must decode to the data;
//   * later groups carry errors, some of which must be corrected;
//   * with no input gaps one bit leaves per clock, and the first bit of a
//     group leaves 21 clocks after the group's last symbol was taken;
//   * input gaps (idle clocks between symbols) are handled.
module tb_viterbi_decoder;
  import tb_ref_pkg::*;
  import viterbi_pkg::*;

  localparam int NGROUPS = 120;
  localparam int NBITS   = NGROUPS * 16;
  localparam int LATENCY = 21;

  logic clk = 0, rst_n = 1;
  logic sym_valid = 0;
  sym_t sym = '0;
  logic out_valid, out_bit;
  int checks = 0, failures = 0;

  bit    data[$], ref_out[$], got[$];
  bsym_t tx[$], rx[$];
  int    cyc = 0, nerr = 0, fixed_groups = 0, gaps = 0;
  int    last_sym_cyc[$];
  int    nsym = 0;

  viterbi_decoder dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && sym_valid) begin
      if (nsym % 16 == 15) last_sym_cyc.push_back(cyc);
      nsym++;
    end
    if (rst_n && out_valid) begin
      int k;
      k = got.size();
      got.push_back(out_bit);
      checks++;
      if (k >= NBITS || out_bit != ref_out[k]) begin
        failures++;
        if (failures < 10) $display("bit %0d: got %0b reference %0b", k, out_bit, ref_out[k]);
      end
      if (k < 640) begin
        checks++;
        if (out_bit != data[k]) failures++;
      end
      if (k % 16 == 0) begin
        int lc;
        lc = last_sym_cyc.pop_front();
        checks++;
        if (cyc - lc != LATENCY) begin
          failures++;
          $display("group %0d: first bit %0d clocks after its last symbol", k / 16, cyc - lc);
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < NBITS; i++) data.push_back(bit'($urandom_range(0, 1)));
    conv_ref_encode(data, tx);
    foreach (tx[t]) begin
      bsym_t e;
      e = 2'b00;
      // errors from group 40 on: about one symbol in 24 has one bit flipped
      if (t >= 640 && $urandom_range(0, 23) == 0) begin
        e = ($urandom_range(0, 1) != 0) ? 2'b01 : 2'b10;
        nerr++;
      end
      rx.push_back(tx[t] ^ e);
    end
    viterbi_ref(rx, 16, ref_out);

    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    foreach (rx[t]) begin
      @(negedge clk);
      // idle clocks inside groups 80..99
      if (t >= 1280 && t < 1600 && $urandom_range(0, 2) == 0) begin
        sym_valid = 0;
        gaps++;
        @(negedge clk);
      end
      sym_valid = 1;
      sym = sym_t'(rx[t]);
    end
    @(negedge clk);
    sym_valid = 0;
    repeat (60) @(negedge clk);

    checks++;
    if (got.size() != NBITS) begin failures++; $display("%0d bits out, expected %0d", got.size(), NBITS); end
    // groups that had channel errors yet decoded to the sent data
    for (int g = 40; g < NGROUPS; g++) begin
      bit had_err, ok;
      had_err = 0; ok = 1;
      for (int i = g * 16; i < g * 16 + 16; i++) begin
        if (rx[i] != tx[i]) had_err = 1;
        if (i < got.size() && got[i] != data[i]) ok = 0;
      end
      if (had_err && ok) fixed_groups++;
    end
    $display("channel errors %0d, groups corrected %0d, idle clocks %0d", nerr, fixed_groups, gaps);
    checks++;
    if (nerr == 0 || fixed_groups == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
