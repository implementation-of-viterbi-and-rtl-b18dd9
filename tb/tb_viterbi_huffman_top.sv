// tb_viterbi_huffman_top: end-to-end test of both designs in the top, at the
// default sizes.
//
// Channel coding: random data goes through the top's convolutional encoder,
// a channel model that flips bits, and the top's Viterbi decoder. The
// decoded stream is compared with the reference Viterbi decoder, and the
// error-free stretch with the data itself.
//
// Source coding: a 100-symbol message with the occurrence counts of the
// worked example (a 45, b 13, c 12, d 16, e 9, f 5), shuffled, goes through
// the Huffman encoder, whose bit stream is wired to the Huffman decoder. The
// message must come back unchanged in 224 code bits (2.24 bits a symbol,
// against 3 for a fixed-length code).
//
// Every mechanism must occur at least once, and its count is printed:
// channel errors corrected, path metric normalisation, back-to-back trace
// backs, the LIFO read pointer wrapping between its halves, Huffman words
// sent back to back, and every one of the six symbols decoded.
module tb_viterbi_huffman_top;
  import tb_ref_pkg::*;
  import viterbi_pkg::*;
  import huffman_pkg::*;

  localparam int NGROUPS = 64;
  localparam int NBITS   = NGROUPS * 16;

  logic  clk = 0, rst_n = 1;
  logic  enc_valid = 0, enc_bit = 0, enc_sym_valid;
  sym_t  enc_sym;
  logic  dec_sym_valid = 0;
  sym_t  dec_sym = '0;
  logic  dec_out_valid, dec_out_bit;
  logic  henc_sym_valid = 0;
  hsym_t henc_sym = '0;
  logic  henc_sym_ready, henc_bit_valid, henc_bit, henc_last;
  logic  hdec_sym_valid;
  hsym_t hdec_sym;

  int checks = 0, failures = 0;

  viterbi_huffman_top dut (
    .clk, .rst_n,
    .enc_valid, .enc_bit, .enc_sym_valid, .enc_sym,
    .dec_sym_valid, .dec_sym, .dec_out_valid, .dec_out_bit,
    .henc_sym_valid, .henc_sym, .henc_sym_ready, .henc_bit_valid, .henc_bit, .henc_last,
    .hdec_bit_valid (henc_bit_valid),
    .hdec_bit       (henc_bit),
    .hdec_sym_valid, .hdec_sym
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- Viterbi
  bit    data[$], ref_out[$], got[$];
  bsym_t tx[$], rx[$], sent[$];
  int    nerr = 0, fixed_groups = 0, norms = 0, b2b_tb = 0, wraps = 0;

  // channel: the encoder output, with bits flipped where rx differs from tx
  always @(posedge clk) if (rst_n && enc_sym_valid) sent.push_back(enc_sym);

  always @(posedge clk) if (rst_n) begin
    if (dut.u_viterbi_decoder.u_acsu.en && dut.u_viterbi_decoder.u_acsu.all_high) norms++;
    if (dut.u_viterbi_decoder.u_tbu.start && dut.u_viterbi_decoder.u_tbu.busy) b2b_tb++;
    if (dut.u_viterbi_decoder.u_lifo.do_rd && dut.u_viterbi_decoder.u_lifo.rptr == '0) wraps++;
    if (dec_out_valid) begin
      int k;
      k = got.size();
      got.push_back(dec_out_bit);
      checks++;
      if (k >= NBITS || dec_out_bit != ref_out[k] || (k < 256 && dec_out_bit != data[k])) begin
        failures++;
        if (failures < 10) $display("decoded bit %0d wrong", k);
      end
    end
  end

  task automatic run_viterbi();
    // encode through the top's encoder
    for (int i = 0; i < NBITS; i++) begin
      @(negedge clk);
      enc_valid = 1;
      enc_bit   = data[i];
    end
    @(negedge clk);
    enc_valid = 0;
    @(negedge clk);
    checks++;
    if (sent.size() != NBITS) begin failures++; $display("encoder gave %0d symbols", sent.size()); end
    foreach (sent[t]) tx.push_back(sent[t]);
    // channel errors after the first 16 groups; a burst of three symbols
    // is added in group 40 as well
    foreach (tx[t]) begin
      bsym_t e;
      e = 2'b00;
      if (t >= 256 && $urandom_range(0, 19) == 0) e = 2'b01 << $urandom_range(0, 1);
      if (t >= 645 && t < 648) e = 2'b11;
      if (e != 2'b00) nerr++;
      rx.push_back(tx[t] ^ e);
    end
    viterbi_ref(rx, 16, ref_out);
    foreach (rx[t]) begin
      @(negedge clk);
      dec_sym_valid = 1;
      dec_sym       = sym_t'(rx[t]);
    end
    @(negedge clk);
    dec_sym_valid = 0;
    repeat (60) @(negedge clk);
    checks++;
    if (got.size() != NBITS) begin failures++; $display("%0d decoded bits", got.size()); end
    for (int g = 16; g < NGROUPS; g++) begin
      bit had_err, ok;
      had_err = 0; ok = 1;
      for (int i = g * 16; i < g * 16 + 16; i++) begin
        if (rx[i] != tx[i]) had_err = 1;
        if (i < got.size() && got[i] != data[i]) ok = 0;
      end
      if (had_err && ok) fixed_groups++;
    end
  endtask

  // ---------------------------------------------------------------- Huffman
  int msg[$], hgot[$];
  int hbits = 0, hb2b = 0;
  int seen[NSYM];

  always @(posedge clk) if (rst_n) begin
    if (henc_bit_valid) hbits++;
    if (henc_sym_valid && henc_sym_ready && henc_bit_valid) hb2b++;
    if (hdec_sym_valid) begin
      hgot.push_back(int'(hdec_sym));
      seen[hdec_sym]++;
    end
  end

  task automatic run_huffman();
    int counts[NSYM] = '{45, 13, 12, 16, 9, 5};
    for (int s = 0; s < NSYM; s++) repeat (counts[s]) msg.push_back(s);
    msg.shuffle();
    foreach (msg[i]) begin
      @(negedge clk);
      henc_sym_valid = 1;
      henc_sym       = hsym_t'(msg[i]);
      while (!henc_sym_ready) @(negedge clk);
    end
    @(negedge clk);
    henc_sym_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (hbits != 224) begin failures++; $display("message took %0d code bits, expected 224", hbits); end
    checks++;
    if (hgot.size() != msg.size()) begin
      failures++;
      $display("decoded %0d symbols of %0d", hgot.size(), msg.size());
    end else begin
      foreach (msg[i]) if (hgot[i] != msg[i]) begin failures++; $display("symbol %0d wrong", i); end
    end
  endtask

  task automatic need(string what, int n);
    $display("%-28s %0d", what, n);
    checks++;
    if (n == 0) begin failures++; $display("  never happened"); end
  endtask

  initial begin
    for (int i = 0; i < NBITS; i++) data.push_back(bit'($urandom_range(0, 1)));
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    fork
      run_viterbi();
      run_huffman();
    join
    need("channel errors", nerr);
    need("groups corrected", fixed_groups);
    need("path metric normalisations", norms);
    need("back-to-back trace backs", b2b_tb);
    need("LIFO pointer wraps", wraps);
    need("Huffman words back to back", hb2b);
    for (int s = 0; s < NSYM; s++) need($sformatf("symbol %0d decoded", s), seen[s]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
