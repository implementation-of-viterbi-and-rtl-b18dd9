// tb_huffman_encoder: encodes "abc" (must give 0101100) and then a long
// random symbol stream, sometimes with idle clocks between symbols; the
// serial output is compared with the concatenated reference code words, and
// the word-end marks with the word boundaries. Back-to-back symbols must give
// a gap-free bit stream (one bit per clock).
module tb_huffman_encoder;
  import tb_ref_pkg::*;
  import huffman_pkg::*;

  logic  clk = 0, rst_n = 1;
  logic  sym_valid = 0;
  hsym_t sym = '0;
  logic  sym_ready, bit_valid, bit_out, last;
  int checks = 0, failures = 0;
  bit exp_bits[$];
  bit exp_last[$];
  bit got_bits[$];

  huffman_encoder dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && bit_valid) begin
    got_bits.push_back(bit_out);
    checks++;
    if (exp_bits.size() == 0 || bit_out != exp_bits[0] || last != exp_last[0]) begin
      failures++;
      $display("bit %0d: got %b last %b", got_bits.size() - 1, bit_out, last);
    end
    if (exp_bits.size() != 0) begin
      void'(exp_bits.pop_front());
      void'(exp_last.pop_front());
    end
  end

  // inputs change at the falling edge, so the handshake at the next rising
  // edge sees stable values
  task automatic send(int s, bit idle_after);
    string c;
    c = huff_ref_code(s);
    for (int i = 0; i < c.len(); i++) begin
      exp_bits.push_back(c[i] == "1");
      exp_last.push_back(i == c.len() - 1);
    end
    @(negedge clk);
    sym_valid = 1;
    sym = hsym_t'(s);
    while (!sym_ready) @(negedge clk);
    @(posedge clk);
    if (idle_after) begin
      @(negedge clk);
      sym_valid = 0;
      repeat (6) @(negedge clk);
    end
  endtask

  int cyc = 0, first_cyc = -1, last_cyc = -1;
  bit in_burst = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_burst && bit_valid) begin
      if (first_cyc < 0) first_cyc = cyc;
      last_cyc = cyc;
    end
  end

  initial begin
    int nbits_burst;
    string abc;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // "abc" as in the worked example
    send(0, 0); send(1, 0); send(2, 1);
    abc = "";
    foreach (got_bits[i]) abc = {abc, got_bits[i] ? "1" : "0"};
    checks++;
    if (abc != "0101100") begin failures++; $display("abc coded as %s", abc); end
    // random symbols with idle clocks in between
    for (int k = 0; k < 200; k++) send($urandom_range(0, NSYM - 1), $urandom_range(0, 2) == 0);
    @(negedge clk);
    sym_valid = 0;
    repeat (10) @(negedge clk);
    // a back-to-back burst: its bits must leave one per clock, without gaps
    nbits_burst = 0;
    in_burst = 1;
    for (int k = 0; k < 200; k++) begin
      int s;
      s = $urandom_range(0, NSYM - 1);
      nbits_burst += huff_ref_code(s).len();
      send(s, 0);
    end
    @(negedge clk);
    sym_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_bits.size() != 0) begin failures++; $display("%0d bits missing", exp_bits.size()); end
    checks++;
    if (last_cyc - first_cyc + 1 != nbits_burst) begin
      failures++;
      $display("burst of %0d bits took %0d clocks", nbits_burst, last_cyc - first_cyc + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
