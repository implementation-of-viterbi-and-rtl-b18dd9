// tb_huffman_decoder: decodes the worked example 001011101 (must give
// a a b e), then a random stream of concatenated reference code words with
// random idle clocks between bits; every decoded symbol is compared.
module tb_huffman_decoder;
  import tb_ref_pkg::*;
  import huffman_pkg::*;

  logic  clk = 0, rst_n = 1;
  logic  bit_valid = 0, bit_in = 0;
  logic  sym_valid;
  hsym_t sym;
  int checks = 0, failures = 0;
  int exp_syms[$];
  int nsyms = 0;

  huffman_decoder dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && sym_valid) begin
    checks++;
    if (exp_syms.size() == 0 || int'(sym) != exp_syms[0]) begin
      failures++;
      $display("symbol %0d: got %0d", nsyms, sym);
    end
    if (exp_syms.size() != 0) void'(exp_syms.pop_front());
    nsyms++;
  end

  task automatic send_bits(string b, bit idle);
    for (int i = 0; i < b.len(); i++) begin
      bit_valid <= 1;
      bit_in    <= (b[i] == "1");
      @(posedge clk);
      if (idle && $urandom_range(0, 3) == 0) begin
        bit_valid <= 0;
        @(posedge clk);
      end
    end
  endtask

  initial begin
    int total;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    exp_syms = '{0, 0, 1, 4};
    send_bits("001011101", 0);
    total = 4;
    for (int k = 0; k < 400; k++) begin
      int s;
      s = $urandom_range(0, NSYM - 1);
      exp_syms.push_back(s);
      total++;
      send_bits(huff_ref_code(s), 1);
    end
    bit_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (nsyms != total) begin failures++; $display("%0d symbols, expected %0d", nsyms, total); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
