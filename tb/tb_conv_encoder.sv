// tb_conv_encoder: drives random bits, with random idle clocks, into the
// encoder and compares every symbol with the reference encoder.
module tb_conv_encoder;
  import tb_ref_pkg::*;
  import viterbi_pkg::*;

  logic clk = 0, rst_n = 1;
  logic in_valid = 0, in_bit = 0;
  logic out_valid;
  sym_t out_sym;
  int checks = 0, failures = 0;
  bit data[$];
  bsym_t exp_q[$];

  conv_encoder dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  int got = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (out_sym !== exp_q[got]) begin
      failures++;
      $display("symbol %0d: got %b expected %b", got, out_sym, exp_q[got]);
    end
    got++;
  end

  initial begin
    for (int i = 0; i < 400; i++) data.push_back(bit'($urandom_range(0, 1)));
    conv_ref_encode(data, exp_q);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    foreach (data[i]) begin
      while ($urandom_range(0, 3) == 0) begin
        in_valid <= 0;
        @(posedge clk);
      end
      in_valid <= 1;
      in_bit   <= data[i];
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (got != data.size()) begin
      failures++;
      $display("got %0d symbols, expected %0d", got, data.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
