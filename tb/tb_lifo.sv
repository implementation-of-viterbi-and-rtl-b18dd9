// tb_lifo: writes groups of 16 random bits, sometimes back to back and
// sometimes with idle clocks, with reads enabled whenever a group is ready
// (as in the decoder). Each group must come out reversed. Also checks that
// nothing happens while chip select is low and that both halves are used.
module tb_lifo;
  logic clk = 0, rst_n = 1;
  logic cs = 1, wr = 0, din = 0, rd;
  logic group_ready, dout, dout_valid;
  int checks = 0, failures = 0, nout = 0, wraps = 0;
  bit exp_q[$];

  lifo dut (.*);

  assign rd = group_ready;

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && dout_valid) begin
    checks++;
    if (exp_q.size() == 0 || dout != exp_q[0]) begin
      failures++;
      $display("output %0d wrong", nout);
    end
    if (exp_q.size() != 0) void'(exp_q.pop_front());
    nout++;
  end

  // a read pointer passing from address 0 to 31 is the wrap between halves
  always @(posedge clk) if (rst_n && dut.rptr == 5'd0 && dut.do_rd) wraps++;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int g = 0; g < 20; g++) begin
      bit grp[16];
      for (int i = 0; i < 16; i++) grp[i] = bit'($urandom_range(0, 1));
      // written newest first, so the expected output is grp in order
      for (int i = 0; i < 16; i++) exp_q.push_back(grp[i]);
      for (int i = 15; i >= 0; i--) begin
        wr <= 1; din <= grp[i];
        @(posedge clk);
      end
      if (g % 4 == 3) begin
        wr <= 0;
        repeat (7) @(posedge clk);
      end
    end
    wr <= 0;
    repeat (20) @(posedge clk);
    // with chip select low neither write nor read acts
    cs <= 0;
    for (int i = 0; i < 16; i++) begin
      wr <= 1; din <= 1;
      @(posedge clk);
    end
    wr <= 0;
    repeat (20) @(posedge clk);
    checks++;
    if (nout != 20 * 16 || group_ready) begin
      failures++;
      $display("got %0d bits, group_ready=%0b", nout, group_ready);
    end
    checks++;
    if (wraps == 0) begin failures++; $display("read pointer never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
