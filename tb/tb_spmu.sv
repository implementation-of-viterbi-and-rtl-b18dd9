// tb_spmu: random writes and reads on the two ports of the survivor memory,
// checked against a shadow array, including reads of the address being
// written (old data expected) and the one-clock read latency.
module tb_spmu;
  logic       clk = 0;
  logic       we = 0, re = 0;
  logic [4:0] waddr = '0, raddr = '0;
  logic [3:0] wdata = '0, rdata;
  logic [3:0] shadow [32];
  int checks = 0, failures = 0;

  spmu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word once
    for (int a = 0; a < 32; a++) begin
      @(negedge clk);
      we = 1; waddr = 5'(a); wdata = 4'($urandom_range(0, 15));
      shadow[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 500; i++) begin
      logic [3:0] expd;
      @(negedge clk);
      re = 1;
      raddr = 5'($urandom_range(0, 31));
      we = ($urandom_range(0, 1) == 1);
      waddr = (i % 5 == 0) ? raddr : 5'($urandom_range(0, 31));
      wdata = 4'($urandom_range(0, 15));
      expd = shadow[raddr];
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expd) begin
        failures++;
        $display("read %0d got %h expected %h", raddr, rdata, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
