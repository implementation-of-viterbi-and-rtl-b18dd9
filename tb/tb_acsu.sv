// tb_acsu: feeds the ACS unit branch metrics of random received symbols and
// compares, step by step, the four decision bits and the path metrics with
// an integer reference. The hardware metrics must equal the reference less
// a multiple of 16 (the normalisation), which must have happened.
module tb_acsu;
  import tb_ref_pkg::*;
  import viterbi_pkg::*;

  logic clk = 0, rst_n = 1, en = 0;
  bm_t  bm [4];
  pm_t  pm [NSTATES];
  dec_t dec;
  int checks = 0, failures = 0, norms = 0;

  acsu dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rpm[4], npm[4], offset;
    bit rdec[4];
    for (int e = 0; e < 4; e++) bm[e] = '0;
    rpm = '{0, 4, 4, 4};
    offset = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    for (int t = 0; t < 600; t++) begin
      bsym_t rx;
      rx = bsym_t'($urandom_range(0, 3));
      for (int e = 0; e < 4; e++) bm[e] = bm_t'(ham(rx, bsym_t'(e)));
      en = ($urandom_range(0, 4) != 0);
      for (int n = 0; n < 4; n++) begin
        int pu, pl, su, sl;
        pu = n >> 1; pl = 2 + (n >> 1);
        su = rpm[pu] + ham(rx, exp_sym(pu, n[0]));
        sl = rpm[pl] + ham(rx, exp_sym(pl, n[0]));
        rdec[n] = (sl < su);
        npm[n]  = rdec[n] ? sl : su;
      end
      #1;
      if (en) begin
        for (int n = 0; n < 4; n++) begin
          checks++;
          if (dec[n] != rdec[n]) begin
            failures++;
            $display("step %0d state %0d decision %0b expected %0b", t, n, dec[n], rdec[n]);
          end
        end
      end
      @(posedge clk);
      #1;
      if (en) begin
        int mn;
        rpm = npm;
        mn = rpm[0];
        for (int n = 1; n < 4; n++) if (rpm[n] < mn) mn = rpm[n];
        if (mn - offset >= 16) begin
          offset += 16;
          norms++;
        end
        for (int n = 0; n < 4; n++) begin
          checks++;
          if (int'(pm[n]) != rpm[n] - offset) begin
            failures++;
            $display("step %0d state %0d pm %0d expected %0d", t, n, pm[n], rpm[n] - offset);
          end
        end
      end
    end
    checks++;
    if (norms == 0) begin
      failures++;
      $display("no normalisation happened");
    end
    $display("normalisations: %0d", norms);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
