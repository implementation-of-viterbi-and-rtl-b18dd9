// tb_pm_min_select: random and tie-heavy path metric sets; the selected
// state must be the lowest-numbered state holding the minimum.
module tb_pm_min_select;
  import viterbi_pkg::*;

  pm_t    pm [NSTATES];
  state_t best_state;
  pm_t    best_pm;
  int checks = 0, failures = 0;

  pm_min_select dut (.pm, .best_state, .best_pm);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int mn, ms;
      for (int n = 0; n < 4; n++)
        pm[n] = pm_t'((i < 1000) ? $urandom_range(0, 31) : $urandom_range(0, 3));
      #1;
      mn = 1000; ms = 0;
      for (int n = 0; n < 4; n++) if (int'(pm[n]) < mn) begin mn = int'(pm[n]); ms = n; end
      checks++;
      if (int'(best_state) != ms || int'(best_pm) != mn) begin
        failures++;
        $display("pm=%p got state %0d pm %0d expected %0d %0d", pm, best_state, best_pm, ms, mn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
