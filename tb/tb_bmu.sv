// tb_bmu: applies every received symbol and checks all four branch metrics
// against a Hamming distance counted bit by bit.
module tb_bmu;
  import viterbi_pkg::*;

  sym_t rx_sym;
  bm_t  bm [4];
  int checks = 0, failures = 0;

  bmu dut (.rx_sym, .bm);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      rx_sym = sym_t'(r);
      #1;
      for (int e = 0; e < 4; e++) begin
        int expd;
        expd = ((r & 1) != (e & 1) ? 1 : 0) + ((r & 2) != (e & 2) ? 1 : 0);
        checks++;
        if (int'(bm[e]) != expd) begin
          failures++;
          $display("rx=%0d e=%0d got %0d expected %0d", r, e, bm[e], expd);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
