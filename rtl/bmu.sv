// bmu: branch metric unit for hard-decision decoding.
//
// For each of the four possible expected symbols (index = the expected
// 2-bit symbol) the unit XORs it with the received symbol and counts the ones:
// the Hamming distance, 0..2. This is the XOR-and-adder structure of the
// design. Purely combinational; the ACS unit picks the metric of each branch
// by that branch's expected symbol.
module bmu
  import viterbi_pkg::*;
(
  input  sym_t rx_sym,
  output bm_t  bm [1 << SYM_W]
);

  for (genvar e = 0; e < (1 << SYM_W); e++) begin : g_bm
    sym_t diff;
    assign diff  = rx_sym ^ sym_t'(e);
    assign bm[e] = bm_t'(diff[0]) + bm_t'(diff[1]);
  end

endmodule
