// acs_node: one add-compare-select node (one wing of a trellis butterfly).
//
// Adds the branch metric of the upper and of the lower incoming branch to
// the path metric of its source state, compares the two sums and selects the
// smaller as the new path metric. The comparator output is the decision bit
// and drives the select line of the multiplexer: 0 keeps the upper
// (predecessor x = 0) path, 1 the lower. On a tie the upper path survives,
// which is this design's choice. Combinational.
module acs_node
  import viterbi_pkg::*;
(
  input  pm_t  pm_upper,
  input  bm_t  bm_upper,
  input  pm_t  pm_lower,
  input  bm_t  bm_lower,
  output pm_t  pm_new,
  output logic decision
);

  pm_t sum_upper, sum_lower;

  always_comb begin
    sum_upper = pm_upper + pm_t'(bm_upper);
    sum_lower = pm_lower + pm_t'(bm_lower);
    decision  = (sum_lower < sum_upper);
    pm_new    = decision ? sum_lower : sum_upper;
  end

endmodule
