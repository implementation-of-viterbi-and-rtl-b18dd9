// pm_min_select: best path metric selection.
//
// Compares the four path metrics and returns the state with the smallest
// one, the most likely end state, where trace back begins. Ties go to the
// lower state number. A two-level comparator tree; combinational. Path
// metrics here count mismatches, so the best metric is the minimum.
module pm_min_select
  import viterbi_pkg::*;
(
  input  pm_t    pm [NSTATES],
  output state_t best_state,
  output pm_t    best_pm
);

  state_t s01, s23;
  pm_t    m01, m23;

  always_comb begin
    s01 = (pm[1] < pm[0]) ? state_t'(1) : state_t'(0);
    m01 = (pm[1] < pm[0]) ? pm[1] : pm[0];
    s23 = (pm[3] < pm[2]) ? state_t'(3) : state_t'(2);
    m23 = (pm[3] < pm[2]) ? pm[3] : pm[2];
    best_state = (m23 < m01) ? s23 : s01;
    best_pm    = (m23 < m01) ? m23 : m01;
  end

endmodule
