// acsu: add-compare-select unit with the path metric registers.
//
// Four ACS nodes, one per trellis state, form two butterflies: source states
// S0 and S2 feed destination states S0 and S1, source states S1 and S3 feed
// S2 and S3. Destination n has the upper predecessor {0, n[1]} and the lower
// predecessor {1, n[1]}; both branches carry input bit n[0], and each
// branch's metric is the BMU output for the symbol that branch expects.
//
// When en is high the four new path metrics are registered and dec holds
// the four decision bits of this step (combinational, to be written into
// the survivor memory in the same clock). Path metrics are PM_W bits; after
// each step, when every metric has its top bit set, that bit is cleared in
// all of them. Subtracting the same amount from all metrics changes no
// comparison, and because the metrics of a k=3 hard-decision trellis never
// spread by more than 4 they can never overflow. After reset S0 starts at 0
// and the other states at INIT_BIAS, as the encoder starts in S0. Metric
// width, normalisation and the start values are this design's choices.
module acsu
  import viterbi_pkg::*;
#(
  parameter pm_t INIT_BIAS = pm_t'(4)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  bm_t  bm [1 << SYM_W],
  output pm_t  pm [NSTATES],
  output dec_t dec
);

  pm_t pm_sum [NSTATES];
  pm_t pm_next [NSTATES];
  logic all_high;

  for (genvar n = 0; n < NSTATES; n++) begin : g_node
    localparam state_t N  = state_t'(n);
    localparam state_t PU = {1'b0, N[1]};
    localparam state_t PL = {1'b1, N[1]};
    acs_node u_acs (
      .pm_upper (pm[PU]),
      .bm_upper (bm[expected_sym(PU, N[0])]),
      .pm_lower (pm[PL]),
      .bm_lower (bm[expected_sym(PL, N[0])]),
      .pm_new   (pm_sum[n]),
      .decision (dec[n])
    );
  end

  always_comb begin
    all_high = 1'b1;
    for (int n = 0; n < NSTATES; n++) all_high &= pm_sum[n][PM_W-1];
    for (int n = 0; n < NSTATES; n++) begin
      pm_next[n] = pm_sum[n];
      if (all_high) pm_next[n][PM_W-1] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NSTATES; n++) pm[n] <= (n == 0) ? '0 : INIT_BIAS;
    end else if (en) begin
      pm <= pm_next;
    end
  end

endmodule
