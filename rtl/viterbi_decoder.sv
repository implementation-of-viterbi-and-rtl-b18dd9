// viterbi_decoder: hard-decision Viterbi decoder for the rate 1/2,
// constraint length 3 convolutional code, with trace back.
//
// Data path, one received symbol per clock at most:
//   BMU    Hamming distance of the symbol to each expected symbol;
//   ACSU   four add-compare-select nodes update the path metrics and give
//          one decision bit per state;
//   SPMU   32 x 4 survivor memory; the decisions of step t go to word t
//          mod 32, so the two halves alternate every trellis length (16);
//   TBU    when a half is full it traces it back, starting from the state
//          with the best path metric, and emits 16 bits newest first;
//   LIFO   32 x 1 buffer that turns each group of 16 bits back into time
//          order.
// The path metrics run on across groups (the trellis is never restarted);
// each group of 16 steps is traced back on its own, from the best state at
// its end, while the next group is written.
//
// Interface: sym_valid/sym take a received symbol {c0, c1}; gaps between
// symbols are allowed. out_valid/out_bit give the decoded bits in order.
// Latency: the first bit of a group appears 20 clocks after the last symbol
// of that group was taken; the rate is one bit per symbol. Bits of a group
// are only released once the whole group has been received.
//
// The blocks and memory sizes follow the original architecture. Continuous path metrics,
// the best-state start of the trace back and the exact control timing are
// this design's choices.
module viterbi_decoder
  import viterbi_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic sym_valid,
  input  sym_t sym,
  output logic out_valid,
  output logic out_bit
);

  localparam int unsigned AW = $clog2(SPM_DEPTH);

  bm_t           bm [1 << SYM_W];
  pm_t           pm [NSTATES];
  dec_t          dec, tb_rdata;
  logic [AW-1:0] wcol, tb_raddr;
  logic          grp_done, grp_bank;
  state_t        best_state;
  logic          tb_re, tb_valid, tb_bit;
  logic          lifo_ready;

  bmu u_bmu (.rx_sym(sym), .bm(bm));

  acsu u_acsu (
    .clk, .rst_n,
    .en  (sym_valid),
    .bm  (bm),
    .pm  (pm),
    .dec (dec)
  );

  // Column write counter; a group ends with the write to column 15 of a half.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcol     <= '0;
      grp_done <= 1'b0;
      grp_bank <= 1'b0;
    end else begin
      grp_done <= sym_valid && (wcol[AW-2:0] == '1);
      if (sym_valid) begin
        wcol     <= wcol + 1'b1;
        grp_bank <= wcol[AW-1];
      end
    end
  end

  spmu #(.DEPTH(SPM_DEPTH), .WIDTH(NSTATES)) u_spmu (
    .clk,
    .we    (sym_valid),
    .waddr (wcol),
    .wdata (dec),
    .re    (tb_re),
    .raddr (tb_raddr),
    .rdata (tb_rdata)
  );

  // The path metrics seen one clock after the last step of a group are
  // those at the end of that group.
  pm_min_select u_best (.pm(pm), .best_state(best_state), .best_pm());

  tbu #(.LEN(TRELLIS_LEN)) u_tbu (
    .clk, .rst_n,
    .start       (grp_done),
    .start_state (best_state),
    .bank        (grp_bank),
    .re          (tb_re),
    .raddr       (tb_raddr),
    .rdata       (tb_rdata),
    .busy        (),
    .bit_valid   (tb_valid),
    .bit_out     (tb_bit)
  );

  lifo #(.DEPTH(SPM_DEPTH), .GROUP(TRELLIS_LEN)) u_lifo (
    .clk, .rst_n,
    .cs          (1'b1),
    .wr          (tb_valid),
    .din         (tb_bit),
    .rd          (lifo_ready),
    .group_ready (lifo_ready),
    .dout        (out_bit),
    .dout_valid  (out_valid)
  );

endmodule
