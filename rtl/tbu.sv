// tbu: trace back unit.
//
// On start it walks the survivor memory backwards through one trellis
// length (LEN columns, LEN = 16) of the given half of the memory, beginning
// in start_state. For each column it reads the four decision bits; the bit
// of the current state names its predecessor {d, state[1]}, and the input
// bit that led into the current state, state[0], is the decoded bit. The
// decoded bits therefore leave newest first, one per clock, and the LIFO
// puts them back in order.
//
// Timing: the read for column LEN-1 is issued in the clock after start,
// the memory answers one clock later, and bit_out/bit_valid are registered,
// so the first bit is valid three clocks after start and the last LEN+2
// clocks after start. The start state travels with the first read, so a new
// start may come LEN clocks after the previous one, back to back. Starting
// in the best-metric state rather than a fixed state is this design's
// choice; the walk itself follows the original architecture.
module tbu
  import viterbi_pkg::*;
#(
  parameter int unsigned LEN  = TRELLIS_LEN,
  localparam int unsigned CW  = $clog2(LEN),
  localparam int unsigned AW  = CW + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  state_t        start_state,
  input  logic          bank,          // memory half to trace
  output logic          re,
  output logic [AW-1:0] raddr,
  input  dec_t          rdata,
  output logic          busy,
  output logic          bit_valid,
  output logic          bit_out
);

  logic [CW-1:0] col;
  logic          bank_q;
  logic          rd_pending, rd_first;
  state_t        state, start_q, cur;

  assign re    = busy;
  assign raddr = {bank_q, col};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      col        <= '0;
      bank_q     <= 1'b0;
      start_q    <= '0;
    end else if (start) begin
      busy    <= 1'b1;
      col     <= CW'(LEN - 1);
      bank_q  <= bank;
      start_q <= start_state;
    end else if (busy) begin
      col <= col - 1'b1;
      if (col == '0) busy <= 1'b0;
    end
  end

  // Read data pipeline stage.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pending <= 1'b0;
      rd_first   <= 1'b0;
    end else begin
      rd_pending <= busy;
      rd_first   <= busy && (col == CW'(LEN - 1));
    end
  end

  assign cur = rd_first ? start_q : state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= '0;
      bit_valid <= 1'b0;
      bit_out   <= 1'b0;
    end else begin
      bit_valid <= rd_pending;
      if (rd_pending) begin
        bit_out <= cur[0];
        state   <= pred_state(cur, rdata[cur]);
      end
    end
  end

  // A new trace back must not begin before the previous one has issued
  // all its reads.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                 start |-> !busy || (col == '0));

endmodule
