// conv_encoder: rate 1/2, constraint length 3 convolutional encoder.
//
// Each accepted input bit is shifted into a two-bit memory and produces one
// 2-bit channel symbol {c0, c1}, with c0 = u ^ u[t-1] ^ u[t-2] and
// c1 = u ^ u[t-2] (generators 7 and 5, octal). The trellis the decoder walks
// is the state diagram of this encoder, starting in S0 after reset. The code
// rate and constraint length follow the original architecture; the generator pair is this
// design's choice, as no other is given.
//
// Interface: in_valid/in_bit accept one bit per clock. out_valid/out_sym are
// registered, one clock after the input (latency 1, one symbol per clock).
module conv_encoder
  import viterbi_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_bit,
  output logic  out_valid,
  output sym_t  out_sym
);

  state_t state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sym <= expected_sym(state, in_bit);
        state   <= next_state(state, in_bit);
      end
    end
  end

endmodule
