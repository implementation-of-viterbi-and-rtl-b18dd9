// viterbi_huffman_top: the two designs side by side.
//
// Channel coding: a rate 1/2, k=3 convolutional encoder and the matching
// hard-decision Viterbi decoder. Their ports are separate, so the channel
// (and any bit errors on it) lies outside: enc_sym is what is sent, dec_sym
// what is received.
//
// Source coding: a Huffman encoder and decoder for the six-symbol code
// a=0, b=101, c=100, d=111, e=1101, f=1100, likewise with their own ports,
// so the serial code stream between them is visible and can be routed
// anywhere.
//
// All four parts share one clock and an active-low asynchronous reset.
// Timing is that of each part (see their headers).
module viterbi_huffman_top
  import viterbi_pkg::*;
  import huffman_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // convolutional encoder
  input  logic  enc_valid,
  input  logic  enc_bit,
  output logic  enc_sym_valid,
  output sym_t  enc_sym,
  // Viterbi decoder
  input  logic  dec_sym_valid,
  input  sym_t  dec_sym,
  output logic  dec_out_valid,
  output logic  dec_out_bit,
  // Huffman encoder
  input  logic  henc_sym_valid,
  input  hsym_t henc_sym,
  output logic  henc_sym_ready,
  output logic  henc_bit_valid,
  output logic  henc_bit,
  output logic  henc_last,
  // Huffman decoder
  input  logic  hdec_bit_valid,
  input  logic  hdec_bit,
  output logic  hdec_sym_valid,
  output hsym_t hdec_sym
);

  conv_encoder u_conv_encoder (
    .clk, .rst_n,
    .in_valid  (enc_valid),
    .in_bit    (enc_bit),
    .out_valid (enc_sym_valid),
    .out_sym   (enc_sym)
  );

  viterbi_decoder u_viterbi_decoder (
    .clk, .rst_n,
    .sym_valid (dec_sym_valid),
    .sym       (dec_sym),
    .out_valid (dec_out_valid),
    .out_bit   (dec_out_bit)
  );

  huffman_encoder u_huffman_encoder (
    .clk, .rst_n,
    .sym_valid (henc_sym_valid),
    .sym       (henc_sym),
    .sym_ready (henc_sym_ready),
    .bit_valid (henc_bit_valid),
    .bit_out   (henc_bit),
    .last      (henc_last)
  );

  huffman_decoder u_huffman_decoder (
    .clk, .rst_n,
    .bit_valid (hdec_bit_valid),
    .bit_in    (hdec_bit),
    .sym_valid (hdec_sym_valid),
    .sym       (hdec_sym)
  );

endmodule
