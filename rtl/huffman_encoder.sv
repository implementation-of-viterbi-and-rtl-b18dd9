// huffman_encoder: serial encoder for the six-symbol Huffman code
// a=0, b=101, c=100, d=111, e=1101, f=1100.
//
// A symbol index (0..5 for a..f) is looked up in the code book; the code
// word and its length are loaded into a shift register and sent first bit
// first, one bit per clock. Code words of consecutive symbols follow each
// other with no gap, so the output is the plain concatenation of the codes.
//
// Interface: sym_valid/sym_ready handshake on the input; sym_ready is high
// while the last bit of the current word goes out, so a new symbol is taken
// in the same clock and the bit stream stays continuous. bit_valid/bit_out
// carry the code bits, registered; last marks the final bit of each word.
// The code follows the original architecture; the serial interface is this design's choice.
module huffman_encoder
  import huffman_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  sym_valid,
  input  hsym_t sym,
  output logic  sym_ready,
  output logic  bit_valid,
  output logic  bit_out,
  output logic  last
);

  logic [MAX_LEN-1:0] sreg;   // remaining bits, next bit at sreg[MAX_LEN-1]
  logic [LEN_W-1:0]   left;   // bits still to send
  code_t              code;

  assign sym_ready = (left <= LEN_W'(1));
  assign bit_valid = (left != '0);
  assign bit_out   = sreg[MAX_LEN-1];
  assign last      = (left == LEN_W'(1));

  always_comb begin
    code = CODE_TABLE[(sym < hsym_t'(NSYM)) ? sym : hsym_t'(0)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg <= '0;
      left <= '0;
    end else if (sym_valid && sym_ready) begin
      // left-align the code word so its first bit leaves first
      sreg <= code.bits << (MAX_LEN - int'(code.len));
      left <= code.len;
    end else if (left != '0) begin
      sreg <= sreg << 1;
      left <= left - 1'b1;
    end
  end

  a_symbol_range: assert property (@(posedge clk) disable iff (!rst_n)
                                   sym_valid |-> sym < hsym_t'(NSYM));

endmodule
