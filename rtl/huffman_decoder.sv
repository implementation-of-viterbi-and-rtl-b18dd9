// huffman_decoder: serial decoder for the six-symbol Huffman code.
//
// A register holds the internal tree node reached so far, starting at the
// root. Each code bit moves to the left (0) or right (1) child of that node;
// when the child is a leaf its symbol is output and the walk restarts at the
// root with the next bit. Because no code word is a prefix of another, the
// stream needs no separators. The tree is the full binary tree of the code
// a=0, b=101, c=100, d=111, e=1101, f=1100, with five internal nodes.
//
// Interface: bit_valid/bit_in take one code bit per clock. sym_valid/sym are
// registered and appear one clock after the bit that completes a word.
// The tree walk follows the original architecture; the serial interface is this design's
// choice.
module huffman_decoder
  import huffman_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  bit_valid,
  input  logic  bit_in,
  output logic  sym_valid,
  output hsym_t sym
);

  logic [NODE_W-1:0] node;
  child_t            nxt;

  always_comb begin
    nxt = bit_in ? TREE[node].one : TREE[node].zero;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      node      <= '0;
      sym_valid <= 1'b0;
      sym       <= '0;
    end else begin
      sym_valid <= 1'b0;
      if (bit_valid) begin
        if (nxt.leaf) begin
          sym_valid <= 1'b1;
          sym       <= hsym_t'(nxt.idx);
          node      <= '0;
        end else begin
          node <= nxt.idx;
        end
      end
    end
  end

  a_node_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 node < NODE_W'(NNODES));

endmodule
