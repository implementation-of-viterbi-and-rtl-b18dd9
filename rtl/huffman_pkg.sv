// huffman_pkg: the six-symbol prefix code shared by the Huffman encoder and
// decoder.
//
// Symbols a..f carry the indices 0..5. With the occurrence counts
// 45, 13, 12, 16, 9 and 5 the Huffman procedure gives the codes
// a=0, b=101, c=100, d=111, e=1101, f=1100 (bit 0 means "left child",
// bit 1 "right child"). The encoder reads CODE_TABLE; the decoder walks
// TREE, the full binary tree of the same code: six leaves and five internal
// nodes. Indices 6 and 7 are not symbols.
package huffman_pkg;

  localparam int unsigned NSYM      = 6;
  localparam int unsigned SYM_W     = 3;
  localparam int unsigned MAX_LEN   = 4;   // longest code word
  localparam int unsigned LEN_W     = 3;
  localparam int unsigned NNODES    = NSYM - 1;  // internal nodes
  localparam int unsigned NODE_W    = 3;

  typedef logic [SYM_W-1:0] hsym_t;

  typedef struct packed {
    logic [LEN_W-1:0]   len;   // code length in bits
    logic [MAX_LEN-1:0] bits;  // code word, right aligned, first bit is bits[len-1]
  } code_t;

  // Code book, indexed by symbol.
  localparam code_t CODE_TABLE [NSYM] = '{
    '{len: 3'd1, bits: 4'b0000},   // a : 0
    '{len: 3'd3, bits: 4'b0101},   // b : 101
    '{len: 3'd3, bits: 4'b0100},   // c : 100
    '{len: 3'd3, bits: 4'b0111},   // d : 111
    '{len: 3'd4, bits: 4'b1101},   // e : 1101
    '{len: 3'd4, bits: 4'b1100}    // f : 1100
  };

  // One child of an internal node: a leaf carrying a symbol, or another node.
  typedef struct packed {
    logic               leaf;
    logic [NODE_W-1:0]  idx;   // symbol index if leaf, node index otherwise
  } child_t;

  typedef struct packed {
    child_t one;    // right child, taken on bit 1
    child_t zero;   // left child, taken on bit 0
  } node_t;

  // Internal nodes: 0 = root, 1 = "1", 2 = "10", 3 = "11", 4 = "110".
  localparam node_t TREE [NNODES] = '{
    '{one: '{1'b0, 3'd1}, zero: '{1'b1, 3'd0}},   // root : 0 -> a,  1 -> node 1
    '{one: '{1'b0, 3'd3}, zero: '{1'b0, 3'd2}},   // 1    : 0 -> node 2, 1 -> node 3
    '{one: '{1'b1, 3'd1}, zero: '{1'b1, 3'd2}},   // 10   : 0 -> c,  1 -> b
    '{one: '{1'b1, 3'd3}, zero: '{1'b0, 3'd4}},   // 11   : 0 -> node 4, 1 -> d
    '{one: '{1'b1, 3'd4}, zero: '{1'b1, 3'd5}}    // 110  : 0 -> f,  1 -> e
  };

endpackage
