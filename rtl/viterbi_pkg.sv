// viterbi_pkg: constants, types and trellis functions shared by the rate 1/2,
// constraint length 3 Viterbi decoder and its convolutional encoder.
//
// State numbering follows the original trellis: a state is written as
// the two encoder memory bits, newest first, so "10" is S1 and "01" is S2.
// As a 2-bit number a state is {u[t-2], u[t-1]}: bit 0 holds the newest
// input, bit 1 the oldest. An input u moves state {a,b} to {b,u}.
//
// Generator polynomials are this design's choice (the common pair 7 and 5,
// octal): c0 = u ^ u[t-1] ^ u[t-2], c1 = u ^ u[t-2]. A channel symbol is the
// 2-bit vector {c0, c1}.
package viterbi_pkg;

  localparam int unsigned K          = 3;             // constraint length
  localparam int unsigned NSTATES    = 1 << (K - 1);  // 4 trellis states
  localparam int unsigned SYM_W      = 2;             // code bits per input bit
  localparam int unsigned BM_W       = 2;             // branch metric 0..2
  localparam int unsigned PM_W       = 5;             // path metric register width
  localparam int unsigned TRELLIS_LEN = 16;           // trellis length per trace back
  localparam int unsigned SPM_DEPTH  = 2 * TRELLIS_LEN;  // 32 words of survivor memory

  typedef logic [K-2:0]      state_t;
  typedef logic [SYM_W-1:0]  sym_t;
  typedef logic [BM_W-1:0]   bm_t;
  typedef logic [PM_W-1:0]   pm_t;
  typedef logic [NSTATES-1:0] dec_t;   // one decision bit per state

  // Next state for input u.
  function automatic state_t next_state(state_t s, logic u);
    return {s[0], u};
  endfunction

  // Code symbol {c0, c1} emitted when input u leaves state s.
  function automatic sym_t expected_sym(state_t s, logic u);
    return {u ^ s[0] ^ s[1], u ^ s[1]};
  endfunction

  // The two predecessors of state n: {x, n[1]} for x = 0 (upper) and 1 (lower).
  // A decision bit x selects the predecessor; the input that led into n is n[0].
  function automatic state_t pred_state(state_t n, logic x);
    return {x, n[1]};
  endfunction

endpackage
