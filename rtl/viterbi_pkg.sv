// viterbi_pkg: shared constants, types and trellis functions for the K=3,
// rate-1/2 hard-decision Viterbi decoder and its convolutional encoder.
//
// Code (from the design description): OUT_low = in(t) ^ in(t-2),
// OUT_high = in(t) ^ in(t-1) ^ in(t-2). A received symbol pair is carried as
// sym[1] = OUT_low, sym[0] = OUT_high, the bit order the decoder's data_in
// pins use. Printed as a two-character string "high low", so "10" means
// sym = 2'b01.
//
// Trellis state index s = {in(t-2), in(t-1)} after the transition: s[0] is
// the newest input bit, s[1] the one before. State s is entered from the
// two predecessors {d, s[1]}, d = 0 ("upper" branch) or d = 1 ("lower"
// branch); d is the decision stored in the survivor memory and is also the
// input bit that leaves the encoder's shift register on that transition.
//
// Widths: branch metrics are 0..2. Normalised path metrics never exceed 3
// for this code with the reset values used here (an exhaustive search of the
// reachable metric vectors gives a largest value of 3), so they are 2 bits;
// a metric plus a branch metric is at most 5 and fits the 3-bit sum type.
package viterbi_pkg;

  localparam int unsigned K          = 3;               // constraint length
  localparam int unsigned NUM_STATES = 1 << (K - 1);    // 4 trellis states
  localparam int unsigned SYM_W      = 2;               // rate 1/2: two code bits
  localparam int unsigned BM_W       = 2;               // branch metric 0..2
  localparam int unsigned PM_W       = 2;               // normalised path metric 0..3
  localparam int unsigned SUM_W      = 3;               // path metric + branch metric 0..7
  localparam int unsigned WINDOW_LENGTH_DEFAULT = 32;   // traceback depth

  typedef logic [SYM_W-1:0]      sym_t;       // {OUT_low, OUT_high}
  typedef logic [BM_W-1:0]       bm_t;
  typedef logic [PM_W-1:0]       pm_t;
  typedef logic [SUM_W-1:0]      sum_t;
  typedef logic [K-2:0]          state_t;     // {older bit, newer bit}
  typedef logic [NUM_STATES-1:0] decision_t;  // one survivor bit per state

  // Metric vectors, one entry per code symbol (bm_vec_t) or per state.
  typedef bm_t  [NUM_STATES-1:0] bm_vec_t;
  typedef pm_t  [NUM_STATES-1:0] pm_vec_t;
  typedef sum_t [NUM_STATES-1:0] sum_vec_t;

  // Encoder output for input u with shift register contents a = in(t-1),
  // b = in(t-2).
  function automatic sym_t encode(logic u, logic a, logic b);
    logic out_low, out_high;
    out_low  = u ^ b;
    out_high = u ^ a ^ b;
    return {out_low, out_high};
  endfunction

  // Predecessor of state s along the branch with decision d.
  function automatic state_t predecessor(state_t s, logic d);
    return {d, s[1]};
  endfunction

  // Code symbol expected on the branch into state s with decision d.
  function automatic sym_t branch_symbol(state_t s, logic d);
    return encode(s[0], s[1], d);
  endfunction

endpackage
