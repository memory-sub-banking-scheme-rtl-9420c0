// siso_pkg: types, constants and trellis functions shared by the sliding-window
// SISO decoder.
//
// The decoder works on the 8-state recursive systematic convolutional code used
// by the 3GPP turbo code (feedback 1+D^2+D^3, parity 1+D+D^3). The code itself is
// this design's choice; the decoding rule is the max* form of the MAP algorithm:
// a log-likelihood ratio is the max* over the "1" transitions minus the max* over
// the "0" transitions of alpha + gamma + beta, with max*(x,y) = max(x,y) + d(x,y).
//
// Fixed-point formats (all this design's choice):
//   * channel and a-priori LLRs are IN_W-bit signed numbers with two fractional bits;
//   * a stored branch-metric word is a pair {ga, gb}: ga = Lsys + Lapr (weight of the
//     information bit), gb = Lpar (weight of the parity bit), so that the branch
//     metric of a transition with bits (u, c) is u*ga + c*gb;
//   * state metrics are SM_W-bit signed numbers, renormalised every stage by
//     subtracting the metric of state 0;
//   * the max* correction d is a 4-entry staircase of ln(1+exp(-|x-y|/4))*4.
package siso_pkg;

  localparam int unsigned NS    = 8;   // trellis states
  localparam int unsigned IN_W  = 6;   // channel / a-priori LLR width
  localparam int unsigned G_W   = IN_W + 1;  // branch-metric component width
  localparam int unsigned SM_W  = 12;  // state-metric width
  localparam int unsigned LLR_W = 14;  // output LLR width

  // metric given to states the encoder cannot be in (start of frame)
  localparam logic signed [SM_W-1:0] SM_NEG = -SM_W'(256);

  typedef logic signed [IN_W-1:0]  llr_in_t;
  typedef logic signed [G_W-1:0]   gcomp_t;
  typedef logic signed [SM_W-1:0]  sm_t;
  typedef logic signed [LLR_W-1:0] llr_t;

  // one data-memory word: the branch metrics of one trellis stage
  typedef struct packed {
    gcomp_t ga;   // Lsys + Lapr
    gcomp_t gb;   // Lpar
  } bm_word_t;

  // one alpha-memory word: the forward metrics of all states of one stage
  typedef sm_t [NS-1:0] sm_vec_t;

  // Encoder state s = {r1, r2, r3}, r1 the most recent register.
  function automatic logic [2:0] next_state(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return {a, s[2], s[1]};
  endfunction

  function automatic logic parity_bit(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return a ^ s[2] ^ s[0];
  endfunction

  // branch metric of transition (s, u)
  function automatic sm_t branch_metric(input bm_word_t w, input logic [2:0] s,
                                        input logic u);
    sm_t g;
    g = '0;
    if (u)                g = g + SM_W'(w.ga);
    if (parity_bit(s, u)) g = g + SM_W'(w.gb);
    return g;
  endfunction

  // max*(x, y) = max(x, y) + ln(1 + exp(-|x - y|)), two fractional bits
  function automatic logic signed [LLR_W+1:0] max_star(input logic signed [LLR_W+1:0] x,
                                                       input logic signed [LLR_W+1:0] y);
    logic signed [LLR_W+1:0] m, d;
    m = (x > y) ? x : y;
    d = (x > y) ? (x - y) : (y - x);
    if (d == 0)     return m + 3;
    else if (d < 4) return m + 2;
    else if (d < 8) return m + 1;
    else            return m;
  endfunction

endpackage
