// rav_pkg: constants and helper functions shared by the relaxed adaptive
// Viterbi decoder.
//
// The defaults describe the main design point: a rate-1/2 convolutional code
// with constraint length K = 7 (64 trellis states) and generators 133/171
// (octal), 3-bit soft input, 6-bit two's-complement path metrics, retention
// window T = 24 and normalization bias r = 4, a register-exchange decision
// length of 40 and trace-back parameters {L, D} = {48, 24}. These numbers
// follow the published design. The trellis state convention is this design's
// own choice: a state holds the last K-1 input bits with the newest bit in the
// MSB, so state s goes to state {u, s[K-2:1]} on input u, and the two
// predecessors of state n are {n[K-3:0], b} for b = 0, 1. The decision bit of
// a state is that b.
package rav_pkg;

  // Code and word lengths of the main design point.
  localparam int unsigned K_DEF      = 7;
  localparam int unsigned G0_DEF     = 'o133;
  localparam int unsigned G1_DEF     = 'o171;
  localparam int unsigned SOFT_W_DEF = 3;
  localparam int unsigned PM_W_DEF   = 6;
  localparam int unsigned T_DEF      = 24;
  localparam int unsigned R_DEF      = 4;
  localparam int unsigned L_RE_DEF   = 40;
  localparam int unsigned L_TB_DEF   = 48;
  localparam int unsigned D_TB_DEF   = 24;

  // Number of distinct branch symbols of a rate-1/2 code.
  localparam int unsigned NSYM = 4;

  // Code symbol {c1, c0} on the branch from predecessor state `pred` into
  // state `nxt`, for constraint length k and generators g0, g1. The encoder
  // window is {u, pred} with the newest input u in bit k-1; the generator MSB
  // taps u.
  function automatic logic [1:0] branch_sym(int unsigned k, int unsigned g0,
                                            int unsigned g1, int unsigned nxt,
                                            int unsigned pred);
    int unsigned w;
    int unsigned u;
    u = (nxt >> (k - 2)) & 1;
    w = (u << (k - 1)) | pred;
    return {^(w & g1), ^(w & g0)};
  endfunction

endpackage
