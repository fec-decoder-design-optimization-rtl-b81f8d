// fec_pkg: constants and types shared by the k = 7 Viterbi decoder.
// The constraint length, the generator polynomials (133 and 171 octal), the
// 3-bit sign-magnitude soft symbols, the 64 states and the 6-bit state metric
// words follow the document. The branch-metric width, the pair structure with
// erasure flags and the helper functions are this design's own choices.
package fec_pkg;

  localparam int unsigned K        = 7;            // constraint length
  localparam int unsigned SW       = K - 1;        // state number width (64 states)
  localparam int unsigned SYM_W    = 3;            // soft symbol: {sign, mag[1:0]}
  localparam int unsigned BM_W     = 4;            // branch metric 0..14
  localparam int unsigned SM_W     = 6;            // state metric word (32 x 6 RAMs)
  localparam logic [6:0]  G1       = 7'o133;       // I output polynomial
  localparam logic [6:0]  G2       = 7'o171;       // Q output polynomial

  // One soft symbol: sign bit is the hard decision (1 = logic "one"),
  // magnitude is its strength (0 weakest .. 3 strongest).
  typedef logic [SYM_W-1:0] sym_t;

  // One symbol pair handed to the branch metric logic. era_* marks a
  // punctured (dummy) position that must be ignored.
  typedef struct packed {
    sym_t i;
    sym_t q;
    logic era_i;
    logic era_q;
  } pair_t;

  typedef logic [BM_W-1:0] bm_t;
  typedef logic [SM_W-1:0] sm_t;
  typedef logic [SW-1:0]   state_t;

  // Even/odd parity of a state number (XOR of all its bits). States 2p and
  // 2p+1, and states p and p+32, always have opposite parity.
  function automatic logic st_parity(input state_t s);
    return ^s;
  endfunction

  // Rotate a 6-bit state number left by r (0..5) places.
  function automatic state_t rotl(input state_t s, input logic [2:0] r);
    return state_t'((s << r) | (s >> (3'(SW) - r)));
  endfunction

  // Codeword {c1, c2} of the branch that leaves state 2p with input 0 and
  // enters state p. The branch 2p+1 -> p carries its complement, as do the
  // branches into p+32 with the other predecessor (Eq. 5-8).
  function automatic logic [1:0] base_codeword(input logic [4:0] p);
    logic [6:0] reg7;    // {u_t, u_t-1 .. u_t-6}, u_t = 0, u_t-6 = 0
    reg7 = {1'b0, p, 1'b0};
    return {^(reg7 & G1), ^(reg7 & G2)};
  endfunction

endpackage
