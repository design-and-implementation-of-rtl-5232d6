// Shared constants, types and trellis functions of the modified Viterbi
// (MVA) codec.
//
// The code is the rate-1/2, constraint-length-3 convolutional code of the
// design: two output bits per input bit, generator polynomials 111 (Y0) and
// 101 (Y1) applied to the register window {X(n), X(n-1), X(n-2)}.  An
// encoder state is {X(n-1), X(n-2)}, the newest bit in the MSB, so the
// trellis has 2^(K-1) = 4 states.  A channel symbol is packed as {Y0, Y1}
// (bit 1 = Y0, bit 0 = Y1).
//
// The functions below are written for any constraint length; the modules
// take CL and the two generators as parameters whose defaults come from
// here.  Only K = 3 with generators 111/101 is the published code.
package mva_pkg;

  // Constraint length K and the generator polynomials of the two adders.
  // Bit CL-1 of a generator taps X(n), bit 0 taps X(n-CL+1).
  localparam int unsigned CL_DEF = 3;
  localparam logic [CL_DEF-1:0] G0_DEF = 3'b111;
  localparam logic [CL_DEF-1:0] G1_DEF = 3'b101;

  // MVA retention threshold T (a path survives if metric <= bm + T).
  localparam int unsigned THRESH_DEF = 1;

  // Trellis stages per decoded frame: 8 symbols = 16 channel bits.
  localparam int unsigned FRAME_LEN_DEF = 8;

  // A received or transmitted symbol, {Y0, Y1}.
  typedef logic [1:0] sym_t;

  // Hamming distance between two symbols (0..2).
  function automatic logic [1:0] sym_dist(sym_t a, sym_t b);
    sym_t d;
    d = a ^ b;
    return {1'b0, d[1]} + {1'b0, d[0]};
  endfunction

endpackage
