// me_pkg: types and default sizes shared by the motion-estimation datapath.
//
// The distance D of a candidate block is never formed as a binary number in
// this design.  It lives as a carry-save pair {C, S} with D = S + 2*C, both
// vectors ACC_W bits wide.  The defaults below are this design's choice: the
// source architecture is parameterised and prints no widths.  ACC_W = 24 holds
// the largest MSE of a 16x16 block of 8-bit pixels (256 * 255^2 = 16,646,400
// < 2^24).  The block size itself is not a parameter: the pixel source marks
// the first and last pixel of every candidate, so any block shape works as
// long as its largest distance stays below 2^ACC_W.
package me_pkg;

  parameter int unsigned PIX_W_DEF = 8;   // pixel width
  parameter int unsigned ACC_W_DEF = 24;  // carry-save accumulator width (m)
  parameter int unsigned MV_W_DEF  = 8;   // width of one motion-vector component

  // Matching metric f() of eq. D = sum f(z - zhat).
  typedef enum logic {
    METRIC_SAD = 1'b0,  // |z - zhat|
    METRIC_MSE = 1'b1   // (z - zhat)^2
  } metric_e;

  // What the best-match detection unit compares the running distance with.
  typedef enum logic {
    MODE_BEST      = 1'b0,  // best distance found so far for this macroblock
    MODE_THRESHOLD = 1'b1   // a fixed threshold T loaded beforehand
  } mode_e;

  // Candidate motion vector (horizontal, vertical), two's complement.
  typedef struct packed {
    logic signed [MV_W_DEF-1:0] x;
    logic signed [MV_W_DEF-1:0] y;
  } mv_t;

endpackage
