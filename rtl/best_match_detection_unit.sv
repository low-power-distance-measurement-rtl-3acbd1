// best_match_detection_unit: carry-free "greater than" between the running
// distance of a candidate and the best distance so far (or a threshold T).
//
// How it works.  The current distance arrives in carry-save form, D^t = S^t +
// 2*C^t, straight from the accumulation unit's adder.  The best distance is
// kept in the same form, but stored inverted: the two best-match registers
// hold ~S^(t-1) and ~C^(t-1).  Subtraction then becomes addition of one's
// complements.  With W = ACC_W + 1,
//   X = S^t + 2*C^t + (2^W - 1 - S^(t-1)) + (2^W - 1 - 2*C^(t-1)) + 1
//     = 2^(W+1) - 1 + D^t - D^(t-1),
// so D^t > D^(t-1) exactly when X >= 2^(W+1).  The four operands are reduced
// by two carry-save rows:
//   row 1 (ACC_W+1 columns): S^t, C^t << 1 with a constant in column 0, and
//          ~S^(t-1) with a constant in column ACC_W (the top bit of its
//          W-bit complement);
//   row 2 (ACC_W+2 columns): row 1's sum and shifted carry, and
//          {~C^(t-1), 1}, the W-bit complement of 2*C^(t-1);
// and a carry-out detector over ACC_W+2 bits turns row 2's pair into GE.  No
// carry-propagate adder or subtracter is used; the comparison needs no clock
// cycle of its own, so GE is valid in the cycle S^t and C^t are.
//
// Threshold mode (mode = MODE_THRESHOLD) uses only the S register, row 1 and
// the detector.  The S register then holds ~T, both row-1 constants are 0, and
// row 1 forms X1 = D^t + 2^ACC_W - 1 - T, so D^t > T exactly when
// X1 >= 2^ACC_W.  Row 2 is not used and its operand is held at zero.
//
// Interface and timing.  ge is combinational from s_t, c_t and the registers.
// On a rising clk edge: clear sets both registers to 0, which encodes the
// largest distance (so the first candidate always wins); else thr_load stores
// ~thr in the S register; else update (MODE_BEST only) stores ~s_t, ~c_t.
// Reset is asynchronous and equals clear.  Change mode only together with a
// clear or a threshold load.
//
// The inverted storage, the two adder rows with their '1'/'0' constant inputs,
// the carry-out detector and the reduced threshold datapath follow the source
// architecture.  The exact column bookkeeping (operands one bit wider than the
// registers, so any pair of ACC_W-bit vectors compares correctly), the clear
// and the threshold load port are this design's own.
module best_match_detection_unit
  import me_pkg::*;
#(
  parameter int unsigned ACC_W = ACC_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  mode_e            mode,
  input  logic             clear,
  input  logic             update,
  input  logic             thr_load,
  input  logic [ACC_W-1:0] thr,
  input  logic [ACC_W-1:0] s_t,
  input  logic [ACC_W-1:0] c_t,
  output logic             ge
);

  localparam int unsigned W1 = ACC_W + 1;  // row-1 width
  localparam int unsigned W2 = ACC_W + 2;  // row-2 and detector width

  // Best-match registers, holding the complements ~S^(t-1) and ~C^(t-1).
  logic [ACC_W-1:0] best_s_n, best_c_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_s_n <= '0;
      best_c_n <= '0;
    end else if (clear) begin
      best_s_n <= '0;
      best_c_n <= '0;
    end else if (thr_load) begin
      best_s_n <= ~thr;
    end else if (update && mode == MODE_BEST) begin
      best_s_n <= ~s_t;
      best_c_n <= ~c_t;
    end
  end

  // '1'/'0' constant inputs of row 1: 1 in best-match mode, 0 in threshold mode.
  logic k;
  assign k = (mode == MODE_BEST);

  // Row 1.
  logic [W1-1:0] r1_x, r1_y, r1_z, r1_s, r1_c;
  assign r1_x = {1'b0, s_t};
  assign r1_y = {c_t, k};
  assign r1_z = {k, best_s_n};

  csa_row #(.WIDTH(W1)) u_row1 (
    .x(r1_x), .y(r1_y), .z(r1_z), .s(r1_s), .c(r1_c)
  );

  // Row 2; its third operand is gated off in threshold mode.  Its top column
  // has a single input, so r2_c's top bit is always 0 and is not used.
  logic [W2-1:0] r2_x, r2_y, r2_z, r2_s, r2_c;
  assign r2_x = {1'b0, r1_s};
  assign r2_y = {r1_c, 1'b0};
  assign r2_z = k ? {1'b0, best_c_n, 1'b1} : '0;

  csa_row #(.WIDTH(W2)) u_row2 (
    .x(r2_x), .y(r2_y), .z(r2_z), .s(r2_s), .c(r2_c)
  );

  // Detector operands.  Best-match mode: X = r2_s + 2*r2_c >= 2^W2.
  // Threshold mode: X1 = r1_s + 2*r1_c >= 2^ACC_W.  The top two columns of X1
  // are ORed directly; the lower ACC_W columns go to the detector, offset by
  // 3*2^ACC_W so that their carry into column ACC_W becomes its carry out.
  logic [W2-1:0] det_a, det_b;
  logic          det_cout;
  logic          thr_high;

  always_comb begin
    if (k) begin
      det_a = r2_s;
      det_b = {r2_c[W2-2:0], 1'b0};
    end else begin
      det_a = {2'b11, r1_s[ACC_W-1:0]};
      det_b = {2'b00, r1_c[ACC_W-2:0], 1'b0};
    end
  end

  carry_out_detector #(.WIDTH(W2)) u_det (
    .a(det_a), .b(det_b), .cout(det_cout)
  );

  assign thr_high = r1_s[ACC_W] | r1_c[ACC_W-1] | r1_c[ACC_W];
  assign ge       = k ? det_cout : (thr_high | det_cout);

endmodule
