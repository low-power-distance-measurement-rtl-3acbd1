// motion_estimator: block-matching motion-estimation datapath whose
// best-match detection is carry-free.
//
// One pixel pair (current block z, candidate block zhat) enters per clock.
//   stage 0  pixel source -> input_register (enabled by the state machine)
//   stage 1  metric_unit computes f = |z - zhat| or (z - zhat)^2;
//            accumulation_unit adds f to the candidate's carry-save sum;
//            best_match_detection_unit compares that running sum with the
//            stored best (or threshold T) and raises GE;
//            me_controller decides, on the same edge, whether to keep
//            accumulating, abort the candidate, or (on its last pixel)
//            accept or reject it.
// A candidate of n pixels is therefore decided on the clock edge that ends
// stage 1 of its last pixel, and done pulses the cycle after: two edges after
// the last pixel was presented.  The search strategy (which candidates, in
// what order) is left to the pixel source; the datapath does not depend on
// it.  No carry-propagate adder appears anywhere between f and GE.
//
// Ports: see the submodules.  pix_first/pix_last frame a candidate; cand_mv
// is sampled with every pixel and the one of the last (or aborting) pixel is
// reported.  Parameters give pixel width, carry-save vector width (ACC_W,
// which must exceed log2 of the largest distance) and motion-vector width.
module motion_estimator
  import me_pkg::*;
#(
  parameter int unsigned PIX_W = PIX_W_DEF,
  parameter int unsigned ACC_W = ACC_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mb_start,
  input  metric_e          metric_sel,
  input  mode_e            mode,
  input  logic             early_term_en,
  input  logic             thr_load,
  input  logic [ACC_W-1:0] thr,
  input  logic             pix_valid,
  input  logic             pix_first,
  input  logic             pix_last,
  input  logic [PIX_W-1:0] pix_cur,
  input  logic [PIX_W-1:0] pix_ref,
  input  mv_t              cand_mv,
  output logic             skip,
  output logic             done,
  output logic             done_accepted,
  output logic             done_aborted,
  output mv_t              done_mv,
  output mv_t              best_mv,
  output logic             best_valid
);

  logic             in_en, acc_en, acc_first, update, clear, ge;
  logic             v1, first1, last1;
  logic [PIX_W-1:0] cur1, ref1;
  mv_t              mv1;
  logic [2*PIX_W-1:0] f;
  logic [ACC_W-1:0] s_t, c_t;

  input_register #(.PIX_W(PIX_W)) u_in (
    .clk, .rst_n, .en(in_en),
    .valid_i(pix_valid), .first_i(pix_first), .last_i(pix_last),
    .cur_i(pix_cur), .ref_i(pix_ref), .mv_i(cand_mv),
    .valid_o(v1), .first_o(first1), .last_o(last1),
    .cur_o(cur1), .ref_o(ref1), .mv_o(mv1)
  );

  metric_unit #(.PIX_W(PIX_W)) u_metric (
    .metric(metric_sel), .cur(cur1), .ref_px(ref1), .f(f)
  );

  accumulation_unit #(.ACC_W(ACC_W), .F_W(2*PIX_W)) u_acc (
    .clk, .rst_n, .en(acc_en), .first(acc_first), .f(f),
    .s_t(s_t), .c_t(c_t)
  );

  best_match_detection_unit #(.ACC_W(ACC_W)) u_bmdu (
    .clk, .rst_n, .mode, .clear, .update, .thr_load, .thr,
    .s_t(s_t), .c_t(c_t), .ge(ge)
  );

  me_controller u_ctrl (
    .clk, .rst_n, .mode, .early_term_en, .mb_start,
    .pix_valid_i(pix_valid), .pix_first_i(pix_first),
    .v1, .first1, .last1, .mv1, .ge,
    .in_en, .acc_en, .acc_first, .update, .clear,
    .skip, .done, .done_accepted, .done_aborted, .done_mv,
    .best_mv, .best_valid
  );

endmodule
