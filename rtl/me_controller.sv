// me_controller: state machine of the motion estimator.
//
// It watches the pixel in the input register (stage 1) and the GE flag of the
// best-match detection unit, which compares the running distance including
// that pixel with the reference distance in the same cycle.
//  * Every live pixel enables the accumulation registers (acc_en); a
//    candidate's first pixel also restarts the accumulation (acc_first).
//  * On a candidate's last pixel it decides (eq. V^t = V^(t-1) if D^t >
//    D^(t-1), else v^t): when GE is low the candidate wins, the detection
//    unit stores its distance (update, best-match mode only) and its motion
//    vector becomes best_mv.  Ties go to the newer candidate.
//  * Partial-distance abort: with early_term_en set, a candidate whose
//    partial distance already exceeds the reference (GE high before its last
//    pixel) is dropped at once.  The controller then disables the input and
//    accumulation registers until the next candidate's first pixel, and
//    pulses skip so that the pixel source may jump to that candidate.
//  * In threshold mode the reference is the threshold T: a candidate whose
//    distance does not exceed T is accepted and its vector is reported.
//  * mb_start starts a new macroblock: best_valid is cleared and, in
//    best-match mode, the stored best distance is reset to "infinity".
//
// Timing: acc_en, acc_first, update, clear and in_en are combinational.
// done, done_accepted, done_aborted, done_mv and skip are registered and pulse
// for one cycle after the decision; best_mv/best_valid change on that same
// edge.  mb_start must not coincide with a candidate's last pixel in stage 1.
//
// The decision rule, the update and register-enable outputs and the early
// abort come from the source; its state encoding and the first/last pixel
// framing are not given, and the two-state scheme here is this design's own.
module me_controller
  import me_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  mode_e mode,
  input  logic  early_term_en,
  input  logic  mb_start,
  // incoming pixel, for the input-register enable
  input  logic  pix_valid_i,
  input  logic  pix_first_i,
  // pixel in the input register
  input  logic  v1,
  input  logic  first1,
  input  logic  last1,
  input  mv_t   mv1,
  // from the best-match detection unit
  input  logic  ge,
  // register enables and detection-unit controls
  output logic  in_en,
  output logic  acc_en,
  output logic  acc_first,
  output logic  update,
  output logic  clear,
  // results
  output logic  skip,
  output logic  done,
  output logic  done_accepted,
  output logic  done_aborted,
  output mv_t   done_mv,
  output mv_t   best_mv,
  output logic  best_valid
);

  typedef enum logic {
    ST_RUN  = 1'b0,  // accumulating the current candidate
    ST_DROP = 1'b1   // candidate aborted, waiting for the next first pixel
  } state_e;

  state_e state_q, state_d;
  logic   active, decide, abort, accept;

  always_comb begin
    active    = v1 && (state_q == ST_RUN || first1);
    decide    = active && last1;
    abort     = active && !last1 && early_term_en && ge;
    accept    = decide && !ge;

    acc_en    = active;
    acc_first = active && first1;
    update    = accept && (mode == MODE_BEST);
    clear     = mb_start && (mode == MODE_BEST);

    state_d = state_q;
    if (abort)       state_d = ST_DROP;
    else if (active) state_d = ST_RUN;

    in_en = pix_valid_i && (state_d == ST_RUN || pix_first_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= ST_RUN;
      skip          <= 1'b0;
      done          <= 1'b0;
      done_accepted <= 1'b0;
      done_aborted  <= 1'b0;
      done_mv       <= '0;
      best_mv       <= '0;
      best_valid    <= 1'b0;
    end else begin
      state_q       <= state_d;
      skip          <= abort;
      done          <= decide || abort;
      done_accepted <= accept;
      done_aborted  <= abort;
      if (decide || abort) done_mv <= mv1;
      if (mb_start) begin
        best_valid <= 1'b0;
      end else if (accept) begin
        best_mv    <= mv1;
        best_valid <= 1'b1;
      end
    end
  end

  // A new macroblock must not start while a candidate is being decided.
  a_mb_start_not_on_decision : assert property (
    @(posedge clk) disable iff (!rst_n) !(mb_start && decide)
  ) else $error("mb_start asserted while a candidate was being decided");

endmodule
