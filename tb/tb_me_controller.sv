// tb_me_controller: drives the state machine's inputs with random candidate
// framing and random GE values and compares every output with a reference
// model of the decision rules: accept on the last pixel when GE is low,
// abort before the last pixel when GE is high and early termination is on,
// ignore pixels of an aborted candidate until the next first pixel, and
// report the decision one edge later.
module tb_me_controller;
  import me_pkg::*;

  logic clk = 0, rst_n = 0;
  mode_e mode;
  logic early_term_en, mb_start, pix_valid_i, pix_first_i;
  logic v1, first1, last1, ge;
  mv_t  mv1;
  logic in_en, acc_en, acc_first, update, clear;
  logic skip, done, done_accepted, done_aborted, best_valid;
  mv_t  done_mv, best_mv;
  int checks = 0, failures = 0;
  int n_accept = 0, n_reject = 0, n_abort = 0, n_dropped = 0;

  me_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    logic drop, e_active, e_decide, e_abort, e_accept, e_drop_next;
    logic e_done, e_acc, e_abt, e_bvalid;
    mv_t  e_dmv, e_bmv;
    mode = MODE_BEST; early_term_en = 0; mb_start = 0; pix_valid_i = 0; pix_first_i = 0;
    v1 = 0; first1 = 0; last1 = 0; ge = 0; mv1 = '0;
    drop = 0; e_done = 0; e_acc = 0; e_abt = 0; e_bvalid = 0; e_dmv = '0; e_bmv = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      // registered outputs of the previous decision
      expect_eq(done, e_done, "done");
      expect_eq(done_accepted, e_acc, "done_accepted");
      expect_eq(done_aborted, e_abt, "done_aborted");
      expect_eq(skip, e_abt, "skip");
      expect_eq(best_valid, e_bvalid, "best_valid");
      checks++;
      if (best_mv !== e_bmv || (e_done && done_mv !== e_dmv)) begin
        failures++;
        $display("FAIL mv at %0t", $time);
      end
      if (i % 2000 == 0) mode = mode_e'($urandom_range(0, 1));
      early_term_en = ($urandom_range(0, 3) != 0);
      v1 = ($urandom_range(0, 3) != 0);
      first1 = ($urandom_range(0, 5) == 0);
      last1 = ($urandom_range(0, 5) == 0);
      ge = 1'($urandom);
      mv1 = mv_t'($urandom);
      pix_valid_i = 1'($urandom);
      pix_first_i = ($urandom_range(0, 5) == 0);
      e_active = v1 && (!drop || first1);
      e_decide = e_active && last1;
      mb_start = !e_decide && ($urandom_range(0, 30) == 0);
      e_abort  = e_active && !last1 && early_term_en && ge;
      e_accept = e_decide && !ge;
      e_drop_next = e_abort ? 1'b1 : (e_active ? 1'b0 : drop);
      #1;
      expect_eq(acc_en, e_active, "acc_en");
      expect_eq(acc_first, e_active && first1, "acc_first");
      expect_eq(update, e_accept && mode == MODE_BEST, "update");
      expect_eq(clear, mb_start && mode == MODE_BEST, "clear");
      expect_eq(in_en, pix_valid_i && (!e_drop_next || pix_first_i), "in_en");
      if (v1 && !e_active) n_dropped++;
      if (e_accept) n_accept++;
      if (e_decide && ge) n_reject++;
      if (e_abort) n_abort++;
      @(posedge clk);
      drop = e_drop_next;
      e_done = e_decide || e_abort; e_acc = e_accept; e_abt = e_abort;
      if (e_decide || e_abort) e_dmv = mv1;
      if (mb_start) e_bvalid = 0;
      else if (e_accept) begin e_bmv = mv1; e_bvalid = 1; end
    end
    $display("accepted=%0d rejected=%0d aborted=%0d dropped=%0d", n_accept, n_reject, n_abort, n_dropped);
    if (n_accept == 0 || n_reject == 0 || n_abort == 0 || n_dropped == 0) begin
      failures++;
      $display("FAIL a decision kind never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
