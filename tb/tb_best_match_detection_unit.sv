// tb_best_match_detection_unit: checks GE against integer arithmetic.
// Best-match mode: random carry-save pairs are offered; GE must equal
// (S+2C > best), where best starts at the largest value after clear and is
// replaced whenever the testbench pulses update.  Many pairs are built to
// have exactly the best value, or one more or one less, in a different
// carry-save split, because the comparison must see the value and not the
// bit pattern.  Threshold mode: GE must equal (S+2C > T).
module tb_best_match_detection_unit;
  import me_pkg::*;

  localparam int unsigned ACC_W = 24;
  localparam longint      MAXV  = (longint'(1) << ACC_W) - 1;

  logic clk = 0, rst_n = 0;
  mode_e mode;
  logic clear, update, thr_load, ge;
  logic [ACC_W-1:0] thr, s_t, c_t;
  int checks = 0, failures = 0;

  best_match_detection_unit dut (.*);

  always #5 clk = ~clk;

  // Split distance d into a random carry-save pair with both vectors < 2^ACC_W.
  task automatic split(input longint d, output logic [ACC_W-1:0] s, output logic [ACC_W-1:0] c);
    longint cmin, cmax, cv;
    cmin = (d > MAXV) ? (d - MAXV + 1) / 2 : 0;
    cmax = d / 2;
    if (cmax > MAXV) cmax = MAXV;
    cv = cmin + longint'($urandom_range(0, 32'hffff_ffff)) % (cmax - cmin + 1);
    c = ACC_W'(cv);
    s = ACC_W'(d - 2 * cv);
  endtask

  function automatic longint value(input logic [ACC_W-1:0] s, input logic [ACC_W-1:0] c);
    return longint'(s) + 2 * longint'(c);
  endfunction

  task automatic check_ge(input longint ref_v, input string what);
    #1;
    checks++;
    if (ge !== (value(s_t, c_t) > ref_v)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: D=%0d ref=%0d ge=%b", what, value(s_t, c_t), ref_v, ge);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint best, d, tval;
    mode = MODE_BEST; clear = 0; update = 0; thr_load = 0; thr = '0; s_t = '0; c_t = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // After reset the stored distance is the largest one: nothing exceeds it.
    best = 3 * MAXV;
    @(negedge clk);
    s_t = '1; c_t = '1;
    check_ge(best, "after reset, max pair");

    for (int i = 0; i < 30000; i++) begin
      @(negedge clk);
      clear = ($urandom_range(0, 199) == 0);
      case ($urandom_range(0, 4))
        0: d = longint'($urandom_range(0, 32'hffff_ffff)) % (3 * MAXV + 1);
        1: d = best;
        2: d = best + 1;
        3: d = (best > 0) ? best - 1 : 0;
        default: d = longint'($urandom_range(0, 65535));
      endcase
      if (d > 3 * MAXV) d = 3 * MAXV;
      split(d, s_t, c_t);
      check_ge(best, "best mode");
      update = (value(s_t, c_t) <= best) || ($urandom_range(0, 9) == 0);
      @(posedge clk);
      if (clear) best = 3 * MAXV;
      else if (update) best = value(s_t, c_t);
      #1;
      clear = 0; update = 0;
    end

    // Threshold mode
    @(negedge clk);
    mode = MODE_THRESHOLD;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      tval = longint'($urandom_range(0, 32'hffff_ffff)) % (MAXV + 1);
      thr = ACC_W'(tval); thr_load = 1;
      @(posedge clk);
      #1 thr_load = 0;
      for (int i = 0; i < 100; i++) begin
        @(negedge clk);
        case ($urandom_range(0, 3))
          0: d = tval;
          1: d = tval + 1;
          2: d = (tval > 0) ? tval - 1 : 0;
          default: d = longint'($urandom_range(0, 32'hffff_ffff)) % (MAXV + 1);
        endcase
        split(d, s_t, c_t);
        // update must not disturb the threshold
        update = 1'($urandom);
        check_ge(tval, "threshold mode");
        @(posedge clk);
        #1 update = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
