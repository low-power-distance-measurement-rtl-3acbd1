// tb_motion_estimator: end-to-end test of the motion-estimation datapath at
// its default sizes (8-bit pixels, 16x16 blocks, 24-bit carry-save vectors).
//
// For each macroblock the testbench builds a random current block and a
// 24x24 reference area holding a noisy copy of it at a random offset, then
// streams every candidate of a +-4 full search (81 vectors) plus a repeat of
// the best vector (a tie, which the newer candidate must win).  Its own
// integer model computes every distance, which candidates win, which are
// aborted by the partial-distance rule and at which pixel, and from that the
// expected done events, their cycle (two edges after the deciding pixel) and
// the final best vector.  Scenarios cover SAD and MSE, best-match and
// threshold mode, early termination on and off, a pixel source that does and
// one that does not jump ahead on skip, and random input bubbles.  Every
// mechanism is counted and one that never happened is a failure.
module tb_motion_estimator;
  import me_pkg::*;

  localparam int N     = 16;
  localparam int R     = 4;
  localparam int AREA  = N + 2 * R;
  localparam int NCAND = (2 * R + 1) * (2 * R + 1);

  logic clk = 0, rst_n = 0;
  logic mb_start, early_term_en, thr_load, pix_valid, pix_first, pix_last;
  metric_e metric_sel;
  mode_e   mode;
  logic [23:0] thr;
  logic [7:0]  pix_cur, pix_ref;
  mv_t   cand_mv, done_mv, best_mv;
  logic  skip, done, done_accepted, done_aborted, best_valid;

  motion_estimator dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_accept, n_reject, n_abort, n_tie, n_skip_jump, n_dropped_px, n_bubble;
  int n_sad, n_mse, n_thr_accept, n_thr_abort, n_mb;

  // pixel data
  int cur [N][N];
  int refa [AREA][AREA];

  typedef struct {
    logic acc;
    logic abt;
    mv_t  mv;
    int unsigned cyc;
  } ev_t;
  ev_t exp_q[$];
  int cand_of_cycle [int unsigned];

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s (cycle %0d)", msg, cyc);
  endtask

  // Monitor: every done pulse must match the next expected event.
  always @(negedge clk) begin
    if (rst_n && done) begin
      checks++;
      if (exp_q.size() == 0) fail("unexpected done");
      else begin
        ev_t e;
        e = exp_q.pop_front();
        if (done_accepted !== e.acc || done_aborted !== e.abt || done_mv !== e.mv)
          fail($sformatf("decision acc=%b abt=%b mv=(%0d,%0d), expected acc=%b abt=%b mv=(%0d,%0d)",
                         done_accepted, done_aborted, done_mv.x, done_mv.y,
                         e.acc, e.abt, e.mv.x, e.mv.y));
        checks++;
        if (cyc != e.cyc + 2) fail($sformatf("done latency: at %0d, pixel at %0d", cyc, e.cyc));
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fval(input int a, input int b, input metric_e m);
    int d;
    d = (a > b) ? a - b : b - a;
    return (m == METRIC_MSE) ? d * d : d;
  endfunction

  // Partial sums of candidate (dx,dy) in raster order.
  function automatic void partials(input int dx, input int dy, input metric_e m, ref int ps [N*N]);
    int acc;
    acc = 0;
    for (int p = 0; p < N * N; p++) begin
      acc += fval(cur[p / N][p % N], refa[R + dy + p / N][R + dx + p % N], m);
      ps[p] = acc;
    end
  endfunction

  task automatic make_block();
    int ox, oy;
    ox = $urandom_range(0, 2 * R) - R;
    oy = $urandom_range(0, 2 * R) - R;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) cur[i][j] = $urandom_range(0, 255);
    for (int i = 0; i < AREA; i++)
      for (int j = 0; j < AREA; j++) refa[i][j] = $urandom_range(0, 255);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int v;
        v = cur[i][j] + $urandom_range(0, 6) - 3;
        refa[R + oy + i][R + ox + j] = (v < 0) ? 0 : (v > 255 ? 255 : v);
      end
  endtask

  // One macroblock: full search plus a repeat of the best vector.
  task automatic run_mb(input metric_e m, input mode_e md, input logic et,
                        input logic jump, input int bubble_pct);
    int ps [N*N];
    int dxs [NCAND+1], dys [NCAND+1];
    longint best, tval, refv;
    mv_t exp_best;
    logic exp_valid;
    int k;
    k = 0;
    for (int dy = -R; dy <= R; dy++)
      for (int dx = -R; dx <= R; dx++) begin dxs[k] = dx; dys[k] = dy; k++; end
    // choose the repeated candidate and, in threshold mode, T (the median
    // distance, so that some candidate equals it)
    begin
      int ds [NCAND];
      int bi;
      bi = 0;
      for (int c = 0; c < NCAND; c++) begin
        partials(dxs[c], dys[c], m, ps);
        ds[c] = ps[N*N-1];
        if (ds[c] <= ds[bi]) bi = c;
      end
      dxs[NCAND] = dxs[bi]; dys[NCAND] = dys[bi];
      ds.sort();
      tval = ds[NCAND / 2];
    end

    @(negedge clk);
    metric_sel = m; mode = md; early_term_en = et;
    mb_start = 1;
    if (md == MODE_THRESHOLD) begin thr = 24'(tval); thr_load = 1; end
    @(negedge clk);
    mb_start = 0; thr_load = 0;
    n_mb++;
    if (m == METRIC_SAD) n_sad++; else n_mse++;

    best = longint'(3) * ((longint'(1) << 24) - 1);
    exp_valid = 0; exp_best = '0;
    for (int c = 0; c <= NCAND; c++) begin
      int dec, d;
      logic acc, abt;
      mv_t mv;
      mv.x = 8'(dxs[c]); mv.y = 8'(dys[c]);
      partials(dxs[c], dys[c], m, ps);
      d = ps[N*N-1];
      refv = (md == MODE_BEST) ? best : tval;
      // deciding pixel: first partial above the reference (early
      // termination), else the last pixel
      dec = N * N - 1;
      if (et)
        for (int p = 0; p < N * N - 1; p++)
          if (ps[p] > refv) begin dec = p; break; end
      abt = (dec != N * N - 1);
      acc = !abt && (d <= refv);
      if (acc) begin
        if (md == MODE_BEST) begin
          if (d == best) n_tie++;
          best = d;
          n_accept++;
        end else n_thr_accept++;
        exp_best = mv; exp_valid = 1;
      end else if (abt) begin
        if (md == MODE_BEST) n_abort++; else n_thr_abort++;
      end else n_reject++;

      for (int p = 0; p < N * N; p++) begin
        // random bubble
        while ($urandom_range(0, 99) < bubble_pct) begin
          pix_valid = 0;
          n_bubble++;
          cand_of_cycle[cyc] = -1;
          @(negedge clk);
          if (jump && skip && cand_of_cycle.exists(cyc - 2) && cand_of_cycle[cyc - 2] == c) break;
        end
        if (jump && skip && cand_of_cycle.exists(cyc - 2) && cand_of_cycle[cyc - 2] == c) begin
          n_skip_jump++;
          break;
        end
        if (abt && p > dec) n_dropped_px++;
        pix_valid = 1;
        pix_first = (p == 0);
        pix_last  = (p == N * N - 1);
        pix_cur = 8'(cur[p / N][p % N]);
        pix_ref = 8'(refa[R + dys[c] + p / N][R + dxs[c] + p % N]);
        cand_mv = mv;
        cand_of_cycle[cyc] = c;
        if (p == dec) begin
          ev_t e;
          e.acc = acc; e.abt = abt; e.mv = mv; e.cyc = cyc;
          exp_q.push_back(e);
        end
        @(negedge clk);
      end
    end
    pix_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) fail("decisions missing");
    exp_q.delete();
    checks++;
    if (best_valid !== exp_valid || (exp_valid && best_mv !== exp_best))
      fail($sformatf("best vector (%0d,%0d) valid=%b, expected (%0d,%0d) valid=%b",
                     best_mv.x, best_mv.y, best_valid, exp_best.x, exp_best.y, exp_valid));
  endtask

  initial begin
    mb_start = 0; early_term_en = 0; thr_load = 0; pix_valid = 0; pix_first = 0; pix_last = 0;
    metric_sel = METRIC_SAD; mode = MODE_BEST; thr = '0; pix_cur = '0; pix_ref = '0; cand_mv = '0;
    n_accept = 0; n_reject = 0; n_abort = 0; n_tie = 0; n_skip_jump = 0; n_dropped_px = 0;
    n_bubble = 0; n_sad = 0; n_mse = 0; n_thr_accept = 0; n_thr_abort = 0; n_mb = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    //      metric      mode            early  jump  bubble%
    make_block(); run_mb(METRIC_SAD, MODE_BEST,      1'b0, 1'b0, 0);
    make_block(); run_mb(METRIC_SAD, MODE_BEST,      1'b1, 1'b1, 0);
    make_block(); run_mb(METRIC_MSE, MODE_BEST,      1'b1, 1'b0, 5);
    make_block(); run_mb(METRIC_MSE, MODE_BEST,      1'b0, 1'b0, 0);
    make_block(); run_mb(METRIC_SAD, MODE_THRESHOLD, 1'b1, 1'b1, 3);
    make_block(); run_mb(METRIC_MSE, MODE_THRESHOLD, 1'b0, 1'b0, 0);
    make_block(); run_mb(METRIC_MSE, MODE_BEST,      1'b1, 1'b1, 2);

    $display("macroblocks=%0d sad=%0d mse=%0d accepted=%0d ties=%0d rejected=%0d aborted=%0d",
             n_mb, n_sad, n_mse, n_accept, n_tie, n_reject, n_abort);
    $display("threshold: accepted=%0d aborted=%0d; skip jumps=%0d dropped pixels=%0d bubbles=%0d",
             n_thr_accept, n_thr_abort, n_skip_jump, n_dropped_px, n_bubble);
    if (n_sad == 0 || n_mse == 0 || n_accept == 0 || n_tie == 0 || n_reject == 0 || n_abort == 0 ||
        n_thr_accept == 0 || n_thr_abort == 0 || n_skip_jump == 0 || n_dropped_px == 0 ||
        n_bubble == 0 || n_mb < 2) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
