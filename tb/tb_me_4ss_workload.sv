// tb_me_4ss_workload: runs the four-step search (4SS) on a synthetic frame
// through the motion-estimation datapath, the way a search controller would
// drive it, and measures the clock rate real-time CIF coding would need.
//
// The reference frame is a smooth 96x96 pattern; the current frame is the
// same pattern moved by a global motion of (+3,-2) plus noise.  For each of
// the 16 interior 16x16 macroblocks the testbench runs 4SS (range +-7):
//   step 1: the centre and 8 points at distance 2;
//   steps 2-3: re-centre on the best vector so far and test the new points of
//              the 5x5 pattern around it, until the best stays at the centre;
//   step 4: the 8 neighbours at distance 1 of the best vector.
// Each step's centre is read from the datapath's best_mv output, so the
// search really follows the hardware's decisions; an integer model of the
// same search must end at the same vector.  Partial-distance early
// termination is on and the pixel source skips the rest of an aborted
// candidate, so the cycle count includes the savings.  Cycles per macroblock
// are then scaled to a CIF frame (396 macroblocks) at 30 frames/s and
// checked against 150 MHz.
module tb_me_4ss_workload;
  import me_pkg::*;

  localparam int N = 16;
  localparam int FW = 96;
  localparam int RANGE = 7;
  localparam int GMX = 3, GMY = -2;

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
  longint cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  int refp [FW][FW];
  int curp [FW][FW];

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sad(input int bx, input int by, input int dx, input int dy);
    int s;
    s = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int d;
        d = curp[by + i][bx + j] - refp[by + dy + i][bx + dx + j];
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction

  // Streams one candidate; returns the number of cycles it occupied.
  task automatic send(input int bx, input int by, input int dx, input int dy,
                      output int used, output logic aborted);
    int start;
    start = int'(cycles);
    aborted = 0;
    for (int p = 0; p < N * N; p++) begin
      // skip refers to the pixel sent two cycles ago, which is this
      // candidate's once p >= 2
      if (p >= 2 && skip) begin aborted = 1; break; end
      pix_valid = 1; pix_first = (p == 0); pix_last = (p == N * N - 1);
      pix_cur = 8'(curp[by + p / N][bx + p % N]);
      pix_ref = 8'(refp[by + dy + p / N][bx + dx + p % N]);
      cand_mv.x = 8'(dx); cand_mv.y = 8'(dy);
      @(negedge clk);
    end
    pix_valid = 0;
    used = int'(cycles) - start;
  endtask

  initial begin
    int n_cand_total, n_abort_total, px_sent, px_full, n_true, n_mb;
    longint mb_cycles;
    mb_start = 0; early_term_en = 1; thr_load = 0; pix_valid = 0; pix_first = 0; pix_last = 0;
    metric_sel = METRIC_SAD; mode = MODE_BEST; thr = '0; pix_cur = '0; pix_ref = '0; cand_mv = '0;
    n_cand_total = 0; n_abort_total = 0; px_sent = 0; px_full = 0; n_true = 0; n_mb = 0;
    mb_cycles = 0;
    for (int y = 0; y < FW; y++)
      for (int x = 0; x < FW; x++) begin
        real v;
        v = 128.0 + 60.0 * $sin(x * 0.31) * $cos(y * 0.23) + 40.0 * $sin((x + y) * 0.13);
        refp[y][x] = int'(v);
      end
    for (int y = 0; y < FW; y++)
      for (int x = 0; x < FW; x++) begin
        int sx, sy, v;
        sx = x + GMX; sy = y + GMY;
        if (sx < 0) sx = 0; if (sx >= FW) sx = FW - 1;
        if (sy < 0) sy = 0; if (sy >= FW) sy = FW - 1;
        v = refp[sy][sx] + $urandom_range(0, 4) - 2;
        curp[y][x] = (v < 0) ? 0 : (v > 255 ? 255 : v);
      end
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int mby = 1; mby <= 4; mby++)
      for (int mbx = 1; mbx <= 4; mbx++) begin
        int bx, by, cx, cy, mdx, mdy, mbest, step;
        bit visited [int];
        longint t0;
        bx = mbx * N; by = mby * N;
        visited.delete();
        t0 = cycles;
        @(negedge clk);
        mb_start = 1;
        @(negedge clk);
        mb_start = 0;
        cx = 0; cy = 0;
        mbest = 32'h7fffffff; mdx = 0; mdy = 0;
        step = 1;
        while (step <= 4) begin
          int stride;
          stride = (step == 4) ? 1 : 2;
          for (int oy = -1; oy <= 1; oy++)
            for (int ox = -1; ox <= 1; ox++) begin
              int dx, dy, key, used, s;
              logic ab;
              dx = cx + ox * stride; dy = cy + oy * stride;
              key = (dy + 64) * 256 + (dx + 64);
              if (dx < -RANGE || dx > RANGE || dy < -RANGE || dy > RANGE) continue;
              if (visited.exists(key)) continue;
              visited[key] = 1;
              s = sad(bx, by, dx, dy);
              if (s <= mbest) begin mbest = s; mdx = dx; mdy = dy; end
              send(bx, by, dx, dy, used, ab);
              n_cand_total++;
              if (ab) n_abort_total++;
              px_full += N * N;
            end
          // let the last decision reach best_mv
          repeat (3) @(negedge clk);
          checks++;
          if (best_mv.x != 8'(mdx) || best_mv.y != 8'(mdy)) begin
            failures++;
            $display("FAIL mb (%0d,%0d) step %0d: best (%0d,%0d), expected (%0d,%0d)",
                     mbx, mby, step, best_mv.x, best_mv.y, mdx, mdy);
          end
          if (step == 4) step = 5;
          else if (best_mv.x == 8'(cx) && best_mv.y == 8'(cy)) step = 4;
          else begin
            cx = best_mv.x; cy = best_mv.y;
            step = (step == 3) ? 4 : step + 1;
          end
        end
        mb_cycles += cycles - t0;
        n_mb++;
        if (mdx == GMX && mdy == GMY) n_true++;
      end

    begin
      real cyc_per_mb, mhz;
      cyc_per_mb = real'(mb_cycles) / n_mb;
      mhz = cyc_per_mb * 396.0 * 30.0 / 1.0e6;
      $display("4SS: %0d macroblocks, %0d candidates (%0d aborted early), true motion found in %0d",
               n_mb, n_cand_total, n_abort_total, n_true);
      $display("4SS: %0.1f cycles per macroblock -> %0.1f MHz for CIF at 30 frames/s",
               cyc_per_mb, mhz);
      $display("4SS: %0d candidate pixels, %0d cycles used: %0.1f%% of the work avoided",
               px_full, mb_cycles, 100.0 * (1.0 - real'(mb_cycles) / real'(px_full)));
      checks++;
      if (mhz > 150.0) begin failures++; $display("FAIL CIF 4SS needs more than 150 MHz"); end
      checks++;
      if (n_abort_total == 0) begin failures++; $display("FAIL no candidate was aborted"); end
      checks++;
      if (n_true < n_mb / 2) begin failures++; $display("FAIL 4SS missed the true motion too often"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
