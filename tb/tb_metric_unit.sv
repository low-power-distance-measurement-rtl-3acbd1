// tb_metric_unit: exhaustive check of |z - zhat| and (z - zhat)^2 for every
// pair of 8-bit pixels.
module tb_metric_unit;
  import me_pkg::*;

  metric_e     metric;
  logic [7:0]  cur, ref_px;
  logic [15:0] f;
  int checks = 0, failures = 0;

  metric_unit dut (.metric(metric), .cur(cur), .ref_px(ref_px), .f(f));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      metric = metric_e'(m);
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j++) begin
          int d, exp_f;
          cur = 8'(i); ref_px = 8'(j);
          #1;
          d = (i > j) ? i - j : j - i;
          exp_f = (m == 1) ? d * d : d;
          checks++;
          if (int'(f) != exp_f) begin
            failures++;
            if (failures < 10) $display("FAIL m=%0d z=%0d zh=%0d f=%0d exp %0d", m, i, j, f, exp_f);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
