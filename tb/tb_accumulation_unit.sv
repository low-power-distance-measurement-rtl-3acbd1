// tb_accumulation_unit: accumulates random metric values over candidates of
// random length, with random register-enable gaps, and checks that the
// carry-save pair always equals the running sum (S + 2C) in the same cycle.
module tb_accumulation_unit;

  localparam int unsigned ACC_W = 24;
  localparam int unsigned F_W   = 16;

  logic clk = 0, rst_n = 0;
  logic en, first;
  logic [F_W-1:0] f;
  logic [ACC_W-1:0] s_t, c_t;
  int checks = 0, failures = 0;

  accumulation_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc, exp_now;
    en = 0; first = 0; f = '0; acc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cand = 0; cand < 200; cand++) begin
      int len;
      len = $urandom_range(1, 256);
      for (int p = 0; p < len; p++) begin
        @(negedge clk);
        // occasional disabled cycle: the register must hold
        if ($urandom_range(0, 7) == 0) begin
          en = 0; first = 0; f = F_W'($urandom);
          @(negedge clk);
        end
        en = 1; first = (p == 0);
        f = F_W'($urandom_range(0, 65025));
        #1;
        exp_now = (p == 0 ? 0 : acc) + longint'(f);
        checks++;
        if (longint'(s_t) + 2 * longint'(c_t) != exp_now) begin
          failures++;
          if (failures < 10) $display("FAIL cand %0d pixel %0d: %0d expected %0d",
                                      cand, p, longint'(s_t) + 2 * longint'(c_t), exp_now);
        end
        @(posedge clk);
        acc = exp_now;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
