// tb_carry_out_detector: checks the carry-out tree against the carry of a
// full-width binary addition.  The default 26-bit instance gets random and
// corner operands; a 5-bit instance (not a power of two, so padding is used)
// is checked exhaustively.
module tb_carry_out_detector;

  localparam int unsigned W  = 26;
  localparam int unsigned WS = 5;

  logic [W-1:0]  a, b;
  logic          cout;
  logic [WS-1:0] as, bs;
  logic          couts;
  int checks = 0, failures = 0;

  carry_out_detector dut (.a(a), .b(b), .cout(cout));
  carry_out_detector #(.WIDTH(WS)) dut_s (.a(as), .b(bs), .cout(couts));

  task automatic check_big(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W:0] sum;
    a = x; b = y;
    #1;
    sum = {1'b0, x} + {1'b0, y};
    checks++;
    if (cout !== sum[W]) begin
      failures++;
      $display("FAIL a=%h b=%h cout=%b expected %b", x, y, cout, sum[W]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // corners: exact boundary 2^W, just below, all ones
    check_big('1, 26'd1);
    check_big('1, '0);
    check_big('0, '0);
    check_big('1, '1);
    check_big(26'h2000000, 26'h2000000);
    check_big(26'h1ffffff, 26'h2000000);
    check_big(26'h1ffffff, 26'h2000001);
    for (int i = 0; i < 20000; i++) begin
      logic [W-1:0] x, y;
      x = W'($urandom);
      // half of the cases near the boundary: y = 2^W - x + small
      if (i % 2 == 0) y = W'(-x + W'($urandom_range(0, 3)) - W'(2));
      else            y = W'($urandom);
      check_big(x, y);
    end
    for (int i = 0; i < (1 << WS); i++) begin
      for (int j = 0; j < (1 << WS); j++) begin
        as = WS'(i); bs = WS'(j);
        #1;
        checks++;
        if (couts !== ((i + j) >= (1 << WS))) begin
          failures++;
          $display("FAIL small a=%0d b=%0d cout=%b", i, j, couts);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
