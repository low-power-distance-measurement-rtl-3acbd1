// tb_input_register: random pixels with random valid and enable; the stage
// must show valid & enable one edge later, and its data must follow only
// captured pixels.
module tb_input_register;
  import me_pkg::*;

  logic clk = 0, rst_n = 0;
  logic en, valid_i, first_i, last_i, valid_o, first_o, last_o;
  logic [7:0] cur_i, ref_i, cur_o, ref_o;
  mv_t mv_i, mv_o;
  int checks = 0, failures = 0;

  input_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic       exp_v, exp_f, exp_l;
    logic [7:0] exp_c, exp_r;
    mv_t        exp_mv;
    en = 0; valid_i = 0; first_i = 0; last_i = 0; cur_i = 0; ref_i = 0; mv_i = '0;
    exp_v = 0; exp_f = 0; exp_l = 0; exp_c = 0; exp_r = 0; exp_mv = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (valid_o !== 1'b0 || cur_o !== 8'd0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      en = 1'($urandom); valid_i = 1'($urandom); first_i = 1'($urandom); last_i = 1'($urandom);
      cur_i = 8'($urandom); ref_i = 8'($urandom); mv_i = mv_t'($urandom);
      @(posedge clk);
      exp_v = valid_i & en;
      if (valid_i && en) begin
        exp_f = first_i; exp_l = last_i; exp_c = cur_i; exp_r = ref_i; exp_mv = mv_i;
      end
      #1;
      checks++;
      if (valid_o !== exp_v || first_o !== exp_f || last_o !== exp_l ||
          cur_o !== exp_c || ref_o !== exp_r || mv_o !== exp_mv) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
