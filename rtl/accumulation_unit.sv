// accumulation_unit: sums the metric values of one candidate in carry-save
// form.
//
// A carry-save adder row adds the new metric value f to the accumulated pair
// {C, S} (D = S + 2*C) held in the two accumulator registers AccReg_S and
// AccReg_C.  Its outputs s_t and c_t are the running distance including the
// current pixel; they go both to the registers and, in the same cycle, to the
// best-match detection unit, so no carry is ever propagated.  When first is
// high the stored pair is ignored, which starts a new candidate without a
// separate clear cycle.
//
// Timing: s_t/c_t are combinational from f, first and the registers; the
// registers load s_t/c_t on a rising clk edge when en is high.  Reset is
// asynchronous and clears both registers.
//
// Width: the carry-save pair is ACC_W bits per vector.  Bits of weight 2^ACC_W
// and above are dropped; as long as every running distance is below 2^ACC_W
// they are zero, because a carry-save row keeps the sum exact and all its
// outputs are then below 2^ACC_W too.  Adder and two registers follow the
// source's block diagram; the first-pixel gating is this design's own.
module accumulation_unit
  import me_pkg::*;
#(
  parameter int unsigned ACC_W = ACC_W_DEF,
  parameter int unsigned F_W   = 2 * PIX_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             first,
  input  logic [F_W-1:0]   f,
  output logic [ACC_W-1:0] s_t,
  output logic [ACC_W-1:0] c_t
);

  logic [ACC_W-1:0] acc_s, acc_c;   // AccReg_S, AccReg_C
  logic [ACC_W-1:0] op_s, op_c2, op_f;

  assign op_s  = first ? '0 : acc_s;
  assign op_c2 = first ? '0 : {acc_c[ACC_W-2:0], 1'b0};
  assign op_f  = ACC_W'(f);

  csa_row #(.WIDTH(ACC_W)) u_csa (
    .x(op_s), .y(op_c2), .z(op_f), .s(s_t), .c(c_t)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_s <= '0;
      acc_c <= '0;
    end else if (en) begin
      acc_s <= s_t;
      acc_c <= c_t;
    end
  end

endmodule
