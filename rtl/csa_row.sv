// csa_row: one row of full adders working as a 3:2 carry-save adder.
//
// Every column i adds x[i], y[i] and z[i] on its own and produces a sum bit
// s[i] (weight 2^i) and a carry bit c[i] (weight 2^(i+1)); no carry travels
// between columns, so the delay is one full adder whatever WIDTH is.  The
// value is kept exactly: x + y + z == s + 2*c.  A column with a constant 0
// input is a half adder after synthesis.  Purely combinational.
module csa_row #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [WIDTH-1:0] z,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] c
);

  always_comb begin
    s = x ^ y ^ z;
    c = (x & y) | (x & z) | (y & z);
  end

endmodule
