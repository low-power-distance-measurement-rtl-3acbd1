// metric_unit: per-pixel matching metric f(z - zhat).
//
// Forms the difference of the two pixels, takes its magnitude, and returns
// either the magnitude (SAD, sum of absolute differences) or its square (MSE,
// mean square error without the constant division).  Summing f over the
// block gives the distance D of a candidate.  Purely combinational; the
// output is always 2*PIX_W bits wide, zero-extended for SAD.
//
// The two metrics come from the source; a runtime select between them, and
// computing the square with a plain multiplier, are this design's choices.
module metric_unit
  import me_pkg::*;
#(
  parameter int unsigned PIX_W = PIX_W_DEF
) (
  input  metric_e            metric,
  input  logic [PIX_W-1:0]   cur,
  input  logic [PIX_W-1:0]   ref_px,
  output logic [2*PIX_W-1:0] f
);

  logic [PIX_W-1:0] mag;

  always_comb begin
    mag = (cur >= ref_px) ? (cur - ref_px) : (ref_px - cur);
    if (metric == METRIC_MSE) f = mag * mag;
    else                      f = {{PIX_W{1'b0}}, mag};
  end

endmodule
