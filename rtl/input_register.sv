// input_register: first pipeline stage of the motion-estimation datapath.
//
// Captures the current-frame pixel z, the reference-frame pixel zhat and the
// pixel's framing (first/last pixel of a candidate block, candidate motion
// vector) on a rising clock edge when the state machine's register enable is
// high.  The valid flag is captured every cycle (as valid & enable), so a
// dropped or absent pixel shows up as an empty stage rather than a repeat.
// Holding the data registers while disabled keeps the metric and
// accumulation logic behind them from toggling.
//
// The register itself and its enable come from the source block diagram;
// carrying the framing bits and motion vector along with the pixels is this
// design's choice.  Reset (asynchronous, active low) clears the valid flag.
module input_register
  import me_pkg::*;
#(
  parameter int unsigned PIX_W = PIX_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             valid_i,
  input  logic             first_i,
  input  logic             last_i,
  input  logic [PIX_W-1:0] cur_i,
  input  logic [PIX_W-1:0] ref_i,
  input  mv_t              mv_i,
  output logic             valid_o,
  output logic             first_o,
  output logic             last_o,
  output logic [PIX_W-1:0] cur_o,
  output logic [PIX_W-1:0] ref_o,
  output mv_t              mv_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      first_o <= 1'b0;
      last_o  <= 1'b0;
      cur_o   <= '0;
      ref_o   <= '0;
      mv_o    <= '0;
    end else begin
      valid_o <= valid_i & en;
      if (valid_i && en) begin
        first_o <= first_i;
        last_o  <= last_i;
        cur_o   <= cur_i;
        ref_o   <= ref_i;
        mv_o    <= mv_i;
      end
    end
  end

endmodule
