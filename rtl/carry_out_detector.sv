// carry_out_detector: carry out of a + b, without forming the sum.
//
// Only the carry-generate half of a carry-look-ahead adder is built.  Each bit
// position gives a generate g = a & b and a propagate p = a | b.  A binary
// tree then merges neighbouring groups, (G,P) = (Gh | Ph & Gl, Ph & Pl), until
// one group covers all WIDTH bits; its G is the carry out.  The tree is padded
// up to a power of two with columns that generate nothing and propagate
// everything, which leaves the carry out unchanged.  Depth is
// ceil(log2(WIDTH)) merge levels; the last level's propagate is not needed.
// Purely combinational.
//
// Interface: cout = 1 exactly when a + b >= 2^WIDTH.
module carry_out_detector #(
  parameter int unsigned WIDTH = 26
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             cout
);

  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 1;
  localparam int unsigned PAD_W  = 1 << LEVELS;

  // Level 0 holds one (g, p) pair per bit.  Level l+1 holds half as many
  // groups; its group i merges groups 2i (low half) and 2i+1 (high half) of
  // level l.
  logic [PAD_W-1:0] g0, p0;

  always_comb begin
    g0 = '0;
    p0 = '1;
    g0[WIDTH-1:0] = a & b;
    p0[WIDTH-1:0] = a | b;
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned GROUPS = PAD_W >> (l + 1);
    logic [2*GROUPS-1:0] g_in, p_in;
    logic [GROUPS-1:0]   g, p;
    if (l == 0) begin : g_from_bits
      assign g_in = g0;
      assign p_in = p0;
    end else begin : g_from_level
      assign g_in = g_level[l-1].g;
      assign p_in = g_level[l-1].p;
    end
    for (genvar i = 0; i < GROUPS; i++) begin : g_group
      assign g[i] = g_in[2*i+1] | (p_in[2*i+1] & g_in[2*i]);
      assign p[i] = p_in[2*i+1] & p_in[2*i];
    end
  end

  assign cout = g_level[LEVELS-1].g[0];

endmodule
