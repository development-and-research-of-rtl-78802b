// bubble_csd: conveyor sorting device by the modified "bubble" method.
//
// Sorts M unsigned W-bit numbers into descending order (d_out[0] largest).
// An input rank of M conveyor registers is followed by 2M-3 tiers holding
// M(M-1)/2 basic sorting elements in an insertion triangle: insertion round r
// carries the value of lane r down to lane 0, its element on lanes (c+1, c)
// working in tier 2r-1-c, so several rounds overlap. For M = 4 this is the
// published 4-value structure (6 elements, Rg ranks 6), drawn mirrored so that
// the largest value leaves on the first lane; the improved device runs one
// copy on each half of its input.
// Timing: a new array may enter every clock cycle; its sorted form appears on
// d_out 2M-2 clock edges after the edge that loads it into the input rank.
module bubble_csd #(
  parameter int unsigned M = 4,
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [M-1:0][W-1:0] d_in,
  output logic [M-1:0][W-1:0] d_out
);
  localparam int unsigned TIERS = 2 * M - 3;

  if (M < 2) begin : g_bad_size
    $error("bubble_csd: M must be at least 2");
  end

  // stage[0]: input rank; stage[t]: register rank below tier t
  logic [M-1:0][W-1:0] stage [TIERS+1];

  for (genvar c = 0; c < M; c++) begin : g_in
    conv_reg #(.W(W)) u_rg (.clk(clk), .rst(rst), .d(d_in[c]), .q(stage[0][c]));
  end

  for (genvar t = 1; t <= TIERS; t++) begin : g_tier
    csd_tier #(
      .N    (M),
      .W    (W),
      .PAIRS(csd_pkg::bubble_mask(M, t))
    ) u_tier (.clk(clk), .rst(rst), .d(stage[t-1]), .q(stage[t]));
  end

  assign d_out = stage[TIERS];
endmodule
