// csd_merge: conveyor merge network of the improved sorting device.
//
// Lanes 0..N/2-1 (half A) and N/2..N-1 (half B) each arrive in descending
// order. The first tier joins the i-th value of A with the i-th value of B
// (N/2 elements); their maximum goes to lane 2i and their minimum to lane
// 2i+1. Tiers j = 1 .. N/2-1 then join the neighbouring lanes (c+1, c) for
// c = j, j+2, ..., N-j-2, a triangle of N/2-1, ..., 1 elements; the outer
// lanes settle first. For N = 8 this is the published merge of 10 elements in
// 4 tiers; for other even N the same pattern is continued (it sorts every
// 0/1 input, checked for N up to 16). Every tier ends in a register rank.
// Timing: one array per clock cycle; the merged array appears on d_out N/2
// clock edges after d_in is sampled.
module csd_merge #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [N-1:0][W-1:0] d_in,
  output logic [N-1:0][W-1:0] d_out
);
  localparam int unsigned HALF = N / 2;

  if (N < 4 || N % 2 != 0) begin : g_bad_size
    $error("csd_merge: N must be even and at least 4");
  end

  logic [N-1:0][W-1:0] woven;       // halves woven together: A0, B0, A1, B1, ...
  logic [N-1:0][W-1:0] stage [HALF]; // register rank below each tier

  for (genvar i = 0; i < HALF; i++) begin : g_cross
    assign woven[2*i]   = d_in[i];
    assign woven[2*i+1] = d_in[HALF+i];
  end

  csd_tier #(
    .N    (N),
    .W    (W),
    .PAIRS(csd_pkg::even_pairs(N))
  ) u_tier0 (.clk(clk), .rst(rst), .d(woven), .q(stage[0]));

  for (genvar j = 1; j < HALF; j++) begin : g_tier
    csd_tier #(
      .N    (N),
      .W    (W),
      .PAIRS(csd_pkg::merge_mask(N, j))
    ) u_tier (.clk(clk), .rst(rst), .d(stage[j-1]), .q(stage[j]));
  end

  assign d_out = stage[HALF-1];
endmodule
