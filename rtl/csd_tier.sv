// csd_tier: one tier of a conveyor sorting structure.
//
// N lanes of W-bit numbers enter from the register rank above. For every bit
// c set in PAIRS, a basic sorting element joins lanes c+1 and c: lane c+1 is
// its X1 input and receives the minimum, lane c is its X2 input and receives
// the maximum, so larger numbers move towards lane 0. Lanes not joined pass
// straight down. Below the elements every lane has its own conveyor register,
// as in the published structures where a register sits on each line between
// two tiers. Which pairs a tier joins comes from csd_pkg.
// Timing: q holds the tier's result one clock cycle after d.
module csd_tier #(
  parameter int unsigned       N     = 8,
  parameter int unsigned       W     = 8,
  parameter csd_pkg::lane_mask_t PAIRS = csd_pkg::even_pairs(N)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [N-1:0][W-1:0] d,
  output logic [N-1:0][W-1:0] q
);
  logic [N-1:0][W-1:0] sorted;  // lanes after the row of elements

  // Elements may not share a lane and may not reach past the last lane.
  for (genvar c = 0; c < N; c++) begin : g_check
    if (PAIRS[c] && (c == N - 1 || PAIRS[c+1])) begin : g_bad_pair
      $error("csd_tier: invalid lane pair mask at lane %0d", c);
    end
  end

  for (genvar c = 0; c < N; c++) begin : g_lane
    if (PAIRS[c] && c + 1 < N) begin : g_bse
      bse #(.W(W)) u_bse (
        .x1   (d[c+1]),
        .x2   (d[c]),
        .y_min(sorted[c+1]),
        .y_max(sorted[c])
      );
    end else if (c == 0 || !PAIRS[c-1]) begin : g_pass
      assign sorted[c] = d[c];
    end
    conv_reg #(.W(W)) u_rg (.clk(clk), .rst(rst), .d(sorted[c]), .q(q[c]));
  end
endmodule
