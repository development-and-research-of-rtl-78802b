// csd_improved: improved conveyor sorting device (CSD) for N W-bit numbers.
//
// Sorts an array of N unsigned numbers into descending order, accepting a new
// array on every clock cycle. Instead of one bubble conveyor over all N
// values, the first and second halves of the input are sorted independently
// by two bubble conveyors of N/2 values running side by side, and a merge
// conveyor then combines the two sorted halves. For N = 8 this uses 22 basic
// sorting elements (6 + 6 + 10) and 10 register ranks of 8 conveyor
// registers (80 in all), against 28 elements and 14 ranks for one bubble
// conveyor over 8 values.
//
// Interface: d_in[0] is the first input (x1, D_in1); d_out[0] is the first
// output (y1, D_out1) and carries the largest value, d_out[N-1] the smallest.
// rst (synchronous, active high) clears every conveyor register to zero.
// Timing: an array on d_in is loaded by a rising clock edge into the input
// rank; its sorted form is on d_out after 3N/2-2 rising edges counting that
// one (9 edges later for N = 8). Throughput is one array per cycle.
// The structure, sizes and ordering follow the published design; the reset
// style and the generalisation to other even N are this design's own.
module csd_improved #(
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
    $error("csd_improved: N must be even and at least 4");
  end

  logic [N-1:0][W-1:0] halves;  // lanes 0..HALF-1 and HALF..N-1 each descending

  bubble_csd #(.M(HALF), .W(W)) u_half_a (
    .clk  (clk),
    .rst  (rst),
    .d_in (d_in[HALF-1:0]),
    .d_out(halves[HALF-1:0])
  );

  bubble_csd #(.M(HALF), .W(W)) u_half_b (
    .clk  (clk),
    .rst  (rst),
    .d_in (d_in[N-1:HALF]),
    .d_out(halves[N-1:HALF])
  );

  csd_merge #(.N(N), .W(W)) u_merge (
    .clk  (clk),
    .rst  (rst),
    .d_in (halves),
    .d_out(d_out)
  );
endmodule
