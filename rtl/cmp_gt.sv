// cmp_gt: comparison scheme "for more" of the basic sorting element.
//
// Raises gt when the unsigned W-bit number x1 is greater than x2. The sorting
// element uses gt directly to steer its minimum multiplexer and inverted to
// steer its maximum multiplexer. Equal operands give gt = 0.
// The structure drawing names this unit and its function only; its internal
// gate structure is given elsewhere, so a plain magnitude comparison is used
// here and left to synthesis.
// Purely combinational: no clock, no latency.
module cmp_gt #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  output logic         gt
);
  always_comb gt = (x1 > x2);
endmodule
