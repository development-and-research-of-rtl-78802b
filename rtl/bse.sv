// bse: basic sorting element (BSE) of the conveyor sorting device.
//
// Compares two unsigned W-bit numbers and puts the smaller on y_min (Y1) and
// the larger on y_max (Y2). As in the element's structure drawing, a
// comparison scheme forms the sign x1 > x2; its direct value selects the input
// of multiplexer M1 (the minimum output) and its inverse, through an inverter,
// selects the input of multiplexer M2 (the maximum output). Equal inputs pass
// unchanged (y_min = x1, y_max = x2).
// Purely combinational: the conveyor registers sit outside the element.
module bse #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  output logic [W-1:0] y_min,
  output logic [W-1:0] y_max
);
  logic gt;      // comparison sign: x1 > x2
  logic gt_n;    // its inverse, the select of M2

  cmp_gt #(.W(W)) u_cs (.x1(x1), .x2(x2), .gt(gt));

  always_comb begin
    gt_n  = ~gt;
    // M1: sign set -> x2 is the smaller number
    y_min = gt ? x2 : x1;
    // M2: inverse set -> x2 is the larger (or equal) number
    y_max = gt_n ? x2 : x1;
  end
endmodule
