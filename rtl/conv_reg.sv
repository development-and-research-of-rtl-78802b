// conv_reg: conveyor register (Rg) of the sorting device.
//
// A W-bit register placed on every line between two tiers of sorting
// elements, so that each tier works on a different array in the same clock
// cycle. It loads d on every rising clock edge; a synchronous active-high
// reset clears it to zero, the state the device's outputs show before the
// first array arrives. The reset style is this design's choice.
// Timing: q follows d one clock cycle later.
module conv_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end
endmodule
