// Final carry-propagate adder of the multiplier.
//
// Adds the two rows left by the reduction tree into the binary product.
// The source asks only for an exact adder here; this is a plain W-bit
// addition whose carry out of the top bit is dropped (for an N x N product
// W = 2N and the rows of the reduction never reach bit W).  Combinational.
module cpa_adder #(
  parameter int W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s
);
  assign s = x + y;
endmodule
