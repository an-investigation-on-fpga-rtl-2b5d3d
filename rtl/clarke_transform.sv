// Clarke transform, three-phase abc to stationary alpha-beta.
//
//   x_alpha = x_a
//   x_beta  = (x_b - x_c) / sqrt(3)
//
// This is the reduced matrix the controller is specified with. The 1/sqrt(3)
// gain is a 17-bit constant with 16 fraction bits; the product is truncated
// toward minus infinity. Purely combinational; inputs and outputs share one
// fixed-point format of width W.
//
// The transform itself is the specified one; the constant width and the
// truncation are choices of this design.
module clarke_transform #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] xa,
  input  logic signed [W-1:0] xb,
  input  logic signed [W-1:0] xc,
  output logic signed [W-1:0] x_alpha,
  output logic signed [W-1:0] x_beta
);
  import mpc_pkg::*;

  logic signed [W:0]    diff;
  logic signed [W+17:0] prod;

  always_comb begin
    diff    = (W+1)'(xb) - (W+1)'(xc);
    prod    = (W+18)'(diff) * $signed({1'b0, INV_SQRT3_Q16});
    x_alpha = xa;
    x_beta  = W'(prod >>> 16);
  end
endmodule
