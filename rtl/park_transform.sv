// Park transform, stationary alpha-beta to the frame rotating with the
// reference angle theta*:
//
//   x_d =  cos(theta) * x_alpha + sin(theta) * x_beta
//   x_q = -sin(theta) * x_alpha + cos(theta) * x_beta
//
// sin and cos arrive precomputed (signed, TRIG_FRAC fraction bits); the
// result keeps the input's format and is truncated. Purely combinational.
// The same module rotates the measured current and each of the eight
// inverter voltage vectors in the dq-frame controllers.
//
// The rotation is the specified one; widths and truncation are choices of
// this design.
module park_transform #(
  parameter int unsigned W         = 16,
  parameter int unsigned TRIG_W    = 16,
  parameter int unsigned TRIG_FRAC = 14
) (
  input  logic signed [W-1:0]      x_alpha,
  input  logic signed [W-1:0]      x_beta,
  input  logic signed [TRIG_W-1:0] sin_t,
  input  logic signed [TRIG_W-1:0] cos_t,
  output logic signed [W-1:0]      x_d,
  output logic signed [W-1:0]      x_q
);
  localparam int unsigned PW = W + TRIG_W + 1;

  logic signed [PW-1:0] d_sum, q_sum;

  always_comb begin
    d_sum = PW'(cos_t * x_alpha) + PW'(sin_t * x_beta);
    q_sum = PW'(cos_t * x_beta)  - PW'(sin_t * x_alpha);
    x_d   = W'(d_sum >>> TRIG_FRAC);
    x_q   = W'(q_sum >>> TRIG_FRAC);
  end
endmodule
