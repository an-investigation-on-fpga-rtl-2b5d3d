// Reference angle and sinusoidal current reference.
//
// A phase accumulator advances theta* by w* Ts on every sampling pulse
// (PHASE_STEP = f_ref / fs * 2^32; 50 Hz at 20 kHz gives 10737418). Its top
// ANG_W bits feed a CORDIC that returns sin and cos of theta*. The dq
// reference (i*_d, i*_q), a constant pair set by the outer loop or the user,
// is turned into the stationary-frame sinusoidal reference by the inverse
// Park transform:
//   i*_alpha = i*_d cos - i*_q sin,   i*_beta = i*_d sin + i*_q cos
// sin/cos go to the dq-frame controllers, the alpha-beta reference to the
// alpha-beta controller; both change together.
//
// Timing: theta* steps one clock after sample_en; sin/cos are valid 17 clocks
// later and the alpha-beta reference one clock after that. All outputs are
// stable long before the next sampling pulse. theta* is zero after reset.
//
// A reference angle and its sine/cosine are part of the specification; the
// phase accumulator and the use of an inverse rotation to form the
// alpha-beta reference are choices of this design.
module reference_generator
  import mpc_pkg::*;
#(
  parameter logic [PHASE_W-1:0] PHASE_STEP = 32'd10737418
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sample_en,
  input  cur_vec_t         i_ref_dq,
  output logic [ANG_W-1:0] theta,
  output trig_t            sin_t,
  output trig_t            cos_t,
  output cur_vec_t         i_ref_ab
);
  logic [PHASE_W-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         phase <= '0;
    else if (sample_en) phase <= phase + PHASE_STEP;
  end

  assign theta = phase[PHASE_W-1 -: ANG_W];

  cordic_sincos #(.ANG_W(ANG_W), .TRIG_W(TRIG_W), .TRIG_FRAC(TRIG_FRAC)) u_cordic (
    .clk  (clk),
    .angle(theta),
    .sin_o(sin_t),
    .cos_o(cos_t)
  );

  // inverse Park: a Park transform with the angle negated (sin -> -sin)
  trig_t    nsin;
  cur_vec_t ref_ab;

  assign nsin = -sin_t;

  park_transform #(.W(CUR_W), .TRIG_W(TRIG_W), .TRIG_FRAC(TRIG_FRAC)) u_ipark (
    .x_alpha(i_ref_dq.re), .x_beta(i_ref_dq.im), .sin_t(nsin), .cos_t(cos_t),
    .x_d(ref_ab.re), .x_q(ref_ab.im)
  );

  always_ff @(posedge clk) i_ref_ab <= ref_ab;
endmodule
