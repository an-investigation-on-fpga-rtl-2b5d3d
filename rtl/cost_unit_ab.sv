// Prediction and cost of one inverter voltage vector, alpha-beta frame.
//
// For the candidate vector v and the measured current i(k):
//   i_p(k+1) = k1 * i(k) + k2 * v                     (forward-Euler RL model)
//   g        = |i*_a - i_p_a| + |i*_b - i_p_b| + lambda * p
// where p is the number of legs that would commute from the state being
// applied (s_prev) to the candidate state (s_cand). lambda = 0 gives the
// plain current-tracking cost. k1 is an input so that the fixed (0.95),
// approximated (1.0) or adaptive value can be fed in; k2 = Ts/L is a
// constant of the instance.
//
// Timing: two register stages, prediction then cost; inputs are taken every
// clock and g appears two cycles later. Products are truncated; the cost
// saturates at the top of its range.
//
// The prediction, the absolute-error cost, the commutation term and the
// k1/k2 word formats follow the specification; the pipelining, the other
// widths and the saturation are choices of this design.
module cost_unit_ab
  import mpc_pkg::*;
#(
  parameter logic signed [K2_W-1:0] K2 = K2_Q
) (
  input  logic                clk,
  input  cur_vec_t            i_meas,
  input  cur_vec_t            i_ref,
  input  k1_t                 k1,
  input  volt_vec_t           v,
  input  logic [LAMBDA_W-1:0] lambda,
  input  sw_state_t           s_cand,
  input  sw_state_t           s_prev,
  output cost_t               cost
);
  localparam int unsigned PW  = CUR_W + 2;                 // predicted current
  localparam int unsigned M1W = K1_W + CUR_W;              // k1 * i
  localparam int unsigned M2W = K2_W + VOLT_W;             // k2 * v
  localparam int unsigned SH1 = K1_FRAC;                   // back to CUR_FRAC
  localparam int unsigned SH2 = K2_FRAC + VOLT_FRAC - CUR_FRAC;
  localparam int unsigned SW  = COST_W + 2;

  // stage 1: prediction
  logic signed [PW-1:0] pred_re, pred_im;
  cur_vec_t             ref_q;
  logic [LAMBDA_W+1:0]  pen_q;

  function automatic logic signed [PW-1:0] predict(cur_t i, volt_t vv, k1_t k);
    logic signed [M1W-1:0] a;
    logic signed [M2W-1:0] b;
    a = M1W'(k * i);
    b = M2W'(K2 * vv);
    return PW'(a >>> SH1) + PW'(b >>> SH2);
  endfunction

  always_ff @(posedge clk) begin
    pred_re <= predict(i_meas.re, v.re, k1);
    pred_im <= predict(i_meas.im, v.im, k1);
    ref_q   <= i_ref;
    pen_q   <= (LAMBDA_W+2)'(lambda * commutations(s_cand, s_prev));
  end

  // stage 2: absolute errors and cost
  logic signed [PW:0] err_re, err_im;
  logic [PW:0]        abs_re, abs_im;
  logic [SW-1:0]      sum;

  always_comb begin
    err_re = (PW+1)'(ref_q.re) - (PW+1)'(pred_re);
    err_im = (PW+1)'(ref_q.im) - (PW+1)'(pred_im);
    abs_re = err_re[PW] ? (PW+1)'(-err_re) : (PW+1)'(err_re);
    abs_im = err_im[PW] ? (PW+1)'(-err_im) : (PW+1)'(err_im);
    sum    = SW'(abs_re) + SW'(abs_im) + SW'(pen_q);
  end

  always_ff @(posedge clk) begin
    cost <= (|sum[SW-1:COST_W]) ? '1 : sum[COST_W-1:0];
  end
endmodule
