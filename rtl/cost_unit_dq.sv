// Prediction and cost of one inverter voltage vector, rotating dq frame.
//
// With feed-forward decoupling of the d and q axes (k3 = w* L):
//   i_p_d(k+1) = k1 * i_d(k) + k2 * (v_d + k3 * i_q(k))
//   i_p_q(k+1) = k1 * i_q(k) + k2 * (v_q - k3 * i_d(k))
//   g          = |i*_d - i_p_d| + |i*_q - i_p_q| + lambda * p
// v_d, v_q is the candidate vector already rotated into the dq frame; p is
// the number of legs that commute from s_prev to s_cand (lambda = 0 turns the
// term off). k1 is an input (fixed, approximated or adaptive value), k2 and
// k3 are constants of the instance.
//
// Timing: two register stages like the alpha-beta unit; g follows its inputs
// by two clocks. Products are truncated; the cost saturates.
//
// The dq prediction with decoupling and the cost follow the specification;
// the pipelining, the omega*L format and the other widths are choices of
// this design.
module cost_unit_dq
  import mpc_pkg::*;
#(
  parameter logic signed [K2_W-1:0] K2 = K2_Q,
  parameter logic signed [K3_W-1:0] K3 = K3_Q
) (
  input  logic                clk,
  input  cur_vec_t            i_meas,   // d, q
  input  cur_vec_t            i_ref,    // d, q
  input  k1_t                 k1,
  input  volt_vec_t           v,        // d, q
  input  logic [LAMBDA_W-1:0] lambda,
  input  sw_state_t           s_cand,
  input  sw_state_t           s_prev,
  output cost_t               cost
);
  localparam int unsigned PW  = CUR_W + 2;
  localparam int unsigned VW  = VOLT_W + 2;                 // v + decoupling term
  localparam int unsigned M1W = K1_W + CUR_W;
  localparam int unsigned M2W = K2_W + VW;
  localparam int unsigned M3W = K3_W + CUR_W;
  localparam int unsigned SH1 = K1_FRAC;
  localparam int unsigned SH2 = K2_FRAC + VOLT_FRAC - CUR_FRAC;
  localparam int unsigned SH3 = K3_FRAC + CUR_FRAC - VOLT_FRAC;
  localparam int unsigned SW  = COST_W + 2;

  // k3 * i in volts
  function automatic logic signed [VW-1:0] decouple(cur_t i);
    logic signed [M3W-1:0] p;
    p = M3W'(K3 * i);
    return VW'(p >>> SH3);
  endfunction

  function automatic logic signed [PW-1:0] predict(cur_t i, logic signed [VW-1:0] vv, k1_t k);
    logic signed [M1W-1:0] a;
    logic signed [M2W-1:0] b;
    a = M1W'(k * i);
    b = M2W'(K2 * vv);
    return PW'(a >>> SH1) + PW'(b >>> SH2);
  endfunction

  logic signed [PW-1:0] pred_d, pred_q;
  cur_vec_t             ref_q;
  logic [LAMBDA_W+1:0]  pen_q;

  always_ff @(posedge clk) begin
    pred_d <= predict(i_meas.re, VW'(v.re) + decouple(i_meas.im), k1);
    pred_q <= predict(i_meas.im, VW'(v.im) - decouple(i_meas.re), k1);
    ref_q  <= i_ref;
    pen_q  <= (LAMBDA_W+2)'(lambda * commutations(s_cand, s_prev));
  end

  logic signed [PW:0] err_d, err_q;
  logic [PW:0]        abs_d, abs_q;
  logic [SW-1:0]      sum;

  always_comb begin
    err_d = (PW+1)'(ref_q.re) - (PW+1)'(pred_d);
    err_q = (PW+1)'(ref_q.im) - (PW+1)'(pred_q);
    abs_d = err_d[PW] ? (PW+1)'(-err_d) : (PW+1)'(err_d);
    abs_q = err_q[PW] ? (PW+1)'(-err_q) : (PW+1)'(err_q);
    sum   = SW'(abs_d) + SW'(abs_q) + SW'(pen_q);
  end

  always_ff @(posedge clk) begin
    cost <= (|sum[SW-1:COST_W]) ? '1 : sum[COST_W-1:0];
  end
endmodule
