// Conventional FCS-MPC current controller in the rotating dq frame, fully
// parallel.
//
// At each sampling pulse the measured alpha-beta current, the dq reference,
// sin/cos of the reference angle theta*, the dc-link voltage, k1, the
// switching weight and the state now being applied are latched. One Park
// transform rotates the measured current, eight more rotate the eight
// inverter voltage vectors; eight cost units then predict i_dq(k+1) with
// feed-forward decoupling and form |i*_d - i_p_d| + |i*_q - i_p_q|
// (+ lambda * commutations); the compare-and-select chain returns g_min and
// S_opt. Compared with the alpha-beta controller this costs the extra
// rotations and the decoupling products, which is why this variant is the
// larger one.
//
// Timing: input register, one rotation stage, two cost stages and seven
// selection stages; done pulses and s_opt/g_min change 11 clocks after
// sample_en.
//
// The algorithm follows the specification; the register placement and the
// fully parallel evaluation are choices of this design.
module fcs_mpc_dq
  import mpc_pkg::*;
#(
  parameter logic signed [K2_W-1:0] K2 = K2_Q,  // Ts/L
  parameter logic signed [K3_W-1:0] K3 = K3_Q   // w* L
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sample_en,
  input  cur_vec_t            i_meas,    // alpha, beta
  input  cur_vec_t            i_ref,     // d, q
  input  trig_t               sin_t,
  input  trig_t               cos_t,
  input  volt_t               vdc,
  input  k1_t                 k1,
  input  logic [LAMBDA_W-1:0] lambda,
  input  sw_state_t           s_prev,
  output logic                done,
  output sw_state_t           s_opt,
  output cost_t               g_min
);
  cur_vec_t            i_q, ref_q;
  trig_t               sin_q, cos_q;
  volt_t               vdc_q;
  k1_t                 k1_q;
  logic [LAMBDA_W-1:0] lam_q;
  sw_state_t           sprev_q;
  logic [3:0]          vld;

  always_ff @(posedge clk) begin
    if (sample_en) begin
      i_q     <= i_meas;
      ref_q   <= i_ref;
      sin_q   <= sin_t;
      cos_q   <= cos_t;
      vdc_q   <= vdc;
      k1_q    <= k1;
      lam_q   <= lambda;
      sprev_q <= s_prev;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[2:0], sample_en};
  end

  // rotation stage
  volt_vec_t vec_ab [NVEC];
  volt_vec_t vec_dq [NVEC];
  volt_vec_t vec_dq_q [NVEC];
  cur_vec_t  i_dq, i_dq_q;

  vsi_vectors u_vectors (.vdc(vdc_q), .vec(vec_ab));

  park_transform #(.W(CUR_W), .TRIG_W(TRIG_W), .TRIG_FRAC(TRIG_FRAC)) u_park_i (
    .x_alpha(i_q.re), .x_beta(i_q.im), .sin_t(sin_q), .cos_t(cos_q),
    .x_d(i_dq.re), .x_q(i_dq.im)
  );

  for (genvar n = 0; n < NVEC; n++) begin : g_rot
    park_transform #(.W(VOLT_W), .TRIG_W(TRIG_W), .TRIG_FRAC(TRIG_FRAC)) u_park_v (
      .x_alpha(vec_ab[n].re), .x_beta(vec_ab[n].im), .sin_t(sin_q), .cos_t(cos_q),
      .x_d(vec_dq[n].re), .x_q(vec_dq[n].im)
    );
  end

  always_ff @(posedge clk) begin
    i_dq_q   <= i_dq;
    vec_dq_q <= vec_dq;
  end

  cost_t g [NVEC];

  for (genvar n = 0; n < NVEC; n++) begin : g_cost
    cost_unit_dq #(.K2(K2), .K3(K3)) u_cost (
      .clk   (clk),
      .i_meas(i_dq_q),
      .i_ref (ref_q),
      .k1    (k1_q),
      .v     (vec_dq_q[n]),
      .lambda(lam_q),
      .s_cand(sw_state_t'(n)),
      .s_prev(sprev_q),
      .cost  (g[n])
    );
  end

  logic       sel_valid;
  cost_t      sel_g;
  logic [2:0] sel_s;

  min_select_chain #(.N(NVEC), .W(COST_W)) u_select (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (vld[3]),
    .g_in     (g),
    .out_valid(sel_valid),
    .g_min    (sel_g),
    .s_opt    (sel_s)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done  <= 1'b0;
      s_opt <= '0;
      g_min <= '0;
    end else begin
      done <= sel_valid;
      if (sel_valid) begin
        s_opt <= sw_state_t'(sel_s);
        g_min <= sel_g;
      end
    end
  end
endmodule
