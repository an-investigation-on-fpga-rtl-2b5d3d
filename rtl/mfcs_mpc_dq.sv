// Simplified FCS-MPC current controller with the modified cost function,
// rotating dq frame.
//
// Instead of eight current predictions, the controller computes once per
// period the reference voltage vector v*(k) that would put the current on
// its reference, and then picks the inverter vector closest to it. At each
// sampling pulse the measured alpha-beta current, the dq reference, sin/cos
// of theta*, the dc-link voltage, the weights, the constraint mode and the
// state now being applied are latched. The current and the eight voltage
// vectors are rotated into dq; v*(k) and v*(k-1) are formed from i(k),
// i(k-1) and i*; eight cost units evaluate l_SP*g_SP plus the selected
// constraint (none, commutation count, or reference-voltage change); the
// compare-and-select chain returns g_min and S_opt.
//
// i(k-1) is the dq current of the previous sampling pulse and is zero after
// reset.
//
// Timing: input register, rotation stage, reference-voltage stage, two cost
// stages and seven selection stages; done pulses and s_opt/g_min change 12
// clocks after sample_en.
//
// The reference-voltage formulation and the two constraints follow the
// specification; offering them behind one mode input, the pipelining and
// the zero i(k-1) after reset are choices of this design.
module mfcs_mpc_dq
  import mpc_pkg::*;
#(
  parameter logic signed [KV_W-1:0] KA = KA_Q,  // R - L/Ts
  parameter logic signed [KV_W-1:0] KB = KB_Q,  // L/Ts
  parameter logic signed [K3_W-1:0] K3 = K3_Q   // w* L
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sample_en,
  input  cur_vec_t    i_meas,     // alpha, beta
  input  cur_vec_t    i_ref,      // d, q
  input  trig_t       sin_t,
  input  trig_t       cos_t,
  input  volt_t       vdc,
  input  constraint_e mode,
  input  lams_t       lam_sp,
  input  lams_t       lam_ssw,
  input  lams_t       lam_se,
  input  sw_state_t   s_prev,
  output logic        done,
  output sw_state_t   s_opt,
  output scost_t      g_min
);
  cur_vec_t    i_q, ref_q;
  trig_t       sin_q, cos_q;
  volt_t       vdc_q;
  constraint_e mode_q;
  lams_t       lsp_q, lssw_q, lse_q;
  sw_state_t   sprev_q;
  logic [4:0]  vld;

  always_ff @(posedge clk) begin
    if (sample_en) begin
      i_q     <= i_meas;
      ref_q   <= i_ref;
      sin_q   <= sin_t;
      cos_q   <= cos_t;
      vdc_q   <= vdc;
      mode_q  <= mode;
      lsp_q   <= lam_sp;
      lssw_q  <= lam_ssw;
      lse_q   <= lam_se;
      sprev_q <= s_prev;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[3:0], sample_en};
  end

  // rotation stage
  volt_vec_t vec_ab [NVEC];
  volt_vec_t vec_dq [NVEC];
  volt_vec_t vec_dq_q [NVEC];
  cur_vec_t  i_dq, i_dq_q, i_dq_prev;

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

  always_ff @(posedge clk) vec_dq_q <= vec_dq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_dq_q    <= '0;
      i_dq_prev <= '0;
    end else if (vld[0]) begin
      i_dq_q    <= i_dq;
      i_dq_prev <= i_dq_q;
    end
  end

  // reference-voltage stage
  refv_vec_t v_ref, v_ref_prev, v_ref_q, v_ref_prev_q;

  ref_voltage_calc #(.KA(KA), .KB(KB), .K3(K3)) u_vref (
    .i_dq      (i_dq_q),
    .i_dq_prev (i_dq_prev),
    .i_ref     (ref_q),
    .v_ref     (v_ref),
    .v_ref_prev(v_ref_prev)
  );

  always_ff @(posedge clk) begin
    v_ref_q      <= v_ref;
    v_ref_prev_q <= v_ref_prev;
  end

  // cost stage
  scost_t g [NVEC];

  for (genvar n = 0; n < NVEC; n++) begin : g_cost
    cost_unit_se u_cost (
      .clk       (clk),
      .v_ref     (v_ref_q),
      .v_ref_prev(v_ref_prev_q),
      .v         (vec_dq_q[n]),
      .mode      (mode_q),
      .lam_sp    (lsp_q),
      .lam_ssw   (lssw_q),
      .lam_se    (lse_q),
      .s_cand    (sw_state_t'(n)),
      .s_prev    (sprev_q),
      .cost      (g[n])
    );
  end

  logic       sel_valid;
  scost_t     sel_g;
  logic [2:0] sel_s;

  min_select_chain #(.N(NVEC), .W(SCOST_W)) u_select (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (vld[4]),
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
