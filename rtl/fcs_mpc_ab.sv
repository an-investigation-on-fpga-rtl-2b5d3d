// Conventional FCS-MPC current controller in the stationary alpha-beta frame,
// fully parallel.
//
// At each sampling pulse the measured load current i(k), the reference
// i*(k) (used as i*(k+1)), the dc-link voltage, k1, the switching weight and
// the state now being applied are latched. Eight cost units, one per
// switching state, then predict i(k+1) for their voltage vector and form
// the cost |i*_a - i_p_a| + |i*_b - i_p_b| (+ lambda * commutations) in
// parallel. A seven-stage compare-and-select chain finds g_min and S_opt,
// which are held until the next result.
//
// Timing: 1 input register + 2 cost stages + 7 selection stages; done pulses
// and s_opt/g_min change 10 clocks after sample_en. The sampling
// period must exceed this (5000 clocks at the defaults).
//
// The algorithm follows the specification; latching the inputs on the
// pulse and evaluating all eight states in parallel are choices of this
// design.
module fcs_mpc_ab
  import mpc_pkg::*;
#(
  parameter logic signed [K2_W-1:0] K2 = K2_Q   // Ts/L
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sample_en,
  input  cur_vec_t            i_meas,    // alpha, beta
  input  cur_vec_t            i_ref,     // alpha, beta
  input  volt_t               vdc,
  input  k1_t                 k1,
  input  logic [LAMBDA_W-1:0] lambda,
  input  sw_state_t           s_prev,
  output logic                done,
  output sw_state_t           s_opt,
  output cost_t               g_min
);

  cur_vec_t            i_q, ref_q;
  volt_t               vdc_q;
  k1_t                 k1_q;
  logic [LAMBDA_W-1:0] lam_q;
  sw_state_t           sprev_q;
  logic [2:0]          vld;

  always_ff @(posedge clk) begin
    if (sample_en) begin
      i_q     <= i_meas;
      ref_q   <= i_ref;
      vdc_q   <= vdc;
      k1_q    <= k1;
      lam_q   <= lambda;
      sprev_q <= s_prev;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[1:0], sample_en};
  end

  volt_vec_t vec [NVEC];
  cost_t     g   [NVEC];

  vsi_vectors u_vectors (.vdc(vdc_q), .vec(vec));

  for (genvar n = 0; n < NVEC; n++) begin : g_cost
    cost_unit_ab #(.K2(K2)) u_cost (
      .clk   (clk),
      .i_meas(i_q),
      .i_ref (ref_q),
      .k1    (k1_q),
      .v     (vec[n]),
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
    .in_valid (vld[2]),
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
