// FPGA FCS-MPC load-current controller for a two-level three-phase VSI.
//
// Finite-control-set model predictive control: every sampling period the
// controller evaluates all eight switching states of the inverter with a
// discrete model of the RL load, scores each by how far it would leave the
// load current from its reference, and applies the best one for the next
// period. No modulator and no inner PI loop are involved.
//
// Data flow per sampling period Ts (20 kHz from a 100 MHz clock):
//   sampling_clock      -> sample_en, one pulse per Ts
//   clarke_transform    -> i_alpha, i_beta from the measured phase currents
//                          (phases a and b are measured, i_c = -i_a - i_b)
//   reference_generator -> theta*, sin/cos(theta*) and the alpha-beta
//                          sinusoidal reference from the dq reference
//   adaptive_k1         -> k1 = 1 - C/I_rms from the reference amplitude
//   fcs_mpc_ab          -> conventional controller, alpha-beta frame
//   fcs_mpc_dq          -> conventional controller, dq frame
//   mfcs_mpc_dq         -> simplified controller with modified cost function
//   switching_output    -> applies the chosen state at the next pulse,
//                          gate signals G1..G6 and index number
// The three controllers run side by side on the same samples; ctrl_sel
// chooses which one drives the inverter, k1_mode which prediction
// coefficient the two conventional ones use (0.95, 1, or adaptive), and
// con_mode which constraint the simplified one adds. Every controller sees
// the state actually being applied as "previous state" for its commutation
// count. A controller's decision is ready 10 to 12 clocks after the pulse
// and is applied at the following pulse, one period after the measurement.
//
// The model constants (k1 = 1 - R Ts/L, k2 = Ts/L, L/Ts, R - L/Ts, w L and
// the adaptive-k1 constant) are computed from the parameters at elaboration
// and passed down, so changing FS_HZ, F_REF_HZ, R_MOHM or L_UH gives a
// consistent controller; the defaults are those of the laboratory setup.
//
// Inputs are the measured phase currents already scaled to amperes (signed,
// 10 fraction bits) and the dc-link voltage (signed, 5 fraction bits); the
// ADC, level shifters and isolators of a real setup are outside this module.
//
// Lint note: the timing assertions use rst_n in a disable-iff clause while
// the pending register resets asynchronously on it, which Verilator reports
// as a signal used both synchronously and asynchronously; the assertions
// are simulation-only, so the warning stands.
//
// The chain of blocks follows the specification; running the three
// controllers side by side behind a selector, deriving the constants from
// parameters and the one-period application delay are choices of this
// design.
module fcs_mpc_top
  import mpc_pkg::*;
#(
  parameter int unsigned CLK_HZ   = 100_000_000,
  parameter int unsigned FS_HZ    = 20_000,
  parameter int unsigned F_REF_HZ = 50,
  // load model and nominal dc link, from which the prediction constants
  // are derived
  parameter int unsigned R_MOHM    = 10_000,   // load resistance, milliohm
  parameter int unsigned L_UH      = 10_000,   // load inductance, microhenry
  parameter int unsigned VDC_NOM_V = 145       // dc link for the adaptive-k1 constant
) (
  input  logic                clk,
  input  logic                rst_n,
  // measurements
  input  cur_t                ia_meas,
  input  cur_t                ib_meas,
  input  volt_t               vdc,
  // reference and configuration
  input  cur_vec_t            i_ref_dq,
  input  ctrl_sel_e           ctrl_sel,
  input  k1_mode_e            k1_mode,
  input  logic [LAMBDA_W-1:0] lambda,      // commutation weight, conventional controllers
  input  constraint_e         con_mode,    // constraint of the simplified controller
  input  lams_t               lam_sp,
  input  lams_t               lam_ssw,
  input  lams_t               lam_se,
  // inverter
  output gates_t              gates,
  // observation
  output logic                sample_tick,
  output logic [2:0]          index,
  output scost_t              g_min,
  output logic [ANG_W-1:0]    theta,
  output cur_vec_t            i_ref_ab,
  output k1_t                 k1_used
);
  localparam logic [PHASE_W-1:0] PHASE_STEP =
    PHASE_W'((64'(F_REF_HZ) << PHASE_W) / 64'(FS_HZ));

  // Prediction constants, rounded to their fixed-point formats:
  //   k1 = 1 - R Ts / L, k2 = Ts / L, L/Ts, R - L/Ts, w L and the
  //   adaptive-k1 constant C = Vdc Ts / (2 sqrt(2) L).
  localparam longint FL  = longint'(FS_HZ) * longint'(L_UH);        // L/Ts * 1e6
  localparam longint K1N = (longint'(1 << K1_FRAC) * longint'(R_MOHM) * 1000 + FL / 2) / FL;
  localparam longint K2N = ((longint'(1) << K2_FRAC) * 1_000_000 + FL / 2) / FL;
  localparam longint KBN = (longint'(1 << KV_FRAC) * FL + 500_000) / 1_000_000;
  localparam longint KRN = (longint'(1 << KV_FRAC) * longint'(R_MOHM) + 500) / 1000;
  localparam longint K3N = (longint'(1 << K3_FRAC) * 6_283_185 * longint'(F_REF_HZ) * longint'(L_UH)
                            + 64'sd500_000_000_000) / 64'sd1_000_000_000_000;
  localparam longint CN  = ((longint'(1) << 16) * longint'(VDC_NOM_V) * 64'sd100_000_000_000
                            + FL * 141_421) / (FL * 282_843);

  localparam k1_t                     K1_NOM = k1_t'((1 << K1_FRAC) - K1N);
  localparam logic signed [K2_W-1:0]  K2     = K2_W'(K2N);
  localparam logic signed [KV_W-1:0]  KB     = KV_W'(KBN);
  localparam logic signed [KV_W-1:0]  KA     = KV_W'(KRN - KBN);
  localparam logic signed [K3_W-1:0]  K3     = K3_W'(K3N);
  localparam logic [16:0]             C_Q16  = 17'(CN);

  // ------------------------------------------------------------ timing
  logic sample_en;

  sampling_clock #(.CLK_HZ(CLK_HZ), .FS_HZ(FS_HZ)) u_clock (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en)
  );

  assign sample_tick = sample_en;

  // ------------------------------------------------------ measurement
  cur_t     ic_meas;
  cur_vec_t i_ab;

  assign ic_meas = -(ia_meas + ib_meas);

  clarke_transform #(.W(CUR_W)) u_clarke (
    .xa(ia_meas), .xb(ib_meas), .xc(ic_meas),
    .x_alpha(i_ab.re), .x_beta(i_ab.im)
  );

  // -------------------------------------------------------- reference
  trig_t sin_t, cos_t;

  reference_generator #(.PHASE_STEP(PHASE_STEP)) u_ref (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en), .i_ref_dq(i_ref_dq),
    .theta(theta), .sin_t(sin_t), .cos_t(cos_t), .i_ref_ab(i_ref_ab)
  );

  // ---------------------------------------------------------------- k1
  k1_t  k1_adapt;
  logic k1_busy;

  adaptive_k1 #(.C_Q16(C_Q16), .K1_RESET(K1_NOM)) u_k1 (
    .clk(clk), .rst_n(rst_n), .start(sample_en), .i_ref(i_ref_dq),
    .k1(k1_adapt), .busy(k1_busy)
  );

  always_comb begin
    unique case (k1_mode)
      K1_APPROX:   k1_used = K1_APPROX_Q;
      K1_ADAPTIVE: k1_used = k1_adapt;
      default:     k1_used = K1_NOM;
    endcase
  end

  // ------------------------------------------------------- controllers
  sw_state_t s_next;
  sw_state_t s_ab, s_dq, s_se;
  cost_t     g_ab, g_dq;
  scost_t    g_se;
  logic      done_ab, done_dq, done_se;

  fcs_mpc_ab #(.K2(K2)) u_ab (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en),
    .i_meas(i_ab), .i_ref(i_ref_ab), .vdc(vdc), .k1(k1_used),
    .lambda(lambda), .s_prev(s_next),
    .done(done_ab), .s_opt(s_ab), .g_min(g_ab)
  );

  fcs_mpc_dq #(.K2(K2), .K3(K3)) u_dq (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en),
    .i_meas(i_ab), .i_ref(i_ref_dq), .sin_t(sin_t), .cos_t(cos_t),
    .vdc(vdc), .k1(k1_used), .lambda(lambda), .s_prev(s_next),
    .done(done_dq), .s_opt(s_dq), .g_min(g_dq)
  );

  mfcs_mpc_dq #(.KA(KA), .KB(KB), .K3(K3)) u_se (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en),
    .i_meas(i_ab), .i_ref(i_ref_dq), .sin_t(sin_t), .cos_t(cos_t),
    .vdc(vdc), .mode(con_mode), .lam_sp(lam_sp), .lam_ssw(lam_ssw),
    .lam_se(lam_se), .s_prev(s_next),
    .done(done_se), .s_opt(s_se), .g_min(g_se)
  );

  scost_t g_sel;

  always_comb begin
    unique case (ctrl_sel)
      CTRL_DQ:     begin s_next = s_dq; g_sel = SCOST_W'(g_dq); end
      CTRL_SIMPLE: begin s_next = s_se; g_sel = g_se;           end
      default:     begin s_next = s_ab; g_sel = SCOST_W'(g_ab); end
    endcase
  end

  // ------------------------------------------------------------ output
  switching_output #(.GW(SCOST_W)) u_out (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en),
    .s_opt(s_next), .g_min_in(g_sel),
    .gates(gates), .index(index), .g_min(g_min)
  );

  // Every unit must finish inside one sampling period: a controller that
  // has been started must have reported done before the next pulse.
  logic [2:0] pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pending <= '0;
    else if (sample_en) pending <= 3'b111;
    else pending <= pending & ~{done_se, done_dq, done_ab};
  end

  a_ctrl_in_time: assert property (@(posedge clk) disable iff (!rst_n)
    sample_en |-> (pending == 3'b000))
    else $error("fcs_mpc_top: a controller did not finish within the sampling period");
  a_k1_in_time: assert property (@(posedge clk) disable iff (!rst_n)
    sample_en |-> !k1_busy)
    else $error("fcs_mpc_top: adaptive k1 still busy at a sampling pulse");
endmodule
