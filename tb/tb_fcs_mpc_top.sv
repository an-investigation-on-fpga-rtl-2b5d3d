// End-to-end closed-loop testbench for fcs_mpc_top at its default
// parameters (100 MHz clock, 20 kHz sampling, 50 Hz reference).
//
// The top drives a behavioural inverter with a 10 ohm / 10 mH load at
// Vdc = 145 V, and the measured currents of phases a and b are fed back.
// The run goes through a sequence of phases, 10 ms each: the alpha-beta
// controller with k1 = 0.95, k1 = 1 and adaptive k1, a reference step from
// 4 A to 2.5 A and back, the alpha-beta controller with a commutation
// weight, the dq controller, and the simplified controller without a
// constraint, with the switching-state constraint and with the
// reference-voltage-change constraint. In the second half of each phase it
// measures the rms error between the load current and the alpha-beta
// reference, and counts commutations. Checks: tracking error, that the
// adaptive k1 takes the value 1 - 0.2564/I_rms for both amplitudes, that
// each constraint lowers the switching rate, that the sampling pulse comes
// every 5000 clocks, that no shoot-through occurs, and that every
// mechanism (each controller, each k1 mode, each constraint, the
// reference step, the zero vector, every active vector) was exercised.
//
// The electrical values are those of the laboratory setup the controller
// was designed for; the phase sequence, the weights and the limits are this
// testbench's own choices.
module tb_fcs_mpc_top;
  import mpc_pkg::*;
  localparam int PHASE_SAMPLES = 200;   // 10 ms at 20 kHz

  logic clk = 0, rst_n = 0;
  cur_t ia, ib;
  real ia_r, ib_r, vdc_r;
  int shoot_through;
  cur_vec_t i_ref_dq, i_ref_ab;
  ctrl_sel_e ctrl_sel;
  k1_mode_e k1_mode;
  logic [LAMBDA_W-1:0] lambda;
  constraint_e con_mode;
  lams_t lam_sp, lam_ssw, lam_se;
  gates_t gates;
  logic sample_tick;
  logic [2:0] index;
  scost_t g_min;
  logic [ANG_W-1:0] theta;
  k1_t k1_used;
  volt_t vdc;

  int checks = 0, failures = 0;

  fcs_mpc_top dut (
    .clk(clk), .rst_n(rst_n), .ia_meas(ia), .ib_meas(ib), .vdc(vdc), .i_ref_dq(i_ref_dq),
    .ctrl_sel(ctrl_sel), .k1_mode(k1_mode), .lambda(lambda), .con_mode(con_mode),
    .lam_sp(lam_sp), .lam_ssw(lam_ssw), .lam_se(lam_se), .gates(gates), .sample_tick(sample_tick),
    .index(index), .g_min(g_min), .theta(theta), .i_ref_ab(i_ref_ab), .k1_used(k1_used));

  vsi_rl_load plant (.clk(clk), .gates(gates), .vdc(vdc_r), .ia(ia), .ib(ib),
                     .ia_r(ia_r), .ib_r(ib_r), .shoot_through(shoot_through));

  always #5 clk = ~clk;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // sampling-period measurement
  int   since_tick = 0, ticks = 0, bad_period = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      since_tick++;
      if (sample_tick) begin
        if (ticks > 0 && since_tick != 5000) bad_period++;
        ticks++;
        since_tick = 0;
      end
    end
  end

  int index_seen [8];
  int k1_modes_seen [3];
  int ctrl_seen [3];
  int con_seen [3];

  // Runs one phase and returns the rms tracking error (A) and the
  // commutations per sampling period over its second half.
  task automatic run_phase(string name, output real rms, output real comm_rate);
    real se;
    int  n, comm;
    logic [2:0] last;
    se = 0.0; n = 0; comm = 0; last = index;
    for (int s = 0; s < PHASE_SAMPLES; s++) begin
      @(posedge clk iff sample_tick);
      @(negedge clk);
      k1_modes_seen[int'(k1_mode)]++;
      ctrl_seen[int'(ctrl_sel)]++;
      if (ctrl_sel == CTRL_SIMPLE) con_seen[int'(con_mode)]++;
      if (s >= PHASE_SAMPLES / 2) begin
        real ea, eb;
        // i_ref_ab is the reference for this sample; compare the currents
        // measured at the same instant
        ea = ia_r - real'(i_ref_ab.re) / 1024.0;
        eb = (ia_r + 2.0 * ib_r) / $sqrt(3.0) - real'(i_ref_ab.im) / 1024.0;
        se += ea * ea + eb * eb;
        n++;
        comm += int'(last[2] != index[2]) + int'(last[1] != index[1]) + int'(last[0] != index[0]);
        index_seen[index]++;
      end
      last = index;
    end
    rms = $sqrt(se / real'(n));
    comm_rate = real'(comm) / real'(n);
    $display("%-28s k1=%0d rms error %6.3f A, %5.3f commutations per period", name, k1_used, rms, comm_rate);
  endtask

  initial begin
    real rms, rate_ab, rate_ab_lam, rate_none, rate_ssw, rate_se;
    int  k1_4a, k1_25a;
    vdc_r    = 145.0;
    vdc      = volt_t'(145 * 32);
    i_ref_dq = '{re: cur_t'(4 * 1024), im: '0};
    ctrl_sel = CTRL_AB;
    k1_mode  = K1_FIXED;
    lambda   = '0;
    con_mode = CON_NONE;
    lam_sp   = lams_t'(256);        // 1.0
    lam_ssw  = lams_t'(256 * 4000); // 4000 V^2 per commutation
    lam_se   = lams_t'(25600);  // 100 (V^2 per V of change)
    index_seen = '{default: 0};
    k1_modes_seen = '{default: 0};
    ctrl_seen = '{default: 0};
    con_seen = '{default: 0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // settle the loop, then alpha-beta frame with the three k1 choices
    run_phase("settling", rms, rate_ab);
    run_phase("alpha-beta, k1 = 0.95", rms, rate_ab);
    check(rms < 0.5, "alpha-beta k1=0.95 tracking");
    check(k1_used == 243, "fixed k1 value");
    k1_mode = K1_APPROX;
    run_phase("alpha-beta, k1 = 1", rms, rate_ab);
    check(rms < 0.5, "alpha-beta k1=1 tracking");
    check(k1_used == 256, "approximate k1 value");
    k1_mode = K1_ADAPTIVE;
    run_phase("alpha-beta, adaptive k1, 4 A", rms, rate_ab);
    check(rms < 0.5, "alpha-beta adaptive k1 tracking");
    k1_4a = int'(k1_used);
    // 1 - 0.2564/(4/sqrt2) = 0.90935 -> 232.8 in Q2.8
    check(k1_4a >= 232 && k1_4a <= 233, $sformatf("adaptive k1 at 4 A = %0d", k1_4a));

    // reference step 4 A -> 2.5 A
    i_ref_dq.re = cur_t'(2560);
    run_phase("reference step to 2.5 A", rms, rate_ab);
    check(rms < 0.5, "tracking after step down");
    k1_25a = int'(k1_used);
    // 1 - 0.2564/(2.5/sqrt2) = 0.85496 -> 218.9
    check(k1_25a >= 218 && k1_25a <= 219, $sformatf("adaptive k1 at 2.5 A = %0d", k1_25a));
    i_ref_dq.re = cur_t'(4 * 1024);
    run_phase("reference step to 4 A", rms, rate_ab);
    check(rms < 0.5, "tracking after step up");

    // commutation weight on the alpha-beta controller
    k1_mode = K1_FIXED;
    lambda  = LAMBDA_W'(250);
    run_phase("alpha-beta, lambda > 0", rms, rate_ab_lam);
    check(rms < 0.9, "alpha-beta with lambda tracking");
    check(rate_ab_lam < rate_ab, "commutation weight lowers switching");
    lambda  = '0;

    // dq frame
    ctrl_sel = CTRL_DQ;
    run_phase("dq, k1 = 0.95", rms, rate_ab);
    check(rms < 0.5, "dq tracking");
    k1_mode = K1_ADAPTIVE;
    run_phase("dq, adaptive k1", rms, rate_ab);
    check(rms < 0.5, "dq adaptive tracking");

    // simplified controller
    ctrl_sel = CTRL_SIMPLE;
    con_mode = CON_NONE;
    run_phase("simplified, no constraint", rms, rate_none);
    check(rms < 0.5, "simplified tracking");
    con_mode = CON_SSW;
    run_phase("simplified, g_SSW", rms, rate_ssw);
    check(rms < 0.6, "simplified SSW tracking");
    check(rate_ssw < rate_none, "switching-state constraint lowers switching");
    con_mode = CON_SE;
    run_phase("simplified, g_SE", rms, rate_se);
    check(rms < 0.6, "simplified SE tracking");
    check(rate_se < rate_none, "reference-voltage constraint lowers switching");

    check(bad_period == 0 && ticks > 2000, $sformatf("sampling period (%0d pulses)", ticks));
    check(shoot_through == 0, "no shoot-through");
    for (int k = 0; k < 7; k++) check(index_seen[k] > 0, $sformatf("index %0d applied", k));
    for (int k = 0; k < 3; k++) check(k1_modes_seen[k] > 0, $sformatf("k1 mode %0d used", k));
    for (int k = 0; k < 3; k++) check(ctrl_seen[k] > 0, $sformatf("controller %0d used", k));
    for (int k = 0; k < 3; k++) check(con_seen[k] > 0, $sformatf("constraint %0d used", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
