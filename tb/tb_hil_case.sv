// Testbench for the simulation case with a motor-type load: Vdc = 650 V,
// R = 10 ohm, L = 10 mH, a 50 Hz sinusoidal back-EMF of 100 V, Ts = 50 us,
// and a 20 A reference that steps at once to 15 A with its phase inverted
// (180 degrees). The complete top, at its default parameters, runs the
// alpha-beta controller and then the dq controller in closed loop with a
// behavioural inverter and load. The controllers' model has no back-EMF
// term, so part of the error is a model mismatch. Checks: the rms tracking
// error before and after the step stays below 2 A (the ripple of FCS-MPC
// grows with Vdc: about 0.36 A at 145 V and 4.5 times that here), the current after the
// step is in antiphase with the current before it (the correlation of
// i_alpha with the pre-step reference changes sign), the peak current
// follows the new amplitude, and no shoot-through occurs.
//
// The case (650 V, 100 V back-EMF, 20 A -> 15 A with 180 degrees) is one the
// controller was evaluated with; the limits are this testbench's own.
module tb_hil_case;
  import mpc_pkg::*;
  logic clk = 0, rst_n = 0;
  cur_t ia, ib;
  real ia_r, ib_r, vdc_r;
  int shoot_through;
  cur_vec_t i_ref_dq, i_ref_ab;
  ctrl_sel_e ctrl_sel;
  gates_t gates;
  logic sample_tick;
  logic [2:0] index;
  scost_t g_min;
  logic [ANG_W-1:0] theta;
  k1_t k1_used;
  int checks = 0, failures = 0;

  fcs_mpc_top dut (
    .clk(clk), .rst_n(rst_n), .ia_meas(ia), .ib_meas(ib), .vdc(volt_t'(650 * 32)), .i_ref_dq(i_ref_dq),
    .ctrl_sel(ctrl_sel), .k1_mode(K1_FIXED), .lambda('0), .con_mode(CON_NONE),
    .lam_sp(lams_t'(256)), .lam_ssw('0), .lam_se('0), .gates(gates), .sample_tick(sample_tick),
    .index(index), .g_min(g_min), .theta(theta), .i_ref_ab(i_ref_ab), .k1_used(k1_used));

  vsi_rl_load #(.E_PEAK(100.0)) plant (.clk(clk), .gates(gates), .vdc(vdc_r), .ia(ia), .ib(ib),
                     .ia_r(ia_r), .ib_r(ib_r), .shoot_through(shoot_through));

  always #5 clk = ~clk;

  initial begin
    #300_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One 20 ms window (one fundamental period, 400 samples). Returns the rms
  // tracking error, the peak |i_a| and the correlation of i_a with cos(theta).
  task automatic window(string name, output real rms, output real peak, output real corr);
    real se;
    se = 0.0; peak = 0.0; corr = 0.0;
    for (int s = 0; s < 400; s++) begin
      real ea, eb, th;
      @(posedge clk iff sample_tick);
      @(negedge clk);
      ea = ia_r - real'(i_ref_ab.re) / 1024.0;
      eb = (ia_r + 2.0 * ib_r) / $sqrt(3.0) - real'(i_ref_ab.im) / 1024.0;
      se += ea * ea + eb * eb;
      if (ia_r > peak) peak = ia_r;
      if (-ia_r > peak) peak = -ia_r;
      th = 6.283185307179586 * real'(theta) / 65536.0;
      corr += ia_r * $cos(th) / 200.0;
    end
    rms = $sqrt(se / 400.0);
    $display("%-30s rms error %6.3f A, peak %6.2f A, correlation with cos(theta*) %6.2f", name, rms, peak, corr);
  endtask

  initial begin
    real rms, peak, corr_before, corr_after;
    vdc_r = 650.0;
    i_ref_dq = '{re: cur_t'(20 * 1024), im: '0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 2; c++) begin
      ctrl_sel = (c == 0) ? CTRL_AB : CTRL_DQ;
      i_ref_dq.re = cur_t'(20 * 1024);
      window("settling", rms, peak, corr_before);
      window((c == 0) ? "alpha-beta, 20 A" : "dq, 20 A", rms, peak, corr_before);
      check(rms < 2.0, "tracking at 20 A");
      check(peak > 19.0 && peak < 22.5, $sformatf("peak at 20 A = %f", peak));
      check(corr_before > 18.0, "current in phase with the 20 A reference");
      i_ref_dq.re = cur_t'(-15 * 1024);    // 15 A, phase shifted by 180 degrees
      window("step: 15 A, 180 degrees", rms, peak, corr_after);
      window((c == 0) ? "alpha-beta, 15 A" : "dq, 15 A", rms, peak, corr_after);
      check(rms < 2.0, "tracking at 15 A");
      check(peak > 14.0 && peak < 17.5, $sformatf("peak at 15 A = %f", peak));
      check(corr_after < -13.5, "current in antiphase after the step");
    end
    check(shoot_through == 0, "no shoot-through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
