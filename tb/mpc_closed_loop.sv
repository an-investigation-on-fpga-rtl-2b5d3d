// Closed-loop harness used by the sampling-time testbench: one fcs_mpc_top
// with the given sampling frequency drives a vsi_rl_load (145 V, 10 ohm,
// 10 mH). After reset it runs a fixed sequence of 10 ms phases: the
// alpha-beta controller with k1 = 0.95 at 4 A and at 2 A, then the
// simplified controller without constraint at 4 A and with the
// reference-voltage-change constraint (weight 3.5) at 2 A. In the second half of every
// phase it measures the rms alpha-beta tracking error and compares it with
// a limit that scales with the sampling period (the current ripple of
// FCS-MPC grows with Ts). The results come out on ports; fin goes high when
// the sequence is over.
//
// The phases and limits are this harness's own choices.
module mpc_closed_loop
  import mpc_pkg::*;
#(
  parameter int unsigned FS_HZ = 20_000
) (
  input  logic clk,
  input  logic rst_n,
  output logic fin,
  output int   checks,
  output int   failures
);
  localparam int PHASE_SAMPLES = int'(FS_HZ / 100);
  localparam real LIMIT = 0.1 + 0.4 * 20000.0 / real'(FS_HZ);

  cur_t ia, ib;
  real ia_r, ib_r, vdc_r;
  int shoot_through;
  cur_vec_t i_ref_dq, i_ref_ab;
  ctrl_sel_e ctrl_sel;
  constraint_e con_mode;
  gates_t gates;
  logic sample_tick;
  logic [2:0] index;
  scost_t g_min;
  logic [ANG_W-1:0] theta;
  k1_t k1_used;

  fcs_mpc_top #(.FS_HZ(FS_HZ)) dut (
    .clk(clk), .rst_n(rst_n), .ia_meas(ia), .ib_meas(ib), .vdc(volt_t'(145 * 32)), .i_ref_dq(i_ref_dq),
    .ctrl_sel(ctrl_sel), .k1_mode(K1_FIXED), .lambda('0), .con_mode(con_mode),
    .lam_sp(lams_t'(256)), .lam_ssw('0), .lam_se(lams_t'(896)), .gates(gates),
    .sample_tick(sample_tick), .index(index), .g_min(g_min), .theta(theta),
    .i_ref_ab(i_ref_ab), .k1_used(k1_used));

  vsi_rl_load plant (.clk(clk), .gates(gates), .vdc(vdc_r), .ia(ia), .ib(ib),
                     .ia_r(ia_r), .ib_r(ib_r), .shoot_through(shoot_through));

  task automatic run_phase(string name, bit judge);
    real se, rms;
    int  n;
    se = 0.0; n = 0;
    for (int s = 0; s < PHASE_SAMPLES; s++) begin
      @(posedge clk iff sample_tick);
      @(negedge clk);
      if (s >= PHASE_SAMPLES / 2) begin
        real ea, eb;
        ea = ia_r - real'(i_ref_ab.re) / 1024.0;
        eb = (ia_r + 2.0 * ib_r) / $sqrt(3.0) - real'(i_ref_ab.im) / 1024.0;
        se += ea * ea + eb * eb;
        n++;
      end
    end
    rms = $sqrt(se / real'(n));
    $display("fs = %0d Hz, %-30s rms error %6.3f A (limit %5.3f)", FS_HZ, name, rms, LIMIT);
    if (judge) begin
      checks++;
      if (rms > LIMIT) begin
        failures++;
        $display("FAIL: fs = %0d Hz, %s", FS_HZ, name);
      end
    end
  endtask

  initial begin
    fin = 0; checks = 0; failures = 0;
    vdc_r = 145.0;
    ctrl_sel = CTRL_AB;
    con_mode = CON_NONE;
    i_ref_dq = '{re: cur_t'(4096), im: '0};
    @(posedge rst_n);
    run_phase("settling", 0);
    run_phase("alpha-beta, 4 A", 1);
    i_ref_dq.re = cur_t'(2048);
    run_phase("alpha-beta, 2 A", 1);
    ctrl_sel = CTRL_SIMPLE;
    i_ref_dq.re = cur_t'(4096);
    run_phase("simplified, 4 A", 1);
    con_mode = CON_SE;
    i_ref_dq.re = cur_t'(2048);
    run_phase("simplified with g_SE, 2 A", 1);
    checks++;
    if (shoot_through != 0) failures++;
    fin = 1;
  end
endmodule
