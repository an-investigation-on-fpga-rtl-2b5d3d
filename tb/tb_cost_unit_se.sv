// Testbench for cost_unit_se: random reference voltages, candidate vectors,
// weights and all three constraint modes every clock; the cost two clocks
// later against the floating-point value of
//   l_SP*g_SP (+ l_SSW*p | + l_SE*(|e_d| + |e_q|)),  in units of 1/4 V^2.
//
// The operating points, tolerances and the floating-point reference model
// are this testbench's own; nothing in it is taken from the design under test.
module tb_cost_unit_se;
  import mpc_pkg::*;
  logic clk = 0;
  refv_vec_t v_ref, v_ref_prev;
  volt_vec_t v;
  constraint_e mode;
  lams_t lam_sp, lam_ssw, lam_se;
  sw_state_t s_cand, s_prev;
  scost_t cost;
  int checks = 0, failures = 0;
  real expq [$];
  real tolq [$];
  int  modes [3];

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  cost_unit_se dut (.clk(clk), .v_ref(v_ref), .v_ref_prev(v_ref_prev), .v(v), .mode(mode),
    .lam_sp(lam_sp), .lam_ssw(lam_ssw), .lam_se(lam_se), .s_cand(s_cand), .s_prev(s_prev),
    .cost(cost));

  always #5 clk = ~clk;

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    modes = '{0, 0, 0};
    for (int n = 0; n < 3000; n++) begin
      real ad, aq, ed, eq, g, gsp;
      int  p;
      @(negedge clk);
      if (expq.size() == 2) begin
        real e, t;
        e = expq.pop_front(); t = tolq.pop_front();
        checks++;
        if (fabs(real'(cost) - e) > t) begin
          failures++;
          if (failures < 10) $display("cycle %0d: cost %0d expected %f", n, cost, e);
        end
      end
      v_ref.re      = refv_t'($urandom_range(0, 40000) - 20000);
      v_ref.im      = refv_t'($urandom_range(0, 40000) - 20000);
      v_ref_prev.re = refv_t'($urandom_range(0, 40000) - 20000);
      v_ref_prev.im = refv_t'($urandom_range(0, 40000) - 20000);
      v.re          = volt_t'($urandom_range(0, 28000) - 14000);
      v.im          = volt_t'($urandom_range(0, 28000) - 14000);
      mode          = constraint_e'(n % 3);
      modes[n % 3]++;
      lam_sp        = lams_t'($urandom_range(1, 1024));
      lam_ssw       = lams_t'($urandom_range(0, 1 << 20));
      lam_se        = lams_t'($urandom_range(0, 4096));
      s_cand        = sw_state_t'($urandom_range(0, 7));
      s_prev        = sw_state_t'($urandom_range(0, 7));
      p   = int'(s_cand.sa != s_prev.sa) + int'(s_cand.sb != s_prev.sb) + int'(s_cand.sc != s_prev.sc);
      ad  = (real'(v_ref.re) - real'(v.re)) / 32.0;
      aq  = (real'(v_ref.im) - real'(v.im)) / 32.0;
      ed  = (real'(v_ref_prev.re) - real'(v.re)) / 32.0;
      eq  = (real'(v_ref_prev.im) - real'(v.im)) / 32.0;
      gsp = ad * ad + aq * aq;
      g   = real'(lam_sp) / 256.0 * gsp * 4.0;
      if (mode == CON_SSW) g += real'(lam_ssw) / 256.0 * real'(p) * 4.0;
      if (mode == CON_SE)  g += real'(lam_se) / 256.0 * (fabs(ed) + fabs(eq)) * 4.0;
      expq.push_back(g);
      tolq.push_back(3.0 + 1.5 * real'(lam_sp) / 256.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
