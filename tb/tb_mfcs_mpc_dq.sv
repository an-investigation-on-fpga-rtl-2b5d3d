// Testbench for mfcs_mpc_dq: random operating points, reference angles,
// weights and all three constraint modes. The testbench keeps its own copy
// of the previous sample's dq current, works out v*(k) and v*(k-1) and the
// eight modified costs in floating point, and requires the controller's
// choice to be a minimum-cost state within the rounding of the fixed-point
// datapath, g_min to match that state's cost, and done to follow sample_en
// by exactly 12 clocks. It also counts how often each constraint mode ran.
//
// The operating points, tolerances and the floating-point reference model
// are this testbench's own; nothing in it is taken from the design under test.
module tb_mfcs_mpc_dq;
  import mpc_pkg::*;
  logic clk = 0, rst_n = 0, sample_en = 0, done;
  cur_vec_t i_meas, i_ref;
  trig_t sin_t, cos_t;
  volt_t vdc;
  constraint_e mode;
  lams_t lam_sp, lam_ssw, lam_se;
  sw_state_t s_prev, s_opt;
  scost_t g_min;
  int checks = 0, failures = 0;
  int mode_seen [3];

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  mfcs_mpc_dq dut (.clk(clk), .rst_n(rst_n), .sample_en(sample_en), .i_meas(i_meas), .i_ref(i_ref),
    .sin_t(sin_t), .cos_t(cos_t), .vdc(vdc), .mode(mode), .lam_sp(lam_sp), .lam_ssw(lam_ssw),
    .lam_se(lam_se), .s_prev(s_prev), .done(done), .s_opt(s_opt), .g_min(g_min));

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pd, pq;   // dq current of the previous sample, zero after reset
    pd = 0.0; pq = 0.0;
    mode_seen = '{0, 0, 0};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      real g [8], tol [8];
      real gbest, V, ia, ib, sn, cs, id, iq, rd, rq, vrd, vrq, vpd, vpq, lsp, lssw, lse, th;
      int  lat, s;
      i_meas.re = cur_t'($urandom_range(0, 8192) - 4096);
      i_meas.im = cur_t'($urandom_range(0, 8192) - 4096);
      i_ref.re  = cur_t'($urandom_range(0, 8192) - 4096);
      i_ref.im  = cur_t'($urandom_range(0, 8192) - 4096);
      vdc       = (n % 2 == 0) ? volt_t'(145 * 32) : volt_t'(650 * 32);
      mode      = constraint_e'(n % 3);
      lam_sp    = lams_t'((n % 5 == 0) ? 256 : $urandom_range(64, 512));
      lam_ssw   = lams_t'($urandom_range(0, 1 << 20));
      lam_se    = lams_t'($urandom_range(0, 2048));
      s_prev    = sw_state_t'($urandom_range(0, 7));
      th = 6.283185307 * real'($urandom_range(0, 9999)) / 10000.0;
      sin_t = trig_t'($rtoi($floor($sin(th) * 16384.0 + 0.5)));
      cos_t = trig_t'($rtoi($floor($cos(th) * 16384.0 + 0.5)));
      V  = real'(vdc) / 32.0;
      ia = real'(i_meas.re) / 1024.0;
      ib = real'(i_meas.im) / 1024.0;
      sn = real'(sin_t) / 16384.0; cs = real'(cos_t) / 16384.0;
      id =  cs * ia + sn * ib;
      iq = -sn * ia + cs * ib;
      rd = real'(i_ref.re) / 1024.0;
      rq = real'(i_ref.im) / 1024.0;
      // v*(k) = (R - L/Ts) i(k) + (L/Ts) i* + decoupling; v*(k-1) without decoupling
      vrd = -190.0 * id + 200.0 * rd - 3.1416 * iq;
      vrq = -190.0 * iq + 200.0 * rq + 3.1416 * id;
      vpd = -190.0 * pd + 200.0 * rd;
      vpq = -190.0 * pq + 200.0 * rq;
      lsp = real'(lam_sp) / 256.0; lssw = real'(lam_ssw) / 256.0; lse = real'(lam_se) / 256.0;
      for (int k = 0; k < 8; k++) begin
        real sa, sb, sc, va, vb, vd, vq, e, con;
        int  p;
        sa = real'(k / 4 % 2); sb = real'(k / 2 % 2); sc = real'(k % 2);
        va = V / 3.0 * (2.0 * sa - sb - sc);
        vb = V / $sqrt(3.0) * (sb - sc);
        vd =  cs * va + sn * vb;
        vq = -sn * va + cs * vb;
        p  = int'(sa != real'(s_prev.sa)) + int'(sb != real'(s_prev.sb)) + int'(sc != real'(s_prev.sc));
        e  = (vrd - vd) * (vrd - vd) + (vrq - vq) * (vrq - vq);
        con = (mode == CON_SSW) ? lssw * real'(p) :
              (mode == CON_SE)  ? lse * (fabs(vpd - vd) + fabs(vpq - vq)) : 0.0;
        g[k]   = 4.0 * (lsp * e + con);
        // fixed-point rounding: the dq current is truncated to 1/1024 A, which
        // times 190 ohm gives up to about 0.4 V on each voltage error
        tol[k] = 8.0 + 4.0 * lsp * 1.0 * ($sqrt(e) + 1.0) + 4.0 * lse * 1.0;
      end
      gbest = g[0];
      for (int k = 1; k < 8; k++) if (g[k] < gbest) gbest = g[k];
      @(negedge clk) sample_en = 1;
      @(negedge clk) sample_en = 0;
      lat = 1;   // negedges since the edge that took sample_en; done is high after edge 12
      while (!done && lat < 40) begin @(negedge clk); lat++; end
      s = int'(s_opt);
      checks++;
      if (lat != 13 || g[s] > gbest + tol[s] || fabs(real'(g_min) - g[s]) > tol[s]) begin
        failures++;
        if (failures < 10) $display("n=%0d mode=%0d: s=%0d g=%0d (model %f, best %f, tol %f) latency %0d",
                                    n, mode, s, g_min, g[s], gbest, tol[s], lat);
      end
      mode_seen[int'(mode)]++;
      pd = id; pq = iq;
      repeat (5) @(negedge clk);
    end
    checks++;
    if (mode_seen[0] == 0 || mode_seen[1] == 0 || mode_seen[2] == 0) begin
      failures++; $display("coverage: modes %0d %0d %0d", mode_seen[0], mode_seen[1], mode_seen[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
