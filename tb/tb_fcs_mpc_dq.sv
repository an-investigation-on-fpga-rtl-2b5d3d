// Testbench for fcs_mpc_dq: random operating points and reference angles.
// For each sampling pulse the measured current and the eight vectors are
// rotated into dq in floating point and the decoupled predictions and
// costs are worked out; the controller's choice must be a minimum-cost
// state (within the rounding of the fixed-point datapath), g_min must match
// its cost, state 7 must never win when lambda = 0, and done must follow
// sample_en by exactly 11 clocks.
//
// The operating points, tolerances and the floating-point reference model
// are this testbench's own; nothing in it is taken from the design under test.
module tb_fcs_mpc_dq;
  import mpc_pkg::*;
  logic clk = 0, rst_n = 0, sample_en = 0, done;
  cur_vec_t i_meas, i_ref;
  trig_t sin_t, cos_t;
  volt_t vdc;
  k1_t k1;
  logic [LAMBDA_W-1:0] lambda;
  sw_state_t s_prev, s_opt;
  cost_t g_min;
  int checks = 0, failures = 0, zero_chosen = 0, penalised = 0;

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  fcs_mpc_dq dut (.clk(clk), .rst_n(rst_n), .sample_en(sample_en), .i_meas(i_meas), .i_ref(i_ref),
    .sin_t(sin_t), .cos_t(cos_t),
    .vdc(vdc), .k1(k1), .lambda(lambda), .s_prev(s_prev), .done(done), .s_opt(s_opt), .g_min(g_min));

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      real g [8];
      real gbest, V, ia, ib, sn, cs, id, iq, k3;
      int  lat, s;
      i_meas.re = cur_t'($urandom_range(0, 16384) - 8192);
      i_meas.im = cur_t'($urandom_range(0, 16384) - 8192);
      i_ref.re  = (n % 5 == 0) ? i_meas.re : cur_t'($urandom_range(0, 16384) - 8192);
      i_ref.im  = (n % 5 == 0) ? i_meas.im : cur_t'($urandom_range(0, 16384) - 8192);
      vdc       = (n % 2 == 0) ? volt_t'(145 * 32) : volt_t'(650 * 32);
      k1        = (n % 3 == 0) ? K1_FIXED_Q : (n % 3 == 1) ? K1_APPROX_Q : k1_t'($urandom_range(180, 256));
      lambda    = (n % 4 == 3) ? LAMBDA_W'($urandom_range(0, 2048)) : '0;
      s_prev    = sw_state_t'($urandom_range(0, 7));
      V  = real'(vdc) / 32.0;
      ia = real'(i_meas.re) / 1024.0;
      ib = real'(i_meas.im) / 1024.0;
      begin
        real th;
        th = 6.283185307 * real'($urandom_range(0, 9999)) / 10000.0;
        sin_t = trig_t'($rtoi($floor($sin(th) * 16384.0 + 0.5)));
        cos_t = trig_t'($rtoi($floor($cos(th) * 16384.0 + 0.5)));
      end
      sn = real'(sin_t) / 16384.0; cs = real'(cos_t) / 16384.0;
      id =  cs * ia + sn * ib;
      iq = -sn * ia + cs * ib;
      k3 = 12868.0 / 4096.0;
      for (int k = 0; k < 8; k++) begin
        real sa, sb, sc, va, vb, pa, pb;
        int  p;
        sa = real'(k / 4 % 2); sb = real'(k / 2 % 2); sc = real'(k % 2);
        va = V / 3.0 * (2.0 * sa - sb - sc);
        vb = V / $sqrt(3.0) * (sb - sc);
        pa = real'(k1) / 256.0 * id + 41.0 / 8192.0 * ( cs * va + sn * vb + k3 * iq);
        pb = real'(k1) / 256.0 * iq + 41.0 / 8192.0 * (-sn * va + cs * vb - k3 * id);
        p  = int'(sa != real'(s_prev.sa)) + int'(sb != real'(s_prev.sb)) + int'(sc != real'(s_prev.sc));
        g[k] = (fabs(real'(i_ref.re) / 1024.0 - pa) + fabs(real'(i_ref.im) / 1024.0 - pb)) * 1024.0
               + real'(lambda) * real'(p);
      end
      gbest = g[0];
      for (int k = 1; k < 8; k++) if (g[k] < gbest) gbest = g[k];
      @(negedge clk) sample_en = 1;
      @(negedge clk) sample_en = 0;
      lat = 1;   // negedges since the edge that took sample_en; done is high after edge 11
      while (!done && lat < 40) begin @(negedge clk); lat++; end
      s = int'(s_opt);
      checks++;
      if (lat != 12 || g[s] > gbest + 8.0 || fabs(real'(g_min) - g[s]) > 8.0 ||
          (lambda == 0 && s == 7)) begin
        failures++;
        if (failures < 10) $display("n=%0d: s=%0d g=%0d (model %f, best %f) latency %0d",
                                    n, s, g_min, g[s], gbest, lat);
      end
      if (s == 0) zero_chosen++;
      if (lambda != 0) penalised++;
      repeat (5) @(negedge clk);
    end
    checks++;
    if (zero_chosen == 0 || penalised == 0) begin
      failures++; $display("coverage: zero vector %0d, weighted %0d", zero_chosen, penalised);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
