// Testbench for cost_unit_dq: random operands every clock, the cost two
// clocks later against the decoupled dq prediction in floating point:
//   i_p_d = k1*i_d + k2*(v_d + k3*i_q),  i_p_q = k1*i_q + k2*(v_q - k3*i_d)
//   g = |i*_d - i_p_d| + |i*_q - i_p_q| + lambda*p
//
// The operating points, tolerances and the floating-point reference model
// are this testbench's own; nothing in it is taken from the design under test.
module tb_cost_unit_dq;
  import mpc_pkg::*;
  logic clk = 0;
  cur_vec_t i_meas, i_ref;
  k1_t k1;
  volt_vec_t v;
  logic [LAMBDA_W-1:0] lambda;
  sw_state_t s_cand, s_prev;
  cost_t cost;
  int checks = 0, failures = 0;
  real expq [$];

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  cost_unit_dq dut (.clk(clk), .i_meas(i_meas), .i_ref(i_ref), .k1(k1), .v(v),
                    .lambda(lambda), .s_cand(s_cand), .s_prev(s_prev), .cost(cost));

  always #5 clk = ~clk;

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real k3;
    k3 = 12868.0 / 4096.0;
    for (int n = 0; n < 3000; n++) begin
      real pd, pq, g, id, iq;
      int  p;
      @(negedge clk);
      if (expq.size() == 2) begin
        real e;
        e = expq.pop_front();
        checks++;
        if (fabs(real'(cost) - e) > 5.0) begin
          failures++;
          if (failures < 10) $display("cycle %0d: cost %0d expected %f", n, cost, e);
        end
      end
      i_meas.re = cur_t'($urandom_range(0, 16384) - 8192);
      i_meas.im = cur_t'($urandom_range(0, 16384) - 8192);
      i_ref.re  = cur_t'($urandom_range(0, 16384) - 8192);
      i_ref.im  = cur_t'($urandom_range(0, 16384) - 8192);
      v.re      = volt_t'($urandom_range(0, 28000) - 14000);
      v.im      = volt_t'($urandom_range(0, 28000) - 14000);
      k1        = (n % 2 == 0) ? 10'sd243 : k1_t'($urandom_range(200, 256));
      lambda    = (n % 4 == 0) ? '0 : LAMBDA_W'($urandom_range(0, 400));
      s_cand    = sw_state_t'($urandom_range(0, 7));
      s_prev    = sw_state_t'($urandom_range(0, 7));
      p  = int'(s_cand.sa != s_prev.sa) + int'(s_cand.sb != s_prev.sb) + int'(s_cand.sc != s_prev.sc);
      id = real'(i_meas.re) / 1024.0;
      iq = real'(i_meas.im) / 1024.0;
      pd = real'(k1) / 256.0 * id + 41.0 / 8192.0 * (real'(v.re) / 32.0 + k3 * iq);
      pq = real'(k1) / 256.0 * iq + 41.0 / 8192.0 * (real'(v.im) / 32.0 - k3 * id);
      g  = (fabs(real'(i_ref.re) / 1024.0 - pd) + fabs(real'(i_ref.im) / 1024.0 - pq)) * 1024.0
           + real'(lambda) * real'(p);
      expq.push_back(g);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
