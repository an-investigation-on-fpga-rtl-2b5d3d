// Testbench for cost_unit_ab: a new random operand set every clock, the
// cost two clocks later compared with the prediction and cost evaluated in
// floating point:
//   i_p = k1*i + k2*v,  g = |i*_a - i_p_a| + |i*_b - i_p_b| + lambda*p
// The two-clock latency is checked by the alignment itself.
//
// The operating points, tolerances and the floating-point reference model
// are this testbench's own; nothing in it is taken from the design under test.
module tb_cost_unit_ab;
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

  cost_unit_ab dut (.clk(clk), .i_meas(i_meas), .i_ref(i_ref), .k1(k1), .v(v),
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
    for (int n = 0; n < 3000; n++) begin
      real pr, pi, g;
      int  p;
      @(negedge clk);
      if (expq.size() == 2) begin
        real e;
        e = expq.pop_front();
        checks++;
        if (fabs(real'(cost) - e) > 4.5) begin
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
      case (n % 3)
        0: k1 = 10'sd243;
        1: k1 = 10'sd256;
        default: k1 = k1_t'($urandom_range(200, 256));
      endcase
      lambda = (n % 4 == 0) ? '0 : LAMBDA_W'($urandom_range(0, 400));
      s_cand = sw_state_t'($urandom_range(0, 7));
      s_prev = sw_state_t'($urandom_range(0, 7));
      p  = int'(s_cand.sa != s_prev.sa) + int'(s_cand.sb != s_prev.sb) + int'(s_cand.sc != s_prev.sc);
      pr = real'(k1) / 256.0 * real'(i_meas.re) / 1024.0 + 41.0 / 8192.0 * real'(v.re) / 32.0;
      pi = real'(k1) / 256.0 * real'(i_meas.im) / 1024.0 + 41.0 / 8192.0 * real'(v.im) / 32.0;
      g  = (fabs(real'(i_ref.re) / 1024.0 - pr) + fabs(real'(i_ref.im) / 1024.0 - pi)) * 1024.0
           + real'(lambda) * real'(p);
      expq.push_back(g);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
