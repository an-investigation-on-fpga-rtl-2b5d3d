// Testbench for ref_voltage_calc: random currents and references against
//   v*(k)   = (R - L/Ts) i(k) + (L/Ts) i* -/+ w L i_q/d(k)
//   v*(k-1) = (L/Ts) i* + (R - L/Ts) i(k-1)
// in floating point with R = 10 ohm, L = 10 mH, Ts = 50 us, w = 2 pi 50.
//
// The operating points, tolerances and the floating-point reference model
// are this testbench's own; nothing in it is taken from the design under test.
module tb_ref_voltage_calc;
  import mpc_pkg::*;
  cur_vec_t i_dq, i_dq_prev, i_ref;
  refv_vec_t v_ref, v_ref_prev;
  int checks = 0, failures = 0;

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  ref_voltage_calc dut (.i_dq(i_dq), .i_dq_prev(i_dq_prev), .i_ref(i_ref),
                        .v_ref(v_ref), .v_ref_prev(v_ref_prev));

  initial begin
    real ka, kb, k3;
    ka = 10.0 - 0.01 / 50e-6;
    kb = 0.01 / 50e-6;
    k3 = 2.0 * 3.14159265 * 50.0 * 0.01;
    for (int n = 0; n < 2000; n++) begin
      real id, iq, pd, pq, rd, rq, e1, e2, e3, e4;
      i_dq.re      = cur_t'($urandom_range(0, 16384) - 8192);
      i_dq.im      = cur_t'($urandom_range(0, 16384) - 8192);
      i_dq_prev.re = cur_t'($urandom_range(0, 16384) - 8192);
      i_dq_prev.im = cur_t'($urandom_range(0, 16384) - 8192);
      i_ref.re     = cur_t'($urandom_range(0, 16384) - 8192);
      i_ref.im     = cur_t'($urandom_range(0, 16384) - 8192);
      #1;
      id = real'(i_dq.re) / 1024.0;      iq = real'(i_dq.im) / 1024.0;
      pd = real'(i_dq_prev.re) / 1024.0; pq = real'(i_dq_prev.im) / 1024.0;
      rd = real'(i_ref.re) / 1024.0;     rq = real'(i_ref.im) / 1024.0;
      e1 = ka * id + kb * rd - k3 * iq;
      e2 = ka * iq + kb * rq + k3 * id;
      e3 = kb * rd + ka * pd;
      e4 = kb * rq + ka * pq;
      checks++;
      if (fabs(real'(v_ref.re) / 32.0 - e1) > 0.12 || fabs(real'(v_ref.im) / 32.0 - e2) > 0.12 ||
          fabs(real'(v_ref_prev.re) / 32.0 - e3) > 0.12 || fabs(real'(v_ref_prev.im) / 32.0 - e4) > 0.12) begin
        failures++;
        if (failures < 10) $display("n=%0d got %f %f %f %f exp %f %f %f %f", n,
          real'(v_ref.re) / 32.0, real'(v_ref.im) / 32.0, real'(v_ref_prev.re) / 32.0,
          real'(v_ref_prev.im) / 32.0, e1, e2, e3, e4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
