// Testbench for adaptive_k1: for a set of reference amplitudes (the ones the
// controller was evaluated at, 2 to 4 A, and the edges: zero, tiny, large,
// non-zero q component) k1 must equal round(256 * (1 - C*sqrt(2)/|i*|))/256
// clamped to [0, 1], within one LSB, and must appear 44 clocks after start.
//
// The operating points, tolerances and the floating-point reference model
// are this testbench's own; nothing in it is taken from the design under test.
module tb_adaptive_k1;
  import mpc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy;
  cur_vec_t i_ref;
  k1_t k1;
  int checks = 0, failures = 0;

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  adaptive_k1 dut (.clk(clk), .rst_n(rst_n), .start(start), .i_ref(i_ref), .k1(k1), .busy(busy));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static real amps_d [12] = '{2.0, 2.5, 3.0, 3.5, 4.0, 0.0, 0.1, 0.36, 20.0, 31.0, 1.0, -4.0};
    static real amps_q [12] = '{0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0,  0.0,  0.0, 2.0,  3.0};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++;
    if (k1 != K1_FIXED_Q) begin failures++; $display("reset value %0d", k1); end
    for (int n = 0; n < 12 + 40; n++) begin
      real a, kexp, kq;
      int  cyc;
      if (n < 12) begin
        i_ref.re = cur_t'($rtoi(amps_d[n] * 1024.0));
        i_ref.im = cur_t'($rtoi(amps_q[n] * 1024.0));
      end else begin
        i_ref.re = cur_t'($urandom_range(0, 30000) - 15000);
        i_ref.im = cur_t'($urandom_range(0, 30000) - 15000);
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;   // negedges since the edge that took start; k1 lands on edge 44
      while (busy) begin @(negedge clk); cyc++; end
      a = $sqrt((real'(i_ref.re) / 1024.0) ** 2 + (real'(i_ref.im) / 1024.0) ** 2);
      kexp = (a == 0.0) ? 0.0 : 1.0 - (16804.0 / 65536.0) * $sqrt(2.0) / a;
      if (kexp < 0.0) kexp = 0.0;
      kq = $floor(kexp * 256.0 + 0.5);
      checks++;
      if (fabs(real'(k1) - kq) > 1.0 || cyc != 45) begin
        failures++;
        $display("amp %f: k1 %0d expected %f after %0d clocks", a, k1, kq, cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
