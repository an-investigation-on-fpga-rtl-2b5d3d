// Testbench for reference_generator: sampling pulses every 40 clocks; after
// each pulse theta* must have advanced by exactly one phase step, and once
// the CORDIC has settled sin/cos and the alpha-beta reference must match
// the floating-point inverse Park transform of the dq reference.
//
// The operating points, tolerances and the floating-point reference model
// are this testbench's own; nothing in it is taken from the design under test.
module tb_reference_generator;
  import mpc_pkg::*;
  logic clk = 0, rst_n = 0, sample_en = 0;
  cur_vec_t i_ref_dq, i_ref_ab;
  logic [15:0] theta;
  trig_t sin_t, cos_t;
  int checks = 0, failures = 0;
  localparam logic [31:0] STEP = 32'd10737418;

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  reference_generator #(.PHASE_STEP(STEP)) dut (.clk(clk), .rst_n(rst_n), .sample_en(sample_en),
    .i_ref_dq(i_ref_dq), .theta(theta), .sin_t(sin_t), .cos_t(cos_t), .i_ref_ab(i_ref_ab));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] phase;
    phase = '0;
    i_ref_dq.re = cur_t'(4 * 1024);
    i_ref_dq.im = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      real th, ea, eb;
      if (n == 500) begin i_ref_dq.re = cur_t'(2560); i_ref_dq.im = cur_t'(-1500); end
      if (n == 1000) begin i_ref_dq.re = cur_t'(-3000); i_ref_dq.im = cur_t'(5000); end
      @(negedge clk) sample_en = 1;
      @(negedge clk) sample_en = 0;
      phase += STEP;
      checks++;
      if (theta != phase[31:16]) begin
        failures++; $display("n=%0d theta %0d exp %0d", n, theta, phase[31:16]);
      end
      repeat (20) @(negedge clk);
      th = real'(theta) / 65536.0 * 2.0 * 3.14159265358979;
      ea = real'(i_ref_dq.re) * $cos(th) - real'(i_ref_dq.im) * $sin(th);
      eb = real'(i_ref_dq.re) * $sin(th) + real'(i_ref_dq.im) * $cos(th);
      checks++;
      if (fabs(real'(sin_t) - $sin(th) * 16384.0) > 4.0 || fabs(real'(cos_t) - $cos(th) * 16384.0) > 4.0 ||
          fabs(real'(i_ref_ab.re) - ea) > 6.0 || fabs(real'(i_ref_ab.im) - eb) > 6.0) begin
        failures++;
        if (failures < 10) $display("n=%0d sin %0d cos %0d ref %0d %0d exp %f %f", n, sin_t, cos_t,
                                    i_ref_ab.re, i_ref_ab.im, ea, eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
