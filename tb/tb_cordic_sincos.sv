// Testbench for cordic_sincos: a new angle every clock over the whole turn
// (all four quadrants and the quadrant edges); sin and cos 17 clocks later
// against $sin/$cos, within 4 LSB of the 14-fraction-bit result.
//
// The operating points, tolerances and the floating-point reference model
// are this testbench's own; nothing in it is taken from the design under test.
module tb_cordic_sincos;
  logic clk = 0;
  logic [15:0] angle;
  logic signed [15:0] s, c;
  int checks = 0, failures = 0;
  real es [$];
  real ec [$];

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  cordic_sincos dut (.clk(clk), .angle(angle), .sin_o(s), .cos_o(c));

  always #5 clk = ~clk;

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      real th;
      @(negedge clk);
      if (es.size() == 17) begin
        real xs, xc;
        xs = es.pop_front(); xc = ec.pop_front();
        checks++;
        if (fabs(real'(s) - xs) > 4.0 || fabs(real'(c) - xc) > 4.0) begin
          failures++;
          if (failures < 10) $display("n=%0d got %0d %0d exp %f %f", n, s, c, xs, xc);
        end
      end
      if (n < 64) angle = 16'(n * 1024 + (n % 3) - 1);   // around the quadrant edges
      else        angle = 16'($urandom_range(0, 65535));
      th = real'(angle) / 65536.0 * 2.0 * 3.14159265358979;
      es.push_back($sin(th) * 16384.0);
      ec.push_back($cos(th) * 16384.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
