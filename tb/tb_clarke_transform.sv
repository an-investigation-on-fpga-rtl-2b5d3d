// Testbench for clarke_transform: random balanced and unbalanced phase
// currents against x_beta = (x_b - x_c)/sqrt(3) computed in floating point.
//
// The operating points, tolerances and the floating-point reference model
// are this testbench's own; nothing in it is taken from the design under test.
module tb_clarke_transform;
  logic signed [15:0] a, b, c, al, be;
  int checks = 0, failures = 0;

  clarke_transform #(.W(16)) dut (.xa(a), .xb(b), .xc(c), .x_alpha(al), .x_beta(be));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      real exp_b;
      a = 16'($urandom_range(0, 40000) - 20000);
      b = 16'($urandom_range(0, 30000) - 15000);
      c = (n % 2 == 0) ? -(a + b) : 16'($urandom_range(0, 30000) - 15000);
      #1;
      exp_b = (real'(b) - real'(c)) / $sqrt(3.0);
      checks++;
      if (al != a || (real'(be) - exp_b) > 1.5 || (real'(be) - exp_b) < -1.5) begin
        failures++;
        if (failures < 10) $display("a=%0d b=%0d c=%0d: got %0d %0d, beta exp %f", a, b, c, al, be, exp_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
