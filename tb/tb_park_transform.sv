// Testbench for park_transform: random vectors and angles against the
// rotation computed in floating point with the same quantised sin/cos.
//
// The operating points, tolerances and the floating-point reference model
// are this testbench's own; nothing in it is taken from the design under test.
module tb_park_transform;
  logic signed [15:0] al, be, s, c, d, q;
  int checks = 0, failures = 0;

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  park_transform #(.W(16), .TRIG_W(16), .TRIG_FRAC(14)) dut (
    .x_alpha(al), .x_beta(be), .sin_t(s), .cos_t(c), .x_d(d), .x_q(q));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      real th, sr, cr, ed, eq;
      th = 6.283185307 * real'($urandom_range(0, 9999)) / 10000.0;
      s  = 16'($rtoi($floor($sin(th) * 16384.0 + 0.5)));
      c  = 16'($rtoi($floor($cos(th) * 16384.0 + 0.5)));
      al = 16'($urandom_range(0, 40000) - 20000);
      be = 16'($urandom_range(0, 40000) - 20000);
      #1;
      sr = real'(s) / 16384.0; cr = real'(c) / 16384.0;
      ed =  cr * real'(al) + sr * real'(be);
      eq = -sr * real'(al) + cr * real'(be);
      checks++;
      if (fabs(real'(d) - ed) > 1.5 || fabs(real'(q) - eq) > 1.5) begin
        failures++;
        if (failures < 10) $display("th=%f: got %0d %0d exp %f %f", th, d, q, ed, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
