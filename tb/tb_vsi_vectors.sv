// Testbench for vsi_vectors: the eight vectors for several dc-link voltages
// against the switching-state table (0, 2Vdc/3, Vdc/3 +- jVdc/sqrt(3), ...).
//
// The operating points, tolerances and the floating-point reference model
// are this testbench's own; nothing in it is taken from the design under test.
module tb_vsi_vectors;
  import mpc_pkg::*;
  volt_t     vdc;
  volt_vec_t vec [NVEC];
  int checks = 0, failures = 0;

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  vsi_vectors dut (.vdc(vdc), .vec(vec));

  initial begin
    static real vd_list [4] = '{145.0, 650.0, 300.0, 24.0};
    foreach (vd_list[m]) begin
      vdc = volt_t'($rtoi(vd_list[m] * 32.0));
      #1;
      for (int n = 0; n < 8; n++) begin
        real er, ei, sa, sb, sc, V;
        V  = real'(vdc) / 32.0;
        sa = real'(n / 4 % 2); sb = real'(n / 2 % 2); sc = real'(n % 2);
        // v = 2/3 (Sa + a Sb + a^2 Sc) Vdc
        er = 2.0 / 3.0 * V * (sa - 0.5 * sb - 0.5 * sc);
        ei = 2.0 / 3.0 * V * (0.8660254 * sb - 0.8660254 * sc);
        checks++;
        if (fabs(real'(vec[n].re) / 32.0 - er) > 0.07 || fabs(real'(vec[n].im) / 32.0 - ei) > 0.07) begin
          failures++;
          $display("Vdc=%f state %0d: got %f %f exp %f %f", V, n,
                   real'(vec[n].re) / 32.0, real'(vec[n].im) / 32.0, er, ei);
        end
      end
      checks++;
      if (vec[0] != vec[7] || vec[0] != '0) begin
        failures++; $display("zero vectors differ");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
