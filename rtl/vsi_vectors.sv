// Voltage vectors of the two-level three-phase inverter in the alpha-beta
// frame, one per switching state.
//
// With S = {Sa,Sb,Sc} and v = (2/3)(Sa + a*Sb + a^2*Sc)*Vdc, a = e^(j*2pi/3):
//   v_alpha = Vdc/3       * (2*Sa - Sb - Sc)
//   v_beta  = Vdc/sqrt(3) * (Sb - Sc)
// which gives 0, +-2Vdc/3, +-Vdc/3 +- j*Vdc/sqrt(3); states 000 and 111 both
// give the zero vector. Output entry n belongs to the state whose index
// number {Sa,Sb,Sc} equals n. Vdc is an input so that a measured or changed
// dc-link voltage is used directly; Vdc/3 and Vdc/sqrt(3) each take one
// constant multiplier and the eight vectors are then sums of those two
// terms. Purely combinational.
//
// The vector table follows the specification; computing it from a
// run-time Vdc is a choice of this design.
module vsi_vectors
  import mpc_pkg::*;
(
  input  volt_t     vdc,
  output volt_vec_t vec [NVEC]
);
  localparam int unsigned PW = VOLT_W + 18;

  logic signed [PW-1:0] p3, ps3;
  volt_t                third, root3;

  always_comb begin
    p3    = PW'(vdc) * $signed({1'b0, INV3_Q16});
    ps3   = PW'(vdc) * $signed({1'b0, INV_SQRT3_Q16});
    third = volt_t'(p3 >>> 16);    // Vdc/3
    root3 = volt_t'(ps3 >>> 16);   // Vdc/sqrt(3)
    for (int n = 0; n < NVEC; n++) begin
      sw_state_t s;
      logic signed [2:0] ka, kb;
      s  = sw_state_t'(n[2:0]);
      ka = 3'(2 * int'(s.sa) - int'(s.sb) - int'(s.sc));
      kb = 3'(int'(s.sb) - int'(s.sc));
      vec[n].re = volt_t'(ka * third);
      vec[n].im = volt_t'(kb * root3);
    end
  end
endmodule
