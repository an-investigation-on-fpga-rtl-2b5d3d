// Behavioural model of a two-level three-phase voltage source inverter
// feeding a balanced star-connected RL load with an isolated neutral.
//
// The upper gate signals give the switching state {Sa,Sb,Sc}; the lower
// gates are only checked for shoot-through. The load phase voltages are
// v_xN = Vdc/3 * (2 Sx - Sy - Sz), and each phase current is advanced by
// the exact solution of L di/dt = v - R i over one clock period, so the
// model is accurate at any switching instant. The currents of phases a and
// b are given out quantized like the controller's current inputs (signed,
// 10 fraction bits), as an ideal current sensor and ADC would deliver them.
// An optional sinusoidal back-EMF of amplitude E_PEAK and frequency E_HZ
// (phase a starting at zero at time zero, b and c lagging by 120 and 240
// degrees) is subtracted from the phase voltages; with the default of zero
// the load is a plain RL load. Ideal switches, no dead time.
//
// This is a behavioural model for simulation only, not synthesizable logic.
module vsi_rl_load
  import mpc_pkg::*;
#(
  parameter real R_OHM   = 10.0,
  parameter real L_H     = 10.0e-3,
  parameter real T_CLK_S = 10.0e-9,
  parameter real E_PEAK  = 0.0,
  parameter real E_HZ    = 50.0
) (
  input  logic   clk,
  input  gates_t gates,
  input  real    vdc,
  output cur_t   ia,
  output cur_t   ib,
  output real    ia_r,
  output real    ib_r,
  output int     shoot_through
);
  real i_a = 0.0, i_b = 0.0, i_c = 0.0;
  real decay;
  longint unsigned n_clk = 0;

  initial begin
    decay = $exp(-R_OHM * T_CLK_S / L_H);
    shoot_through = 0;
  end

  function automatic real step(real i, real v);
    real ss;
    ss = v / R_OHM;
    return ss + (i - ss) * decay;
  endfunction

  always @(posedge clk) begin
    real sa, sb, sc, ph, ea, eb, ec;
    ph = 6.283185307179586 * E_HZ * T_CLK_S * real'(n_clk);
    ea = E_PEAK * $sin(ph);
    eb = E_PEAK * $sin(ph - 2.0943951023931957);
    ec = E_PEAK * $sin(ph + 2.0943951023931957);
    n_clk++;
    sa = gates.g1 ? 1.0 : 0.0;
    sb = gates.g3 ? 1.0 : 0.0;
    sc = gates.g5 ? 1.0 : 0.0;
    if (gates.g1 == gates.g2 || gates.g3 == gates.g4 || gates.g5 == gates.g6) shoot_through++;
    i_a = step(i_a, vdc / 3.0 * (2.0 * sa - sb - sc) - ea);
    i_b = step(i_b, vdc / 3.0 * (2.0 * sb - sa - sc) - eb);
    i_c = step(i_c, vdc / 3.0 * (2.0 * sc - sa - sb) - ec);
  end

  assign ia_r = i_a;
  assign ib_r = i_b;
  assign ia = cur_t'($rtoi($floor(i_a * 1024.0 + 0.5)));
  assign ib = cur_t'($rtoi($floor(i_b * 1024.0 + 0.5)));
endmodule
