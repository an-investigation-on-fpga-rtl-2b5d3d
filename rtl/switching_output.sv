// Application of the optimum switching state to the inverter.
//
// On each sampling pulse the state chosen during the previous interval,
// S_opt, is registered and held for one full sampling period; the sampling
// pulse thus acts as the enable of the selecting multiplexer, and a decision
// never reaches the switches in the middle of a period. The 3-bit state is
// sliced into the upper-switch gate signals G1 = Sa, G3 = Sb, G5 = Sc; the
// lower switches get the complements G2, G4, G6. The state read as a 3-bit
// number {Sa,Sb,Sc} is the index number (0..7) kept for observation,
// together with the minimum cost that selected it.
//
// No dead time is inserted: the gate signals are the ideal complementary
// pair and any dead time is left to the gate drivers. After reset the
// applied state is 000 (all lower switches on, zero vector).
//
// Slicing S_opt into G1/G3/G5 with complementary G2/G4/G6 and the index
// numbering follow the specification; the register, the reset state and
// the absence of dead time are choices of this design.
module switching_output
  import mpc_pkg::*;
#(
  parameter int unsigned GW = SCOST_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sample_en,
  input  sw_state_t     s_opt,
  input  logic [GW-1:0] g_min_in,
  output gates_t        gates,
  output logic [2:0]    index,
  output logic [GW-1:0] g_min
);
  sw_state_t s_applied;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_applied <= '0;
      g_min     <= '0;
    end else if (sample_en) begin
      s_applied <= s_opt;
      g_min     <= g_min_in;
    end
  end

  always_comb begin
    gates.g1 =  s_applied.sa;
    gates.g2 = ~s_applied.sa;
    gates.g3 =  s_applied.sb;
    gates.g4 = ~s_applied.sb;
    gates.g5 =  s_applied.sc;
    gates.g6 = ~s_applied.sc;
    index    = s_applied;
  end

  // the two switches of a leg are never on together
  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n)
    !(gates.g1 && gates.g2) && !(gates.g3 && gates.g4) && !(gates.g5 && gates.g6))
    else $error("switching_output: shoot-through on a leg");
endmodule
