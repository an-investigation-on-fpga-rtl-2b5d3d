// Shared types and constants of the FCS-MPC current controller for a two-level
// three-phase voltage source inverter (VSI) driving an RL load.
//
// Fixed-point formats. The two prediction coefficients follow the formats
// the design was characterised with: k1 is a signed 10-bit word with 8
// fraction bits (0.95 is stored as 243/256 = 0.9492), k2 = Ts/L is a signed
// 13-bit word with 13 fraction bits (0.005 is stored as 41/8192). All other
// widths are choices of this implementation:
//   current  : signed 16 bits, 10 fraction bits (+/-32 A, 0.98 mA step)
//   voltage  : signed 16 bits,  5 fraction bits (+/-1024 V, 31 mV step)
//   abs cost : unsigned 20 bits, 10 fraction bits (amperes)
//   sin/cos  : signed 16 bits, 14 fraction bits
//   angle    : unsigned 16 bits, one full turn = 2^16
// Electrical defaults are those of the laboratory prototype: Vdc = 145 V,
// R = 10 ohm, L = 10 mH, fs = 20 kHz (Ts = 50 us), 50 Hz reference,
// 100 MHz FPGA clock.
package mpc_pkg;

  // ---------------------------------------------------------------- widths
  localparam int unsigned CUR_W     = 16;
  localparam int unsigned CUR_FRAC  = 10;
  localparam int unsigned VOLT_W    = 16;
  localparam int unsigned VOLT_FRAC = 5;
  localparam int unsigned K1_W      = 10;
  localparam int unsigned K1_FRAC   = 8;
  localparam int unsigned K2_W      = 13;
  localparam int unsigned K2_FRAC   = 13;
  localparam int unsigned K3_W      = 16;
  localparam int unsigned K3_FRAC   = 12;
  localparam int unsigned COST_W    = 20;   // |error| cost, CUR_FRAC fraction bits
  localparam int unsigned LAMBDA_W  = 16;   // switching weight, CUR_FRAC fraction bits
  localparam int unsigned TRIG_W    = 16;
  localparam int unsigned TRIG_FRAC = 14;
  localparam int unsigned ANG_W     = 16;
  localparam int unsigned PHASE_W   = 32;   // phase accumulator
  localparam int unsigned NVEC      = 8;    // 2^3 switching states
  // simplified (reference-voltage) controller
  localparam int unsigned REFV_W    = 20;   // reference voltage, VOLT_FRAC fraction bits
  localparam int unsigned SCOST_W   = 32;   // squared-voltage cost, SCOST_FRAC fraction bits
  localparam int unsigned SCOST_FRAC = 2;
  localparam int unsigned LAMS_W    = 24;   // weights of that cost, LAMS_FRAC fraction bits
  localparam int unsigned LAMS_FRAC = 8;
  localparam int unsigned KV_W      = 16;   // R - L/Ts and L/Ts in ohm
  localparam int unsigned KV_FRAC   = 4;

  // -------------------------------------------------------- coefficients
  localparam logic signed [K1_W-1:0] K1_FIXED_Q  = 10'sd243;  // 0.9492 = 1 - R*Ts/L
  localparam logic signed [K1_W-1:0] K1_APPROX_Q = 10'sd256;  // 1.0
  localparam logic signed [K2_W-1:0] K2_Q        = 13'sd41;   // 0.0050 = Ts/L
  localparam logic signed [K3_W-1:0] K3_Q        = 16'sd12868; // 3.1416 = w*L
  localparam logic signed [KV_W-1:0] KA_Q        = -16'sd3040; // R - L/Ts = -190 ohm
  localparam logic signed [KV_W-1:0] KB_Q        = 16'sd3200;  // L/Ts = 200 ohm
  // 1/3 and 1/sqrt(3) with 16 fraction bits, used by the vector table and
  // the Clarke transform.
  localparam logic [16:0] INV3_Q16      = 17'd21845;
  localparam logic [16:0] INV_SQRT3_Q16 = 17'd37837;

  // ------------------------------------------------------------- types
  typedef logic signed [CUR_W-1:0]  cur_t;
  typedef logic signed [VOLT_W-1:0] volt_t;
  typedef logic        [COST_W-1:0] cost_t;
  typedef logic signed [K1_W-1:0]   k1_t;
  typedef logic signed [TRIG_W-1:0] trig_t;
  typedef logic signed [REFV_W-1:0] refv_t;
  typedef logic        [SCOST_W-1:0] scost_t;
  typedef logic        [LAMS_W-1:0] lams_t;

  typedef struct packed {
    refv_t re;  // d
    refv_t im;  // q
  } refv_vec_t;

  // Switching state of the three legs; 1 = upper switch on. Read as a
  // 3-bit number {Sa,Sb,Sc} it is the index number of the state.
  typedef struct packed {
    logic sa;
    logic sb;
    logic sc;
  } sw_state_t;

  // Gate drive of the six switches, G1/G2 on leg a, G3/G4 on b, G5/G6 on c.
  typedef struct packed {
    logic g1, g2, g3, g4, g5, g6;
  } gates_t;

  typedef struct packed {
    cur_t re;   // alpha or d component
    cur_t im;   // beta  or q component
  } cur_vec_t;

  typedef struct packed {
    volt_t re;
    volt_t im;
  } volt_vec_t;

  typedef enum logic [1:0] {
    K1_FIXED    = 2'd0,
    K1_APPROX   = 2'd1,
    K1_ADAPTIVE = 2'd2
  } k1_mode_e;

  typedef enum logic [1:0] {
    CTRL_AB     = 2'd0,   // conventional FCS-MPC, stationary alpha-beta frame
    CTRL_DQ     = 2'd1,   // conventional FCS-MPC, rotating dq frame
    CTRL_SIMPLE = 2'd2    // simplified (reference-voltage) FCS-MPC, dq frame
  } ctrl_sel_e;

  typedef enum logic [1:0] {
    CON_NONE = 2'd0,      // primary cost only
    CON_SSW  = 2'd1,      // + weight * number of commutations
    CON_SE   = 2'd2       // + weight * |v*(k-1) - v(k)| (reference-voltage change)
  } constraint_e;

  // Number of legs that change state between two switching states.
  function automatic logic [1:0] commutations(sw_state_t a, sw_state_t b);
    logic [2:0] d;
    d = a ^ b;
    return {1'b0, d[0]} + {1'b0, d[1]} + {1'b0, d[2]};
  endfunction

endpackage
