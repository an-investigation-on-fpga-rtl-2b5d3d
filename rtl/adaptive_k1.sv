// Adaptive prediction coefficient k1.
//
// k1 = 1 - R*Ts/L depends on the load resistance. Estimating R from the
// load impedance seen at the inverter, Z = m*Vdc / (2*sqrt(2)*I_rms), and
// neglecting X_L next to Z gives
//   k1 = 1 - m*Vdc*Ts / (2*sqrt(2)*L*I_rms) = 1 - C / I_rms
// with m = 1 and C = 0.2564 A for Vdc = 145 V, Ts = 50 us, L = 10 mH.
// I_rms is taken from the current reference: I_rms = |i*_dq| / sqrt(2), so
// the unit evaluates k1 = 1 - C*sqrt(2) / sqrt(i*_d^2 + i*_q^2).
//
// It is a small sequential unit started by the sampling pulse: one cycle
// forms i*_d^2 + i*_q^2, 17 cycles take a bit-serial square root, 26 cycles
// a restoring division, and one cycle rounds the ratio to the k1 format
// (8 fraction bits) and clamps it to [0, 1]. k1 is updated 44 clocks after
// start and held until the next update; a start while busy is ignored.
// After reset k1 is the nominal 0.95.
//
// The k1 = 1 - C/I_rms law and C = 0.2564 for the laboratory values come from
// the controller's specification; taking I_rms from the reference, the
// square-root/divider hardware, the clamp and the reset value are choices
// of this design.
module adaptive_k1
  import mpc_pkg::*;
#(
  parameter logic [16:0] C_Q16   = 17'd16804,  // C = m*Vdc*Ts/(2*sqrt(2)*L), 16 fraction bits
  parameter k1_t         K1_RESET = K1_FIXED_Q  // k1 before the first result
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  cur_vec_t i_ref,       // d, q reference
  output k1_t      k1,
  output logic     busy
);
  localparam logic [33:0] NUM = (34'(C_Q16) * 34'd92682) >> 16;  // C*sqrt(2), 16 fraction bits
  localparam int unsigned RW = 2 * CUR_W + 2;    // radicand (sum of squares)
  localparam int unsigned AW = CUR_W + 1;        // root, CUR_FRAC fraction bits
  localparam int unsigned QW = 26;               // quotient, 16 fraction bits
  localparam int unsigned MW = AW + 1;           // square-root remainder

  typedef enum logic [1:0] {IDLE, SQRT, DIV, ROUND} state_e;

  state_e          state;
  logic [4:0]      cnt;
  logic [RW-1:0]   rad;
  logic [MW-1:0]   rem;
  logic [AW-1:0]   root;
  logic [QW-1:0]   dvd, quo;
  logic [AW-1:0]   r;

  logic [MW+1:0]   rem_sh, trial;
  logic [AW:0]     r_sh;

  always_comb begin
    rem_sh = {rem, rad[RW-1 -: 2]};
    trial  = (MW+2)'({root, 2'b01});
    r_sh   = {r, dvd[QW-1]};
  end

  function automatic k1_t round_k1(logic [QW-1:0] ratio);
    logic [QW:0] sub;
    sub = ((QW+1)'(ratio) + (QW+1)'(128)) >> 8;
    if (sub >= (QW+1)'(256)) return '0;
    return k1_t'(10'(256) - 10'(sub));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
      rad   <= '0;
      rem   <= '0;
      root  <= '0;
      dvd   <= '0;
      quo   <= '0;
      r     <= '0;
      k1    <= K1_RESET;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          rad   <= RW'(i_ref.re * i_ref.re) + RW'(i_ref.im * i_ref.im);
          rem   <= '0;
          root  <= '0;
          cnt   <= 5'(RW / 2 - 1);
          state <= SQRT;
        end
        SQRT: begin
          rad <= rad << 2;
          if (rem_sh >= trial) begin
            rem  <= MW'(rem_sh - trial);
            root <= {root[AW-2:0], 1'b1};
          end else begin
            rem  <= MW'(rem_sh);
            root <= {root[AW-2:0], 1'b0};
          end
          if (cnt == 0) begin
            dvd   <= QW'(NUM << CUR_FRAC);
            quo   <= '0;
            r     <= '0;
            cnt   <= 5'(QW - 1);
            state <= DIV;
          end else cnt <= cnt - 1'b1;
        end
        DIV: begin
          dvd <= dvd << 1;
          if (root != '0 && r_sh >= (AW+1)'(root)) begin
            r   <= AW'(r_sh - (AW+1)'(root));
            quo <= {quo[QW-2:0], 1'b1};
          end else begin
            r   <= AW'(r_sh);
            quo <= {quo[QW-2:0], (root == '0)};
          end
          if (cnt == 0) state <= ROUND;
          else          cnt   <= cnt - 1'b1;
        end
        ROUND: begin
          k1    <= round_k1(quo);
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);
endmodule
