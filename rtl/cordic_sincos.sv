// Pipelined CORDIC in rotation mode: sine and cosine of the reference angle.
//
// The angle is an unsigned fraction of a full turn (2^ANG_W = 2*pi). The
// first stage folds it into [-pi/2, pi/2): angles in the second and third
// quadrants are rotated by pi and the results negated. Then ITER
// shift-and-add micro-rotations drive the residual angle z to zero, starting
// from x = K * 2^TRIG_FRAC (K = 0.60725, the CORDIC gain compensation), y = 0,
// carried with GB = 4 guard bits that are rounded off at the end.
// The elementary angles are atan(2^-i) expressed in units of 2^-18 turn:
// round(atan(2^-i) / (2*pi) * 2^18), i = 0 .. 15.
//
// Outputs are signed with TRIG_FRAC fraction bits; the error is a few LSB.
// Timing: fully pipelined, one angle per clock, ITER + 1 clocks of latency
// (17 at the defaults).
//
// The controller is specified only as using a CORDIC sine/cosine generator;
// this pipelined structure, its widths and the quadrant folding are
// choices of this design.
module cordic_sincos #(
  parameter int unsigned ANG_W     = 16,
  parameter int unsigned TRIG_W    = 16,
  parameter int unsigned TRIG_FRAC = 14,
  parameter int unsigned ITER      = 16
) (
  input  logic                     clk,
  input  logic [ANG_W-1:0]         angle,
  output logic signed [TRIG_W-1:0] sin_o,
  output logic signed [TRIG_W-1:0] cos_o
);
  localparam int unsigned ZW = 20;               // residual angle, 2^18 = one turn
  localparam int unsigned GB = 4;                // guard bits below the output LSB
  localparam int unsigned XW = TRIG_W + 2 + GB;
  localparam logic signed [XW-1:0] X0 = XW'((64'd9949 << (TRIG_FRAC + GB)) >> 14);

  function automatic logic signed [ZW-1:0] atan_tab(int unsigned i);
    case (i)
      0: return 20'sd32768;   1: return 20'sd19344;   2: return 20'sd10221;
      3: return 20'sd5188;    4: return 20'sd2604;    5: return 20'sd1303;
      6: return 20'sd652;     7: return 20'sd326;     8: return 20'sd163;
      9: return 20'sd81;     10: return 20'sd41;     11: return 20'sd20;
     12: return 20'sd10;     13: return 20'sd5;      14: return 20'sd3;
     15: return 20'sd1;
      default: return 20'sd0;
    endcase
  endfunction

  logic signed [XW-1:0] x [ITER+1];
  logic signed [XW-1:0] y [ITER+1];
  logic signed [ZW-1:0] z [ITER+1];
  logic [ITER:0]        neg;

  // stage 0: quadrant fold; angle scaled to 2^18 per turn
  logic [17:0] a18;
  logic        flip;

  always_comb begin
    a18  = 18'(angle) << (18 - ANG_W);
    flip = (a18[17:16] == 2'b01) || (a18[17:16] == 2'b10);
  end

  always_ff @(posedge clk) begin
    x[0]   <= X0;
    y[0]   <= '0;
    z[0]   <= flip ? ZW'($signed({2'b00, a18})) - ZW'(20'sd131072)
                   : ZW'($signed({{2{a18[17]}}, a18}));
    neg[0] <= flip;
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    always_ff @(posedge clk) begin
      if (z[i][ZW-1]) begin
        x[i+1] <= x[i] + (y[i] >>> i);
        y[i+1] <= y[i] - (x[i] >>> i);
        z[i+1] <= z[i] + atan_tab(i);
      end else begin
        x[i+1] <= x[i] - (y[i] >>> i);
        y[i+1] <= y[i] + (x[i] >>> i);
        z[i+1] <= z[i] - atan_tab(i);
      end
      neg[i+1] <= neg[i];
    end
  end

  // drop the guard bits with rounding, then undo the quadrant fold
  logic signed [XW-1:0] xr, yr;

  always_comb begin
    xr    = (x[ITER] + XW'(2 ** (GB - 1))) >>> GB;
    yr    = (y[ITER] + XW'(2 ** (GB - 1))) >>> GB;
    cos_o = neg[ITER] ? TRIG_W'(-xr) : TRIG_W'(xr);
    sin_o = neg[ITER] ? TRIG_W'(-yr) : TRIG_W'(yr);
  end

  initial assert (ANG_W <= 18 && ITER <= 16) else $error("cordic_sincos: unsupported size");
endmodule
