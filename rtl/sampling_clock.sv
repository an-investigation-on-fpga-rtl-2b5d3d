// Sampling clock (synchroniser) of the controller.
//
// Divides the FPGA clock down to the control sampling rate and emits a
// one-cycle enable pulse, sample_en, once per sampling interval Ts. The pulse
// tells the controllers to latch a new set of measurements and tells the
// output stage to apply the switching state found in the previous interval,
// so a decision always lands exactly on a sampling instant. The defaults,
// 100 MHz clock and 20 kHz sampling, give one pulse every 5000 cycles.
// The first pulse comes DIV cycles after reset is released.
//
// The sampling clock as an enable for the output stage follows the
// specification; the counter and the timing of the first pulse are
// choices of this design.
module sampling_clock #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned FS_HZ  = 20_000,
  parameter int unsigned DIV    = CLK_HZ / FS_HZ
) (
  input  logic clk,
  input  logic rst_n,
  output logic sample_en
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      sample_en <= 1'b0;
    end else if (count == CW'(DIV - 1)) begin
      count     <= '0;
      sample_en <= 1'b1;
    end else begin
      count     <= count + 1'b1;
      sample_en <= 1'b0;
    end
  end

  initial assert (DIV >= 2) else $error("sampling_clock: DIV must be at least 2");
endmodule
