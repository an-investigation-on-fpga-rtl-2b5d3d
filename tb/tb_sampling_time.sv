// Sampling-time testbench: the complete controller in closed loop at the
// three sampling periods it is meant for, Ts = 20 us, 50 us and 100 us
// (fs = 50, 20 and 10 kHz), each at load currents of 4 A and 2 A, with the
// alpha-beta controller and with the simplified controller. The prediction
// constants follow the sampling frequency through the top's parameters.
// Each of the three loops checks its tracking error against a limit that
// scales with Ts; see mpc_closed_loop.
//
// The three sampling times are those the controller was evaluated with; the
// limits are this testbench's own.
module tb_sampling_time;
  logic clk = 0, rst_n = 0;
  logic fin [3];
  int   c [3], f [3];
  int   checks = 0, failures = 0;

  mpc_closed_loop #(.FS_HZ(50_000)) u_20us  (.clk(clk), .rst_n(rst_n), .fin(fin[0]), .checks(c[0]), .failures(f[0]));
  mpc_closed_loop #(.FS_HZ(20_000)) u_50us  (.clk(clk), .rst_n(rst_n), .fin(fin[1]), .checks(c[1]), .failures(f[1]));
  mpc_closed_loop #(.FS_HZ(10_000)) u_100us (.clk(clk), .rst_n(rst_n), .fin(fin[2]), .checks(c[2]), .failures(f[2]));

  always #5 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (fin[0] && fin[1] && fin[2]);
    for (int k = 0; k < 3; k++) begin
      checks += c[k];
      failures += f[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
