// Testbench for sampling_clock: the pulse is one cycle wide, the first one
// comes DIV cycles after reset and the rest exactly DIV cycles apart.
// Runs a short divider (DIV = 10) and the default 100 MHz / 20 kHz divider.
//
// The operating points, tolerances and the floating-point reference model
// are this testbench's own; nothing in it is taken from the design under test.
module tb_sampling_clock;
  logic clk = 0, rst_n = 0;
  logic en_s, en_d;
  int checks = 0, failures = 0;

  sampling_clock #(.CLK_HZ(1000), .FS_HZ(100)) dut_s (.clk(clk), .rst_n(rst_n), .sample_en(en_s));
  sampling_clock dut_d (.clk(clk), .rst_n(rst_n), .sample_en(en_d));

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last_s, last_d, n_s, n_d;
    last_s = 0; last_d = 0; n_s = 0; n_d = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (cyc = 1; cyc <= 16000; cyc++) begin
      @(posedge clk); #1;
      if (en_s) begin
        checks++;
        if (cyc - last_s != 10) begin
          failures++; $display("short divider: pulse after %0d cycles", cyc - last_s);
        end
        last_s = cyc; n_s++;
      end
      if (en_d) begin
        checks++;
        if (cyc - last_d != 5000) begin
          failures++; $display("default divider: pulse after %0d cycles", cyc - last_d);
        end
        last_d = cyc; n_d++;
      end
    end
    checks++;
    if (n_s != 1600 || n_d != 3) begin
      failures++; $display("pulse counts %0d %0d", n_s, n_d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
