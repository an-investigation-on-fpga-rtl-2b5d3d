// Testbench for min_select_chain: a new set of eight costs every clock
// (random, with many forced ties), compared seven clocks later with a
// first-minimum search; out_valid must follow in_valid by seven clocks.
//
// The operating points, tolerances and the floating-point reference model
// are this testbench's own; nothing in it is taken from the design under test.
module tb_min_select_chain;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [19:0] g_in [8];
  logic [19:0] g_min;
  logic [2:0]  s_opt;
  int checks = 0, failures = 0;
  int exp_s [$];
  int exp_g [$];
  bit exp_v [$];

  min_select_chain #(.N(8), .W(20)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .g_in(g_in), .out_valid(out_valid), .g_min(g_min), .s_opt(s_opt));

  always #5 clk = ~clk;

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ties;
    ties = 0;
    for (int k = 0; k < 8; k++) g_in[k] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      int best, bi;
      @(negedge clk);
      if (exp_s.size() == 7) begin
        int es, eg; bit ev;
        es = exp_s.pop_front(); eg = exp_g.pop_front(); ev = exp_v.pop_front();
        checks++;
        if (out_valid != ev || (ev && (int'(s_opt) != es || int'(g_min) != eg))) begin
          failures++;
          if (failures < 10) $display("cycle %0d: got v=%0d s=%0d g=%0d exp v=%0d s=%0d g=%0d",
                                      n, out_valid, s_opt, g_min, ev, es, eg);
        end
      end
      in_valid = ($urandom_range(0, 3) != 0);
      for (int k = 0; k < 8; k++)
        g_in[k] = (n % 3 == 0) ? 20'($urandom_range(0, 4)) : 20'($urandom_range(0, 1048575));
      if (n % 7 == 0) begin g_in[0] = 20'd1; g_in[7] = 20'd1; end
      best = int'(g_in[0]); bi = 0;
      for (int k = 1; k < 8; k++) if (int'(g_in[k]) < best) begin best = int'(g_in[k]); bi = k; end
      for (int k = 0; k < 8; k++) if (k != bi && int'(g_in[k]) == best) ties++;
      exp_s.push_back(bi); exp_g.push_back(best); exp_v.push_back(in_valid);
    end
    checks++;
    if (ties == 0) begin failures++; $display("no ties exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
