// Testbench for switching_output: random optimum states every clock and
// random sampling pulses; the gate signals must change only on a pulse, to
// the state offered at that pulse, with G2/G4/G6 the complements of
// G1/G3/G5 and the index equal to {Sa,Sb,Sc}.
//
// The operating points, tolerances and the floating-point reference model
// are this testbench's own; nothing in it is taken from the design under test.
module tb_switching_output;
  import mpc_pkg::*;
  logic clk = 0, rst_n = 0, sample_en = 0;
  sw_state_t s_opt;
  logic [31:0] g_in, g_out;
  gates_t gates;
  logic [2:0] index;
  int checks = 0, failures = 0;

  switching_output #(.GW(32)) dut (.clk(clk), .rst_n(rst_n), .sample_en(sample_en), .s_opt(s_opt),
    .g_min_in(g_in), .gates(gates), .index(index), .g_min(g_out));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sw_state_t   model;
    logic [31:0] gmodel;
    model = '0; gmodel = '0;
    s_opt = '0; g_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (index != 3'(model) || g_out != gmodel ||
          gates != {model.sa, ~model.sa, model.sb, ~model.sb, model.sc, ~model.sc}) begin
        failures++;
        if (failures < 10) $display("n=%0d index %0d gates %b exp %0d", n, index, gates, model);
      end
      s_opt     = sw_state_t'($urandom_range(0, 7));
      g_in      = $urandom;
      sample_en = ($urandom_range(0, 9) == 0);
      if (sample_en) begin model = s_opt; gmodel = g_in; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
