// Minimum-cost search and optimum switching state selection.
//
// A chain of N-1 compare-and-multiplex stages (C&M0 .. C&M6 for N = 8).
// Stage 0 compares the costs of states 0 and 1; stage j compares the running
// minimum with the cost of state j+1. Each comparator output (sel_j) drives
// two 2:1 multiplexers: one passes the smaller cost on (g_m0 .. g_m6), the
// other passes on the matching state number (M0 .. M6). The last stage holds
// g_min and S_opt. Every stage is registered, so a new set of N costs can
// enter each clock and the result appears N-1 clocks later (7 for N = 8).
//
// On equal costs the earlier state is kept (sel_j is a strict less-than),
// so of the two zero vectors, states 000 and 111, state 000 is chosen and
// index 7 never appears at the output.
//
// The chain of seven compare-and-multiplex stages with select lines shared
// by the cost and state multiplexers follows the specification; the
// register after every stage and the tie rule are choices of this design.
module min_select_chain #(
  parameter int unsigned N  = 8,
  parameter int unsigned W  = 20,
  parameter int unsigned SW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [W-1:0]  g_in [N],
  output logic          out_valid,
  output logic [W-1:0]  g_min,
  output logic [SW-1:0] s_opt
);
  localparam int unsigned NS = N - 1;   // number of C&M stages

  logic [W-1:0]  g_pipe [NS][N];        // costs still to be compared
  logic [W-1:0]  g_m    [NS];           // running minimum after stage j
  logic [SW-1:0] s_m    [NS];           // its state number
  logic [NS-1:0] v_pipe;
  logic [NS-1:0] sel;

  // comparators: sel_j = 1 when the next state's cost is strictly smaller
  always_comb begin
    sel[0] = g_in[1] < g_in[0];
    for (int j = 1; j < NS; j++) sel[j] = g_pipe[j-1][j+1] < g_m[j-1];
  end

  always_ff @(posedge clk) begin
    g_pipe[0] <= g_in;
    g_m[0]    <= sel[0] ? g_in[1] : g_in[0];
    s_m[0]    <= sel[0] ? SW'(1) : SW'(0);
    for (int j = 1; j < NS; j++) begin
      g_pipe[j] <= g_pipe[j-1];
      g_m[j]    <= sel[j] ? g_pipe[j-1][j+1] : g_m[j-1];
      s_m[j]    <= sel[j] ? SW'(j + 1) : s_m[j-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_pipe <= '0;
    else        v_pipe <= {v_pipe[NS-2:0], in_valid};
  end

  assign out_valid = v_pipe[NS-1];
  assign g_min     = g_m[NS-1];
  assign s_opt     = s_m[NS-1];

  initial assert (N >= 3) else $error("min_select_chain: N must be at least 3");
endmodule
