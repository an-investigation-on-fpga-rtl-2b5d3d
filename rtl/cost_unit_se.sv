// Cost of one inverter voltage vector in the simplified FCS-MPC, dq frame.
//
// Primary term, squared distance to the reference voltage vector:
//   g_SP = (v*_d - v_d)^2 + (v*_q - v_q)^2
// and, selected by mode, one of two constraints:
//   CON_NONE : g = l_SP * g_SP
//   CON_SSW  : g = l_SP * g_SP + l_SSW * p           p = legs that commute
//   CON_SE   : g = l_SP * g_SP + l_SE * (|e_d| + |e_q|),  e = v*(k-1) - v
// The last one is the reference-voltage-change constraint: it favours the
// vector closest to the previous reference as well, which keeps the error
// profile steady over a few periods and so lowers both switching frequency
// and steady-state error.
//
// Units: g_SP is in V^2 with SCOST_FRAC fraction bits, the weights have
// LAMS_FRAC fraction bits, and each weighted term is brought back to
// SCOST_FRAC fraction bits, so l_SSW is in V^2 per commutation and l_SE in V.
// Every term and the sum saturate at the top of SCOST_W bits.
//
// Timing: two register stages; the cost follows its inputs by two clocks.
//
// The three cost forms follow the specification; the weight and cost
// formats, their units and the pipelining are choices of this design.
module cost_unit_se
  import mpc_pkg::*;
(
  input  logic        clk,
  input  refv_vec_t   v_ref,
  input  refv_vec_t   v_ref_prev,
  input  volt_vec_t   v,
  input  constraint_e mode,
  input  lams_t       lam_sp,
  input  lams_t       lam_ssw,
  input  lams_t       lam_se,
  input  sw_state_t   s_cand,
  input  sw_state_t   s_prev,
  output scost_t      cost
);
  localparam int unsigned DW  = REFV_W + 1;            // voltage difference
  localparam int unsigned QW  = 2 * DW + 1;            // sum of squares
  localparam int unsigned SHQ = 2 * VOLT_FRAC - SCOST_FRAC;
  localparam int unsigned SHE = VOLT_FRAC + LAMS_FRAC - SCOST_FRAC;
  localparam int unsigned SHP = LAMS_FRAC - SCOST_FRAC;
  localparam int unsigned PW  = LAMS_W + SCOST_W;

  function automatic logic [DW-1:0] absdiff(refv_t a, volt_t b);
    logic signed [DW-1:0] d;
    d = DW'(a) - DW'(b);
    return d[DW-1] ? DW'(-d) : DW'(d);
  endfunction

  function automatic scost_t sat(logic [PW-1:0] x);
    return (|x[PW-1:SCOST_W]) ? '1 : x[SCOST_W-1:0];
  endfunction

  // stage 1: primary term and raw constraint terms
  logic [DW-1:0] ad, aq, ed, eq;
  logic [QW-1:0] sq;
  scost_t        gsp_q, eabs_q;
  logic [1:0]    p_q;
  constraint_e   mode_q;
  lams_t         lsp_q, lssw_q, lse_q;

  always_comb begin
    ad = absdiff(v_ref.re, v.re);
    aq = absdiff(v_ref.im, v.im);
    ed = absdiff(v_ref_prev.re, v.re);
    eq = absdiff(v_ref_prev.im, v.im);
    sq = QW'(ad * ad) + QW'(aq * aq);
  end

  always_ff @(posedge clk) begin
    gsp_q  <= sat(PW'(sq >> SHQ));
    eabs_q <= sat(PW'(ed) + PW'(eq));
    p_q    <= commutations(s_cand, s_prev);
    mode_q <= mode;
    lsp_q  <= lam_sp;
    lssw_q <= lam_ssw;
    lse_q  <= lam_se;
  end

  // stage 2: weighting and sum
  scost_t               t_sp, t_con;
  logic [SCOST_W:0]     total;

  always_comb begin
    t_sp = sat(PW'(lsp_q * gsp_q) >> LAMS_FRAC);
    unique case (mode_q)
      CON_SSW: t_con = sat(PW'(lssw_q * p_q) >> SHP);
      CON_SE:  t_con = sat(PW'(lse_q * eabs_q) >> SHE);
      default: t_con = '0;
    endcase
    total = (SCOST_W+1)'(t_sp) + (SCOST_W+1)'(t_con);
  end

  always_ff @(posedge clk) begin
    cost <= total[SCOST_W] ? '1 : total[SCOST_W-1:0];
  end
endmodule
