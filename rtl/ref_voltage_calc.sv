// Reference voltage vector of the simplified FCS-MPC, dq frame.
//
// Inverting the one-step RL prediction gives the inverter voltage that would
// bring the current exactly onto its reference in one sampling period:
//   v*_d(k) = (R - L/Ts) i_d(k) + (L/Ts) i*_d - w*L i_q(k)
//   v*_q(k) = (R - L/Ts) i_q(k) + (L/Ts) i*_q + w*L i_d(k)
// The reference of the previous instant, used by the reference-voltage
// change constraint, is formed from the previous measurement and the
// present reference without decoupling terms, component by component:
//   v*(k-1) = (L/Ts) i*(k) + (R - L/Ts) i(k-1)
// i*(k+1) is taken equal to i*(k). Coefficients are signed constants with
// KV_FRAC fraction bits (-190 ohm and 200 ohm at the defaults). The result is
// wider than an inverter voltage (REFV_W bits, VOLT_FRAC fraction bits)
// because a large current error asks for far more than Vdc. Purely
// combinational; products are truncated.
//
// The equations follow the specification; the coefficient formats and
// widths are choices of this design.
module ref_voltage_calc
  import mpc_pkg::*;
#(
  parameter logic signed [KV_W-1:0] KA = KA_Q,   // R - L/Ts
  parameter logic signed [KV_W-1:0] KB = KB_Q,   // L/Ts
  parameter logic signed [K3_W-1:0] K3 = K3_Q    // w* L
) (
  input  cur_vec_t  i_dq,        // i(k)
  input  cur_vec_t  i_dq_prev,   // i(k-1)
  input  cur_vec_t  i_ref,       // i*(k)
  output refv_vec_t v_ref,       // v*(k)
  output refv_vec_t v_ref_prev   // v*(k-1)
);
  localparam int unsigned MW  = KV_W + CUR_W;
  localparam int unsigned M3W = K3_W + CUR_W;
  localparam int unsigned SHV = KV_FRAC + CUR_FRAC - VOLT_FRAC;
  localparam int unsigned SH3 = K3_FRAC + CUR_FRAC - VOLT_FRAC;

  function automatic refv_t kv(logic signed [KV_W-1:0] k, cur_t i);
    logic signed [MW-1:0] p;
    p = MW'(k * i);
    return refv_t'(p >>> SHV);
  endfunction

  function automatic refv_t k3m(cur_t i);
    logic signed [M3W-1:0] p;
    p = M3W'(K3 * i);
    return refv_t'(p >>> SH3);
  endfunction

  always_comb begin
    v_ref.re      = kv(KA, i_dq.re) + kv(KB, i_ref.re) - k3m(i_dq.im);
    v_ref.im      = kv(KA, i_dq.im) + kv(KB, i_ref.im) + k3m(i_dq.re);
    v_ref_prev.re = kv(KB, i_ref.re) + kv(KA, i_dq_prev.re);
    v_ref_prev.im = kv(KB, i_ref.im) + kv(KA, i_dq_prev.im);
  end
endmodule
