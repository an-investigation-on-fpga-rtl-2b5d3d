# FCS-MPC current controller for a two-level three-phase inverter

This is a synthesizable SystemVerilog current controller for a two-level
three-phase voltage source inverter (VSI) driving an RL load. It uses
**finite-control-set model predictive control** (FCS-MPC). The inverter has
only eight switching states, so the controller does not use a modulator.
Once per sampling period it does three things:

1. It predicts, for each of the eight states, what the load current would
   be one period later.
2. It scores every prediction by its distance from the current reference.
3. It applies the state with the lowest score for the whole next period.

There is no PI loop and no PWM carrier. The gate signals come straight
from the chosen state.

The design contains three controllers that share the same front end and
back end:

| controller | frame | what is predicted | cost |
|---|---|---|---|
| `fcs_mpc_ab` | stationary αβ | load current, 8 predictions | \|i*α − iα(k+1)\| + \|i*β − iβ(k+1)\| (+ λ·commutations) |
| `fcs_mpc_dq` | rotating dq | load current with cross-coupling terms, 8 predictions | \|i*d − id(k+1)\| + \|i*q − iq(k+1)\| (+ λ·commutations) |
| `mfcs_mpc_dq` | rotating dq | one reference voltage v*, then the nearest inverter vector | λSP·\|v* − v\|² + optional constraint |

The third is a "simplified" controller. Instead of eight current
predictions, it inverts the load model once to find the voltage v* that
would bring the current onto its reference in one step. It then searches
for the inverter vector closest to v*. It can add one of two constraints:

- a **switching-state constraint**, λSSW × the number of inverter legs that
  would commute;
- a **reference-voltage-change constraint**, λSE × the distance to the
  previous period's reference voltage v*(k−1).

Both constraints lower the switching frequency. The second also keeps the
error pattern steady from period to period, which lowers the steady-state
error at small currents.

The default numbers are those of a laboratory prototype:

- Vdc = 145 V, R = 10 Ω, L = 10 mH;
- 50 Hz reference;
- 20 kHz sampling (Ts = 50 µs);
- 100 MHz FPGA clock.

## Block diagram

```
          ia, ib (A, Q6.10)   vdc (V, Q11.5)
               |                 |
   ic=-ia-ib   v                 |
        +-> clarke_transform     |        i_ref_dq ---> adaptive_k1 --> k1
        |      | i_alpha,beta    |           |               (k1 = 0.95 | 1 | adaptive)
        |      |                 |           v
        |      |            reference_generator: theta* += 2*pi*f*Ts per sample,
        |      |                 cordic_sincos -> sin/cos, inverse Park -> i*_alpha,beta
        |      v                 v
        |   +--------------------------------------------------------------+
        |   | fcs_mpc_ab  : vsi_vectors, 8 x cost_unit_ab, min_select_chain |
        |   | fcs_mpc_dq  : park_transform x9, 8 x cost_unit_dq, chain      |  all run
        |   | mfcs_mpc_dq : park x9, ref_voltage_calc, 8 x cost_unit_se,    |  every period
        |   |               chain                                          |
        |   +--------------------------------------------------------------+
        |                  | S_opt, g_min of the controller picked by ctrl_sel
sampling_clock             v
 (5000 clk) --sample_en--> switching_output: register at next sample_en,
                           G1/G3/G5 = Sa/Sb/Sc, G2/G4/G6 = complements,
                           index = 4*Sa + 2*Sb + Sc
```

## One sampling period

`sampling_clock` divides the 100 MHz clock by 5000. It gives a one-cycle
`sample_en` pulse. At that pulse:

- Each controller latches the measured current, the reference, Vdc, k1,
  the weights and the state now applied.
- `switching_output` loads the decision that was computed during the
  period just ended.
- `adaptive_k1` starts a new computation.
- The reference angle θ* advances by one step.

Each controller is a fixed-latency pipeline. `done` and the new decision
appear this many clocks after the pulse:

| unit | latency (clocks) | made of |
|---|---|---|
| `fcs_mpc_ab` | 10 | input register, 2 cost stages, 7 selection stages, output register |
| `fcs_mpc_dq` | 11 | as above + rotation stage |
| `mfcs_mpc_dq` | 12 | as above + reference-voltage stage |
| `adaptive_k1` | 44 | bit-serial square root (17) + restoring division (26) + rounding |
| `cordic_sincos` | 17 | 16 rotation stages + output rounding |

All of these finish in well under the 5000-clock period. The top checks
this with two assertions, one for the controllers and one for k1.

The decision taken from the sample at time k is applied at sample k+1.
This is a one-period delay, and nothing compensates for it. As a result,
current ripple is somewhat larger than an ideal FCS-MPC would give. In
closed-loop simulation at the default values, the rms αβ tracking error
is about 0.3–0.4 A at a 4 A reference.

## The eight voltage vectors

The switching state is {Sa, Sb, Sc}. Sx = 1 means the upper switch of leg x
is on. The **index number** is the state read as a binary number,
4·Sa + 2·Sb + Sc, so {1,0,0} is index 4. `vsi_vectors` computes the αβ
voltage of each state from the run-time Vdc:

    v_alpha = Vdc/3 · (2·Sa − Sb − Sc)
    v_beta  = Vdc/√3 · (Sb − Sc)

Vdc/3 and Vdc/√3 are each computed once with a 16-bit constant. Every
vector is then a small integer multiple of one of them.

## Current prediction (conventional controllers)

The load is L·di/dt = v − R·i. A forward-Euler step gives

    i(k+1) = k1 · i(k) + k2 · v(k),     k1 = 1 − R·Ts/L,  k2 = Ts/L

In the dq frame the rotation adds cross-coupling, with ω = 2π·50:

    id(k+1) = k1·id + k2·(vd + ωL·iq)
    iq(k+1) = k1·iq + k2·(vq − ωL·id)

Coefficient formats:

- k1 is signed 10 bits with 8 fraction bits. The nominal 0.95 becomes
  243/256 = 0.9492.
- k2 is signed 13 bits with 13 fraction bits. 0.005 becomes 41/8192.
- ωL is Q4.12.

Each `cost_unit_*` holds one candidate vector. It has two register stages:
the prediction, then the cost. The cost is the sum of the two absolute
errors plus λ·p, where p (0..3) is the number of legs that change relative
to the state now applied. The cost saturates at 20 bits.

**k1 modes.** The top input `k1_mode` selects one of three k1 values:

- **0.95**: the exact value for the nominal load.
- **1**: an approximation that drops the resistive term.
- **adaptive**: computed at run time. R is hard to know on a real load, so
  `adaptive_k1` estimates it from the load impedance seen at the inverter,
  Z = m·Vdc / (2√2·I_rms). It neglects the reactance and takes I_rms from
  the reference amplitude. This gives

      k1 = 1 − C / I_rms,     C = m·Vdc·Ts / (2√2·L) = 0.2564 A   (m = 1)

  The unit computes k1 = 1 − C·√2 / √(i*d² + i*q²) with a square root and a
  divider, rounds to the k1 format and clamps to [0, 1].

  Example: at a 4 A reference it gives 233/256 (0.909); at 2.5 A it gives
  219/256 (0.855). After reset it holds 0.95.

## Simplified controller (`mfcs_mpc_dq`)

`ref_voltage_calc` inverts the predictive model to get the voltage that
would put the current on its reference:

    v*d(k)   = (R − L/Ts)·id(k) + (L/Ts)·i*d − ωL·iq(k)
    v*q(k)   = (R − L/Ts)·iq(k) + (L/Ts)·i*q + ωL·id(k)
    v*(k−1)  = (R − L/Ts)·i(k−1) + (L/Ts)·i*        (no cross-coupling term)

At the default values, R − L/Ts = −190 Ω and L/Ts = 200 Ω (Q12.4). The
current i(k−1) is the dq current from the previous pulse. It is zero after
reset.

`cost_unit_se` scores one vector. The primary term is

    g_SP = |v* − v|²

It is computed in V² with 2 fraction bits, in a 32-bit saturating word.
The input `con_mode` then chooses what is added:

| `con_mode` | cost |
|---|---|
| `CON_NONE` | λSP·g_SP |
| `CON_SSW` | λSP·g_SP + λSSW·p |
| `CON_SE` | λSP·g_SP + λSE·(\|v*d(k−1) − vd\| + \|v*q(k−1) − vq\|) |

The weights are unsigned Q16.8. Their units follow from the cost:

- λSSW is in V² per commutation.
- λSE is in V (V² per V of distance).

The end-to-end test uses λSP = 1, λSSW = 4000 and λSE = 100. With those
weights both constraints clearly lower the switching rate at little cost
in tracking.

## Minimum search (`min_select_chain`)

The eight costs enter a chain of seven compare-and-multiplex stages:

- Stage 0 compares g0 with g1.
- Stage j compares the running minimum with g(j+1).
- Each comparator output drives two 2:1 multiplexers. One passes the
  smaller cost on; the other passes on its state number.

Every stage is registered, and the other costs travel alongside in a
delay line. A new set can therefore enter every clock, and the result
comes out 7 clocks later.

The comparison is a strict less-than, so ties keep the earlier state. Of
the two zero vectors, state 000 always wins over 111. Index 7 therefore
never appears unless a commutation weight makes 111 strictly cheaper.

## Reference generation

`reference_generator` keeps a 32-bit phase accumulator. The accumulator
advances by F_REF·2³²/FS at each sampling pulse; that is 10 737 418 for
50 Hz at 20 kHz. Its top 16 bits are θ*.

A pipelined 16-iteration CORDIC (`cordic_sincos`) gives sin θ* and cos θ*
in Q2.14. Before the iterations, it folds the angle into the right half
plane.

An inverse Park rotation of the dq reference then gives the αβ reference
used by the αβ controller. The dq controllers use the dq reference and
sin/cos directly.

## Top level (`fcs_mpc_top`)

Parameters:

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 100 000 000 | FPGA clock |
| `FS_HZ` | 20 000 | sampling frequency |
| `F_REF_HZ` | 50 | frequency of the current reference |
| `R_MOHM` | 10 000 | load resistance in mΩ (10 Ω) |
| `L_UH` | 10 000 | load inductance in µH (10 mH) |
| `VDC_NOM_V` | 145 | nominal dc link, used only for the adaptive-k1 constant |

The top derives every model constant from these parameters at elaboration
time, rounding each to its format:

- k1 = 1 − R·Ts/L (243 at the defaults);
- k2 = Ts/L (41);
- L/Ts (3200 in Q.4) and R − L/Ts (−3040);
- ωL (12868 in Q.12);
- C = Vdc·Ts/(2√2·L) (16799/2¹⁶ = 0.2563).

It passes them down to the controllers and to `adaptive_k1`. Changing
`FS_HZ` therefore gives a consistent controller for another sampling
time. The sub-blocks have the same numbers as their own parameter
defaults, taken from `mpc_pkg`.

Ports (types from `mpc_pkg`):

| port | dir | type | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | logic | clock, asynchronous active-low reset |
| `ia_meas`, `ib_meas` | in | `cur_t` | phase currents a and b in A, Q6.10 (ic = −ia − ib) |
| `vdc` | in | `volt_t` | dc-link voltage in V, Q11.5 |
| `i_ref_dq` | in | `cur_vec_t` | dq current reference (amplitude on d) |
| `ctrl_sel` | in | `ctrl_sel_e` | which controller drives the inverter: `CTRL_AB`, `CTRL_DQ`, `CTRL_SIMPLE` |
| `k1_mode` | in | `k1_mode_e` | `K1_FIXED` (0.95), `K1_APPROX` (1), `K1_ADAPTIVE` |
| `lambda` | in | 16 bits | commutation weight of the conventional controllers, cost LSB (1/1024 A) per commutation |
| `con_mode` | in | `constraint_e` | constraint of the simplified controller |
| `lam_sp`, `lam_ssw`, `lam_se` | in | `lams_t` | weights of the simplified controller, Q16.8 |
| `gates` | out | `gates_t` | G1..G6; G1/G3/G5 upper switches of legs a/b/c, G2/G4/G6 their complements |
| `sample_tick` | out | logic | sampling pulse |
| `index` | out | 3 bits | index number of the state being applied |
| `g_min` | out | `scost_t` | minimum cost of the selected controller (zero-extended for the conventional ones) |
| `theta`, `i_ref_ab`, `k1_used` | out | | reference angle, αβ reference, k1 in use |

All three controllers run on every sample. Each of them sees the state
actually applied as its "previous state". `ctrl_sel`, `k1_mode` and
`con_mode` can therefore be changed at any time, and the change takes
effect at the next sample.

The gate signals are strictly complementary and include **no dead time**.
The gate driver must insert it.

The ADC, level shifters, current sensors, isolators and power stage of a
real setup are outside this RTL. The top expects currents and Vdc that are
already scaled to the fixed-point formats above.

## Where this design departs from its source and what it chose itself

These points follow the source material:

- Eight-vector FCS-MPC in the αβ and dq frames.
- The forward-Euler prediction and the absolute-error cost.
- The k1/k2 word formats and the three k1 variants.
- The adaptive-k1 formula with C = 0.2564. The top recomputes C from
  its parameters and gets 0.2563 at the defaults.
- The simplified controller with its two constraints.
- The compare-and-multiplex selection chain.
- The sampling pulse that enables the output register.
- The index numbering and the upper/lower gate assignment.

These are choices of this implementation:

- All other word widths, and the fixed-point formats of the weights and of
  the squared-voltage cost.
- Truncating arithmetic inside the datapaths.
- The pipeline depths and latencies.
- The one-sample delay before the decision is applied.
- Reset values: state 000 applied, k1 = 0.95, i(k−1) = 0.
- The bit-serial square-root and divider in `adaptive_k1`, and the CORDIC
  itself. The source used a vendor sin/cos core.
- The absence of dead time.
- Running all three controllers side by side behind a selector. In the
  source they are separate alternative designs.

Things to be aware of:

- The model constants are fixed at elaboration. A load that differs from
  `R_MOHM`/`L_UH` is handled only through the adaptive k1. That estimate
  assumes the inductance is right and the dc link is near `VDC_NOM_V`.
- The λ weights of the simplified controller are in this design's units
  (V² and V). Weights quoted in other units must be rescaled.
- The current format covers ±32 A and the voltage format covers ±1024 V.
  The reference voltage of the simplified controller has 20 bits (±16 kV),
  so it does not overflow for currents within range.

## Verification

Every block has a self-checking testbench in `tb/`, named `tb_<module>`.
Each compares the block against values computed independently in floating
point or from the switching-state table. It ends by printing
`TB_RESULT checks=<n> failures=<m>`, and has a watchdog. Where the design
has a latency, the testbenches check it to the clock.

`tb_fcs_mpc_top` runs the top at its default parameters in closed loop.
It drives `vsi_rl_load`, a behavioural inverter with a 10 Ω / 10 mH load
that is integrated exactly every clock, at 145 V. It steps through these
phases, 10 ms each:

1. αβ control with k1 = 0.95, 1 and adaptive;
2. a 4 A → 2.5 A → 4 A reference step;
3. a commutation weight;
4. dq control;
5. the simplified controller without a constraint, then with each
   constraint.

It checks:

- the rms tracking error;
- the adaptive k1 values at both amplitudes;
- that every constraint lowers the switching rate;
- the 5000-clock sampling period;
- the absence of shoot-through;
- that every controller, k1 mode, constraint and index 0..6 was exercised.

It runs in about 15 s.

`tb_sampling_time` runs three complete closed loops side by side, with
`FS_HZ` = 50, 20 and 10 kHz (Ts = 20, 50 and 100 µs). Each loop uses the
αβ controller and the simplified controller at 2 A and 4 A, and is checked
against a tracking limit that grows with Ts. The harness for one loop is
`mpc_closed_loop`. Measured rms errors are about 0.15 A, 0.35 A and 0.65 A
respectively.

`tb_hil_case` runs the top at its default parameters against a
motor-type load. The setup is:

- Vdc = 650 V, with a 100 V, 50 Hz back-EMF in the plant;
- the αβ controller and then the dq controller;
- a 20 A reference that steps to 15 A with its phase inverted.

The controllers' model has no back-EMF term. Even so, the current follows
the step within one fundamental period. The rms error is about 1.6 A. That
is the 145 V ripple scaled by the higher dc link.

To simulate a block with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mpc_pkg.sv tb/tb_fcs_mpc_top.sv \
          --top-module tb_fcs_mpc_top -Mdir obj -o sim && obj/sim
```

Replace the testbench name to run any other block's test. Every RTL file
lints cleanly with `verilator --lint-only -Wall`. The only warnings are
unused package constants, and one SYNCASYNCNET in `fcs_mpc_top`. That one
comes from the `disable iff (!rst_n)` of its timing assertions and is
harmless.
