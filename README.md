# Reconfigurable energy-quality scalable adaptive filter

An adaptive filter has to choose between cheap and good. Plain LMS costs two
multiply-adds per tap and no division, but it adapts slowly and is sensitive
to the input level. NLMS normalises the step by the input power and costs a
division. PU-NLMS spreads that cost over several samples. SM-NLMS updates only
when the error leaves a bound, so it does no work while the filter is already
good enough. Which of these is worth its energy depends on the noise level at
run time.

This design puts all four algorithms on one datapath. A 2-bit `sel` input
chooses the algorithm at any moment. The four algorithms share their common
parts: two multipliers, one adder, the error subtractor and one divider. The
blocks the chosen algorithm does not need are *data-gated*: their operands are
forced to zero and their registers hold, so they do not switch and burn no
dynamic power. The multipliers are 8x8 Wallace trees built from reversible
logic cells (Feynman, Toffoli and Peres gates).

The architecture follows the published reconfigurable adaptive-filter
datapath: 2 taps, 8-bit multipliers, a four-cycle controller, and the mode
encoding and per-step operations of its mode table. Where that description
gives no number or detail, this RTL makes its own choice. The section
"Choices made in this RTL" lists each one.

## Block diagram

```
            x_in ──┬───────────────────────────────────────────┐
                   │  core_logic                                │
   w0,w1,x0,x1,phi─┤  opA/opB 4:1 muxes (with zero input)       │
                   │   ├─ signed_rev_mult ─┐                    │
                   │   └─ signed_rev_mult ─┴─ + ─> y, alpha     │
                   │       (rev_wallace_mult inside)   w0,w1 += │
                   └────────────────────────────────────────────┘
   d_in ─> d_q ─> error_unit: e = d - y, mu*e (>> MU_SHIFT)
                         │
                         ├─> sm_nlms_cmp: |e| > gamma ? e -/+ gamma : 0
                         ▼
                   update_control: phi / (BETA + alpha)  (restoring_divider)
                         │
                         └─> phi back to the core for the weight update

   afilter_fsm: steps 1..4, decodes sel + step into core op, enables, gating
```

`reconfig_adaptive_filter` is the top. It holds the controller, the core, the
error unit, the SM-NLMS comparison and the update control. It also holds the
few registers between them: `d_q`, `e_q`, `phi_err_q` and `phi_norm_q`.

## The four-step schedule

Each sample takes four clock cycles, called steps. Step 1 is the cycle in which
the sample is accepted.

| step | LMS (`00`) | NLMS (`01`) | PU-NLMS (`10`) | SM-NLMS (`11`) |
|------|-----------|-------------|----------------|----------------|
| 1 `ST_OUT`  | y = w0·x(k) + w1·x(k-1) | same | same | same |
| 2 `ST_ERR`  | e = d − y, φ = μe | e, φ = μe, α = x0² + x1² | e, φ = μe, α only on update samples | e, φ = e ∓ γ or 0, α only if \|e\| > γ |
| 3 `ST_NORM` | w0 += φ·x0 | φ ← φ / (β + α) | φ ← φ / (β + α) on update samples | φ ← φ / (β + α) if \|e\| > γ |
| 4 `ST_UPD`  | w1 += φ·x1 | w0 += φ·x0, w1 += φ·x1 | both weights, on update samples | both weights, if \|e\| > γ |

- **LMS** never uses the divider or the SM-NLMS comparison. It uses one
  multiplier in each of steps 3 and 4.
- **PU-NLMS** counts its samples. Only every M-th sample (M = `step_m`)
  recomputes α and updates the weights. On the other samples, steps 2 to 4
  leave the multipliers and the divider idle. The weights stay constant in
  between, which is where this mode saves energy.
- **SM-NLMS** needs no division for its variable step size. With
  μ(k) = 1 − γ/|e(k)| when |e(k)| > γ and 0 otherwise, the product μ(k)·e(k)
  equals e − γ, e + γ or 0. One adder, one comparator and a multiplexer produce
  it. Inside the bound nothing after step 2 switches.

The controller decodes `sel` directly, every step. A mode change therefore
needs no reset or restart and takes effect from the next step. If `sel` changes
in the middle of a sample, that sample finishes with a mixture of the two
modes' steps (for example, only w1 is updated). That mixture is harmless, but it
is not any one of the four algorithms.

## Number format

All signals are two's-complement fixed point with N = 8 bits and K = 6
fraction bits, so their range is [−2, 2) in steps of 1/64.

- `gamma` is unsigned in the same scale.
- `step_m` is a plain integer. 0 acts as 1.
- A product is rescaled by an arithmetic right shift of K, which rounds toward
  minus infinity.
- The step size is μ = 2^−`MU_SHIFT` = 1/4, applied as an arithmetic shift.
- The filter output y, the error e, the weights and the normalised factor
  saturate to 8 bits.
- α = x0² + x1² is never negative and is kept in 11 bits without saturation.
  The regulariser β = `BETA`/64 = 0.125 keeps the divisor away from zero.
- The division is |φ|·2^K / (β + α). The quotient rounds toward zero and
  saturates to 127, and then φ's sign is put back.

## The reversible Wallace tree multiplier

`rev_wallace_mult` is an unsigned W x W multiplier, with W = 8 by default. It
is made only of reversible cells:

- `rev_feynman_gate`: (A, B) → (A, A⊕B). With B = 0 it makes a copy (fan-out).
- `rev_toffoli_gate`: (A, B, C) → (A, B, AB⊕C). With C = 0 it is an AND.
- `rev_peres_gate`: (A, B, C) → (A, A⊕B, AB⊕C). With C = 0 it is a half
  adder (`rev_half_adder`).
- `rev_full_adder`: P = A, Q = A⊕B, R = A⊕B⊕C (sum) and S = (A⊕B)C ⊕ AB
  (carry). It is built from one Feynman and two Peres gates. P and Q are
  garbage outputs.

The multiplier is built in three layers:

1. **Partial products** (`rev_pp_gen`). An 8x8 grid of Toffoli gates forms the
   64 products a[j]·b[i]. Each gate passes its operand bits on through its P and
   Q outputs to the next gate in its column and row. A row and a column of
   Feynman gates make the first copies.
2. **Reduction.** In each stage, every column's bits are taken in groups of
   three by full adders. A leftover pair goes to a half adder and a single
   leftover bit passes on. Sums stay in their column and carries move up one
   column. For 8 bits the column heights go 8 → 6 → 4 → 3 → 2, which is four
   stages. The wiring is computed at elaboration by constant functions from the
   column heights, so other even widths of 4 or more also work (the testbench
   checks a 6x6 instance as well).
3. **Final adder.** A chain of four-bit reversible ripple-carry blocks
   (`rev_rca4`) adds the two rows that remain.

The filter's operands are signed. `signed_rev_mult` takes the magnitudes,
multiplies them in the unsigned tree and negates the product when the signs
differ.

On FPGAs and ASICs the reversible cells synthesise to ordinary XOR/AND logic.
The garbage outputs are left unconnected and disappear in synthesis. The
reversible structure is kept at the RTL level so that the gate-level
organisation stays visible.

## Interface and timing (`reconfig_adaptive_filter`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears weights, delay line, controller) |
| `sel` | in | 2 | 00 LMS, 01 NLMS, 10 PU-NLMS, 11 SM-NLMS |
| `gamma` | in | N | SM-NLMS error bound |
| `step_m` | in | STEP_W | PU-NLMS update period M |
| `in_valid` / `in_ready` | in / out | 1 | sample handshake; `in_ready` is high only in step 1 |
| `x_in`, `d_in` | in | N | reference input x(k) and desired signal d(k) |
| `out_valid` | out | 1 | high for one cycle (step 3) while `y_out` / `e_out` hold this sample's values |
| `y_out`, `e_out` | out | N | filter output and error |
| `w0`, `w1` | out | N | current weights |

A sample is taken in the cycle where `in_valid && in_ready`. In that same cycle
the core computes y(k) from the incoming x(k) and the stored x(k−1). It also
shifts x(k) into the delay line. `out_valid` is high two cycles later. The
weights have their new values four cycles after acceptance. With `in_valid`
held high, the filter takes exactly one sample every four cycles.

Parameters of the top are `N` (8), `K` (6), `MU_SHIFT` (2), `BETA` (8) and
`STEP_W` (4). Only N = 8 comes from the published design. The others are
choices of this RTL.

## Data gating

A block that the current mode and step do not need is given zero operands:

- The multipliers' 4:1 operand multiplexers have a zero input.
- The error unit, the SM-NLMS comparison and the divider have AND-style gates
  on their inputs.
- The registers of the gated block are not enabled.

So the core is idle in step 2 of LMS. It is also idle in steps 2 and 4 of
PU-NLMS skip samples and of SM-NLMS samples inside the bound. The divider is
idle in LMS and outside step 3. The SM-NLMS comparison is idle outside
SM-NLMS. The end-to-end testbench checks these zero operands every cycle.

## Choices made in this RTL

The published description leaves the following points open, or unclear. This
is how the RTL settles each one:

- **Fraction bits, step size, regulariser.** K = 6, μ = 1/4 as a shift, and
  β = 0.125. The published design gives none of these values.
- **PU-NLMS.** Its description says both that α is recomputed only when the
  sample counter reaches M, and that M sets when the coefficients are updated.
  This RTL does both on every M-th sample and keeps α and the weights in
  between.
- **LMS schedule.** The mode table puts the w0 update in step 3 and the w1
  update in step 4. This RTL follows that. The normalised modes update both
  weights in step 4.
- **SM-NLMS comparison.** The strict test |e| > γ is used. A ≥ test would give
  the same weights, because the update factor is zero at |e| = γ.
- **Signed arithmetic.** Sign-magnitude around the unsigned trees, with
  rounding and saturation as described under "Number format".
- **Divider.** A single-cycle array restoring divider, so that the division
  fits in one step. A zero divisor returns an all-ones quotient; it cannot
  happen in the filter, because β > 0.
- **Handshake and reset.** The valid/ready input handshake and the reset
  behaviour are choices of this RTL.
- **Taps.** The filter has 2 taps, fixed by the structure of the two
  multipliers.
- **Reduction tree layout.** The reduction tree follows the Wallace rule. It
  does not reproduce any particular published bit placement; only the number of
  stages and the cell types match.

The conventional array multiplier and the 4:2-compressor Wallace tree, which
serve only as comparison points for the reversible multiplier, are not part of
this RTL.

## Verification

Every block has a self-checking testbench in `tb/`; the small helpers
(`signed_rev_mult`, `rev_rca4`) are covered by the multiplier test. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_rev_gates` | Feynman, Toffoli, Peres gates and the half adder, all inputs |
| `tb_rev_full_adder` | the full adder's P, Q, R, S truth table and sum/carry |
| `tb_rev_pp_gen` | all 64 partial products and their weighted sum |
| `tb_rev_wallace_mult` | all 65536 8x8 products, all 65536 signed products, all 6x6 products |
| `tb_restoring_divider` | exhaustive 8/5-bit, random 14/11-bit, zero divisor |
| `tb_error_unit` | all d, y pairs, saturation, gating |
| `tb_sm_nlms_cmp` | every error against every bound, gating |
| `tb_update_control` | every φ against a spread of α, LMS pass-through, gating |
| `tb_core_logic` | random operation sequences against an integer model, weight saturation |
| `tb_afilter_fsm` | the decode table every cycle, PU-NLMS period, stalls, SM hits |
| `tb_reconfig_adaptive_filter` | the whole filter at default parameters (see below) |
| `tb_energy_quality` | the four modes on one task: operand toggles against MSE |

The end-to-end test identifies an unknown 2-tap system h = (0.75, −0.41). The
input is a noisy ±0.63 symbol stream with measurement noise on d. An integer
reference model of all four algorithms predicts y, e and both weights exactly,
sample by sample. The test runs these phases, each from reset:

- LMS, NLMS, PU-NLMS (M = 3) and SM-NLMS (γ = 4/64). Each must bring both
  weights within 10 LSB of h. They all end 2 to 5 LSB away.
- A random mode on every sample.
- A phase that changes `sel` in the middle of samples.

It also checks the following:

- the 4-cycle sample rate and the 2-cycle `out_valid` latency;
- that stalls happen;
- the data gating;
- that every mode, mode switch, PU-NLMS skip and update, and SM-NLMS skip and
  update occurs at least once.

`tb_energy_quality` runs the same identification task in each mode, with
noise of ±4 LSB on d. It counts bit toggles on the multiplier and divider
operand buses, as a proxy for dynamic power, and measures the steady-state
error. One run gave these figures:

| mode | multiplier toggles | divider toggles | MSE (LSB²) |
|------|-------------------|-----------------|-----------|
| LMS | 21232 | 0 | 17.5 |
| NLMS | 22135 | 3610 | 16.5 |
| PU-NLMS, M = 4 | 15234 | 822 | 15.0 |
| SM-NLMS, γ = 6 LSB | 13764 | 76 | 8.7 |

The test checks the ordering: LMS never toggles the divider, and PU-NLMS and
SM-NLMS toggle the multipliers and the divider less than NLMS. All four modes
converge. Choosing the mode from a measured SNR or battery level is left to
the system around the filter, through `sel`.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/afilter_pkg.sv \
    tb/tb_reconfig_adaptive_filter.sv --top-module tb_reconfig_adaptive_filter
./obj_dir/Vtb_reconfig_adaptive_filter
```

Every testbench runs in well under a second. Use the same command with another
`tb_*` file to run the other testbenches. For lint only, use
`verilator --lint-only -Wall -Irtl rtl/afilter_pkg.sv rtl/<module>.sv`.

The remaining lint warnings are unused signals: the garbage outputs of the
reversible gates, the remainder of the divider, and the always-zero top carry
of the multiplier tree.
