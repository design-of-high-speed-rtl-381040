# HS-TF-RDFxLMS: a hardware-shared, transposed, delayed FxLMS filter

Feed-forward active noise control (for example in noise-cancelling headphones)
picks up a reference noise `x(n)`, filters it with an adaptive FIR filter `W(z)` and
plays the result `y(n)` through a loudspeaker, so that it cancels the noise `d(n)`
arriving at an error microphone. The weights are adapted by the filtered-x LMS
(FxLMS) algorithm. The gradient uses the reference filtered by a model `S'(z)`
of the loudspeaker-to-microphone ("secondary") path, `x'(n)`.

This RTL implements the FxLMS filter as a retimed, transposed, hardware-shared
structure, following the published HS-TF-RDFxLMS architecture
("Design of high-speed Delay-FXLMS hardware architecture based on FPGA", 2022).
The structure rests on three ideas:

* **Delayed LMS with only two adaptive delays.** The desired signal and the error
  each pass a two-sample delay (`2D`). That is enough pipelining to keep every
  register-to-register path down to one multiplier or one adder. A plain
  direct-form FxLMS has a multiplier followed by an adder tree on its critical path.
* **Transposed rows.** The adaptive filter and the secondary-path model are both
  transposed FIR filters. Each tap has its own multiplier → register → adder →
  register. There is no adder tree, and the filter grows by adding taps without
  lengthening the critical path.
* **Two-way hardware sharing.** The N taps are split into two groups of N/2.
  One set of N/2 processing modules (PMs) computes group 0 ("4Tap0", taps
  0..N/2-1) on even clock cycles and group 1 ("4Tap1", taps N/2..N-1) on odd
  cycles. The design therefore takes one sample every two cycles and uses half
  the multipliers and adders of the unshared filter.

The default configuration is the one the architecture is presented in: N = 8
taps on four PMs.

## What is computed

Samples are indexed by `n`. The reset state is all zeros. Every product register
of a tap holds the coefficient the tap had when that product was formed. This is
the usual behaviour of a transposed adaptive filter: tap k uses a weight that is
k samples older than tap 0's.

```
adaptive filter      y(n)  = sat16( sum_k  w_k · x(n-1-k) )            (Q1.23 × Q1.15 → >>>23)
secondary-path model x'(n) = sat16( sum_k  s'_k · x(n-1-k) )           (Q1.15 × Q1.15 → >>>15)
error                e(n)  = sat16( d(n-2) - y(n) )
weight update        w_k  ← sat24( w_k + ((e(n-2) · x'(n-2-k)) >>> (7 + STEP_SHIFT)) )
```

* `2^-STEP_SHIFT` is the step `2μ`. The default `STEP_SHIFT = 7` gives
  2μ ≈ 7.8·10⁻³, close to the μ = 4·10⁻³ used for the transposed filter.
  The step is a power of two, so it costs a shift and no multiplier.
* The delays line up: `e(n-2)` is driven by the inputs `x(n-3-k)` through tap k.
  The filtered reference paired with that error in the update of tap k is
  `x'(n-2-k) = sum_j s'_j x(n-3-k-j)`, which is exactly the right one.
* The error is formed on chip from `d` and `y`. No secondary path is applied to
  `y` first: `d_in` is taken to be the noise to be cancelled, already aligned
  with the filter's output.

`tb/tb_hs_tf_rdfxlms.sv` contains an unfolded, sample-level model of these
equations (function `m_step`). It is the most precise statement of the
arithmetic: the RTL matches it bit for bit.

## How the sharing works (the subtle part)

Each PM (`hs_pm`) holds two logical taps: tap j in slot 0 and tap j+N/2 in
slot 1. It contains three rows, and each row has one multiplier and one adder
that the two slots share:

| row | module | per slot, on its cycle |
|---|---|---|
| adaptive filter | `tf_tap` (coef = w) | `p ← w·x`, `a ← a_above + p` |
| coefficient update | `coef_update` | `u ← e(n-2)·x'_k`, `w ← w + u>>>SHIFT` |
| secondary-path model | `tf_tap` (coef = s') | `q ← s'·x`, `b ← b_above + q` |

Each register is written only on its own slot's cycle. The transposed chains run
from tap N-1 down to tap 0:

```
          group 1 (odd cycles)                      group 0 (even cycles)
 0 → [tap N-1] → ... → [tap N/2]  ──wrap──→  [tap N/2-1] → ... → [tap 0] → y, x'
      PM N/2-1           PM 0                  PM N/2-1          PM 0
```

At the wrap, the top of group 0 (PM N/2-1, slot 0) reads the slot-1 partial sum
of PM 0.

**Order.** In the unshared filter every tap moves at once, each reading its
upper neighbour's old value. With sharing, that stays true only if group 0 runs
before group 1 in each sample. Group 0 can then read tap N/2 before group 1
overwrites it. Inside a group all PMs update on the same edge, so they read each
other's old values. Under this order the shared filter equals the unshared one
exactly. The testbench checks this against the unshared model.

**Filtered-reference delay line.** Tap k needs `x'` delayed by k samples. The
`coef_update` slice of each PM holds the two stages of a shift register: stage j
and stage j+N/2. All stages move together once per sample, at the end of the
sample period. This works regardless of which slot is active, and both slots read
a stable value.

**Per-sample registers.** Some registers change once per sample, on the `tick`
cycle (slot 1): the `2D` delays on `d` and `e` in `err_calc`, the `x'` line, the
held previous input, and the output registers. `y(n)` comes from tap 0's partial
sum, which was written on the slot-0 cycle, so it is already current at `tick`.

## Interface and timing (`hs_tf_rdfxlms`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset |
| `in_valid` / `in_ready` | in / out | 1 | a sample `(x_in, d_in)` is taken when both are high |
| `x_in`, `d_in` | in | 16 | reference and desired samples, Q1.15 |
| `out_valid` | out | 1 | `y_out`, `e_out` hold a new sample's results |
| `y_out` | out | 16 | filter output (to the loudspeaker), Q1.15 |
| `e_out` | out | 16 | error e(n) = d(n-2) − y(n), Q1.15 |
| `sp_est` | in | 1 | secondary-path estimation mode (see below) |
| `sp_commit` | in | 1 | pulse: copy the weights into s' and clear the weights |
| `s_we`, `s_addr`, `s_data` | in | 1, log2N, 16 | write one s' coefficient (Q1.15) |
| `rd_addr` → `w_rdata`, `s_rdata` | in → out | log2N → 24, 16 | read one weight (Q1.23) and one s' |

* **Throughput:** one sample every 2 cycles. `in_ready` is high when idle and on
  the second cycle of a sample. Holding `in_valid` high therefore streams samples
  back to back, and gaps simply idle the datapath.
* **Latency:** `out_valid` rises 3 cycles after the edge that takes a sample.
  Because of the retiming, `y(n)` depends on `x(n-1)` and older.
* **Critical path:** one multiplier (weight register → product register). The
  adder paths (partial sums, weight accumulation, error) each hold one adder
  and, where the value saturates, its clamp.
* `s_we` and `sp_commit` must be used between samples (while the datapath is
  idle); assertions in the top check this.

Controller: `hs_ctrl` (idle → group 0 → group 1). Error path: `err_calc`.
Types and helpers: `fxlms_pkg`.

## Secondary-path estimation

`S'(z)` has to be measured before FxLMS can run, and the same hardware can do
this. With `sp_est = 1`, the `x'` line is fed with the reference `x` itself,
delayed to match a unit model, in place of the `S'(z)` output. The filter then
runs plain delayed LMS, and its weights converge to the path from `x` to `d`
(tap k+1 ↔ path coefficient k, because of the one-sample filter latency).

A one-cycle `sp_commit` pulse, sent with no sample in flight, copies the top 16
bits of each weight into s' and clears the weights. After that, set
`sp_est = 0` for FxLMS operation. Alternatively, s' can be loaded directly
through `s_we`.

## Number formats and parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 8 | filter length; even, ≥ 4; N/2 PMs are built |
| `DW` | 16 | sample width (Q1.15) |
| `CW` | 16 | s' width (Q1.15) |
| `WW` | 24 | weight width (Q1.23) |
| `STEP_SHIFT` | 7 | 2μ = 2^-STEP_SHIFT |

* Partial sums carry log2(N) guard bits and wrap.
* `y`, `x'`, `e` and the weights saturate. The arithmetic shifts round toward
  minus infinity.

## Where this RTL departs from, or fills in, the published architecture

Taken from the architecture:

* 8 taps, and the grouping 4Tap0 (even cycles) / 4Tap1 (odd cycles).
* Transposed adaptive-filter and secondary-path rows, each tap being
  multiplier → D → adder → D.
* `2D` on `d` and on `e`, a power-of-two step applied as a shift, and locally
  updated weights in each PM.

Chosen here, because the architecture does not specify them:

* All word widths, saturation, reset, and the valid/ready handshake.
* The group order within a sample.
* The controls of the estimation mode. The published PM has switches labelled
  "Secondary Path Estimate", "End PE" and "LMS" and an OR gate; only their
  purpose is reproduced, not their wiring.

Departures:

* **Per-tap update multiplier.** The published block diagram forms one `e·x'`
  product and broadcasts it. The LMS update needs a different `x'` delay for
  every tap, so here `e(n-2)` is broadcast instead, and each tap multiplies it by
  its own stage of an `x'` delay line. This needs N/2 update multipliers
  (shared), no extra one, and an N-stage delay line.
* **Error.** The error is `d(n-2) − y(n)`, following the block diagram. The
  algebra of the architecture writes it as `d(n-2) − wᵀx'(n-2)`. The two are
  equal only when the secondary path is a unit delay. The estimation mode and
  the FxLMS test use that case.
* **Resources.** 12 multipliers for N = 8: 3 per PM × 4 PMs. The published
  count is 1.5N+1 = 13. There are also more registers than the published
  1.5N + 1.5·log2N + 5: every tap keeps its own product, partial-sum, weight,
  s' and x' registers.
* **Not reproduced.** The published FPGA results (Artix-7, about 140 MHz) were
  not reproduced.
* **Not included.** The other filter structures the architecture was compared
  with (direct-form FxLMS, DFxLMS, retimed DFxLMS, systolic FxLMS, and the
  unshared TF-RDFxLMS) are not part of this RTL. The unshared filter is,
  however, what the testbench's reference model computes.

## Verification

Each module in `rtl/` has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`:

| testbench | what it checks |
|---|---|
| `tb_tf_tap` | shared transposed tap against a register model, random enables, slots and full-scale data |
| `tb_coef_update` | weight update, shift, saturation, clear and the x' stages |
| `tb_hs_pm` | a whole PM: all three rows, s' writes, commit |
| `tb_err_calc` | `e(n) = sat(d(n-2) - y(n))` and the delayed errors, both saturation limits |
| `tb_hs_ctrl` | group-0 / group-1 schedule, handshake, two-cycle streaming |
| `tb_hs_tf_rdfxlms` | the whole filter at its default size (see below) |

`tb_hs_tf_rdfxlms` runs the top at its default parameters in three phases:

1. 3000 random full-scale samples with random s' and random input gaps. Every
   output is compared bit for bit with the unshared reference model. The phase
   saturates the error, the output and the weights.
2. Estimation of a known 4-tap path `[0.5, −0.3, 0.2, 0.1]` over 12000 samples.
   The weights must land within 0.02 of it; the result is then committed to s'.
3. FxLMS cancellation of a sinusoid plus white noise at 15 dB SNR through a
   3-tap primary path. The error power must fall by at least 10 dB over 6000
   samples; it falls by about 16.5 dB. It is 10 dB down after about 1200
   samples, in line with the roughly 1000 iterations reported for this
   architecture.

The testbench also checks the 2-cycle sample spacing and the 3-cycle latency. It
counts that every mechanism happened: idle gaps, back-to-back samples,
slot-1 cycles, each saturation, estimation, commit and s' writes.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_hs_tf_rdfxlms \
    rtl/fxlms_pkg.sv rtl/tf_tap.sv rtl/coef_update.sv rtl/hs_pm.sv \
    rtl/err_calc.sv rtl/hs_ctrl.sv rtl/hs_tf_rdfxlms.sv tb/tb_hs_tf_rdfxlms.sv
./obj_dir/Vtb_hs_tf_rdfxlms
```

The unit testbenches need only the package, their module and, for `tb_hs_pm`,
`tf_tap.sv` and `coef_update.sv`. Each run takes well under a second.
