# Unified linear / RBF SVM classifier

This is a support vector machine (SVM) classifier for HOG feature vectors
from a sliding-window detector. It is one datapath that does both kinds of
classification:

* **linear**: `d(x) = X·Y + b`, where `X` is the weight vector and `Y` the
  window's 3,780-dimension HOG feature vector;
* **non-linear (RBF kernel)**:
  `d(x) = Σ_sv α·y·exp(-||X_sv − Y||² / 2σ²) + b`, summed over `svnum`
  support vectors.

The object is in the positive class when `d(x) ≥ 0`.

The idea that lets the two modes share hardware is a rewrite of the squared
distance:

    ||X − Y||² = X·X − 2X·Y + Y·Y = X·X + Y·(Y − 2X)

The support vectors are known ahead of time, so `X·X` is computed offline
and supplied with each vector. What is left per dimension is one adder
(`Y − 2X`) and one multiplier (`Y·(Y − 2X)`). The plain inner product `X·Y`
has the same shape, with the adder bypassed. So both modes run on one bank
of 112 multipliers, not the 336 multipliers and 224 adders that the direct
form would need at 112 dimensions per clock.

## Data flow

```
             in_x, in_y (112 x 25 bit per beat)
                    │
          ┌─────────▼──────────┐  stage 1: per lane B = Y−2X (RBF) or X (linear)
          │ uipc               │  stage 2: 112 products A·B, adder tree
          └─────────┬──────────┘
          ┌─────────▼──────────┐
          │ accum1  (ACCUM_1)  │  sums the 34 beats of one vector pair
          └───┬────────────┬───┘
     linear   │            │ RBF
              │  ┌─────────▼──────────┐  K1 + X·X, × gamma = 1/(2σ²)
              │  │ kernel_function    │  K2..K4 table-driven exp(−z)
              │  └─────────┬──────────┘
          ┌───▼────────────▼───┐
          │ accum2  (ACCUM_2)  │  ±α·K (RBF) or X·Y (linear), + b
          └─────────┬──────────┘
                 d_out, d_pos
```

`svm_ctrl` sequences a window. It counts 34 beats per vector (3,780 / 112,
rounded up) and `svnum` vectors, or a single vector in linear mode. It
flags the first and last beat and vector, and on the last beat it masks the
28 lanes beyond dimension 3,780.

## Timing

With a source that never stalls, and counting from the first beat to the
cycle in which `d_valid` rises:

| mode   | cycles                 | breakdown |
|--------|------------------------|-----------|
| linear | 36                     | 34 beats, 1 cycle for ACCUM_1, 1 for the bias addition |
| RBF    | 34·svnum + 6 (7,248 for 213) | 34 beats per vector, back to back; then ACCUM_1, 4 kernel stages, ACCUM_2 |

These are the counts the design targets, and the end-to-end testbench
checks them. Three choices make them come out exactly:

* **ACCUM_1 is the stage-2 register.** The second stage of the inner
  product calculator (multipliers plus adder tree) is combinational and is
  registered in ACCUM_1.
* **ACCUM_1 reloads on a vector's first beat**, so vectors follow each
  other with no clearing cycle. The kernel pipeline never stalls, so the
  kernel of vector *n* is computed while vector *n+1* streams in.
* **The bias costs no cycle of its own.** The first addend of a window is
  added to `b` instead of to ACCUM_2. In linear mode that one addition is
  "ACCUM_1 + b". In RBF mode the bias is folded into the first term.

Windows do not overlap. `start` is taken only once the previous result has
left ACCUM_2. At 609 windows per 640×480 frame, a frame takes 609 · 7,248 =
4,414,032 cycles in RBF mode, which is 34.4 frames/s at 152 MHz.

## The RBF kernel (`kernel_function`)

Four pipeline stages, one value accepted per cycle:

1. **K1.** `d2 = acc + X·X` (clamped at 0) is re-aligned to 24 fraction
   bits. It is multiplied by `gamma = 1/(2σ²)`, which replaces the division,
   giving `z` in unsigned Q8.24. `z` saturates at 256, where `exp(−z)` is
   below the output's resolution.
2. **K2.** Base-2 range reduction: `t = z·log2(e)`, so `exp(−z) = 2^−t`.
   The integer part `k` becomes a right shift. The next 5 bits `j` index a
   table. The remainder `f < 1/32` becomes `u = f·ln2`.
3. **K3.** The table gives `T = 2^(−j/32)` (`exp_table`, 32 entries,
   Q1.24). A cubic gives `p = 1 − u(1 − u(1/2 − u/6)) ≈ exp(−u)`.
4. **K4.** `K = (T·p) >> k`, unsigned Q1.24.

The table is built at elaboration by a constant function: repeated
multiplication by `round(2^(−1/32)·2^40)`, rounded to 24 fraction bits.
Every entry equals `round(2^(24 − j/32))`. Against real-valued `exp(−z)`,
the measured error is at most about 2 units of 2^−24.

## Number formats

The data width (25-bit fixed point) comes from the design. The binary
point and all internal widths are this implementation's choices, collected
in `rtl/svm_pkg.sv`:

| quantity | format |
|---|---|
| `in_x`, `in_y`, bias `b` | signed Q4.20 |
| `Y − 2X` operand | signed 27 bit |
| per-beat sum | signed 59 bit |
| ACCUM_1, `in_xx`, ACCUM_2, `d_out` | signed 64 bit, 40 fraction bits |
| `gamma = 1/(2σ²)` | unsigned Q5.20 |
| `α` | unsigned Q5.20; `y` is the sign bit `in_y_neg` |
| kernel argument `z` | unsigned Q8.24, saturating |
| kernel value `K` | unsigned Q1.24 |

ACCUM_1 cannot overflow. With all inputs at the extremes of their range,
each product is below 3·2^48, and 3,780 of them stay below 2^62. Products
in the kernel truncate. `α·K` is truncated to 40 fraction bits before
accumulation.

## Interface (`svm_top`)

1. While `busy` is low, pulse `start` with the configuration:
   * `cfg_kernel_type`: 0 linear, 1 RBF
   * `cfg_svnum`: number of support vectors; ignored in linear mode, and 0
     is treated as 1
   * `cfg_bias`
   * `cfg_gamma`

   The circuit keeps its own copy of these values for the whole window.
2. While `in_ready` is high, the circuit asks for slice `beat_idx` (0..33)
   of support vector `sv_idx`. The source drives:
   * `in_x` with the support vector slice (the weight vector in linear
     mode) and `in_y` with the matching feature slice;
   * `in_xx` (X·X), `in_alpha` and `in_y_neg` for that support vector.
     These are sampled on the vector's last beat.

   The source raises `in_valid` when its data are ready. A beat is taken
   in every cycle where `in_valid` and `in_ready` are both high, so the
   source may stall.
3. `d_valid` is high for one cycle, with `d_out` = d(x) and `d_pos` =
   (d(x) ≥ 0).

The circuit holds no vector storage. The source must deliver
2 × 112 × 25 = 5,600 bits per cycle to run at full rate. Reset (`rst_n`) is
asynchronous and active low.

## Files

| file | contents |
|---|---|
| `rtl/svm_pkg.sv` | sizes, formats, `kernel_type_e`, the per-vector side record `sv_side_t` |
| `rtl/svm_top.sv` | top level |
| `rtl/svm_ctrl.sv` | window sequencer (IDLE / RUN / DRAIN), with assertions on the stream |
| `rtl/uipc.sv` | unified inner product calculator, 112 lanes, two stages |
| `rtl/adder_tree.sv` | balanced adder tree, one generate level per adder level |
| `rtl/accum1.sv` | ACCUM_1 |
| `rtl/kernel_function.sv` | four-stage RBF kernel |
| `rtl/exp_table.sv` | the 2^(−j/32) table |
| `rtl/accum2.sv` | α·y weighting, ACCUM_2, bias |
| `tb/tb_*.sv` | one self-checking testbench per block, `tb_svm_top` (end to end) and `tb_svm_frame` (one full frame) |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. Each works out its expected values on its
own: exact integer models for the inner products, accumulators and control,
and real-valued `$exp` for the kernel, with a stated tolerance. For
example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/svm_pkg.sv rtl/svm_top.sv \
          tb/tb_svm_top.sv --top-module tb_svm_top -o sim
./obj_dir/sim
```

`tb_svm_top` runs the whole design at its default size: 112 lanes, 3,780
dimensions, and two windows of 213 support vectors. The windows alternate
linear and RBF, and include windows with source stalls, with a gamma that
makes every kernel value underflow, and with support vectors close to the
features. The run checks:

* linear results bit for bit;
* RBF results within the accumulated kernel tolerance;
* the class decisions;
* the 36 and 7,248 cycle counts.

It also counts mode switches, stalls, masked last beats, saturations and
both class outcomes, and fails if any of them never happened. The run takes
well under a second.

`tb_svm_frame` classifies a whole 640×480 frame: 609 windows against one set
of 213 support vectors, started back to back. It checks every result and
every window's 7,248 cycles. It reports 4,415,249 cycles for the frame,
which includes two idle cycles between windows. That is 34.4 frames/s at
152 MHz. The run takes about a minute and a half.

## Where this departs from, or adds to, the reference design

Followed as described:

* 112 lanes;
* 3,780 dimensions;
* 25-bit data;
* two-stage unified inner product calculator with the `Y·(Y − 2X)` rewrite;
* ACCUM_1 and ACCUM_2;
* a kernel function with a four-cycle table-driven exponential, used only
  in RBF mode;
* the 36 / 7,248 cycle counts.

This implementation's own choices:

* **Table-driven exponential.** The design uses a table-driven method
  without giving its tables. The base-2 reduction, the 32-entry table and
  the cubic are this design's.
* **Division by 2σ².** It is done by multiplying with a precomputed
  `gamma` input.
* **Formats.** The binary point and every internal width.
* **Control.** The valid/ready source interface, the controller, and
  lane masking on the last beat.
* **Class label.** `y` is taken to be ±1, so multiplying by `y` is a
  conditional negation.
* **Bias preload** into ACCUM_2.
* **Kernel argument** saturation and clamping.

Not modelled:

* the HOG feature extractor;
* the memories that hold support vectors and features;
* the sliding-window address generation over the frame;
* the synthesized gate count (661k gates) and clock rate (152 MHz).

**Resource count.** The RTL has 112 lane multipliers, 7 in the kernel and 1
for α, 120 in all, close to the 119 quoted for the reference circuit. It
has fewer adders than the 584 quoted there. How the reference circuit
arranges its adders is not known, so its count cannot be reproduced.

**Frame rate.** The reference circuit is quoted at 33.8 frames/s at
152 MHz. The cycle counts above, which match the 7,248 cycles per window
quoted for it, give 34.4 frames/s at that clock. The gap presumably comes
from per-window overhead outside the classifier, which is not described.
