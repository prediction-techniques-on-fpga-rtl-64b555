# Hardware signal predictors for tactile-internet links

In a tactile-internet system a human operator drives a remote robot or
virtual tool over a network and feels its response. The network delay
cannot be removed, but it can be hidden: if each end can predict the
next value of the signal it is waiting for, it can act on the prediction
until the real sample arrives. This only helps if the prediction itself
costs almost no time. This design computes the predictions in dedicated
logic that runs beside each device's own controller. A prediction is
ready one clock cycle after a sample arrives, and a new sample is taken
every clock.

Two kinds of predictor are built. Both run in every channel:

* **Linear regression (LR).** A least-squares straight line is fitted
  through the last M+1 samples and evaluated at a chosen time. All of it
  is IEEE 754 single precision (binary32).
* **Online-trained multilayer perceptron (MLP-BP)** and its
  **recurrent-output variant (RMLP-BP).** A 4-4-1 ReLU network predicts
  the next sample from the last four. It trains itself by backpropagation
  on every sample, using the sample just received as the target. Numbers
  are signed fixed point: 14 bits, 10 of them fractional.

Nothing is pipelined. Between the registers, each predictor is a single
combinational datapath. Training is online, so the next prediction
depends on the weights produced from the current sample. A pipeline
would feed that loop with stale weights.

## System structure

```
                tactile_prediction_top
   master side                              slave side
 ┌──────────────────────────┐          ┌──────────────────────────┐
 │ prediction_module (MPD)  │          │ prediction_module (SPD)  │
 │  channel 0..NI-1:        │          │  channel 0..NI-1:        │
 │   lr_predictor  (F32)    │          │   lr_predictor  (F32)    │
 │   mlp_bp        (s14.10) │          │   mlp_bp        (s14.10) │
 │   rmlp_bp       (s14.10) │          │   rmlp_bp       (s14.10) │
 └──────────────────────────┘          └──────────────────────────┘
```

The top holds two prediction modules:

* **MPD** is fed with the master device's signals.
* **SPD** is fed with the slave device's signals.

They are independent. Each has its own `*_valid` strobe and its own
ports, prefixed `mpd_` and `spd_`. The device controllers and the network
are outside this design; the top's ports are where they connect.

Each module has `NI` channels (default 3, one per joint of a three-joint
haptic arm). Every channel is a complete copy of the predictors. Channels
share only the clock, the reset and the module's valid strobe, so a
module's throughput is NI samples per clock.

The regression takes binary32 inputs and the networks take fixed-point
inputs. Both are supplied at the ports; no conversion between the two
formats is built.

## The linear-regression predictor (`lr_predictor`)

### What it computes

An accepted sample (`in_valid`) pushes a time marker `t_in` and a value
`v_in` into two windows. Each window is M+1 entries deep; the default is
M = 3. From the registered windows, the datapath computes:

```
tbar  = (sum t(n-j)) * 1/(M+1)                     lr_mean
vbar  = (sum v(n-j)) * 1/(M+1)                     lr_mean
beta1 = C2 * sum_j C1[j] * (v(n-j) - vbar)         lr_beta1
beta0 = vbar - beta1 * tbar                        lr_beta0
vhat  = beta0 + beta1 * t_pred                     lr_eval
```

### How the division is removed

The least-squares slope contains a division by the sum of squared time
deviations. The design assumes the time markers are uniformly spaced by
`TS`. Then the deviation of each tap from the mean time is a constant:

```
t(n-j) - tbar = (M/2 - j) * TS
```

So both of these are fixed numbers:

* the per-tap factor `C1[j] = (M/2 - j)*TS`
* the reciprocal denominator `C2 = 1 / sum C1[j]^2`

Both constants are computed from the parameters when the design
elaborates and rounded to binary32. The slope therefore needs only
subtractors, multipliers and one sum.

The mean time `tbar` is still computed from the actual `t_in` values,
because the intercept needs the absolute time.

If the real sample times are not evenly spaced, the slope is wrong by the
ratio of the true spacing to `TS`.

### Choosing the prediction time

`t_pred` sets where the line is evaluated. Drive it with `t(n) + TS` for
a one-step-ahead prediction. Drive it further ahead to cover a longer
delay.

### Cascading sums and accuracy

The sums are *cascading*: a chain of M adders, not a tree. The chain fixes
the order of rounding, and the testbench models that order bit for bit.
The chain also makes the critical path grow with M.

The time markers are absolute binary32 numbers, so precision drops as
they grow. With `t = n`, the spacing of 1.0 is still exact up to 2^24
samples, but `tbar * beta1` loses relative accuracy long before that.
Restarting the time base periodically is the user's responsibility.

### Timing

* `out_valid` rises once M+1 samples have been received since reset.
* After that, `vhat`, `beta0` and `beta1` are valid in the cycle after
  each accepted sample.
* Cycles with `in_valid = 0` change nothing.

## The online-trained network (`mlp_bp`, `rmlp_bp`)

### The cycle of prediction and training

This is the least obvious part of the design. Each predictor holds a
delay line with the last four samples. When a sample arrives, the delay
line reads v(n-1)..v(n-4).

1. **Predict.** The forward pass (`mlpm`) runs on the registered delay
   line and weights. Its output `v_hat` is the prediction of the *next*
   sample v(n). It is available while the controller waits for v(n).
2. **Train (combinational).** When v(n) arrives with `in_valid`, it is
   the desired output. The error is formed at once:
   `e = v(n) - v_hat`. Still in the same cycle, the backpropagation
   module (`bpm`) computes the following from the same inputs and hidden
   outputs that made the prediction:
   * the output gradient `delta2 = e * f'(out)`
   * the hidden gradients `delta1[i] = f'(y1[i]) * w2[i+1] * delta2`
   * all 25 new weights: `w + eta*delta*y + alpha*w(n-1)`
3. **Clock edge.** The new weights, the previous weights (used by the
   alpha term), the delay line and `err` are all registered.
4. **Next prediction.** One cycle after the sample, `v_hat` already
   shows the prediction of v(n+1), made with the updated weights.

Training never pauses. Every accepted sample is one step of stochastic
gradient descent.

### The recurrent variant

`rmlp_bp` differs only in its first network input. That input is a
register holding the prediction made one sample earlier. The remaining
three inputs are v(n-1)..v(n-3). During training the fed-back value is
treated as an ordinary input; no gradient flows back through time.

### Network and training settings

* Topology: 4 inputs, 4 hidden neurons, 1 output.
* Activation: ReLU in both layers. The derivative is taken as 1 for a
  positive output and 0 otherwise.
* Output activation: `OUT_RELU = 1` gives a ReLU output, so the output
  can never be negative. Use it for signals that stay positive, or set
  `OUT_RELU = 0` for a linear output. With a ReLU output, a run of
  negative targets can drive the output neuron inactive, and its gradient
  is then zero.
* Bias: every neuron has a bias input of constant -1.0 with its own
  weight, so a neuron computes `x = sum w_j*y_j - w_0`.
* Learning rate: `eta = 0.008`, rounded to 8/1024 in s14.10.
* Momentum-style term: `alpha = 0`, so it has no effect at the defaults.
* Reset values of the weights (this design's choice):
  * hidden weights `0.125 + 0.0625*((i+j) mod 4)`
  * biases 0
  * output weights 0.25

  With positive inputs every neuron starts active, and the pattern is not
  symmetric, so the hidden neurons learn different things.

## Number formats

### Fixed point [sT.W]

Words are T bits wide, including the sign, with W fractional bits. The
default is 14.10: range about ±8, step 1/1024.

* **Products** (`fxp_mul`) keep floor(a*b / 2^W) and saturate to T bits.
* **Sums** are accumulated with guard bits and saturated once, at the
  end. This applies to a neuron's sum, a hidden error and a weight
  update.
* **The error** `v - v_hat` is saturated.

### binary32 (`fp32_add`, `fp32_mul`)

Both units are combinational.

* Rounding is to nearest even.
* Alignment uses guard, round and sticky bits.
* Infinities and NaN follow IEEE 754, and any NaN becomes the quiet NaN
  0x7fc00000.
* Subnormal inputs are read as zero, and results below 2^-126 are
  flushed to zero.

## Interfaces and timing

| module | accepts | result | latency |
|---|---|---|---|
| `lr_predictor` | `in_valid`, `t_in`, `v_in` | `vhat`, `beta0`, `beta1` at `t_pred`; `out_valid` | 1 clock |
| `mlp_bp` / `rmlp_bp` | `in_valid`, `v_in` | `v_hat` (next sample), `err` (last sample) | 1 clock |
| `prediction_module` | shared `in_valid`; per-channel inputs | per-channel outputs | 1 clock |
| `tactile_prediction_top` | `mpd_valid`, `spd_valid` | `mpd_*`, `spd_*` | 1 clock |

Reset is synchronous and active low on `rst_n`. All other blocks are
combinational.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NI` | 3 | channels per prediction module |
| `M` | 3 | regression window of M+1 samples (1, 3, 6 and 9 are the sizes usually compared) |
| `TS` | 1.0 | spacing of the time markers assumed by the slope constants |
| `T`, `W` | 14, 10 | fixed-point word and fraction width (16.12 and 18.14 are the usual alternatives) |
| `B`, `H` | 4, 4 | network inputs and hidden neurons |
| `ETA`, `ALPHA` | 0.008, 0.0 | learning rate and the w(n-1) coefficient |
| `OUT_RELU` | 1 | ReLU on the output neuron (0: linear output) |

## Choices made in this design

The following are this design's own choices, not part of the method it
implements:

* **Prediction time.** The time at which the regression line is
  evaluated is an input, `t_pred`. The regression equation as usually
  written evaluates the line at the newest time marker. That only
  reproduces the current sample, so the time was made an input to allow
  prediction ahead.
* **Uniform spacing.** The slope constants assume uniform sample
  spacing, and they are computed rather than tuned by hand.
* **Exact slope.** The slope uses one multiplier per window tap, so its
  size grows with M. A smaller circuit that multiplies a single stream
  and keeps a running sum over time would only approximate the
  least-squares slope. The exact form was preferred.
* **Fixed-point arithmetic.** The truncation, saturation and
  accumulation rules are this design's.
* **Floating-point details.** Subnormals are flushed to zero.
* **Hardware structure.** The window registers, fill counter, reset
  values and weight initialisation are this design's.
* **Module contents.** Each prediction module carries both techniques
  in every channel, with no selection between them.
* **Output ReLU.** It is a parameter. Descriptions of the method
  disagree on whether the output neuron is linear.
* **Omitted parts.** Probabilistic predictors, the device controllers
  and the network are not part of this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog.

* **Reference models.** The expected values come from models written
  separately from the RTL:
  * `f32_ref_pkg` widens binary32 to double, computes and rounds back
    once, flushing to zero like the hardware.
  * `mlp_ref_pkg` is a bit-accurate class model of the trained networks.
  * `lr_ref_pkg` models the regression in the hardware's order of
    operations.
* **Arithmetic units.** `fp32_add` and `fp32_mul` are checked against
  thousands of random operands, plus ties, cancellation, overflow, NaN
  and infinity cases.
* **Predictors.** `mlp_bp_tb` and `rmlp_bp_tb` run 3000 samples of a
  joint-angle-like signal at the default size. They check every output
  bit for bit, check that idle cycles hold the outputs, and require the
  mean squared error of the last 500 samples to be below that of the
  first 500.
* **Whole design.** `tactile_prediction_top_tb` runs the top at its
  default parameters: two sides, three channels each, 1500 samples per
  side, with random valid patterns. It compares all 18 outputs with the
  models, and counts the following mechanisms, failing if any never
  happens:
  * regression windows filling
  * weight updates
  * recurrent feedback
  * inactive ReLUs
  * idle cycles
  * one side sampling while the other is idle

  It takes about two minutes.

To run a testbench with Verilator:

```
verilator --binary --timing --top-module tactile_prediction_top_tb \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/fp32_pkg.sv rtl/mlp_pkg.sv tb/f32_ref_pkg.sv tb/mlp_ref_pkg.sv \
  tb/lr_ref_pkg.sv tb/tactile_prediction_top_tb.sv
./obj_dir/Vtactile_prediction_top_tb
```

Replace the top module and the last file to run another testbench.

### What the tests do not show

The testbenches use synthetic trajectories, not recorded haptic-device
data, and their reference models follow the same arithmetic rules as the
RTL. They show that the hardware does what is written here. They do not
show how good the predictions are on a real device. Timing closure and
resource use on an FPGA have not been measured. A single-cycle network
with training has a long combinational path, so expect a clock in the
tens of MHz, not hundreds.
