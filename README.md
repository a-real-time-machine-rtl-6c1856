# Real-time motion-artifact detector for fNIRS (RBF-kernel SVM, FP32)

Functional near-infrared spectroscopy (fNIRS) measures blood oxygenation through
the scalp. When the wearer moves, the optodes shift and the signal picks up
large, fast excursions (motion artifacts) that can be mistaken for brain activity.
This design flags those samples as they arrive. It is a support vector machine
with a Gaussian (RBF) kernel, trained offline, evaluated in hardware on a stream
of samples with two features each. All arithmetic is IEEE-754 single precision.

For every sample the detector computes

    f(x) = sum_{i=1..55} (y_i * alpha_i) * exp(k * |z - sv_i|^2) + b,   k = -gamma
    artifact = f(x) > 0

where `z` is the sample after normalisation by running statistics, `sv_i` are the
55 support vectors, `y_i * alpha_i` their signed Lagrange weights and `b` the bias.

The main idea is the oversampled single kernel channel. A direct mapping would
build 55 copies of the subtract / square / exponential / multiply chain, one per
support vector. Here a single copy of that chain runs 55 times faster than the
sample rate and handles one support vector per fast clock cycle. A serializer
feeds it and a deserializer collects the 55 results. The cost is one extra
sample period of latency. The saving is 54 of the 55 exponential units and
their multipliers and adders.

## Data path

```
 in_sample[0] --> preproc_channel --z0--+
 in_sample[1] --> preproc_channel --z1--+--> serializer (55 x {z1,z0}) --+
                                                                         | slot i
                   coef_store --- sv_i, ya_i ------------------------->  serial_kernel
                        |                                                |  term_i
                        | bias                                           v
                        +-----------------------> adder_tree <------ deserializer
                                                       |                (55 x FP32)
                                                 fp_cmp_gt (> 0)
                                                       |
                                          out_score, out_artifact
   oversample_ctrl: accept strobe, slot index 0..54, last slot
```

### Pre-processing (`preproc_channel`, `ewma_iir`)

The kernel expects centred and scaled data, so each feature has its own
normalisation channel. There are two of them, and they run in parallel. Each
channel holds two single-pole IIR filters,

    m[n] = a*x[n] + (1-a)*m[n-1]        (running mean of x)
    q[n] = a*x[n]^2 + (1-a)*q[n-1]      (running mean of x^2)

with `a = 0.01`, which is an effective window of about 100 samples. From these,
variance = q - m^2, std = sqrt(variance) and z = (x - m) / std. The filters pass
the current sample straight through, so the mean already includes it. The whole
chain is combinational. The filter states are committed on the clock edge that
accepts the sample. If the variance rounds to zero or below, as it does for the
first sample after reset (both states start at 0) or for a constant input,
std is forced to 0 and z to +0 instead of dividing by zero.

### The oversampled kernel channel (`oversample_ctrl`, `serializer`, `serial_kernel`, `deserializer`)

- `oversample_ctrl` accepts a sample on `in_valid && in_ready`. It then spends
  the next 55 cycles on slots 0..54. `in_ready` is low during a frame, except in
  its last slot. A new sample can therefore be accepted back to back, which
  gives exactly one sample per 55 cycles. A sample offered earlier than that
  waits.
- `serializer` registers the normalised vector on acceptance. It holds 55
  inputs, one per support-vector channel, which all carry the same vector. It
  outputs the one chosen by the slot index.
- `serial_kernel` computes `ya_i * exp(k * sum_j (z_j - sv_ij)^2)` for the
  support vector of the current slot. It is combinational and produces one term
  per cycle.
- `deserializer` writes each term into a staging flip-flop. On the last slot it
  copies all 55 terms into its parallel output registers and pulses `par_valid`.
  The parallel side therefore changes once per sample period.

### Decision (`adder_tree`, `fp_cmp_gt`)

A balanced pairwise tree of FP32 adders sums the 55 terms and the bias. The
tree has 56 inputs padded with zeros to 64, so six levels. A relational
operator then compares the sum with 0.0. The registered outputs are the
decision value `out_score` and the class `out_artifact` (1 = motion artifact).

### Timing

| event | clock edge |
|---|---|
| sample accepted (filter states commit, serializer loads) | E |
| slot i result stored in the deserializer | E + 1 + i |
| all 55 terms in parallel registers (`par_valid`) | E + 55 |
| `out_valid`, `out_score`, `out_artifact` registered | E + 56 |

Throughput is one sample per 55 cycles. The original target ran the channel
at 55 times the sample clock: 166 MHz for 3.03 MHz in one account, 200 MHz
(45.45 kHz sample rate) in another. This RTL has a single clock. The sample
rate is simply how often `in_valid` is raised. At 2.5 MHz the design sustains
45,450 samples/s, which is 3030 fNIRS channels at 15 frames/s.

## Arithmetic units

All units are combinational FP32: `fp_add`, `fp_mul`, `fp_div`, `fp_sqrt`,
`fp_exp`, `fp_cmp_gt`. Shared helpers and the round-and-pack step are in
`fp32_pkg`.

- Rounding is round-to-nearest-even. Subnormal inputs are read as zero, and
  results below the normal range become signed zero. NaN propagates as
  `0x7FC00000`.
- Add, multiply, divide and square root are correctly rounded. Their
  testbenches compare bit for bit with IEEE double arithmetic rounded to single.
- `fp_exp` evaluates e^u as 2^(u log2 e):
  - The argument is reduced in fixed point, with 40 fraction bits.
  - 2^(i/64) comes from a 64-entry table, whose entry i is round(2^(i/64) * 2^31).
  - The remainder goes through a cubic Taylor series.
  - The result is within one unit in the last place. |u| >= 128 saturates to
    +inf or +0.

Since the units have no pipeline registers, the critical path runs through a
whole kernel evaluation (subtract, square, add, multiply, exp, multiply) in one
cycle. The adder tree is also a single cycle. Reaching a high clock on an FPGA
would need pipeline registers there, with the latency figures above adjusted.

## Model loading (`coef_store`)

The trained model lives in registers and is written through `cfg_we / cfg_addr /
cfg_wdata` (FP32 words):

| address | content |
|---|---|
| `i*2 + j` (0..109) | support vector i, feature j |
| `110 + i` (110..164) | y_i * alpha_i |
| 165 | bias b |
| 166 | kernel scale k = -gamma (reset value -1.0) |

Everything else resets to +0. A model written while samples are in flight
affects the slots that read it, so load between samples.

## Scoring against labels (`error_counter`)

The detector was developed by counting misclassified samples on labelled
recordings, so the top also carries a hardware error counter. A label bit
`in_label` is accepted together with each sample. It is carried along the
channel next to the sample: one register while the frame runs, then a second
register while the terms are summed. It is compared with the decision in the
cycle the result is registered. `err_total`, `err_errors`, `err_false_alarms`
(artifact reported on clean signal) and `err_misses` (artifact not reported)
are saturating 32-bit counters, cleared by `err_clear`. Tie `in_label` to 0 and
ignore these ports when no labels are available.

## How far it follows the original design

Taken from the original design:
- The two-feature pre-processing with exponential running mean and variance,
  a = 0.01.
- 55 support vectors.
- The kernel chain in the order subtract, square, exponential, weight multiply.
- The adder tree and the comparison with zero.
- The single 55x oversampled channel with serializer and deserializer in
  flip-flops.
- FP32 everywhere, with combinational arithmetic.
- An error counter for measuring accuracy.

Choices of this implementation:
- **Model storage.** Support vectors, weights, bias and gamma are loadable
  registers rather than constants. The trained values are not published with
  the design.
- **Kernel formula.** The squared differences are summed over the features, and
  a scale k = -gamma is applied before the exponential. The published block
  diagrams draw the chain per signal without either. The standard RBF kernel
  needs both.
- **Error counter details.** Its label path and the split into false alarms
  and misses were chosen here.
- **Bias.** The bias enters the adder tree as a 56th input.
- **Interface and reset.** One clock with a valid/ready handshake stands in for
  the two clock domains. Reset is asynchronous and active low.
- **Arithmetic details.** The behaviour of the zero-variance guard, the
  subnormal handling and the method of the exponential unit were chosen here.
- **Feature count.** The training data is described with four input features,
  while the hardware description, followed here, uses two. `N_FEAT` is a
  parameter.

Not reproduced: the classification accuracy figures, because the trained model
and the test recordings are not available. Nor are the FPGA resource and
timing numbers.

## Files and simulation

`rtl/` holds one module or package per file. The top is `svm_ma_detector`,
with parameters `N_SV` (55), `N_FEAT` (2) and `A` (0.01 as FP32). Each block has
a self-checking testbench `tb/tb_<module>.sv`, and `tb/tb_fp_pkg.sv` holds the
real <-> FP32 conversions they use. Every testbench ends by printing
`TB_RESULT checks=N failures=M`.

`tb_svm_ma_detector` runs the whole design at its default size, in about a
second:
- It loads a two-cluster model: clean support vectors near the origin with
  negative weights, artifact support vectors off-centre with positive weights.
- It streams 300 synthetic samples with artifact bursts.
- It reloads the model halfway.
- It labels the burst samples and checks the error counters against its own
  tally.
- It checks every decision value against a model that repeats each FP32 step,
  plus the class and the 56-cycle latency.
- It also checks that stalls, back-to-back acceptance, both classes and the
  zero-variance guard all occurred.

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/fp32_pkg.sv tb/tb_fp_pkg.sv rtl/*.sv tb/tb_svm_ma_detector.sv \
  --top-module tb_svm_ma_detector
./obj_dir/Vtb_svm_ma_detector
```

Any unit testbench builds the same way: list `rtl/fp32_pkg.sv`,
`tb/tb_fp_pkg.sv`, the module and the modules under it, then its testbench.
