# Streaming CNN image classifier

This is a small convolutional neural network (CNN) for image classification,
built as a single pipeline that never stores a whole image. Pixels go in one
per clock in raster order, and each pixel moves every convolution window
along by one step. The class index comes out a fixed number of cycles after
the frame's last pixel. SoftMax probabilities follow a few hundred cycles
later.

At the default parameters the network is:

```
image 28x28 ─► pad ─► conv 3x3 ─► ReLU ─► maxpool 2x2 ─► 14x14
            ─► FIFO ─► pad ─► conv 3x3 ─► ReLU ─► maxpool 2x2 ─► 7x7 = 49 features
            ─► 10 neurons  y_c = Σ x_i·w_c,i + b_c ─┬─► arg-max ─► class
                                                    └─► SoftMax ─► 10 probabilities
            each pooled map ─► variance (one add/mul/div unit per layer)
```

Work is done in parallel wherever the maths allows:
- All K×K products of a convolution are formed in the same cycle.
- All ten neurons take in each feature in the same cycle.
- The arg-max and the SoftMax work side by side.

A frame occupies the input for (28+2)×(28+2) = 900 cycles, counting the
padding zeros the first layer adds. Frames can follow each other with no idle
cycles between them.

## Number formats

| quantity | format | width |
|---|---|---|
| pixels, features, activations | signed Q8.8 | 16 |
| kernel coefficients, FC weights, biases | signed Q8.8 | 16 |
| convolution sums, class scores | signed Q16.16 | 40 |
| SoftMax probabilities | unsigned Q0.16 (65535 means 1.0) | 16 |
| feature variance | integer, in LSB² of the feature codes | 48 |

These formats are set in `rtl/cnn_pkg.sv` (`DATA_W`, `COEF_W`, `FRAC`,
`ACC_W`).

Products are kept at full precision until the activation stage. That stage
shifts right by `FRAC` (rounding toward minus infinity), then clamps to 32767.
The FC layer adds its bias as `b << FRAC` so that it lines up with the Q16.16
products.

## A convolutional layer

`conv_layer` is a chain of four stages: `pad_unit` → `line_buffer` →
`conv_unit` → `relu_unit` → `max_pool`. It also holds a K×K register file of
coefficients.

**Padding and the handshake.** `pad_unit` walks the padded frame,
(W+2P)×(H+2P) positions, with a counter.
- At a border position it emits a zero on its own, whether or not input is
  present.
- At an inner position it waits for one input value and passes it on.

So `in_ready` is low exactly on border positions, and the producer is held
there. The pad unit also runs ahead: once a frame ends, it sends the bottom
border and the next frame's top border straight away. It then waits at the
first inner position. Nothing downstream of the pad unit can stall.

**Window.** `line_buffer` keeps the previous K−1 rows of the padded map in row
memories, plus a K×K bank of window registers. For each value:
1. The column above it is read from the row memories.
2. That column is shifted into the window.
3. The new value is written back into the rows.

`win[0][0]` is the oldest value (top left) and `win[K-1][K-1]` the newest.
A window is flagged valid only once K rows and K columns have been seen, and
only at offsets that are multiples of the stride `S`. Each side of the output
is therefore `(C_in + 2P − K)/S + 1` long. The package function
`conv_out_dim` gives this number.

**Convolution.** `conv_unit` computes the sum centred on the window:

    Conv(i,j) = Σ_{a=-K/2..K/2} Σ_{b=-K/2..K/2} IN(i−a, j−b) · w(K/2+a, K/2+b)

This pairs window element `[r][c]` with coefficient `[K−1−r][K−1−c]`. In
other words, the kernel is applied **flipped**, as a true convolution rather
than a correlation. Weights trained with a correlation (most frameworks) must
be rotated by 180° before loading. Coefficient address `a` means row `a / K`
and column `a % K` of `w`. The convolution has no bias term.

**Activation.** `relu_unit` turns the Q16.16 sum into a Q8.8 value in
[0, 32767]. It raises `clipped` when a negative value is forced to 0, and
`saturated` when a value is clamped at the top.

**Pooling.** `max_pool` is 2×2 with stride 2.
- On even rows it stores the larger value of each horizontal pair in a
  half-row buffer.
- On odd rows it compares the new pair against the stored value and emits the
  block maximum.

An odd last row or column is dropped.

Latency: a pooled value leaves four cycles after the last padded value of its
2×2 block of windows.

## Between layers

`cnn_top` builds `N_LAYERS` layers with a generate loop. All layers share
`K`, `S` and `P`. The map side entering layer `l` is `map_dim(IMG_W, l, K, S,
P)`.

A 4-entry `stream_fifo` sits between each pair of layers. Its job is to hold a
pooled value that arrives while the next pad unit is busy sending border
zeros. A pooled stream carries at most one value every two cycles, and it is
silent while the frame borders are being sent. At the default sizes the FIFO
therefore never has to hold a value back. It is there to protect other shapes,
and an assertion reports an overflow.

## Fully connected layer, class and probabilities

**Neurons.** Each `fc_neuron` keeps its N_F weights in a `weight_mem`. This is
a block-RAM-style memory with a registered read, addressed by a running
feature count. For each feature:
1. The neuron reads the matching weight.
2. One cycle later, it multiplies and accumulates.

After the N_F-th feature it adds the bias and outputs its score, two cycles
after the last feature. Neurons store no features. All `N_CLASSES` neurons
run in lockstep; an assertion checks this.

**Class.** `argmax_unit` reports the class with the highest score, one cycle
after the scores. Ties go to the lowest index. SoftMax keeps the scores in
the same order, so this is also the class with the highest probability.

**Probabilities.** `softmax_unit` computes

    p_i = exp(y_i − y_max) / Σ_j exp(y_j − y_max)

It evaluates each exponential in base 2: `exp(−d) = 2^−t`, where
`t = d·log2(e) = n + f`. The fractional power `2^−f` is replaced by the
quadratic `1 − 0.67157 f + 0.17157 f²`. This is exact at f = 0, ½ and 1 and
is off by less than 0.3 % in between. The result is then shifted right by
`n`; terms with n ≥ 17 become zero.

The unit produces one exponential per cycle while summing them. It then
performs one division per class on its own `arith_unit`:
`p_i = (e_i << 16) / Σe`. For 10 classes this takes 432 cycles, which is well
within the 900-cycle frame. A set of scores that arrives while the unit is
busy is ignored, and an assertion in `cnn_top` reports it.

## Feature variance and the arithmetic unit

`feature_variance` computes a spread statistic of a feature set about the
mean of a reference set:

    mu = Σ ref / n
    V  = Σ_i (cur_i − mu)² / (m − 1)

It keeps running sums of `ref`, `cur` and `cur²` while the features stream
past. It then runs five steps on `arith_unit`:
1. mu = Σref / n
2. t1 = mu·Σcur
3. t2 = mu²
4. t3 = t2·m
5. V = (Σcur² − 2·t1 + t3)/(m−1)

For an integer mu, step 5 equals the sum of squared deviations exactly.

`arith_unit` is the shared arithmetic unit:
- add and multiply each take one cycle;
- divide is a restoring divider that takes W cycles and truncates toward zero;
- dividing by zero returns the largest positive value and sets `div_zero`.

`cnn_top` has one `feature_variance` per convolutional layer. Each one watches
the pooled map of its layer: 196 values for layer 1 and 49 for layer 2 at the
defaults. Both the reference set and the current set are that map, so V is
the sample variance of the layer's output for each frame. The results are
outputs only: no feature selection is driven by them.

## Top-level interface (`cnn_top`)

| port | dir | meaning |
|---|---|---|
| `coef_we, coef_layer, coef_addr[3:0], coef_wdata` | in | write coefficient `row*K+col` of layer `coef_layer` (0 = first) |
| `fcw_we, fcw_class[3:0], fcw_addr[5:0], fcw_data` | in | write weight `addr` of the neuron for class `fcw_class` |
| `fcb_we, fcb_class, fcb_data` | in | write that neuron's bias |
| `pix_valid, pix_ready, pix_data` | in/out/in | image stream, raster order; a pixel moves when valid and ready are both high |
| `feat_valid, feat_data` | out | the 49 final features of each frame |
| `logits_valid, logits[10]` | out | class scores, Q16.16 (held until the next frame's) |
| `class_valid, class_idx, class_score` | out | chosen class, one cycle after the scores |
| `prob_valid, prob[10]` | out | SoftMax probabilities, Q0.16, 432 cycles after the class |
| `var_valid[N_LAYERS], var_value[N_LAYERS][47:0]` | out | per layer, variance of its pooled map |
| `clip_evt[N_LAYERS-1:0], sat_evt[...]` | out | per layer, ReLU clipped or saturated a value this cycle |

Weights should be loaded before the first pixel of the frame that uses them.
Loading is allowed while a frame is in flight, but that frame then sees a mix
of old and new weights.

Frame position comes from counters that start at zero on reset. After reset,
the first pixel accepted is the top-left pixel of a frame. Row memories and
weight memories are not reset.

Timing at the defaults: the class appears 60 cycles after the frame's last
accepted pixel. The padded bottom rows must still pass through both layers
before the last feature exists.

**Parameters.**
- `IMG_W`, `IMG_H`: image size, default 28.
- `N_LAYERS`: number of convolutional layers, default 2.
- `K`, `S`, `P`: kernel size, stride and padding, defaults 3, 1, 1.
- `N_CLASSES`: default 10.
- `VAR_W`: variance width, default 48.
- `FIFO_D`: depth of the FIFOs between layers, default 4.

The feature count `N_F` and the inner map sizes are derived from these.

Size at the defaults, after coarse synthesis:
- about 1040 word-level cells;
- 4.3 kbit of flip-flops;
- 9.7 kbit of memory, of which 7.8 kbit is FC weights;
- 18 multipliers for the convolutions, 10 for the neurons, and the multipliers
  of the three arithmetic units (two for variance, one for SoftMax).

## What is fixed by the design and what is a choice

These follow from the design's definition:
- the stage chain (convolution layers, then a fully connected layer, then
  SoftMax and the maximum);
- parallel units;
- the convolution sum with its index pairing;
- the output-size rule with padding and stride;
- the sum of products with bias;
- picking the class with the highest output;
- the add/multiply/divide arithmetic unit;
- a memory for the coefficients;
- extending the chain to N layers.

The following are choices made in this RTL:
- **Sizes.** A 28×28 image, 3×3 kernels, padding 1, 2×2 pooling and 10
  classes make an MNIST-sized digit classifier.
- **Channels.** Each layer has one kernel and one input channel, with no
  summing across channels. All layers share K, S and P.
- **Arithmetic.** The fixed-point formats, the requantisation and the
  saturation.
- **SoftMax.** The base-2 quadratic approximation and the serial schedule.
- **Variance.** It is read as the squared deviation from a reference mean,
  divided by m−1. No rule for selecting features from it is built.
- **Buffering.** The stall-based padding and the FIFOs between layers.
- **Memory.** All weights are held on chip. There is no interface to external
  (DDR) memory.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. The testbenches
compare the RTL with integer models written independently of it. The
multi-layer testbenches share a reference model of padding, convolution,
activation and pooling, `tb/cnn_ref.svh`.

- `tb_cnn_top` runs the design at its default size. It sends five random
  28×28 images through the handshake:
  - two back to back;
  - the rest with random idle cycles;
  - one with large kernels, so that the activation saturates.

  It checks every feature, score, class, probability and per-layer variance.
  It counts ReLU clipping and variance results in each layer, saturation,
  padding stalls, back-to-back frames, classifications and SoftMax results,
  and fails any that never happened. It also bounds the class latency.
- `tb_cnn_top_deep` does the same with three layers on a 24×20 image.
- `tb_conv_layer` covers 3×3/stride 1/padding 1, 3×3/stride 2/no padding and
  5×5/padding 2, and checks the cycles a padded frame takes.
- `tb_softmax_unit` compares against the same approximation bit for bit, and
  against a real SoftMax to within 0.4 % of full scale.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cnn_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/cnn_pkg.sv tb/tb_cnn_top.sv
./obj_dir/Vtb_cnn_top
```

Every testbench ends with `TB_RESULT checks=N failures=M`. The full-size run
takes a few seconds.
