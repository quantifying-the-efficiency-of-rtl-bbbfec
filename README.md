# Hand-pipelined fixed-point inference: a dense network and a streamed CNN

This RTL implements two small neural-network inference engines as they are
built by hand for an FPGA when latency and throughput matter most. Every
weight is a constant compiled into the logic. Every layer is fully unrolled
and pipelined.

- **One-layer model** (`one_layer_net`): dense → ReLU → dense → sigmoid.
  It takes a new 16-feature vector on every clock and returns 6 sigmoid
  outputs 14 clocks later.
- **CNN model** (`cnn_net`): an 8×8 single-channel image arrives one pixel
  per clock. The pipeline is a 3×3 convolution with two filters and zero
  ("same") padding, giving 128 values, then ReLU, a dense layer from 128
  values to 10 scores, and softmax. Images can follow each other back to
  back, one every 64 clocks.

`ml_inference_top` puts the two side by side. They share clock and reset
and nothing else.

The main hardware idea is the **constant multiplier** (`const_mult`). Many
weights are a sum of a few signed powers of two. Such a product costs only
shifts and one adder, so it needs no DSP slice. The multiplier works out at
elaboration time, for each weight, which of the two forms to build.

## Number format

All values are two's-complement fixed point with `W` bits, `F = ceil(W/2)`
of them fractional. The default is `W = 16, F = 8`: a sign bit, 7 integer
bits and 8 fraction bits, so 1.0 is `256`.

- **Products.** A `W×W` product is exact (`2W` bits). It is then cut to the
  slice `[W+F-1:F]`. This rounds toward minus infinity and wraps to `W`
  bits.
- **Sums.** Products and the bias are added at full precision in an adder
  tree, and the total wraps to `W` bits.
- **Saturation.** There is none anywhere. Overflow wraps.

## Constant multiplication: shift-add or DSP

`const_mult` gets its weight as a parameter. At elaboration, a greedy
decomposition is run (functions `sa_*` in `nn_pkg`):

```
r = weight
repeat up to DEPTH times:
    if r == 0: stop
    2^c = the power of two nearest to |r|  (the smaller one on a tie)
    emit term sign(r) * (x << c);  r -= sign(r) * 2^c
```

- **Shift-add.** If `r` reaches zero within `DEPTH` steps, the product is the
  sum of the emitted terms: constant shifts plus a chain of adders, with no
  multiplier.
- **DSP.** Otherwise the module instantiates `dsp_mult`, a plain `*` that
  synthesis maps onto a DSP slice.
- **Special values.** A zero weight gives a constant zero. `DEPTH = 0` always
  uses the multiplier. `DEPTH = 1` accepts only powers of two. `DEPTH = 2`
  accepts `±(x<<c1) ± (x<<c2)`.

Examples at `F = 8`:

| weight | value     | greedy terms      | built at DEPTH 4 |
|--------|-----------|-------------------|------------------|
| 64     | 0.25      | +2^6              | shift-add (1)    |
| 255    | 0.996     | +2^8 −2^0         | shift-add (2)    |
| 200    | 0.78125   | +2^8 −2^6 +2^3    | shift-add (3)    |
| 171    | 0.668     | 5 terms           | DSP              |

`DEPTH` trades DSP slices for LUTs. A larger depth converts more weights to
adders. The default of 4 is the setting for word widths of 15 to 24 bits.
For narrower words use 3 (11 to 14 bits). For wider words use 5 (25 to 29
bits) or 6 (30 to 32 bits).

Both forms take **3 register stages**, so all products of a layer line up:

- **Shift-add:** input register, sum register, output register.
- **`dsp_mult`:** operand registers, product register, output register. This
  is the register layout a DSP slice provides. It also lets synthesis
  cascade two slices when the operands are wider than one DSP.

## Adder trees

`adder_tree` adds **four terms per pipeline stage**, so `N` terms take
`ceil(log4 N)` clocks. Four inputs per stage cost no clock rate compared
with two, and they need fewer stages and registers. The sum keeps full
precision, `IW + ceil(log2 N)` bits.

The module builds one stage and then instantiates itself on that stage's
partial sums until one sum is left.

## The one-layer model

```
x[16] ─ dense 16→16 ─ ReLU ─ dense 16→6 ─ sigmoid ─ y[6]
         6 clocks      1       6 clocks     1        = 14 clocks
```

Each dense layer (`dense_layer`) has one `const_mult` per weight, 256 and 96
of them. Each output has its own adder tree of 17 terms (16 products plus
the bias), which is 3 stages. A dense layer therefore takes 3 + 3 = 6
clocks.

The sigmoid (`sigmoid_layer`) is a 1024-entry ROM covering inputs in
[−8, 8):

- **Index:** `idx = clamp(floor(x·64) + 512, 0, 1023)`.
- **Entry `i`:** `sigmoid((i − 512)/64)`, rounded to 8 fraction bits.

## The streamed CNN

```
pixels ─ line_buffer ─ 2×(9 const_mult + 10-term tree) ─ ReLU ─ feature_buffer ─ dense 128→10 ─ softmax
```

### Line buffer: windows from a pixel stream

`line_buffer` is the part that takes the most care. Pixels enter a shift
register of `2·IMG_W + 3 = 19` entries, which holds two full rows plus three
pixels. After each shift, the window centred on the pixel that entered
`IMG_W + 1 = 9` shifts earlier sits at fixed taps:

- **Top row:** positions 16, 17, 18.
- **Middle row:** positions 8, 9, 10.
- **Bottom row:** positions 0, 1, 2.

The register is one flat line through the image. At the left and right edges
the outer taps therefore hold pixels from the neighbouring row. Above the
first row and below the last they hold pixels of other images or stale data.

A small tag shift register travels alongside the first 10 entries. It holds
a valid bit and the row and column of each pixel. The centre's row and
column decide which taps are outside the image, and those taps are forced to
zero. This gives same padding without any extra clocks: one window per
pixel, 64 windows per 8×8 image.

The last 9 windows of an image need 9 more shifts after its last pixel:

- **Idle input:** the buffer shifts zeros on idle clocks until the last
  window is out.
- **Next image already arriving:** its pixels do the shifting instead.
- **After the next image has started:** no zeros are inserted, because they
  would split that image's rows.

Pixels may have gaps anywhere. The buffer shifts only on a valid pixel,
apart from the flush just described.

### Convolution, buffering, dense, softmax

- **`conv2d_stream`.** Multiplies each window by the two 3×3 kernels (18
  `const_mult`s). It sums each filter's 9 products plus its bias in a 2-stage
  tree, and outputs the position `row·8 + col` and two values.
- **`feature_buffer`.** After the ReLU, writes the values into 128 flip-flop
  registers at index `pos·2 + filter` (channels last). After position 63 it
  pulses `out_valid` for one clock.
- **Dense layer.** The fully unrolled dense layer (1280 `const_mult`s,
  129-term trees of 4 stages) samples the map in that one clock. The next
  image can start overwriting the buffer at once.
- **`softmax_layer`.** Six stages:
  1. Register the inputs.
  2. Subtract the largest score, so every exponent lies in (0, 1].
  3. Look up the exponent in a 1024-entry table over [−8, 0], with 15
     fraction bits.
  4. Add the exponents.
  5. Look up the reciprocal of the sum in a 1024-entry table over [0, 16).
  6. Multiply, and cut to 8 fraction bits.

Latency, counted from the clock that presents an image's last pixel:

| step                         | clocks |
|------------------------------|--------|
| 9 flush shifts               | 9      |
| window register              | 1      |
| convolution multipliers+tree | 5      |
| ReLU                         | 1      |
| feature buffer               | 1      |
| dense 128→10                 | 7      |
| softmax                      | 6      |
| **total**                    | **30** |

If the next image arrives back to back, its first 9 pixels do the flush
shifts and the total is the same. A gap inside the next image's first 9
pixels adds one clock per gap.

From an image's first pixel to its class probabilities is therefore
64 + 30 = 94 clocks.

The line buffer's data register has no reset. The runs of entries between
the window taps (positions 3 to 7 and 11 to 15) are read nowhere else, so
on an FPGA they map onto shift-register LUTs (SRL16/SRL32) rather than
flip-flops.

## Weights

No trained model comes with this design. `nn_pkg::nn_weight(layer, i, j, F)`
and `nn_bias` generate a fixed stand-in set:

- **Weights:** an integer hash of `(layer, i, j)` reduced to [−0.5, 0.5)
  with `F` fraction bits.
- **Biases:** a quarter of that range.
- **Layer numbers:** 1 and 2 for the one-layer model; 3 for the convolution
  (tap `t = (dr+1)·3 + (dc+1)`, filter `j`); 4 for the CNN dense layer
  (input `pos·2 + filter`).

To run a real model, replace these two functions, for example with case
tables generated from the trained weights. Nothing else changes. Because
every weight is a parameter, synthesis folds the constants, and each
multiplier's choice between shift-add and DSP follows the new values.

## Interfaces

Every layer uses the same simple stream: an `in_valid` bit with the data,
and an `out_valid` bit with the result a fixed number of clocks later.

- **No back-pressure.** The consumer must accept one result per clock.
- **Reset.** `rst_n` is synchronous and active low, and clears only the
  valid pipelines. Data registers are not reset. The tables are ROMs
  computed at elaboration from real-number formulas in `nn_pkg`.

| module            | key parameters (default)                                  |
|-------------------|-----------------------------------------------------------|
| ml_inference_top  | W 16, F 8, DEPTH 4, N_IN 16, N_HID 16, N_OUT 6, IMG 8×8, NF 2, N_CLASS 10 |
| const_mult        | W, F, WEIGHT, DEPTH                                       |
| dense_layer       | N_IN, N_OUT, W, F, DEPTH, LAYER                           |
| adder_tree        | N, IW, FANIN 4                                            |
| sigmoid_layer     | N, TAB_N 1024, RANGE 8                                    |
| softmax_layer     | N 10, EXP_N 1024, EXP_RANGE 8, INV_N 1024, INV_RANGE 16   |
| line_buffer       | IMG_H 8, IMG_W 8                                          |

## What is this design's own choice

The overall structure comes from the reference architecture:

- fully unrolled layers with an initiation interval of 1
- the 3-stage multiplier pipeline and four-input adder stages
- the greedy shift-add rule and its `DEPTH` settings
- a streamed convolution reading one pixel per clock through a shift-register line buffer
- flip-flops between CNN layers
- table-based sigmoid and softmax
- the 8×8 / two-filter / 10-class CNN sizes

These details are choices made here and should be checked against a real
model before use:

- **Sizes:** the one-layer model's sizes (16-16-6).
- **Weights:** the stand-in weight set.
- **Tables:** table sizes and ranges.
- **Softmax:** subtracting the maximum before the exponent.
- **Padding and flush:** zero padding and the flush behaviour.
- **Arithmetic:** truncation without saturation, and per-product truncation.
- **Feature order:** channels-last order of the features.
- **Word width:** the default word width of 16 bits.

A packed-DSP variant, with two low-precision weights sharing one DSP
through its pre-adder and a sign-correction term, is sometimes used for
words of 8 bits or fewer. It is not part of this design, because it costs
latency and clock rate for little gain.

The complete networks have been simulated only in the 16-bit
configuration. Other widths are a parameter change, with `F = ceil(W/2)` and
`DEPTH` chosen as above. `tb_width_sweep` checks a dense layer at 8, 12, 24
and 32 bits (DEPTH 0, 3, 4 and 6).

## Simulating

Every module has a self-checking testbench in `tb/`. Each compares results
with an independent reference model (`tb/tb_ref_pkg.sv`) and checks
latencies. Each prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/nn_pkg.sv tb/tb_ref_pkg.sv \
          tb/tb_ml_inference_top.sv --top tb_ml_inference_top
./obj_dir/Vtb_ml_inference_top
```

`tb_ml_inference_top` runs the whole design at its default parameters:

- **One-layer model:** 120 feature vectors, with back-to-back and gapped
  inputs.
- **CNN:** five images, covering back-to-back images, pixel gaps and the
  idle flush.

It counts how often each of these situations occurs, and fails if one never
does. The CNN builds take about half a minute to compile because of the
1280 constant multipliers of its dense layer.
