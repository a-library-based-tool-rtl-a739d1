# A streaming CNN pipeline for traffic sign recognition

This RTL runs a small convolutional neural network entirely in hardware.
It classifies a 32x32 colour image into one of 43 traffic sign classes. The
design follows a library-based approach: a trained network is mapped layer by
layer onto parameterised building blocks, and each block becomes one stage of
a pipeline. The blocks are convolution, max pooling, flatten, dense and batch
normalisation layers, plus a clock domain crossing and a camera input adapter.
No processor or external memory is involved. Pixels stream in from a camera,
class scores stream out, and the weights sit in on-chip registers.

The main design-time choice is **how many multipliers each 3x3 convolution
kernel gets**: 1, 3 or 9. This trades area for latency. With 9 multipliers
every layer keeps up with one pixel per clock. With 1 multiplier each output
pixel takes nine clocks.

## The network

| stage | block | shape in -> out | weights |
|---|---|---|---|
| input | `rgb_input_adapter` | camera word -> 3 channels (R, G, B) | - |
| crossing | `async_fifo` | camera clock -> network clock | - |
| conv1 | `conv_layer` 3x3, ReLU | 32x32x3 -> 30x30x26 | 702 |
| conv2 | `conv_layer` 3x3, ReLU | 30x30x26 -> 28x28x20 | 4680 |
| pool2 | `maxpool_layer` 2x2 | 28x28x20 -> 14x14x20 | - |
| conv3 | `conv_layer` 3x3, ReLU | 14x14x20 -> 12x12x20 | 3600 |
| pool3 | `maxpool_layer` 2x2 | 12x12x20 -> 6x6x20 | - |
| conv4 | `conv_layer` 3x3, ReLU | 6x6x20 -> 4x4x12 | 2160 |
| pool4 | `maxpool_layer` 2x2 | 4x4x12 -> 2x2x12 | - |
| flatten | `flatten_layer` | 2x2x12 -> 48 values | - |
| dense | `dense_layer`, linear | 48 -> 43 scores | 2064 |

No layer has a bias. The network was trained with a dropout layer after pool3
and a softmax on the output. Dropout does nothing at inference, so it has no
stage. The softmax is replaced by a linear output. It does not change which
score is largest, and that score's class is the answer. The hardware gives
out all 43 scores and leaves picking the largest to the consumer.

## How a layer works

All stages talk through valid/ready streams. A beat moves when both `valid`
and `ready` are high at a rising clock edge. An offered beat stays unchanged
until it is taken, and assertions in `conv_layer` and `async_fifo` check this
rule. Feature maps travel in raster order, row by row, with one pixel per beat
and all channels of that pixel side by side (`logic signed [DW-1:0] x [C]`).
No stage ever holds a whole image. Each one starts as soon as it has the rows
it needs, so all layers work at once on different parts of the same image,
and a new image can enter before the previous one has left.

The blocks are nested in four levels:

1. **Network** (`tsr_dnn_top`): the chain of stages.
2. **Layer** (`conv_layer`): line buffers, weight store, sequencing.
3. **Channel** (`conv_channel`): one output feature map. It sums the kernels
   of all input channels and accumulates over the steps of a window.
4. **Operator** (`conv_kernel`): one 3x3 mask applied to one input channel,
   with its multipliers and adder.

### Convolution: line buffers and steps

`window_gen` keeps the last K-1 image rows in line buffers, plus a KxK
register window per input channel. Each accepted pixel shifts the window one
column left and fills the new right-hand column from the line buffers and the
pixel itself. The generator flags the pixels whose window is an output
position. With stride S these are rows and columns K-1, K-1+S, and so on.
The network uses no padding, so each of its 3x3 layers shrinks the map by
two in each direction. For other networks, `PAD` surrounds each frame with
zeros. The layer pushes those zero pixels into the window itself, one per
clock, without taking input beats.

For every such window, all `C_OUT` channels compute in parallel. Each channel
has `C_IN` kernels, one per input channel, so conv2 holds 26 x 20 = 520 kernels.
A kernel with `MULTS` multipliers covers the nine mask positions in
`NSTEPS = 9 / MULTS` steps:

| `MULTS` | step s computes | clocks per output pixel |
|---|---|---|
| 9 | all nine products, no operand multiplexers | 1 |
| 3 | mask row s, one multiplier per mask column | 3 |
| 1 | mask position s (row-major) | 9 |

The layer takes the next pixel in the last step of the current window, so the
window registers are never overwritten while still in use. A pixel that
completes no window (the first two rows and columns) costs one clock. The
result is registered. If the next stage is not ready, the last step waits,
and that back-pressure passes on to the input.

### Numbers and activations

- **Activations** are signed `DW`-bit integers, 8 bits by default. The
  original design was evaluated with 6, 7 and 8 bits.
- **Weights** are signed `WW`-bit fixed-point numbers with `SHIFT`
  fractional bits. The defaults are `WW = 8` and `SHIFT = 7`, which gives
  weights between -1 and +127/128.
- **Accumulation** uses full precision. `dnn_pkg::acc_width` sizes the
  accumulator so that it cannot overflow.
- **Output** (`requant`): an arithmetic right shift by `SHIFT` (rounding
  towards minus infinity), then ReLU or linear, then saturation to `DW` bits.
  The dense layer saturates to `OW = 16` bits instead, so class scores are not
  clipped.
- **Camera input**: `rgb_input_adapter` turns each unsigned `PIX_W`-bit
  component into a non-negative activation by keeping its `DW-1` most
  significant bits.

This number format is this design's own choice; the source does not specify
one. To run a trained floating-point network, quantise its weights to this
format and choose each layer's `SHIFT_*` to match.

### Max pooling, flatten, dense

- **`maxpool_layer`** keeps one running maximum per output column and
  channel. The first pixel of a 2x2 window loads it, the others raise it, and
  the last pixel sends it out. Rows or columns that do not fill a whole window
  are dropped (floor mode).
- **`flatten_layer`** splits each 12-channel pixel into 12 scalar beats. The
  result is in (row, column, channel) order, the order a channels-last
  framework uses for its flatten.
- **`dense_layer`** keeps one accumulator per output. With `MULTS = N_OUT`,
  the default, every input updates all 43 accumulators in one clock. With
  `MULTS = 1`, one shared multiplier walks the outputs in 43 clocks per input.
  The score vector is registered and held until taken.

### Latency

These are measured in simulation for one 32x32 image, from the first pixel
to the scores. The image is sent at one pixel per clock, on a single clock:

| multipliers per kernel | clocks | at 100 MHz | reported for the original design |
|---|---|---|---|
| 1 | 8272 | 82.7 us | 92.035 us |
| 3 | 2854 | 28.5 us | 37.855 us |
| 9 | 1052 | 10.5 us | 10.805 us |

Almost all of the latency is conv1 walking through the image: 900 windows at
`NSTEPS` clocks each, plus 124 edge pixels at one clock each. Later layers
see fewer pixels and keep up.

## Clock domain crossing and camera input

A camera usually runs on its own clock. With `USE_CDC = 1` (the default),
`async_fifo` moves pixels from `cam_clk` to `clk`. It is a 16-entry dual-clock
FIFO. Each side passes its Gray-coded pointer to the other through a
two-flip-flop synchroniser (`sync_2ff`). A pixel written into an empty FIFO
becomes readable three to four read clocks later. With a 100 MHz camera and a
300 MHz network (9 multipliers), an image takes 3098 network clocks
(10.3 us). The camera's own pixel rate sets that figure. The original design
reports about 51 us for the same pairing, so its crossing was much slower
than this one. With `USE_CDC = 0` the camera side runs on `clk` and
`cam_clk` is unused.

Cameras pack R, G and B into a word in different orders. The `cam_order`
input (`dnn_pkg::rgb_order_e`: RGB, RBG, GRB, GBR, BRG, BGR) names the order,
most significant component first. The adapter always delivers channel 0 = R,
1 = G, 2 = B. A grey-scale variant (`C = 1`) is available in the adapter but
is not used by the top.

## Loading weights

Weights are loaded before inference on the `clk` side, one per clock:

- `w_we` is the write strobe.
- `w_layer` selects the layer: 0 to 3 for conv1 to conv4, 4 for dense.
- `w_addr` is the address within the layer.
- `w_data` is the signed weight.

Addresses follow the flat order of each layer's kernel tensor:

- **Convolution:** `((ky*3 + kx)*C_IN + ic)*C_OUT + oc`, the order of a
  `(3, 3, C_IN, C_OUT)` array.
- **Dense:** `i*43 + o`, the order of a `(48, 43)` array.

Because of this, the arrays a training framework saves can be written in as
they are, after quantisation. All weight stores reset to zero. Every weight
is readable in parallel (`weight_mem`), because a fully parallel layer needs
all of them in every clock.

## Batch normalisation

Once trained, batch normalisation is the linear map
y = gamma (x - mu) / sqrt(var + eps) + beta, which is y = A x + B per channel.
`batchnorm_layer` computes it, with A in fixed point (`SHIFT` fractional
bits) and B in activation units. The coefficients are written at addresses
2ch (A) and 2ch+1 (B). The traffic sign network does not use this layer, so
the top brings it out on its own `bn_*` ports beside the network.

## Files

`rtl/`:

- `dnn_pkg.sv`: shared enums (`act_e`, `rgb_order_e`) and the accumulator
  width function.
- `tsr_dnn_top.sv`: the network (top).
- `conv_layer.sv`, `conv_channel.sv`, `conv_kernel.sv`, `window_gen.sv`,
  `weight_mem.sv`, `requant.sv`: the convolution layer, level by level.
- `maxpool_layer.sv`, `flatten_layer.sv`, `dense_layer.sv`,
  `batchnorm_layer.sv`: the other layers.
- `async_fifo.sv`, `sync_2ff.sv`, `rgb_input_adapter.sv`: the input side.

`tb/`: each testbench is self-checking and prints
`TB_RESULT checks=N failures=M`.

- `tb_tsr_dnn_top.sv` runs the whole network at its default parameters.
  - It streams four random images with random weights and compares all 43
    scores of each image with a software model of the network.
  - It checks frame latency.
  - It forces back-pressure from the score output all the way up to the
    camera. It counts camera gaps, a full crossing FIFO, stalled
    convolutions, held scores and overlapping frames, and fails if any of
    them never happened.
- `tb_tsr_latency_m1.sv`, `tb_tsr_latency_m3.sv` and `tb_tsr_latency_m9.sv`
  each build the single-clock network with 1, 3 or 9 multipliers per kernel,
  using the shared harness `tsr_latency_check.sv`.
  - Each checks its latency against the figures above.
  - Each compares a checksum of the scores with the same fixed value, so
    all three are shown to compute identical results.
- The other testbenches test one block each:
  - `conv_layer_check.sv` and `dense_layer_check.sv` are harnesses that
    `tb_conv_layer` and `tb_dense_layer` instantiate once per configuration.
  - These tests use random data, random gaps and random back-pressure, and
    compare against integer models.
  - Where a block's timing is defined, they check it cycle-exactly.

## Simulating

With Verilator 5 (`--timing` is needed for the testbenches' delays), from the
directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_tsr_dnn_top \
  rtl/dnn_pkg.sv rtl/*.sv tb/tb_tsr_dnn_top.sv
./obj_dir/Vtb_tsr_dnn_top
```

For a block test, swap in its testbench, and add `tb/conv_layer_check.sv` or
`tb/dense_layer_check.sv` where one is used. List `rtl/dnn_pkg.sv` first.
The full network test takes about a minute and a half to build and a few
seconds to run. Variables that nothing resets start at random values in a
two-state simulator, so everything that is read is reset or written first.

To change the design:

- Size and speed are set by the top's parameters: `CONV_MULTS` (1, 3 or 9),
  `DENSE_MULTS` (1 or 43), `DW`, `WW`, `OW`, `USE_CDC`, `FIFO_AW`, and the
  per-layer shifts `SHIFT_C1` to `SHIFT_C4` and `SHIFT_D`.
- `IMG` changes the image size. It must stay at least 24, or pool4 has
  nothing left.
- For a different network, chain `conv_layer`, `maxpool_layer`,
  `flatten_layer` and `dense_layer` the same way. Each takes its feature map
  size and channel counts as parameters.

## Where this design departs from the original, and how far to trust it

- **Weights are loaded, not built in.** The original tool writes the trained
  weights into the netlist as constants, and synthesis then simplifies the
  multipliers (a zero weight costs nothing). Here the weights sit in writable
  registers, so one build runs any set of weights. The cost is area: area
  figures from the original (LUTs, flip-flops, block RAMs on an FPGA) do not
  carry over, and nothing here was synthesised for an FPGA.
- **The internal structure is inferred.** The original describes the
  hierarchy, the multiplier options and the layer functions, but not how a
  layer is built inside. The streaming line-buffer structure was chosen
  because it reproduces the reported latencies: about 9, 3 and 1 clocks per
  input pixel. The handshake, number format, rounding, saturation, weight
  order, crossing FIFO and camera word format are all this design's choices.
- **Padding is zeros only.** Stride and zero padding are built, but only
  stride 1 without padding is exercised at network level. Block tests cover
  stride 2 and padding 1.
- **The crossing is faster** than the reported one (see above).
- **Not built:** the translator software that produces such a network from a
  trained model, softmax (it is replaced at inference), and selection of the
  winning class.
- **What has been verified:** every block test and both network tests pass
  in Verilator against independent integer models, with random data and
  random stalls. Each block test also fails when its block is deliberately
  broken. The network has not been run with trained traffic sign weights or
  real images, so classification accuracy is not established here.
