# LeNet and CifarNet accelerators with backward pipeline scheduling

This is a streaming CNN inference engine for small image classifiers on an
FPGA. Every layer of the network has its own hardware and its own buffer.
The layers run at the same time, and a layer starts as soon as the data for
its first output is there, not when the whole previous feature map is done.

The key idea is the order in which each convolution or pooling layer
produces its outputs. A naive pipeline has every layer work in row-major
order, so a pooling layer waits until two full rows of the convolution before
it can compute anything. Here the order is worked out **backwards from the
last layer**, ahead of time, and stored in small ROMs. The result: every
layer produces exactly the pixels the next layer needs next, and no others.

The same blocks build two networks. They sit side by side in the top module
`cnn_accel_top`, each with its own ports. The first is `lenet_top`, LeNet for
28x28 MNIST digits:

| layer | operation | input | output |
|---|---|---|---|
| conv1 | 5x5 convolution, bias | 28x28x1 | 24x24x8 |
| pool1 | 2x2 max pool, stride 2, ReLU | 24x24x8 | 12x12x8 |
| conv2 | 5x5 convolution, bias | 12x12x8 | 8x8x16 |
| pool2 | 2x2 max pool, stride 2, ReLU | 8x8x16 | 4x4x16 |
| fc1 | fully connected, bias, ReLU | 256 | 128 |
| fc2 | fully connected, bias | 128 | 10 |
| label | index of the largest score | 10 | 1 |

All 37,610 weights and biases are held on chip. They are streamed in once
after reset. After that, images go in and labels come out over a pair of
AXI4-stream ports.

The second is `cifarnet_top`, a CifarNet for 24x24 colour images (Cifar-10).
It uses the same kinds of layers, with three differences:

- the convolutions are padded so the map keeps its size;
- two normalisation stages follow the pools;
- there are three fully connected layers.

See [CifarNet](#cifarnet) below.

## Backward pipeline scheduling

### The lists

The four convolution and pooling layers form a chain. Each one is a
*2D-window layer*: output pixel `<x,y>` depends on an F x F window of input
pixels. With stride S and zero padding Z, that window is

    Dep(<x,y>) = { <m,n> : xS-Z <= m < xS+F-Z,  yS-Z <= n < yS+F-Z,
                           0 <= m < H,  0 <= n < W }

A *pixel* here means a **chunk**: all channels of one coordinate, and in batch
mode all channels of all images in the batch. Chunks are the unit that moves
between layers.

The scheduler builds three lists for every layer:

- **output order** (`nextList`): the order in which the layer computes its
  output coordinates;
- **request list** (`curList`): the order in which it expects input chunks;
- **computation index list** (`curCompList`): for output k, how many input
  chunks must have arrived before output k can be computed.

The lists are built like this:

1. The last layer (pool2) produces its outputs in plain row-major order.
2. For each output of a layer, in its output order, walk its dependency
   window row by row. Append every input coordinate that has not yet been
   requested to the request list. Then record the request list's current
   length as that output's entry in the computation index list.
3. The request list of layer k is the output order of layer k-1. Repeat
   step 2 on layer k-1, and so on back to conv1.

Coordinates that overlapping windows share are requested only once, so every
request list is a permutation of the layer's input coordinates. This also
means each layer computes every output exactly once.

### A small example

Take a 6x6 input, a 3x3 stride-1 convolution (4x4 output), then a 2x2
stride-2 pool (2x2 output).

- The pool computes (0,0), (0,1), (1,0), (1,1).
- Its first output needs convolution outputs (0,0), (0,1), (1,0), (1,1). Its
  second needs (0,2), (0,3), (1,2), (1,3), and so on. The pool's request list
  is therefore a 2x2-block order, and its computation index list is
  4, 8, 12, 16.
- That block order is the convolution's output order. Its first output,
  (0,0), needs input rows 0-2 and columns 0-2: 9 chunks. The second, (0,1),
  adds column 3 of rows 0-2: 12 chunks. (1,0) adds row 3, columns 0-2: 15
  chunks. (1,1) adds (3,3): 16 chunks.
- So the pool's first output is ready after **16** input pixels. In plain
  row-major order it would need 22.

In LeNet the savings add up: pool1, conv2 and pool2 all start long before
conv1 has finished an image. The end-to-end testbench counts how often each
of them computes an output while the previous layer is still busy with the
same image.

### Where the lists live

`bps_sched_rom` holds the lists of one layer.

- An `initial` block computes them from the chain geometry
  (`bps_pkg::LENET_CHAIN`). It runs the procedure above, starting at the last
  layer and stopping at its own layer. This is the constant initialiser of a
  ROM: nothing is computed at run time, and no table file is needed.
- Each instance stores only its own layer's lists:
  - the request list, as buffer addresses `m*W+n`;
  - the computation counts;
  - the output coordinates.
- Reads are combinational, indexed by the receive count and the output
  index.

Changing the network shape means editing `LENET_CHAIN`. Each entry holds the
input height and width, F, S and Z of one layer. Every layer's lists then
change to match.

### How a layer follows its lists

`window_ctrl` is the control unit of one layer. It has two counters:

- `rcv_cnt`: input chunks received in this image;
- `out_idx`: outputs computed.

Each cycle in state CHECK it does one of two things:

- **Compute.** If `rcv_cnt >= curCompList[out_idx]`, it starts the window
  operation on `nextList[out_idx]` and goes to WAIT. In WAIT the buffer RAM
  belongs to the window operation.
- **Receive.** Otherwise, if a chunk is offered and not all chunks are in
  yet, it writes the chunk at address `curList[rcv_cnt]`.

Computing has priority over receiving. When the window operation is idle
again, `out_idx` goes up by one. Once every input has been received and
every output computed, both counters clear for the next image and
`img_done` pulses.

Receiving and computing share one single-port buffer, so they are
serialised. A layer therefore holds its upstream FIFO while it computes.
The FIFOs between layers (depth 16) absorb most of this.

## The 2D-window layer

`window2d` puts one layer together:

- **List ROM** (`bps_sched_rom`): the layer's three lists.
- **Control unit** (`window_ctrl`).
- **Arbiter** (`buf_arbiter`): a multiplexer that gives the RAM port to
  either the control unit (writes) or the window operation (reads).
- **Buffer matrix** (`buffer_ram`): one word per input coordinate, as wide as
  a chunk. Reads are synchronous.
- **Window operation**, chosen by the `OP` parameter:
  - `conv_window_op`
    - Computes all CO output channels and all NB images of one output
      coordinate in parallel.
    - Steps through the F x F taps and CI/CI_PAR input-channel groups, one
      per cycle, with the RAM and weight reads pipelined behind the address
      counters.
    - At the end it adds the bias and requantises.
    - An output takes F·F·CI/CI_PAR + 2 cycles from start to `out_valid`.
    - Taps that fall in the zero padding contribute nothing.
  - `pool_window_op`
    - Takes the maximum over the window's taps that lie inside the map, for
      all channels and images at once, then applies ReLU.
    - An output takes F·F + 2 cycles.

  Applying ReLU after the max gives the same result as applying it before,
  so the convolution itself has no ReLU.

A window operation reports `idle` in the cycle its result is taken. This
lets the control unit launch the next output with no bubble.

## Fully connected layers and the label

`fc_layer` works in three phases:

1. **Load.** It collects the input vector. For fc1 that is the 16 pool2
   chunks of 16 channels each, flattened as element `(x*4+y)*16+c`.
2. **Compute.** It computes OUT_PAR outputs per pass. In each cycle of a
   pass, one input element is multiplied by OUT_PAR weights and added into
   OUT_PAR 48-bit accumulators.
3. **Emit.** After the last pass, it sends the outputs to the next layer.

Output lane j of pass p uses weight row `p*OUT_PAR + j`. A pass takes
IN_LEN + 2 cycles.

- fc1 uses OUT_PAR = 16, so it makes 8 passes of 258 cycles.
- fc2 uses OUT_PAR = 10, so it makes one pass.

`argmax_label` stands in for the softmax. Softmax does not change which
score is largest, so the label is the same. On a tie the lower index wins.
`label_batch_buffer` collects the labels of a batch and sends them out one
per beat, setting `tlast` on the last.

## Number format

- Data, weights and biases are 16-bit signed fixed point with 8 fraction
  bits (Q8.8).
- Products are 32 bits wide and are summed in 48-bit accumulators. The bias
  is added shifted left by 8.
- The result is shifted right by 8, rounding toward minus infinity, and
  saturated to 16 bits (`bps_pkg::requant`).

## Stream interface and weight banks

After reset, the slave stream `s_axis_*` carries the 16-bit words in this
order:

1. conv1 weights, conv1 biases, conv2 weights, conv2 biases, fc1 weights,
   fc1 biases, fc2 weights, fc2 biases. `weight_loader` counts them into the
   eight `weight_bank`s, and `weights_loaded` goes high after the last one.
2. Images, NB per batch, each 28x28 pixels in row-major order.

`s_axis_tlast` is not used.

Each bank is filled address by address, and lane by lane within an address.
The lane layout follows the parallelism of the layer that reads it:

| bank | word at address a, lane l |
|---|---|
| conv weights | a = (h·F + w)·G + g, l = co·CI_PAR + j, with input channel g·CI_PAR + j; G = CI/CI_PAR |
| fc weights | a = p·IN_LEN + i, l = j: weight of output p·OUT_PAR + j for input i |
| biases | one address, one lane per output |

`tb/lenet_ref_pkg.sv` (function `weight_stream`) builds this stream for any
parallelism, and is the simplest place to read the format from.

`image_batch_buffer` stores a whole batch. It then feeds conv1 in conv1's
request order, with one chunk (NB pixels, one per image) per cycle. Labels
leave on `m_axis_*`, with the label in the low byte. `layer_img_done[3:0]`
pulses when each 2D-window layer finishes an image.

## Parameters of `lenet_top`

| parameter | default | meaning |
|---|---|---|
| `NB` | 1 | images per batch; chunk width is NB·channels·16 bits |
| `CONV1_CI_PAR` | 1 | input channels per cycle in conv1 (divides 1) |
| `CONV2_CI_PAR` | 1 | input channels per cycle in conv2 (divides 8) |
| `FC1_PAR` | 16 | fc1 outputs per cycle (divides 128) |
| `FC2_PAR` | 10 | fc2 outputs per cycle (divides 10) |
| `FIFO_DEPTH` | 16 | depth of each inter-layer FIFO |

Where the defaults come from:

- The parallelism defaults balance the layer times per image:
  - conv1: 576 outputs × 27 cycles;
  - conv2: 64 outputs × 202 cycles;
  - fc1: 8 passes × 258 cycles.
- They use 8 + 16 + 16 + 10 = 50 multipliers per image.
- Batch mode multiplies the multiplier count by NB, because the images in a
  batch share the weights but not the arithmetic.

## Performance (simulated)

With the defaults, one image takes **22,339 cycles** from its first pixel
entering to its label. That includes 784 cycles to load the image into the
batch buffer.

| layer | cycles per image |
|---|---|
| conv1 | 16,912 (measured) |
| conv2 | at least 64 outputs × 202 cycles + 144 input chunks (from the formula above) |

conv1 sets the throughput.

In batch mode the figures below count from the first pixel of a batch to its
labels. Loading each extra image into the batch buffer adds 784 cycles.

| NB | batch latency | of which loading the extra images |
|---|---|---|
| 5 | 23,287 cycles | 3,136 |
| 25 | 41,155 cycles | 18,816 |

## CifarNet

`cifarnet_top` runs this chain:

| layer | operation | input | output |
|---|---|---|---|
| conv1 | 5x5 convolution, zero padding 2 | 24x24x3 | 24x24x32 |
| pool1 | 2x2/2 max pool and ReLU | 24x24x32 | 12x12x32 |
| norm1 | external, through ports | 12x12x32 | 12x12x32 |
| conv2 | 5x5 convolution, zero padding 2 | 12x12x32 | 12x12x32 |
| pool2 | 2x2/2 max pool and ReLU | 12x12x32 | 6x6x32 |
| norm2 | external, through ports | 6x6x32 | 6x6x32 |
| fc1 / fc2 / fc3 | fully connected | 1152 → 192 → 48 → 10 | |

fc1 and fc2 apply ReLU; fc3 does not.

**Padding.** Padding changes the dependency windows: border outputs have
smaller windows. The scheduling lists follow from `bps_pkg::CIFARNET_CHAIN`
in the same way as for LeNet.

**Input.** Images arrive as 24x24 pixels in row-major order, with the three
channel values of a pixel next to each other. `image_batch_buffer` packs them
into 3-channel chunks (parameter `C`).

**Normalisation.** No normalisation is implemented.
- Each normalisation stage works on one chunk at a time, so it does not
  change the schedule.
- The pool outputs leave on `norm1_out_*` and `norm2_out_*` (512-bit chunks,
  valid/ready).
- The normalised chunks come back on `norm1_in_*` and `norm2_in_*`, in the
  same order.
- Looping `out` back to `in` gives the network without normalisation.

**Stream and weights.** The weight stream has the same layout as LeNet's,
with fc3's weights and biases added at the end: 259,194 words in all.

**Parallelism (defaults).**

| layer | multipliers | how |
|---|---|---|
| conv1 | 32 | all output channels, one input channel per cycle |
| conv2 | 64 | two input channels per cycle |
| fc1 | 32 | |
| fc2 | 24 | |
| fc3 | 10 | |

That is 162 multipliers in all.

**Performance.** conv2 is the slowest layer: 144 outputs × 402 cycles.
Simulated single-image latency is **75,230 cycles**. Batch mode is not used
for this network.

## Departures from the published design

The design is based on a published accelerator. It departs from it in these
ways:

- **Number format.** The split into 8 integer and 8 fraction bits is a
  choice; only the 16-bit width is given. Accumulator width and rounding are
  also choices.
- **Softmax.** It is replaced by arg-max. Only the label leaves the chip.
- **Latency.** The reported single-image latency is 20,574 cycles and the
  reported conv1 time is 16,034 cycles. This design is 8.6% and 5.5% slower
  respectively. The causes:
  - the serial receive/compute control;
  - the image being loaded completely before conv1 starts.
- **fc2 time.** fc2 takes a single 130-cycle pass here; about a thousand
  cycles were reported.
- **Parallelism.** The per-layer parallelism is derived from the reported
  layer times and multiplier count. It is not given explicitly.
- **Biases.** Each convolution and fully connected output has a bias.
- **Choices made here.** The stream layout, flattening order, tie-breaking,
  FIFO depths and reset behaviour (asynchronous, active low) are all choices.
- **DMA and memory.** The AXI DMA engines and external memory are not part
  of the RTL. A testbench plays their role on the two stream ports.
- **Batch sizes.** Batches of 5 and 25 are set with `NB`, and both are
  simulated. With this structure NB = 25 needs 1,250 multipliers, because
  every image has its own arithmetic.
- **CifarNet normalisation.** The normalisation layers are not built,
  because their function is not specified. They are reached through ports
  instead.
- **CifarNet choices.** The pooling window (2x2, stride 2) and the
  parallelism are choices.
- **CifarNet latency.** The reported latency is 653.4 µs, but no clock
  period is reported with it. At the LeNet clock of 8.54 ns that is 76,510
  cycles; this design takes 75,230.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and ends with a watchdog.

- **`tb_sched_pkg.sv`** is an independent implementation of the scheduler.
  `tb_bps_sched_rom` compares the ROM contents against it. It also checks
  the hand-worked 6x6 example above.
- **`lenet_ref_pkg.sv`** is a bit-accurate model of the network: plain
  nested loops, with the same requantisation as the RTL. It generates random
  weights and images.
- **`lenet_run.sv`** is the LeNet end-to-end harness. `tb_lenet_top` and
  `tb_lenet_batch` both run it.
- **`tb_lenet_top`** runs `lenet_top` with its default parameters.
  - It streams the weights, then 24 images, and compares each label with
    the model.
  - It checks the latency and the conv1 time against the reported figures,
    allowing a 15% margin.
  - It holds back the output stream for a while, to exercise back-pressure.
  - It counts these mechanisms, and each must occur: the weight load, early
    starts of pool1, conv2 and pool2, back-pressure between layers, and
    output stalls.
- **`tb_lenet_batch`** runs two configurations at the same time, each for
  two batches:
  - NB = 5, with CONV2_CI_PAR = 2 and FIFO_DEPTH = 4;
  - NB = 25.
- **`cifar_ref_pkg.sv`** is a bit-accurate model of the CifarNet, in the same
  style as the LeNet model. It stands in for each normalisation layer by
  halving the values.
- **`tb_cifarnet_top`** runs three CifarNet images at the default parameters.
  - It applies the stand-in on the normalisation ports, with random
    handshake delays.
  - It compares the scores and labels with the model.
  - It checks the latency bound, the early layer starts, and port traffic.
- **`tb_cnn_accel_top`** runs the top with every parameter at its default.
  Both networks work at the same time: two LeNet images and one CifarNet
  image.

To run a testbench with plain Verilator (5.x), from the directory that holds
`rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/bps_pkg.sv tb/tb_sched_pkg.sv tb/lenet_ref_pkg.sv tb/cifar_ref_pkg.sv \
        tb/tb_cnn_accel_top.sv --top-module tb_cnn_accel_top -Mdir obj_top
    ./obj_top/Vtb_cnn_accel_top

For another testbench, replace `tb_cnn_accel_top` with its name. The other
modules are found through `-Irtl` and `-Itb`. Each run takes a few seconds after a
short build.
