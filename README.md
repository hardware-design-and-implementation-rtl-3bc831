# A layer-pipelined SqueezeNext-14 accelerator for CIFAR-10

This accelerator classifies 32x32 RGB images into the ten CIFAR-10 classes with
SqueezeNext-14, a small residual CNN. Every layer of the network has its own
hardware, with its own multipliers, memories and controller. The layers form a
pipeline: while layer 5 works on image *n*, layer 4 can already work on image
*n+1*. Each layer writes its results straight into the input memories of the
next layer. A central stall controller decides which layers may run. It freezes
the others by gating their clocks.

The design is written in synthesizable SystemVerilog. Its sizes are those of the
original FPGA implementation, which targeted a Virtex-7 690T at 100 MHz:

- 16-bit fixed point
- 18-bit accumulation
- 3328 multipliers

It has been simulated bit-exactly against a behavioural reference, at full size
and end to end.

## The network and how it is cut into layers

SqueezeNext-14 consists of:

- a 3x3 input convolution (conv1);
- twelve SqueezeNext blocks;
- a final 1x1 convolution;
- a global average pool;
- a 128-to-10 fully connected (FC) layer.

A block is a chain of five convolutions:

1. 1x1 reduce
2. 1x1 reduce
3. 3x1
4. 1x3
5. 1x1 expand

The block input is added to the result at the end (the shortcut). When a block
changes the number of channels or strides by 2, the shortcut first passes
through its own 1x1 convolution, the "projection".

Batch normalisation is folded into the weights and biases before they are
loaded, so the hardware only sees convolutions with bias.

In the textbook network, block 2 opens with stride-2 1x1 convolutions. Here
the stride is moved back into block 1's shortcut (conv2) and last convolution
(conv7). Subsampling commutes with 1x1 convolutions, with the addition and with
ReLU, so the results are identical. Block 1 then computes only the quarter of
its output pixels that block 2 actually uses. This cuts the work per image from
32,593,920 to 30,865,920 multiply-accumulates (MACs), and layer 2's time from
18,900 to 12,150 cycles.

The hardware uses **one layer per block**:

| HW layer | convolutions | feature map in -> out | PC x PF | multipliers |
|---|---|---|---|---|
| 1  | conv1 3x3, no padding | 32x32x3 -> 30x30x64 | 3 x 64 | 192 |
| 2  | block 1, projection; conv2 and conv7 at stride 2 | 30x30x64 -> 15x15x32 | 16 x 16 | 256 |
| 3  | block 2, projection | 15x15x32 -> 15x15x64 | 16 x 16 | 256 |
| 4  | block 3, identity shortcut | 15x15x64 -> 15x15x64 | 16 x 16 | 256 |
| 5  | block 4, stride 2, projection | 15x15x64 -> 8x8x128 | 16 x 16 | 256 |
| 6-12 | blocks 5-11, identity (identical shapes) | 8x8x128 -> 8x8x128 | 16 x 16 | 7 x 256 |
| 13 | block 12, stride 2, projection | 8x8x128 -> 4x4x256 | 16 x 16 | 256 |
| 14 | conv66 1x1, average pool, FC | 4x4x256 -> 10 scores | 8 x 8 | 64 |

- PC is the number of input channels a filter takes per cycle.
- PF is the number of filters working in parallel.
- A layer therefore has PC x PF multipliers.

The whole table lives in `sqnxt_pkg::net_layer()`. Each convolution of a block
is one **stage** in that table. A stage entry gives:

- the input width and height;
- input and output channels;
- kernel size, stride and padding;
- the memory the stage reads, the memory it writes, and the memory that holds
  its shortcut operand;
- whether ReLU is applied.

Everything else (memory depths, weight addresses, lane counts) is derived from
the table by package functions. A different network of the same style can be
mapped by editing that one function.

## Inside a layer (`sqnxt_layer`)

All stages of a layer share one **filter bank** of PF `conv_filter`s and run
one after the other.

Each filter works as follows:

- It multiplies PC feature values by PC weights.
- The 32-bit products are cut to 18 bits, keeping 13 fraction bits.
- A pipelined `adder_tree` sums them, with one register per level.
- An accumulator adds up the successive tap groups of one output value. It is
  preset with the bias on the first group.

Filter latency is `3 + clog2(PC)` cycles.

### Feature memories

A layer has four feature memories, plus a fifth in layer 14:

| memory | holds |
|---|---|
| M1 | The block input, written by the previous layer. After the first stage has read it, it becomes scratch space. |
| M2 | A second copy of the block input. The previous layer writes it in the same cycles as M1. It is kept until the last stage needs it as the identity shortcut. |
| M3 | Scratch space. Stages alternate between M1 and M3: read one, write the other. |
| M4 | The result of the projection shortcut. It is computed as the first stage, from M2. |
| PMEM | Layer 14 only: the 128 averaged values that feed the FC stage. |

Each feature memory is a `data_memory`: BANKS one-write/one-read RAMs
(`simultaneous_memory`), where BANKS is the wider of PC and PF. Channel *c* of
pixel *p* is stored in bank `c mod BANKS`, at word `(c div BANKS) * H*W + p`.
A stage can therefore read PC consecutive channels of one pixel in a single
cycle. It can also write PF consecutive channels in a single cycle, at any
channel offset. Lanes beyond the real channel count are masked. This happens
for conv1 (3 channels) and for the 8-channel stage of block 1.

### Last stage of a block

The last stage of a block writes through the layer's `out_*` port into the next
layer's M1 and M2. It does not write a local memory. No separate copy step runs
between layers.

The result path after the filter is two register stages:

1. **Stage A.** The accumulator value is captured, and the shortcut operand
   (M2 or M4, same pixel and channels) is read.
2. **Stage B.** The shortcut operand is added to the 18-bit accumulator. Then
   ReLU is applied (except in the FC stage). Finally the value is saturated to
   16 bits and written.

### Weights and biases

Weights sit in one `weight_memory` per filter lane. Each word of it holds PC
weights. Biases sit in one `bias_regfile` per filter lane, with 18-bit entries.
The weights and biases of all the layer's stages are stored back to back.

## The layer controller (`layer_controller`)

The controller is a set of nested counters. From outer to inner they run over:

1. stage
2. filter group (PF output channels)
3. output row
4. output column
5. channel group (PC input channels)
6. kernel row
7. kernel column

Every cycle of a running layer issues one **tap group** to the filter bank. A
tap group is one pixel, PC channels, and the matching weights of PF filters.

For each tap group the controller computes these addresses combinationally from
the counters:

- **Input pixel:** `(row*stride + kernel_row - pad)` and
  `(col*stride + kernel_col - pad)`, with a pad flag that zeroes the operand
  when it falls outside the map.
- **Weight word:** `wbase + ((fg*CG + cg)*KH + j)*KW + k`.
- **Bias:** `bbase + fg`.

It also produces first/last markers and the output pixel and channel. These
travel down a delay line beside the filter pipeline, so the write address
arrives together with the result it belongs to.

After the last tap of a stage the controller waits a fixed drain time. The
results in flight are written, and only then does the next stage read them.
`done` pulses after the last stage drains.

Cycles per image for a layer: the sum over its stages of

```
out_pixels * ceil(co/PF) * ceil(ci/PC) * kh * kw  +  drain (filter latency + 6)
```

This is 8100 cycles for layer 1, 12,150 for layer 2, 8224 for layer 14, and
9000-10,240 for the others.

## Moving images through the pipeline (`stall_controller`, `clock_gate`)

Between layer *i-1* and layer *i* sits the input memory pair (M1/M2) of layer
*i*. The stall controller keeps two flags per layer:

- **full[i]:** the input memory holds a whole image.
- **busy[i]:** the layer is working on it.

The rules are:

- `full[0]` is set when the image controller has loaded the last pixel of an
  image.
- Layer *i* **starts** when `full[i]` is set, it is not busy, and `full[i+1]`
  is clear (its output memory has been consumed). The last layer needs only its
  input.
- When layer *i* finishes, `full[i]` is cleared and `full[i+1]` is set.
- A layer that has input but must wait for its output memory is **stalled**.

Each layer's enable is `busy | start`. It drives a latch-based clock gate: an
active-low latch followed by an AND gate. The enable can change at any time
without clipping or adding clock pulses. A frozen layer's registers do not
toggle at all. The memories stay on the free clock, so a frozen layer can still
receive the next image from its predecessor. In the testbench, the previous
layer writing into a busy layer's memories is counted as "load while busy".

Because each layer has only one input memory, layer *i* cannot start image
*n+1* until layer *i+1* has finished image *n*. The steady-state interval is
therefore set by the slowest **pair** of adjacent layers: layers 1 and 2,
8100 + 12,150 cycles plus drains. Measured in simulation at full size:

| | this design | original implementation |
|---|---|---|
| cycles to the first result | 132,505 | 129,678 |
| cycles between results | 21,312 | 10,805 |
| images/s at 100 MHz | about 4,690 | about 9,255 |

The original reached 10,805 cycles in three ways:

- It split block 1 over five separate layers.
- It started each layer at fixed cycle offsets, before the previous layer had
  finished, using a hand-timed schedule.
- It interleaved the projection shortcut with the main convolution.

See "Departures" below.

## The last layer: pooling, FC and class decision

Layer 14 runs two stages.

**conv66** (256 -> 128 channels on the 4x4 map) writes into `avg_pool` instead
of a memory. The pool has 8 accumulators, one per filter lane. Each adds the 16
pixels of its channel and shifts right by 4. The resulting 128 averages are
stored in PMEM.

**The FC stage** is a 1x1 "convolution" of the 1x1x128 PMEM vector to 10
outputs, without ReLU. Its 10 results leave through the layer's output port.
In `sqnxt_top` they are caught in ten 16-bit score registers.

When layer 14 finishes, `comparator_tree` picks the largest score in 4
pipelined levels, taking the lower index on a tie. The top then presents:

- `class_idx`, the 4-bit class;
- `class_valid`;
- `class_img_id`, the sequence number of the image;
- `scores`, all ten scores.

## Number format

- Feature maps and weights are 16-bit two's complement with 13 fraction bits
  (Q3.13).
- Products are truncated to 18 bits, keeping 13 fraction bits.
- Adder trees, accumulators, shortcut additions and biases are 18 bits and wrap
  on overflow.
- Values are saturated to 16 bits when they are stored.

Truncation and saturation are this design's choices.

## Using the top (`sqnxt_top`)

`sqnxt_top` has no parameters. It runs on one clock `clk` with an asynchronous
active-low reset `rst_n`. Load all weights and biases before the first image.

**Weights** (`wl_we`, `wl_layer`, `wl_lane_f`, `wl_lane_c`, `wl_addr`,
`wl_data`). Write one 16-bit weight per cycle. For layer *L*, stage *s*, output
channel *o*, input channel *c* and kernel tap *(j,k)*, drive:

- `wl_layer` = *L*
- `wl_lane_f` = `o % PF`
- `wl_lane_c` = `c % PC`
- `wl_addr` = `stage_wbase(L,s) + (((o/PF)*ceil(ci/PC) + c/PC)*kh + j)*kw + k`

The testbench function `w_addr()` in `tb/sqnxt_ref_pkg.sv` computes this
address.

**Biases** (`bl_*`). Write one 18-bit bias per cycle:

- `bl_lane` = `o % PF`
- `bl_addr` = `stage_bbase(L,s) + o/PF`

**Images.** Send images as a valid/ready stream with one pixel per beat:

- `img_pix`: the pixel index, row*32 + col;
- `img_data[0..2]`: R, G, B in Q3.13;
- `img_last`: set on pixel 1023.

`img_ready` falls while layer 1 still holds the previous image. Images can be
sent back to back, and they are processed overlapped.

`layer_busy` and `layer_stalled` show the pipeline state per layer.

## Departures from the original design

- **14 instead of 18 hardware layers.** The five convolutions of block 1 share
  one 16x16 bank instead of five smaller banks. The total is 3328 multipliers,
  the same as the original after its DSP optimisation. The seven identical
  middle blocks are seven copies of one layer configuration, each with its own
  controller, where the original shared one controller between them.
- **Handshake-driven stall controller.** The original used a fixed start/freeze
  schedule with a 10,805-cycle period. This one uses full/busy flags, which need
  no timing table but cost throughput (see above).
- **Sequential projection shortcut.** The projection runs as an extra first
  stage into M4. The original interleaved it, one output at a time, with the
  main convolution.
- **One number format (Q3.13) in every layer.** The original moved the radix
  point per layer to gain accuracy.
- **Writable weight memories with load ports.** The original used ROMs filled
  at configuration time.
- **No FPGA clocking, debug or ASIC macros.** The board clock buffer, the
  MMCM/PLL, the VIO/ILA debug cores and the ASIC SRAM macros are not part of
  the RTL. The design takes a single clock, and its memories are plain arrays
  that a synthesis tool can map to block RAM.
- **Unverified widths.** The 18-bit product truncation and the 16-bit saturation
  of the FC scores were not checked against a trained network. Classification
  accuracy has not been measured, because no trained weights were available.
  The testbenches use pseudo-random weights scaled by fan-in.

## Verification

Every RTL module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values come from
code written independently of the RTL. `tb/sqnxt_ref_pkg.sv` is a bit-exact
behavioural model of the arithmetic: convolution with the same truncation,
wrapping and saturation, pooling and FC. Its weight, bias and pixel generators
are hash functions, so testbench and model agree without data files.

| testbench | what it shows |
|---|---|
| `tb_adder_tree`, `tb_conv_filter` | sums and accumulation against the model; exact latencies |
| `tb_simultaneous_memory`, `tb_data_memory`, `tb_weight_memory`, `tb_bias_regfile` | simultaneous read/write; bank interleaving at arbitrary channel offsets; lane masks |
| `tb_layer_controller` | every issued address, flag and output coordinate of a full layer against a loop-nest model |
| `tb_clock_gate` | gated clock has no glitches under random enable changes in both clock phases |
| `tb_stall_controller` | start conditions, stalls and steady-state interval with model layers |
| `tb_image_controller`, `tb_avg_pool`, `tb_comparator_tree` | stream handling, averages and arg-max with ties |
| `tb_sqnxt_layer` | two reduced layers (projection block with stride and padding; pooling + FC) against the model, including cycle counts |
| `tb_sqnxt_top` | whole accelerator at full size (see below) |

`tb_sqnxt_top` runs the unmodified top. It does the following:

1. Loads all 527,586 weights and biases.
2. Streams three images, with the third sent while the first is still in the
   pipeline.
3. Compares all 30 scores and the three classes bit-exactly with the model.

It also counts how often the pipeline mechanisms occurred:

- layers stalled;
- layers running concurrently;
- loads into a busy layer;
- frozen (clock-gated) layer-cycles.

The test fails if any of these never happened. It passes with all four seen.
The Verilator build takes about 5 minutes, and the simulation about 2 minutes.

To run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style \
  -y rtl -y tb +libext+.sv rtl/sqnxt_pkg.sv tb/sqnxt_ref_pkg.sv \
  tb/tb_sqnxt_top.sv --top-module tb_sqnxt_top -Mdir obj -o sim
./obj/sim
```

Substitute any other `tb_*` for a unit test.

Because Verilator is a two-state simulator, all state that is read is reset.
Testbenches drop `rst_n` one time step after start, so that the asynchronous
reset sees an edge.
