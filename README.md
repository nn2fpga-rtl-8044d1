# A streaming CNN accelerator with low-cost residual connections

Residual networks (ResNet, MobileNetV2) are awkward for layer-pipelined
FPGA accelerators: the tensor entering a block is needed twice, once by the
convolutions of the main branch and again, much later, by the add at the end
of the block. A naive dataflow design stores the whole receptive field of the
main branch a second time in the skip path. This RTL implements a static
dataflow accelerator in which every layer is its own hardware task, all tasks
run at once on a stream of activations, and the skip path is made cheap by
three tricks:

* **Temporal Reuse.** The window buffer of the first convolution already holds
  each activation until the last window that needs it has been formed. At that
  moment it hands the activation on through a second output stream. The skip
  FIFO then only has to cover the second convolution's window:
  `[(FH-1)*IW + FW] * CH` activations, instead of the receptive field of both
  convolutions.
* **Loop Merge.** In a downsampling block, the 1x1 strided convolution of the
  short branch reads the same tensor as the strided 3x3 convolution of the
  main branch. So it runs inside the same loop, on the centre tap of the same
  window, and needs no window buffer of its own.
* **Merged add.** There is no separate adder task. The last convolution of a
  block starts its accumulators from `bias + skip << SKIP_SHIFT`.

Every compute task runs its loop at one iteration per clock. The throughput of
a network is set by its slowest task, and the per-task parallelism (channels
per beat) is a parameter. Choosing it per layer is the job of an offline
optimiser, which is not part of this RTL.

## The network in `nn2fpga_top`

At its defaults, the top is a complete ResNet8 for 32x32 RGB images
(CIFAR-10). The parameter `NBLK` sets the number of residual blocks per
stage: with `NBLK=3` the same top becomes ResNet20. Each extra block is a
`resblock_top`, followed by a one-row link FIFO like the others. The drawing
shows `NBLK=1`:

```
 in (RGB, 1 ch/beat) ─► pad ─► window buffer ─► stem conv 3x3, 3→16, ReLU
   ─► resblock_top  16 ch, 32x32        Temporal Reuse, merged add
   ─► link FIFO     one row
   ─► resblock_ds   16→32 ch, →16x16    Loop Merge, merged add
   ─► link FIFO     one row
   ─► resblock_ds   32→64 ch, →8x8      Loop Merge, merged add
   ─► pool_task     global average, 64 values
   ─► conv_task 1x1 fully connected 64→10, no ReLU
   ─► out (10 signed scores per image, 2 per beat)
```

The classifier is a `conv_task` with a 1x1 filter. Each pooled beat is treated
as its window.

Ports:
* `6*NBLK+2` parameter streams (arrays `par_valid/par_ready/par_data`), one
  per weight memory. For block k, the first convolution is at index 1+2k and
  the second at 2+2k. With `NBLK=1` the order is:
  0. stem;
  1. block 1, first convolution;
  2. block 1, second convolution;
  3. block 2, strided convolution followed by its merged 1x1 convolution;
  4. block 2, last convolution;
  5. block 3, strided convolution followed by its merged 1x1 convolution;
  6. block 3, last convolution;
  7. classifier.
* One input stream carrying one 8-bit channel per beat, three beats per pixel.
* One output stream.
* `loaded`, which goes high once every weight memory is full.

Activations may be streamed in before `loaded` rises. They wait in the stem's
window buffer.

All weights stay on chip: 77,360 weights, held in plain arrays.

### Streams and beats

Every link is a valid/ready stream. A word moves in a cycle where both signals
are high. An activation stream carries `PAR` 8-bit signed channels per beat.
The order is depth first: all `CH/PAR` beats of pixel (0,0), then pixel (0,1),
and so on, row by row. Frames follow each other with no separator. Each block
counts positions to know where a frame starts.

Parameter streams carry 16-bit words. The order for a `conv_task` is:
1. Weights, ordered by output-channel group, input-channel group, output lane,
   input lane, filter row, filter column. A weight is the low 8 bits of a word.
2. One bias per output channel, already at accumulator scale (32 bits after
   sign extension).
3. With a merged 1x1 convolution only: its weights, ordered by output group,
   input group, output lane, input lane.
4. With a merged 1x1 convolution only: its biases.

Parameters are read once after reset. Batch normalisation is assumed to be
folded into the weights and biases.

## Window buffer (`window_buffer`, `delay_line`)

A 3x3 convolution needs nine activations that are far apart in a depth-first
stream. The buffer is one long shift register, cut into `FH*FW` segments
(`delay_line`). The head of each segment is one tap of the window. Measured in
beats (`CB = ICH/PAR` beats per pixel), the segment depths are:

| segment | depth | why |
|---|---|---|
| first (newest tap) | 1 | the head register |
| between taps of one window row | `CB` | one pixel further along the row |
| between window rows | `CB*(IW-FW+1)` | the rest of a tensor row |

The total is `[(FH-1)*IW + FW-1]*CB + 1` beats. Nothing more is ever stored.
Each segment is a circular buffer: one write and one read per shift. A long
segment therefore maps onto a block RAM, not onto registers.

A beat shifts in when the previous window has been taken and, if forwarding
is enabled, when the previous forwarded beat has been taken. After the shift,
the taps form a complete window if both of these hold:
* the newest pixel is at row ≥ FH-1 and column ≥ FW-1;
* it lies on the stride grid.

In that case, the window (all `FH x FW x PAR` values) is offered on `win_*`.
With `FWD=1`, the centre tap is offered on `fwd_*` at the same time. The
centre of the current window is the oldest activation that no later window in
raster order needs from the buffer's front part. It is exactly what the skip
path needs, in stream order, one beat per input beat once the pipeline is
full.

The input is expected to be padded already (`pad_insert`), so `IH`/`IW` of a
window buffer are the padded sizes (34x34 for a 32x32 tensor).

**Not built:** windows for more than one output pixel per cycle (`ow_par > 1`,
where each activation skips several segments). The buffer always delivers one
window per offer.

## Convolution task (`conv_task`)

The loop nest runs one iteration per cycle:

```
for each output pixel                     (one window per input-channel group)
  for each input-channel group  ig        (ICH/ICH_PAR)
    for each output-channel group og      (OCH/OCH_PAR)
      acc[og][0..OCH_PAR-1] += sum over ICH_PAR x FH x FW of w * a
```

A window is held in a register for the `OCH/OCH_PAR` iterations that use it.
The partial sums of all output groups of the current pixel live in an
accumulator buffer, `acc[OCH/OCH_PAR][OCH_PAR]`:
* The first input group starts each sum from the bias. With `HAS_SKIP`, the
  skip value shifted left by `SKIP_SHIFT` is added to that start.
* The last input group requantises the sum and writes `OCH_PAR` outputs.

A pixel takes `(ICH/ICH_PAR)*(OCH/OCH_PAR)` cycles. The outputs leave in
channel order, so the output stream is again depth first with `OCH_PAR`
channels per beat.

The multiply-adds are `OCH_PAR` chains (`dsp_chain`) of `ICH_PAR*FH*FW`
stages each. The partial sum runs down the chain, one stage per cycle, and
each stage adds one product. This is the pattern of cascaded DSP slices.
Operand k is delayed by k cycles so that the chain still accepts a new input
set every cycle. The sum leaves `ICH_PAR*FH*FW` cycles after the operands
enter. The read-modify-write of the accumulator buffer adds one more cycle.
That read-modify-write completes within one cycle, so back-to-back
iterations on the same output group need no forwarding.

Flow control: the whole pipeline holds when any of these is true:
* the output register is full and not taken;
* the merged 1x1 output is full and not taken;
* a skip value is due and has not arrived.

Windows are taken only after all parameters are in.

Variants selected by parameters:
* `MERGE_PW=1` (Loop Merge). A second, `ICH_PAR`-long chain per output lane
  multiplies the centre tap by 1x1 weights, with its own accumulator buffer
  and bias. Its results come out signed (no ReLU) on `pw_*`, in the same cycle
  as the main output.
* `DEPTHWISE=1`. Each of the `ICH_PAR` lanes has its own `FH*FW` chain and
  filter. There is no sum across channels and no output-channel loop (OCH = ICH).

### DSP packing (`dsp_pack2`)

With `PACK=2`, two products that share an activation are computed on one
multiplier:

```
(w1 * 2^18 + w0) * a = w1*a * 2^18 + w0*a
```

The low 16 bits give `w0*a`. The high part gives `w1*a` after adding back the
borrow that a negative `w0*a` takes from it. The packed weight is 27 bits wide, the width of a DSP
slice's wide multiplier input. Both `dsp_pack2` and the plain path produce the same sums.

### Requantisation (`requant`)

An accumulator is converted back to an 8-bit activation by a power-of-two
scale: add `2^(SHIFT-1)`, shift right arithmetically by `SHIFT`, then clip.
The clip range is `[0,127]` with ReLU and `[-128,127]` without.

## Residual blocks

### Without downsampling (`resblock_top`)

```
in ─► pad ─► wb0 ──win──► FIFO(4) ─► conv0 (ReLU) ─► FIFO(4) ─► pad ─► wb1 ──win──► FIFO(4) ─► conv1 ─► out
              └──fwd (centre taps)──► skip FIFO [(FH-1)*IW+FW]*CH/PAR beats ─────────────────► skip
```

conv1 is `conv_task` with `HAS_SKIP=1`. The window FIFOs keep the window
buffers shifting while a convolution is still using the previous window. This
is needed to hold one iteration per cycle over a whole row.

The skip FIFO has exactly the reduced size given above, 536 beats at the
defaults. At full rate it peaks at about 282 beats and never fills.

### With downsampling (`resblock_ds`)

```
in ─► pad ─► wb0 (stride 2) ─► FIFO ─► conv0 + merged 1x1 (stride 2) ─out─► FIFO ─► pad ─► wb1 ─► FIFO ─► conv1 ─► out
                                                                    └─pw──► skip FIFO [(FH-1)*OW+FW]*OCH/PAR beats ─► skip
```

The 1x1 short-branch convolution uses the centre tap of conv0's strided
window. With same padding, that tap is pixel (2r, 2c) of the unpadded input:
exactly what a stride-2 1x1 convolution reads. The skip FIFO size applies the
same formula to conv1's input tensor.

### Frame boundaries and throughput

A block needs `IH*IW*(CH/PAR)^2` cycles per frame for each 3x3 convolution.
A downsampling block halves the rows and columns and doubles the channels, so
its cost is the same. The whole network is therefore balanced, and the 3x3
convolutions set its frame period. The stem and the classifier are much
cheaper.

On top of that, there are two overheads:
* The window buffers also shift the padding beats.
* At a frame boundary, each block's second convolution idles for about one of
  its output rows, while its first convolution refills the window buffer with
  the first rows of the next frame.

Measured at the defaults:

| configuration | cycles per frame | ideal |
|---|---|---|
| `resblock_top` alone | 68,817 | 65,536 |
| whole ResNet8 | 79,892 | 65,536 |

That is about 3,100 images/s at 250 MHz with `PAR=2`.

The one-row link FIFOs between the blocks matter. Adjacent blocks run at
exactly the same rate, and without the FIFOs each one passes its local stalls
to the next. The frame period then grows by almost half.

## Padding and pooling

* `pad_insert` puts a zero border around a depth-first tensor, for same-padded
  3x3 convolutions. It is a counter over the padded tensor. On the border it
  emits zero beats. Elsewhere it passes the input beat through with no
  register.
* `pool_task` reduces each channel over the whole tensor to its average or
  maximum (`MODE`). The running values are kept per channel group. The beat of
  the last pixel completes a group, so a frame yields `CH/PAR` beats while its
  last pixel streams in. The average rounds half away from zero.

## Where this RTL departs from, or adds to, the original architecture

* The architecture leaves out the following, and this design adds them:
  * the valid/ready handshake, with an asynchronous active-low reset;
  * the order of the parameter streams;
  * the padding task;
  * the skip scale `SKIP_SHIFT`;
  * the rounding of requantisation and pooling;
  * the window FIFOs and the link FIFO between blocks.
* Not built:
  * windows for several output pixels at once (`ow_par > 1`);
  * 4-bit packing (four products per DSP);
  * DMA engines and external memory (the streams are the top's ports);
  * the optimiser that picks the parallelism of each layer.
* The top covers ResNet8 and ResNet20 (`NBLK`). No top is assembled for
  MobileNetV2. Its inverted-residual blocks would use the depthwise
  `conv_task` and 1x1 convolutions.
* The parallelism is `PAR=2` in every task. Matching the published ResNet8
  throughput would need roughly 8x more multiply-adds per cycle in each 3x3
  convolution.
* Widths: 8-bit activations and weights, 32-bit accumulators, 16-bit
  parameter words.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `nn2fpga_top` | `IN_CH, CH, IH, IW, NCLASS` | 3, 16, 32, 32, 10 | input channels, first-stage width, image size, classes |
| | `NBLK` | 1 | residual blocks per stage (1: ResNet8, 3: ResNet20) |
| | `PAR` | 2 | channels per beat in every task |
| | `PACK` | 2 | 2: two products per multiplier |
| | `SHIFT, SKIP_SHIFT` | 6, 6 | requantisation and skip scale shifts |
| `conv_task` | `ICH, OCH, FH, FW` | 16, 16, 3, 3 | layer shape |
| | `ICH_PAR, OCH_PAR` | 2, 2 | unroll factors |
| | `HAS_SKIP, MERGE_PW, DEPTHWISE, RELU` | 0, 0, 0, 1 | variants |
| `window_buffer` | `IH, IW, STRIDE, FWD` | 34, 34, 1, 0 | padded size, stride, forward stream |
| `pool_task` | `CH, IH, IW, MODE` | 32, 16, 16, avg | |

Shared types and the buffer-size formulas (`window_buffer_size`,
`skip_buffer_size`) are in `rtl/nn2fpga_pkg.sv`.

## Simulation

Each testbench in `tb/` is self-checking:
* It ends by printing `TB_RESULT checks=N failures=M`.
* It has a watchdog.
* The block-level tests compare against integer models written in the
  testbench.

The end-to-end tests also count each mechanism and fail if one never
happened:
* skip beats forwarded;
* skip values added;
* merged 1x1 results;
* windows held until the parameters arrived;
* input and output stalls;
* overlapping frames;
* a bounded frame period.

| testbench | what it runs |
|---|---|
| `tb_nn2fpga_full` | whole ResNet8 at its defaults, 3 images (about 2 minutes to build and run with Verilator) |
| `tb_nn2fpga_top` | whole network (ResNet8 layout) at 4/8/16 channels, 8x16 pixels, 4 classes, 4 images |
| `tb_nn2fpga_resnet20` | the same in the ResNet20 layout (`NBLK=3`) |
| `tb_resblock_full`, `tb_resblock_top` | block without downsampling, full size and reduced |
| `tb_resblock_ds` | downsampling block, reduced |
| `tb_conv_task`, `tb_conv_depthwise` | convolution task: plain, skip, merged 1x1, full-rate timing; depthwise |
| `tb_window_buffer`, `tb_dsp_chain`, `tb_dsp_pack2`, `tb_requant`, `tb_pad_insert`, `tb_stream_fifo`, `tb_pool_task` | the single blocks |

To run one:

```
verilator --binary --timing --assert --top-module tb_nn2fpga_full \
    rtl/nn2fpga_pkg.sv $(ls rtl/*.sv | grep -v pkg) tb/tb_nn2fpga_full.sv
./obj_dir/Vtb_nn2fpga_full
```

The package must come first on the command line.

Known lint warnings:
* width extensions on loop counters;
* the unused upper bits of the packed product in `dsp_pack2`;
* `rst_n` used both as an asynchronous reset and in the `disable iff` of the
  handshake assertions.
