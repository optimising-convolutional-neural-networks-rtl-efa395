# Streaming CNN layer kernels for FPGAs

This is a library of convolutional-neural-network layers written as
streaming hardware, plus a complete LeNet-5 built from them. Every layer is a
kernel that takes its feature map, its coefficients and its output as
valid/ready streams. The layers can be chained through FIFOs, so a whole
network runs on chip with no memory traffic between layers. Each layer is
parameterised by how much it does per clock cycle. Throughput and resource use
can then be traded against each other one layer at a time.

The structure follows the MaxDeep / RubyConv design in the thesis
*Optimising Convolutional Neural Networks for Reconfigurable Acceleration*:
- reduction trees built from pipelined binary adders;
- a convolution layer with three levels of parallelism;
- binarised and depthwise-separable variants;
- LeNet-5 as the case study.

The handshakes, the fixed-point rules and some buffer policies were chosen
for this implementation. These choices are listed below.

## The three parallelism knobs

A convolution layer maps an H x W x C input to an (H-K+1) x (W-K+1) x F output
with K x K kernels, using stride 1 and no padding. Three parameters set the
work per cycle:

| knob | meaning | what it multiplies |
|------|---------|--------------------|
| `PC` | input channels per cycle | width of the input beat, depth of the adder tree across channels |
| `PF` | filters per cycle | number of coefficient sets held, width of the output beat |
| `PK` | adjacent output pixels per cycle | pixels per input beat, windows per cycle |

An input beat carries PC channels x PK horizontally adjacent pixels. An
output beat carries PF filters x PK pixels. The array holds PF x PC x PK
*cores*, and each core is K*K multipliers followed by an adder tree. The
compute phase takes F*C*H*W / (PF*PC*PK) cycles. The testbench checks this
cycle count.

## Filter-major sequence and the four buffers (`conv_layer`)

The layer computes in *filter-major* order:

1. **Load.** The whole input map goes into the *ifmap buffer*, channel
   group by channel group, with rows in order. The buffer holds
   C*H*W/(PC*PK) beats.
2. **Compute.** For each filter group (PF filters) and each channel group
   (PC channels):
   - one coefficient beat is taken into the *coeff buffer*, which is a
     register;
   - the channel group is read out of the ifmap buffer, one beat per
     cycle;
   - the beats pass through the *line buffer* into the array.
3. **Accumulate.** The *ofmap buffer* holds one accumulator per output
   pixel of the current filter group. Its depth is (H-K+1)(W-K+1)/PK
   words of PF x PK values. Partial sums are added into it over the C/PC
   channel groups.
4. **Output.** On the last channel group the finished sum goes out
   instead of being stored. It is shifted right by `FRAC`, saturated to
   `BW` bits and passed through a ReLU if `RELU` = 1.

Only the filter-major order is built. The channel-major and pixel-major
orders the method also describes are not implemented. A new map's load waits
until the current map is finished.

**Line buffer.** The line buffer (`line_buffer`) is a shift register of
(K-1) input rows plus a few beats. Each cycle it presents PK windows of
K x K pixels for every one of the PC channels. It requires:
- W divisible by PK;
- (K-1) divisible by PK.

With these, every output beat is one aligned group of PK windows. For
example, K = 3 and K = 5 work with PK = 1 or 2. K = 1 works with any PK.

**Pipeline and stalls.** The datapath runs as follows:
- line buffer;
- a register stage holding the window, the coefficients and a small
  metadata record (first/last channel group, filter group, output index);
- the array, with latency clog2(K²) + clog2(PC);
- a delay line for the metadata;
- a read-modify-write of the ofmap buffer;
- an output FIFO.

A single enable freezes the whole pipeline. The enable drops when the output
FIFO lacks room for the results already in flight. Back-pressure at the
output therefore never drops data. An assertion checks that no push finds the
FIFO full.

## Adder trees (`pbrt`, `dot_core`, `dot_product`, `conv_array`)

`pbrt` adds N values in a binary tree with one register per level. Its
latency is ceil(log2 N). An odd leftover value at a level is registered and
passed up.

`dot_core` is the K*K multiply-and-reduce of one window. `conv_array` puts
PF x PC x PK cores side by side. It adds the PC channel results of each
(filter, pixel) pair with a second `pbrt`.

`dot_product` is the general vector version. It has V multipliers and a
V-input tree, and accumulates N/V chunks. The result is valid
ceil(log2 V) + N/V cycles after the first chunk. The fully-connected layer
uses it.

## Binarised convolution (`bconv_layer`)

This is the same layer with `BINARY` = 1:
- operands are 1 bit wide, with +1 coded as 1 and -1 as 0;
- each multiplier becomes an XNOR;
- the adder tree counts the agreeing bits, which is the popcount.

The layer accumulates the count over all C channels. It outputs 1 when the
count is greater than the filter's threshold `thr[f]`. The threshold is the
binarised batch normalisation folded into one number per filter. A ±1 dot
product of length L equals 2·count − L, so a threshold on the ±1 sum
translates directly into one on the count. The defaults use
PF = PC = 32 and PK = 2.

## Depthwise separable convolution (`dw_conv`, `dsc_layer`)

`dw_conv` convolves each channel with its own K x K kernel, PC channels at a
time. It has a line buffer and one core per (channel, pixel) pair, and there
is no sum across channels. Each result is shifted by `FRAC` and saturated to
`BW`.

`dsc_layer` feeds the depthwise output into a standard `conv_layer` with
K = 1, which is the pointwise stage. The two stages take their coefficients
on two separate streams. The defaults are 16-bit data with
PF = PC = 16 and PK = 2.

## The other layers

- **`fc_layer`.** Computes y[r] = Σ w[r][i]·x[i]. It stores the input
  vector once in NIN/PC beats of PC values. It then streams the weights
  row group by row group, with PR rows at a time and PC inputs per beat,
  into PR `dot_product` units. The outputs go through the same
  shift/saturate/ReLU rule and an output FIFO.
- **`maxpool`.** 2 x 2 pooling with stride 2. H and W must be even.
  - Pixel pairs are reduced inside a beat, or across two beats when
    PK = 1.
  - A row buffer keeps the even-row maxima, and the odd row completes
    them.
  - The output beat carries PK/2 pixels, or 1 pixel when PK = 1.
- **`relu`.** Outputs the value if it is positive and 0 otherwise.
- **`batchnorm`.** Computes y = sat(((x − mean[c]) · scale[c]) >>> FRAC).
  The per-channel table is written through a configuration port before
  use. `scale` holds 1/sqrt(var + ε), times any learned gain. The channel
  of a beat is found by counting beats, with C/P frames of FRAME beats.
- **`stream_fifo`.** A register FIFO with first-word fall-through. It is
  used between layers and at every layer output.

## LeNet-5 (`lenet5`)

```
28x28x1 -> conv0 5x5x32 +ReLU -> pool -> conv1 5x5x64 +ReLU -> pool
        -> fc0 1024->1024 +ReLU -> fc1 1024->10 -> 10 scores
```

The parallelism of each layer is chosen so that it reads its producer's
stream in the order and width in which it is produced:

| layer | PC | PF / PR | PK |
|-------|----|---------|----|
| conv0 | 1 | PF = PP0 | 2 |
| pool0 | — | — | 2 → 1 |
| conv1 | PP0 | PF = 1 | 1 |
| fc0 | 1 | PR = PP1 | — |
| fc1 | PP1 | PR = PP2 | — |

conv0 emits one filter group after another, which is exactly the
channel-group order conv1 reads. conv1 emits whole channels, which flattens
the 4x4x64 map in channel, row, column order for fc0.

The defaults are:
- PP0 = 4, PP1 = 4, PP2 = 2;
- 8-bit data with 6 fraction bits (`FRAC` = 6) in every layer.

An image takes about 350,000 cycles. Most of them are spent in conv1 and in
streaming fc0's million weights.

## Top level (`maxdeep_top`)

The top places four independent units side by side. Each has its own ports,
under its own prefix:

| prefix | unit | configuration |
|--------|------|---------------|
| `net_` | LeNet-5 | 8-bit |
| `bcv_` | binarised layer | 32x32x32 input, 32 filters, PF = PC = 32, PK = 2 |
| `dws_` | depthwise separable layer | 16-bit, 32x32x32, 32 filters, PF = PC = 16, PK = 2 |
| `bn_` | batch normalisation | 32 channels, 8 x 2 values per beat |

Whatever supplies the streams is outside this design, such as a host
processor and the off-chip memory behind it.

The stand-alone `conv_layer` defaults are a 32x32x32 input, 32 filters,
K = 3, PF = PC = 8, PK = 2 and 8-bit data. This is the configuration the
method found best for a single layer. Its source disagrees on the width, 8
or 16 bits, and 8 bits is used here. This layer is not instantiated in the
top. It is exercised on its own and inside LeNet-5.

## Numbers and conventions

- **Reset.** Synchronous, active low (`rst_n`).
- **Handshakes.** All streams are valid/ready. A beat moves when both are
  high at a clock edge.
- **Fixed point.** Two's complement, with products summed at full width
  and no rounding. The result is shifted right arithmetically by `FRAC`
  and saturated to `BW` bits. The shift-and-saturate function is
  `cnn_pkg::shift_sat`.
- **Coefficient order.** Coefficient beats are ordered by filter group
  first, then channel group. Kernel taps are row-major (index i*K + j).

## Departures and limits

- Only the filter-major sequence is implemented. There is no runtime
  switching of sequence or of parallelism.
- The ifmap buffer holds a whole map, and loading and computing do not
  overlap.
- PK is limited to values that divide both W and K−1.
- There is no padding and no stride other than 1 in the convolutions.
- Pooling is max only, 2 x 2.
- The batch-normalisation table is loaded through a port rather than fixed
  at build time.
- The floating-point baseline network is not reproduced. All arithmetic is
  fixed point.
- The host processor, the off-chip memory and the host link are not
  modelled.

## Verification

Each module has a self-checking testbench in `tb/`. It compares against a
reference model written directly in the testbench, applies random
back-pressure and ends with a `TB_RESULT checks=… failures=…` line. Where a
latency or rate is defined, the cycle count is checked too:
- the pbrt and dot-product latencies;
- the conv-layer compute time;
- the fc-layer weight phase.

- **`tb_lenet5`.** Runs two images back to back through the full-size
  network and checks all class scores. It also checks that each of these
  happened: output stalls, coefficient waits, waits on the inter-layer
  queue, pooling, ReLU clipping and saturation.
- **`tb_maxdeep_top`.** Runs the top with every parameter at its default,
  one full operation per unit. It checks about 90,000 output values and
  counts each mechanism (binary ones and zeros among them). It takes about
  five minutes in Verilator.

Simulate with plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
    --top-module tb_conv_layer rtl/cnn_pkg.sv tb/tb_conv_layer.sv
./obj_dir/Vtb_conv_layer
```

`tb/lenet5_stim.svh` holds the LeNet-5 stimulus and reference model that
both network-level testbenches include.
