# H-WNN: a hybrid quantized-CNN / weightless-network inference engine

Binarized and low-bit CNNs are cheap in their first convolution layers, but
the deep layers (many channels, large weight memories) and the fully
connected classifier dominate LUT and block-RAM usage on a small FPGA. A
weightless neural network (WNN) classifies with lookup tables instead of
multiply-accumulates and needs no weight memory at all, but on its own it
cannot learn position-invariant features from images.

This engine combines the two. The early layers of a CNV-6 style quantized
CNN (3x3 convolutions, 2x2 max-pooling) extract spatial features; everything
after the second pooling stage is replaced by a differentiable weightless
network (DWN): the activation map is flattened, thermometer-encoded, passed
through two layers of 6-input lookup tables, and the table outputs are
counted per class. The class with the highest count wins.

```
pixel stream 32x32x3, 8-bit
  Conv1 3x3, 64 ch  -> 30x30x64
  Conv2 3x3, 64 ch  -> 28x28x64  -> MaxPool -> 14x14x64
  Conv3 3x3, 128 ch -> 12x12x128
  Conv4 3x3, 128 ch -> 10x10x128 -> MaxPool -> 5x5x128
  flatten (3200 activations) -> thermometer code
  LUT layer 1: 2000 x LUT6 -> LUT layer 2: 1000 x LUT6
  popcount per class (100 tables each) -> argmax -> class 0..9
```

The default configuration uses 1-bit weights and 1-bit activations (1w1a);
2-bit weights and activations (2w2a) are a parameter change.

## Files

| File | Contents |
|---|---|
| `rtl/hwnn_pkg.sv` | configuration bus type, target codes, network constants, LUT wiring function |
| `rtl/hwnn_top.sv` | the engine: four convolution layers, two max-pools, flatten, DWN |
| `rtl/conv_layer.sv` | one convolution layer = `swu` + `mvtu` |
| `rtl/swu.sv` | sliding window unit (line buffer, 3x3 windows) |
| `rtl/mvtu.sv` | matrix-vector-threshold unit (weights, thresholds, folding) |
| `rtl/maxpool.sv` | streaming 2x2 max-pool |
| `rtl/flatten.sv` | gathers the 5x5x128 map into one vector |
| `rtl/dwn.sv` | weightless classifier = `thermo_enc` + 2 x `lut_layer` + `popcount` + `argmax` |
| `rtl/thermo_enc.sv`, `rtl/lut_layer.sv`, `rtl/popcount.sv`, `rtl/argmax.sv` | its stages |
| `tb/tb_<module>.sv` | self-checking testbench of each module above; `tb_hwnn_top` runs the whole engine at its default size |

## Number formats

* A 1-bit activation or weight is bipolar: bit 1 means +1, bit 0 means -1.
  The product of two such values is an XNOR, and a dot product is a signed
  popcount.
* Wider activations (`ABITS` > 1) are unsigned integers 0..2^ABITS-1; wider
  weights (`WBITS` > 1) are two's complement.
* The input image is 8-bit unsigned per colour channel; Conv1 multiplies
  these pixels by its (bipolar or signed) weights directly.

## The quantized front end

Every layer is a streaming stage with a valid/ready handshake on its input
and output, so the layers form a dataflow pipeline and back-pressure
propagates from the slowest layer to the pixel input.

**Sliding window unit (`swu`).** Pixels arrive in row-major order, all
channels of a pixel in one transfer. A circular buffer of 3 rows stores what
has been seen. When the pixel at row r, column c arrives and r, c >= 2, the
3x3 window ending there is complete and is written, together with the new
pixel, into the output register in the same cycle. Convolutions use stride 1
and no padding, so a DIM x DIM map gives (DIM-2)^2 windows. Window element
`e = (dr*3 + dc)*CH + ch` (dr = 0 is the oldest row) sits at bits
`e*B +: B`.

**Matrix-vector-threshold unit (`mvtu`).** For a window `a` and output
channel `o` it computes `acc = sum_i w[o][i] * a[i]` and produces the
activation `#{t : acc >= T[o][t]}`, counting how many of the channel's
2^ABITS-1 ascending thresholds are reached. The thresholds absorb batch
normalisation, bias and the quantizing activation function; with one
threshold the output is simply the sign bit of `acc - T`. `PE` output
channels are computed per cycle, so a window occupies the unit for
`OUT_CH/PE` cycles. The next window is accepted in the cycle the last channel
group is computed, so there are no idle cycles between windows.

**Max-pool (`maxpool`).** On even rows the maximum of each column pair is
stored in a half-row buffer; on odd rows it is combined with the two new
pixels and the 2x2 maximum is emitted. For bipolar activations the maximum
is an OR.

## The weightless back end

**Flatten.** The 25 pixels of the final 5x5x128 map are collected into one
3200-activation vector, pixel `p = r*5 + c` at bits `p*128*ABITS`, channels
inside. The buffer accepts the next map once the classifier has taken the
vector, which costs one cycle.

**Thermometer code.** Each activation v becomes 2^ABITS-1 bits, bit j set
when v > j. With 1-bit activations the code is the bit itself; with 2-bit
activations each value becomes 3 bits (0 -> 000, 1 -> 001, 2 -> 011,
3 -> 111), giving 9600 bits.

**LUT layers.** A table reads 6 bits of its layer's input vector, uses them
as a 6-bit address (input k is address bit k) and outputs one of its 64
stored bits. This matches the native 6-input LUT of the target FPGA family,
so in an FPGA flow each table is one LUT6. The wiring is a fixed rule:

```
input k of table l  =  bit ((l*6 + k) * MULT + OFF) mod N_IN
layer 1: MULT = 7919, OFF = 0, N_IN = 3200 (x 2^ABITS-1)
layer 2: MULT = 7907, OFF = 1, N_IN = 2000
```

Because MULT is a prime that does not divide N_IN, the six inputs of a table
are always distinct and every input bit is used about equally often. In a
DWN the wiring of the first layer is learned during training; a trained
model's wiring would replace this rule (`hwnn_pkg::lut_map`).

**Popcount and argmax.** The 1000 outputs of the second layer are split into
10 contiguous groups of 100; the score of a class is the number of ones in
its group (0..100, 7 bits). The argmax picks the highest score, the lowest
class index on a tie.

The back end is fully pipelined and takes a new vector every cycle: LUT
layer 1, LUT layer 2, popcount and argmax are each registered, so the result
comes 4 cycles after the vector. At 100 MHz that is one classification per
10 ns, far more than the front end can supply.

## Loading a trained model

Weights, thresholds and table contents are not part of the RTL; they are
written after reset, before the first image, through one configuration bus
(`cfg_valid`, `cfg_target`, `cfg_addr`, `cfg_data`, one 32-bit word per
cycle). The memories are not reset.

| `cfg_target` | Memory | `cfg_addr` | `cfg_data` |
|---|---|---|---|
| 0..3 | weights of Conv1..Conv4 | `{o, word}`, word field `max(1, clog2(WORDS))` bits | bits `32*word +: 32` of row o; weight i of channel o is at row bits `i*WBITS` |
| 4..7 | thresholds of Conv1..Conv4 | `{o, t}`, t field `max(1, clog2(2^ABITS-1))` bits | signed threshold t of channel o |
| 8 | LUT layer 1 | `{l, half}` (1-bit half field) | entries `32*half .. 32*half+31` of table l |
| 9 | LUT layer 2 | same | same |

Row lengths at 1w1a: Conv1 27 weights (1 word), Conv2 and Conv3 576 (18
words, 5-bit word field), Conv4 1152 (36 words, 6-bit word field). A full
1w1a model is 14,512 writes. Thresholds of a channel must be ascending.

## Interfaces and timing of `hwnn_top`

* `in_valid`/`in_ready`/`in_data[23:0]`: pixels in row-major order, channel c
  in bits `8c+7:8c`. A transfer happens on a rising edge with both high.
* `out_valid` is a one-cycle strobe with `out_class`, `out_max` (winning
  score) and `out_scores` (all ten); there is no output back-pressure.
* `rst_n` is an asynchronous active-low reset of all control state.

With the default `PE = 1`, Conv1 spends 64 cycles on each of its 900 windows,
so it sets the rate: about 57,600 cycles per image (0.58 ms at 100 MHz). The
other layers need fewer cycles per image (Conv2 50,176, Conv3 18,432, Conv4
12,800) and run in its shadow. The measured time from the first pixel to the
result is about 58,000 cycles, and consecutive images overlap in the
pipeline (the next image's pixels enter while the previous one is still in
Conv2..Conv4). Raising `PE` divides the per-window time of every layer.

## What is fixed by the architecture and what is a design choice

Taken from the H-WNN architecture: the CNV-6 layer structure (3x3
convolutions, 2x2 max-pooling, 64 and 128 channels), the replacement point
(after the second max-pool), flatten followed by thermometer encoding,
LUT-based layers whose outputs address the next layer, 6-input tables,
per-class summation, argmax, 1w1a as the main precision, 10 classes, one DWN
sample per 10 ns at 100 MHz.

Choices made here, where the architecture leaves the detail open:

* stride 1 and no padding, giving the 30/28/14/12/10/5 map sizes;
* multi-threshold activations in the convolution layers;
* the folding scheme (`PE` channels per cycle, `PE = 1`) and the resulting
  rate; the source design folds each layer for maximum throughput on its FPGA
  and reports a latency of 1.28 ms for this configuration, this one is not
  tuned to that;
* two LUT layers of 2000 and 1000 tables and the wiring rule above; a
  trained model defines its own table counts and wiring;
* contiguous class groups and lowest-index tie-breaking;
* the configuration bus and loadable tables (an FPGA build would fix the
  table contents and weights at synthesis time);
* asynchronously read weight memories (the reference implementation keeps
  weights in block RAM).

Not included: the layers that the DWN replaces (Conv5, Conv6, the fully
connected layers), the host/DMA wrapper, and any training flow. The 11-class
keyword-spotting task needs `NUM_CLASSES = 11` and a second-layer table
count divisible by 11.

## Simulation

Every testbench is self-checking, prints
`TB_RESULT checks=<n> failures=<n>` and stops by itself (each has a
watchdog). With Verilator 5:

```
verilator --binary -Wno-fatal --top-module tb_hwnn_top \
    rtl/hwnn_pkg.sv rtl/*.sv tb/tb_hwnn_top.sv -Mdir obj_top
./obj_top/Vtb_hwnn_top
```

(the package must come first; listing it twice is harmless). The other
testbenches build the same way with their own top module.

| Testbench | What it checks |
|---|---|
| `tb_conv_layer` | small 2-bit layer (6x6x3 -> 4 ch, PE = 2) against a reference convolution, with back-pressure; outputs of a row `OUT_CH/PE` cycles apart |
| `tb_maxpool` | 8x8x4, 3-bit, with gaps and back-pressure |
| `tb_flatten` | vector assembly and blocking while a vector waits |
| `tb_thermo_enc` | every 3-bit value, and pass-through of 1-bit values |
| `tb_lut_layer` | wiring rule, table lookup and 1-cycle latency |
| `tb_popcount`, `tb_argmax` | scores, ties, 1-cycle latency |
| `tb_dwn` | reduced classifier (2-bit inputs) against a reference, 4-cycle latency, one result per cycle |
| `tb_hwnn_top` | full-size engine with random model and three random images against a reference model of the whole network; checks that back-pressure, overlapping images and input gaps occur, and the image interval of 900 x 64 cycles |
| `tb_hwnn_top_2w2a` | the same engine with `WBITS = ABITS = 2` (three thresholds per channel, 9600 thermometer bits), two images against a 2-bit reference model; every layer must produce all four activation levels |

`tb_hwnn_top` runs at the default parameters; building it takes about two
minutes and the simulation a few seconds.

## Changing the design

* `hwnn_top #(.WBITS(2), .ABITS(2))` gives the 2w2a variant: thermometer
  codes become 3 bits per activation (9600 DWN inputs) and each convolution
  has three thresholds per channel. `tb_hwnn_top_2w2a` runs this variant end
  to end.
* `PE` trades multipliers for speed in all four convolution layers.
* `N_LUT1`, `N_LUT2` set the table counts (`N_LUT2` must be a multiple of
  10). The wiring multipliers are parameters of `dwn`.
* Layer sizes come from `hwnn_pkg` (`IMG_DIM`, `STAGE1_CH`, `STAGE2_CH`, ...).
