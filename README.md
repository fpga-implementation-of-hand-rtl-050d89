# A 9-bit CNN for handwritten-digit recognition

This is synthesizable SystemVerilog for a small convolutional neural network.
It classifies a 28x28 grey-scale image of a handwritten digit (MNIST style)
as one of the ten digits. The network is deliberately small: three 3x3
convolution kernels, a ReLU and one fully connected layer. All arithmetic is
9-bit fixed point. At that width every multiplier is a 9x9 multiplier that fits
in FPGA lookup tables, so the design needs no DSP blocks. The architecture
comes from a published FPGA design for a Xilinx Artix-7 (XC7A100T); it was
reported to reach about 90% accuracy on MNIST and a 300 MHz clock.

The hardware has two main ideas:

* **Convolution with one processing element per kernel tap.** Nine PEs each
  own one position of the 3x3 window. In one clock they compute one output
  pixel of one kernel. The same window is held for three clocks while the PEs
  switch kernels, so the three feature maps come out interleaved, one value
  per clock.
* **A semi-parallel fully connected layer.** The 2352-element feature vector
  is spread across 147 small RAMs, so that 147 elements can be read in one
  cycle. A bank of 147 multipliers and one adder tree then works through the
  [2352 x 10] weight matrix, one [147 x 1] piece per clock.

## Network

| layer | size | hardware |
|---|---|---|
| input | 28 x 28 pixels | `image_buffer` |
| convolution | 3 kernels of 3x3, same-size output (zero padding) | `conv_layer` (9 x `conv_pe`) |
| bias + batch normalisation | offset and scale folded into the PEs | `conv_pe` (inputs `b`, `c`, `v`) |
| ReLU | max(0, x) | `relu` |
| feature vector | 3 x 28 x 28 = 2352 values | `fm_buffer` (147 x `fm_ram`, 16 words each) |
| fully connected | [1 x 2352] x [2352 x 10] | `fc_layer` (147 x `fc_weight_rom`, `adder_tree`) |
| softmax | 10 probabilities | `softmax` |
| classification | index of the largest score | `classifier` |

`cnn_ctrl` sequences the layers, and `cnn_top` wires everything together.
`cnn_pkg` holds the sizes, the 9-bit type `fx_t` and the two arithmetic
helpers.

## Number format

Every value is a 9-bit two's-complement number with 7 fraction bits. The range
is [-2, 2) in steps of 1/128. Pixels of a normal image are in [0, 1), so
they are coded 0..127.

* **Multiplication** (`mul_trunc`): the 18-bit product is shifted right by 7
  bits, which rounds toward minus infinity. The result is then saturated to
  9 bits.
* **Addition**: sums are formed at full width and saturated to 9 bits where
  they are stored: after a PE's adder, after the nine-term sum, after each
  147-term slice sum and in the fully connected accumulator. The adder trees
  themselves are full width, so the result does not depend on the order of
  the additions.

The 9-bit width is the original design's. The 2.7 split and the choice to
saturate rather than wrap on overflow are this implementation's. To change
the format, edit `DW` and `FRAC` in `cnn_pkg`. The port widths of `cnn_top`
and the softmax table assume `DW = 9`.

## The convolutional stage

`conv_layer` receives the 3x3 window around pixel (row, col) and a kernel
select `ksel`. Window tap t = 3*dr + dc is the pixel at (row+dr-1, col+dc-1).
PE t holds the weight of tap t for each of the three kernels and computes

    y_t = trunc( sat( trunc(w[ksel][t] * pixel_t) + c + b[ksel] ) * v )

That is a weight multiplexer, a multiplier, one adder fed by `c` and a bias
multiplexer, and a second multiplier by `v`. The nine y_t are summed,
saturated to 9 bits and passed through the ReLU.

Each PE adds `c + b[k]` before the sum, and the scaling by `v` happens before
the sum too. The result is therefore `v * (sum of w*p + 9*(c + b[k]))`, apart
from truncation. If the trained network has a convolution bias B_k, a
batch-normalisation offset C and a scale V, load `v = V` and split the
offsets so that 9*(c + b[k]) equals the wanted total, for example
`b[k] = B_k/9`. The kernels are applied as correlations: tap t multiplies the
pixel at window position t. If the weights come from a true convolution,
flip each kernel before loading it.

The convolution has two pipeline stages: one register after the PEs, and
one after the sum and the ReLU. A result leaves two clocks after its window
went in, together with a tag that says where it is to be stored.

## Where the feature values live

The flattened feature vector is ordered pixel-major, kernel-minor:

    j = 3*(row*28 + col) + k        (k = kernel 0..2)

Element j is stored in RAM `j % 147`, at location `j / 147`. Because
147 = 3 * 49, the controller can keep this as two running counters:

* lane = 3*(pixel % 49) + k
* location = pixel / 49

The convolution therefore writes one RAM per clock, in order. Location a of
all 147 RAMs is slice a of the vector: elements 147a .. 147a+146.

The fully connected weights must use the same order. For class o and
element j, the weight goes into weight memory `j % 147`, word
`o*16 + j/147`. This is also the address to use on `cnn_top`'s
`fcw_lane`/`fcw_addr` ports.

## The fully connected layer

The weight matrix is treated as 16 stacked [147 x 10] sub-matrices. For
class o and slice a, one clock does the following:

1. Read location a of the 147 feature RAMs, and word o*16+a of the 147
   weight memories.
2. Form 147 truncated 9x9 products.
3. Sum the products in a balanced adder tree and saturate the sum to 9 bits.
4. Add the sum into a saturating 9-bit accumulator. The accumulator restarts
   at the first slice of each class.

Classes are processed one after another, so a pass takes 10 x 16 = 160 issue
clocks. `done` pulses 162 clocks after `start`. The weight memories have a
synchronous read, like FPGA block RAM. The feature RAMs have an asynchronous
read, like distributed RAM, and their output is registered to line up with
the weights. Each of the 147 weight memories holds 160 x 9 = 1440 bits. That
is one 18-kbit block RAM each, about 73 36-kbit blocks in total.

There is no bias in the fully connected layer.

## Softmax and classification

`softmax` subtracts the largest score from each score. It looks up
exp(-d) for d = (max - s_i)/128 in a 512-entry table with 16-bit fractions,
sums the ten values, and then computes one probability per clock as
`floor(e_i * 256 / sum)`. A probability of 256 means 1.0. The table is built
at elaboration by the recurrence e_0 = 65535,
e_n = floor(e_{n-1} * 65026 / 65536), where 65026 = round(65536*exp(-1/128)).
`classifier` returns the index of the largest score, and the lower index on a
tie. This is the same digit as the largest probability, without the rounding
of the probabilities. Softmax and argmax run in parallel once the scores are
ready.

## Interface and timing of `cnn_top`

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `img_we`, `img_waddr`, `img_wdata` | in | 1, 10, 9 | write pixel `row*28+col` |
| `conv_w[3][9]`, `conv_b[3]`, `conv_c`, `conv_v` | in | 9 each | convolution parameters, held stable |
| `fcw_we`, `fcw_lane`, `fcw_addr`, `fcw_data` | in | 1, 8, 8, 9 | write one fully connected weight |
| `start` | in | 1 | one-clock pulse starts a classification |
| `busy`, `done` | out | 1 | busy for the whole run; `done` pulses at the end |
| `scores[10]` | out | 9 each | fully connected outputs |
| `probs[10]` | out | 9 each | softmax, unsigned, 256 = 1.0 |
| `class_id` | out | 4 | recognised digit |

To classify an image:

1. Write the 784 pixels.
2. Load the weights once.
3. Pulse `start`.

`done` comes 2532 clocks after the clock edge that samples `start`:

| phase | clocks |
|---|---|
| convolution: 784 pixels x 3 kernels | 2352 |
| pipeline drain and fully connected start | 4 |
| fully connected layer | 162 |
| softmax, classifier, handshakes | 14 |

At 300 MHz, 2532 clocks is 8.4 us. Loading a new image adds 784 clocks. Do
not write the image or the weights while `busy` is high. Two assertions in
`cnn_top` report a violation in simulation.

## What is this implementation's own

The original design describes the data path: the PE structure, the nine
PEs, the three clocks per pixel, the 147 RAMs of 16 words, the 147 weight
memories, the adder tree and the split into 16 sub-matrices. It gives the
9-bit width and that results are truncated. It does not describe the
following, so they are choices made here:

* the integer/fraction split and the saturation on overflow;
* how the image is stored and windowed, and the zero padding at the border;
* the raster scan order and the order of the feature vector;
* the class-outer, slice-inner order of the fully connected layer, and its
  9-bit accumulator;
* all pipeline registers, the controller and the start/busy/done handshake;
* the loading ports. The trained weights are not part of this RTL. Each
  weight "ROM" has a write port, where an FPGA would initialise its block
  RAMs from the bitstream;
* the whole softmax unit, of which only the existence is given;
* tie-breaking in the classifier.

Known differences from the original:

* The original reports 0.041 ms per character at 300 MHz, about 12,300
  clocks. This design needs 2532 clocks for an image already in the buffer.
  The original's extra time is not explained and is not modelled here.
* The reported 90% accuracy depends on the trained weights, which are not
  available. The test benches use random weights and check the arithmetic
  exactly; they cannot check accuracy.
* Nothing here has been placed and routed, so the 300 MHz clock, the
  resource counts and the power figures are not checked. The 147-input adder
  tree is combinational in one stage. It would need more pipelining to reach
  that clock.

## Simulation

Every module has a self-checking test bench `tb/tb_<module>.sv`. Each one
prints a line `TB_RESULT checks=N failures=M` and stops itself through a
watchdog. `tb/tb_ref_pkg.sv` holds the reference arithmetic, written
independently of the RTL. Example with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/cnn_pkg.sv tb/tb_ref_pkg.sv tb/tb_cnn_top.sv \
        --top-module tb_cnn_top -Mdir obj_top -o sim
    ./obj_top/sim

`tb_cnn_top` runs the complete design at full size, for three images with
random parameters. It compares scores, probabilities, class and run time
with a behavioural model of the whole network. Across the three runs it
requires each of these to happen at least once:

* zero padding at the image border;
* ReLU clipping;
* saturation of the convolution sum;
* saturation in the fully connected layer;
* use of each kernel.

It runs in well under a second; building it takes about half a minute.

`tb_digit_recognition` shows the network recognising digits. It draws the
ten digits as seven-segment figures with two-pixel strokes. The weights are
set by hand:

* kernel 0 copies the image;
* kernel 1 produces the inverted image;
* each class's fully connected weights reward agreement with that digit's
  segments and penalise disagreement.

All ten digits must be classified correctly. The winning score must equal
the number of segment pixels, and its softmax probability must be the
largest.

The unit test benches check the following:

| test bench | what it checks |
|---|---|
| `tb_relu` | all 512 input codes |
| `tb_conv_pe` | random operands |
| `tb_adder_tree` | random operands and extreme values, for 147 and 9 inputs |
| `tb_image_buffer` | the window and its padding at every pixel |
| `tb_conv_layer` | values, tags and the two-clock latency |
| `tb_fm_ram`, `tb_fm_buffer`, `tb_fc_weight_rom` | memory contents and read latency |
| `tb_fc_layer` | all scores and the 162-clock run time, with and without saturation |
| `tb_softmax` | each probability and the 11-clock run time |
| `tb_classifier` | argmax, including ties |
| `tb_cnn_ctrl` | the 2352-issue scan, its RAM addressing and the handshakes |
