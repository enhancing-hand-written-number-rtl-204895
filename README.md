# Hand-written digit classifier: a 256-lane perceptron datapath

This is a hardware classifier for 28x28 grey-scale images of hand-written digits, the
MNIST format. It is a single-layer perceptron with 784 inputs and 10 output neurons, one
per digit. Each neuron forms the weighted sum of all pixels plus a bias and passes it
through a sigmoid. A max selector then reports the neuron with the largest output as a
4-bit digit.

A full image needs 10 x 784 = 7840 multiply-adds. They are not done by 7840 multipliers,
and not one at a time. The datapath has 256 multipliers feeding a pipelined binary adder
tree of 255 adders, and it is reused over 40 "turns" per image. A new turn enters every
clock. An image is classified 53 clocks after `start`.

The architecture follows the article "Enhancing Hand-Written Number Classification with
Dedicated Hardware Neural Networks". From it come the overall chain (a selector for
pixels and weights, 256 multipliers, a 255-adder tree, an accumulator, the sigmoid and a
max selector) and all the sizes. The article does not give number formats, the sigmoid
circuit, the turn order, the handshake or the register placement. Those are this
design's own, and they are listed under [Departures and open points](#departures-and-open-points).

## The datapath, turn by turn

```
 start ─► turn_sequencer ─► input_mux ─► multiplier_array ─► adder_tree ─► accumulator ─► sigmoid_unit ─► max_selector ─► digit
          (neuron,slice)    "Mux1"       256 x (pix*wgt)     255 adders     + bias          PLAN curve      "Mux2"
                            1 clk        1 clk               8 clk          1 clk           1 clk           2 clk
```

**Turns.** 784 pixels do not divide evenly into 256 lanes: 784 = 3 x 256 + 16. Each
neuron therefore takes 4 slices. The last slice uses lanes 0-15 only, and lanes 16-255
carry a zero pixel and a zero weight. `turn_sequencer` issues the 40 turns of an image on
consecutive clocks. It goes neuron by neuron (0..9), and within a neuron slice by slice
(0..3). It tags each turn with its neuron number and with `first` and `last` flags
(`nn_pkg::turn_tag_t`). The tag travels beside the data through every pipeline stage.
Because of the tags, no stage needs to know where in the schedule it is.

**Mux1 (`input_mux`).** It sees the whole image and all 10 x 784 weights at once: the
article's "784 + 10 inputs", where each of the 10 weight inputs is a neuron's weight
vector. For the current turn it puts pixel `slice*256 + i` on lane `i`, along with the
current neuron's weight for that pixel. It is a 4-way mux on the pixel side and a 40-way
mux on the weight side, one per lane, followed by a register.

**Multipliers (`multiplier_array`).** There are 256 registered multipliers. Each takes an
unsigned 8-bit pixel and a signed 8-bit weight and gives an exact signed 16-bit product.

**Adder tree (`adder_tree`).** The tree has 8 levels of 128, 64, 32, 16, 8, 4, 2 and 1
adders, 255 in all, with a register after every adder. The tree accepts a new set of 256
products every clock and gives each set's sum 8 clocks later. In the code the tree is
kept as a heap: internal node `k` adds nodes `2k+1` and `2k+2`, and the leaves are the
input lanes. Every node is 24 bits wide, so no sum can overflow.

**Accumulator (`accumulator`).** On a turn tagged `first`, it loads the neuron's bias
plus the partial sum. On other turns it adds the partial sum. On a turn tagged `last` it
hands the finished sum on. The running sum stays in this register between turns and is
never stored to a memory. The bias is the neuron's threshold with its sign turned
(sum - threshold = sum + bias). The top selects it by the neuron number in the tag that
reaches the accumulator.

**Sigmoid (`sigmoid_unit`).** See the next section.

**Mux2 / max selector (`max_selector`).** It collects the 10 probabilities in a register
bank as they arrive. When neuron 9 has been written, it compares all ten in one clock
with a linear chain of comparators and outputs the index of the largest. It gives the
result in binary and also as a one-hot vector, with a 1 at the winner's position. Equal
values resolve to the lower digit.

## The sigmoid without an exponential

The activation 1/(1+e^-x) is built from the PLAN piecewise-linear approximation. Its
slopes are powers of two, so the circuit needs only an absolute value, a shift, a
constant add and three comparisons:

| \|x\|            | y(\|x\|)              |
|------------------|-----------------------|
| 0 .. 1           | \|x\|/4 + 0.5         |
| 1 .. 2.375       | \|x\|/8 + 0.625       |
| 2.375 .. 5       | \|x\|/32 + 0.84375    |
| >= 5             | 1                     |

For negative x, y = 1 - y(|x|). The result is never more than about 0.019 from the true
sigmoid. The curve steps down by 1/256 at |x| = 2.375, where the two middle segments
meet. That step belongs to the published approximation and is kept.

The input is the 32-bit neuron sum with 15 fraction bits. The output is an unsigned
16-bit fraction, and 1.0 is clipped to `0xFFFF`. With large weights, many sums land in the
flat region, and several neurons can saturate to the same value. The max selector's tie
rule then decides. The sigmoid keeps the ordering of the sums wherever it is strictly
increasing. Near the saturation points and the 2.375 step, the digit it picks can differ
from the one a comparison of raw sums would pick.

## Number formats

| quantity    | format                                 | from        |
|-------------|----------------------------------------|-------------|
| pixel       | unsigned 8 bit, 0..255 (value/256)     | article (0..255) |
| weight      | signed 8 bit, 7 fraction bits (±1)     | this design |
| product     | signed 16 bit, 15 fraction bits        | exact       |
| tree sum    | signed 24 bit                          | exact       |
| neuron sum  | signed 32 bit, 15 fraction bits        | this design |
| bias        | signed 24 bit, 15 fraction bits        | this design |
| probability | unsigned 16 bit fraction (0xFFFF = 1.0) | this design |
| digit       | unsigned 4 bit, 0..9                   | article (4-bit results) |

All of these are `localparam`s in `rtl/nn_pkg.sv`. The multiplier, adder and
accumulator widths are worked out from them.

## Interface and timing of `digit_classifier`

| port      | dir | width          | meaning |
|-----------|-----|----------------|---------|
| `clk`, `rst_n` | in | 1         | rising-edge clock; asynchronous active-low reset |
| `start`   | in  | 1              | begin classifying; ignored while `busy` |
| `pixels`  | in  | 8 x [784]      | image, row-major (pixel r*28+c) |
| `weights` | in  | 8 x [10][784]  | signed weights per neuron |
| `bias`    | in  | 24 x [10]      | signed bias per neuron |
| `busy`    | out | 1              | high from the start edge until `done` |
| `done`    | out | 1              | one-cycle pulse; `digit` is valid from then on |
| `digit`   | out | 4              | classified digit |
| `digit_onehot` | out | 10        | the same result, one-hot |
| `probs`   | out | 16 x [10]      | the ten sigmoid outputs of the last image |

`pixels`, `weights` and `bias` must stay stable from `start` until `done`. The weights
come from offline training and are inputs, not an internal memory. The clock edge that
samples `start` issues turn 0, and `done` goes high 53 edges later:

    40 turns + 1 (Mux1) + 1 (multipliers) + 8 (tree) + 1 (accumulator)
             + 1 (sigmoid) + 1 (collect) + 1 (compare) - 1 = 53

The next image may start in the cycle after `done`. The article reports 330 clocks per
digit but does not break that figure down. Because every turn here is pipelined, this
design stays well within it. The top-level test checks both the exact 53 and the
330-clock bound.

## Departures and open points

- **330 clocks.** Latency here is 53 clocks, not 330. The article gives no schedule for
  its 330, so the pipeline was not padded to match it.
- **Three or four output bits.** The article's text calls the max selector output
  three-bit, but its results are printed as four-bit numbers (`1001` for 9). Four bits
  are used, since 8 and 9 need them.
- **"256 pixels and 258 weights".** This is read as 256 weights per turn, one per
  multiplier.
- **Bias inputs.** The neuron model subtracts a threshold, and each neuron here has a
  bias input for it. The article counts its inputs as "784 + 10" and does not list
  these ten values.
- **Sigmoid circuit, formats, turn order, handshake, tie rule** are this design's
  choices, as described above.
- **Training** is outside the hardware and outside this design.

## Tests

Each block has a self-checking testbench in `tb/`. It compares the block's outputs with
values the testbench works out itself, runs under a watchdog, and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_turn_sequencer`   | 40 turns on consecutive clocks, order, first/last flags, start while busy ignored |
| `tb_input_mux`        | all 40 selections, every lane, zero padding of slice 3 |
| `tb_multiplier_array` | products at the corner values and at random |
| `tb_adder_tree`       | one set per clock, each sum exactly 8 clocks later, extreme sums |
| `tb_accumulator`      | neurons of 1-5 turns with bubbles, bias on the first turn only |
| `tb_sigmoid_unit`     | sweep of -8..8: within 1 LSB of PLAN and 0.02 of the sigmoid, monotonic, all 8 segments |
| `tb_max_selector`     | 300 rounds in random order, ties, all-equal rounds |
| `tb_digit_classifier` | the whole design at its default size (below) |

`tb_digit_classifier` runs the top with no parameter changes. First it classifies ten
images of the digit sequence 0 1 2 1 4 7 4 9 5 9, drawn as noisy seven-segment glyphs.
The weights are templates: +2/128 on a digit's glyph pixels, -2/128 elsewhere, and a bias
of minus half the glyph's size. With these weights the drawn digit always scores
highest, and all ten images must come out as their labels. Then it runs twelve random
images with random weights. Every digit and all ten probabilities are compared with a
model of integer sums and the PLAN curve, and every latency is checked. The test also
counts, and requires at least once: a start while busy, each sigmoid segment, a
saturated output, a tie, and an image started in the cycle after the previous `done`. These
test images are not MNIST data, and no trained MNIST weights are included.

To simulate with Verilator 5, package first:

    verilator --binary --timing --assert rtl/nn_pkg.sv rtl/turn_sequencer.sv \
        rtl/input_mux.sv rtl/multiplier_array.sv rtl/adder_tree.sv rtl/accumulator.sv \
        rtl/sigmoid_unit.sv rtl/max_selector.sv rtl/digit_classifier.sv \
        tb/tb_digit_classifier.sv --top-module tb_digit_classifier
    ./obj_dir/Vtb_digit_classifier

For a block test, list `rtl/nn_pkg.sv`, the block's file and its testbench.

## Changing the design

- The image size, neuron count and lane count are `N_PIX`, `N_CLASS` and `LANES` in
  `nn_pkg`. The submodules also take them as parameters. `LANES` must be a power of two
  (the tree is complete). The number of slices, ceil(N_PIX/LANES), and the tree depth,
  log2(LANES), follow automatically. The latency becomes N_CLASS x slices + 13.
- Weight and pixel widths are `WGT_W`/`WGT_FRAC` and `PIX_W`/`PIX_FRAC`. The sigmoid
  takes the sum's fraction-bit count as `IN_FRAC` (at most 16).
- The latency in `tb_digit_classifier` (`LATENCY`) and the slice count in the block
  tests must follow any change in sizes.
