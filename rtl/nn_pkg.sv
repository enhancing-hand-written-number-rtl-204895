// nn_pkg: sizes, number formats and shared types of the digit classifier.
//
// The classifier is a single-layer perceptron: 784 grey-scale pixels of a
// 28x28 image feed 10 output neurons (digits 0-9). The datapath handles 256
// pixel/weight pairs per clock ("turn"), so one neuron takes
// ceil(784/256) = 4 turns and one image 40 turns.
//
// Number formats. Pixel intensities are unsigned 8-bit (0..255), read as a
// fraction value/256 (PIX_FRAC = 8). Weights are signed 8-bit with
// WGT_FRAC = 7 fraction bits (range -1.0 .. +0.992). Weighted sums therefore
// carry SUM_FRAC = 15 fraction bits. Probabilities leave the sigmoid as
// unsigned 16-bit fractions (0xFFFF stands for 1.0). The pixel range, image
// size, neuron count and the 256 lanes are the document's numbers; the weight,
// bias and probability formats are this design's own choice.
package nn_pkg;

  localparam int unsigned N_PIX    = 784;  // 28 x 28 pixels
  localparam int unsigned N_CLASS  = 10;   // output neurons, digits 0..9
  localparam int unsigned LANES    = 256;  // multipliers per turn

  localparam int unsigned PIX_W    = 8;    // pixel intensity 0..255
  localparam int unsigned PIX_FRAC = 8;
  localparam int unsigned WGT_W    = 8;    // signed weight
  localparam int unsigned WGT_FRAC = 7;
  localparam int unsigned PROD_W   = PIX_W + WGT_W;          // 16, signed
  localparam int unsigned SUM_FRAC = PIX_FRAC + WGT_FRAC;    // 15
  localparam int unsigned ACC_W    = 32;   // neuron sum, signed
  localparam int unsigned BIAS_W   = 24;   // neuron bias (minus threshold), signed
  localparam int unsigned PROB_W   = 16;   // sigmoid output, unsigned fraction
  localparam int unsigned DIGIT_W  = 4;    // classified digit 0..9

  localparam int unsigned NEURON_W = $clog2(N_CLASS);

  // Sideband that travels with each turn through the datapath pipeline.
  typedef struct packed {
    logic [NEURON_W-1:0] neuron;  // output neuron the turn belongs to
    logic                first;   // first slice of that neuron: restart the sum
    logic                last;    // last slice of that neuron: sum is complete
  } turn_tag_t;

endpackage
