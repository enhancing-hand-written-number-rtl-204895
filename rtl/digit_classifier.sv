// digit_classifier: hand-written digit classifier, a single-layer perceptron
// with a 256-lane pipelined multiply / adder-tree datapath.
//
// A 28x28 grey-scale image (784 pixels, 0..255) is classified into a digit
// 0..9. Each of the 10 output neurons forms the weighted sum of all 784
// pixels plus its bias, passes it through a sigmoid, and the max selector
// reports the neuron with the largest output. The 7840 weighted products are
// computed 256 at a time: the turn sequencer steps Mux1 (input_mux) through
// 10 neurons x 4 slices of 256 pixels (the last slice zero-padded), and each
// turn flows through the 256 multipliers, the 8-level adder tree (255 adders)
// and the accumulator. A new turn enters every clock.
//
//   turn_sequencer -> input_mux -> multiplier_array -> adder_tree
//        -> accumulator (+bias) -> sigmoid_unit -> max_selector -> digit
//
// Interface: pixels, weights and bias are held stable by the user from start
// until done. A start pulse while idle begins a classification (a start while
// busy is ignored); busy stays high until done, a one-cycle pulse with the
// result on digit (binary) and digit_onehot (the winning neuron's bit set).
// probs shows the 10 neuron outputs of the last image
// (unsigned fractions, all ones = 1.0).
//
// Timing: done is asserted 53 clocks after the edge that samples start
// (40 turns, then 1 mux + 1 multiplier + 8 tree + 1 accumulator + 1 sigmoid
// + 1 collect + 1 compare registers, less one because the first turn is
// issued on the start edge), within the 330 clocks per digit that the
// document reports. The lane count, tree structure, image size and the
// Mux1 / multiplier / adder / accumulator / sigmoid / max-selector chain
// follow the document; number formats, bias input, handshake and the
// register placement are this design's own. rst_n resets the registers
// asynchronously and also gates the two assertions below, which is why it
// is seen as both an asynchronous and a synchronous input.
module digit_classifier
  import nn_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic        [PIX_W-1:0]  pixels  [N_PIX],
  input  logic signed [WGT_W-1:0]  weights [N_CLASS][N_PIX],
  input  logic signed [BIAS_W-1:0] bias    [N_CLASS],
  output logic                     busy,
  output logic                     done,
  output logic        [DIGIT_W-1:0] digit,
  output logic        [N_CLASS-1:0] digit_onehot,
  output logic        [PROB_W-1:0] probs   [N_CLASS]
);

  localparam int unsigned NCHUNK = (N_PIX + LANES - 1) / LANES;
  localparam int unsigned CH_W   = (NCHUNK > 1) ? $clog2(NCHUNK) : 1;
  localparam int unsigned TREE_W = PROD_W + $clog2(LANES);

  // ---- control --------------------------------------------------------
  logic busy_r;
  logic go;

  assign go = start && !busy_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    busy_r <= 1'b0;
    else if (go)   busy_r <= 1'b1;
    else if (done) busy_r <= 1'b0;
  end
  assign busy = busy_r;

  logic                seq_valid;
  logic [NEURON_W-1:0] seq_neuron;
  logic [CH_W-1:0]     seq_chunk;
  logic                seq_first, seq_last, seq_busy;
  turn_tag_t           seq_tag;

  turn_sequencer #(.NPIX(N_PIX), .NCLASS(N_CLASS), .NLANE(LANES)) u_seq (
    .clk, .rst_n, .start(go), .busy(seq_busy),
    .turn_valid(seq_valid), .neuron(seq_neuron), .chunk(seq_chunk),
    .first(seq_first), .last(seq_last)
  );

  assign seq_tag = '{neuron: seq_neuron, first: seq_first, last: seq_last};

  // turns are only issued inside a classification, and a result only ends one
  a_turns_in_busy: assert property (@(posedge clk) disable iff (!rst_n) seq_busy |-> busy_r);
  a_done_in_busy:  assert property (@(posedge clk) disable iff (!rst_n) done |-> busy_r);

  // ---- Mux1 -------------------------------------------------------------
  logic                    mux_valid;
  turn_tag_t               mux_tag;
  logic        [PIX_W-1:0] lane_pix [LANES];
  logic signed [WGT_W-1:0] lane_wgt [LANES];

  input_mux #(.NPIX(N_PIX), .NCLASS(N_CLASS), .NLANE(LANES)) u_mux1 (
    .clk, .rst_n, .pixels, .weights,
    .in_valid(seq_valid), .sel_neuron(seq_neuron), .sel_chunk(seq_chunk), .in_tag(seq_tag),
    .out_valid(mux_valid), .out_tag(mux_tag), .lane_pix, .lane_wgt
  );

  // ---- multipliers --------------------------------------------------------
  logic                     mul_valid;
  turn_tag_t                mul_tag;
  logic signed [PROD_W-1:0] prod [LANES];

  multiplier_array #(.NLANE(LANES)) u_mul (
    .clk, .rst_n, .in_valid(mux_valid), .in_tag(mux_tag),
    .pix(lane_pix), .wgt(lane_wgt),
    .out_valid(mul_valid), .out_tag(mul_tag), .prod
  );

  // ---- adder tree ---------------------------------------------------------
  logic                     tree_valid;
  turn_tag_t                tree_tag;
  logic signed [TREE_W-1:0] tree_sum;

  adder_tree #(.NLANE(LANES), .IN_W(PROD_W)) u_tree (
    .clk, .rst_n, .in_valid(mul_valid), .in_tag(mul_tag), .in_data(prod),
    .out_valid(tree_valid), .out_tag(tree_tag), .sum(tree_sum)
  );

  // ---- accumulator ----------------------------------------------------------
  logic                    acc_valid;
  logic [NEURON_W-1:0]     acc_neuron;
  logic signed [ACC_W-1:0] acc_sum;

  accumulator #(.IN_W(TREE_W), .OUT_W(ACC_W)) u_acc (
    .clk, .rst_n, .in_valid(tree_valid), .in_tag(tree_tag), .in_sum(tree_sum),
    .bias(bias[tree_tag.neuron]),
    .out_valid(acc_valid), .out_neuron(acc_neuron), .out_sum(acc_sum)
  );

  // ---- sigmoid --------------------------------------------------------------
  logic                sig_valid;
  logic [NEURON_W-1:0] sig_neuron;
  logic [PROB_W-1:0]   sig_y;

  sigmoid_unit #(.IN_W(ACC_W), .IN_FRAC(SUM_FRAC)) u_sig (
    .clk, .rst_n, .in_valid(acc_valid), .in_neuron(acc_neuron), .x(acc_sum),
    .out_valid(sig_valid), .out_neuron(sig_neuron), .y(sig_y)
  );

  // ---- Mux2 / max selector --------------------------------------------------
  logic [NEURON_W-1:0] best;

  max_selector #(.NCLASS(N_CLASS), .W(PROB_W)) u_mux2 (
    .clk, .rst_n, .in_valid(sig_valid), .in_neuron(sig_neuron), .in_prob(sig_y),
    .digit_valid(done), .digit(best), .onehot(digit_onehot), .probs
  );

  assign digit = DIGIT_W'(best);

endmodule
