// max_selector: "Mux2", picks the most probable digit.
//
// The neuron probabilities arrive one at a time, each with its neuron number,
// and are collected in a bank of NCLASS registers. When the last neuron
// (number NCLASS-1) has been written, the bank is compared in the next cycle
// and the number of the largest probability is output as an unsigned binary
// digit (4 bits for 0..9) with a one-cycle digit_valid. Equal probabilities
// resolve to the lower digit. The collected probabilities stay readable on
// probs until the next image overwrites them.
//
// The document describes the collect-and-compare function; the serial
// collection, the tie rule and the compare stage are this design's choices.
//
// Timing: digit_valid one clock after the write of the last neuron.
module max_selector
  import nn_pkg::*;
#(
  parameter int unsigned NCLASS = N_CLASS,
  parameter int unsigned W      = PROB_W,
  localparam int unsigned NR_W  = (NCLASS > 1) ? $clog2(NCLASS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [NR_W-1:0]   in_neuron,
  input  logic [W-1:0]      in_prob,
  output logic              digit_valid,
  output logic [NR_W-1:0]   digit,
  output logic [NCLASS-1:0] onehot,
  output logic [W-1:0]      probs [NCLASS]
);

  logic            compare;   // bank complete, compare this cycle
  logic [NR_W-1:0] best_idx;
  logic [W-1:0]    best_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned n = 0; n < NCLASS; n++) probs[n] <= '0;
      compare <= 1'b0;
    end else begin
      if (in_valid) probs[in_neuron] <= in_prob;
      compare <= in_valid && (in_neuron == NR_W'(NCLASS - 1));
    end
  end

  // Linear compare chain over the bank; strict '>' keeps the lower index on a tie.
  always_comb begin
    best_idx = '0;
    best_val = probs[0];
    for (int unsigned n = 1; n < NCLASS; n++) begin
      if (probs[n] > best_val) begin
        best_val = probs[n];
        best_idx = NR_W'(n);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      digit_valid <= 1'b0;
      digit       <= '0;
      onehot      <= '0;
    end else begin
      digit_valid <= compare;
      if (compare) begin
        digit  <= best_idx;
        onehot <= NCLASS'(1) << best_idx;
      end
    end
  end

endmodule
