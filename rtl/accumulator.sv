// accumulator: adds up the partial sums of one neuron's turns.
//
// Each turn's partial sum arrives from the adder tree with its tag. On the
// first turn of a neuron the register is loaded with that neuron's bias plus
// the partial sum; later turns add to it. On the last turn the completed
// weighted sum (bias included) is presented on out_sum with out_valid for one
// cycle, tagged with its neuron. The running sum stays in this register
// between turns and is never written back to a memory, as the document
// describes. The bias input carries the neuron's threshold with its sign
// turned (sum - threshold = sum + bias); loading it at the first turn is this
// design's choice. The caller selects bias by in_tag.neuron (combinationally).
//
// Timing: one clock from a last turn to out_valid.
module accumulator
  import nn_pkg::*;
#(
  parameter int unsigned IN_W  = PROD_W + $clog2(LANES),
  parameter int unsigned OUT_W = ACC_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  turn_tag_t                 in_tag,
  input  logic signed [IN_W-1:0]    in_sum,
  input  logic signed [BIAS_W-1:0]  bias,
  output logic                      out_valid,
  output logic [NEURON_W-1:0]       out_neuron,
  output logic signed [OUT_W-1:0]   out_sum
);

  logic signed [OUT_W-1:0] acc;
  logic signed [OUT_W-1:0] base;
  logic signed [OUT_W-1:0] next;

  always_comb begin
    base = in_tag.first ? OUT_W'(bias) : acc;
    next = base + OUT_W'(in_sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      out_valid  <= 1'b0;
      out_neuron <= '0;
    end else begin
      out_valid <= in_valid && in_tag.last;
      if (in_valid) begin
        acc        <= next;
        out_neuron <= in_tag.neuron;
      end
    end
  end

  assign out_sum = acc;

endmodule
