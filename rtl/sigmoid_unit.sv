// sigmoid_unit: the neuron's activation, y = 1 / (1 + e^-x).
//
// The exponential is replaced by the well-known piecewise-linear PLAN
// approximation (Amin, Curtis and Hayes-Gill), whose slopes are powers of two
// so that it needs only shifts, adders and comparators:
//     |x| >= 5            y = 1
//     2.375 <= |x| < 5    y = |x|/32 + 0.84375
//     1 <= |x| < 2.375    y = |x|/8  + 0.625
//     0 <= |x| < 1        y = |x|/4  + 0.5
//     x < 0               y = 1 - y(|x|)
// Its largest error against the true sigmoid is about 0.019. The input is a
// signed fixed-point sum with IN_FRAC fraction bits (IN_FRAC <= 16); the output
// is an unsigned PROB_W-bit fraction, 1.0 clipped to all ones.
// The document names the sigmoid as the activation; the approximation and the
// number formats are this design's choice.
//
// Timing: one clock; valid and the neuron number pass along with the result.
module sigmoid_unit
  import nn_pkg::*;
#(
  parameter int unsigned IN_W    = ACC_W,
  parameter int unsigned IN_FRAC = SUM_FRAC
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [NEURON_W-1:0]      in_neuron,
  input  logic signed [IN_W-1:0]   x,
  output logic                     out_valid,
  output logic [NEURON_W-1:0]      out_neuron,
  output logic [PROB_W-1:0]        y
);

  // Internally |x| is held with 16 fraction bits, and y with 16 fraction bits
  // plus one integer bit so that 1.0 (65536) can be represented.
  localparam int unsigned AW = IN_W + 16 - IN_FRAC;
  localparam logic [AW-1:0] ONE     = AW'(1) << 16;
  localparam logic [AW-1:0] T_2_375 = AW'(155648);   // 2.375 * 2^16
  localparam logic [AW-1:0] T_5     = AW'(5) << 16;

  logic [AW-1:0] ax;      // |x| in Q.16
  logic [16:0]   ypos;    // y(|x|) in Q1.16
  logic [16:0]   yval;    // y(x)   in Q1.16
  logic [PROB_W-1:0] yq;

  always_comb begin
    // |x| (the most negative input saturates harmlessly to the top segment)
    ax = x[IN_W-1] ? AW'(-x) << (16 - IN_FRAC) : AW'(x) << (16 - IN_FRAC);
    if (ax >= T_5)
      ypos = 17'h10000;
    else if (ax >= T_2_375)
      ypos = 17'(55296 + (ax >> 5));  // 0.84375 + |x|/32
    else if (ax >= ONE)
      ypos = 17'(40960 + (ax >> 3));  // 0.625 + |x|/8
    else
      ypos = 17'(32768 + (ax >> 2));  // 0.5 + |x|/4
    yval = x[IN_W-1] ? 17'h10000 - ypos : ypos;
    // scale the Q1.16 value to PROB_W fraction bits, clipping 1.0
    if (yval[16]) yq = '1;
    else          yq = PROB_W'(yval[15:0] >> (16 - PROB_W));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_neuron <= '0;
      y          <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_neuron <= in_neuron;
        y          <= yq;
      end
    end
  end

endmodule
