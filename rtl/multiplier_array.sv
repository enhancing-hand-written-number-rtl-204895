// multiplier_array: the 256 parallel multipliers of the datapath.
//
// Lane i multiplies an unsigned pixel intensity by a signed weight. The
// product is exact: an unsigned PIX_W-bit value times a signed WGT_W-bit value
// fits in PIX_W+WGT_W signed bits (with 8 and 8: -32640 .. 32385).
//
// Timing: one clock. Products, valid and tag are registered, so a turn leaves
// one cycle after it enters, and one turn can enter every cycle. The lane
// count is the document's; operand widths and the register are this design's.
module multiplier_array
  import nn_pkg::*;
#(
  parameter int unsigned NLANE = LANES
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  turn_tag_t                in_tag,
  input  logic        [PIX_W-1:0]  pix  [NLANE],
  input  logic signed [WGT_W-1:0]  wgt  [NLANE],
  output logic                     out_valid,
  output turn_tag_t                out_tag,
  output logic signed [PROD_W-1:0] prod [NLANE]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid;
      out_tag   <= in_tag;
    end
  end

  // Both operands widened to PROD_W bits before multiplying: the pixel with
  // zeros (it is unsigned), the weight with its sign.
  logic signed [PROD_W-1:0] pix_ext [NLANE];
  logic signed [PROD_W-1:0] wgt_ext [NLANE];

  always_comb begin
    for (int unsigned i = 0; i < NLANE; i++) begin
      pix_ext[i] = signed'(PROD_W'(pix[i]));
      wgt_ext[i] = PROD_W'(wgt[i]);
    end
  end

  always_ff @(posedge clk) begin
    for (int unsigned i = 0; i < NLANE; i++) prod[i] <= pix_ext[i] * wgt_ext[i];
  end

endmodule
