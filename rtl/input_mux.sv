// input_mux: "Mux1", selects the operands of one turn.
//
// Its inputs are the whole image (NPIX pixels) and the weights of all NCLASS
// output neurons (NCLASS x NPIX, the "10 Wgt inputs" of the document). For the
// requested neuron and slice it forwards NLANE pixels, pixel chunk*NLANE+i on
// lane i, together with that neuron's weights for the same pixels. Lanes past
// the last pixel (with 784 pixels, lanes 16..255 of slice 3) carry a zero
// pixel and a zero weight, so they add nothing to the sum.
//
// Timing: one clock. The selection, valid and tag given in a cycle appear on
// the registered outputs after the next clock edge. Selecting by slice and
// neuron, the zero padding and the output register are this design's choices;
// the document gives the mux's inputs and its 256-lane output.
module input_mux
  import nn_pkg::*;
#(
  parameter int unsigned NPIX   = N_PIX,
  parameter int unsigned NCLASS = N_CLASS,
  parameter int unsigned NLANE  = LANES,
  localparam int unsigned NCHUNK = (NPIX + NLANE - 1) / NLANE,
  localparam int unsigned CH_W   = (NCHUNK > 1) ? $clog2(NCHUNK) : 1,
  localparam int unsigned NR_W   = (NCLASS > 1) ? $clog2(NCLASS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic        [PIX_W-1:0] pixels  [NPIX],
  input  logic signed [WGT_W-1:0] weights [NCLASS][NPIX],
  input  logic                    in_valid,
  input  logic        [NR_W-1:0]  sel_neuron,
  input  logic        [CH_W-1:0]  sel_chunk,
  input  turn_tag_t               in_tag,
  output logic                    out_valid,
  output turn_tag_t               out_tag,
  output logic        [PIX_W-1:0] lane_pix [NLANE],
  output logic signed [WGT_W-1:0] lane_wgt [NLANE]
);

  logic        [PIX_W-1:0] pix_sel [NLANE];
  logic signed [WGT_W-1:0] wgt_sel [NLANE];

  for (genvar i = 0; i < NLANE; i++) begin : g_lane
    always_comb begin
      pix_sel[i] = '0;
      wgt_sel[i] = '0;
      for (int unsigned c = 0; c < NCHUNK; c++) begin
        if (sel_chunk == CH_W'(c) && (c * NLANE + i) < NPIX) begin
          pix_sel[i] = pixels[c * NLANE + i];
          for (int unsigned n = 0; n < NCLASS; n++) begin
            if (sel_neuron == NR_W'(n)) wgt_sel[i] = weights[n][c * NLANE + i];
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid;
      out_tag   <= in_tag;
    end
  end

  // Operand registers need no reset: they are only read alongside out_valid.
  always_ff @(posedge clk) begin
    lane_pix <= pix_sel;
    lane_wgt <= wgt_sel;
  end

endmodule
