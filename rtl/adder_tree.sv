// adder_tree: pipelined parallel adder tree, 256 products to one sum.
//
// Level 1 adds the products in pairs (128 adders), level 2 adds those sums in
// pairs (64 adders), and so on down to a single adder at level 8: 255 adders
// for 256 inputs. Every level ends in a register, so the tree accepts one new
// set of inputs every clock and delivers its sum LEVELS = log2(NLANE) clocks
// later; valid and tag travel alongside in a shift register of the same
// depth. The structure (pairwise levels, 128/64/.../1 adders, pipelining) is
// the document's. Each level is one bit wider than the one before, so no
// sum can overflow: OUT_W = IN_W + LEVELS.
//
// NLANE must be a power of two.
module adder_tree
  import nn_pkg::*;
#(
  parameter int unsigned NLANE = LANES,
  parameter int unsigned IN_W  = PROD_W,
  localparam int unsigned LEVELS = $clog2(NLANE),
  localparam int unsigned OUT_W  = IN_W + LEVELS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  turn_tag_t               in_tag,
  input  logic signed [IN_W-1:0]  in_data [NLANE],
  output logic                    out_valid,
  output turn_tag_t               out_tag,
  output logic signed [OUT_W-1:0] sum
);

  // The adders form a complete binary tree stored as a heap: internal node k
  // (0 .. NLANE-2) adds its children 2k+1 and 2k+2; heap positions NLANE-1 ..
  // 2*NLANE-2 are the leaves, input lanes 0 .. NLANE-1. Node 0 is the root.
  // Every internal node is a register, so nodes at depth d hold a turn that
  // entered LEVELS-d clocks earlier. All nodes use the output width; the
  // upper bits of the lower levels are sign extension.
  localparam int unsigned NNODE = NLANE - 1;

  logic signed [OUT_W-1:0] node [NNODE];

  function automatic logic signed [OUT_W-1:0] child(input int unsigned idx);
    if (idx >= NNODE) return OUT_W'(in_data[idx - NNODE]);
    else              return node[idx];
  endfunction

  always_ff @(posedge clk) begin
    for (int unsigned k = 0; k < NNODE; k++) node[k] <= child(2*k + 1) + child(2*k + 2);
  end

  logic      vld_sr [LEVELS];
  turn_tag_t tag_sr [LEVELS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned l = 0; l < LEVELS; l++) begin
        vld_sr[l] <= 1'b0;
        tag_sr[l] <= '0;
      end
    end else begin
      vld_sr[0] <= in_valid;
      tag_sr[0] <= in_tag;
      for (int unsigned l = 1; l < LEVELS; l++) begin
        vld_sr[l] <= vld_sr[l-1];
        tag_sr[l] <= tag_sr[l-1];
      end
    end
  end

  assign out_valid = vld_sr[LEVELS-1];
  assign out_tag   = tag_sr[LEVELS-1];
  assign sum       = node[0];

endmodule
