// turn_sequencer: steps the datapath through the turns of one classification.
//
// One image needs N_CLASS x N_CHUNK turns: for each output neuron in order
// 0..N_CLASS-1 it visits the 256-pixel slices 0..N_CHUNK-1 of the image (with
// the defaults 10 x 4 = 40 turns). Slices of one neuron are issued back to back
// so that the accumulator downstream can add them up; the tag marks the first
// and last slice of each neuron. One turn is issued per clock, so the datapath
// behind it is fully pipelined.
//
// Interface: a start pulse while idle begins a sequence (a start while busy
// is ignored). turn_valid, neuron, chunk and tag are registered and hold
// turn k in the cycle after clock edge k (edge 0 being the one that sampled
// start). busy is high from the start edge until the last turn has left.
// The document only says that Mux1 selects its pixels and weights "at every
// turn"; the order of the turns and the handshake are this design's choice.
module turn_sequencer
  import nn_pkg::*;
#(
  parameter int unsigned NPIX   = N_PIX,
  parameter int unsigned NCLASS = N_CLASS,
  parameter int unsigned NLANE  = LANES,
  localparam int unsigned NCHUNK = (NPIX + NLANE - 1) / NLANE,
  localparam int unsigned CH_W   = (NCHUNK > 1) ? $clog2(NCHUNK) : 1,
  localparam int unsigned NR_W   = (NCLASS > 1) ? $clog2(NCLASS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  output logic            turn_valid,
  output logic [NR_W-1:0] neuron,
  output logic [CH_W-1:0] chunk,
  output logic            first,   // chunk == 0
  output logic            last     // chunk == NCHUNK-1
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      turn_valid <= 1'b0;
      neuron     <= '0;
      chunk      <= '0;
    end else if (!turn_valid) begin
      if (start) begin
        turn_valid <= 1'b1;
        neuron     <= '0;
        chunk      <= '0;
      end
    end else if (chunk == CH_W'(NCHUNK - 1)) begin
      chunk <= '0;
      if (neuron == NR_W'(NCLASS - 1)) begin
        turn_valid <= 1'b0;
        neuron     <= '0;
      end else begin
        neuron <= neuron + 1'b1;
      end
    end else begin
      chunk <= chunk + 1'b1;
    end
  end

  assign busy  = turn_valid;
  assign first = (chunk == '0);
  assign last  = (chunk == CH_W'(NCHUNK - 1));

endmodule
