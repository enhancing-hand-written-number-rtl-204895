// tb_input_mux: checks Mux1's selection of pixels and weights.
//
// Random image and weights; for every neuron and slice the 256 lanes must
// carry pixel slice*256+i and that neuron's weight for it, one clock after
// the selection, with zeros past pixel 783. Valid and tag must follow.
module tb_input_mux;
  import nn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic        [PIX_W-1:0] pixels  [N_PIX];
  logic signed [WGT_W-1:0] weights [N_CLASS][N_PIX];
  logic in_valid = 1'b0;
  logic [3:0] sel_neuron = '0;
  logic [1:0] sel_chunk = '0;
  turn_tag_t in_tag = '0, out_tag;
  logic out_valid;
  logic        [PIX_W-1:0] lane_pix [LANES];
  logic signed [WGT_W-1:0] lane_wgt [LANES];
  int checks = 0, failures = 0;

  input_mux dut (.clk, .rst_n, .pixels, .weights, .in_valid, .sel_neuron, .sel_chunk,
                 .in_tag, .out_valid, .out_tag, .lane_pix, .lane_wgt);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < int'(N_PIX); p++) begin
      pixels[p] = PIX_W'($urandom);
      for (int n = 0; n < int'(N_CLASS); n++) weights[n][p] = WGT_W'($urandom);
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < int'(N_CLASS); n++) begin
      for (int c = 0; c < 4; c++) begin
        @(negedge clk);
        sel_neuron = 4'(n);
        sel_chunk  = 2'(c);
        in_valid   = (n + c) % 3 != 0;
        in_tag     = '{neuron: 4'(n), first: c == 0, last: c == 3};
        @(negedge clk);
        checks++;
        if (out_valid != ((n + c) % 3 != 0) || out_tag.neuron != 4'(n)
            || out_tag.first != (c == 0) || out_tag.last != (c == 3)) begin
          failures++;
          $display("FAIL: valid/tag for %0d/%0d", n, c);
        end
        for (int i = 0; i < int'(LANES); i++) begin
          int p;
          logic [PIX_W-1:0] ep;
          logic signed [WGT_W-1:0] ew;
          p  = c * 256 + i;
          ep = (p < 784) ? pixels[p] : '0;
          ew = (p < 784) ? weights[n][p] : '0;
          checks++;
          if (lane_pix[i] !== ep || lane_wgt[i] !== ew) begin
            failures++;
            if (failures < 10)
              $display("FAIL: n=%0d c=%0d lane %0d pix %0d/%0d wgt %0d/%0d", n, c, i,
                       lane_pix[i], ep, lane_wgt[i], ew);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
