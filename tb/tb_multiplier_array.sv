// tb_multiplier_array: checks the 256 lane products.
//
// A stream of operand sets, one per clock, including the corner values
// 0, 255, -128 and 127; each lane's product must equal the integer product
// one clock later, with valid and tag delayed alike.
module tb_multiplier_array;
  import nn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  turn_tag_t in_tag = '0, out_tag;
  logic        [PIX_W-1:0]  pix  [LANES];
  logic signed [WGT_W-1:0]  wgt  [LANES];
  logic signed [PROD_W-1:0] prod [LANES];
  int exp_prod [LANES];
  int checks = 0, failures = 0;

  multiplier_array dut (.clk, .rst_n, .in_valid, .in_tag, .pix, .wgt, .out_valid, .out_tag, .prod);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 50; t++) begin
      @(negedge clk);
      for (int i = 0; i < int'(LANES); i++) begin
        case (t)
          0:       begin pix[i] = 8'd255; wgt[i] = -8'sd128; end
          1:       begin pix[i] = 8'd255; wgt[i] = 8'sd127; end
          2:       begin pix[i] = 8'd0;   wgt[i] = -8'sd128; end
          default: begin pix[i] = PIX_W'($urandom); wgt[i] = WGT_W'($urandom); end
        endcase
        exp_prod[i] = int'(pix[i]) * int'(wgt[i]);
      end
      in_valid = t[0];
      in_tag   = '{neuron: 4'(t % 10), first: t[1], last: t[2]};
      @(negedge clk);
      checks++;
      if (out_valid != t[0] || out_tag.neuron != 4'(t % 10)
          || out_tag.first != t[1] || out_tag.last != t[2]) begin
        failures++;
        $display("FAIL: valid/tag at set %0d", t);
      end
      for (int i = 0; i < int'(LANES); i++) begin
        checks++;
        if (int'(prod[i]) != exp_prod[i]) begin
          failures++;
          if (failures < 10) $display("FAIL: set %0d lane %0d: %0d x %0d gave %0d", t, i,
                                      pix[i], wgt[i], prod[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
