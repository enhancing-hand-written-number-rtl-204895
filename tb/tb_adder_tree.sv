// tb_adder_tree: checks the pipelined 255-adder tree.
//
// A new set of 256 products enters on every clock (valid on some, with
// changing tags). Each set's sum, computed here with plain integer addition,
// must appear exactly 8 clocks after it entered; corner sets of all-largest
// and all-smallest products check that no level overflows.
module tb_adder_tree;
  import nn_pkg::*;

  localparam int unsigned LEVELS = 8;
  localparam int unsigned NSETS  = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  turn_tag_t in_tag = '0, out_tag;
  logic signed [PROD_W-1:0] in_data [LANES];
  logic signed [PROD_W+7:0] sum;
  int exp_sum [NSETS];
  bit exp_vld [NSETS];
  turn_tag_t exp_tag [NSETS];
  int checks = 0, failures = 0;

  adder_tree dut (.clk, .rst_n, .in_valid, .in_tag, .in_data, .out_valid, .out_tag, .sum);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(LANES); i++) in_data[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // set t is driven in cycle t (after negedge t) and must be seen at the
    // output after LEVELS further edges
    for (int t = 0; t < int'(NSETS + LEVELS); t++) begin
      @(negedge clk);
      if (t >= int'(LEVELS)) begin
        int s;
        s = t - int'(LEVELS);
        checks++;
        if (out_valid != exp_vld[s] || out_tag != exp_tag[s]) begin
          failures++;
          $display("FAIL: set %0d valid/tag", s);
        end
        if (exp_vld[s]) begin
          checks++;
          if (int'(sum) != exp_sum[s]) begin
            failures++;
            $display("FAIL: set %0d sum %0d want %0d", s, sum, exp_sum[s]);
          end
        end
      end
      if (t < int'(NSETS)) begin
        exp_sum[t] = 0;
        for (int i = 0; i < int'(LANES); i++) begin
          case (t)
            0:       in_data[i] = 16'sd32385;
            1:       in_data[i] = -16'sd32640;
            2:       in_data[i] = PROD_W'(i);
            default: in_data[i] = PROD_W'(int'($urandom_range(0, 65024)) - 32640);
          endcase
          exp_sum[t] += int'(in_data[i]);
        end
        exp_vld[t] = (t % 4) != 3;
        exp_tag[t] = '{neuron: 4'(t % 10), first: t[0], last: t[1]};
        in_valid = exp_vld[t];
        in_tag   = exp_tag[t];
      end else begin
        in_valid = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
