// tb_accumulator: checks neuron sums built from several turns.
//
// Turns of random neurons with 1 to 5 slices each (first and last marked),
// with bubbles in between, are fed with random partial sums and biases.
// Each completed neuron must come out one clock after its last turn as
// bias + sum of its partial sums, and nothing may come out otherwise.
module tb_accumulator;
  import nn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  turn_tag_t in_tag = '0;
  logic signed [23:0] in_sum = '0;
  logic signed [BIAS_W-1:0] bias = '0;
  logic [NEURON_W-1:0] out_neuron;
  logic signed [ACC_W-1:0] out_sum;
  int checks = 0, failures = 0;

  accumulator dut (.clk, .rst_n, .in_valid, .in_tag, .in_sum, .bias, .out_valid, .out_neuron, .out_sum);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < 200; g++) begin
      int nturn, n;
      longint expect_sum;
      nturn = $urandom_range(1, 5);
      n = $urandom_range(0, 9);
      expect_sum = 0;
      for (int k = 0; k < nturn; k++) begin
        @(negedge clk);
        // output check for the previous cycle's input: nothing complete yet
        if (k > 0) begin
          checks++;
          if (out_valid) begin
            failures++;
            $display("FAIL: early output in group %0d", g);
          end
        end
        in_valid = 1'b1;
        in_tag   = '{neuron: 4'(n), first: k == 0, last: k == nturn - 1};
        in_sum   = 24'($urandom_range(0, 16777215));
        if (g == 0) in_sum = 24'h800000;       // most negative partial sum
        // bias only matters on the first turn; change it on every turn anyway
        bias = BIAS_W'($urandom);
        if (k == 0) expect_sum = longint'(bias);
        expect_sum += longint'(in_sum);
      end
      @(negedge clk);
      in_valid = 1'b0;
      in_sum   = 24'($urandom);
      checks++;
      if (!out_valid || int'(out_neuron) != n || longint'(out_sum) != expect_sum) begin
        failures++;
        $display("FAIL: group %0d: valid %0b neuron %0d sum %0d want %0d", g, out_valid,
                 out_neuron, out_sum, expect_sum);
      end
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        checks++;
        if (out_valid) begin
          failures++;
          $display("FAIL: output during bubble");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
