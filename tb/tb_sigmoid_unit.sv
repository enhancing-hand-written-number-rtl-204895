// tb_sigmoid_unit: checks the activation against the sigmoid.
//
// Inputs (15 fraction bits) sweep -8 .. +8 plus random and extreme values.
// Each output, one clock later, must be within one LSB of the piecewise-
// linear curve computed here in floating point, and within 0.02 of the true
// 1/(1+e^-x). It must never decrease as x grows (apart from the curve's own
// 1/256 step at x = +-2.375), and each of the four
// segments on both sides of zero must have been exercised.
module tb_sigmoid_unit;
  import nn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic [NEURON_W-1:0] in_neuron = '0, out_neuron;
  logic signed [ACC_W-1:0] x = '0;
  logic [PROB_W-1:0] y;
  int checks = 0, failures = 0;
  int seg_hits [8];

  sigmoid_unit dut (.clk, .rst_n, .in_valid, .in_neuron, .x, .out_valid, .out_neuron, .y);

  always #5 clk = ~clk;

  function automatic real plan(input real v);
    real a, r;
    a = (v < 0.0) ? -v : v;
    if (a >= 5.0)        r = 1.0;
    else if (a >= 2.375) r = 0.03125 * a + 0.84375;
    else if (a >= 1.0)   r = 0.125 * a + 0.625;
    else                 r = 0.25 * a + 0.5;
    return (v < 0.0) ? 1.0 - r : r;
  endfunction

  function automatic int segment(input real v);
    real a;
    a = (v < 0.0) ? -v : v;
    return ((v < 0.0) ? 4 : 0) + ((a >= 5.0) ? 3 : (a >= 2.375) ? 2 : (a >= 1.0) ? 1 : 0);
  endfunction

  task automatic apply(input logic signed [ACC_W-1:0] xv, inout int prev_y, input bit mono);
    real xr, ref_plan, ref_true, yr;
    @(negedge clk);
    x = xv;
    in_valid = 1'b1;
    in_neuron = NEURON_W'($urandom_range(0, 9));
    @(negedge clk);
    in_valid = 1'b0;
    xr = real'(xv) / 32768.0;
    ref_plan = plan(xr) * 65536.0;
    if (ref_plan > 65535.0) ref_plan = 65535.0;
    ref_true = 1.0 / (1.0 + $exp(-xr));
    yr = real'(y) / 65536.0;
    seg_hits[segment(xr)]++;
    checks++;
    if (!out_valid || out_neuron != in_neuron) begin
      failures++;
      $display("FAIL: valid/neuron for x=%f", xr);
    end
    checks++;
    if (real'(y) - ref_plan > 1.0 || ref_plan - real'(y) > 1.0) begin
      failures++;
      $display("FAIL: x=%f y=%0d want %f", xr, y, ref_plan);
    end
    checks++;
    if (yr - ref_true > 0.02 || ref_true - yr > 0.02) begin
      failures++;
      $display("FAIL: x=%f y=%f sigmoid %f", xr, yr, ref_true);
    end
    if (mono) begin
      checks++;
      // PLAN steps down by 0.0039 (256 LSB) where its 1/8 and 1/32 segments
      // meet at x = 2.375; everywhere else it must not decrease
      if (int'(y) < prev_y - ((xr > 2.37 && xr < 2.38) || (xr > -2.38 && xr < -2.37) ? 256 : 0)) begin
        failures++;
        $display("FAIL: not monotonic at x=%f", xr);
      end
    end
    prev_y = int'(y);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    prev = 0;
    // sweep -8 .. +8 in steps of 1/64 (plus an odd offset)
    for (int k = -8 * 512; k <= 8 * 512; k++) apply(ACC_W'(k * 64 + 13), prev, 1'b1);
    apply(32'sh7fffffff, prev, 1'b0);
    apply(-32'sh7fffffff, prev, 1'b0);
    apply(32'sh80000000, prev, 1'b0);
    apply(32'sd0, prev, 1'b0);
    repeat (500) apply(ACC_W'(int'($urandom_range(0, 600000)) - 300000), prev, 1'b0);
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (seg_hits[s] == 0) begin
        failures++;
        $display("FAIL: segment %0d never exercised", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
