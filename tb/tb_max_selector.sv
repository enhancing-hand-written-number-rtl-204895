// tb_max_selector: checks collection and comparison of the 10 probabilities.
//
// For many rounds, the 10 probabilities are written in a random order with
// bubbles, the neuron 9 write last (it triggers the compare). One clock after
// it the digit must be the index of the largest value, the lower index on
// equal values, also as a one-hot vector (rounds with deliberate ties and with all-equal values are
// included), and digit_valid must pulse only then.
module tb_max_selector;
  import nn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, digit_valid;
  logic [3:0] in_neuron = '0, digit;
  logic [9:0] onehot;
  logic [PROB_W-1:0] in_prob = '0;
  logic [PROB_W-1:0] probs [N_CLASS];
  int checks = 0, failures = 0;
  int vals [10];
  int order [10];
  int ties = 0;

  max_selector dut (.clk, .rst_n, .in_valid, .in_neuron, .in_prob, .digit_valid, .digit, .onehot, .probs);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 300; r++) begin
      int best, bestv;
      for (int n = 0; n < 10; n++) begin
        vals[n] = (r % 5 == 1) ? $urandom_range(0, 7) : $urandom_range(0, 65535);
        if (r % 50 == 2) vals[n] = 65535;
        order[n] = n;
      end
      if (r % 5 == 3) vals[$urandom_range(5, 9)] = vals[$urandom_range(0, 4)];
      // shuffle neurons 0..8; neuron 9 stays last
      for (int n = 8; n > 0; n--) begin
        int j, t;
        j = $urandom_range(0, n);
        t = order[n]; order[n] = order[j]; order[j] = t;
      end
      best = 0; bestv = vals[0];
      for (int n = 1; n < 10; n++) if (vals[n] > bestv) begin best = n; bestv = vals[n]; end
      for (int n = 0; n < 10; n++) if (n != best && vals[n] == bestv) begin ties++; break; end
      for (int k = 0; k < 10; k++) begin
        @(negedge clk);
        in_valid  = 1'b1;
        in_neuron = 4'(order[k]);
        in_prob   = PROB_W'(vals[order[k]]);
        if (k < 9 && $urandom_range(0, 3) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
          checks++;
          if (digit_valid) begin failures++; $display("FAIL: early digit_valid"); end
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (digit_valid) begin failures++; $display("FAIL: digit_valid too early"); end
      @(negedge clk);
      checks++;
      if (!digit_valid || int'(digit) != best) begin
        failures++;
        $display("FAIL: round %0d digit %0d valid %0b want %0d", r, digit, digit_valid, best);
      end
      for (int n = 0; n < 10; n++) begin
        checks++;
        if (onehot[n] != (n == best)) begin failures++; $display("FAIL: onehot bit %0d", n); end
      end
      for (int n = 0; n < 10; n++) begin
        checks++;
        if (int'(probs[n]) != vals[n]) begin failures++; $display("FAIL: probs[%0d]", n); end
      end
      @(negedge clk);
      checks++;
      if (digit_valid) begin failures++; $display("FAIL: digit_valid longer than one cycle"); end
    end
    checks++;
    if (ties == 0) begin failures++; $display("FAIL: no tie exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
