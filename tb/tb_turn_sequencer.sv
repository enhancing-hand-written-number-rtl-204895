// tb_turn_sequencer: checks the turn order of one classification.
//
// After a start pulse the sequencer must issue exactly N_CLASS x 4 turns on
// consecutive clocks, neuron-major with slices 0..3 inside each neuron, with
// first/last flags on slices 0 and 3, and go idle afterwards. A start given
// while busy must be ignored. Two sequences are run.
module tb_turn_sequencer;
  import nn_pkg::*;

  localparam int unsigned NCHUNK = (N_PIX + LANES - 1) / LANES;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, turn_valid, first, last;
  logic [3:0] neuron;
  logic [1:0] chunk;
  int checks = 0, failures = 0;

  turn_sequencer dut (.clk, .rst_n, .start, .busy, .turn_valid, .neuron, .chunk, .first, .last);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!turn_valid && !busy, "idle after reset");
    for (int run = 0; run < 2; run++) begin
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      for (int n = 0; n < int'(N_CLASS); n++) begin
        for (int c = 0; c < int'(NCHUNK); c++) begin
          check(turn_valid && busy, $sformatf("turn %0d/%0d valid", n, c));
          check(int'(neuron) == n && int'(chunk) == c,
                $sformatf("turn order: got %0d/%0d want %0d/%0d", neuron, chunk, n, c));
          check(first == (c == 0) && last == (c == int'(NCHUNK) - 1), "first/last flags");
          if (n == 3 && c == 1) start = 1'b1;   // start while busy: ignored
          @(negedge clk);
          start = 1'b0;
        end
      end
      check(!turn_valid && !busy, "idle after 40 turns");
      repeat (3) begin
        @(negedge clk);
        check(!turn_valid, "stays idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
