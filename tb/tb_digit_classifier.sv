// tb_digit_classifier: end-to-end test of the classifier at full size.
//
// Part 1 (digit workload): ten 28x28 images of the digit sequence
// 0 1 2 1 4 7 4 9 5 9, drawn as noisy seven-segment glyphs, are classified
// with template weights: +2/128 on the pixels of a digit's glyph, -2/128 on
// all others, and a bias of minus half the glyph's pixel count. With those
// weights the drawn digit scores highest, so every image must come out as
// its label. Part 2: images, weights and biases at random (full range,
// small and mixed magnitudes), so that sums land in every segment of the
// sigmoid, saturate, and produce ties.
//
// For every image the digit (binary and one-hot) and all ten probabilities are compared with a
// model computed here (integer weighted sums and the piecewise-linear
// sigmoid), and the time from start to done must be 53 clocks, within
// the 330 clocks per digit of the reference design. Mechanisms that must
// each have happened at least once: a start ignored while busy, each of the
// eight sigmoid segments, a saturated probability, a tie for the maximum,
// and back-to-back images.
module tb_digit_classifier;
  import nn_pkg::*;

  localparam int LATENCY  = 53;
  localparam int MAX_CLKS = 330;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic        [PIX_W-1:0]  pixels  [N_PIX];
  logic signed [WGT_W-1:0]  weights [N_CLASS][N_PIX];
  logic signed [BIAS_W-1:0] bias    [N_CLASS];
  logic busy, done;
  logic [DIGIT_W-1:0] digit;
  logic [N_CLASS-1:0] digit_onehot;
  logic [PROB_W-1:0]  probs [N_CLASS];

  int checks = 0, failures = 0;
  longint cyc = 0;
  int ignored_starts = 0, saturations = 0, ties = 0, back_to_back = 0, correct_digits = 0;
  int seg_hits [8];
  int exp_prob [10];
  int exp_digit;

  digit_classifier dut (.clk, .rst_n, .start, .pixels, .weights, .bias, .busy, .done, .digit, .digit_onehot, .probs);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model --------------------------------------------------
  function automatic int sigmoid_model(input longint s, output int seg);
    longint a;
    int yp;
    a = (s < 0) ? -s : s;
    a = a * 2;                         // 15 -> 16 fraction bits
    if (a >= 5 * 65536)       begin yp = 65536;                 seg = 3; end
    else if (a >= 155648)     begin yp = 55296 + int'(a / 32);  seg = 2; end
    else if (a >= 65536)      begin yp = 40960 + int'(a / 8);   seg = 1; end
    else                      begin yp = 32768 + int'(a / 4);   seg = 0; end
    if (s < 0) begin
      yp = 65536 - yp;
      seg += 4;
    end
    return (yp > 65535) ? 65535 : yp;
  endfunction

  task automatic model();
    int best, seg;
    for (int n = 0; n < 10; n++) begin
      longint s;
      s = longint'(bias[n]);
      for (int p = 0; p < 784; p++) s += longint'(pixels[p]) * longint'(weights[n][p]);
      exp_prob[n] = sigmoid_model(s, seg);
      seg_hits[seg]++;
      if (exp_prob[n] == 65535 || exp_prob[n] == 0) saturations++;
    end
    best = 0;
    for (int n = 1; n < 10; n++) if (exp_prob[n] > exp_prob[best]) best = n;
    for (int n = 0; n < 10; n++) if (n != best && exp_prob[n] == exp_prob[best]) begin
      ties++;
      break;
    end
    exp_digit = best;
  endtask

  // ---- run one image: start, wait for done, compare ----------------------
  // With b2b set, start is raised in the very cycle after the previous
  // image's done pulse, the first cycle in which the classifier is idle.
  task automatic classify(input string name, input bit poke_while_busy, input bit b2b);
    longint t0;
    int lat;
    model();
    if (!b2b) @(negedge clk);
    else if (!busy) back_to_back++;
    start = 1'b1;
    @(negedge clk);
    t0 = cyc;
    start = 1'b0;
    check(busy, {name, ": busy after start"});
    while (!done) begin
      if (poke_while_busy && cyc - t0 == 19) begin
        start = 1'b1;         // must be ignored
        ignored_starts++;
      end else begin
        start = 1'b0;
      end
      @(negedge clk);
      if (cyc - t0 > MAX_CLKS + 10) break;
    end
    start = 1'b0;
    lat = int'(cyc - t0);    // edges after the one that sampled start
    check(done, {name, ": done seen"});
    check(lat == LATENCY, $sformatf("%s: latency %0d want %0d", name, lat, LATENCY));
    check(lat <= MAX_CLKS, $sformatf("%s: latency %0d above %0d", name, lat, MAX_CLKS));
    check(int'(digit) == exp_digit, $sformatf("%s: digit %0d want %0d", name, digit, exp_digit));
    check(digit_onehot == N_CLASS'(1) << exp_digit, $sformatf("%s: one-hot %b", name, digit_onehot));
    for (int n = 0; n < 10; n++)
      check(int'(probs[n]) == exp_prob[n],
            $sformatf("%s: prob[%0d] %0d want %0d", name, n, probs[n], exp_prob[n]));
    @(negedge clk);
    check(!done && !busy, {name, ": done is one pulse, then idle"});
  endtask

  // ---- seven-segment glyphs ------------------------------------------------
  // segment bits: a=0 b=1 c=2 d=3 e=4 f=5 g=6
  function automatic logic [6:0] segs(input int d);
    case (d)
      0: return 7'b0111111;  1: return 7'b0000110;  2: return 7'b1011011;
      3: return 7'b1001111;  4: return 7'b1100110;  5: return 7'b1101101;
      6: return 7'b1111101;  7: return 7'b0000111;  8: return 7'b1111111;
      default: return 7'b1101111;
    endcase
  endfunction

  function automatic bit lit(input int d, input int r, input int c);
    logic [6:0] s;
    s = segs(d);
    return (s[0] && r >= 3  && r <= 5  && c >= 8  && c <= 19) ||   // a
           (s[1] && c >= 18 && c <= 20 && r >= 4  && r <= 13) ||   // b
           (s[2] && c >= 18 && c <= 20 && r >= 14 && r <= 23) ||   // c
           (s[3] && r >= 22 && r <= 24 && c >= 8  && c <= 19) ||   // d
           (s[4] && c >= 7  && c <= 9  && r >= 14 && r <= 23) ||   // e
           (s[5] && c >= 7  && c <= 9  && r >= 4  && r <= 13) ||   // f
           (s[6] && r >= 12 && r <= 14 && c >= 8  && c <= 19);     // g
  endfunction

  initial begin
    int labels [10] = '{0, 1, 2, 1, 4, 7, 4, 9, 5, 9};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Part 1: template weights and the ten digit images
    for (int n = 0; n < 10; n++) begin
      int on;
      on = 0;
      for (int p = 0; p < 784; p++) begin
        weights[n][p] = lit(n, p / 28, p % 28) ? 8'sd2 : -8'sd2;
        if (lit(n, p / 28, p % 28)) on++;
      end
      bias[n] = BIAS_W'(-(on * 255 * 2) / 2);
    end
    for (int i = 0; i < 10; i++) begin
      for (int p = 0; p < 784; p++)
        pixels[p] = lit(labels[i], p / 28, p % 28) ? PIX_W'($urandom_range(220, 255))
                                                   : PIX_W'($urandom_range(0, 20));
      classify($sformatf("digit image %0d (label %0d)", i, labels[i]), i == 3, 1'b0);
      check(exp_digit == labels[i], $sformatf("model label %0d for image %0d", exp_digit, i));
      if (int'(digit) == labels[i]) correct_digits++;
    end

    // Part 2: random images, weights and biases
    for (int t = 0; t < 12; t++) begin
      int wmax;
      wmax = (t % 3 == 0) ? 127 : (t % 3 == 1) ? 1 : 3;
      for (int n = 0; n < 10; n++) begin
        for (int p = 0; p < 784; p++)
          weights[n][p] = WGT_W'($urandom_range(0, 2 * wmax) - wmax);
        bias[n] = BIAS_W'(int'($urandom_range(0, 400000)) - 200000);
      end
      for (int p = 0; p < 784; p++) pixels[p] = PIX_W'($urandom);
      if (t == 5) begin
        // two neurons with identical weights: a certain tie
        weights[7] = weights[2];
        bias[7] = bias[2] + 24'sd4000000;
        bias[2] = bias[7];
      end
      classify($sformatf("random image %0d", t), t == 4, t >= 6);
    end

    check(correct_digits == 10, $sformatf("digit workload: %0d of 10 correct", correct_digits));
    check(ignored_starts > 0, "a start while busy was exercised");
    check(saturations > 0, "a saturated probability was exercised");
    check(ties > 0, "a tie for the maximum was exercised");
    check(back_to_back > 0, "back-to-back images were exercised");
    for (int s = 0; s < 8; s++)
      check(seg_hits[s] > 0, $sformatf("sigmoid segment %0d exercised", s));
    $display("mechanisms: ignored_starts=%0d saturations=%0d ties=%0d back_to_back=%0d",
             ignored_starts, saturations, ties, back_to_back);
    $display("sigmoid segments hit: %0d %0d %0d %0d | %0d %0d %0d %0d", seg_hits[0], seg_hits[1],
             seg_hits[2], seg_hits[3], seg_hits[4], seg_hits[5], seg_hits[6], seg_hits[7]);
    $display("digit workload: %0d of 10 classified as their label", correct_digits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
