// tb_alarm_tone: starts alarm bursts on a small instance (3 pulses, 4-cycle
// half period) and on one at the default 255 x 255 size, and compares the
// tone cycle by cycle with the expected square wave: high for HALF_PERIOD
// cycles, low for HALF_PERIOD cycles, PULSES times, then done for one
// cycle. Also checks that a start during a burst is ignored.
module tb_alarm_tone;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start_s = 1'b0;
  logic start_d = 1'b0;
  logic tone_s, busy_s, done_s;
  logic tone_d, busy_d, done_d;
  int checks = 0;
  int failures = 0;

  alarm_tone #(.PULSES(3), .HALF_PERIOD(4)) dut_s (
    .clk, .rst_n, .start(start_s), .tone(tone_s), .busy(busy_s), .done(done_s));
  alarm_tone dut_d (
    .clk, .rst_n, .start(start_d), .tone(tone_d), .busy(busy_d), .done(done_d));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what, input int t);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %0d expected %0d", what, t, got, exp);
    end
  endtask

  // Follow one burst of the small instance; restart_at < 0 means no
  // second start during the burst.
  task automatic burst_small(input int restart_at);
    @(negedge clk);
    start_s = 1'b1;
    @(negedge clk);
    start_s = 1'b0;
    for (int t = 0; t < 2 * 4 * 3; t++) begin
      check(int'(tone_s), ((t / 4) % 2 == 0) ? 1 : 0, "small tone", t);
      check(int'(busy_s), 1, "small busy", t);
      check(int'(done_s), 0, "small done", t);
      if (t == restart_at) start_s = 1'b1;
      @(negedge clk);
      start_s = 1'b0;
    end
    check(int'(busy_s), 0, "small busy at end", 24);
    check(int'(done_s), 1, "small done at end", 24);
    check(int'(tone_s), 0, "small tone at end", 24);
    @(negedge clk);
    check(int'(done_s), 0, "small done after end", 25);
  endtask

  initial begin
    int highs;
    int rises;
    logic prev;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(int'(tone_s), 0, "idle tone", 0);
    burst_small(-1);
    burst_small(9);
    // Default size: count pulses and cycles.
    start_d = 1'b1;
    @(negedge clk);
    start_d = 1'b0;
    highs = 0;
    rises = 0;
    prev = 1'b0;
    for (int t = 0; t < 2 * 255 * 255; t++) begin
      if (tone_d) highs++;
      if (tone_d && !prev) rises++;
      prev = tone_d;
      if (!busy_d) begin
        check(int'(busy_d), 1, "default busy", t);
        break;
      end
      @(negedge clk);
    end
    check(int'(done_d), 1, "default done", 0);
    check(rises, 255, "default pulse count", 0);
    check(highs, 255 * 255, "default high cycles", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
