// tb_count_accumulator: feeds count_accumulator (small alarm: 2 pulses of
// 3-cycle halves) first with the buffer's real pattern, 9 then 0 again and
// again, expecting the display 09, 18, ..., 99 and then EE, the alarm and
// a halt; then, after a reset, with random two-digit BCD values, checked
// against decimal integer arithmetic. Repeated values must not add, and
// nothing adds while halted.
module tb_count_accumulator;
  import popcount_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] port_a = '0;
  logic [7:0] port_b, total;
  logic added, alarm, halted;
  int checks = 0;
  int failures = 0;
  int alarm_pulses = 0;
  int overflows = 0;
  logic alarm_q = 1'b0;

  count_accumulator #(.ALARM_PULSES(2), .WAIT_STEPS(3)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && alarm && !alarm_q) alarm_pulses++;
    alarm_q <= alarm;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int dec(logic [7:0] v);
    return int'(v[7:4]) * 10 + int'(v[3:0]);
  endfunction

  function automatic logic [7:0] bcd(int v);
    return {4'(v / 10), 4'(v % 10)};
  endfunction

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    port_a = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(int'(port_b), 0, "display after reset");
  endtask

  // Present a value for a few cycles; returns the model's expectation.
  task automatic present(input logic [7:0] v, inout int sum, inout bit halt);
    logic [7:0] prev_v;
    prev_v = port_a;
    port_a = v;
    @(negedge clk);
    if (!halt && v != prev_v && v != 8'h00) begin
      if (sum + dec(v) > 99) begin
        halt = 1'b1;
        overflows++;
        check(int'(port_b), 32'hEE, "EE on overflow");
      end else begin
        sum += dec(v);
        check(int'(port_b), int'(bcd(sum)), "display after add");
      end
      check(int'(added), 1, "added strobe");
    end else begin
      check(int'(added), 0, "no add");
    end
    repeat (2) @(negedge clk);
    if (!halt) check(int'(total), int'(bcd(sum)), "stored total");
    check(int'(halted), halt ? 1 : 0, "halted");
  endtask

  initial begin
    int sum;
    bit halt;
    do_reset();
    sum = 0;
    halt = 1'b0;
    for (int k = 0; k < 13; k++) begin
      present(8'h09, sum, halt);
      present(8'h09, sum, halt);  // same value again: no addition
      present(8'h00, sum, halt);
    end
    check(sum, 99, "last total prev_v EE");
    check(int'(port_b), 32'hEE, "EE shown");
    repeat (30) @(negedge clk);
    check(alarm_pulses, 2, "alarm pulses");
    check(int'(total), 0, "store cleared after alarm");
    check(int'(halted), 1, "still halted");
    present(8'h05, sum, halt);
    check(int'(port_b), 32'hEE, "EE held while halted");

    for (int r = 0; r < 40; r++) begin
      do_reset();
      sum = 0;
      halt = 1'b0;
      while (!halt) begin
        logic [7:0] v;
        v = bcd($urandom_range(0, 30));
        present(v, sum, halt);
      end
      repeat (30) @(negedge clk);
    end
    check(overflows, 41, "overflows seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
