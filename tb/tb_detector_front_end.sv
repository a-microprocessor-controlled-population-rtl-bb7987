// tb_detector_front_end: runs the whole counter from photodiode voltages.
// Two detector channel models, with the two channels' divider resistors,
// turn sensed voltages into beam levels for population_counter_top. While a
// beam is seen the photodiode develops 0.24 V (channel A) or 0.28 V
// (channel B), the measured levels of the original front end; a blocked
// beam is taken to give 0.05 V, below both references. Twenty inward and
// five outward passages, plus two bats that turn back, must leave the
// decade counter at (20 - 5) mod 10 = 5. In the chosen order the buffer
// turns from 0 to 9 once, so the display shows 09, and the last 0-or-9
// value the counter steps away from is 0, so the buffer ends at 0.
module tb_detector_front_end;
  import popcount_pkg::*;

  localparam real V_SEEN_A = 0.24;
  localparam real V_SEEN_B = 0.28;
  localparam real V_DARK   = 0.05;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  real v_a = V_SEEN_A;
  real v_b = V_SEEN_B;
  logic beam_a, beam_b;
  logic ud_n, cep_n, cp, tc_n, buffer_pe_n, buffer_load, added, alarm, halted;
  fsm_row_e fsm_row;
  logic [3:0] count_q, buffer_q;
  logic [7:0] port_b, total;
  int checks = 0;
  int failures = 0;

  ir_detector_model #(.R1(22.0e3), .R2(1.0e3)) det_a (.v_sense(v_a), .vo(beam_a));
  ir_detector_model #(.R1(183.0e3), .R2(10.0e3)) det_b (.v_sense(v_b), .vo(beam_b));

  population_counter_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic phase(input bit a_dark, input bit b_dark);
    v_a = a_dark ? V_DARK : V_SEEN_A;
    v_b = b_dark ? V_DARK : V_SEEN_B;
    repeat (6) @(negedge clk);
  endtask

  initial begin
    int ups;
    int downs;
    ups = 0;
    downs = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(int'(beam_a), 1, "channel A sees its beam");
    check(int'(beam_b), 1, "channel B sees its beam");
    phase(1, 1);
    check(int'(beam_a), 0, "channel A blocked");
    check(int'(beam_b), 0, "channel B blocked");
    phase(0, 0);
    check(int'(count_q), 0, "no count for an unordered blocking");
    for (int k = 0; k < 27; k++) begin
      if (k % 5 == 4 && downs < 5) begin
        // outward: A, both, B, clear
        phase(1, 0); phase(1, 1); phase(0, 1); phase(0, 0);
        downs++;
      end else if (k == 10 || k == 20) begin
        // turns back: B, both, B, clear
        phase(0, 1); phase(1, 1); phase(0, 1); phase(0, 0);
      end else begin
        // inward: B, both, A, clear
        phase(0, 1); phase(1, 1); phase(1, 0); phase(0, 0);
        ups++;
      end
    end
    check(ups, 20, "inward passages");
    check(downs, 5, "outward passages");
    check(int'(count_q), 5, "decade counter");
    check(int'(buffer_q), 0, "buffer");
    check(int'(port_b), 32'h09, "display");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
