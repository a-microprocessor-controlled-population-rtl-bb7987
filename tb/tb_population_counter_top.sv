// tb_population_counter_top: end-to-end test of the population counter at
// its default parameters. Bats are modelled as beam interruptions: a
// crossing breaks one beam, then both, then releases the first, then the
// second. A reference model follows every step: the decade counter moves
// up for an inward crossing (beam B broken first), down for an outward one
// (beam A first) and not at all for
// a bat that turns back; at each count clock the buffer keeps the counter
// value if it is 0 or 9; each new 9 on the buffer is added to the decimal
// total; passing 99 shows EE, sounds 255 alarm pulses, clears the total and
// halts until reset. The counter's three-cycle latency after the last beam
// clears is checked, and every mechanism is counted and must occur.
module tb_population_counter_top;
  import popcount_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic beam_a = 1'b1;
  logic beam_b = 1'b1;
  logic ud_n, cep_n, cp, tc_n, buffer_pe_n, buffer_load, added, alarm, halted;
  fsm_row_e fsm_row;
  logic [3:0] count_q, buffer_q;
  logic [7:0] port_b, total;

  population_counter_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // Reference state.
  int m_count = 0;
  int m_buf = 0;
  int m_total = 0;
  bit m_halt = 0;
  logic [7:0] m_disp = 8'h00;

  // Mechanism counters.
  typedef enum int {
    M_UP, M_DOWN, M_TURN_BACK, M_WRAP_UP, M_WRAP_DOWN, M_BUF9, M_BUF0, M_ADD,
    M_DIGIT_CARRY, M_OVERFLOW, M_ALARM_BURST, M_IGNORED_HALTED, M_RESTART, M_NUM
  } mech_e;
  int mech [M_NUM];
  int alarm_rises = 0;
  logic alarm_q = 1'b0;

  always @(posedge clk) begin
    if (rst_n && alarm && !alarm_q) alarm_rises++;
    alarm_q <= alarm;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] bcd(int v);
    return {4'(v / 10), 4'(v % 10)};
  endfunction

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0h expected %0h", what, $time, got, exp);
    end
  endtask

  task automatic hold();
    repeat ($urandom_range(3, 6)) @(negedge clk);
  endtask

  // Release the last beam: the count clock rises. dir = +1, -1 or 0.
  task automatic release_last(input int dir, input bit release_a);
    int old_count;
    int new_count;
    old_count = m_count;
    if (dir > 0) new_count = (m_count + 1) % 10;
    else if (dir < 0) new_count = (m_count + 9) % 10;
    else new_count = m_count;
    if (release_a) beam_a = 1'b1;
    else           beam_b = 1'b1;
    repeat (2) @(negedge clk);
    check(int'(count_q), old_count, "count before CP edge takes effect");
    @(negedge clk);
    check(int'(count_q), new_count, "count three cycles after beams clear");
    // Buffer: keeps the pre-edge counter value when it is 0 or 9.
    if (old_count == 9 || old_count == 0) begin
      if (old_count == 9) mech[M_BUF9]++;
      else                mech[M_BUF0]++;
      if (old_count == 9 && m_buf == 0) begin
        if (m_halt) begin
          mech[M_IGNORED_HALTED]++;
        end else if (m_total + 9 > 99) begin
          m_halt = 1;
          m_disp = ERROR_CODE;
          mech[M_OVERFLOW]++;
        end else begin
          if ((m_total % 10) + 9 > 9) mech[M_DIGIT_CARRY]++;
          m_total += 9;
          m_disp = bcd(m_total);
          mech[M_ADD]++;
        end
      end
      m_buf = old_count;
    end
    if (dir > 0 && old_count == 9) mech[M_WRAP_UP]++;
    if (dir < 0 && old_count == 0) mech[M_WRAP_DOWN]++;
    m_count = new_count;
    check(int'(buffer_q), m_buf, "buffer");
    @(negedge clk);
    check(int'(port_b), int'(m_disp), "display");
    check(int'(halted), int'(m_halt), "halted");
    if (!m_halt) check(int'(total), int'(bcd(m_total)), "total");
    hold();
  endtask

  // A bat crosses inward (beam B broken first) or outward (beam A first).
  task automatic crossing(input bit inward);
    if (inward) beam_b = 1'b0; else beam_a = 1'b0;
    hold();
    if (inward) beam_a = 1'b0; else beam_b = 1'b0;
    hold();
    if (inward) beam_b = 1'b1; else beam_a = 1'b1;
    hold();
    // Before the last beam clears the FSM is in its counting step.
    check(int'(cep_n), 0, "CEP' low before the last beam clears");
    check(int'(ud_n), inward ? 1 : 0, "U/D' sets the direction");
    if (inward) mech[M_UP]++; else mech[M_DOWN]++;
    release_last(inward ? 1 : -1, inward);
  endtask

  // A bat enters the beams and turns back, in one of three ways.
  task automatic turn_back(input int how);
    mech[M_TURN_BACK]++;
    case (how)
      0: begin  // touches beam A only
        beam_a = 1'b0; hold();
        release_last(0, 1'b1);
      end
      1: begin  // breaks both, backs out of B
        beam_a = 1'b0; hold();
        beam_b = 1'b0; hold();
        beam_b = 1'b1; hold();
        check(int'(cep_n), 1, "CEP' high after backing out");
        release_last(0, 1'b1);
      end
      default: begin  // reaches the counting step, then goes back
        beam_b = 1'b0; hold();
        beam_a = 1'b0; hold();
        beam_b = 1'b1; hold();
        check(int'(cep_n), 0, "CEP' low in the counting step");
        beam_b = 1'b0; hold();
        beam_a = 1'b1; hold();
        check(int'(cep_n), 1, "CEP' high after going back");
        release_last(0, 1'b0);
      end
    endcase
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    beam_a = 1'b1;
    beam_b = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    m_count = 0;
    m_buf = 0;
    m_total = 0;
    m_halt = 0;
    m_disp = 8'h00;
    @(negedge clk);
    check(int'(count_q), 0, "count after reset");
    check(int'(port_b), 0, "display after reset");
    check(int'(fsm_row), int'(ROW_IDLE), "FSM idle after reset");
  endtask

  initial begin
    int r;
    do_reset();

    // Mixed traffic in both directions, with bats that turn back.
    for (int k = 0; k < 150; k++) begin
      r = $urandom_range(0, 9);
      if (r < 4)      crossing(1'b1);
      else if (r < 8) crossing(1'b0);
      else            turn_back($urandom_range(0, 2));
    end

    // Then a steady stream one way until the total passes 99.
    while (!m_halt) crossing(1'b1);
    check(int'(port_b), int'(ERROR_CODE), "EE shown");
    // The alarm sounds: 255 pulses of 2 x 255 cycles.
    repeat (10) crossing(1'b1);  // traffic while halted changes nothing shown
    wait (alarm_rises == 255 && !alarm);
    repeat (300) @(negedge clk);
    check(alarm_rises, 255, "alarm pulses");
    if (alarm_rises == 255) mech[M_ALARM_BURST]++;
    check(int'(total), 0, "total cleared after alarm");
    check(int'(port_b), int'(ERROR_CODE), "EE kept until reset");
    check(int'(halted), 1, "halted until reset");

    // Reset and count again.
    do_reset();
    for (int k = 0; k < 20; k++) crossing(1'b1);
    check(int'(port_b), 32'h18, "counting again after reset");
    if (port_b == 8'h18) mech[M_RESTART]++;

    for (int i = 0; i < M_NUM; i++) begin
      mech_e m;
      m = mech_e'(i);
      $display("mechanism %-18s %0d", m.name(), mech[i]);
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", m.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
