// population_counter_top: the complete bat population counter from the two
// beam detector outputs to the processor's display value and alarm.
//
// Chain: signal_conditioning makes the FSM inputs A, B and the count clock
// CP from the beam comparators; direction_fsm sets U/D' and CEP' once a bat
// has crossed both beams in order; the decade counter (74LS168 function,
// P tied to 0, PE' high, CET' low) steps once on the CP edge that follows a
// complete crossing; max_count_buffer (74LS169 as a register) keeps the
// counter value when it is 0 or 9; count_accumulator reads that value as
// input port A and keeps the decimal total, shows EE past 99 and sounds the
// alarm. All of this is the original arrangement. A single clock clk,
// with CP used as an enable, and the reset are this design's own choices.
//
// Interface: beam_a/beam_b are the comparator outputs (1 = beam seen; the
// analog emitters, photodiodes and comparators are outside). count_q shows
// the counter (the four LEDs), buffer_q the processor's port A nibble,
// port_b the display. Latency from the last beam clearing to the counter
// step is three clk cycles, to port_b four.
module population_counter_top
  import popcount_pkg::*;
#(
  parameter int unsigned ALARM_PULSES = 255,
  parameter int unsigned WAIT_STEPS   = 255
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       beam_a,
  input  logic       beam_b,
  output logic       ud_n,      // FSM U/D' (also drives an LED)
  output logic       cep_n,     // FSM CEP' (also drives an LED)
  output fsm_row_e   fsm_row,   // FSM secondary variables {x, y}
  output logic       cp,        // count clock level
  output logic [3:0] count_q,   // decade counter outputs
  output logic       tc_n,      // decade counter terminal count
  output logic [3:0] buffer_q,  // buffered count, processor port A
  output logic       buffer_pe_n,  // buffer load enable, low at 0 and 9
  output logic       buffer_load,  // buffer loads in this cycle
  output logic [7:0] port_b,    // displayed total or EE
  output logic [7:0] total,     // stored total
  output logic       added,     // one cycle per addition to the total
  output logic       alarm,     // alarm tone pin
  output logic       halted     // EE shown, waiting for reset
);

  logic a;
  logic b;
  logic cp_rise;

  signal_conditioning u_cond (
    .clk    (clk),
    .rst_n  (rst_n),
    .beam_a (beam_a),
    .beam_b (beam_b),
    .a      (a),
    .b      (b),
    .cp     (cp),
    .cp_rise(cp_rise)
  );

  direction_fsm u_fsm (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (a),
    .b    (b),
    .ud_n (ud_n),
    .cep_n(cep_n),
    .row  (fsm_row)
  );

  updown_counter #(
    .WIDTH  (4),
    .MODULUS(10)
  ) u_ls168 (
    .clk  (clk),
    .rst_n(rst_n),
    .cp_en(cp_rise),
    .pe_n (1'b1),
    .cep_n(cep_n),
    .cet_n(1'b0),
    .ud_n (ud_n),
    .p    (4'b0000),
    .q    (count_q),
    .tc_n (tc_n)
  );

  max_count_buffer u_buffer (
    .clk  (clk),
    .rst_n(rst_n),
    .cp_en(cp_rise),
    .d    (count_q),
    .q    (buffer_q),
    .pe_n (buffer_pe_n),
    .load (buffer_load)
  );

  count_accumulator #(
    .ALARM_PULSES(ALARM_PULSES),
    .WAIT_STEPS  (WAIT_STEPS)
  ) u_mpu (
    .clk   (clk),
    .rst_n (rst_n),
    .port_a({4'b0000, buffer_q}),
    .port_b(port_b),
    .total (total),
    .added (added),
    .alarm (alarm),
    .halted(halted)
  );

endmodule
