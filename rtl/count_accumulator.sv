// count_accumulator: the counting program of the processor section, done in
// logic. It adds each new buffered count to a running two-digit decimal
// total, shows the total, and stops with "EE" and an alarm once the total
// would pass 99.
//
// The program's steps, which this block follows: clear the store, read the
// buffered count from input port A, add it in decimal mode to the store,
// write the result to output port B and the store, and repeat; when the
// total goes beyond 99 show EE, sound the alarm, clear the store and stay
// halted until reset. With the buffer delivering 9 at every decade mark the
// display runs 09, 18, 27, ... 99 and then EE.
//
// This design's own choices: a value is taken as new when port A differs
// from the value read in the previous cycle and is not zero (a zero on the
// port is the buffer's "decade restarted" mark and adds nothing). The
// limit test is the carry out of the two-digit BCD addition, so 99 itself
// is still shown and the next addition gives EE. The alarm is alarm_tone.
//
// Interface: port_a in (low nibble from the buffer); port_b is the display
// value; total is the stored sum; added pulses for one cycle per addition;
// alarm is the tone pin; halted is high from the EE result until reset.
// Timing: port_b and total change on the clk edge after port_a changes.
module count_accumulator
  import popcount_pkg::*;
#(
  parameter int unsigned ALARM_PULSES = 255,
  parameter int unsigned WAIT_STEPS   = 255
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] port_a,
  output logic [7:0] port_b,
  output logic [7:0] total,
  output logic       added,
  output logic       alarm,
  output logic       halted
);

  typedef enum logic [1:0] {
    ST_RUN   = 2'd0,
    ST_ALARM = 2'd1,
    ST_HALT  = 2'd2
  } acc_state_e;

  acc_state_e state;
  logic [7:0] port_a_q;
  logic [8:0] sum;
  logic       new_value;
  logic       alarm_start;
  logic       alarm_done;

  assign sum       = bcd_add(total, port_a, 1'b0);
  assign new_value = (state == ST_RUN) && (port_a != port_a_q) && (port_a != 8'h00);
  assign halted    = (state != ST_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_RUN;
      port_a_q    <= 8'h00;
      port_b      <= 8'h00;
      total       <= 8'h00;
      added       <= 1'b0;
      alarm_start <= 1'b0;
    end else begin
      port_a_q    <= port_a;
      added       <= 1'b0;
      alarm_start <= 1'b0;
      unique case (state)
        ST_RUN: begin
          if (new_value) begin
            added <= 1'b1;
            if (sum[8]) begin
              port_b      <= ERROR_CODE;
              alarm_start <= 1'b1;
              state       <= ST_ALARM;
            end else begin
              port_b <= sum[7:0];
              total  <= sum[7:0];
            end
          end
        end
        ST_ALARM: begin
          if (alarm_done) begin
            total <= 8'h00;
            state <= ST_HALT;
          end
        end
        ST_HALT: ;
        default: state <= ST_HALT;
      endcase
    end
  end

  alarm_tone #(
    .PULSES     (ALARM_PULSES),
    .HALF_PERIOD(WAIT_STEPS)
  ) u_alarm (
    .clk  (clk),
    .rst_n(rst_n),
    .start(alarm_start),
    .tone (alarm),
    .busy (),
    .done (alarm_done)
  );

  // The total is kept in valid BCD and never passes the limit.
  assert property (@(posedge clk) disable iff (!rst_n)
                   total[3:0] <= 4'd9 && total[7:4] <= 4'd9 && total <= BCD_LIMIT);

endmodule
