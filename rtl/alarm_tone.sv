// alarm_tone: sounds the alarm as a burst of square-wave pulses on one
// output pin.
//
// The processor program drives the alarm by setting a port bit, waiting a
// delay loop, clearing the bit, waiting again, and repeating that pulse a
// fixed number of times; both the delay loop and the pulse count start from
// 255 (0xFF). Here a step counter stands for the delay loop, one loop pass
// per clk cycle, so the tone is high for HALF_PERIOD cycles, low for
// HALF_PERIOD cycles, and PULSES such periods make one alarm.
//
// Interface: a one-cycle start begins a burst (ignored while busy); busy is
// high during the burst; done is high for one cycle after the last low
// half-period. A burst lasts exactly 2 * HALF_PERIOD * PULSES cycles from
// the cycle after start.
module alarm_tone #(
  parameter int unsigned PULSES      = 255,  // ALARM: LDX #$FF
  parameter int unsigned HALF_PERIOD = 255   // WAIT:  LDX #$FF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic tone,
  output logic busy,
  output logic done
);

  localparam int unsigned SW = (HALF_PERIOD > 1) ? $clog2(HALF_PERIOD) : 1;
  localparam int unsigned PW = (PULSES > 1) ? $clog2(PULSES) : 1;

  logic [SW-1:0] step;
  logic [PW-1:0] pulse;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step  <= '0;
      pulse <= '0;
      tone  <= 1'b0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          tone  <= 1'b1;
          step  <= '0;
          pulse <= '0;
        end
      end else if (step == SW'(HALF_PERIOD - 1)) begin
        step <= '0;
        if (tone) begin
          tone <= 1'b0;
        end else if (pulse == PW'(PULSES - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          pulse <= pulse + 1'b1;
          tone  <= 1'b1;
        end
      end else begin
        step <= step + 1'b1;
      end
    end
  end

endmodule
