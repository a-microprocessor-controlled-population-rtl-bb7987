// ir_detector_model: behavioural model of one analog detector channel, for
// testbenches only (it uses real-valued signals and is not synthesizable).
//
// In the original front end a photodiode develops a small voltage while it
// sees its infrared beam, and an LM339 comparator compares that voltage with
// a reference taken from a resistor divider across the 5 V supply:
//   V- = V1 * R2 / (R1 + R2)
// The comparator output is high (about 5 V) when the sensed voltage is above
// the reference and low (about 0 V) otherwise. The default divider values
// are those of channel B (183 k / 10 k, about 0.26 V); channel A uses
// 22 k / 1 k (about 0.22 V). The output changes DELAY time units after the
// input, standing in for the comparator's response time (this model's own
// figure).
//
// Interface: v_sense is the photodiode voltage in volts; vo is the logic
// level of the comparator output (1 = beam seen).
module ir_detector_model #(
  parameter real V1       = 5.0,
  parameter real R1       = 183.0e3,
  parameter real R2       = 10.0e3,
  parameter int  DELAY    = 1
) (
  input  real  v_sense,
  output logic vo
);

  localparam real VREF = V1 * R2 / (R1 + R2);

  assign #(DELAY) vo = (v_sense > VREF);

endmodule
