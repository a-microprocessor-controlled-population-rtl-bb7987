// updown_counter: synchronous presettable up/down counter with the control
// pins of the 74LS168 (decade, MODULUS = 10) and 74LS169 (4-bit binary,
// MODULUS = 16).
//
// Function table, evaluated on each count clock:
//   PE' = 0                       load P into Q
//   PE' = 1, CEP' = 0, CET' = 0   count: up when U/D' = 1, down when 0
//   otherwise                     hold
// Counting wraps at the modulus: up from MODULUS-1 to 0, down from 0 to
// MODULUS-1; a value at or above the modulus counts up to 0. TC' is low
// while CET' is low and Q is at the end of the count in the current
// direction (MODULUS-1 up, 0 down). These are the behaviours of the two
// parts the original circuit uses; its measured table confirms the count-up and
// count-down rows and the counter is used with P tied to 0 and PE' high.
//
// This design's own choices: the count clock CP is given as an enable,
// cp_en, sampled on clk, so that the whole design has one clock; and there
// is an asynchronous reset to 0, which the parts themselves lack.
module updown_counter #(
  parameter int unsigned WIDTH   = 4,
  parameter int unsigned MODULUS = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cp_en,  // one-cycle pulse: rising edge of CP
  input  logic             pe_n,   // parallel enable (load), active low
  input  logic             cep_n,  // count enable parallel, active low
  input  logic             cet_n,  // count enable trickle, active low
  input  logic             ud_n,   // 1 = count up, 0 = count down
  input  logic [WIDTH-1:0] p,      // parallel data
  output logic [WIDTH-1:0] q,
  output logic             tc_n    // terminal count, active low
);

  localparam logic [WIDTH-1:0] LAST = WIDTH'(MODULUS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (cp_en) begin
      if (!pe_n) begin
        q <= p;
      end else if (!cep_n && !cet_n) begin
        if (ud_n) q <= (q >= LAST) ? '0 : q + 1'b1;
        else      q <= (q == '0) ? LAST : q - 1'b1;
      end
    end
  end

  assign tc_n = ~(~cet_n & (ud_n ? (q == LAST) : (q == '0)));

  initial begin
    assert (MODULUS >= 2 && MODULUS <= (2 ** WIDTH))
      else $error("updown_counter: MODULUS must fit in WIDTH bits");
  end

endmodule
