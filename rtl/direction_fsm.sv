// direction_fsm: decides in which order a bat crossed the two beams and
// tells the decade counter to step once per complete crossing.
//
// The original circuit is a fundamental-mode (asynchronous) machine:
// S0 idle; a bat entering breaks beam B, then both, then only A, then
// clears both (states S1, S3, S5), and a bat leaving does the same
// starting from beam A (S2, S4, S6). Its flow table merges these into three
// rows coded by the secondary variables x and y:
//   {x,y}=01  idle (S0)
//   {x,y}=11  B broken first: B only, A and B, A only (count up here)
//   {x,y}=00  A broken first: A only, A and B, B only (count down here)
// Any input "both beams clear" leads back to idle. Backing out of a beam
// returns to the previous step, so a bat that turns round is not counted.
// The excitation logic is the original pair of equations
//   X = A'B y + A x + B x        Y = A'B' + A'y + x
// and the outputs are its output maps:
//   CEP' = 0 in the last step of either crossing, where one beam is still
//          broken: {x,y}=00 with B only, or x=1 with A only
//   U/D' = 1 in the last step of a B-first crossing only (x=1, A only)
// With the counter's polarity (U/D' = 1 counts up) an inward, B-first,
// crossing adds one and an outward, A-first, crossing takes one away.
//
// This design's own choices: the secondary variables are held in flip-flops
// clocked by clk instead of being fed back through gates, which removes the
// races of the asynchronous circuit, and the two outputs are registered.
// The counter steps on the clock enable that follows the last beam
// clearing; by then the machine is already back in S0, so the registered
// outputs still carry the counting values one cycle longer, as the gate
// delays of the original circuit did at the CP edge.
//
// Interface: a, b from signal_conditioning (1 = beam broken); ud_n and
// cep_n to the counter, both one clk cycle behind the inputs; row shows
// {x,y}, also one cycle behind.
module direction_fsm
  import popcount_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     a,      // 1 = beam A broken
  input  logic     b,      // 1 = beam B broken
  output logic     ud_n,   // U/D' to the counter, registered
  output logic     cep_n,  // CEP' to the counter, registered, active low
  output fsm_row_e row     // secondary variables {x, y}
);

  logic x;
  logic y;
  logic x_next;
  logic y_next;
  logic ud_n_d;
  logic cep_n_d;

  assign x = row[1];
  assign y = row[0];

  always_comb begin
    x_next  = (~a & b & y) | (a & x) | (b & x);
    y_next  = (~a & ~b) | (~a & y) | x;
    ud_n_d  = x & a & ~b;
    cep_n_d = ~((~x & ~y & b & ~a) | (x & a & ~b));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row   <= ROW_IDLE;
      ud_n  <= 1'b0;
      cep_n <= 1'b1;
    end else begin
      row   <= fsm_row_e'({x_next, y_next});
      ud_n  <= ud_n_d;
      cep_n <= cep_n_d;
    end
  end

endmodule
