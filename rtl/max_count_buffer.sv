// max_count_buffer: holds the last "decade mark" the counter passed, 0000
// or 1001, for the processor's input port.
//
// A 74LS169 (4-bit binary up/down counter) is used as a parallel-in
// parallel-out register: U/D', CEP' and CET' are tied high so it never
// counts, its P inputs take the decade counter's outputs and it shares the
// counter's clock. Its load input PE' comes from three gates on the counter
// outputs, one exclusive-OR and two ORs:
//   PE' = (D0 xor D3) or (D1 or D2)
// which is low only for D = 0000 and D = 1001. So at each count clock the
// register takes the counter's value if that value is 0 or 9 and otherwise
// keeps what it holds. Because the register and the counter step on the
// same clock, the register sees the counter value from before that step.
//
// Interface: d is the counter output, q goes to the processor port, pe_n is
// brought out for observation, load is high in cycles where cp_en loads.
// Timing: q changes on the clk edge where cp_en is high and pe_n is low.
module max_count_buffer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cp_en,  // count clock enable shared with the counter
  input  logic [3:0] d,      // decade counter outputs Q0..Q3
  output logic [3:0] q,      // to the processor input port
  output logic       pe_n,   // load enable, low for 0000 and 1001
  output logic       load    // cp_en & ~pe_n
);

  logic tc_n_unused;

  assign pe_n = (d[0] ^ d[3]) | (d[1] | d[2]);
  assign load = cp_en & ~pe_n;

  updown_counter #(
    .WIDTH  (4),
    .MODULUS(16)
  ) u_ls169 (
    .clk  (clk),
    .rst_n(rst_n),
    .cp_en(cp_en),
    .pe_n (pe_n),
    .cep_n(1'b1),
    .cet_n(1'b1),
    .ud_n (1'b1),
    .p    (d),
    .q    (q),
    .tc_n (tc_n_unused)
  );

endmodule
