// popcount_pkg: types and constants shared by the bat population counter.
//
// fsm_row_e names the three merged rows of the direction machine's flow
// table by their secondary-variable code {x, y}: the idle row, the row of
// a crossing that broke beam A first and the row of one that broke beam B
// first. The fourth code is unused and exits to the idle row.
// The row codes are the original design's (x,y assignment of its merged
// flow table). The BCD limit 99 and the error code EE are original; the
// bcd_add function is the decimal-mode addition the 6502 program relies on
// (SED; CLC; ADC), written out here as plain logic.
package popcount_pkg;

  // Secondary state {x, y} of the direction FSM.
  typedef enum logic [1:0] {
    ROW_A_FIRST = 2'b00,  // beam A broken first: outward crossing
    ROW_IDLE    = 2'b01,  // S0: both beams clear
    ROW_UNUSED  = 2'b10,  // never stable, falls back to ROW_IDLE
    ROW_B_FIRST = 2'b11   // beam B broken first: inward crossing
  } fsm_row_e;

  // Largest total the two-digit display can show, and the error code shown
  // once a sum exceeds it.
  localparam logic [7:0] BCD_LIMIT  = 8'h99;
  localparam logic [7:0] ERROR_CODE = 8'hEE;

  // Two-digit packed-BCD addition with carry in and carry out, as done by
  // the 6502 ADC instruction in decimal mode for valid BCD operands.
  // Returns {carry_out, sum}.
  function automatic logic [8:0] bcd_add(input logic [7:0] x,
                                         input logic [7:0] y,
                                         input logic       cin);
    logic [4:0] lo;
    logic [4:0] hi;
    logic       c_lo;
    logic       c_hi;
    lo   = {1'b0, x[3:0]} + {1'b0, y[3:0]} + {4'b0, cin};
    c_lo = (lo > 5'd9);
    if (c_lo) lo = lo + 5'd6;
    hi   = {1'b0, x[7:4]} + {1'b0, y[7:4]} + {4'b0, c_lo};
    c_hi = (hi > 5'd9);
    if (c_hi) hi = hi + 5'd6;
    return {c_hi, hi[3:0], lo[3:0]};
  endfunction

endpackage
