// tb_direction_fsm: drives direction_fsm with random fundamental-mode input
// sequences (one beam changes at a time) and compares it with a reference
// written from the description of the states: S0 idle; S1, S3, S5 for a
// bat that broke beam B first (B, then both, then A alone) and S2, S4, S6
// for one that broke A first. Expected outputs: CEP' low only in S5 and
// S6, U/D' high (count up) only in S5, and the secondary row of the
// reached state; all registered, so checked one edge after the input.
// Before the random part, the measured output table (one inward and one
// outward crossing, eight rows of B, A -> X, Y, U/D', CEP') is replayed.
module tb_direction_fsm;
  import popcount_pkg::*;

  typedef enum int {S0, S1, S2, S3, S4, S5, S6} st_e;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic a = 1'b0;
  logic b = 1'b0;
  logic ud_n, cep_n;
  fsm_row_e row;
  int checks = 0;
  int failures = 0;
  int seen [7];
  st_e st = S0;
  // Measured output table, rows {B, A, X, Y, U/D', CEP'}.
  logic [5:0] table3 [8] = '{6'b00_01_01, 6'b10_11_01, 6'b11_11_01, 6'b01_11_10,
                             6'b00_01_01, 6'b01_00_01, 6'b11_00_01, 6'b10_00_00};

  direction_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic st_e next_state(st_e s, logic ia, logic ib);
    if (!ia && !ib) return S0;
    case (s)
      S0: return ib ? S1 : S2;
      S1: return ia ? S3 : S1;
      S3: return (ia && ib) ? S3 : (ia ? S5 : S1);
      S5: return ib ? S3 : S5;
      S2: return ib ? S4 : S2;
      S4: return (ia && ib) ? S4 : (ib ? S6 : S2);
      S6: return ia ? S4 : S6;
      default: return S0;
    endcase
  endfunction

  function automatic fsm_row_e row_of(st_e s);
    case (s)
      S0:         return ROW_IDLE;
      S1, S3, S5: return ROW_B_FIRST;
      default:    return ROW_A_FIRST;  // S2, S4, S6
    endcase
  endfunction

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s in %s (A=%0b B=%0b): got %0d expected %0d", what, st.name(), a, b, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(int'(row), int'(ROW_IDLE), "row after reset");
    begin
      foreach (table3[i]) begin
        b = table3[i][5];
        a = table3[i][4];
        @(negedge clk);
        check(int'(row), int'(table3[i][3:2]), "output table X,Y");
        check(int'(ud_n), int'(table3[i][1]), "output table U/D'");
        check(int'(cep_n), int'(table3[i][0]), "output table CEP'");
      end
      b = 1'b0;
      a = 1'b0;
      @(negedge clk);
    end
    for (int k = 0; k < 6000; k++) begin
      // Change exactly one beam; hold each input for 1..3 cycles.
      if ($urandom_range(0, 1) != 0) a = ~a;
      else                           b = ~b;
      st = next_state(st, a, b);
      seen[st]++;
      repeat ($urandom_range(1, 3)) begin
        @(negedge clk);
        check(int'(row), int'(row_of(st)), "row");
        check(int'(cep_n), (st == S5 || st == S6) ? 0 : 1, "CEP'");
        check(int'(ud_n), (st == S5) ? 1 : 0, "U/D'");
      end
    end
    for (int s = 0; s < 7; s++) begin
      checks++;
      if (seen[s] == 0) begin
        failures++;
        $display("FAIL state S%0d never reached", s);
      end
    end
    $display("visits S0..S6: %0d %0d %0d %0d %0d %0d %0d",
             seen[0], seen[1], seen[2], seen[3], seen[4], seen[5], seen[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
