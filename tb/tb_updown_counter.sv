// tb_updown_counter: random control patterns into two updown_counter
// instances, a decade one (74LS168 use) and a 4-bit binary one (74LS169
// use), each compared with an integer reference model of the function
// table: load, count up, count down, hold, and terminal count TC'.
module tb_updown_counter;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic cp_en = 1'b0, pe_n = 1'b1, cep_n = 1'b1, cet_n = 1'b1, ud_n = 1'b1;
  logic [3:0] p = '0;
  logic [3:0] q10, q16;
  logic tc10_n, tc16_n;
  int checks = 0;
  int failures = 0;
  int m10 = 0;
  int m16 = 0;
  int wraps_up = 0;
  int wraps_down = 0;

  updown_counter #(.WIDTH(4), .MODULUS(10)) dut10 (
    .clk, .rst_n, .cp_en, .pe_n, .cep_n, .cet_n, .ud_n, .p, .q(q10), .tc_n(tc10_n));
  updown_counter #(.WIDTH(4), .MODULUS(16)) dut16 (
    .clk, .rst_n, .cp_en, .pe_n, .cep_n, .cet_n, .ud_n, .p, .q(q16), .tc_n(tc16_n));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int step(int v, int m);
    if (!cp_en) return v;
    if (!pe_n) return int'(p);
    if (cep_n || cet_n) return v;
    if (ud_n) return (v >= m - 1) ? 0 : v + 1;
    return (v == 0) ? m - 1 : v - 1;
  endfunction

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 8000; k++) begin
      @(negedge clk);
      check(int'(q10), m10, "decade Q");
      check(int'(q16), m16, "binary Q");
      check(int'(tc10_n), (!cet_n && (ud_n ? m10 == 9 : m10 == 0)) ? 0 : 1, "decade TC'");
      check(int'(tc16_n), (!cet_n && (ud_n ? m16 == 15 : m16 == 0)) ? 0 : 1, "binary TC'");
      cp_en = ($urandom_range(0, 3) != 0);
      pe_n  = ($urandom_range(0, 19) != 0);
      cep_n = ($urandom_range(0, 4) == 0);
      cet_n = ($urandom_range(0, 4) == 0);
      if ((k / 300) % 2 == 0) ud_n = ($urandom_range(0, 7) != 0);
      else                    ud_n = ($urandom_range(0, 7) == 0);
      p     = 4'($urandom_range(0, 15));
      if (cp_en && pe_n && !cep_n && !cet_n && ud_n && m10 == 9) wraps_up++;
      if (cp_en && pe_n && !cep_n && !cet_n && !ud_n && m10 == 0) wraps_down++;
      m10 = step(m10, 10);
      m16 = step(m16, 16);
    end
    checks++;
    if (wraps_up == 0 || wraps_down == 0) begin
      failures++;
      $display("FAIL decade wrap not exercised (up %0d, down %0d)", wraps_up, wraps_down);
    end
    $display("decade wraps up %0d down %0d", wraps_up, wraps_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
