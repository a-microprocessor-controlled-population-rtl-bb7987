// tb_max_count_buffer: walks every 4-bit counter value through
// max_count_buffer with random clock enables. Expected: PE' low only for
// 0000 and 1001 (the buffer stage truth table), and Q takes D only on an
// enabled clock with PE' low, otherwise holds.
module tb_max_count_buffer;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic cp_en = 1'b0;
  logic [3:0] d = '0;
  logic [3:0] q;
  logic pe_n, load;
  int checks = 0;
  int failures = 0;
  int loads9 = 0;
  int loads0 = 0;
  logic [3:0] model = '0;

  max_count_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s (D=%0d): got %0d expected %0d", what, d, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 5000; k++) begin
      d     = (k < 32) ? 4'(k % 16) : 4'($urandom_range(0, 15));
      cp_en = (k < 32) ? 1'b1 : ($urandom_range(0, 1) != 0);
      #1;
      check(int'(pe_n), (d == 4'd0 || d == 4'd9) ? 0 : 1, "PE'");
      check(int'(load), (cp_en && (d == 4'd0 || d == 4'd9)) ? 1 : 0, "load");
      if (cp_en && (d == 4'd0 || d == 4'd9)) begin
        model = d;
        if (d == 4'd9) loads9++;
        else           loads0++;
      end
      @(negedge clk);
      check(int'(q), int'(model), "Q");
    end
    checks++;
    if (loads9 == 0 || loads0 == 0) begin
      failures++;
      $display("FAIL loads not exercised");
    end
    $display("loads of 9: %0d, of 0: %0d", loads9, loads0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
