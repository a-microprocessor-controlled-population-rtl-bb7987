// tb_signal_conditioning: random beam patterns into signal_conditioning.
// The expected A, B and CP are the gate functions of the beam values seen
// two clk edges earlier (synchronizer depth); cp_rise is CP now and not CP
// one cycle before. Counts how many CP rising edges were seen.
module tb_signal_conditioning;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic beam_a = 1'b1;
  logic beam_b = 1'b1;
  logic a, b, cp, cp_rise;
  int checks = 0;
  int failures = 0;
  int rises = 0;
  localparam int N = 2000;
  logic ba [N];
  logic bb [N];

  signal_conditioning dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what, input int k);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at step %0d: got %0b expected %0b", what, k, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      if (k >= 3) begin
        check(a, ~ba[k-2], "A", k);
        check(b, ~bb[k-2], "B", k);
        check(cp, ba[k-2] & bb[k-2], "CP", k);
        check(cp_rise, (ba[k-2] & bb[k-2]) & ~(ba[k-3] & bb[k-3]), "cp_rise", k);
        if (cp_rise) rises++;
      end
      // Beams stay clear most of the time, as with real traffic.
      beam_a = ($urandom_range(0, 3) != 0);
      beam_b = ($urandom_range(0, 3) != 0);
      ba[k] = beam_a;
      bb[k] = beam_b;
    end
    checks++;
    if (rises == 0) begin
      failures++;
      $display("FAIL no CP rising edge was produced");
    end
    $display("CP rising edges seen: %0d", rises);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
