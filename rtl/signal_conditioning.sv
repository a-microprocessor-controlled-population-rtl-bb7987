// signal_conditioning: turns the two beam comparator outputs into the
// direction FSM inputs A and B and the count clock CP.
//
// Each comparator output is high while its photodiode sees the infrared
// beam and low while a bat blocks it. The original gate network is
// kept as it stands: a NAND with both inputs tied (74LS00) inverts each
// detector into an FSM input that is 1 while that beam is broken, and an
// AND gate (74LS08) of the two detectors gives CP, which is high only while
// both beams are clear. CP therefore rises when a bat has cleared the last
// beam, which is the moment the counter must take its step.
//
// This design's own choices: the beam inputs are asynchronous, so each
// passes a two-flop synchronizer clocked by clk before the gates, and the
// rising edge of CP is not used as a clock but turned into a one-cycle
// enable, cp_rise, that all registers downstream share with clk.
//
// Interface: beam_a/beam_b in (1 = beam received); a, b, cp are the gate
// outputs after synchronization; cp_rise is high for one clk cycle after CP
// goes from 0 to 1. Latency from a beam change to a/b/cp is two clk cycles,
// to cp_rise also two. Reset assumes both beams clear.
module signal_conditioning (
  input  logic clk,
  input  logic rst_n,
  input  logic beam_a,   // Detector A comparator output, 1 = beam seen
  input  logic beam_b,   // Detector B comparator output, 1 = beam seen
  output logic a,        // FSM input A, 1 = beam A broken
  output logic b,        // FSM input B, 1 = beam B broken
  output logic cp,       // count clock level, 1 = both beams clear
  output logic cp_rise   // one-cycle pulse on each rising edge of cp
);

  logic [1:0] sync_a;
  logic [1:0] sync_b;
  logic       cp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_a <= 2'b11;
      sync_b <= 2'b11;
      cp_q   <= 1'b1;
    end else begin
      sync_a <= {sync_a[0], beam_a};
      sync_b <= {sync_b[0], beam_b};
      cp_q   <= cp;
    end
  end

  // 74LS00 sections with tied inputs, and the 74LS08 section.
  always_comb begin
    a       = ~(sync_a[1] & sync_a[1]);
    b       = ~(sync_b[1] & sync_b[1]);
    cp      = sync_a[1] & sync_b[1];
    cp_rise = cp & ~cp_q;
  end

endmodule
