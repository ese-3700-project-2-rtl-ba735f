`timescale 1ps/1ps
// phase_latch: level-sensitive latch, transparent while its gate is high.
//
// The memory captures its inputs with latches rather than flip-flops: the
// address, Wr and write-data latches are open during phi1 (precharge) and hold
// through phi2 (access), so inputs that change during phi2 cannot disturb an
// access in progress. The read-data latch is open during phi2 and holds the
// sensed word through the next precharge.
//
// Interface: g (gate, active high), d (W bits), q (W bits).
// Timing: q follows d while g = 1; q holds the value d had when g fell.
// The gate-level latch of the original circuit is built from NAND2 gates; this
// is its behaviour written as an always_latch, which is this design's choice.
module phase_latch #(
  parameter int unsigned W = 1
) (
  input  logic         g,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] state;

  always_latch begin
    if (g) state = d;
  end
  assign q = state;
endmodule
