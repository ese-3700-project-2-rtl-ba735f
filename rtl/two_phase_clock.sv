`timescale 1ps/1ps
// two_phase_clock: behavioural model of the two-phase non-overlapping clock
// generator (gate delays are part of its function, so it carries # delays).
//
// The single clock is split into phi1 (precharge, high while clk is high) and
// phi2 (access, high while clk is low). Two NOR2 gates are cross-coupled: the
// upper one sees the inverted clock and the lower one's output, the lower one
// sees the clock through two inverters and the upper one's output. A NOR can
// only rise after the other NOR has fallen, so phi1 and phi2 are never high
// together and the gap between one falling and the other rising is about one
// NOR delay. Each NOR output is buffered by two inverters (the second a wide
// driver) so the polarity is preserved. The cross-coupled pair is a
// combinational loop by design: it is the latch that enforces non-overlap.
//
// Interface: clk_in, phi1, phi2.
// Timing: phi1 rises about T_NOR + 2*T_INV after phi2 has fallen, and vice
// versa. The gate topology follows the original circuit; the delay values are
// this model's choice (the process has an FO4 delay of about 10 ps).
module two_phase_clock #(
  parameter int unsigned T_INV = 4,   // ps, one inverter
  parameter int unsigned T_NOR = 6    // ps, one NOR2
) (
  input  logic clk_in,
  output logic phi1,
  output logic phi2
);
  logic in_n, in_b;       // inverted and re-buffered clock
  logic nor_t, nor_b;     // cross-coupled NOR outputs
  logic buf_t, buf_b;     // first inverter after each NOR

  assign #(T_INV) in_n  = ~clk_in;
  assign #(T_INV) in_b  = ~in_n;
  assign #(T_NOR) nor_t = ~(in_n | nor_b);
  assign #(T_NOR) nor_b = ~(in_b | nor_t);
  assign #(T_INV) buf_t = ~nor_t;
  assign #(T_INV) buf_b = ~nor_b;
  assign #(T_INV) phi1  = ~buf_t;
  assign #(T_INV) phi2  = ~buf_b;
endmodule
