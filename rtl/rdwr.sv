`timescale 1ps/1ps
// rdwr: per-column I/O block that shares one bus bit between write data and
// read data.
//
// Write side: a latch open during phi1 captures din; while wr is high a
// tri-state buffer puts the latched value on the column's Q/D bus bit, from
// which the column driver writes it into the selected cell. Read side: while
// wr is low a second tri-state buffer (enabled through an inverter) passes the
// Q/D bus, then driven by the sense amplifier, to a latch open during phi2,
// whose output is the read data rd. rd therefore changes only in the access
// phase of a read cycle and holds through the following cycles.
//
// Interface: din, wr (latched write enable), phi1, phi2, qd (bus value) in;
// qd_drv, qd_oe (this block's drive of the bus), rd out.
// Timing: din sampled when phi1 falls; rd valid when phi2 falls in a read
// cycle. The bus is split into a drive value with an enable and a resolved
// level, which is this design's choice for a two-state simulator; with wr high
// the read latch keeps its value (its input is floating in the circuit).
module rdwr (
  input  logic din,
  input  logic wr,
  input  logic phi1,
  input  logic phi2,
  input  logic qd,
  output logic qd_drv,
  output logic qd_oe,
  output logic rd
);
  logic rd_gate;

  phase_latch #(.W(1)) u_din_latch (.g(phi1), .d(din), .q(qd_drv));
  assign qd_oe   = wr;
  assign rd_gate = phi2 & ~wr;
  phase_latch #(.W(1)) u_rd_latch (.g(rd_gate), .d(qd), .q(rd));
endmodule
