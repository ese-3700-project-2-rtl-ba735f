`timescale 1ps/1ps
// bitcell: behavioural model of the 6T SRAM cell.
//
// The real cell is two cross-coupled inverters (pull-down : access : pull-up
// widths 4 : 2 : 1) with two NMOS access devices onto BL and BLb. This model
// keeps its logic behaviour with every two-way net split into its two
// directions, because a two-state simulator has no weak/strong drive:
//   * write: while wl = 1 and the column write driver is active (drv = 1)
//     with complementary values on the driven bitlines, the cell takes the
//     value of BL (the strong access device overpowers the weak pull-up);
//   * read: while wl = 1 the side of the cell that stores 0 discharges its
//     bitline, so bl_pd = wl & ~q and blb_pd = wl & q. The read does not
//     change q (the cell ratio of 2 keeps it read-stable).
// Interface: wl, drv, bl_w/blb_w (driven bitline values), bl_pd/blb_pd
// (discharge requests), q (stored value, for observation).
// Timing: q follows bl_w while wl & drv; otherwise q holds. Reset: none, the
// cell powers up at an arbitrary value like the real one.
module bitcell (
  input  logic wl,
  input  logic drv,
  input  logic bl_w,
  input  logic blb_w,
  output logic bl_pd,
  output logic blb_pd,
  output logic q
);
  logic state;

  always_latch begin
    if (wl && drv && (bl_w != blb_w)) state = bl_w;
  end
  assign q      = state;
  assign bl_pd  = wl & ~state;
  assign blb_pd = wl &  state;
endmodule
