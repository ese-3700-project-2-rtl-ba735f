`timescale 1ps/1ps
// column_driver: behavioural model of one column's precharge and write driver,
// together with the resulting bitline levels.
//
// Precharge: two PMOS pull BL and BLb to VDD while PCHb is low (PCHb is the
// inverse of phi1). Write: a tri-state buffer drives the bus bit d onto BL and
// a second one drives its inverse (through a minimum inverter) onto BLb while
// wr (the phi2-gated write enable) is high; otherwise both are high-Z.
// Read: with neither active, a bitline stays at its precharged high level
// unless a selected cell discharges it (bl_pd / blb_pd from the array).
// Two-way nets are split: drv/bl_w/blb_w is what the driver forces onto the
// bitlines, bl/blb is the level the sense amplifier sees.
//
// Interface: pchb, wr, d, bl_pd, blb_pd in; drv, bl_w, blb_w, bl, blb out.
// Timing: combinational. Precharge and write never overlap in the memory
// (PCHb = ~phi1, write enable gated by phi2); if they did, precharge is
// taken to win here. The split-net resolution is this model's choice.
module column_driver (
  input  logic pchb,
  input  logic wr,
  input  logic d,
  input  logic bl_pd,
  input  logic blb_pd,
  output logic drv,
  output logic bl_w,
  output logic blb_w,
  output logic bl,
  output logic blb
);
  assign drv   = wr;
  assign bl_w  = d;
  assign blb_w = ~d;

  always_comb begin
    if (!pchb) begin
      bl  = 1'b1;
      blb = 1'b1;
    end else if (wr) begin
      bl  = bl_w;
      blb = blb_w;
    end else begin
      bl  = ~bl_pd;
      blb = ~blb_pd;
    end
  end
endmodule
