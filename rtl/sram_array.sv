`timescale 1ps/1ps
// sram_array: the ROWS x COLS cell array.
//
// ROWS word rows share the COLS bitline pairs. A bitline is precharged high
// and any cell whose word line is high and which stores the opposite value
// discharges it, so the discharge seen by a column is the OR of the requests
// of all its cells (a wired-OR pull-down on a precharged line). With one-hot
// word lines at most one cell per column is active.
//
// Interface: wl[ROWS-1:0]; per column drv, bl_w, blb_w from the column
// drivers; bl_pd, blb_pd to the column drivers; cells (all stored words, for
// observation and testbenches).
// Timing: combinational from wl and the stored bits to bl_pd/blb_pd; writes
// as in bitcell.sv.
module sram_array
  import sram_pkg::*;
#(
  parameter int unsigned ROWS_P = ROWS,
  parameter int unsigned COLS_P = COLS
) (
  input  logic [ROWS_P-1:0]             wl,
  input  logic [COLS_P-1:0]             drv,
  input  logic [COLS_P-1:0]             bl_w,
  input  logic [COLS_P-1:0]             blb_w,
  output logic [COLS_P-1:0]             bl_pd,
  output logic [COLS_P-1:0]             blb_pd,
  output logic [ROWS_P-1:0][COLS_P-1:0] cells
);
  logic [ROWS_P-1:0][COLS_P-1:0] row_bl_pd, row_blb_pd;

  for (genvar r = 0; r < ROWS_P; r++) begin : g_row
    word_row #(.COLS_P(COLS_P)) u_row (
      .wl    (wl[r]),
      .drv   (drv),
      .bl_w  (bl_w),
      .blb_w (blb_w),
      .bl_pd (row_bl_pd[r]),
      .blb_pd(row_blb_pd[r]),
      .q     (cells[r])
    );
  end

  always_comb begin
    bl_pd  = '0;
    blb_pd = '0;
    for (int r = 0; r < int'(ROWS_P); r++) begin
      bl_pd  |= row_bl_pd[r];
      blb_pd |= row_blb_pd[r];
    end
  end
endmodule
