`timescale 1ps/1ps
// word_row: one word of the array, COLS bitcells sharing a word line.
//
// All cells of the row see the same word line; each sits on its own column's
// bitline pair. The row passes each cell's bitline discharge request out to
// its column.
//
// Interface: wl; per column drv, bl_w, blb_w (column write drive), bl_pd,
// blb_pd (discharge requests) and q (stored word, for observation).
// Timing: that of the bitcells (see bitcell.sv).
module word_row
  import sram_pkg::*;
#(
  parameter int unsigned COLS_P = COLS
) (
  input  logic              wl,
  input  logic [COLS_P-1:0] drv,
  input  logic [COLS_P-1:0] bl_w,
  input  logic [COLS_P-1:0] blb_w,
  output logic [COLS_P-1:0] bl_pd,
  output logic [COLS_P-1:0] blb_pd,
  output logic [COLS_P-1:0] q
);
  for (genvar c = 0; c < COLS_P; c++) begin : g_cell
    bitcell u_cell (
      .wl    (wl),
      .drv   (drv[c]),
      .bl_w  (bl_w[c]),
      .blb_w (blb_w[c]),
      .bl_pd (bl_pd[c]),
      .blb_pd(blb_pd[c]),
      .q     (q[c])
    );
  end
endmodule
