`timescale 1ps/1ps
// sram_pkg: shared sizes of the 16x4 SRAM.
//
// The memory holds ROWS words of COLS bits, selected by an ADDR_W-bit
// address. These are the array dimensions of the design (16 words of 4 bits,
// 4 address bits); every block takes its defaults from here.
package sram_pkg;
  localparam int unsigned ROWS   = 16;
  localparam int unsigned COLS   = 4;
  localparam int unsigned ADDR_W = $clog2(ROWS);
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [COLS-1:0]   word_t;
  typedef logic [ROWS-1:0]   rows_t;
endpackage
