`timescale 1ps/1ps
// decoder4to16: 4-to-16 row decoder with phi2-gated word lines.
//
// Each row output is built as in the gate-level decoder: the four address bits
// (true or inverted) are combined by two NAND2 gates, a NOR2 merges them into
// the one-hot row select dec[i], and a NAND2 with the enable (phi2) followed
// by an inverter gives the positive word-line pulse WL[i] = dec[i] & en.
// Because WL can rise only while en is high, the address may change during
// precharge without touching any cell.
//
// Interface: a[3:0] row address, en (phi2), wl[15:0] word lines.
// Timing: purely combinational; wl is one-hot while en = 1 and all-zero
// otherwise. The pairing of address bits in the first NAND level, (a0,a1) and
// (a2,a3), is this design's choice.
module decoder4to16
  import sram_pkg::*;
(
  input  addr_t a,
  input  logic  en,
  output rows_t wl
);
  for (genvar i = 0; i < 16; i++) begin : g_row
    // address literals: true bit where row i has a 1, inverted bit otherwise
    logic [3:0] lit;
    logic       n01, n23, dec, gated_n;
    for (genvar b = 0; b < 4; b++) begin : g_lit
      assign lit[b] = i[b] ? a[b] : ~a[b];
    end
    assign n01     = ~(lit[0] & lit[1]);   // NAND2
    assign n23     = ~(lit[2] & lit[3]);   // NAND2
    assign dec     = ~(n01 | n23);         // NOR2: one-hot row select
    assign gated_n = ~(dec & en);          // NAND2 with phi2
    assign wl[i]   = ~gated_n;             // INV drives the word line
  end
endmodule
