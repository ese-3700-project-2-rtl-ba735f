`timescale 1ps/1ps
// sram16x4: 16-word x 4-bit single-port SRAM with two-phase clocking.
//
// Every clock cycle is one access. While clk is high (phi1) the bitlines are
// precharged and the address, Wr and write-data latches are open; while clk
// is low (phi2) the addressed word line rises and the access happens: on a
// write (wr = 1) the column drivers force the data onto the bitlines and into
// the selected cells; on a read the selected cells discharge one bitline of
// each pair, SAE fires the sense amplifiers a fixed delay later, and the
// result passes over the shared Q/D bus into the phi2 read latches (rd).
//
// Interface:
//   clk        single clock; a cycle starts with its rising edge
//   wr         write enable, active high, sampled with addr and din at the
//              falling edge of clk (end of phi1)
//   addr[3:0]  word address; addr = 0 selects word line 0
//   din[3:0]   write data (W3..W0)
//   rd[3:0]    read data (R3..R0), valid at the end of a read cycle (rising
//              edge of clk) and held until the next read
//   qd[3:0]    the shared per-column Q/D bus (write data during a write,
//              sense-amplifier output during a read)
//   cells      contents of all words, for observation
//   phi1/phi2/pchb/sae/wl  internal timing signals, for observation
// Timing: one access per cycle; read data appear within the access phase of
// the same cycle. Signal names and the structure (latches on A and Wr,
// PCHb = ~phi1, WrEn = Wr & phi2, SAE = delayed(phi2 & ~Wr), Q/D bus shared
// between RdWr and sense amplifier) follow the original circuit; splitting
// every two-way net into drive and level signals is this design's choice.
// In the circuit the column driver writes whatever is on the Q/D bus; here it
// takes the RdWr block's drive of that bus directly, which is the bus value
// whenever the write driver is on, and which keeps the model free of a
// combinational loop through the sense amplifier.
module sram16x4
  import sram_pkg::*;
(
  input  logic                      clk,
  input  logic                      wr,
  input  addr_t                     addr,
  input  word_t                     din,
  output word_t                     rd,
  output word_t                     qd,
  output logic [ROWS-1:0][COLS-1:0] cells,
  output logic                      phi1,
  output logic                      phi2,
  output logic                      pchb,
  output logic                      sae,
  output rows_t                     wl
);
  addr_t a_l;
  logic  wr_l, wr_n, wr_en;
  word_t drv, bl_w, blb_w, bl_pd, blb_pd, bl, blb;
  word_t sa_q, sa_oe, io_drv, io_oe;

  // clocking and control
  two_phase_clock u_clk (.clk_in(clk), .phi1(phi1), .phi2(phi2));

  phase_latch #(.W(ADDR_W)) u_addr_latch (.g(phi1), .d(addr), .q(a_l));
  phase_latch #(.W(1))      u_wr_latch   (.g(phi1), .d(wr),   .q(wr_l));

  assign pchb  = ~phi1;          // INV_sized: precharge off one gap before phi2
  assign wr_n  = ~wr_l;          // INV (4x): sense-amp enables and SAE gate
  assign wr_en = wr_l & phi2;    // AND: column write drivers only in phi2

  decoder4to16 u_dec (.a(a_l), .en(phi2), .wl(wl));

  sae_gen u_sae (.phi2(phi2), .wr_n(wr_n), .sae(sae));

  // storage
  sram_array u_array (
    .wl    (wl),
    .drv   (drv),
    .bl_w  (bl_w),
    .blb_w (blb_w),
    .bl_pd (bl_pd),
    .blb_pd(blb_pd),
    .cells (cells)
  );

  // per-column periphery
  for (genvar c = 0; c < COLS; c++) begin : g_col
    column_driver u_coldrv (
      .pchb  (pchb),
      .wr    (wr_en),
      .d     (io_drv[c]),
      .bl_pd (bl_pd[c]),
      .blb_pd(blb_pd[c]),
      .drv   (drv[c]),
      .bl_w  (bl_w[c]),
      .blb_w (blb_w[c]),
      .bl    (bl[c]),
      .blb   (blb[c])
    );

    sense_amp u_sa (
      .bl  (bl[c]),
      .blb (blb[c]),
      .sae (sae),
      .en  (wr_n),
      .q   (sa_q[c]),
      .q_oe(sa_oe[c])
    );

    rdwr u_io (
      .din   (din[c]),
      .wr    (wr_l),
      .phi1  (phi1),
      .phi2  (phi2),
      .qd    (qd[c]),
      .qd_drv(io_drv[c]),
      .qd_oe (io_oe[c]),
      .rd    (rd[c])
    );

    // Q/D bus: exactly one of the two tri-state drivers is enabled
    assign qd[c] = io_oe[c] ? io_drv[c] : sa_q[c];
    always_comb begin
      assert (io_oe[c] ^ sa_oe[c]) else $error("Q/D bus %0d: bus contention or floating bus", c);
    end
  end
endmodule
