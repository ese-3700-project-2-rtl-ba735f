`timescale 1ps/1ps
// tb_cell_column: one bitcell with the full periphery of its column, run at
// 2 ns per cycle through write 1, read, write 0, read, then 40 random
// cycles. The word line is phi2 itself, as for a cell that is always
// addressed. Checked in every access phase:
//   write 1: BL high and BLb low, the cell stores 1;
//   read 1:  BLb discharged and BL not, Q/D and rd are 1;
//   write 0: BL low and BLb high, the cell stores 0;
//   read 0:  BL discharged and BLb not, Q/D and rd are 0.
// Also checked: the cell is unchanged by reads, SAE fires only in reads, and
// the sense-amplifier output is disabled during writes.
module tb_cell_column;
  logic clk = 1'b0, wr = 1'b0, din = 1'b0;
  logic phi1, phi2, pchb, wr_l, wr_n, wr_en, sae;
  logic drv, bl_w, blb_w, bl_pd, blb_pd, bl, blb, q;
  logic sa_q, sa_oe, io_drv, io_oe, qd, rd;
  int checks = 0, failures = 0, n_sae = 0;
  bit ref_q;
  localparam int unsigned PERIOD = 2000;

  two_phase_clock u_clk (.clk_in(clk), .phi1(phi1), .phi2(phi2));
  phase_latch #(.W(1)) u_wr_latch (.g(phi1), .d(wr), .q(wr_l));
  assign pchb  = ~phi1;
  assign wr_n  = ~wr_l;
  assign wr_en = wr_l & phi2;
  sae_gen u_sae (.phi2(phi2), .wr_n(wr_n), .sae(sae));
  bitcell u_cell (.wl(phi2), .drv(drv), .bl_w(bl_w), .blb_w(blb_w),
                  .bl_pd(bl_pd), .blb_pd(blb_pd), .q(q));
  column_driver u_col (.pchb(pchb), .wr(wr_en), .d(io_drv), .bl_pd(bl_pd), .blb_pd(blb_pd),
                       .drv(drv), .bl_w(bl_w), .blb_w(blb_w), .bl(bl), .blb(blb));
  sense_amp u_sa (.bl(bl), .blb(blb), .sae(sae), .en(wr_n), .q(sa_q), .q_oe(sa_oe));
  rdwr u_io (.din(din), .wr(wr_l), .phi1(phi1), .phi2(phi2), .qd(qd),
             .qd_drv(io_drv), .qd_oe(io_oe), .rd(rd));
  assign qd = io_oe ? io_drv : sa_q;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial forever begin
    #(PERIOD / 2) clk = 1'b1;
    #(PERIOD / 2) clk = 1'b0;
  end

  always @(posedge sae) n_sae++;

  task automatic access(input bit w, input bit v);
    @(posedge clk);
    #100;
    wr = w; din = v;
    @(posedge phi2);
    #200;                                   // well after SAE
    check(sa_oe === ~w, "sense-amp output enabled only in reads");
    check(sae === ~w, "SAE high in reads only");
    if (w) begin
      check(bl === v && blb === ~v, "write drives BL = d, BLb = ~d");
      ref_q = v;
    end else begin
      check(bl === ref_q && blb === ~ref_q, "read discharges only the 0 side");
      check(qd === ref_q, "Q/D carries the stored bit");
      check(rd === ref_q, "rd carries the stored bit");
    end
    @(posedge clk);
    #100;
    check(q === ref_q, "cell holds its value");
    if (!w) check(rd === ref_q, "rd held after the cycle");
  endtask

  initial begin
    #(PERIOD * 200);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    access(1'b1, 1'b1);   // write 1
    access(1'b0, 1'b0);   // read
    access(1'b1, 1'b0);   // write 0
    access(1'b0, 1'b0);   // read
    repeat (40) access(1'($urandom), 1'($urandom));
    check(n_sae > 0, "SAE never fired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
