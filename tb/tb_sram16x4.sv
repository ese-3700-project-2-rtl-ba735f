`timescale 1ps/1ps
// tb_sram16x4: end-to-end self-checking test of the 16x4 SRAM at its
// default size.
//
// A reference array in the testbench tracks every write; every read is
// compared against it. The sequence is:
//   1. write 1111 / read / write 0000 / read, all at address 0, at a
//      2000 ps period and again at 320 ps;
//   2. two words at the two extreme addresses: write 1001 to 0 and 0110 to 15,
//      read both back (checks that rows do not disturb each other), at 320 ps
//      and at 298 ps;
//   3. the power workload: four repetitions of (write 0000 to all 16
//      addresses, write 1111 to all 16 addresses), 128 write cycles, followed
//      by a read of every address;
//   4. 400 random reads and writes;
//   5. address, Wr and data changed during phi2: the access must use the
//      values latched in phi1.
// Timing checks: read data must be on rd 92 ps after phi2 rises (the
// worst-case read delay of the original circuit) and stay there to the end of
// the cycle; phi1 and phi2 must never be high together; precharge (PCHb low)
// and a word line must never be active together; a word line must be high
// when SAE fires; SAE must be low when precharge starts; the write drivers
// must be off in a read (the sense-amplifier side of the bus is checked by an
// assertion inside the design). Each mechanism (precharge,
// non-overlap gap, write drive, SAE firing, mid-phase input change) is
// counted and must occur.
module tb_sram16x4;
  import sram_pkg::*;

  logic  clk = 1'b0, wr = 1'b0;
  addr_t addr = '0;
  word_t din = '0;
  word_t rd, qd;
  logic [ROWS-1:0][COLS-1:0] cells;
  logic  phi1, phi2, pchb, sae;
  rows_t wl;

  sram16x4 dut (.*);

  int checks = 0, failures = 0;
  int n_precharge = 0, n_gap = 0, n_write = 0, n_sae = 0, n_midchange = 0;
  int unsigned period = 2000;
  word_t ref_mem [ROWS];
  bit    ref_valid [ROWS];
  realtime t_phi1_fall;
  bit armed = 1'b0;   // invariants are checked once the clock generator has settled

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // free-running clock with a changeable period
  initial forever begin
    #(period / 2 * 1ps) clk = 1'b1;
    #((period - period / 2) * 1ps) clk = 1'b0;
  end

  // invariants, checked continuously
  always @(phi1 or phi2) if (armed && phi1 && phi2) check(1'b0, "phi1 and phi2 overlap");
  always @(negedge phi1) t_phi1_fall = $realtime;
  always @(posedge phi2) begin
    if (armed) begin
      check($realtime > t_phi1_fall, "no non-overlap gap before phi2");
      n_gap++;
    end
  end
  always @(negedge pchb) n_precharge++;
  always @(pchb or wl) if (armed && !pchb && (wl != '0)) check(1'b0, "word line high during precharge");
  always @(posedge sae) begin
    n_sae++;
    if (armed) check(wl != '0, "SAE fired with no word line high");
  end
  always @(negedge pchb) if (armed) check(!sae, "SAE still high when precharge starts");
  always @(posedge phi2) #1 if (armed && !dut.wr_l) check(dut.drv == '0, "write driver on during a read");
  always @(posedge dut.wr_en) n_write++;

  // one memory cycle; inputs are applied 40 ps after clk rises (in phi1)
  task automatic cycle(input bit w, input addr_t a, input word_t d, input bit chk = 1'b1);
    @(posedge clk);
    #40;
    wr = w; addr = a; din = d;
    @(posedge phi2);
    #92;
    if (!w && chk) begin
      check(ref_valid[a], "read of an address never written");
      check(rd === ref_mem[a], $sformatf("read @%0d within 92 ps of phi2: got %b exp %b", a, rd, ref_mem[a]));
    end
    @(posedge clk);
    #30;
    if (!w && chk)
      check(rd === ref_mem[a], $sformatf("read @%0d at end of cycle: got %b exp %b", a, rd, ref_mem[a]));
    if (w) begin
      ref_mem[a] = d;
      ref_valid[a] = 1'b1;
      check(cells[a] === d, $sformatf("cell word %0d after write: got %b exp %b", a, cells[a], d));
    end
  endtask

  task automatic write_word(input addr_t a, input word_t d); cycle(1'b1, a, d); endtask
  task automatic read_word (input addr_t a);                 cycle(1'b0, a, '0); endtask

  initial begin
    #(200_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_valid[i]) ref_valid[i] = 1'b0;
    repeat (3) @(posedge clk);
    armed = 1'b1;

    // 1. one address, both polarities (2000 ps, then 320 ps period)
    foreach (ref_valid[i]) ref_valid[i] = 1'b0;
    for (int p = 0; p < 2; p++) begin
      period = (p == 0) ? 2000 : 320;
      repeat (2) @(posedge clk);
      write_word(4'd0, 4'b1111);
      read_word (4'd0);
      write_word(4'd0, 4'b0000);
      read_word (4'd0);
    end

    // 2. two addresses do not disturb each other (320 ps, then 298 ps)
    for (int p = 0; p < 2; p++) begin
      period = (p == 0) ? 320 : 298;
      repeat (2) @(posedge clk);
      write_word(4'd0,  4'b1001);
      write_word(4'd15, 4'b0110);
      read_word (4'd0);
      read_word (4'd15);
    end

    // 3. power workload: 4 x (all-0s to every address, all-1s to every address)
    period = 320;
    repeat (2) @(posedge clk);
    for (int rep = 0; rep < 4; rep++)
      for (int pat = 0; pat < 2; pat++)
        for (int a = 0; a < 16; a++)
          write_word(addr_t'(a), (pat != 0) ? 4'b1111 : 4'b0000);
    for (int a = 0; a < 16; a++) read_word(addr_t'(a));

    // 4. random traffic
    for (int i = 0; i < 16; i++) write_word(addr_t'(i), word_t'($urandom));
    for (int i = 0; i < 400; i++)
      cycle(1'($urandom), addr_t'($urandom), word_t'($urandom));

    // 5. inputs changed during phi2 must not affect the access
    for (int i = 0; i < 8; i++) begin
      automatic addr_t a = addr_t'($urandom);
      automatic word_t d = word_t'($urandom);
      automatic bit    w = 1'($urandom);
      @(posedge clk);
      #40;
      wr = w; addr = a; din = d;
      @(posedge phi2);
      #20;
      wr = ~w; addr = a ^ 4'b0101; din = ~d;   // disturb after the latches closed
      n_midchange++;
      #80;
      if (!w) check(rd === ref_mem[a], $sformatf("read @%0d with inputs changed in phi2", a));
      @(posedge clk);
      #30;
      if (w) begin
        ref_mem[a] = d;
        check(cells[a] === d, "write with inputs changed in phi2");
        check(cells[a ^ 4'b0101] === ref_mem[a ^ 4'b0101], "other word untouched");
      end else
        check(rd === ref_mem[a], "read held at end of cycle");
    end

    // every mechanism must have occurred
    check(n_precharge > 0, "precharge never happened");
    check(n_gap > 0,       "non-overlap gap never seen");
    check(n_write > 0,     "write driver never enabled");
    check(n_sae > 0,       "sense amplifiers never fired");
    check(n_midchange > 0, "inputs never changed in phi2");
    $display("mechanisms: precharge=%0d gap=%0d write=%0d sae=%0d midchange=%0d",
             n_precharge, n_gap, n_write, n_sae, n_midchange);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
