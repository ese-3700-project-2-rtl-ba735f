`timescale 1ps/1ps
// tb_sram_array: writes every row through one-hot word lines and the column
// drive, then reads each row back from the bitline discharge pattern
// (bl_pd = ~word, blb_pd = word). Also checks that with all word lines low
// no bitline is discharged and that writing one row leaves the others alone.
module tb_sram_array;
  import sram_pkg::*;
  rows_t wl;
  word_t drv, bl_w, blb_w, bl_pd, blb_pd;
  logic [ROWS-1:0][COLS-1:0] cells;
  word_t ref_mem [ROWS];
  int checks = 0, failures = 0;

  sram_array dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic write_row(input int r, input word_t v);
    wl = rows_t'(1) << r; drv = '1; bl_w = v; blb_w = ~v; #10;
    wl = '0; drv = '0; #10;
    ref_mem[r] = v;
  endtask

  task automatic read_row(input int r);
    wl = rows_t'(1) << r; #10;
    check(bl_pd === ~ref_mem[r] && blb_pd === ref_mem[r],
          $sformatf("row %0d read: bl_pd=%b blb_pd=%b exp word %b", r, bl_pd, blb_pd, ref_mem[r]));
    wl = '0; #10;
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wl = '0; drv = '0; bl_w = '0; blb_w = '1; #10;
    for (int r = 0; r < ROWS; r++) write_row(r, word_t'($urandom));
    for (int r = 0; r < ROWS; r++) read_row(r);
    check(bl_pd === '0 && blb_pd === '0, "idle bitlines");
    for (int i = 0; i < 100; i++) begin
      automatic int r = $urandom_range(ROWS - 1);
      if ($urandom_range(1) == 1) write_row(r, word_t'($urandom));
      else read_row(r);
    end
    for (int r = 0; r < ROWS; r++) check(cells[r] === ref_mem[r], $sformatf("row %0d contents", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
