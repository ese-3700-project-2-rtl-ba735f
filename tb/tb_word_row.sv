`timescale 1ps/1ps
// tb_word_row: writes random words into one row through the per-column write
// drive and checks that all four cells take their column's bit, that a read
// discharges each column on the side that stores 0, and that single-column
// drive writes only that column.
module tb_word_row;
  import sram_pkg::*;
  logic  wl;
  word_t drv, bl_w, blb_w, bl_pd, blb_pd, q;
  word_t ref_w;
  int checks = 0, failures = 0;

  word_row dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wl = 0; drv = '0; bl_w = '0; blb_w = '1; #10;
    for (int i = 0; i < 40; i++) begin
      automatic word_t v = word_t'($urandom);
      automatic int    c = $urandom_range(COLS - 1);
      wl = 1; drv = '1; bl_w = v; blb_w = ~v; #10;
      wl = 0; drv = '0; #10;
      ref_w = v;
      check(q === v, "row write");
      wl = 1; #10;
      check(bl_pd === ~ref_w && blb_pd === ref_w, "row read discharge");
      wl = 0; #10;
      // write only column c
      wl = 1; drv = word_t'(1) << c; bl_w = ~ref_w; blb_w = ref_w; #10;
      wl = 0; drv = '0; #10;
      ref_w[c] = ~ref_w[c];
      check(q === ref_w, "single-column write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
