`timescale 1ps/1ps
// tb_decoder4to16: exhaustive test of the row decoder. For every address and
// both enable values the word lines must be the one-hot code of the address
// when en = 1 and all zero when en = 0.
module tb_decoder4to16;
  import sram_pkg::*;
  addr_t a;
  logic  en;
  rows_t wl;
  int checks = 0, failures = 0;

  decoder4to16 dut (.a(a), .en(en), .wl(wl));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 16; i++) begin
        automatic rows_t exp = (e != 0) ? rows_t'(1) << i : '0;
        a = addr_t'(i); en = (e != 0);
        #10;
        checks++;
        if (wl !== exp) begin
          failures++;
          $display("FAIL: a=%0d en=%0d wl=%b exp=%b", i, e, wl, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
