`timescale 1ps/1ps
// tb_bitcell: the cell test of write 1, read, write 0, read, repeated with
// random values: a cell is written only when its word line and the column
// driver are both active, a read discharges the bitline on the side that
// stores 0 and leaves the stored value unchanged, and with the word line low
// the cell neither changes nor discharges anything.
module tb_bitcell;
  logic wl, drv, bl_w, blb_w, bl_pd, blb_pd, q;
  bit   ref_q;
  int checks = 0, failures = 0;

  bitcell dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic write_bit(input bit v);
    wl = 1'b1; drv = 1'b1; bl_w = v; blb_w = ~v; #10;
    wl = 1'b0; drv = 1'b0; #10;
    ref_q = v;
    check(q === v, "write");
  endtask

  task automatic read_bit();
    wl = 1'b1; drv = 1'b0; bl_w = $urandom; blb_w = $urandom; #10;
    check(bl_pd === ~ref_q && blb_pd === ref_q, "read discharges the 0 side");
    wl = 1'b0; #10;
    check(q === ref_q, "read is non-destructive");
    check(!bl_pd && !blb_pd, "no discharge with word line low");
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wl = 0; drv = 0; bl_w = 0; blb_w = 1; #10;
    write_bit(1'b1); read_bit();
    write_bit(1'b0); read_bit();
    for (int i = 0; i < 40; i++) begin
      automatic bit v = 1'($urandom);
      write_bit(v); read_bit();
      // driver active with the word line low: no write
      wl = 0; drv = 1; bl_w = ~v; blb_w = v; #10;
      check(q === ref_q, "no write while word line low");
      // word line high without the driver: no write
      wl = 1; drv = 0; #10;
      check(q === ref_q, "no write without the driver");
      wl = 0; #10;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
