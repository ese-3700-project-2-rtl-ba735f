`timescale 1ps/1ps
// tb_sense_amp: before SAE the output follows BL; at the rising edge of SAE
// the amplifier resolves to 1 when BLb is the discharged line and to 0 when
// BL is, and it keeps that decision while SAE is high even when the bitlines
// are precharged again or change. With en low (a write) it does not fire,
// and its output enable follows en.
module tb_sense_amp;
  logic bl, blb, sae, en, q, q_oe;
  bit   last;
  int checks = 0, failures = 0;

  sense_amp dut (.*);

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
    sae = 0; en = 1; bl = 1; blb = 1; #10;
    // prime a known decision
    bl = 0; blb = 1; #10; sae = 1; #10; sae = 0; #10;
    last = 1'b0;
    for (int i = 0; i < 60; i++) begin
      automatic bit v  = 1'($urandom);
      automatic bit rd = ($urandom_range(3) != 0);
      en = rd;
      bl = 1; blb = 1; #10;                    // precharge
      check(q === 1'b1, "output follows precharged BL");
      check(q_oe === en, "output enable");
      bl = v; blb = ~v; #10;                   // bitline development
      check(q === v, "output follows BL before SAE");
      sae = 1; #10;
      if (rd) last = v;
      check(q === last, "decision at SAE");
      bl = 1; blb = 1; #5; bl = ~v; blb = v; #5;
      check(q === last, "decision held while SAE high");
      sae = 0; #10;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
