`timescale 1ps/1ps
// tb_column_driver: exhaustive test of the column driver's bitline
// resolution: precharge pulls both lines high, the write driver forces
// d / ~d, and otherwise each line is high unless a cell discharges it.
module tb_column_driver;
  logic pchb, wr, d, bl_pd, blb_pd, drv, bl_w, blb_w, bl, blb;
  int checks = 0, failures = 0;

  column_driver dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      logic ebl, eblb;
      {pchb, wr, d, bl_pd, blb_pd} = 5'(i);
      #10;
      if (!pchb)   begin ebl = 1'b1;    eblb = 1'b1;    end
      else if (wr) begin ebl = d;       eblb = ~d;      end
      else         begin ebl = ~bl_pd;  eblb = ~blb_pd; end
      checks++;
      if (bl !== ebl || blb !== eblb || drv !== wr || bl_w !== d || blb_w !== ~d) begin
        failures++;
        $display("FAIL: in=%b bl=%b blb=%b exp %b %b", 5'(i), bl, blb, ebl, eblb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
