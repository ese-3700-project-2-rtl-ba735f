`timescale 1ps/1ps
// tb_sae_gen: SAE must rise T_SAE (38 ps) after phi2 rises in a read, never
// rise in a write (wr_n = 0), and fall together with phi2.
module tb_sae_gen;
  logic phi2 = 1'b0, wr_n = 1'b1, sae;
  int checks = 0, failures = 0;
  realtime t_rise;

  sae_gen dut (.phi2(phi2), .wr_n(wr_n), .sae(sae));

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
    #200;
    for (int i = 0; i < 20; i++) begin
      wr_n = i[0];
      #50;
      phi2 = 1'b1; t_rise = $realtime;
      #37;
      check(sae === 1'b0, "SAE still low 37 ps after phi2");
      #2;
      check(sae === wr_n, "SAE high 39 ps after phi2 in a read, low in a write");
      #100;
      check(sae === wr_n, "SAE stays for the rest of phi2");
      phi2 = 1'b0;
      #0.5;
      check(sae === 1'b0, "SAE falls with phi2");
      #150;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
