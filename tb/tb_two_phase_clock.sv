`timescale 1ps/1ps
// tb_two_phase_clock: drives the generator with 320 ps and 2000 ps clocks and
// checks that phi1 is high only in the clock-high half and phi2 only in the
// clock-low half, that they never overlap, that a non-overlap gap separates
// every phi1 fall from the next phi2 rise (and phi2 fall from phi1 rise), and
// that each phase occurs once per clock cycle.
module tb_two_phase_clock;
  logic clk = 1'b0, phi1, phi2;
  int checks = 0, failures = 0;
  int unsigned period = 320;
  int n_phi1 = 0, n_phi2 = 0, n_clk = 0;
  bit armed = 1'b0;
  realtime t1f = 0, t2f = 0;

  two_phase_clock dut (.clk_in(clk), .phi1(phi1), .phi2(phi2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial forever begin
    #(period / 2 * 1ps) clk = 1'b1;
    #((period - period / 2) * 1ps) clk = 1'b0;
  end

  always @(phi1 or phi2) if (armed && phi1 && phi2) check(1'b0, "overlap");
  always @(negedge phi1) t1f = $realtime;
  always @(negedge phi2) t2f = $realtime;
  always @(posedge phi2) if (armed) begin n_phi2++; check($realtime > t1f, "gap before phi2"); end
  always @(posedge phi1) if (armed) begin n_phi1++; check($realtime > t2f, "gap before phi1"); end
  always @(posedge clk) if (armed) n_clk++;

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    for (int p = 0; p < 2; p++) begin
      period = (p == 0) ? 320 : 2000;
      repeat (2) @(posedge clk);
      #(period * 3 / 4 * 1ps);         // middle of the clock-low half
      armed = 1'b1;
      n_phi1 = 0; n_phi2 = 0; n_clk = 0;
      repeat (20) begin
        @(posedge clk);
        #(period / 4 * 1ps);           // middle of the clock-high half
        check(phi1 && !phi2, "phi1 in clock-high half");
        #(period / 2 * 1ps);           // middle of the clock-low half
        check(phi2 && !phi1, "phi2 in clock-low half");
      end
      armed = 1'b0;                    // window: 20 whole cycles
      check(n_phi1 == 20 && n_phi2 == 20 && n_clk == 20,
            $sformatf("one phase per cycle: phi1=%0d phi2=%0d clk=%0d", n_phi1, n_phi2, n_clk));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
