`timescale 1ps/1ps
// tb_phase_latch: the latch must follow d while g is high and hold the value
// present when g fell, whatever d does while g is low.
module tb_phase_latch;
  localparam int W = 4;
  logic         g;
  logic [W-1:0] d, q, held;
  int checks = 0, failures = 0;

  phase_latch #(.W(W)) dut (.g(g), .d(d), .q(q));

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
    for (int i = 0; i < 50; i++) begin
      g = 1'b1;
      repeat (3) begin
        d = W'($urandom); #5;
        check(q === d, "transparent phase");
      end
      held = d;
      g = 1'b0; #5;
      repeat (3) begin
        d = W'($urandom); #5;
        check(q === held, "hold phase");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
