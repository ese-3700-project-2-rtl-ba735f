`timescale 1ps/1ps
// tb_rdwr: runs the I/O block through write and read cycles with separate
// phi1/phi2 pulses. In a write the latched din must drive the bus (qd_oe = 1)
// and changes of din during phi2 must not reach qd_drv; in a read the bus
// value present during phi2 must appear on rd and stay there through later
// write cycles.
module tb_rdwr;
  logic din, wr, phi1, phi2, qd, qd_drv, qd_oe, rd;
  bit   ref_rd;
  int checks = 0, failures = 0;

  rdwr dut (.*);

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
    phi1 = 0; phi2 = 0; wr = 0; din = 0; qd = 0; #10;
    // establish a known read value
    phi2 = 1; #10; phi2 = 0; #10;
    ref_rd = 1'b0;
    for (int i = 0; i < 60; i++) begin
      automatic bit w = 1'($urandom);
      automatic bit v = 1'($urandom);
      phi1 = 1; wr = w; din = v; qd = ~v; #10;
      phi1 = 0; #5;
      phi2 = 1; #5;
      din = ~v;                                   // change after phi1 closed
      if (w) begin
        check(qd_oe === 1'b1 && qd_drv === v, "write drives latched din");
        qd = v;
      end else begin
        check(qd_oe === 1'b0, "read releases the bus");
        qd = v; ref_rd = v;
      end
      #5;
      phi2 = 0; #3;
      qd = $urandom;
      #2;
      check(rd === ref_rd, "rd holds the last read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
