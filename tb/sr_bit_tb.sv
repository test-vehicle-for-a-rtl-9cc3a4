`timescale 1ns/1ps
// sr_bit_tb: checks the master-slave behaviour of one configuration register bit.
// Random data is clocked in with non-overlapping clk1/clk2 pulses; q must take d
// only after the clk2 pulse, must not move while clk1 is high (the master is open
// but the slave is closed), and must hold while both clocks are low.
// Timing: 5 ns steps, clk1 and clk2 never high together. The expected values come
// from the two-phase master-slave rule of the document; the pulse widths are this
// testbench's own.
module sr_bit_tb;
  logic clk1 = 0, clk2 = 0, d = 0, q;
  int checks = 0, failures = 0;

  sr_bit dut (.clk1(clk1), .clk2(clk2), .d(d), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic prev, b;
    // initialise
    d = 0; #5 clk1 = 1; #5 clk1 = 0; #5 clk2 = 1; #5 clk2 = 0;
    prev = 0;
    for (int i = 0; i < 64; i++) begin
      b = 1'($urandom);
      d = b;
      #5 clk1 = 1;
      #2 check(q == prev, "q moved while only clk1 was high");
      #3 clk1 = 0;
      d = ~b;                          // master closed: must not be captured
      #2 check(q == prev, "q moved with both clocks low");
      #3 clk2 = 1;
      #2 check(q == b, "q did not take the bit during clk2");
      #3 clk2 = 0;
      #2 check(q == b, "q did not hold after clk2");
      prev = b;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
