`timescale 1ns/1ps
// testable_power_link_tb: all eight combinations of laser link, test transistor and
// cell short. The cell is powered if the link is made or the test transistor is on;
// the supply current is 0 unpowered, the cell current when good, and far above it
// when the cell is shorted, which is how a short is found before the link is made.
// Timing: purely combinational. The link with its test transistor follows the
// document; the current values are this design's own.
module testable_power_link_tb;
  localparam int unsigned I_CELL = 1000;
  logic link_zapped, test_gate, cell_short, powered;
  int unsigned current_ua;
  int checks = 0, failures = 0;

  testable_power_link #(.CELL_CURRENT_UA(I_CELL)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      {link_zapped, test_gate, cell_short} = 3'(v);
      #1;
      check(powered == (link_zapped | test_gate), $sformatf("powered, case %0d", v));
      if (!powered)
        check(current_ua == 0, $sformatf("current when unpowered, case %0d", v));
      else if (cell_short)
        check(current_ua > 10 * I_CELL, $sformatf("short not visible, case %0d", v));
      else
        check(current_ua == I_CELL, $sformatf("good cell current, case %0d", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
