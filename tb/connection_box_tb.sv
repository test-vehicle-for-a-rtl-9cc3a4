`timescale 1ns/1ps
// connection_box_tb: random gates and line values; each input pin must read the OR
// of the lines its transistors connect (0 when none), and the output pin must drive
// exactly its connected lines, and only while its buffer is enabled.
// Timing: purely combinational, checked 1 ns after each change. Six lines per pin
// follow the document.
module connection_box_tb;
  localparam int NIN = 4, NL = 6;
  logic [NL-1:0] line_val, line_drv;
  logic [NIN-1:0] pin_in;
  logic pin_out_val, pin_out_oe;
  logic [(NIN+1)*NL-1:0] gate;
  int checks = 0, failures = 0;

  connection_box #(.NIN(NIN), .NL(NL)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < 500; t++) begin
      line_val = NL'($urandom);
      // sparse gates, as a real configuration
      for (int i = 0; i < (NIN + 1) * NL; i++) gate[i] = ($urandom % 4) == 0;
      pin_out_val = 1'($urandom);
      pin_out_oe  = 1'($urandom);
      #1;
      for (int p = 0; p < NIN; p++) begin
        logic exp;
        exp = 0;
        for (int l = 0; l < NL; l++) if (gate[p*NL + l] && line_val[l]) exp = 1;
        check(pin_in[p] == exp, $sformatf("pin %0d", p));
      end
      for (int l = 0; l < NL; l++)
        check(line_drv[l] == (gate[NIN*NL + l] && pin_out_val && pin_out_oe),
              $sformatf("drive of line %0d", l));
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
