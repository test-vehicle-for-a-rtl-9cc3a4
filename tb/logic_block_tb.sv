`timescale 1ns/1ps
// logic_block_tb: for random 3-input tables, every input value is applied and the
// combinational output compared with the table entry; the registered output must
// show the previous cycle's table output; the EN pin must control the output
// enable only when selected. The output must settle within the 6.7 ns output delay
// and not before it.
// Timing: the output follows its inputs after 6.7 ns, the logic-block delay of the
// document's delay table; the enable selection is this design's own reading.
module logic_block_tb;
  localparam int K = 3;
  logic clk = 0, en_in = 0, out_sel = 0, en_sel = 0, out_val, out_oe;
  logic [K-1:0] lut_in = '0;
  logic [2**K-1:0] lut_cfg = '0;
  int checks = 0, failures = 0;

  logic_block #(.K(K), .HAS_EN(1'b1)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic exp_prev;
    for (int t = 0; t < 20; t++) begin
      lut_cfg = 8'($urandom);
      out_sel = 0;
      for (int a = 0; a < 8; a++) begin
        lut_in = 3'(a);
        #10 check(out_val == lut_cfg[a], $sformatf("table %h input %0d", lut_cfg, a));
      end
      // output delay: a change of table output is not visible at once
      lut_in = 3'd0; #10;
      if (lut_cfg[0] != lut_cfg[1]) begin
        lut_in = 3'd1;
        #5 check(out_val == lut_cfg[0], "output changed before the output delay");
        #2 check(out_val == lut_cfg[1], "output not settled after the output delay");
      end
      // registered
      out_sel = 1;
      for (int c = 0; c < 8; c++) begin
        lut_in = 3'($urandom);
        exp_prev = lut_cfg[lut_in];
        #5 clk = 1;
        #10 check(out_val == exp_prev, "registered output");
        lut_in = ~lut_in;
        #5 check(out_val == exp_prev, "registered output moved without a clock");
        clk = 0;
      end
      // enable
      en_sel = 0; en_in = 0;
      #10 check(out_oe == 1'b1, "output not enabled with EN deselected");
      en_sel = 1;
      for (int e = 0; e < 2; e++) begin
        en_in = e[0];
        #10 check(out_oe == e[0], "EN pin does not control the output");
      end
      en_sel = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
