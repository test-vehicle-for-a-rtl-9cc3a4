`timescale 1ns/1ps
// cell_config_sr_tb: shifts random words into a 16-bit cell register and checks the
// parallel bits and the serial output (which lags the input by 16 shifts), then the
// laser bypass (sout follows sin at once) and an unpowered, unbypassed register
// (chain broken, sout 0).
// Timing: one shift per clk1 pulse followed by a clk2 pulse, 5 ns steps. The bypass
// link follows the document; the register length of 16 is reduced from the large
// cell's 89 bits to keep the run short, and the bit order is this design's own.
module cell_config_sr_tb;
  localparam int N = 16;
  logic clk1 = 0, clk2 = 0, sin = 0, bypass = 0, powered = 1, sout;
  logic [N-1:0] cfg;
  int checks = 0, failures = 0;

  cell_config_sr #(.N(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic pulse();
    #5 clk1 = 1; #5 clk1 = 0; #5 clk2 = 1; #5 clk2 = 0;
  endtask

  initial begin
    logic [N-1:0] w, prev_w;
    prev_w = '0;
    for (int i = 0; i < N; i++) begin sin = 0; pulse(); end
    for (int k = 0; k < 8; k++) begin
      w = N'($urandom);
      // last bit first: bit N-1 is shifted in first and ends farthest from sin
      for (int i = N - 1; i >= 0; i--) begin
        sin = w[i];
        #1 check(sout == prev_w[i], $sformatf("serial output, word %0d bit %0d", k, i));
        pulse();
      end
      check(cfg == w, $sformatf("parallel bits of word %0d", k));
      prev_w = w;
    end
    // bypass: combinational path, register content untouched
    bypass = 1;
    for (int i = 0; i < 8; i++) begin
      sin = 1'($urandom);
      #1 check(sout == sin, "bypassed register does not pass sin");
    end
    // unpowered and not bypassed: chain broken
    bypass = 0;
    powered = 0;
    sin = 1;
    for (int i = 0; i < 4; i++) begin
      pulse();
      #1 check(sout == 1'b0, "unpowered register drives sout");
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
