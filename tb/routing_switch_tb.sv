`timescale 1ns/1ps
// routing_switch_tb: every combination of the six gates, the two laser pass
// transistors and the four inputs; each output must be the OR of the other sides'
// inputs whose pair is connected, by its transistor or (E-W, N-S) by its laser link.
// Timing: purely combinational, all 4096 input combinations. The six transistors
// and the two laser pass transistors follow the document.
module routing_switch_tb;
  import wsfpga_pkg::*;
  logic [3:0] sig_in, sig_out;
  logic [5:0] gate;
  logic laser_ew, laser_ns;
  int checks = 0, failures = 0;

  routing_switch dut (.*);

  function automatic bit pair_on(int a, int b, logic [5:0] g, logic lew, logic lns);
    int lo = (a < b) ? a : b, hi = (a < b) ? b : a;
    if (lo == DIR_N && hi == DIR_E) return g[SW_NE];
    if (lo == DIR_N && hi == DIR_S) return g[SW_NS] | lns;
    if (lo == DIR_N && hi == DIR_W) return g[SW_NW];
    if (lo == DIR_E && hi == DIR_S) return g[SW_ES];
    if (lo == DIR_E && hi == DIR_W) return g[SW_EW] | lew;
    return g[SW_SW];
  endfunction

  initial begin
    for (int v = 0; v < (1 << 12); v++) begin
      {laser_ns, laser_ew, gate, sig_in} = 12'(v);
      #1;
      for (int o = 0; o < 4; o++) begin
        logic exp;
        exp = 0;
        for (int i = 0; i < 4; i++)
          if (i != o && sig_in[i] && pair_on(o, i, gate, laser_ew, laser_ns)) exp = 1;
        checks++;
        if (sig_out[o] != exp) begin
          failures++;
          if (failures < 10) $display("FAIL: v=%h out %0d", v, o);
        end
      end
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
