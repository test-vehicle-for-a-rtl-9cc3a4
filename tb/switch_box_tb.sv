`timescale 1ns/1ps
// switch_box_tb: random gates and inputs on a 2-single, 2-double channel, compared
// with a model written per side: on each side of a double-line pair one position
// meets the routing switch and the other passes straight through the cell. With
// the lines crossed, the switched position is a on the west and north sides and b
// on the east and south sides; uncrossing makes it a on every side. Laser E-W and
// N-S links are also randomised.
// Timing: purely combinational. The crossing of the double lines and their laser
// uncrossing follow the document; which position meets the switch is this design's
// own choice, and the channel is reduced to the small cell's 2 + 2 lines.
module switch_box_tb;
  import wsfpga_pkg::*;
  localparam int NS = 2, ND = 2, L = NS + ND, NSW = NS + ND / 2;
  logic [L-1:0] w_in, w_out, e_in, e_out, n_in, n_out, s_in, s_out;
  logic [NSW*SW_GATES-1:0] gate;
  logic laser_ew, laser_ns, uncross_h, uncross_v;
  int checks = 0, failures = 0;
  int n_cross = 0, n_uncross = 0;

  switch_box #(.NS(NS), .ND(ND)) dut (.*);

  function automatic bit pair_on(int a, int b, logic [5:0] g, logic lew, logic lns);
    int lo = (a < b) ? a : b, hi = (a < b) ? b : a;
    if (lo == DIR_N && hi == DIR_E) return g[SW_NE];
    if (lo == DIR_N && hi == DIR_S) return g[SW_NS] | lns;
    if (lo == DIR_N && hi == DIR_W) return g[SW_NW];
    if (lo == DIR_E && hi == DIR_S) return g[SW_ES];
    if (lo == DIR_E && hi == DIR_W) return g[SW_EW] | lew;
    return g[SW_SW];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [L-1:0] side_in [4];
    logic [L-1:0] exp_out [4];
    int pos_sw [4], pos_thru [4];
    for (int t = 0; t < 2000; t++) begin
      w_in = L'($urandom); e_in = L'($urandom);
      n_in = L'($urandom); s_in = L'($urandom);
      for (int i = 0; i < NSW * SW_GATES; i++) gate[i] = ($urandom % 3) == 0;
      laser_ew  = ($urandom % 4) == 0;
      laser_ns  = ($urandom % 4) == 0;
      uncross_h = 1'($urandom);
      uncross_v = 1'($urandom);
      #1;
      side_in[DIR_N] = n_in; side_in[DIR_E] = e_in;
      side_in[DIR_S] = s_in; side_in[DIR_W] = w_in;
      for (int d = 0; d < 4; d++) exp_out[d] = '0;
      // single lines
      for (int i = 0; i < NS; i++)
        for (int o = 0; o < 4; o++)
          for (int s = 0; s < 4; s++)
            if (s != o && side_in[s][i] &&
                pair_on(o, s, gate[i*SW_GATES +: SW_GATES], laser_ew, laser_ns))
              exp_out[o][i] = 1'b1;
      // double-line pairs
      for (int j = 0; j < ND / 2; j++) begin
        int a = NS + 2 * j, b = a + 1;
        pos_sw[DIR_W] = a; pos_thru[DIR_W] = b;
        pos_sw[DIR_N] = a; pos_thru[DIR_N] = b;
        pos_sw[DIR_E] = uncross_h ? a : b; pos_thru[DIR_E] = uncross_h ? b : a;
        pos_sw[DIR_S] = uncross_v ? a : b; pos_thru[DIR_S] = uncross_v ? b : a;
        for (int o = 0; o < 4; o++) begin
          for (int s = 0; s < 4; s++)
            if (s != o && side_in[s][pos_sw[s]] &&
                pair_on(o, s, gate[(NS+j)*SW_GATES +: SW_GATES], laser_ew, laser_ns))
              exp_out[o][pos_sw[o]] = 1'b1;
          // straight through to the opposite side
          exp_out[o][pos_thru[o]] = side_in[(o + 2) % 4][pos_thru[(o + 2) % 4]];
        end
      end
      check(n_out == exp_out[DIR_N], $sformatf("t=%0d north", t));
      check(e_out == exp_out[DIR_E], $sformatf("t=%0d east", t));
      check(s_out == exp_out[DIR_S], $sformatf("t=%0d south", t));
      check(w_out == exp_out[DIR_W], $sformatf("t=%0d west", t));
      if (uncross_h) n_uncross++; else n_cross++;
    end
    if (n_cross == 0 || n_uncross == 0) begin
      failures++;
      $display("FAIL: crossed or uncrossed case never exercised");
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
