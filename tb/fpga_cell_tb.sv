`timescale 1ns/1ps
// fpga_cell_tb: one large cell (3-input table, EN pin, 6 single + 4 double lines,
// 89 configuration bits) configured through its own shift register.
//  1. serial read-back: while a second word is shifted in, sout gives the first;
//  2. a 3-input XOR read from lines 4-6 through the connection box and driven onto
//     line 7 (a double line): checked on the west segment, and east of the cell in
//     position 6 (crossed) or 7 (uncrossed);
//  3. the EN pin (line 8) turns the line drive on and off;
//  4. the registered output with the clock select on clock line b: clock a must not
//     load it, clock b must;
//  5. a single-line switch N-E, seen at the east side, then with the laser switch
//     box set downward (appears on the bus going south, east side takes the bus);
//  6. the laser E-W pass transistor joins W and E with no configuration;
//  7. power: link not made gives no supply current, no drive and a broken chain;
//     the test transistor alone powers the cell; the shift-register bypass passes sin.
// Timing: shift pulses of 10 ns per phase; outputs are read 10 ns after a change,
// after the 6.7 ns logic-block delay. The cell sizes are the document's large cell;
// the placement of bits in the register is this design's own.
module fpga_cell_tb;
  import wsfpga_pkg::*;
  localparam int K = 3, NS = 6, ND = 4, CBL = 6, L = NS + ND;
  localparam bit HAS_EN = 1'b1;
  localparam int N = cfg_bits(K, HAS_EN, CBL, NS, ND);
  localparam int CB_LO = L - CBL;
  localparam int OUT_PIN = K + 1;

  logic clk1 = 0, clk2 = 0, sin = 0, sout;
  logic clk_a = 0, clk_b = 0, power_test = 0, powered;
  laser_cfg_t lcfg = '{power_link: 1'b1, lsw: LSW_STRAIGHT, default: 1'b0};
  int unsigned supply_ua;
  logic [L-1:0] h_w_in = '0, h_w_out, h_e_in = '0, h_e_out;
  logic [L-1:0] v_n_in = '0, v_n_out, v_s_in = '0, v_s_out;
  logic [L-1:0] bus_n_in = '0, bus_n_out, bus_s_in = '0, bus_s_out;
  int checks = 0, failures = 0;

  fpga_cell #(.K(K), .HAS_EN(HAS_EN), .NS(NS), .ND(ND), .CBL(CBL)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic shift_pulse();
    #10 clk1 = 1; #10 clk1 = 0; #10 clk2 = 1; #10 clk2 = 0;
  endtask

  // Shift a word in, last bit first; optionally compare sout with the old word.
  task automatic load(input logic [N-1:0] w, input logic [N-1:0] old, input bit cmp);
    for (int i = N - 1; i >= 0; i--) begin
      sin = w[i];
      #1 if (cmp) check(sout == old[i], $sformatf("read-back bit %0d", i));
      shift_pulse();
    end
    #20;
  endtask

  function automatic void cb(ref logic [N-1:0] w, input int pin, input int line);
    w[cb_off(K, HAS_EN) + pin * CBL + (line - CB_LO)] = 1'b1;
  endfunction

  function automatic void sw(ref logic [N-1:0] w, input int s, input int g);
    w[sb_off(K, HAS_EN, CBL) + s * SW_GATES + g] = 1'b1;
  endfunction

  initial begin
    logic [N-1:0] w1, w2, wr;
    // ---- 1. read-back ----
    w1 = '0;
    for (int i = 0; i < N; i++) w1[i] = 1'($urandom);
    load(w1, '0, 1'b0);
    w2 = '0;
    for (int i = 0; i < 8; i++) w2[lut_off() + i] = ^3'(i);  // XOR table
    cb(w2, 0, 4); cb(w2, 1, 5); cb(w2, 2, 6); cb(w2, OUT_PIN, 7);
    load(w2, w1, 1'b1);

    // ---- 2. combinational XOR onto a double line ----
    for (int u = 0; u < 2; u++) begin
      lcfg.uncross_h = u[0];
      for (int a = 0; a < 8; a++) begin
        h_w_in[6:4] = 3'(a);
        #10;
        check(h_w_out[7] == ^3'(a), $sformatf("XOR %0d on the west segment", a));
        check(h_e_out[u ? 7 : 6] == ^3'(a), $sformatf("XOR %0d east, uncross=%0d", a, u));
        check(h_e_out[u ? 6 : 7] == 1'b0, "the other double position stays 0");
      end
    end
    lcfg.uncross_h = 0;

    // ---- 3. EN pin ----
    w2[ensel_off(K)] = 1'b1;
    cb(w2, K, 8);
    load(w2, '0, 1'b0);
    h_w_in[6:4] = 3'b001;
    for (int e = 0; e < 2; e++) begin
      h_w_in[8] = e[0];
      #10 check(h_w_out[7] == e[0], $sformatf("EN=%0d controls the drive", e));
    end
    h_w_in[8] = 0;

    // ---- 4. registered output on clock line b ----
    wr = w2;
    wr[ensel_off(K)] = 1'b0;
    wr[outsel_off(K)] = 1'b1;
    wr[clksel_off(K, HAS_EN)] = 1'b1;
    load(wr, '0, 1'b0);
    for (int c = 0; c < 8; c++) begin
      logic prev_q, want;
      h_w_in[6:4] = 3'($urandom);
      want = ^h_w_in[6:4];
      #10 prev_q = h_w_out[7];
      clk_a = 1; #10 clk_a = 0;
      #10 check(h_w_out[7] == prev_q, "clock line a loaded a cell set to clock b");
      clk_b = 1; #10 clk_b = 0;
      #10 check(h_w_out[7] == want, "clock line b did not load the register");
    end
    h_w_in = '0;

    // ---- 5. single-line switch, then the laser switch box ----
    w2 = '0;
    sw(w2, 0, SW_NE);
    load(w2, '0, 1'b0);
    for (int v = 0; v < 2; v++) begin
      v_n_in[0] = v[0];
      #10 check(h_e_out[0] == v[0], "N-E switch to the east side");
    end
    lcfg.lsw = LSW_DOWNWARD;
    bus_n_in = L'($urandom);
    for (int v = 0; v < 2; v++) begin
      v_n_in[0] = v[0];
      #10 check(bus_s_out[0] == v[0], "downward: cell output on the bus going south");
      check(h_e_out == bus_n_in, "downward: east side takes the bus from the north");
    end
    lcfg.lsw = LSW_STRAIGHT;
    bus_n_in = '0;
    v_n_in = '0;

    // ---- 6. laser E-W pass transistors ----
    load('0, '0, 1'b0);
    lcfg.bypass_ew = 1;
    for (int t = 0; t < 8; t++) begin
      h_w_in = L'($urandom);
      h_w_in[NS +: ND] = '0;
      #10 check(h_e_out[NS-1:0] == h_w_in[NS-1:0], "laser E-W link does not join W and E");
    end
    h_w_in = '0;
    lcfg.bypass_ew = 0;

    // ---- 7. power and shift-register bypass ----
    w2 = '0;
    for (int i = 0; i < 8; i++) w2[lut_off() + i] = 1'b1;  // constant 1
    cb(w2, OUT_PIN, 9);
    load(w2, '0, 1'b0);
    check(h_w_out[9] == 1'b1 && supply_ua == 1000, "powered cell drives its constant");
    lcfg.power_link = 0;
    #10;
    check(!powered && supply_ua == 0, "cell without power link is unpowered");
    check(h_w_out == '0, "unpowered cell drives a line");
    sin = 1;
    shift_pulse();
    #1 check(sout == 1'b0, "unpowered register passes data");
    power_test = 1;
    #10 check(powered && supply_ua == 1000, "test transistor alone powers the cell");
    power_test = 0;
    lcfg.sr_bypass = 1;
    for (int t = 0; t < 4; t++) begin
      sin = 1'($urandom);
      #1 check(sout == sin, "bypassed register does not pass sin");
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
