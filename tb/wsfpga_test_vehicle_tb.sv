`timescale 1ns/1ps
// wsfpga_test_vehicle_tb: end-to-end test of both test-vehicle chips at their own
// sizes (the top's default parameters).
//
// Large chip (1 x 12 large cells):
//  1. power test: each cell's test transistor alone raises the supply current by one
//     cell's increment; nothing is powered otherwise;
//  2. a 12-stage registered pipeline, stage j computing q[j] = q[j-1] ^ D, where D is
//     a pad signal carried along a double-length line (so it reaches the cells on
//     alternating positions of the crossed pair), and the last stage's output buffer
//     is enabled by pad signal G through its EN pin;
//  3. column substitution: column 5 is declared defective, removed with the E-W laser
//     pass transistors, its double lines uncrossed and its register bypassed; the
//     same 11 logical cell configurations must give the 11-stage function;
//  4. the same without uncrossing must break the function (the double line becomes a
//     single and a triple-length line), showing why the uncrossing exists.
// Small chip (2 x 5 small cells):
//  5. the XOR experiment: one cell computes A ^ B combinationally; the result is seen
//     on the west pad and, carried over a double-length line through the other four
//     cells, on the east pad;
//  6. a 5-stage pipeline on a defect-free chip, then the same bit stream with cell
//     (0,2) defective, repaired by cell-by-cell substitution (downward and upward
//     laser switches).
// Spare-line segment:
//  7. each of the 10 lines in turn is open, then replaced by the spare line through
//     its end and tap links.
// Each mechanism is counted and must happen at least once.
module wsfpga_test_vehicle_tb;
  import wsfpga_pkg::*;
  import wsfpga_repair_pkg::*;

  localparam int L_COLS = 12, L_ROWS = 1, LL = 10;
  localparam int S_ROWS = 2, S_COLS = 5, SL = 4;
  localparam int LK = 3, LCBL = 6, LNS = 6, LND = 4;
  localparam bit LEN = 1'b1;
  localparam int SK = 2, SCBL = 4, SNS = 2, SND = 2;
  localparam bit SEN = 1'b0;
  localparam int LN = cfg_bits(LK, LEN, LCBL, LNS, LND);
  localparam int SN = cfg_bits(SK, SEN, SCBL, SNS, SND);

  // large chip
  logic          l_clk1 = 0, l_clk2 = 0, l_clk_a = 0, l_clk_b = 0;
  logic          l_sin [L_COLS], l_sout [L_COLS];
  logic          l_power_test [L_ROWS][L_COLS] = '{default: '{default: 1'b0}};
  laser_cfg_t    l_lcfg [L_ROWS][L_COLS] = '{default: '{default: '0}};
  logic          l_powered [L_ROWS][L_COLS];
  int unsigned   l_supply_ua;
  logic [LL-1:0] l_w_in [L_ROWS], l_w_out [L_ROWS], l_e_in [L_ROWS], l_e_out [L_ROWS];
  logic [LL-1:0] l_n_in [L_COLS], l_n_out [L_COLS], l_s_in [L_COLS], l_s_out [L_COLS];
  logic [LL-1:0] l_bn_in [L_COLS], l_bn_out [L_COLS], l_bs_in [L_COLS], l_bs_out [L_COLS];
  // small chip
  logic          s_clk1 = 0, s_clk2 = 0, s_clk_a = 0, s_clk_b = 0;
  logic          s_sin [S_COLS], s_sout [S_COLS];
  logic          s_power_test [S_ROWS][S_COLS] = '{default: '{default: 1'b0}};
  laser_cfg_t    s_lcfg [S_ROWS][S_COLS] = '{default: '{default: '0}};
  logic          s_powered [S_ROWS][S_COLS];
  int unsigned   s_supply_ua;
  logic [SL-1:0] s_w_in [S_ROWS], s_w_out [S_ROWS], s_e_in [S_ROWS], s_e_out [S_ROWS];
  logic [SL-1:0] s_n_in [S_COLS], s_n_out [S_COLS], s_s_in [S_COLS], s_s_out [S_COLS];
  logic [SL-1:0] s_bn_in [S_COLS], s_bn_out [S_COLS], s_bs_in [S_COLS], s_bs_out [S_COLS];

  // spare-line channel segment
  logic [LL-1:0] r_w_in = '0, r_e_in = '0, r_tap_drv = '0;
  logic [LL-1:0] r_defect = '0, r_link_end = '0, r_link_tap = '0;
  logic [LL-1:0] r_w_out, r_e_out, r_tap_in;

  wsfpga_test_vehicle dut (.*);

  int checks = 0, failures = 0;
  int m_power_test = 0, m_col_bypass = 0, m_uncross = 0, m_uncross_needed = 0;
  int m_sr_bypass = 0, m_enable = 0, m_registered = 0, m_comb = 0, m_double = 0;
  int m_down = 0, m_up = 0, m_spare = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- large chip helpers ----------------
  logic [LN-1:0] lcell [L_COLS];

  function automatic logic [LN-1:0] large_stage(int j, bit last);
    logic [LN-1:0] v = '0;
    // the connection box reaches lines 4..9: index = line - 4
    int li = 4 + j % 2, lo = 4 + (j + 1) % 2;
    int dl = (j % 2 == 0) ? 6 : 7;           // D on the crossed double pair 0
    int gl = (j % 2 == 0) ? 8 : 9;           // G on the crossed double pair 1
    int cb = cb_off(LK, LEN), sb = sb_off(LK, LEN, LCBL);
    // LUT: out = in0 ^ in1 (in2 unconnected reads 0)
    for (int a = 0; a < 8; a++) v[lut_off() + a] = a[0] ^ a[1];
    v[outsel_off(LK)] = 1'b1;
    v[cb + 0 * LCBL + li - 4] = 1'b1;
    v[cb + 1 * LCBL + dl - 4] = 1'b1;
    v[cb + 4 * LCBL + lo - 4] = 1'b1;          // OUT pin
    v[sb + lo * SW_GATES + SW_EW] = 1'b1;      // pipeline line passes east
    v[sb + 6 * SW_GATES + SW_EW] = 1'b1;       // double pair 0 passes east
    v[sb + 7 * SW_GATES + SW_EW] = 1'b1;       // double pair 1 passes east
    if (last) begin
      v[ensel_off(LK)] = 1'b1;
      v[cb + 3 * LCBL + gl - 4] = 1'b1;        // EN pin on G
    end
    return v;
  endfunction

  task automatic l_shift_pulse();
    #5 l_clk1 = 1; #5 l_clk1 = 0; #5 l_clk2 = 1; #5 l_clk2 = 0;
  endtask

  // Program the large chip with n logical stages; column dead (or -1) removed.
  task automatic large_program(input int n, input int dead, input bit uncross);
    int j = 0;
    for (int c = 0; c < L_COLS; c++) begin
      l_power_test[0][c] = 1'b0;
      l_lcfg[0][c] = used_cell();
      if (c == dead) begin
        l_lcfg[0][c] = unused_cell();
        l_lcfg[0][c].bypass_ew = 1'b1;
        l_lcfg[0][c].uncross_h = uncross;
        l_lcfg[0][c].bypass_ns = 1'b0;
        l_lcfg[0][c].uncross_v = 1'b0;
      end
    end
    for (int c = 0; c < L_COLS; c++) begin
      if (c == dead) lcell[c] = '0;
      else begin
        lcell[c] = large_stage(j, j == n - 1);
        j++;
      end
    end
    // one cell per column: shift the bits, last bit first
    for (int s = 0; s < LN; s++) begin
      for (int c = 0; c < L_COLS; c++) l_sin[c] = lcell[c][LN - 1 - s];
      l_shift_pulse();
    end
  endtask

  // Run random data; returns the number of mismatches (checks counted if count_checks).
  task automatic large_run(input int n, input int out_line, input bit count_checks,
                           output int mism);
    logic q [L_COLS];
    logic din, dd, g;
    mism = 0;
    for (int t = 0; t < 60; t++) begin
      din = 1'($urandom);
      dd  = 1'($urandom);
      g   = ($urandom % 4) != 0;
      l_w_in[0] = '0;
      l_w_in[0][4] = din;
      l_w_in[0][6] = dd;
      l_w_in[0][8] = g;
      #10 l_clk_a = 1;
      for (int j = n - 1; j > 0; j--) q[j] = q[j-1] ^ dd;
      q[0] = din ^ dd;
      #10 l_clk_a = 0;
      #1;
      if (t >= n) begin
        logic exp = g & q[n-1];
        if (l_e_out[0][out_line] !== exp) mism++;
        if (count_checks) begin
          check(l_e_out[0][out_line] == exp, $sformatf("large chip %0d stages, step %0d", n, t));
          if (!g && q[n-1]) m_enable++;
          m_registered++;
          if (n % 2 == 0 && dd) m_double++;
        end
      end
    end
  endtask

  // ---------------- small chip helpers ----------------
  task automatic s_shift_pulse();
    #5 s_clk1 = 1; #5 s_clk1 = 0; #5 s_clk2 = 1; #5 s_clk2 = 0;
  endtask

  function automatic logic [SN-1:0] small_pipe(int j);
    logic [SN-1:0] v = '0;
    int li = j % 2, lo = (j + 1) % 2;
    v[lut_off() + 0] = (j % 2 == 1);
    v[lut_off() + 3] = (j % 2 == 0);
    v[outsel_off(SK)] = 1'b1;
    v[cb_off(SK, SEN) + 0 * SCBL + li] = 1'b1;
    v[cb_off(SK, SEN) + 1 * SCBL + li] = 1'b1;
    v[cb_off(SK, SEN) + 2 * SCBL + lo] = 1'b1;
    v[sb_off(SK, SEN, SCBL) + lo * SW_GATES + SW_EW] = 1'b1;
    return v;
  endfunction

  // Shift logical configurations cfgs[i][c] (nlog rows) into every column.
  task automatic small_load(input logic [SN-1:0] cfgs [S_ROWS][S_COLS], input int nlog);
    int total = nlog * SN;
    for (int s = 0; s < total; s++) begin
      int pos = total - 1 - s;
      for (int c = 0; c < S_COLS; c++) s_sin[c] = cfgs[pos / SN][c][pos % SN];
      s_shift_pulse();
    end
  endtask

  task automatic small_pipeline(input string name, input map_t defects);
    prow_t prow;
    lcfg_t plan;
    int conflicts, nlog;
    logic [SN-1:0] cfgs [S_ROWS][S_COLS];
    logic q [S_COLS];
    logic din;
    nlog = cell_by_cell_repair(S_ROWS, S_COLS, 1, defects, prow, plan, conflicts);
    check(nlog == 1 && conflicts == 0, $sformatf("%s: repair plan", name));
    for (int r = 0; r < S_ROWS; r++)
      for (int c = 0; c < S_COLS; c++) begin
        s_lcfg[r][c] = plan[r][c];
        s_power_test[r][c] = 1'b0;
        if (plan[r][c].lsw == LSW_DOWNWARD && plan[r][c].power_link) m_down++;
        if (plan[r][c].lsw == LSW_UPWARD && plan[r][c].power_link) m_up++;
        if (plan[r][c].sr_bypass) m_sr_bypass++;
      end
    for (int c = 0; c < S_COLS; c++) cfgs[0][c] = small_pipe(c);
    small_load(cfgs, nlog);
    for (int t = 0; t < 40; t++) begin
      din = 1'($urandom);
      s_w_in[0] = '0;
      s_w_in[1] = '0;
      s_w_in[prow[0][0]][0] = din;
      #10 s_clk_a = 1;
      for (int j = S_COLS - 1; j > 0; j--) q[j] = q[j-1] ^ (j % 2 == 1);
      q[0] = din;
      #10 s_clk_a = 0;
      #1;
      if (t >= S_COLS)
        check(s_e_out[prow[0][S_COLS-1]][S_COLS % 2] == q[S_COLS-1],
              $sformatf("%s: output at step %0d", name, t));
    end
  endtask

  initial begin
    int mism;
    map_t d;
    // quiet pads
    for (int c = 0; c < L_COLS; c++) begin
      l_sin[c] = 0; l_n_in[c] = '0; l_s_in[c] = '0; l_bn_in[c] = '0; l_bs_in[c] = '0;
      l_power_test[0][c] = 0; l_lcfg[0][c] = unused_cell();
    end
    l_w_in[0] = '0; l_e_in[0] = '0;
    for (int c = 0; c < S_COLS; c++) begin
      s_sin[c] = 0; s_n_in[c] = '0; s_s_in[c] = '0; s_bn_in[c] = '0; s_bs_in[c] = '0;
    end
    for (int r = 0; r < S_ROWS; r++) begin
      s_w_in[r] = '0; s_e_in[r] = '0;
      for (int c = 0; c < S_COLS; c++) begin
        s_power_test[r][c] = 0; s_lcfg[r][c] = unused_cell();
      end
    end

    // 1. power test of the large chip, one cell at a time
    #2;
    check(l_supply_ua == 0, "large chip draws current with no cell connected");
    for (int c = 0; c < L_COLS; c++) begin
      l_power_test[0][c] = 1'b1;
      #2;
      check(l_supply_ua == 1000 && l_powered[0][c], $sformatf("power test of cell %0d", c));
      m_power_test++;
      l_power_test[0][c] = 1'b0;
      #2;
    end

    // 2. full 12-stage pipeline
    large_program(L_COLS, -1, 1'b1);
    large_run(L_COLS, 4 + L_COLS % 2, 1'b1, mism);

    // 3. column 5 removed by column substitution, uncrossed
    large_program(L_COLS - 1, 5, 1'b1);
    m_col_bypass++;
    m_uncross++;
    m_sr_bypass++;
    large_run(L_COLS - 1, 4 + (L_COLS - 1) % 2, 1'b1, mism);

    // 4. the same without uncrossing: the double line D must be lost
    large_program(L_COLS - 1, 5, 1'b0);
    large_run(L_COLS - 1, 4 + (L_COLS - 1) % 2, 1'b0, mism);
    check(mism > 0, "bypass without uncrossing did not disturb the double line");
    if (mism > 0) m_uncross_needed++;

    // 5. XOR experiment on the small chip, cell (0,0); row 1 unused
    begin
      logic [SN-1:0] cfgs [S_ROWS][S_COLS];
      for (int c = 0; c < S_COLS; c++) begin
        s_lcfg[0][c] = used_cell();
        s_lcfg[1][c] = unused_cell();
        cfgs[0][c] = '0;
        cfgs[1][c] = '0;
      end
      // cell 0: out = in0 ^ in1 combinational, inputs on lines 0 and 1, output on line 2
      cfgs[0][0][lut_off() + 1] = 1'b1;
      cfgs[0][0][lut_off() + 2] = 1'b1;
      cfgs[0][0][cb_off(SK, SEN) + 0 * SCBL + 0] = 1'b1;
      cfgs[0][0][cb_off(SK, SEN) + 1 * SCBL + 1] = 1'b1;
      cfgs[0][0][cb_off(SK, SEN) + 2 * SCBL + 2] = 1'b1;
      // the double pair is switched in cells 0, 2 and 4, where it passes east
      for (int c = 0; c < S_COLS; c += 2)
        cfgs[0][c][sb_off(SK, SEN, SCBL) + 2 * SW_GATES + SW_EW] = 1'b1;
      small_load(cfgs, 1);
      for (int t = 0; t < 16; t++) begin
        logic a = t[0], b = t[1];
        s_w_in[0] = '0;
        s_w_in[0][0] = a;
        s_w_in[0][1] = b;
        #10;
        check(s_w_out[0][2] == (a ^ b), $sformatf("XOR at west pad, A=%0d B=%0d", a, b));
        check(s_e_out[0][3] == (a ^ b), $sformatf("XOR at east pad, A=%0d B=%0d", a, b));
        m_comb++;
        m_double++;
      end
    end

    // 6. pipeline on the small chip, defect-free then with (0,2) defective
    foreach (d[r, c]) d[r][c] = 0;
    small_pipeline("small chip, no defect", d);
    d[0][2] = 1;
    small_pipeline("small chip, cell (0,2) repaired", d);

    // ---- 7. spare line: each line in turn open, then replaced ----
    for (int k = 0; k < LL; k++) begin
      logic [LL-1:0] v;
      r_defect = '0; r_link_end = '0; r_link_tap = '0; r_tap_drv = '0;
      r_defect[k] = 1'b1;
      v = LL'($urandom);
      v[k] = 1'b1;
      r_w_in = v;
      #1 check(r_e_out[k] == 1'b0 && r_tap_in[k] == 1'b0, $sformatf("open line %0d still conducts", k));
      check((r_e_out & ~(LL'(1) << k)) == (v & ~(LL'(1) << k)), "open line disturbs the others");
      r_link_end[k] = 1'b1;
      r_link_tap[k] = 1'b1;
      #1 check(r_e_out == v && r_tap_in == v, $sformatf("spare line does not replace line %0d", k));
      r_w_in = '0;
      r_tap_drv[k] = 1'b1;
      #1 check(r_w_out[k] && r_e_out[k], $sformatf("tap of replaced line %0d does not reach the ends", k));
      m_spare++;
    end
    r_defect = '0; r_link_end = '0; r_link_tap = '0; r_tap_drv = '0;

    check(m_power_test > 0, "power test never happened");
    check(m_spare > 0, "spare line never substituted");
    check(m_col_bypass > 0, "column substitution never happened");
    check(m_uncross > 0 && m_uncross_needed > 0, "line uncrossing never exercised");
    check(m_sr_bypass > 0, "shift register bypass never happened");
    check(m_enable > 0, "EN never disabled a driven 1");
    check(m_registered > 0, "registered output never used");
    check(m_comb > 0, "combinational output never used");
    check(m_double > 0, "double-length line never carried a 1");
    check(m_down > 0, "downward laser switch never used");
    check(m_up > 0, "upward laser switch never used");
    $display("mechanisms: power_test=%0d column_bypass=%0d uncross=%0d/%0d sr_bypass=%0d enable=%0d registered=%0d comb=%0d double=%0d down=%0d up=%0d spare=%0d",
             m_power_test, m_col_bypass, m_uncross, m_uncross_needed, m_sr_bypass, m_enable,
             m_registered, m_comb, m_double, m_down, m_up, m_spare);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
