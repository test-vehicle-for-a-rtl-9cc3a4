`timescale 1ns/1ps
// ring_oscillator_tb: the ring-oscillator experiments on both chips.
//  * Small chip (2 x 5 cells): 0 to 4 defective cells repaired by cell-by-cell
//    substitution.
//  * Large chip (1 x 12 cells): 0 to 4 defective columns skipped by column
//    substitution, once with the skipped cell's own E-W transistors configured on
//    (active switching) and once with its laser pass transistors made (laser
//    linking; the cell is then unpowered and its register bypassed).
//
// Small chip:
// Five cells of one logical row are programmed as inverters. Cell j reads single
// line j%2 arriving from the west and drives line (j+1)%2, which its switch passes
// east. The output of the fifth cell is fed back to the first cell's west input. The
// source experiment also closes its ring outside the array, and uses a sixth cell
// only as an output buffer against the probe load, which is not modelled here.
//
// For N_R = 0..4 on the small chip, the defect map grows by one cell of physical
// row 0. The repair planner moves the logical row into row 1 around each defect, through the laser
// switch boxes; unused cells are unpowered and bypassed in the shift chains. After
// configuration the ring must oscillate, and each period must be 2 x 5 logic-block
// delays: 2 x 5 x 6.7 ns = 67 ns.
//
// Large chip: five inverter cells on single lines 4 and 5, with the defective
// columns 1, 3, 5, 7 (the first N_R of them) skipped; the cells east of the ring pass
// the lines to the east edge, from where the ring closes to the west edge.
//
// What follows the document: the array size, the five inverters and the growing
// number of restructured paths. What is this model's own: only the logic-block delay
// is modelled, so restructuring does not change the frequency here. The document
// measures a frequency drop from 4.82 MHz (N_R = 0) to 4.28 MHz (N_R = 4) on the
// small chip and from 956 kHz to 543 kHz (active switching) on the large chip, which
// is set by routing and laser-link delays.
//
// Timing: shift pulses of 5 ns per phase; the open chain settles for 200 ns before
// the ring is closed, so that a single edge circulates; the period is measured
// between rising edges over 10 periods, after 1 us of running.
module ring_oscillator_tb;
  import wsfpga_pkg::*;
  import wsfpga_repair_pkg::*;

  localparam int L_COLS = 12, L_ROWS = 1, LL = 10;
  localparam int S_ROWS = 2, S_COLS = 5, SL = 4;
  localparam int SK = 2, SCBL = 4, SNS = 2, SND = 2;
  localparam bit SEN = 1'b0;
  localparam int SN = cfg_bits(SK, SEN, SCBL, SNS, SND);
  localparam int LK = 3, LCBL = 6, LNS = 6, LND = 4;
  localparam bit LEN = 1'b1;
  localparam int LN = cfg_bits(LK, LEN, LCBL, LNS, LND);
  localparam realtime D_LB = 6.7;
  localparam realtime PERIOD = 2 * 5 * D_LB;

  // large chip: held idle
  logic          l_clk1 = 0, l_clk2 = 0, l_clk_a = 0, l_clk_b = 0;
  logic          l_sin [L_COLS] = '{default: 1'b0};
  logic          l_sout [L_COLS];
  logic          l_power_test [L_ROWS][L_COLS] = '{default: '{default: 1'b0}};
  laser_cfg_t    l_lcfg [L_ROWS][L_COLS] = '{default: '{default: '0}};
  logic          l_powered [L_ROWS][L_COLS];
  int unsigned   l_supply_ua;
  logic [LL-1:0] l_w_in [L_ROWS];
  logic [LL-1:0] l_e_in [L_ROWS] = '{default: '0};
  logic [LL-1:0] l_w_out [L_ROWS], l_e_out [L_ROWS];
  logic [LL-1:0] l_n_in [L_COLS] = '{default: '0};
  logic [LL-1:0] l_s_in [L_COLS] = '{default: '0};
  logic [LL-1:0] l_bn_in [L_COLS] = '{default: '0};
  logic [LL-1:0] l_bs_in [L_COLS] = '{default: '0};
  logic [LL-1:0] l_n_out [L_COLS], l_s_out [L_COLS], l_bn_out [L_COLS], l_bs_out [L_COLS];
  // small chip
  logic          s_clk1 = 0, s_clk2 = 0, s_clk_a = 0, s_clk_b = 0;
  logic          s_sin [S_COLS] = '{default: 1'b0};
  logic          s_sout [S_COLS];
  logic          s_power_test [S_ROWS][S_COLS] = '{default: '{default: 1'b0}};
  laser_cfg_t    s_lcfg [S_ROWS][S_COLS] = '{default: '{default: '0}};
  logic          s_powered [S_ROWS][S_COLS];
  int unsigned   s_supply_ua;
  logic [SL-1:0] s_w_in [S_ROWS];
  logic [SL-1:0] s_e_in [S_ROWS] = '{default: '0};
  logic [SL-1:0] s_w_out [S_ROWS], s_e_out [S_ROWS];
  logic [SL-1:0] s_n_in [S_COLS] = '{default: '0};
  logic [SL-1:0] s_s_in [S_COLS] = '{default: '0};
  logic [SL-1:0] s_bn_in [S_COLS] = '{default: '0};
  logic [SL-1:0] s_bs_in [S_COLS] = '{default: '0};
  logic [SL-1:0] s_n_out [S_COLS], s_s_out [S_COLS], s_bn_out [S_COLS], s_bs_out [S_COLS];

  // spare-line channel segment
  logic [LL-1:0] r_w_in = '0, r_e_in = '0, r_tap_drv = '0;
  logic [LL-1:0] r_defect = '0, r_link_end = '0, r_link_tap = '0;
  logic [LL-1:0] r_w_out, r_e_out, r_tap_in;

  wsfpga_test_vehicle dut (.*);

  int checks = 0, failures = 0;
  int m_runs = 0, m_detours = 0, m_bypassed = 0, m_col_skips = 0;

  // Feedback wire: the ring closes from the last cell's east output to the first
  // cell's west input, in whichever physical rows the repair put them.
  logic fb_en = 1'b0;
  int   r_first = 0, r_last = 0;
  logic ring_node;
  always @* begin
    for (int r = 0; r < S_ROWS; r++) s_w_in[r] = '0;
    ring_node = s_e_out[r_last][S_COLS % 2];
    if (fb_en) s_w_in[r_first][0] = ring_node;
  end

  // Large chip: the ring closes from line 5 at the east edge to line 4 at the west.
  logic l_fb_en = 1'b0;
  logic l_ring_node;
  always @* begin
    l_w_in[0] = '0;
    l_ring_node = l_e_out[0][5];
    if (l_fb_en) l_w_in[0][4] = l_ring_node;
  end

  realtime last_rise = 0.0;
  realtime periods [$];
  always @(posedge ring_node) begin
    if (fb_en && last_rise > 0.0) periods.push_back($realtime - last_rise);
    last_rise = $realtime;
  end
  always @(posedge l_ring_node) begin
    if (l_fb_en && last_rise > 0.0) periods.push_back($realtime - last_rise);
    last_rise = $realtime;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic s_shift_pulse();
    #5 s_clk1 = 1; #5 s_clk1 = 0; #5 s_clk2 = 1; #5 s_clk2 = 0;
  endtask

  // Inverter cell: both table inputs on line j%2, output on line (j+1)%2, switch E-W.
  function automatic logic [SN-1:0] inverter_cell(int j);
    logic [SN-1:0] v = '0;
    int li = j % 2, lo = (j + 1) % 2;
    v[lut_off() + 0] = 1'b1;  // input 0 -> 1
    v[lut_off() + 3] = 1'b0;  // input 1 -> 0
    v[cb_off(SK, SEN) + 0 * SCBL + li] = 1'b1;
    v[cb_off(SK, SEN) + 1 * SCBL + li] = 1'b1;
    v[cb_off(SK, SEN) + 2 * SCBL + lo] = 1'b1;
    v[sb_off(SK, SEN, SCBL) + lo * SW_GATES + SW_EW] = 1'b1;
    return v;
  endfunction

  task automatic l_shift_pulse();
    #5 l_clk1 = 1; #5 l_clk1 = 0; #5 l_clk2 = 1; #5 l_clk2 = 0;
  endtask

  // Large inverter cell j: input on line 4 + j%2, output on line 4 + (j+1)%2 (the
  // connection box reaches lines 4..9, index = line - 4). A pass cell (j < 0) only
  // closes the E-W transistors of lines 4 and 5, the active-switching bypass.
  function automatic logic [LN-1:0] large_cell(int j);
    logic [LN-1:0] v = '0;
    int cb = cb_off(LK, LEN), sb = sb_off(LK, LEN, LCBL);
    if (j < 0) begin
      v[sb + 4 * SW_GATES + SW_EW] = 1'b1;
      v[sb + 5 * SW_GATES + SW_EW] = 1'b1;
    end else begin
      int li = 4 + j % 2, lo = 4 + (j + 1) % 2;
      for (int a = 0; a < 8; a++) v[lut_off() + a] = ~a[0];
      v[cb + 0 * LCBL + li - 4] = 1'b1;
      v[cb + 4 * LCBL + lo - 4] = 1'b1;        // OUT pin
      v[sb + lo * SW_GATES + SW_EW] = 1'b1;
    end
    return v;
  endfunction

  // Measure the ring's period; the ring node is chosen by the caller's enable.
  task automatic measure(input string name);
    #1000;
    periods.delete();
    #(10 * PERIOD);
    check(periods.size() >= 8, $sformatf("%s: ring does not oscillate (%0d edges)",
                                         name, periods.size()));
    foreach (periods[i])
      check(periods[i] > PERIOD - 0.01 && periods[i] < PERIOD + 0.01,
            $sformatf("%s: period %0.3f ns, expected %0.3f ns", name, periods[i], PERIOD));
    if (periods.size() > 0)
      $display("%s: period %0.2f ns (%0.2f MHz)", name, periods[0], 1000.0 / periods[0]);
  endtask

  // Column substitution on the large chip: n_r columns among the first 5 + n_r are
  // defective and skipped, by laser pass transistors (laser = 1, the cell unpowered
  // and its register bypassed) or by its own E-W transistors (laser = 0).
  task automatic run_large_ring(input int n_r, input bit laser);
    logic [LN-1:0] cfg [L_COLS];
    bit dead [L_COLS];
    int j = 0;
    string name;
    if (laser) name = $sformatf("large chip N_R=%0d laser linking", n_r);
    else       name = $sformatf("large chip N_R=%0d active switching", n_r);
    l_fb_en = 1'b0;
    for (int c = 0; c < L_COLS; c++) dead[c] = 1'b0;
    for (int k = 0; k < n_r; k++) dead[1 + 2 * k] = 1'b1;   // columns 1, 3, 5, 7
    for (int c = 0; c < L_COLS; c++) begin
      l_lcfg[0][c] = used_cell();
      if (dead[c] && laser) begin
        l_lcfg[0][c] = unused_cell();
        l_lcfg[0][c].bypass_ew = 1'b1;
        l_lcfg[0][c].bypass_ns = 1'b0;
        l_lcfg[0][c].uncross_v = 1'b0;
        m_bypassed++;
      end
      if (dead[c] || j >= 5) cfg[c] = large_cell(-1);
      else begin
        cfg[c] = large_cell(j);
        j++;
      end
      if (dead[c]) m_col_skips++;
    end
    for (int s = 0; s < LN; s++) begin
      for (int c = 0; c < L_COLS; c++) l_sin[c] = cfg[c][LN - 1 - s];
      l_shift_pulse();
    end
    periods.delete();
    last_rise = 0.0;
    #200;
    l_fb_en = 1'b1;
    measure(name);
    l_fb_en = 1'b0;
    m_runs++;
  endtask

  task automatic run_ring(input int n_r, input map_t defects);
    prow_t prow;
    lcfg_t plan;
    int conflicts, nlog, total;
    logic [SN-1:0] cfg [S_COLS];
    fb_en = 1'b0;
    nlog = cell_by_cell_repair(S_ROWS, S_COLS, 1, defects, prow, plan, conflicts);
    check(nlog == 1 && conflicts == 0, $sformatf("N_R=%0d: repair plan", n_r));
    for (int r = 0; r < S_ROWS; r++)
      for (int c = 0; c < S_COLS; c++) begin
        s_lcfg[r][c] = plan[r][c];
        if (plan[r][c].power_link && plan[r][c].lsw inside {LSW_DOWNWARD, LSW_UPWARD})
          m_detours++;
        if (plan[r][c].sr_bypass) m_bypassed++;
      end
    for (int c = 0; c < S_COLS; c++) cfg[c] = inverter_cell(c);
    total = SN;
    for (int s = 0; s < total; s++) begin
      for (int c = 0; c < S_COLS; c++) s_sin[c] = cfg[c][total - 1 - s];
      s_shift_pulse();
    end
    r_first = prow[0][0];
    r_last  = prow[0][S_COLS-1];
    periods.delete();
    last_rise = 0.0;
    // Let the open chain settle with its input at 0 before closing the ring, so that
    // exactly one edge circulates (the delays are ideal and never merge edges).
    #200;
    fb_en = 1'b1;
    $display("small chip N_R=%0d: rows used %0d %0d %0d %0d %0d", n_r,
             prow[0][0], prow[0][1], prow[0][2], prow[0][3], prow[0][4]);
    measure($sformatf("small chip N_R=%0d", n_r));
    fb_en = 1'b0;
    m_runs++;
  endtask

  initial begin
    map_t d;
    int order [4] = '{1, 3, 2, 4};
    for (int r = 0; r < MAXR; r++) for (int c = 0; c < MAXC; c++) d[r][c] = 1'b0;
    for (int c = 0; c < L_COLS; c++) l_lcfg[0][c] = unused_cell();
    for (int n_r = 0; n_r <= 4; n_r++) begin
      if (n_r > 0) d[0][order[n_r-1]] = 1'b1;
      run_ring(n_r, d);
    end
    for (int r = 0; r < S_ROWS; r++)
      for (int c = 0; c < S_COLS; c++) s_lcfg[r][c] = unused_cell();
    for (int laser = 0; laser < 2; laser++)
      for (int n_r = 0; n_r <= 4; n_r++) run_large_ring(n_r, laser[0]);
    $display("mechanisms: runs=%0d detour_switches=%0d bypassed_registers=%0d column_skips=%0d",
             m_runs, m_detours, m_bypassed, m_col_skips);
    check(m_detours > 0, "no laser switch detour was used");
    check(m_col_skips > 0, "no column was skipped");
    check(m_bypassed > 0, "no shift register was bypassed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
