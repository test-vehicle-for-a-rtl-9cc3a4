`timescale 1ns/1ps
// wsfpga_array_tb: cell-by-cell substitution on a 4 x 3 array of small cells.
//
// Three defect maps are repaired in turn: the one of the document's example of
// defect avoidance (cells (0,2), (2,1), (3,0) defective, 3 logical rows), one that
// needs a pseudo-fault and a bus that passes a row (straight-down switches), and one
// that needs upward switches. For each, the repair plan from wsfpga_repair_pkg sets
// the laser links, the same logical bit stream is shifted into every column (the
// chain skips bypassed cells), and every logical row is programmed as a pipeline of
// registered cells from its west pad to its east pad, alternating buffer and
// inverter, routed on the two single-length lines. Random data is clocked through
// and each row's output is compared with a model of the pipeline. The repair is
// invisible if the same bit stream gives the same function whatever the defects.
module wsfpga_array_tb;
  import wsfpga_pkg::*;
  import wsfpga_repair_pkg::*;

  localparam int ROWS = 4;
  localparam int COLS = 3;
  localparam int K = 2, NS = 2, ND = 2, CBL = 4;
  localparam bit HAS_EN = 1'b0;
  localparam int L = NS + ND;
  localparam int NCFG = cfg_bits(K, HAS_EN, CBL, NS, ND);

  logic         clk1 = 0, clk2 = 0, clk_a = 0, clk_b = 0;
  logic         sin  [COLS];
  logic         sout [COLS];
  logic         power_test [ROWS][COLS] = '{default: '{default: 1'b0}};
  laser_cfg_t   lcfg       [ROWS][COLS] = '{default: '{default: '0}};
  logic         powered    [ROWS][COLS];
  int unsigned  supply_ua;
  logic [L-1:0] w_in [ROWS], w_out [ROWS], e_in [ROWS], e_out [ROWS];
  logic [L-1:0] n_in [COLS], n_out [COLS], s_in [COLS], s_out [COLS];
  logic [L-1:0] bn_in [COLS], bn_out [COLS], bs_in [COLS], bs_out [COLS];

  wsfpga_array #(.ROWS(ROWS), .COLS(COLS), .K(K), .HAS_EN(HAS_EN), .NS(NS), .ND(ND),
                 .CBL(CBL)) dut (.*);

  int checks = 0, failures = 0;
  int n_down = 0, n_up = 0, n_sdown = 0, n_bypass = 0;

  logic [NCFG-1:0] lcell [ROWS][COLS];  // logical cell configurations

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic shift_pulse();
    #5 clk1 = 1; #5 clk1 = 0; #5 clk2 = 1; #5 clk2 = 0;
  endtask

  // Logical cell (i, j) of a pipeline: reads single line j%2, drives line (j+1)%2 on its
  // west segment, passes that line east through its switch; registered; odd cells invert.
  function automatic logic [NCFG-1:0] pipe_cell(int j);
    logic [NCFG-1:0] v = '0;
    int li = j % 2, lo = (j + 1) % 2;
    // both LUT inputs on the same line: entries 0 (00) and 3 (11) matter
    v[lut_off() + 0] = (j % 2 == 1);
    v[lut_off() + 3] = (j % 2 == 0);
    v[outsel_off(K)] = 1'b1;
    v[cb_off(K, HAS_EN) + 0 * CBL + li] = 1'b1;
    v[cb_off(K, HAS_EN) + 1 * CBL + li] = 1'b1;
    v[cb_off(K, HAS_EN) + (cb_pins(K, HAS_EN) - 1) * CBL + lo] = 1'b1;
    v[sb_off(K, HAS_EN, CBL) + lo * SW_GATES + SW_EW] = 1'b1;
    return v;
  endfunction

  task automatic run_scenario(input string name, input map_t defects, input int want_rows);
    prow_t prow;
    lcfg_t plan;
    int    conflicts, nlog, total;
    logic  q [ROWS][COLS];
    logic  din [ROWS];
    nlog = cell_by_cell_repair(ROWS, COLS, ROWS, defects, prow, plan, conflicts);
    check(nlog == want_rows, $sformatf("%s: %0d logical rows, expected %0d", name, nlog, want_rows));
    check(conflicts == 0, $sformatf("%s: %0d laser switch conflicts", name, conflicts));
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        lcfg[r][c] = plan[r][c];
        power_test[r][c] = 1'b0;
        if (plan[r][c].sr_bypass) n_bypass++;
        if (plan[r][c].lsw == LSW_DOWNWARD) n_down++;
        if (plan[r][c].lsw == LSW_UPWARD) n_up++;
        if (plan[r][c].lsw == LSW_STRAIGHT_DOWN) n_sdown++;
      end
    #2;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        check(powered[r][c] == plan[r][c].power_link, $sformatf("%s: power of (%0d,%0d)", name, r, c));
    // shift the logical bit stream into every column
    total = nlog * NCFG;
    for (int s = 0; s < total; s++) begin
      int pos = total - 1 - s;
      for (int c = 0; c < COLS; c++) sin[c] = lcell[pos / NCFG][c][pos % NCFG];
      shift_pulse();
    end
    // run random data through the logical rows
    for (int r = 0; r < ROWS; r++) w_in[r] = '0;
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < nlog; i++) begin
        din[i] = 1'($urandom);
        w_in[prow[i][0]] = L'(din[i]);
      end
      #10 clk_a = 1;
      for (int i = 0; i < nlog; i++) begin
        for (int j = COLS - 1; j > 0; j--) q[i][j] = q[i][j-1] ^ (j % 2 == 1);
        q[i][0] = din[i];
      end
      #10 clk_a = 0;
      #1;
      if (t >= COLS) begin
        for (int i = 0; i < nlog; i++)
          check(e_out[prow[i][COLS-1]][COLS % 2] == q[i][COLS-1],
                $sformatf("%s: logical row %0d output at step %0d", name, i, t));
      end
    end
  endtask

  initial begin
    map_t d;
    for (int c = 0; c < COLS; c++) begin
      sin[c] = 0; n_in[c] = '0; s_in[c] = '0; bn_in[c] = '0; bs_in[c] = '0;
    end
    for (int r = 0; r < ROWS; r++) begin
      w_in[r] = '0; e_in[r] = '0;
    end
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++) lcell[i][j] = pipe_cell(j);

    foreach (d[r, c]) d[r][c] = 0;
    d[0][2] = 1; d[2][1] = 1; d[3][0] = 1;
    run_scenario("example map", d, 3);

    foreach (d[r, c]) d[r][c] = 0;
    d[0][1] = 1; d[1][1] = 1;
    run_scenario("pseudo-fault map", d, 2);

    foreach (d[r, c]) d[r][c] = 0;
    d[0][0] = 1;
    run_scenario("upward map", d, 3);

    check(n_down > 0, "downward laser switch never used");
    check(n_up > 0, "upward laser switch never used");
    check(n_sdown > 0, "straight-down laser switch never used");
    check(n_bypass > 0, "shift register bypass never used");
    $display("mechanisms: downward=%0d upward=%0d straight_down=%0d sr_bypass=%0d",
             n_down, n_up, n_sdown, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
