`timescale 1ns/1ps
// wsfpga_repair_pkg: testbench-side repair planning for the restructurable array.
//
// Given a map of defective cells, cell_by_cell_repair builds logical rows with the
// row-assignment algorithm of cell-by-cell substitution: logical row i takes, in each
// column, the first cell from the top that is neither defective, a pseudo-fault, nor
// already used. Between consecutive columns, with the row in physical row e in column
// j and f in column j+1, cells (k, j) with e < k < f, or cells (k, j+1) with f < k < e,
// become pseudo-faults, so a single restructuring bus per column gap suffices. It then
// derives the laser settings: used cells are powered and in the shift chain, all others
// are unpowered, bypassed in the chain and passed N-S (double lines uncrossed), and the
// laser switch boxes carry each logical row from e down or up to f. A box asked for two
// different patterns is counted as a conflict.
package wsfpga_repair_pkg;
  import wsfpga_pkg::*;

  localparam int MAXR = 8;
  localparam int MAXC = 16;

  typedef bit         map_t  [MAXR][MAXC];
  typedef int         prow_t [MAXR][MAXC];
  typedef laser_cfg_t lcfg_t [MAXR][MAXC];

  function automatic laser_cfg_t unused_cell();
    laser_cfg_t x;
    x.power_link = 1'b0;
    x.sr_bypass  = 1'b1;
    x.bypass_ew  = 1'b0;
    x.bypass_ns  = 1'b1;
    x.uncross_h  = 1'b0;
    x.uncross_v  = 1'b1;
    x.lsw        = LSW_STRAIGHT;
    return x;
  endfunction

  function automatic laser_cfg_t used_cell();
    laser_cfg_t x;
    x = unused_cell();
    x.power_link = 1'b1;
    x.sr_bypass  = 1'b0;
    x.bypass_ns  = 1'b0;
    x.uncross_v  = 1'b0;
    return x;
  endfunction

  // Builds at most max_log logical rows and returns their number; prow[i][j] is the physical row of logical
  // cell (i, j); lcfg the laser settings; conflicts the number of box conflicts.
  function automatic int cell_by_cell_repair(input int rows, input int cols, input int max_log,
                                             input map_t defective,
                                             output prow_t prow, output lcfg_t lcfg,
                                             output int conflicts);
    map_t unusable, taken, box_set;
    int   nlog;
    int   rowsel [MAXC];
    bit   ok;
    nlog = 0;
    conflicts = 0;
    for (int r = 0; r < MAXR; r++)
      for (int c = 0; c < MAXC; c++) begin
        unusable[r][c] = defective[r][c];
        taken[r][c]    = 1'b0;
        box_set[r][c]  = 1'b0;
        prow[r][c]     = -1;
        lcfg[r][c]     = unused_cell();
      end
    for (int i = 0; i < rows && i < max_log; i++) begin
      ok = 1'b1;
      for (int j = 0; j < cols && ok; j++) begin
        int x = 0;
        while (x < rows && (unusable[x][j] || taken[x][j])) x++;
        if (x == rows) ok = 1'b0;
        else begin
          rowsel[j] = x;
          if (j > 0) begin
            int e = rowsel[j-1];
            if (e < x) for (int k = e + 1; k < x; k++) unusable[k][j-1] = 1'b1;
            if (e > x) for (int k = x + 1; k < e; k++) unusable[k][j] = 1'b1;
          end
        end
      end
      if (!ok) break;
      for (int j = 0; j < cols; j++) begin
        taken[rowsel[j]][j] = 1'b1;
        prow[i][j] = rowsel[j];
      end
      nlog++;
    end
    // Laser settings.
    for (int i = 0; i < nlog; i++)
      for (int j = 0; j < cols; j++) lcfg[prow[i][j]][j] = used_cell();
    for (int i = 0; i < nlog; i++) begin
      for (int j = 0; j < cols; j++) begin
        int e = prow[i][j];
        int f = (j + 1 < cols) ? prow[i][j+1] : e;
        if (e == f) set_box(lcfg, box_set, conflicts, e, j, LSW_STRAIGHT);
        else if (e < f) begin
          set_box(lcfg, box_set, conflicts, e, j, LSW_DOWNWARD);
          for (int k = e + 1; k < f; k++) set_box(lcfg, box_set, conflicts, k, j, LSW_STRAIGHT_DOWN);
          set_box(lcfg, box_set, conflicts, f, j, LSW_DOWNWARD);
        end else begin
          set_box(lcfg, box_set, conflicts, e, j, LSW_UPWARD);
          for (int k = f + 1; k < e; k++) set_box(lcfg, box_set, conflicts, k, j, LSW_STRAIGHT_DOWN);
          set_box(lcfg, box_set, conflicts, f, j, LSW_UPWARD);
        end
      end
    end
    return nlog;
  endfunction

  function automatic void set_box(inout lcfg_t lcfg, inout map_t box_set, inout int conflicts,
                                  input int r, input int c, input lsw_cfg_e v);
    if (box_set[r][c] && lcfg[r][c].lsw != v) conflicts++;
    lcfg[r][c].lsw = v;
    box_set[r][c]  = 1'b1;
  endfunction

endpackage
