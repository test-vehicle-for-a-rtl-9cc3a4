`timescale 1ns/1ps
// wsfpga_test_vehicle: the two test-vehicle chips of the restructurable wafer-scale
// FPGA, side by side.
//
// Both chips carry the same defect-avoidance structures: testable power links,
// routing switches with laser pass transistors, double-length line uncrossing, laser
// switch boxes on a vertical restructuring bus between columns, and a bypassable
// configuration shift register per column.
//  * The large chip: one row of 12 large cells. A large cell has a 3-input look-up
//    table, a D flip-flop, an EN pin, and channels of 6 single-length and 4
//    double-length lines (plus 2 clock lines); each pin can reach 6 lines. Being a
//    single row, it is repaired by column substitution.
//  * The small chip: a 2 x 5 array of small cells, each with a 2-input look-up table,
//    no EN pin, and 2 single-length and 2 double-length lines; it is the chip on which
//    cell-by-cell substitution can be exercised.
// The array sizes and cell contents follow the document. That the small chip has no
// EN pin, that its pins reach all 4 lines, and that both chips' clock lines are the
// global clk_a / clk_b are this design's choices. Ports of the large chip start with
// l_, those of the small chip with s_; their meaning is that of wsfpga_array.
//
// Beside the two chips stands one channel segment of the large cell's 10 lines with
// a spare line (line_redundancy, ports r_). The fabricated chips have no spare
// lines; the segment shows the line-substitution scheme on its own, and it shares no
// signal with the chips.
module wsfpga_test_vehicle
  import wsfpga_pkg::*;
#(
  parameter int unsigned L_COLS = 12,  // large chip: cells in its row
  parameter int unsigned S_ROWS = 2,   // small chip: rows
  parameter int unsigned S_COLS = 5,   // small chip: columns
  parameter int unsigned R_NX   = 1,   // spare-line segment: extra lines
  localparam int unsigned L_ROWS = 1,
  localparam int unsigned LL    = 10,  // large chip: 6 single + 4 double lines
  localparam int unsigned SL    = 4    // small chip: 2 single + 2 double lines
) (
  // ---------------- large chip ----------------
  input  logic          l_clk1,
  input  logic          l_clk2,
  input  logic          l_sin        [L_COLS],
  output logic          l_sout       [L_COLS],
  input  logic          l_clk_a,
  input  logic          l_clk_b,
  input  logic          l_power_test [L_ROWS][L_COLS],
  input  laser_cfg_t    l_lcfg       [L_ROWS][L_COLS],
  output logic          l_powered    [L_ROWS][L_COLS],
  output int unsigned   l_supply_ua,
  input  logic [LL-1:0] l_w_in       [L_ROWS],
  output logic [LL-1:0] l_w_out      [L_ROWS],
  input  logic [LL-1:0] l_e_in       [L_ROWS],
  output logic [LL-1:0] l_e_out      [L_ROWS],
  input  logic [LL-1:0] l_n_in       [L_COLS],
  output logic [LL-1:0] l_n_out      [L_COLS],
  input  logic [LL-1:0] l_s_in       [L_COLS],
  output logic [LL-1:0] l_s_out      [L_COLS],
  input  logic [LL-1:0] l_bn_in      [L_COLS],
  output logic [LL-1:0] l_bn_out     [L_COLS],
  input  logic [LL-1:0] l_bs_in      [L_COLS],
  output logic [LL-1:0] l_bs_out     [L_COLS],
  // ---------------- small chip ----------------
  input  logic          s_clk1,
  input  logic          s_clk2,
  input  logic          s_sin        [S_COLS],
  output logic          s_sout       [S_COLS],
  input  logic          s_clk_a,
  input  logic          s_clk_b,
  input  logic          s_power_test [S_ROWS][S_COLS],
  input  laser_cfg_t    s_lcfg       [S_ROWS][S_COLS],
  output logic          s_powered    [S_ROWS][S_COLS],
  output int unsigned   s_supply_ua,
  input  logic [SL-1:0] s_w_in       [S_ROWS],
  output logic [SL-1:0] s_w_out      [S_ROWS],
  input  logic [SL-1:0] s_e_in       [S_ROWS],
  output logic [SL-1:0] s_e_out      [S_ROWS],
  input  logic [SL-1:0] s_n_in       [S_COLS],
  output logic [SL-1:0] s_n_out      [S_COLS],
  input  logic [SL-1:0] s_s_in       [S_COLS],
  output logic [SL-1:0] s_s_out      [S_COLS],
  input  logic [SL-1:0] s_bn_in      [S_COLS],
  output logic [SL-1:0] s_bn_out     [S_COLS],
  input  logic [SL-1:0] s_bs_in      [S_COLS],
  output logic [SL-1:0] s_bs_out     [S_COLS],
  // ---------------- channel segment with spare lines ----------------
  input  logic [LL-1:0] r_w_in,
  output logic [LL-1:0] r_w_out,
  input  logic [LL-1:0] r_e_in,
  output logic [LL-1:0] r_e_out,
  input  logic [LL-1:0] r_tap_drv,
  output logic [LL-1:0] r_tap_in,
  input  logic [LL-1:0] r_defect,
  input  logic [LL-1:0] r_link_end,
  input  logic [LL-1:0] r_link_tap
);

  wsfpga_array #(
    .ROWS(L_ROWS), .COLS(L_COLS), .K(3), .HAS_EN(1'b1), .NS(6), .ND(4), .CBL(6)
  ) u_large (
    .clk1 (l_clk1), .clk2 (l_clk2), .sin (l_sin), .sout (l_sout),
    .clk_a (l_clk_a), .clk_b (l_clk_b),
    .power_test (l_power_test), .lcfg (l_lcfg), .powered (l_powered),
    .supply_ua (l_supply_ua),
    .w_in (l_w_in), .w_out (l_w_out), .e_in (l_e_in), .e_out (l_e_out),
    .n_in (l_n_in), .n_out (l_n_out), .s_in (l_s_in), .s_out (l_s_out),
    .bn_in (l_bn_in), .bn_out (l_bn_out), .bs_in (l_bs_in), .bs_out (l_bs_out)
  );

  wsfpga_array #(
    .ROWS(S_ROWS), .COLS(S_COLS), .K(2), .HAS_EN(1'b0), .NS(2), .ND(2), .CBL(4)
  ) u_small (
    .clk1 (s_clk1), .clk2 (s_clk2), .sin (s_sin), .sout (s_sout),
    .clk_a (s_clk_a), .clk_b (s_clk_b),
    .power_test (s_power_test), .lcfg (s_lcfg), .powered (s_powered),
    .supply_ua (s_supply_ua),
    .w_in (s_w_in), .w_out (s_w_out), .e_in (s_e_in), .e_out (s_e_out),
    .n_in (s_n_in), .n_out (s_n_out), .s_in (s_s_in), .s_out (s_s_out),
    .bn_in (s_bn_in), .bn_out (s_bn_out), .bs_in (s_bs_in), .bs_out (s_bs_out)
  );

  line_redundancy #(.NL(LL), .NX(R_NX)) u_spare (
    .w_in (r_w_in), .w_out (r_w_out), .e_in (r_e_in), .e_out (r_e_out),
    .tap_drv (r_tap_drv), .tap_in (r_tap_in),
    .defect (r_defect), .link_end (r_link_end), .link_tap (r_link_tap)
  );

endmodule
