`timescale 1ns/1ps
// wsfpga_array: a ROWS x COLS array of restructurable FPGA cells.
//
// The array is a symmetrical FPGA (logic blocks surrounded by horizontal and
// vertical routing channels) with a vertical restructuring bus between each pair of
// columns. After testing, defects are avoided permanently with laser links and cuts,
// so that the user sees a smaller but fault-free logical array:
//  * cell-by-cell substitution: columns stay straight; in a column, the logical rows
//    skip defective cells (and the pseudo-faults the repair algorithm adds), and the
//    laser switch boxes on the restructuring bus carry each logical row's horizontal
//    channel up or down to the row it continues on in the next column;
//  * column (or row) substitution: a whole column is removed by zapping the E-W laser
//    pass transistors of its switches and uncrossing its double lines, so the
//    channels pass straight through it;
//  * the configuration shift register of each column runs top to bottom and skips
//    every cell whose bypass link is zapped, so the bit stream written for the
//    logical array does not depend on where the defects were.
// All three mechanisms follow the document. How the laser settings are chosen (the
// repair algorithm) is software, outside this hardware; lcfg holds its result.
//
// Edges: every channel and bus line that leaves the array is a port (pads). West and
// east ports are per physical row, north and south ports per column.
// Configuration: column c shifts in on sin[c] and out on sout[c], one bit per
// clk1/clk2 pulse pair; the bit shifted first ends in the lowest active cell's last
// bit. Timing: as fpga_cell; all routing is combinational.
//
// Each channel line is a pair of directed wires (see routing_switch), so the array
// is structurally cyclic and lint tools report combinational loops through the
// routing; a configuration whose nets are trees has no actual loop. The same report
// names the shift-chain array `chain`: the linter treats the whole array as one
// signal, and a bypassed cell passes sin to sout combinationally, but no chain bit
// feeds an earlier one.
module wsfpga_array
  import wsfpga_pkg::*;
#(
  parameter int unsigned ROWS   = 2,     // physical rows
  parameter int unsigned COLS   = 5,     // physical columns
  parameter int unsigned K      = 2,     // look-up table inputs
  parameter bit          HAS_EN = 1'b0,  // logic block has an EN pin
  parameter int unsigned NS     = 2,     // single-length lines per channel
  parameter int unsigned ND     = 2,     // double-length lines per channel
  parameter int unsigned CBL    = 4,     // channel lines each pin can reach
  localparam int unsigned L     = NS + ND
) (
  input  logic         clk1,
  input  logic         clk2,
  input  logic         sin  [COLS],
  output logic         sout [COLS],
  input  logic         clk_a,
  input  logic         clk_b,
  input  logic         power_test [ROWS][COLS],
  input  laser_cfg_t   lcfg       [ROWS][COLS],
  output logic         powered    [ROWS][COLS],
  output int unsigned  supply_ua,
  // west and east edges, per physical row
  input  logic [L-1:0] w_in   [ROWS],
  output logic [L-1:0] w_out  [ROWS],
  input  logic [L-1:0] e_in   [ROWS],
  output logic [L-1:0] e_out  [ROWS],
  // north and south edges of the vertical routing channels, per column
  input  logic [L-1:0] n_in   [COLS],
  output logic [L-1:0] n_out  [COLS],
  input  logic [L-1:0] s_in   [COLS],
  output logic [L-1:0] s_out  [COLS],
  // ends of the restructuring buses, per column
  input  logic [L-1:0] bn_in  [COLS],
  output logic [L-1:0] bn_out [COLS],
  input  logic [L-1:0] bs_in  [COLS],
  output logic [L-1:0] bs_out [COLS]
);

  // Horizontal wires: h_e[r][c] travels east into column c (c = COLS leaves the
  // array), h_w[r][c] travels west out of column c.
  logic [L-1:0] h_e   [ROWS][COLS+1];
  logic [L-1:0] h_w   [ROWS][COLS+1];
  // Vertical routing wires: v_d[r][c] travels down into row r, v_u[r][c] up out of row r.
  logic [L-1:0] v_d   [ROWS+1][COLS];
  logic [L-1:0] v_u   [ROWS+1][COLS];
  // Restructuring bus wires, same convention.
  logic [L-1:0] b_d   [ROWS+1][COLS];
  logic [L-1:0] b_u   [ROWS+1][COLS];
  // Shift chains.
  logic         chain [ROWS+1][COLS];
  int unsigned  cell_ua [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_edge_row
    assign h_e[r][0]    = w_in[r];
    assign w_out[r]     = h_w[r][0];
    assign e_out[r]     = h_e[r][COLS];
    assign h_w[r][COLS] = e_in[r];
  end

  for (genvar c = 0; c < COLS; c++) begin : g_edge_col
    assign v_d[0][c]    = n_in[c];
    assign n_out[c]     = v_u[0][c];
    assign s_out[c]     = v_d[ROWS][c];
    assign v_u[ROWS][c] = s_in[c];
    assign b_d[0][c]    = bn_in[c];
    assign bn_out[c]    = b_u[0][c];
    assign bs_out[c]    = b_d[ROWS][c];
    assign b_u[ROWS][c] = bs_in[c];
    assign chain[0][c]  = sin[c];
    assign sout[c]      = chain[ROWS][c];
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      fpga_cell #(.K(K), .HAS_EN(HAS_EN), .NS(NS), .ND(ND), .CBL(CBL)) u_cell (
        .clk1       (clk1),
        .clk2       (clk2),
        .sin        (chain[r][c]),
        .sout       (chain[r+1][c]),
        .clk_a      (clk_a),
        .clk_b      (clk_b),
        .power_test (power_test[r][c]),
        .lcfg       (lcfg[r][c]),
        .powered    (powered[r][c]),
        .supply_ua  (cell_ua[r][c]),
        .h_w_in     (h_e[r][c]),
        .h_w_out    (h_w[r][c]),
        .h_e_in     (h_w[r][c+1]),
        .h_e_out    (h_e[r][c+1]),
        .v_n_in     (v_d[r][c]),
        .v_n_out    (v_u[r][c]),
        .v_s_in     (v_u[r+1][c]),
        .v_s_out    (v_d[r+1][c]),
        .bus_n_in   (b_d[r][c]),
        .bus_n_out  (b_u[r][c]),
        .bus_s_in   (b_u[r+1][c]),
        .bus_s_out  (b_d[r+1][c])
      );
    end
  end

  // Chip supply current: the sum over all cells' power links.
  always_comb begin
    supply_ua = 0;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        supply_ua += cell_ua[r][c];
      end
    end
  end

endmodule
