`timescale 1ns/1ps
// switch_box: the switch matrix of one cell, where its horizontal and vertical
// routing channels cross.
//
// Lines 0..NS-1 are single-length lines: each has a routing switch in every cell.
// Lines NS..NS+ND-1 are double-length lines in pairs (a = NS+2j, b = a+1): only the
// line in position a meets a switch, and the pair crosses inside the cell (a leaves
// in position b and b in position a), so any one physical line meets a switch in
// every other cell while every cell is laid out the same. The large test-vehicle
// cell has 6 single and 4 double lines, hence 6 + 2 = 8 switches. When a column (or,
// vertically, a row) of cells is bypassed, the crossing in the bypassed cell would
// turn its neighbours' double lines into a single-length and a triple-length line;
// two laser links and two cuts per pair undo the crossing (uncross_h horizontally,
// uncross_v vertically), so double lines keep their length across the repair. This
// follows the document. The two clock lines of each channel do not pass through the
// switches and are not modelled here.
//
// Each channel line is a pair of directed wires (see routing_switch): w_in arrives
// from the west and travels east, w_out leaves towards the west, and so on.
// Switch s uses gate[s*6 +: 6]; switch NS+j serves double pair j.
// Timing: combinational.
module switch_box
  import wsfpga_pkg::*;
#(
  parameter int unsigned NS = 6,  // single-length lines per channel
  parameter int unsigned ND = 4,  // double-length lines per channel (even)
  localparam int unsigned L   = NS + ND,
  localparam int unsigned NSW = NS + ND / 2
) (
  input  logic [L-1:0]            w_in,
  output logic [L-1:0]            w_out,
  input  logic [L-1:0]            e_in,
  output logic [L-1:0]            e_out,
  input  logic [L-1:0]            n_in,
  output logic [L-1:0]            n_out,
  input  logic [L-1:0]            s_in,
  output logic [L-1:0]            s_out,
  input  logic [NSW*SW_GATES-1:0] gate,       // routing switch gates
  input  logic                    laser_ew,   // every E-W laser pass transistor zapped
  input  logic                    laser_ns,   // every N-S laser pass transistor zapped
  input  logic                    uncross_h,  // horizontal double lines uncrossed
  input  logic                    uncross_v   // vertical double lines uncrossed
);

  for (genvar i = 0; i < NS; i++) begin : g_single
    logic [3:0] sw_in, sw_out;
    assign sw_in[DIR_N] = n_in[i];
    assign sw_in[DIR_E] = e_in[i];
    assign sw_in[DIR_S] = s_in[i];
    assign sw_in[DIR_W] = w_in[i];
    assign n_out[i] = sw_out[DIR_N];
    assign e_out[i] = sw_out[DIR_E];
    assign s_out[i] = sw_out[DIR_S];
    assign w_out[i] = sw_out[DIR_W];
    routing_switch u_sw (
      .sig_in   (sw_in),
      .sig_out  (sw_out),
      .gate     (gate[i*SW_GATES +: SW_GATES]),
      .laser_ew (laser_ew),
      .laser_ns (laser_ns)
    );
  end

  for (genvar j = 0; j < ND / 2; j++) begin : g_double
    localparam int unsigned A = NS + 2 * j;
    localparam int unsigned B = A + 1;
    logic [3:0] sw_in, sw_out;
    // West and north sides: position a meets the switch.
    assign sw_in[DIR_W] = w_in[A];
    assign w_out[A]     = sw_out[DIR_W];
    assign sw_in[DIR_N] = n_in[A];
    assign n_out[A]     = sw_out[DIR_N];
    // East side: crossed, the switched line leaves in position b.
    assign sw_in[DIR_E] = uncross_h ? e_in[A] : e_in[B];
    assign e_out[A]     = uncross_h ? sw_out[DIR_E] : w_in[B];
    assign e_out[B]     = uncross_h ? w_in[B] : sw_out[DIR_E];
    assign w_out[B]     = uncross_h ? e_in[B] : e_in[A];
    // South side: crossed the same way.
    assign sw_in[DIR_S] = uncross_v ? s_in[A] : s_in[B];
    assign s_out[A]     = uncross_v ? sw_out[DIR_S] : n_in[B];
    assign s_out[B]     = uncross_v ? n_in[B] : sw_out[DIR_S];
    assign n_out[B]     = uncross_v ? s_in[B] : s_in[A];
    routing_switch u_sw (
      .sig_in   (sw_in),
      .sig_out  (sw_out),
      .gate     (gate[(NS+j)*SW_GATES +: SW_GATES]),
      .laser_ew (laser_ew),
      .laser_ns (laser_ns)
    );
  end

endmodule
