`timescale 1ns/1ps
// wsfpga_pkg: types and constants shared by the restructurable FPGA cell and array.
//
// The array is repaired after fabrication by laser links (permanent metal-to-metal
// connections) and laser cuts. Those permanent changes are not loaded through the
// configuration shift register; they are modelled as a static per-cell record,
// laser_cfg_t, that the array takes as an input. Everything the user programs
// (look-up table, multiplexer selects, connection box and routing switch gates) is
// a bit of the cell's configuration shift register; the bit layout is given by the
// offset functions below.
//
// Configuration bit layout of one cell, bit 0 being the bit nearest the serial input:
//   [LUT_OFF    +: 2**K]             look-up table contents, entry i for input value i
//   [OUTSEL_OFF]                      1: cell output from the D flip-flop, 0: straight from the LUT
//   [ENSEL_OFF] (only if HAS_EN)      1: output buffer enabled by the EN pin, 0: always enabled
//   [CLKSEL_OFF]                      0: flip-flop clocked by clock line A, 1: by clock line B
//   [CB_OFF + p*CBL + l]              connection box: pin p to channel line l
//                                     (pins 0..K-1 LUT inputs, then EN if HAS_EN, then OUT last)
//   [SB_OFF + s*6 + j]                routing switch s, pass transistor j (SW_* below)
// The document fixes the contents of the register (what each bit controls) but not
// this order, which is a choice of this design.
package wsfpga_pkg;

  // Compass directions of a routing switch's four ports.
  localparam int unsigned DIR_N = 0;
  localparam int unsigned DIR_E = 1;
  localparam int unsigned DIR_S = 2;
  localparam int unsigned DIR_W = 3;

  // The six pass transistors of a routing switch, one per pair of ports.
  localparam int unsigned SW_NE = 0;
  localparam int unsigned SW_NS = 1;
  localparam int unsigned SW_NW = 2;
  localparam int unsigned SW_ES = 3;
  localparam int unsigned SW_EW = 4;
  localparam int unsigned SW_SW = 5;
  localparam int unsigned SW_GATES = 6;

  // Laser switch of the vertical restructuring bus (one per channel line).
  //   STRAIGHT      W-E            (as fabricated)
  //   DOWNWARD      W-S and N-E    (the row on the left continues one row lower)
  //   UPWARD        W-N and S-E    (the row on the left continues one row higher)
  //   STRAIGHT_DOWN N-S            (the bus passes a row, W and E are cut)
  typedef enum logic [1:0] {
    LSW_STRAIGHT      = 2'd0,
    LSW_DOWNWARD      = 2'd1,
    LSW_UPWARD        = 2'd2,
    LSW_STRAIGHT_DOWN = 2'd3
  } lsw_cfg_e;

  // Permanent laser restructuring of one cell.
  typedef struct packed {
    logic     power_link;  // power laser link zapped: cell connected to the supply
    logic     sr_bypass;   // shift-register bypass link zapped and register input cut
    logic     bypass_ew;   // E-W laser pass transistors of every routing switch zapped
    logic     bypass_ns;   // N-S laser pass transistors of every routing switch zapped
    logic     uncross_h;   // horizontal double-length lines uncrossed in this cell
    logic     uncross_v;   // vertical double-length lines uncrossed in this cell
    lsw_cfg_e lsw;         // pattern of every laser switch in the laser switch box
  } laser_cfg_t;

  // Offsets into the configuration register of a cell.
  function automatic int unsigned lut_off();
    return 0;
  endfunction

  function automatic int unsigned outsel_off(int unsigned k);
    return 2 ** k;
  endfunction

  function automatic int unsigned ensel_off(int unsigned k);
    return 2 ** k + 1;
  endfunction

  function automatic int unsigned clksel_off(int unsigned k, bit has_en);
    return 2 ** k + 1 + (has_en ? 1 : 0);
  endfunction

  function automatic int unsigned cb_pins(int unsigned k, bit has_en);
    return k + (has_en ? 1 : 0) + 1;
  endfunction

  function automatic int unsigned cb_off(int unsigned k, bit has_en);
    return clksel_off(k, has_en) + 1;
  endfunction

  // Double-length lines come in pairs; only one line of a pair meets a switch in a cell.
  function automatic int unsigned num_switches(int unsigned ns, int unsigned nd);
    return ns + nd / 2;
  endfunction

  function automatic int unsigned sb_off(int unsigned k, bit has_en, int unsigned cbl);
    return cb_off(k, has_en) + cb_pins(k, has_en) * cbl;
  endfunction

  function automatic int unsigned cfg_bits(int unsigned k, bit has_en, int unsigned cbl,
                                           int unsigned ns, int unsigned nd);
    return sb_off(k, has_en, cbl) + num_switches(ns, nd) * SW_GATES;
  endfunction

endpackage
