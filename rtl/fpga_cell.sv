`timescale 1ns/1ps
// fpga_cell: one tile of the restructurable FPGA.
//
// A tile holds, from west to east: the logic block with its connection box on the
// horizontal channel, the switch box where the horizontal and vertical routing
// channels cross, and the laser switch box on the vertical restructuring bus that
// runs between this column and the next. It also holds the tile's configuration
// shift register (with its bypass link) and the testable power link. All of this is
// the document's tile; how the parts are laid out inside it is reconstructed from the
// document's drawings of a block with its switches.
//
// Channel segments: the horizontal channel segment west of the switch box is shared
// by the connection box, by whatever arrives from the west (the previous column's
// laser switch box) and by the switch box's west port. The connection box reaches the
// last CBL lines of that segment, L-CBL..L-1 (in the large cell the single lines 4
// and 5 and the four double lines, so that pins reach both kinds of line). The vertical channel passes the switch box
// only (no pin reaches it), and the two clock lines of the channel are the global
// clk_a / clk_b, one of which a configuration bit picks for the flip-flop; these three
// points are this design's choices.
//
// Power: an unpowered cell (power link neither zapped nor tested) has all its
// transistor gates off, so only its laser links conduct; it cannot shift, and breaks
// the column's chain unless its register is bypassed.
//
// Every channel line is a pair of directed wires (see routing_switch). This makes the
// array structurally cyclic (a signal may go west through one port and come back
// east through another), so lint tools report combinational loops through these
// wires; a configuration whose nets are trees, as a routed design's are, has no
// actual loop.
//
// Timing: configuration shifts on clk1/clk2 (see sr_bit); the flip-flop on the
// selected clock line's rising edge; all routing is combinational.
module fpga_cell
  import wsfpga_pkg::*;
#(
  parameter int unsigned K      = 3,     // look-up table inputs
  parameter bit          HAS_EN = 1'b1,  // logic block has an EN pin
  parameter int unsigned NS     = 6,     // single-length lines per channel
  parameter int unsigned ND     = 4,     // double-length lines per channel
  parameter int unsigned CBL    = 6,     // channel lines each pin can reach
  localparam int unsigned L     = NS + ND,
  localparam int unsigned NCFG  = cfg_bits(K, HAS_EN, CBL, NS, ND)
) (
  // configuration shift register
  input  logic        clk1,
  input  logic        clk2,
  input  logic        sin,
  output logic        sout,
  // clock lines
  input  logic        clk_a,
  input  logic        clk_b,
  // power and laser restructuring
  input  logic        power_test,   // gate of the testable power link's transistor
  input  laser_cfg_t  lcfg,
  output logic        powered,
  output int unsigned supply_ua,    // supply current through the power link
  // horizontal channel, west side (segment under the logic block)
  input  logic [L-1:0] h_w_in,
  output logic [L-1:0] h_w_out,
  // horizontal channel, east side (beyond the laser switch box)
  input  logic [L-1:0] h_e_in,
  output logic [L-1:0] h_e_out,
  // vertical routing channel
  input  logic [L-1:0] v_n_in,
  output logic [L-1:0] v_n_out,
  input  logic [L-1:0] v_s_in,
  output logic [L-1:0] v_s_out,
  // vertical restructuring bus
  input  logic [L-1:0] bus_n_in,
  output logic [L-1:0] bus_n_out,
  input  logic [L-1:0] bus_s_in,
  output logic [L-1:0] bus_s_out
);

  localparam int unsigned NPIN = cb_pins(K, HAS_EN);
  localparam int unsigned NIN  = NPIN - 1;
  localparam int unsigned NSW  = num_switches(NS, ND);

  logic [NCFG-1:0] cfg_raw, cfg;

  testable_power_link u_pwr (
    .link_zapped (lcfg.power_link),
    .test_gate   (power_test),
    .cell_short  (1'b0),
    .powered     (powered),
    .current_ua  (supply_ua)
  );

  cell_config_sr #(.N(NCFG)) u_sr (
    .clk1    (clk1),
    .clk2    (clk2),
    .sin     (sin),
    .bypass  (lcfg.sr_bypass),
    .powered (powered),
    .sout    (sout),
    .cfg     (cfg_raw)
  );

  assign cfg = powered ? cfg_raw : '0;

  // ---- logic block and connection box ----
  logic [NIN-1:0] pin_in;
  logic           out_val, out_oe;
  logic [CBL-1:0] cb_drv;
  localparam int unsigned CB_LO = L - CBL;  // first line the connection box reaches
  logic [L-1:0]   seg_drv;     // connection box drive on the west segment
  logic [L-1:0]   sb_w_out;    // switch box output onto the west segment
  logic [L-1:CB_LO] seg_val;   // resolved value of the segment lines the box reaches
  logic           cell_clk;
  logic           en_pin;

  always_comb begin
    seg_drv = '0;
    seg_drv[L-1:CB_LO] = cb_drv;
  end
  assign seg_val = h_w_in[L-1:CB_LO] | sb_w_out[L-1:CB_LO] | cb_drv;

  connection_box #(.NIN(NIN), .NL(CBL)) u_cb (
    .line_val    (seg_val),
    .pin_in      (pin_in),
    .pin_out_val (out_val),
    .pin_out_oe  (out_oe),
    .line_drv    (cb_drv),
    .gate        (cfg[cb_off(K, HAS_EN) +: NPIN*CBL])
  );

  assign cell_clk = cfg[clksel_off(K, HAS_EN)] ? clk_b : clk_a;
  assign en_pin   = HAS_EN ? pin_in[NIN-1] : 1'b1;

  logic en_sel;
  if (HAS_EN) begin : g_ensel
    assign en_sel = cfg[ensel_off(K)];
  end else begin : g_noensel
    assign en_sel = 1'b0;
  end

  logic_block #(.K(K), .HAS_EN(HAS_EN)) u_lb (
    .clk     (cell_clk),
    .lut_in  (pin_in[K-1:0]),
    .en_in   (en_pin),
    .lut_cfg (cfg[lut_off() +: 2**K]),
    .out_sel (cfg[outsel_off(K)]),
    .en_sel  (en_sel),
    .out_val (out_val),
    .out_oe  (out_oe)
  );

  // ---- switch box ----
  logic [L-1:0] sb_e_out, sb_e_in;

  switch_box #(.NS(NS), .ND(ND)) u_sb (
    .w_in      (h_w_in | seg_drv),
    .w_out     (sb_w_out),
    .e_in      (sb_e_in),
    .e_out     (sb_e_out),
    .n_in      (v_n_in),
    .n_out     (v_n_out),
    .s_in      (v_s_in),
    .s_out     (v_s_out),
    .gate      (cfg[sb_off(K, HAS_EN, CBL) +: NSW*SW_GATES]),
    .laser_ew  (lcfg.bypass_ew),
    .laser_ns  (lcfg.bypass_ns),
    .uncross_h (lcfg.uncross_h),
    .uncross_v (lcfg.uncross_v)
  );

  assign h_w_out = sb_w_out | seg_drv;

  // ---- laser switch box ----
  laser_switch_box #(.L(L)) u_lsb (
    .cfg   (lcfg.lsw),
    .w_in  (sb_e_out),
    .w_out (sb_e_in),
    .e_in  (h_e_in),
    .e_out (h_e_out),
    .n_in  (bus_n_in),
    .n_out (bus_n_out),
    .s_in  (bus_s_in),
    .s_out (bus_s_out)
  );

endmodule
