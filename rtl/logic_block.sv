`timescale 1ns/1ps
// logic_block: the logic of one FPGA cell.
//
// A K-input look-up table feeds a D flip-flop; a configuration bit selects whether
// the cell output comes from the table directly or through the flip-flop. The output
// passes a buffer with an enable: a second configuration bit chooses whether that
// buffer is always on or is controlled by the cell's EN input, so that several cells
// can share a routing line. In the large test-vehicle cell K = 3 with an EN pin; the
// small cell has K = 2 and no EN pin (HAS_EN = 0). All this follows the document.
// The table is a multiplexer tree that picks the configuration bit addressed by the
// inputs (lut_cfg[i] is the output for input value i); the polarity of the two
// select bits and the absence of a flip-flop reset are this design's choices.
//
// The tri-state output is modelled as a value and an enable (out_oe); the connection
// box only drives a line when both are 1.
//
// Timing: the table is combinational; the flip-flop loads on the rising edge of clk.
// The output (value and enable) follows T_OUT ns after its cause, the document's
// simulated logic-block delay. The delay does not change the logic, but it matters in
// simulation: a configuration, or a half-shifted one, in which a cell's output feeds
// its own inputs through the routing is a ring oscillator, and with the delay it
// oscillates in simulated time instead of stalling a zero-delay simulator. Synthesis
// ignores it.
module logic_block #(
  parameter int unsigned K      = 3,    // look-up table inputs
  parameter bit          HAS_EN = 1'b1, // cell has an EN pin
  parameter real         T_OUT  = 6.7   // output delay in ns (ignored by synthesis)
) (
  input  logic            clk,      // flip-flop clock (selected clock line)
  input  logic [K-1:0]    lut_in,   // look-up table inputs from the connection box
  input  logic            en_in,    // EN pin from the connection box
  input  logic [2**K-1:0] lut_cfg,  // look-up table contents
  input  logic            out_sel,  // 1: registered output
  input  logic            en_sel,   // 1: output buffer controlled by EN
  output logic            out_val,  // output value
  output logic            out_oe    // output buffer enabled
);

  logic lut_out;
  logic ff_q;

  assign lut_out = lut_cfg[lut_in];

  always_ff @(posedge clk) ff_q <= lut_out;

  assign #(T_OUT) out_val = out_sel ? ff_q : lut_out;
  assign #(T_OUT) out_oe  = (HAS_EN && en_sel) ? en_in : 1'b1;

endmodule
