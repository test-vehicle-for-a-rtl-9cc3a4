`timescale 1ns/1ps
// routing_switch: the reconfigurable routing switch at the crossing of one
// horizontal and one vertical channel line.
//
// Six pass transistors, one between each pair of the ports N, E, S and W, so a
// signal entering on one side can leave on any of the three others, each transistor
// gated by a configuration bit. In parallel with the E-W and N-S transistors sit
// laser pass transistors: zapped, they connect E-W or N-S permanently, which is how a
// defective cell is bypassed without the user's routing knowing about it. This
// follows the document.
//
// The bidirectional transistors are modelled, as a choice of this design, by a pair
// of directed wires per port: sig_in[d] is what arrives from side d, sig_out[d] what
// leaves towards side d. A port's output is the OR of the inputs of the other three
// ports whose connection to it is on; a port never echoes its own input, so a
// loop-free (tree-shaped) net configuration gives loop-free logic.
//
// Ports are indexed DIR_N, DIR_E, DIR_S, DIR_W; gates SW_NE..SW_SW (wsfpga_pkg).
// Timing: combinational.
module routing_switch
  import wsfpga_pkg::*;
(
  input  logic [3:0]          sig_in,    // arriving from N, E, S, W
  output logic [3:0]          sig_out,   // leaving towards N, E, S, W
  input  logic [SW_GATES-1:0] gate,      // pass transistor gates
  input  logic                laser_ew,  // E-W laser pass transistor zapped
  input  logic                laser_ns   // N-S laser pass transistor zapped
);

  logic [SW_GATES-1:0] conn;

  always_comb begin
    conn         = gate;
    conn[SW_EW]  = gate[SW_EW] | laser_ew;
    conn[SW_NS]  = gate[SW_NS] | laser_ns;
    sig_out[DIR_N] = (sig_in[DIR_E] & conn[SW_NE]) | (sig_in[DIR_S] & conn[SW_NS])
                   | (sig_in[DIR_W] & conn[SW_NW]);
    sig_out[DIR_E] = (sig_in[DIR_N] & conn[SW_NE]) | (sig_in[DIR_S] & conn[SW_ES])
                   | (sig_in[DIR_W] & conn[SW_EW]);
    sig_out[DIR_S] = (sig_in[DIR_N] & conn[SW_NS]) | (sig_in[DIR_E] & conn[SW_ES])
                   | (sig_in[DIR_W] & conn[SW_SW]);
    sig_out[DIR_W] = (sig_in[DIR_N] & conn[SW_NW]) | (sig_in[DIR_E] & conn[SW_EW])
                   | (sig_in[DIR_S] & conn[SW_SW]);
  end

endmodule
