`timescale 1ns/1ps
// cell_config_sr: the configuration shift register of one FPGA cell, with its
// laser bypass.
//
// N sr_bit stages in a chain; bit 0 is next to the serial input, so after N shift
// pulses the first bit shifted in sits in bit N-1. The chain of a whole column runs
// through every cell of the column. A cell found defective is taken out of the chain
// by zapping the bypass laser link and cutting the register's input and output
// (bypass = 1): sout then follows sin directly and the column's bit stream skips the
// cell, so the bit stream does not depend on where the defects are. An unpowered
// cell that is not bypassed breaks the chain (sout reads 0). The bypass link follows
// the document; the behaviour of an unpowered register is this design's choice.
//
// Timing: one bit per clk1/clk2 pulse pair, as sr_bit; cfg is valid after the last
// clk2 pulse. Bypass is a combinational path from sin to sout.
module cell_config_sr #(
  parameter int unsigned N = 89  // bits in the cell (the large test-vehicle cell)
) (
  input  logic         clk1,
  input  logic         clk2,
  input  logic         sin,      // serial input from the cell above
  input  logic         bypass,   // laser bypass link zapped, register cut out
  input  logic         powered,  // cell connected to the supply
  output logic         sout,     // serial output to the cell below
  output logic [N-1:0] cfg       // configuration bits
);

  logic [N:0] chain;

  assign chain[0] = sin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    sr_bit u_bit (
      .clk1 (clk1),
      .clk2 (clk2),
      .d    (chain[i]),
      .q    (chain[i+1])
    );
  end

  assign cfg  = chain[N:1];
  assign sout = bypass ? sin : (powered & chain[N]);

endmodule
