`timescale 1ns/1ps
// sr_bit: one bit of the static-RAM configuration shift register.
//
// Two latches in master-slave order, clocked by two non-overlapping phases: the
// master is transparent while clk1 is high, the slave while clk2 is high. A bit
// moves one stage per clk1 pulse followed by a clk2 pulse, and q holds it steady
// between pulses, so it can drive a configuration gate directly. In the cell each
// latch is a pair of minimum inverters with pass-transistor feedback; here it is a
// level-sensitive latch. The two latches and the non-overlapping phases follow the
// document; there is no reset, as in the document, since every bit is written by
// shifting.
//
// Timing: d is sampled at the falling edge of clk1 and appears on q while clk2 is
// high. clk1 and clk2 must never be high together.
//
// Lint note: when this bit sits in a chain, the linter reports the slave block as
// "no latches detected". The block does hold q while clk2 is low; synthesis infers
// a latch for it (two latches per bit), and the testbenches check that q holds.
module sr_bit (
  input  logic clk1,  // master phase
  input  logic clk2,  // slave phase, not overlapping clk1
  input  logic d,     // serial input from the previous bit
  output logic q      // stored bit, also the serial output
);

  logic master;

  always_latch begin
    if (clk1) master = d;
  end

  always_latch begin
    if (clk2) q = master;
  end


endmodule
