`timescale 1ns/1ps
// connection_box: connects the pins of a logic block to the lines of a routing channel.
//
// One pass transistor per (pin, line) pair, each gated by a configuration bit, so a
// pin can be connected to no line, one line or several lines. Input pins read the
// lines they are connected to; the output pin drives the lines it is connected to
// when its buffer is enabled. This follows the document.
//
// Two-state model of the pass transistors, a choice of this design: an input pin
// connected to no line reads 0 (the document's high impedance), an input pin
// connected to several lines reads their OR, and a driven line is modelled as the OR
// of all its drivers, which equals the line's value whenever one driver is active, as
// a legal configuration requires.
//
// Timing: combinational.
module connection_box #(
  parameter int unsigned NIN = 4,  // input pins (LUT inputs and EN)
  parameter int unsigned NL  = 6   // channel lines each pin can reach
) (
  input  logic [NL-1:0]          line_val,     // value on each reachable line
  output logic [NIN-1:0]         pin_in,       // values seen by the input pins
  input  logic                   pin_out_val,  // logic block output value
  input  logic                   pin_out_oe,   // logic block output enable
  output logic [NL-1:0]          line_drv,     // drive put on each line by the output pin
  input  logic [(NIN+1)*NL-1:0]  gate          // pass-transistor gates, pin-major
);

  always_comb begin
    for (int p = 0; p < NIN; p++) begin
      pin_in[p] = |(line_val & gate[p*NL +: NL]);
    end
    line_drv = gate[NIN*NL +: NL] & {NL{pin_out_val & pin_out_oe}};
  end

endmodule
