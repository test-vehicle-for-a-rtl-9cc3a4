`timescale 1ns/1ps
// testable_power_link: behavioural model of the testable laser link that connects a
// cell to the power rail.
//
// The device is a laser link with a small transistor across it: turning the
// transistor on connects the cell as zapping the link would, so each cell can be
// powered and its supply current checked for shorts before anything is zapped; a
// good cell is then zapped permanently (link_zapped) and a bad one never is. It is
// an analog, process-specific part; this model keeps only its logic meaning, "the
// cell is powered", and a supply-current figure that a tester would see. Following
// the document, a powered cell draws about the same increment of current.
// The current value is this model's own number.
//
// Timing: combinational; the cell is powered as soon as either path turns on.
module testable_power_link #(
  parameter int unsigned CELL_CURRENT_UA = 1000  // supply increment of a good powered cell
) (
  input  logic        link_zapped,  // laser link made
  input  logic        test_gate,    // test transistor gate driven high
  input  logic        cell_short,   // the cell has a power short (defect, for test only)
  output logic        powered,      // cell connected to the supply
  output int unsigned current_ua    // supply current drawn through this link
);

  assign powered = link_zapped | test_gate;

  always_comb begin
    if (!powered)        current_ua = 0;
    else if (cell_short) current_ua = 100 * CELL_CURRENT_UA;
    else                 current_ua = CELL_CURRENT_UA;
  end

endmodule
