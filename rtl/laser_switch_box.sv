`timescale 1ns/1ps
// laser_switch_box: the laser switches where a cell's horizontal channel meets the
// vertical restructuring bus on the cell's east side.
//
// One laser switch per channel line. Made of laser links and cuts only, a switch is
// set once, after the array is tested, to one of four patterns (lsw_cfg_e):
// straight (W-E, as fabricated), downward (W-S and N-E), upward (W-N and S-E) or
// straight down (N-S, W and E cut). With these the horizontal channel of a row can
// continue one or more rows lower or higher in the next column, which is how a
// defective cell is replaced by the cell below it (cell-by-cell substitution with
// straight columns and shifted rows). All the switches of one box take the same
// pattern. This follows the document.
//
// N and S are the bus segments to the laser switch boxes of the cells above and
// below in the same column. Each line is a pair of directed wires (see
// routing_switch); a side with no connection outputs 0.
// Timing: combinational, no active devices.
module laser_switch_box
  import wsfpga_pkg::*;
#(
  parameter int unsigned L = 10  // lines per channel
) (
  input  lsw_cfg_e       cfg,
  input  logic [L-1:0]   w_in,   // from the cell's switch box, travelling east
  output logic [L-1:0]   w_out,  // towards the cell's switch box
  input  logic [L-1:0]   e_in,   // from the next column, travelling west
  output logic [L-1:0]   e_out,  // towards the next column
  input  logic [L-1:0]   n_in,   // bus segment from the row above, travelling down
  output logic [L-1:0]   n_out,  // bus segment towards the row above
  input  logic [L-1:0]   s_in,   // bus segment from the row below, travelling up
  output logic [L-1:0]   s_out   // bus segment towards the row below
);

  always_comb begin
    w_out = '0;
    e_out = '0;
    n_out = '0;
    s_out = '0;
    unique case (cfg)
      LSW_STRAIGHT: begin
        e_out = w_in;
        w_out = e_in;
      end
      LSW_DOWNWARD: begin
        s_out = w_in;
        w_out = s_in;
        e_out = n_in;
        n_out = e_in;
      end
      LSW_UPWARD: begin
        n_out = w_in;
        w_out = n_in;
        e_out = s_in;
        s_out = e_in;
      end
      LSW_STRAIGHT_DOWN: begin
        s_out = n_in;
        n_out = s_in;
      end
    endcase
  end

endmodule
