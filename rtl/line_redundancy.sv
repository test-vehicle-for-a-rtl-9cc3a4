`timescale 1ns/1ps
// line_redundancy: one routing-channel segment with spare lines that laser links
// can substitute for a defective line.
//
// Alongside the NL lines of the segment run NX extra lines. Extra line x serves the
// lines k with k % NX == x: one extra serves every line; two extras serve
// alternate lines. Each served line has two laser links to its extra line, one at
// each end of the segment. The tap where the cell connects to the line has a
// third link. To replace a defective line, the laser makes its two end links and
// the links of its taps. The extra line then carries the line's signal from end to
// end and to the cell. The defective line itself is left in place.
//
// A line is modelled as three points: its west end, its tap and its east end. A
// good line joins the three. An open (defective) line leaves them apart. A made
// laser link joins a point to its extra line. Each point is both a driver and a
// receiver. Every point reads the OR of the drivers of all the points it is joined
// to, except its own. This is the same directed-wire model as the routing switches,
// so the segment never echoes a value back to its source.
//
// Ports:
//   - w_in/w_out and e_in/e_out are the segment's two ends;
//   - tap_drv/tap_in is the cell's connection to each line;
//   - defect marks open lines. It is a fabrication fault, used for test;
//   - link_end and link_tap are the laser links.
//
// Timing: combinational.
//
// What follows the document:
//   - an extra line running in parallel with the channel;
//   - a laser link from it to every line it serves, at both ends;
//   - laser links on the cell's connections;
//   - one extra line, or dedicated extra lines shared among the lines.
//
// What is this design's own choice:
//   - one tap per line, standing for all the cell's connections to it;
//   - open defects that split a line at both sides of its tap;
//   - the alternating assignment of lines to extras.
//
// The fabricated test-vehicle chips have no spare lines. This segment stands beside
// them in the top.
module line_redundancy #(
  parameter int unsigned NL = 10,  // lines in the channel (6 single + 4 double)
  parameter int unsigned NX = 1    // extra lines
) (
  input  logic [NL-1:0] w_in,      // driven into the west end of each line
  output logic [NL-1:0] w_out,     // read at the west end of each line
  input  logic [NL-1:0] e_in,      // driven into the east end of each line
  output logic [NL-1:0] e_out,     // read at the east end of each line
  input  logic [NL-1:0] tap_drv,   // driven by the cell onto each line
  output logic [NL-1:0] tap_in,    // read by the cell from each line
  input  logic [NL-1:0] defect,    // line open inside the segment (fault model)
  input  logic [NL-1:0] link_end,  // laser links at both ends to the extra line made
  input  logic [NL-1:0] link_tap   // laser link from the tap to the extra line made
);

  // Points: 3*k is the west end of line k, 3*k+1 its tap, 3*k+2 its east end.
  localparam int unsigned NP = 3 * NL;

  logic [NP-1:0] drv;
  int unsigned   net [NP];  // net of each point
  logic [NP-1:0] rd;

  always_comb begin
    for (int unsigned k = 0; k < NL; k++) begin
      drv[3*k]     = w_in[k];
      drv[3*k + 1] = tap_drv[k];
      drv[3*k + 2] = e_in[k];
    end
    // A point on an extra line is on net NP + x. Otherwise a good line's points
    // share the net of its west end, and an open line's points are each alone.
    for (int unsigned k = 0; k < NL; k++) begin
      int unsigned x;
      logic on_extra;
      x = NP + k % NX;
      on_extra = link_end[k] | (!defect[k] & link_tap[k]);
      for (int unsigned p = 0; p < 3; p++) begin
        net[3*k + p] = defect[k] ? 3*k + p : 3*k;
      end
      if (defect[k]) begin
        if (link_end[k]) begin
          net[3*k]     = x;
          net[3*k + 2] = x;
        end
        if (link_tap[k]) net[3*k + 1] = x;
      end else if (on_extra) begin
        for (int unsigned p = 0; p < 3; p++) net[3*k + p] = x;
      end
    end
    for (int unsigned i = 0; i < NP; i++) begin
      rd[i] = 1'b0;
      for (int unsigned j = 0; j < NP; j++) begin
        if (j != i && net[j] == net[i] && drv[j]) rd[i] = 1'b1;
      end
    end
    for (int unsigned k = 0; k < NL; k++) begin
      w_out[k]  = rd[3*k];
      tap_in[k] = rd[3*k + 1];
      e_out[k]  = rd[3*k + 2];
    end
  end

endmodule
