`timescale 1ns/1ps
// line_redundancy_tb: channel segments of 10 lines, one with a single extra line and
// one with two extra lines serving alternate lines.
//  1. Directed: line 3 is open. Without repair, a value driven at its west end must
//     reach neither the east end nor the tap. With both end links and the tap link
//     made, it must reach both, and the tap must reach both ends. Neighbouring lines
//     must be unaffected.
//  2. Random: random open lines, links and drivers, compared with a reference that
//     builds the connection graph (ends, taps and extra lines as nodes) and floods it.
// Timing: combinational, read 1 ns after each change. The extra line with laser links
// at both ends and on the taps follows the document; the point model (end, tap, end)
// is this design's own.
module line_redundancy_tb;
  localparam int NL = 10;
  logic [NL-1:0] w_in, w_out, e_in, e_out, tap_drv, tap_in, defect, link_end, link_tap;
  logic [NL-1:0] w_out2, e_out2, tap_in2;
  int checks = 0, failures = 0;
  int n_repaired = 0, n_broken = 0;

  line_redundancy #(.NL(NL), .NX(1)) dut1 (.*);
  line_redundancy #(.NL(NL), .NX(2)) dut2 (
    .w_in, .w_out(w_out2), .e_in, .e_out(e_out2), .tap_drv, .tap_in(tap_in2),
    .defect, .link_end, .link_tap
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Reference: nodes 0..3*NL-1 are line points (west end, tap, east end), then the
  // extra lines. Flood from each node over the edges the configuration makes.
  task automatic reference(input int nx, output logic [NL-1:0] w_o, output logic [NL-1:0] t_o,
                           output logic [NL-1:0] e_o);
    int n = 3 * NL + nx;
    bit adj [3*NL+2][3*NL+2];
    bit drv [3*NL+2];
    bit seen [3*NL+2];
    bit r [3*NL];
    for (int a = 0; a < n; a++) begin
      drv[a] = 0;
      for (int b = 0; b < n; b++) adj[a][b] = 0;
    end
    for (int k = 0; k < NL; k++) begin
      int xn = 3 * NL + k % nx;
      drv[3*k] = w_in[k]; drv[3*k+1] = tap_drv[k]; drv[3*k+2] = e_in[k];
      if (!defect[k]) begin
        adj[3*k][3*k+1] = 1; adj[3*k+1][3*k] = 1;
        adj[3*k+1][3*k+2] = 1; adj[3*k+2][3*k+1] = 1;
      end
      if (link_end[k]) begin
        adj[3*k][xn] = 1; adj[xn][3*k] = 1;
        adj[3*k+2][xn] = 1; adj[xn][3*k+2] = 1;
      end
      if (link_tap[k]) begin
        adj[3*k+1][xn] = 1; adj[xn][3*k+1] = 1;
      end
    end
    for (int s = 0; s < 3 * NL; s++) begin
      bit changed = 1;
      for (int a = 0; a < n; a++) seen[a] = (a == s);
      while (changed) begin
        changed = 0;
        for (int a = 0; a < n; a++)
          if (seen[a])
            for (int b = 0; b < n; b++)
              if (adj[a][b] && !seen[b]) begin
                seen[b] = 1;
                changed = 1;
              end
      end
      r[s] = 0;
      for (int a = 0; a < 3 * NL; a++) if (a != s && seen[a] && drv[a]) r[s] = 1;
    end
    for (int k = 0; k < NL; k++) begin
      w_o[k] = r[3*k]; t_o[k] = r[3*k+1]; e_o[k] = r[3*k+2];
    end
  endtask

  initial begin
    logic [NL-1:0] rw, rt, re;
    // ---- 1. directed ----
    w_in = '0; e_in = '0; tap_drv = '0;
    defect = '0; link_end = '0; link_tap = '0;
    defect[3] = 1'b1;
    w_in[3] = 1'b1;
    w_in[2] = 1'b1;
    #1;
    check(e_out[3] == 1'b0 && tap_in[3] == 1'b0, "open line still carries its signal");
    check(e_out[2] == 1'b1 && tap_in[2] == 1'b1, "good neighbour line broken");
    n_broken++;
    link_end[3] = 1'b1;
    link_tap[3] = 1'b1;
    #1;
    check(e_out[3] == 1'b1 && tap_in[3] == 1'b1, "extra line does not replace line 3");
    check(e_out2[3] == 1'b1 && tap_in2[3] == 1'b1, "extra line 1 of 2 does not replace line 3");
    check(e_out[2] == 1'b1 && e_out[4] == 1'b0, "repair disturbs other lines");
    w_in = '0;
    tap_drv[3] = 1'b1;
    #1;
    check(w_out[3] == 1'b1 && e_out[3] == 1'b1, "tap does not reach both ends through the extra line");
    check(tap_in[3] == 1'b0, "tap reads its own drive back");
    n_repaired++;
    // ---- 2. random ----
    for (int t = 0; t < 400; t++) begin
      w_in = NL'($urandom); e_in = NL'($urandom); tap_drv = NL'($urandom);
      for (int k = 0; k < NL; k++) begin
        w_in[k] &= ($urandom % 3) == 0;
        e_in[k] &= ($urandom % 3) == 0;
        tap_drv[k] &= ($urandom % 3) == 0;
        defect[k] = ($urandom % 5) == 0;
        link_end[k] = defect[k] ? ($urandom % 2) == 0 : ($urandom % 12) == 0;
        link_tap[k] = defect[k] ? ($urandom % 2) == 0 : ($urandom % 12) == 0;
      end
      #1;
      reference(1, rw, rt, re);
      check(w_out == rw && tap_in == rt && e_out == re, $sformatf("one extra line, case %0d", t));
      reference(2, rw, rt, re);
      check(w_out2 == rw && tap_in2 == rt && e_out2 == re, $sformatf("two extra lines, case %0d", t));
      if (|(defect & link_end)) n_repaired++;
    end
    check(n_repaired > 0 && n_broken > 0, "repair never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
