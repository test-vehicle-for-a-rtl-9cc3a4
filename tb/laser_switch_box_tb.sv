`timescale 1ns/1ps
// laser_switch_box_tb: for each of the four laser switch patterns, random data on
// all four sides; every output must carry the side the pattern connects it to
// (straight W-E; downward W-S and N-E; upward W-N and S-E; straight down N-S), and
// 0 where the pattern leaves it unconnected.
// Timing: purely combinational. The four patterns follow the document's laser switch
// configurations.
module laser_switch_box_tb;
  import wsfpga_pkg::*;
  localparam int L = 10;
  lsw_cfg_e cfg;
  logic [L-1:0] w_in, w_out, e_in, e_out, n_in, n_out, s_in, s_out;
  int checks = 0, failures = 0;

  laser_switch_box #(.L(L)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int p = 0; p < 4; p++) begin
      cfg = lsw_cfg_e'(p);
      for (int t = 0; t < 50; t++) begin
        w_in = L'($urandom); e_in = L'($urandom);
        n_in = L'($urandom); s_in = L'($urandom);
        #1;
        case (cfg)
          LSW_STRAIGHT: begin
            check(e_out == w_in && w_out == e_in, "straight: W-E");
            check(n_out == '0 && s_out == '0, "straight: bus isolated");
          end
          LSW_DOWNWARD: begin
            check(s_out == w_in && w_out == s_in, "downward: W-S");
            check(e_out == n_in && n_out == e_in, "downward: N-E");
          end
          LSW_UPWARD: begin
            check(n_out == w_in && w_out == n_in, "upward: W-N");
            check(e_out == s_in && s_out == e_in, "upward: S-E");
          end
          LSW_STRAIGHT_DOWN: begin
            check(s_out == n_in && n_out == s_in, "straight down: N-S");
            check(w_out == '0 && e_out == '0, "straight down: W and E cut");
          end
        endcase
      end
    end
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
