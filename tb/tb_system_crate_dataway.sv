// tb_system_crate_dataway: checks crate matching, station N lines, strobe
// gating and that only the addressed Branch Driver's reply reaches the branch.
// Combinational: every crate number 0-7 and station 0-7 is driven with strobes
// high, with 4 Branch Drivers in crate 3, and checked after a 1 ns settle. The
// expected routing is worked out here: stations 1..NUM_BD, crate match by
// number. Station numbering from 1 is this design's choice. Watchdog included.
module tb_system_crate_dataway;
  import vcc_pkg::*;
  localparam int NB = 4;
  branch_cmd_t br, dw;
  branch_rsp_t br_rsp;
  logic [NB-1:0] sel;
  branch_rsp_t bd_rsp [NB];
  int checks = 0, failures = 0;
  system_crate_dataway #(.NUM_BD(NB), .CRATE_NUM(3'd3)) dut (.*);
  initial begin
    for (int i = 0; i < NB; i++) begin
      bd_rsp[i] = '0; bd_rsp[i].r = 24'(i * 1000 + 7); bd_rsp[i].x = 1; bd_rsp[i].q = i[0];
      bd_rsp[i].rdy = 1; bd_rsp[i].l = (i == 2);
    end
    for (int c = 0; c < 8; c++)
      for (int n = 0; n < 8; n++) begin
        br = '0; br.c = 3'(c); br.n = 5'(n); br.f = 5'd16; br.s1 = 1; br.s2 = 1; br.w = 24'hABCDEF;
        #1;
        checks++;
        if (c == 3 && n >= 1 && n <= NB) begin
          if (sel != (NB'(1) << (n - 1)) || br_rsp != bd_rsp[n - 1] || !dw.s1 || !dw.s2 || dw.w != 24'hABCDEF) begin
            failures++; $display("FAIL: c=%0d n=%0d", c, n);
          end
        end else if (sel != '0 || br_rsp != '0 || (c != 3 && (dw.s1 || dw.s2))) begin
          failures++; $display("FAIL: unaddressed c=%0d n=%0d", c, n);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
