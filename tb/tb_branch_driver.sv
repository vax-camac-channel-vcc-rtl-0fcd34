// tb_branch_driver: runs dataway cycles on one Branch Driver with a crate model
// on its highway: CTLW load with F(17) and read-back with F(1), highway reads
// with F(0) and subaddress/module scanning, End of Scan on L, a highway write
// with F(16), Clear/Inhibit lines, and no highway activity when not addressed.
// B (Busy) must reach the highway only with F(0)/F(16) cycles.
// Dataway cycles are made by tasks with S1 and S2 each a few clocks long (the
// real length comes from the VCC). Expected addresses and data are computed
// here from the CTLW fields and the crate model's data formula. F(0), F(1),
// F(16) and F(17) follow the original; strobe-edge timing is this design's.
// Watchdog included.
module tb_branch_driver;
  import vcc_pkg::*;
  logic clk = 0, rst_n = 0, sel = 0;
  branch_cmd_t dw = '0;
  branch_rsp_t dw_rsp, hwy_rsp;
  hwy_out_t hwy;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  branch_driver dut (.*);
  camac_highway_model #(.NCRATES(2), .NMOD(5), .RDY_DELAY(0)) u_hm (.clk, .hwy, .rsp(hwy_rsp));

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  function automatic logic [23:0] rexp(int c, int n, int a);
    logic [11:0] cna; cna = {3'(c), 5'(n), 4'(a)}; return {cna, cna ^ 12'hA5C};
  endfunction
  // one dataway cycle: 2 clocks address, 3 clocks S1, 3 clocks S2, 2 clocks end
  task automatic cyc(input bit s, input logic [4:0] f, input logic [23:0] w,
                     output logic [23:0] r, output bit x, output bit q);
    @(negedge clk); sel = s; dw.f = f; dw.w = w; dw.b = 1;
    repeat (2) @(negedge clk);
    dw.s1 = 1; repeat (3) @(negedge clk);
    r = dw_rsp.r; x = dw_rsp.x; q = dw_rsp.q;
    dw.s1 = 0; dw.s2 = 1; repeat (3) @(negedge clk);
    dw.s2 = 0; repeat (2) @(negedge clk);
    dw.b = 0;
  endtask
  // highway B and S1 clocks, to see which dataway cycles reach the highway
  int n_hb = 0, n_hs1 = 0;
  always @(posedge clk) begin
    if (hwy.cmd.b) n_hb++;
    if (hwy.cmd.s1) n_hs1++;
  end
  function automatic logic [23:0] mk(int c, int n, int a, bit inh, bit clr, bit sm, bit sa, int f);
    bd_ctlw_t w;
    w = '{c: 3'(c), n: 5'(n), a: 4'(a), inh: inh, clr: clr, in_: 1'b0, ilq: 1'b0,
          sc: 1'b0, sm: sm, sa: sa, f: 5'(f)};
    return w;
  endfunction

  initial begin
    logic [23:0] r, w; bit x, q; int nr;
    repeat (2) @(negedge clk); rst_n = 1;
    w = mk(1, 2, 3, 0, 0, 0, 1, 0);
    cyc(1, F_WR_CTLW, w, r, x, q);  chk(x && q, "F17 X,Q");
    cyc(1, F_RD_CTLW, 0, r, x, q);  chk(r == w, $sformatf("F1 sense %h", r));
    chk(n_hb == 0 && n_hs1 == 0, "F17/F1 stay off the highway (no B, no S1)");
    for (int i = 0; i < 3; i++) begin
      cyc(1, F_RD_DATA, 0, r, x, q);
      chk(r == rexp(1, 2, 3 + i) && x, $sformatf("F0 read %0d: %h", i, r));
    end
    chk(n_hs1 == 9 && n_hb == 30, $sformatf("three highway cycles: S1 %0d, B %0d clocks", n_hs1, n_hb));
    cyc(1, F_RD_CTLW, 0, r, x, q);  chk(r[15:12] == 4'd6, "sense shows stepped subaddress");
    // module + subaddress scan past the last module
    cyc(1, F_WR_CTLW, mk(1, 5, 14, 0, 0, 1, 1, 0), r, x, q);
    cyc(1, F_RD_DATA, 0, r, x, q);  chk(r == rexp(1, 5, 14), "scan (5,14)");
    cyc(1, F_RD_DATA, 0, r, x, q);  chk(r == rexp(1, 5, 15), "scan (5,15)");
    cyc(1, F_RD_DATA, 0, r, x, q);  chk(!x, "scan (6,0) gives X=0");
    // End of Scan
    cyc(1, F_WR_CTLW, mk(1, 2, 14, 0, 0, 0, 1, 0), r, x, q);
    chk(!dw_rsp.l, "L low after load");
    cyc(1, F_RD_DATA, 0, r, x, q);  chk(!dw_rsp.l, "L low mid scan");
    cyc(1, F_RD_DATA, 0, r, x, q);  chk(dw_rsp.l, "L high at End of Scan");
    // write with Inhibit and Clear
    cyc(1, F_WR_CTLW, mk(1, 3, 0, 1, 1, 0, 1, 16), r, x, q);
    chk(hwy.inh, "Inhibit level");
    cyc(1, F_WR_DATA, 24'h123456, r, x, q);
    chk(u_hm.nwrites == 1 && u_hm.wlog[0] == 24'h123456 && u_hm.wadr[0] == {3'd1, 5'd3, 4'd0}, "F16 write");
    chk(u_hm.nclears == 1, "Clear with S2");
    // not addressed: nothing on the highway
    nr = u_hm.nreads;
    cyc(0, F_WR_DATA, 24'h654321, r, x, q);
    chk(u_hm.nwrites == 1 && !x, "no highway cycle when N is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
