// tb_vcc_camac_system: end-to-end test of the whole CAMAC system at its default
// size (7 System Crates x 8 Branch Drivers, 1.6 us = 16 clocks). A VAX memory
// model holds channel programs; the test starts them with Start I/O writes,
// waits for the interrupt, reads TDV, and checks the data buffer, the status
// buffer and the writes seen on the highways against values computed here.
// Program 1 chains six packets that together use: R synchronisation, all three
// packing modes, reads and writes, subaddress/module/crate scanning, the ILQ
// and IN scan rules, XM1/QM1 data acceptance ("no data" cycles), XM2
// termination, End of Scan termination, byte-count termination, longword
// alignment, Clear/Inhibit lines, CTLW sense and command chaining. Programs 2-4
// each end in one error: data buffer too small, R time-out, non-existent memory.
// Program 5 runs with no data buffer (length 0): a read packet whose data must
// not reach memory, chained to an 8-bit-packed write packet that must send 0.
// Program 6 runs with no status buffer (address 0). Program 7 scans crates 1-7
// on the last highway (System Crate 7, Branch Driver 8) of the full system.
// Program 8 writes with 16-bit packing and ends by QM2 when Q goes to 0.
module tb_vcc_camac_system;
  import vcc_pkg::*;
  localparam int NSC = 7, NBD = 8, NH = NSC * NBD;
  localparam logic [17:0] BASE = 18'o764000;
  localparam int CTL = 'h100, STAT = 'h400, DATA = 'h800, DLEN = 'h400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [17:0] a_out, bus_a;  logic [1:0] c_out, bus_c;
  logic [15:0] d_out, bus_d;
  logic ma_oe, d_oe, msyn_out, ssyn_out, npr, br, sack, bbsy_out, intr;
  logic bus_msyn, bus_ssyn, npg, bg, bus_bbsy, vcc_busy;
  hwy_out_t    hwy [NH];
  branch_rsp_t hwy_rsp [NH];

  vcc_camac_system u_dut (
    .clk, .rst_n,
    .ub_a_in(bus_a), .ub_c_in(bus_c), .ub_d_in(bus_d), .ub_msyn_in(bus_msyn),
    .ub_ssyn_in(bus_ssyn), .ub_npg_in(npg), .ub_bg_in(bg), .ub_bbsy_in(bus_bbsy),
    .ub_a_out(a_out), .ub_c_out(c_out), .ub_ma_oe(ma_oe), .ub_d_out(d_out), .ub_d_oe(d_oe),
    .ub_msyn_out(msyn_out), .ub_ssyn_out(ssyn_out), .ub_npr_out(npr), .ub_br_out(br),
    .ub_sack_out(sack), .ub_bbsy_out(bbsy_out), .ub_intr_out(intr),
    .sense(4'b1010), .vcc_busy, .hwy, .hwy_rsp
  );

  unibus_host_model #(.MEM_WORDS(4096), .MEM_DELAY(2)) u_host (
    .clk, .dev_a(a_out), .dev_c(c_out), .dev_ma_oe(ma_oe), .dev_d(d_out), .dev_d_oe(d_oe),
    .dev_msyn(msyn_out), .dev_ssyn(ssyn_out), .dev_npr(npr), .dev_br(br), .dev_sack(sack),
    .dev_intr(intr), .bus_a, .bus_c, .bus_d, .bus_msyn, .bus_ssyn, .npg, .bg, .bus_bbsy
  );

  for (genvar h = 0; h < NH; h++) begin : g_hwy
    camac_highway_model #(.NCRATES((h == NH - 1) ? 7 : 2), .NMOD(5), .RDY_DELAY(40)) u_hm (.clk, .hwy(hwy[h]), .rsp(hwy_rsp[h]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [23:0] rexp(int c, int n, int a);
    logic [11:0] cna;
    cna = {3'(c), 5'(n), 4'(a)};
    return {cna, cna ^ 12'hA5C};
  endfunction

  function automatic logic [31:0] mk(bit s, bit xm2, bit qm2, bit xm1, bit qm1, bit p16, bit p8,
                                     int c, int n, int a, bit inh, bit clr, bit in_, bit ilq,
                                     bit sc, bit sm, bit sa, int f);
    ctlw_t w;
    w.vcc = '{rsv: 1'b0, s: s, xm2: xm2, qm2: qm2, xm1: xm1, qm1: qm1, p16: p16, p8: p8};
    w.bd  = '{c: 3'(c), n: 5'(n), a: 4'(a), inh: inh, clr: clr, in_: in_, ilq: ilq,
              sc: sc, sm: sm, sa: sa, f: 5'(f)};
    return w;
  endfunction

  function automatic logic [15:0] mw(int byte_addr);
    return u_host.mem[byte_addr >> 1];
  endfunction

  task automatic put_packet(int base, int i, logic [31:0] ctlw, bit chain, int sc, int st,
                            int maxcnt, int offset);
    int w;
    w = (base + 12 * i) >> 1;
    u_host.mem[w]     = ctlw[15:0];
    u_host.mem[w + 1] = ctlw[31:16];
    u_host.mem[w + 2] = 16'(maxcnt);
    u_host.mem[w + 3] = {chain, 7'd0, 3'(sc), 5'(st)};
    u_host.mem[w + 4] = 16'(offset);
    u_host.mem[w + 5] = 16'h0;
  endtask

  task automatic start_io(int ctl, int data, int stat, int dlen, int speed);
    u_host.pio_write(BASE, 16'(ctl >> 2));
    u_host.pio_write(BASE, 16'(data >> 2));
    u_host.pio_write(BASE, 16'(stat >> 2));
    u_host.pio_write(BASE, 16'(dlen));
    u_host.pio_write(BASE, 16'(speed));
  endtask

  task automatic wait_intr(int n);
    int t = 0;
    while (u_host.intr_count < n && t < 400000) begin @(posedge clk); t++; end
    check(u_host.intr_count == n, $sformatf("interrupt %0d arrived", n));
    repeat (5) @(posedge clk);
  endtask

  task automatic check_status(int i, logic [15:0] lo, logic [15:0] hi, int cnt, logic [15:0] tdv);
    int b;
    b = STAT + 8 * i;
    check(mw(b) == lo,     $sformatf("pkt%0d sense lo %h exp %h", i, mw(b), lo));
    check(mw(b + 2) == hi, $sformatf("pkt%0d sense hi %h exp %h", i, mw(b + 2), hi));
    check(mw(b + 4) == 16'(cnt), $sformatf("pkt%0d bytes %0d exp %0d", i, mw(b + 4), cnt));
    check(mw(b + 6) == tdv, $sformatf("pkt%0d tdv %h exp %h", i, mw(b + 6), tdv));
  endtask

  // mechanism counters
  int n_rwait = 0, n_nodata = 0, n_eos = 0, n_xq = 0, n_cnt = 0, n_chain = 0;
  int n_p8 = 0, n_p16 = 0, n_pnone = 0, n_rd = 0, n_wr = 0, n_ilq = 0, n_in = 0;
  int n_tmo = 0, n_nxm = 0, n_small = 0, n_clr = 0, n_scan_c = 0, n_s1_len = 0, n_busy = 0;
  logic [2:0] cyc_st_d;
  int s1_len = 0;
  always @(posedge clk) begin
    cyc_st_d <= u_dut.u_ca.u_cyc.st;
    if (u_dut.u_ca.u_cyc.st == 3'd1 && cyc_st_d != 3'd1 && !u_dut.br_rsp.rdy) n_rwait++;
    if (u_dut.u_ca.u_cyc.done && u_dut.u_ca.data_cyc && !u_dut.u_ca.accept && !u_dut.u_ca.terminate) n_nodata++;
    if (u_dut.u_ca.u_cyc.done && u_dut.u_ca.data_cyc && u_dut.u_ca.timeout) n_tmo++;
    if (hwy[0].cmd.b) n_busy++;
    if ((hwy[0].cmd.s1 || hwy[0].cmd.s2) && !hwy[0].cmd.b) begin failures++; $display("FAIL: highway strobe without B"); end
    if (u_dut.br.s1) s1_len++;
    else if (s1_len != 0) begin
      if (s1_len == int'(u_dut.u_ca.speed) * 16 / 4) n_s1_len++;
      else begin failures++; $display("FAIL: S1 lasted %0d clocks", s1_len); end
      s1_len = 0;
    end
  end

  logic [15:0] tdv;
  logic [15:0] snap [32];
  int cyc0, n_nobuf = 0, n_nostat = 0, n_qm2 = 0, nw0;
  initial begin
    for (int i = 0; i < 4096; i++) u_host.mem[i] = 16'h0;
    // data for the write packet (pack8): bytes 0x11,0x22,...
    u_host.mem[(DATA + 128) >> 1]     = 16'h2211;
    u_host.mem[(DATA + 130) >> 1]     = 16'h4433;
    u_host.mem[(DATA + 132) >> 1]     = 16'h6655;
    // program 1: six chained packets
    put_packet(CTL, 0, mk(1,0,0,0,0,0,0, 1,2,0, 0,0,0,0, 0,0,1, 0), 1, 1, 1, 40, 0);
    put_packet(CTL, 1, mk(0,1,0,0,0,1,0, 1,4,14, 0,0,0,0, 0,1,1, 0), 1, 1, 2, 100, 64);
    put_packet(CTL, 2, mk(0,0,0,0,0,0,1, 2,3,0, 0,0,0,0, 0,0,1, 16), 1, 2, 1, 6, 128);
    put_packet(CTL, 3, mk(0,0,0,0,1,0,1, 1,2,0, 0,0,0,0, 0,0,1, 0), 1, 1, 1, 100, 192);
    put_packet(CTL, 4, mk(0,0,0,1,0,0,0, 1,4,0, 0,0,1,0, 1,1,0, 0), 1, 1, 2, 16, 256);
    put_packet(CTL, 5, mk(0,0,0,0,0,0,0, 1,2,0, 1,1,0,1, 0,0,1, 0), 0, 1, 1, 8, 320);
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    cyc0 = 0;
    start_io(CTL, DATA, STAT, DLEN, 2);
    wait_intr(1);
    u_host.pio_read(BASE + 2, tdv);
    check(tdv == 16'h0681, $sformatf("TDV after program 1: %h", tdv));
    check(u_host.last_vector == 16'o300, "interrupt vector");
    // packet 0: no packing, 10 reads of (1,2,0..9), R synchronised
    for (int i = 0; i < 10; i++) begin
      check(mw(DATA + 4*i) == rexp(1,2,i)[15:0] && mw(DATA + 4*i + 2) == {8'h0, rexp(1,2,i)[23:16]},
            $sformatf("pkt0 longword %0d", i));
    end
    check_status(0, {4'd10, 12'h020}, {8'h40, 3'd1, 5'd2}, 40, 16'h0180);
    n_pnone++; n_rd++; n_cnt++;
    // packet 1: 16-bit packing over (1,4,14..15),(1,5,0..15), ended by X=0 at (1,6,0)
    for (int i = 0; i < 18; i++) begin
      int n, a;
      n = (i < 2) ? 4 : 5;
      a = (i < 2) ? 14 + i : i - 2;
      check(mw(DATA + 64 + 2*i) == rexp(1,n,a)[15:0], $sformatf("pkt1 word %0d: %h exp %h", i, mw(DATA + 64 + 2*i), rexp(1,n,a)[15:0]));
    end
    check_status(1, {4'd1, 12'h060}, {8'h22, 3'd1, 5'd6}, 36, 16'h0220);
    n_p16++; n_xq++;
    // packet 2: 8-bit packing writes of 6 bytes to (2,3,0..5)
    check(g_hwy[8].u_hm.nwrites == 6, "pkt2 six highway writes");
    for (int i = 0; i < 6; i++)
      check(g_hwy[8].u_hm.wlog[i] == 24'(8'h11 * (i + 1)) && g_hwy[8].u_hm.wadr[i] == {3'd2, 5'd3, 4'(i)},
            $sformatf("pkt2 write %0d: %h", i, g_hwy[8].u_hm.wlog[i]));
    check_status(2, {4'd6, 12'h030}, {8'h01, 3'd2, 5'd3}, 6, 16'h0380);
    n_p8++; n_wr++;
    // packet 3: 8-bit packing with QM1: only a=0..2 give data; End of Scan at a=15
    check(mw(DATA + 192) == {rexp(1,2,1)[7:0], rexp(1,2,0)[7:0]}, "pkt3 bytes 0,1");
    check(mw(DATA + 194) == {8'h00, rexp(1,2,2)[7:0]}, "pkt3 byte 2 and flush");
    check_status(3, {4'd0, 12'h020}, {8'h05, 3'd1, 5'd2}, 3, 16'h0440);
    n_eos++;
    // packet 4: IN rule with XM1 over crates and modules
    check(mw(DATA + 256) == rexp(1,4,0)[15:0] && mw(DATA + 260) == rexp(1,5,0)[15:0] &&
          mw(DATA + 264) == rexp(2,1,0)[15:0] && mw(DATA + 268) == rexp(2,2,0)[15:0], "pkt4 IN scan data");
    check_status(4, {4'd0, 12'h2C0}, {8'h08, 3'd2, 5'd3}, 16, 16'h0580);
    n_in++;
    // packet 5: ILQ holds the address while Q=1; Clear and Inhibit lines
    check(mw(DATA + 320) == rexp(1,2,0)[15:0] && mw(DATA + 324) == rexp(1,2,0)[15:0], "pkt5 ILQ repeat");
    check_status(5, {4'd0, 12'hD20}, {8'h00, 3'd1, 5'd2}, 8, 16'h0680);
    check(g_hwy[0].u_hm.nclears == 2, $sformatf("pkt5 clear pulses %0d", g_hwy[0].u_hm.nclears));
    n_clr = g_hwy[0].u_hm.nclears;
    n_ilq++; n_chain = 5;

    // program 2: data buffer too small
    put_packet(CTL + 'h80, 0, mk(0,0,0,0,0,0,0, 1,2,0, 0,0,0,0, 0,0,1, 0), 0, 1, 1, 'h500, 0);
    start_io(CTL + 'h80, DATA, STAT + 'h80, DLEN, 1);
    wait_intr(2);
    u_host.pio_read(BASE + 2, tdv);
    check(tdv == 16'h0113, $sformatf("TDV buffer too small: %h", tdv));
    n_small += tdv[4];

    // program 3: R never comes from a missing crate -> time-out
    put_packet(CTL + 'hC0, 0, mk(1,0,0,0,0,0,0, 5,2,0, 0,0,0,0, 0,0,1, 0), 0, 1, 1, 4, 0);
    start_io(CTL + 'hC0, DATA, STAT + 'hC0, DLEN, 1);
    wait_intr(3);
    u_host.pio_read(BASE + 2, tdv);
    check(tdv == 16'h0107, $sformatf("TDV R time-out: %h", tdv));

    // program 4: data buffer outside memory -> non-existent memory
    put_packet(CTL + 'h100, 0, mk(0,0,0,0,0,0,0, 1,2,0, 0,0,0,0, 0,0,1, 0), 0, 1, 1, 4, 0);
    start_io(CTL + 'h100, 'h3FF00, STAT + 'h100, DLEN, 1);
    wait_intr(4);
    u_host.pio_read(BASE + 2, tdv);
    check(tdv == 16'h000B, $sformatf("TDV non-existent memory: %h", tdv));
    n_nxm += tdv[3];

    // program 5: no data buffer (length 0): reads are dropped, writes send 0
    for (int i = 0; i < 32; i++) snap[i] = u_host.mem[(DATA >> 1) + i];
    put_packet(CTL + 'h140, 0, mk(0,0,0,0,0,0,0, 1,2,0, 0,0,0,0, 0,0,1, 0), 1, 1, 1, 8, 0);
    put_packet(CTL + 'h140, 1, mk(0,0,0,0,0,0,1, 2,3,8, 0,0,0,0, 0,0,1, 16), 0, 2, 1, 4, 0);
    start_io(CTL + 'h140, DATA, STAT + 'h140, 0, 1);
    wait_intr(5);
    u_host.pio_read(BASE + 2, tdv);
    check(tdv == 16'h0281, $sformatf("TDV no data buffer: %h", tdv));
    for (int i = 0; i < 32; i++)
      check(u_host.mem[(DATA >> 1) + i] == snap[i], $sformatf("no-buffer read left word %0d alone", i));
    check(g_hwy[8].u_hm.nwrites == 10, "no-buffer write: four highway writes");
    for (int i = 6; i < 10; i++)
      check(g_hwy[8].u_hm.wlog[i] == 24'h0 && g_hwy[8].u_hm.wadr[i] == {3'd2, 5'd3, 4'(i + 2)},
            $sformatf("no-buffer write %0d: %h", i, g_hwy[8].u_hm.wlog[i]));
    check_status(('h140 >> 3), {4'd2, 12'h020}, {8'h00, 3'd1, 5'd2}, 8, 16'h0180);
    check_status(('h140 >> 3) + 1, {4'd12, 12'h030}, {8'h01, 3'd2, 5'd3}, 4, 16'h0280);
    n_nobuf += (g_hwy[8].u_hm.nwrites == 10);

    // program 6: no status buffer (address 0): data arrives, nothing at address 0
    put_packet(CTL + 'h180, 0, mk(0,0,0,0,0,0,0, 1,2,3, 0,0,0,0, 0,0,0, 0), 0, 1, 1, 4, 'h300);
    start_io(CTL + 'h180, DATA, 0, DLEN, 1);
    wait_intr(6);
    u_host.pio_read(BASE + 2, tdv);
    check(tdv == 16'h0181, $sformatf("TDV no status buffer: %h", tdv));
    check(mw(DATA + 'h300) == rexp(1,2,3)[15:0] && mw(DATA + 'h302) == {8'h0, rexp(1,2,3)[23:16]},
          "no-status-buffer packet data");
    for (int i = 0; i < 8; i++) check(u_host.mem[i] == 16'h0, $sformatf("no status at word %0d", i));
    n_nostat += (tdv == 16'h0181 && u_host.mem[0] == 16'h0);

    // program 7: last highway (System Crate 7, Branch Driver 8), crate scan 1..7
    put_packet(CTL + 'h1C0, 0, mk(0,0,0,0,0,0,0, 1,1,0, 0,0,0,0, 1,0,0, 0), 0, 7, 8, 100, 'h340);
    start_io(CTL + 'h1C0, DATA, STAT + 'h1C0, DLEN, 1);
    wait_intr(7);
    u_host.pio_read(BASE + 2, tdv);
    check(tdv == 16'h0141, $sformatf("TDV last highway crate scan: %h", tdv));
    for (int c = 1; c <= 7; c++)
      check(mw(DATA + 'h340 + 4*(c-1)) == rexp(c,1,0)[15:0] &&
            mw(DATA + 'h342 + 4*(c-1)) == {8'h0, rexp(c,1,0)[23:16]}, $sformatf("last highway crate %0d", c));
    check(mw(STAT + 'h1C0 + 4) == 16'd28, "last highway byte count");
    n_scan_c += (tdv == 16'h0141);

    // program 8: 16-bit-packed writes to (1,2,0..), ended by QM2 when Q=0 at a=3
    nw0 = g_hwy[0].u_hm.nwrites;
    for (int i = 0; i < 4; i++) u_host.mem[((DATA + 'h380) >> 1) + i] = 16'(16'h1111 * (i + 1));
    put_packet(CTL + 'h200, 0, mk(0,0,1,0,0,1,0, 1,2,0, 0,0,0,0, 0,0,1, 16), 0, 1, 1, 100, 'h380);
    start_io(CTL + 'h200, DATA, STAT + 'h200, DLEN, 1);
    wait_intr(8);
    u_host.pio_read(BASE + 2, tdv);
    check(tdv == 16'h0121, $sformatf("TDV QM2 write: %h", tdv));
    check(g_hwy[0].u_hm.nwrites == nw0 + 4, $sformatf("QM2 write: %0d highway writes", g_hwy[0].u_hm.nwrites - nw0));
    for (int i = 0; i < 4; i++)
      check(g_hwy[0].u_hm.wlog[nw0 + i] == 24'(16'h1111 * (i + 1)) && g_hwy[0].u_hm.wadr[nw0 + i] == {3'd1, 5'd2, 4'(i)},
            $sformatf("P16 write %0d: %h", i, g_hwy[0].u_hm.wlog[nw0 + i]));
    check(mw(STAT + 'h200 + 4) == 16'd6, $sformatf("QM2 write byte count %0d", mw(STAT + 'h200 + 4)));
    n_qm2 += tdv[5];

    // every mechanism must have happened
    check(n_rwait > 0, "R wait happened");       check(n_nodata > 0, "no-data cycles happened");
    check(n_tmo > 0, "R time-out happened");     check(n_s1_len > 0, "programmed cycle length");
    check(n_nxm > 0, "NXM happened");            check(n_small > 0, "buffer-too-small happened");
    check(n_clr > 0, "clear happened");          check(n_nobuf > 0, "no-buffer program ran");
    check(n_nostat > 0, "no-status program ran"); check(n_busy > 0, "highway B line driven");
    check(n_scan_c > 0, "crate scan over 7 crates of the last highway");
    check(n_qm2 > 0, "QM2 termination of a 16-bit write");
    $display("mechanisms: rwait=%0d nodata=%0d eos=%0d xq=%0d count=%0d p8=%0d p16=%0d none=%0d rd=%0d wr=%0d ilq=%0d in=%0d chain=%0d tmo=%0d nxm=%0d small=%0d clr=%0d nobuf=%0d",
             n_rwait, n_nodata, n_eos, n_xq, n_cnt, n_p8, n_p16, n_pnone, n_rd, n_wr, n_ilq, n_in,
             n_chain, n_tmo, n_nxm, n_small, n_clr, n_nobuf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
