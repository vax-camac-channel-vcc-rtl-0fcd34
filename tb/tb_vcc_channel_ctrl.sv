// tb_vcc_channel_ctrl: the channel controller with its scratch RAM, the UNIBUS
// and CAMAC interfaces and one Branch Driver (crate 1, station 1) wired straight
// to the branch. A two-packet chained program is started by Start I/O: a
// 16-bit-packed read of four scanned subaddresses and an unpacked write of two
// longwords. Checks data in memory, the highway writes, both status blocks, TDV
// and the interrupt. Also counts the controller states of the second 16-bit
// read iteration of the transfer loop (waits for the CAMAC and UNIBUS excluded)
// and checks it against the 8 microinstructions of the original basic cycle.
module tb_vcc_channel_ctrl;
  import vcc_pkg::*;
  localparam logic [17:0] BASE = 18'o764000;
  localparam int CTL = 'h100, STAT = 'h200, DATA = 'h400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  io_op_t io_code; logic [15:0] y_bus, db_bus, db_ub, db_ca;
  logic [1:0] ub_status, ca_status;
  logic ram_we; logic [7:0] ram_waddr, ram_raddr; logic [15:0] ram_wdata, ram_rdata;
  logic busy;
  branch_cmd_t br; branch_rsp_t br_rsp, bd_rsp, hwy_rsp; hwy_out_t hwy;
  logic [17:0] a_out, bus_a;  logic [1:0] c_out, bus_c;
  logic [15:0] d_out, bus_d;
  logic ma_oe, d_oe, msyn_out, ssyn_out, npr, ubr, sack, bbsy_out, intr;
  logic bus_msyn, bus_ssyn, npg, bg, bus_bbsy;
  int checks = 0, failures = 0;

  vcc_channel_ctrl dut (.*);
  vcc_scratch_ram u_ram (.clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata), .raddr(ram_raddr), .rdata(ram_rdata));
  assign db_bus = db_ub | db_ca;
  unibus_interface #(.BASE(BASE)) u_ub (
    .clk, .rst_n, .io_code, .y_bus, .db(db_ub), .status(ub_status),
    .ub_a_in(bus_a), .ub_c_in(bus_c), .ub_d_in(bus_d), .ub_msyn_in(bus_msyn), .ub_ssyn_in(bus_ssyn),
    .ub_npg_in(npg), .ub_bg_in(bg), .ub_bbsy_in(bus_bbsy),
    .ub_a_out(a_out), .ub_c_out(c_out), .ub_ma_oe(ma_oe), .ub_d_out(d_out), .ub_d_oe(d_oe),
    .ub_msyn_out(msyn_out), .ub_ssyn_out(ssyn_out), .ub_npr_out(npr), .ub_br_out(ubr),
    .ub_sack_out(sack), .ub_bbsy_out(bbsy_out), .ub_intr_out(intr));
  camac_interface #(.CLK_PER_STEP(4), .RDY_TIMEOUT(100)) u_ca (
    .clk, .rst_n, .io_code, .y_bus, .db(db_ca), .status(ca_status), .sense(4'h0), .br, .br_rsp);
  branch_driver u_bd (.clk, .rst_n, .sel(br.c == 3'd1 && br.n == 5'd1), .dw(br), .dw_rsp(bd_rsp), .hwy, .hwy_rsp);
  assign br_rsp = bd_rsp;
  camac_highway_model #(.NCRATES(2), .NMOD(5), .RDY_DELAY(0)) u_hm (.clk, .hwy, .rsp(hwy_rsp));
  unibus_host_model #(.MEM_WORDS(2048), .MEM_DELAY(1)) u_host (
    .clk, .dev_a(a_out), .dev_c(c_out), .dev_ma_oe(ma_oe), .dev_d(d_out), .dev_d_oe(d_oe),
    .dev_msyn(msyn_out), .dev_ssyn(ssyn_out), .dev_npr(npr), .dev_br(ubr), .dev_sack(sack),
    .dev_intr(intr), .bus_a, .bus_c, .bus_d, .bus_msyn, .bus_ssyn, .npg, .bg, .bus_bbsy);

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  function automatic logic [23:0] rexp(int c, int n, int a);
    logic [11:0] cna; cna = {3'(c), 5'(n), 4'(a)}; return {cna, cna ^ 12'hA5C};
  endfunction
  function automatic logic [15:0] mw(int b); return u_host.mem[b >> 1]; endfunction

  // states visited per loop iteration (between two CA_CYCLE_DATA codes)
  int ucount = 0, iter_len = 0, iters = 0;
  always @(posedge clk) begin
    if (io_code == CA_CYCLE_DATA) begin
      if (ucount != 0 && iters == 2) iter_len = ucount;
      iters++; ucount = 1;
    end else if (ucount != 0 && ca_status != CAS_BUSY && ub_status != UBS_BUSY) ucount++;
  end

  initial begin
    ctlw_t w0, w1;
    logic [15:0] tdv;
    for (int i = 0; i < 2048; i++) u_host.mem[i] = '0;
    w0 = '0; w0.vcc.p16 = 1; w0.bd.c = 1; w0.bd.n = 3; w0.bd.a = 2; w0.bd.sa = 1; w0.bd.f = 0;
    w1 = '0; w1.bd.c = 2; w1.bd.n = 4; w1.bd.a = 0; w1.bd.sa = 1; w1.bd.f = 16;
    {u_host.mem[CTL/2+1], u_host.mem[CTL/2]}   = w0;
    {u_host.mem[CTL/2+3], u_host.mem[CTL/2+2]} = {1'b1, 7'd0, 3'd1, 5'd1, 16'd8};
    u_host.mem[CTL/2+4] = 16'd0;
    {u_host.mem[CTL/2+7], u_host.mem[CTL/2+6]} = w1;
    {u_host.mem[CTL/2+9], u_host.mem[CTL/2+8]} = {1'b0, 7'd0, 3'd1, 5'd1, 16'd8};
    u_host.mem[CTL/2+10] = 16'd16;
    u_host.mem[(DATA+16)/2] = 16'h3344; u_host.mem[(DATA+18)/2] = 16'h0012;
    u_host.mem[(DATA+20)/2] = 16'h7788; u_host.mem[(DATA+22)/2] = 16'h0056;
    repeat (3) @(posedge clk); rst_n = 1;
    u_host.pio_write(BASE, 16'(CTL >> 2));
    u_host.pio_write(BASE, 16'(DATA >> 2));
    u_host.pio_write(BASE, 16'(STAT >> 2));
    u_host.pio_write(BASE, 16'd64);
    u_host.pio_write(BASE, 16'd1);
    while (u_host.intr_count == 0) @(posedge clk);
    repeat (4) @(posedge clk);
    for (int i = 0; i < 4; i++)
      chk(mw(DATA + 2*i) == rexp(1, 3, 2 + i)[15:0], $sformatf("16-bit read word %0d: %h", i, mw(DATA + 2*i)));
    chk(u_hm.nwrites == 2 && u_hm.wlog[0] == 24'h123344 && u_hm.wlog[1] == 24'h567788 &&
        u_hm.wadr[1] == {3'd2, 5'd4, 4'd1}, "unpacked writes on the highway");
    chk(mw(STAT + 4) == 16'd8 && mw(STAT + 6) == 16'h0180, $sformatf("status 0: %h %h", mw(STAT+4), mw(STAT+6)));
    chk(mw(STAT) == {4'd6, w0[11:0]} && mw(STAT + 2) == {w0[31:24], w0[23:16]}, "status 0 sense");
    chk(mw(STAT + 12) == 16'd8 && mw(STAT + 14) == 16'h0280, "status 1");
    u_host.pio_read(BASE + 2, tdv);
    chk(tdv == 16'h0281, $sformatf("TDV %h", tdv));
    chk(!busy, "controller idle again");
    $display("16-bit read loop: %0d controller states per CAMAC cycle (excluding waits)", iter_len);
    chk(iter_len == 8, "8 states per 2-byte CAMAC cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
