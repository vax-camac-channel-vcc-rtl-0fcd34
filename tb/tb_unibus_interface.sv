// tb_unibus_interface: the UNIBUS interface against a VAX memory model: Start
// I/O words written by programmed I/O and read by the CPU side (with the second
// write held off until the first is read), TDV read-back, DMA writes and reads,
// a DMA to non-existent memory, and a vectored interrupt.
// Runs with a short non-existent-memory time-out (20 clocks) and a 1024-word
// memory to keep the run brief; the register address is the default. Expected
// values are the words the test wrote. Bus handshake timing follows this
// design's simplified UNIBUS master. Watchdog included.
module tb_unibus_interface;
  import vcc_pkg::*;
  localparam logic [17:0] BASE = 18'o764000;
  logic clk = 0, rst_n = 0;
  io_op_t io_code = IO_NOP;
  logic [15:0] y_bus = 0, db;
  logic [1:0] status;
  logic [17:0] a_out, bus_a;  logic [1:0] c_out, bus_c;
  logic [15:0] d_out, bus_d;
  logic ma_oe, d_oe, msyn_out, ssyn_out, npr, br, sack, bbsy_out, intr;
  logic bus_msyn, bus_ssyn, npg, bg, bus_bbsy;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  unibus_interface #(.BASE(BASE), .SSYN_TIMEOUT(20)) dut (
    .clk, .rst_n, .io_code, .y_bus, .db, .status,
    .ub_a_in(bus_a), .ub_c_in(bus_c), .ub_d_in(bus_d), .ub_msyn_in(bus_msyn), .ub_ssyn_in(bus_ssyn),
    .ub_npg_in(npg), .ub_bg_in(bg), .ub_bbsy_in(bus_bbsy),
    .ub_a_out(a_out), .ub_c_out(c_out), .ub_ma_oe(ma_oe), .ub_d_out(d_out), .ub_d_oe(d_oe),
    .ub_msyn_out(msyn_out), .ub_ssyn_out(ssyn_out), .ub_npr_out(npr), .ub_br_out(br),
    .ub_sack_out(sack), .ub_bbsy_out(bbsy_out), .ub_intr_out(intr)
  );
  unibus_host_model #(.MEM_WORDS(1024), .MEM_DELAY(3)) u_host (
    .clk, .dev_a(a_out), .dev_c(c_out), .dev_ma_oe(ma_oe), .dev_d(d_out), .dev_d_oe(d_oe),
    .dev_msyn(msyn_out), .dev_ssyn(ssyn_out), .dev_npr(npr), .dev_br(br), .dev_sack(sack),
    .dev_intr(intr), .bus_a, .bus_c, .bus_d, .bus_msyn, .bus_ssyn, .npg, .bg, .bus_bbsy
  );

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic op(io_op_t c, logic [15:0] y);
    @(negedge clk); io_code = c; y_bus = y;
    @(negedge clk); io_code = IO_NOP; y_bus = 0;
  endtask
  task automatic rd(io_op_t c, output logic [15:0] v);
    @(negedge clk); io_code = c; #1 v = db;
    @(negedge clk); io_code = IO_NOP;
  endtask
  task automatic wait_idle();
    int t = 0;
    while (status == UBS_BUSY && t < 1000) begin @(negedge clk); t++; end
  endtask

  logic sio2_done = 0;
  initial begin
    logic [15:0] v;
    for (int i = 0; i < 1024; i++) u_host.mem[i] = 16'(i * 3);
    repeat (2) @(negedge clk); rst_n = 1;
    chk(status == UBS_IDLE, "idle after reset");
    u_host.pio_write(BASE, 16'h1111);
    chk(status == UBS_SIO, "Start I/O word waiting");
    fork
      begin u_host.pio_write(BASE, 16'h2222); sio2_done = 1; end
      begin
        repeat (20) @(negedge clk);
        chk(!sio2_done, "second Start I/O held off");
        rd(UB_RD_SIO, v); chk(v == 16'h1111, "first Start I/O word");
      end
    join
    rd(UB_RD_SIO, v); chk(v == 16'h2222, "second Start I/O word");
    op(UB_LD_TDV, 16'hC0DE);
    u_host.pio_read(BASE + 2, v); chk(v == 16'hC0DE, "TDV read by VAX");
    // DMA write of two words, address steps by 2
    op(UB_LD_ADDR_LO, 16'h0100); op(UB_LD_ADDR_HI, 16'h0000);
    op(UB_LD_DATA, 16'hAAAA); op(UB_DMA_WR, 0);
    chk(status == UBS_BUSY, "busy during DMA"); wait_idle();
    op(UB_LD_DATA, 16'h5555); op(UB_DMA_WR, 0); wait_idle();
    chk(u_host.mem['h80] == 16'hAAAA && u_host.mem['h81] == 16'h5555, "DMA writes");
    // DMA read
    op(UB_LD_ADDR_LO, 16'h0010); op(UB_DMA_RD, 0); wait_idle();
    rd(UB_RD_DATA, v); chk(v == 16'(8 * 3), $sformatf("DMA read %h", v));
    op(UB_DMA_RD, 0); wait_idle();
    rd(UB_RD_DATA, v); chk(v == 16'(9 * 3), "DMA read, next word");
    // non-existent memory
    op(UB_LD_ADDR_LO, 16'hF000); op(UB_LD_ADDR_HI, 16'h0003); op(UB_DMA_RD, 0); wait_idle();
    chk(status == UBS_ERR, "non-existent memory flagged");
    op(UB_CLR_ERR, 0); chk(status == UBS_IDLE, "error cleared");
    // interrupt
    op(UB_LD_VEC, 16'o300); op(UB_INTR, 0); wait_idle();
    chk(u_host.intr_count == 1 && u_host.last_vector == 16'o300, "vectored interrupt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
