// tb_camac_interface: drives the CAMAC interface through its I/O codes and a
// simple responder on the branch. Checks branch register, write register loads
// through the byte shifters, the cycle length for a speed code, read register
// lanes, the status register, and the three cycle results (data, no data,
// terminate) for XM1, XM2, End of Scan and an R time-out.
// Runs with 4 clocks per speed step and a short R time-out. Expected register
// contents are worked out here from the packing maps and the status register
// layout, which is this design's own. Watchdog included.
module tb_camac_interface;
  import vcc_pkg::*;
  localparam int STEP = 8, TMO = 40;
  logic clk = 0, rst_n = 0;
  io_op_t io_code = IO_NOP;
  logic [15:0] y_bus = 0, db;
  logic [1:0] status;
  logic [3:0] sense = 4'b0110;
  branch_cmd_t br;
  branch_rsp_t br_rsp;
  logic rx = 1, rq = 1, rl = 0, rr = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  camac_interface #(.CLK_PER_STEP(STEP), .RDY_TIMEOUT(TMO)) dut (.*);

  always_comb begin
    br_rsp = '0;
    br_rsp.r = {br.c, br.n, br.a, 12'h5A5};
    br_rsp.x = rx; br_rsp.q = rq; br_rsp.l = rl; br_rsp.rdy = rr;
  end

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
  task automatic cycle(io_op_t c, output int busy_clks, output logic [1:0] res);
    busy_clks = 0;
    @(negedge clk); io_code = c;
    @(negedge clk); io_code = IO_NOP;
    while (status == CAS_BUSY) begin busy_clks++; @(negedge clk); end
    res = status;
  endtask

  initial begin
    logic [15:0] v; int nb; logic [1:0] res;
    repeat (2) @(negedge clk); rst_n = 1;
    op(CA_LD_BRANCH, {8'h0, 3'd2, 5'd3});
    op(CA_LD_FA, {7'd0, 5'd16, 4'd7});
    chk(br.c == 2 && br.n == 3 && br.f == 16 && br.a == 7, "branch register");
    op(CA_LD_W_LO, 16'hBEEF); op(CA_LD_W_HI, 16'h12CD);
    chk(br.w == 24'hCDBEEF, $sformatf("W no packing %h", br.w));
    op(CA_LD_W_H, 16'h1234);  chk(br.w == 24'h001234, "W 16-bit");
    op(CA_LD_W_B1, 16'hA55A); chk(br.w == 24'h0000A5, "W odd byte");
    op(CA_LD_W_B0, 16'hA55A); chk(br.w == 24'h00005A, "W even byte");
    op(CA_LD_SPEED, 16'd2);
    op(CA_LD_CTL, 16'h08);   // XM1
    cycle(CA_CYCLE_DATA, nb, res);
    chk(nb == 2 * STEP, $sformatf("cycle length %0d", nb));
    chk(res == CAS_DATA, "X=1 gives data");
    rd(CA_RD_LO, v);  chk(v == 16'h75A5, $sformatf("R low %h", v));
    rd(CA_RD_HI, v);  chk(v == 16'h0043, $sformatf("R high %h", v));
    rd(CA_RD_B0, v);  chk(v == 16'h00A5, "R byte low lane");
    rd(CA_RD_B1, v);  chk(v == 16'hA500, "R byte high lane");
    rd(CA_RD_STAT, v); chk(v[15:12] == sense && v[0] && v[1] && v[3], $sformatf("status register %h", v));
    rx = 0;
    cycle(CA_CYCLE_DATA, nb, res); chk(res == CAS_NODATA, "XM1 with X=0 gives no data");
    op(CA_LD_CTL, 16'h20);   // XM2
    cycle(CA_CYCLE_DATA, nb, res); chk(res == CAS_TERM, "XM2 with X=0 terminates");
    rd(CA_RD_STAT, v); chk(v[4] && !v[3], "terminate without data");
    rx = 1; rl = 1;
    cycle(CA_CYCLE_DATA, nb, res); chk(res == CAS_TERM, "End of Scan terminates");
    rd(CA_RD_STAT, v); chk(v[4] && v[3] && v[2], "End of Scan keeps the data");
    cycle(CA_CYCLE_CMD, nb, res); chk(res == CAS_DATA, "command cycle ignores L");
    rl = 0;
    op(CA_LD_CTL, 16'h40);   // S
    rr = 0;
    cycle(CA_CYCLE_CMD, nb, res); chk(res == CAS_DATA && nb == 2 * STEP, "command cycle does not wait for R");
    cycle(CA_CYCLE_DATA, nb, res); chk(res == CAS_TERM && nb == TMO, $sformatf("R time-out after %0d", nb));
    rd(CA_RD_STAT, v); chk(v[5], "time-out flag");
    rr = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
