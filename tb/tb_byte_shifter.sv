// tb_byte_shifter: checks every write and read lane of the byte shifter on
// random words against the packing-mode byte maps.
// The block is combinational, so each lane is set and read after a 1 ns
// settle. Expected words are built here by slicing bytes, following the packing
// maps of the original (none, 16-bit, 8-bit); bytes the maps leave undefined
// are expected as zero, which is this design's choice. A watchdog ends the run.
module tb_byte_shifter;
  import vcc_pkg::*;
  logic [15:0] y, db;
  logic [23:0] w_old, w_new, r;
  bs_wsel_t wsel;
  bs_rsel_t rsel;
  int checks = 0, failures = 0;
  byte_shifter dut (.*);
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    for (int it = 0; it < 200; it++) begin
      y = 16'($urandom); w_old = 24'($urandom); r = 24'($urandom);
      wsel = BS_W_LO; rsel = BS_R_LO; #1;
      chk(w_new[15:0] == y && w_new[23:16] == w_old[23:16], "W_LO");
      chk(db == r[15:0], "R_LO");
      wsel = BS_W_HI; rsel = BS_R_HI; #1;
      chk(w_new[23:16] == y[7:0] && w_new[15:0] == w_old[15:0], "W_HI");
      chk(db[7:0] == r[23:16] && db[15:8] == 8'h0, "R_HI");
      wsel = BS_W_H; rsel = BS_R_B0; #1;
      chk(w_new == {8'h0, y}, "W_H");
      chk(db == {8'h0, r[7:0]}, "R_B0");
      wsel = BS_W_B0; rsel = BS_R_B1; #1;
      chk(w_new == {16'h0, y[7:0]}, "W_B0");
      chk(db == {r[7:0], 8'h0}, "R_B1");
      wsel = BS_W_B1; #1;
      chk(w_new == {16'h0, y[15:8]}, "W_B1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
