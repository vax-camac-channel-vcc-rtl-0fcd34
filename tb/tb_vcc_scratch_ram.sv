// tb_vcc_scratch_ram: fills all 256 words with random data, reads them back,
// and checks that a write lands only at its own address.
// 10 ns clock; writes on the rising edge, reads checked 1 ns after the read
// address changes (the read port is asynchronous). The 256 x 16 size is the
// original's. Watchdog included.
module tb_vcc_scratch_ram;
  logic clk = 0, we = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] ref_mem [256];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  vcc_scratch_ram dut (.*);
  initial begin
    for (int i = 0; i < 256; i++) begin
      ref_mem[i] = 16'($urandom);
      @(negedge clk); we = 1; waddr = 8'(i); wdata = ref_mem[i];
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 256; i++) begin
      raddr = 8'(i); #1; checks++;
      if (rdata !== ref_mem[i]) begin failures++; $display("FAIL: addr %0d", i); end
    end
    @(negedge clk); we = 1; waddr = 8'd77; wdata = 16'hBEEF; ref_mem[77] = 16'hBEEF;
    @(negedge clk); we = 0;
    for (int i = 70; i < 85; i++) begin
      raddr = 8'(i); #1; checks++;
      if (rdata !== ref_mem[i]) begin failures++; $display("FAIL: after write addr %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
