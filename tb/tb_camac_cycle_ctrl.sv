// tb_camac_cycle_ctrl: measures S1, S2 and whole-cycle lengths for several
// speed codes (each step = CLK_PER_STEP clocks), checks that with 'sync' the
// strobes wait for R, and that a missing R ends the cycle with a time-out.
// Also checks that B (Busy) covers the whole dataway cycle and every strobe.
// Runs with 8 clocks per speed step and a short R time-out; lengths are
// counted clock by clock on the falling edge. The 1.6 us step and the R wait
// are the original's; the four equal phases are this design's. Watchdog
// included.
module tb_camac_cycle_ctrl;
  localparam int STEP = 8, TMO = 30;
  logic clk = 0, rst_n = 0, start = 0, sync = 0, rdy = 1;
  logic [3:0] speed = 1;
  logic busy, b, s1, s2, sample, done, timeout;
  int n_b;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  camac_cycle_ctrl #(.CLK_PER_STEP(STEP), .RDY_TIMEOUT(TMO)) dut (.*);
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic run(input int spd, input bit sy, input int rdy_after,
                     output int n_busy, output int n_s1, output int n_s2, output int first_s1,
                     output bit tmo, output int n_samp);
    int t = 0;
    n_b = 0; n_busy = 0; n_s1 = 0; n_s2 = 0; first_s1 = -1; tmo = 0; n_samp = 0;
    @(negedge clk); speed = 4'(spd); sync = sy; start = 1; rdy = (rdy_after == 0);
    @(negedge clk); start = 0;
    while (busy) begin
      t++;
      if (t == rdy_after) rdy = 1;
      n_busy++;
      if (s1) begin n_s1++; if (first_s1 < 0) first_s1 = t; end
      if (s2) n_s2++;
      if (b) n_b++;
      if ((s1 || s2) && !b) begin failures++; $display("FAIL: strobe without B"); end
      if (sample) n_samp++;
      if (timeout) tmo = 1;
      @(negedge clk);
    end
    rdy = 1;
  endtask
  initial begin
    int nb, n1, n2, f1, ns; bit tm;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int spd = 1; spd <= 3; spd++) begin
      run(spd, 0, 0, nb, n1, n2, f1, tm, ns);
      chk(nb == spd * STEP, $sformatf("speed %0d cycle %0d clocks", spd, nb));
      chk(n1 == spd * STEP / 4 && n2 == spd * STEP / 4, $sformatf("speed %0d strobes %0d %0d", spd, n1, n2));
      chk(ns == 1 && !tm, "one sample, no time-out");
      chk(n_b == spd * STEP, $sformatf("speed %0d B for %0d clocks", spd, n_b));
    end
    run(0, 0, 0, nb, n1, n2, f1, tm, ns);
    chk(nb == STEP, "speed 0 counts as 1");
    run(1, 1, 12, nb, n1, n2, f1, tm, ns);
    chk(f1 > 12 && nb == 11 + STEP + 1 && !tm, $sformatf("sync waits for R: first S1 at %0d, busy %0d", f1, nb));
    chk(n_b == STEP, $sformatf("B only after R: %0d clocks", n_b));
    run(1, 1, 1000, nb, n1, n2, f1, tm, ns);
    chk(tm && n1 == 0 && n2 == 0 && nb == TMO, $sformatf("time-out busy %0d", nb));
    chk(n_b == 0, "no B after a time-out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
