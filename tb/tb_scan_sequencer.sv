// tb_scan_sequencer: random scan modes and X/Q responses; after every step the
// counters and End of Scan are compared with a reference that walks a list of
// the enabled counters (subaddress 0-15, module 1-23, crate 1-7).
// 10 ns clock. Each step the CTLW scan bits, X and Q are random; the reference
// model here follows the printed rules (IN: reset least, step next if X=0;
// ILQ: step least only if Q=0). Counter ranges and reset values are this
// design's assumptions. Watchdog included.
module tb_scan_sequencer;
  logic clk = 0, rst_n = 0, load = 0, step = 0, x = 0, q = 0;
  logic sc = 0, sm = 0, sa = 0, ilq = 0, in_ = 0;
  logic [2:0] c_init = 0, c; logic [4:0] n_init = 0, n; logic [3:0] a_init = 0, a;
  logic eos;
  int checks = 0, failures = 0;
  int rv[3], first[3], last[3];
  bit en[3], reos;
  int n_eos = 0;
  always #5 clk = ~clk;
  scan_sequencer dut (.*);

  // reference: index 0 = subaddress, 1 = module, 2 = crate
  function automatic void ref_step(bit xx, bit qq);
    int order[$];
    for (int i = 0; i < 3; i++) if (en[i]) order.push_back(i);
    if (order.size() == 0) return;
    if (in_ && !xx) begin
      rv[order[0]] = first[order[0]];
      for (int j = 1; j <= order.size(); j++) begin
        if (j == order.size()) begin reos = 1; break; end
        if (rv[order[j]] == last[order[j]]) rv[order[j]] = first[order[j]];
        else begin rv[order[j]]++; break; end
      end
    end else if (!(ilq && qq)) begin
      for (int j = 0; j <= order.size(); j++) begin
        if (j == order.size()) begin reos = 1; break; end
        if (rv[order[j]] == last[order[j]]) rv[order[j]] = first[order[j]];
        else begin rv[order[j]]++; break; end
      end
    end
  endfunction

  initial begin
    first = '{0, 1, 1}; last = '{15, 23, 7};
    repeat (2) @(negedge clk); rst_n = 1;
    for (int trial = 0; trial < 60; trial++) begin
      @(negedge clk);
      {sc, sm, sa} = 3'($urandom_range(1, 7));
      ilq = 1'($urandom); in_ = 1'($urandom);
      a_init = 4'($urandom); n_init = 5'($urandom_range(1, 23)); c_init = 3'($urandom_range(1, 7));
      en = '{sa, sm, sc}; rv = '{int'(a_init), int'(n_init), int'(c_init)}; reos = 0;
      load = 1; @(negedge clk); load = 0;
      for (int s = 0; s < 200; s++) begin
        x = ($urandom_range(0, 9) != 0); q = 1'($urandom);
        step = 1; ref_step(x, q);
        @(negedge clk); step = 0;
        checks++;
        if (a != 4'(rv[0]) || n != 5'(rv[1]) || c != 3'(rv[2]) || eos != reos) begin
          failures++;
          $display("FAIL: trial %0d step %0d got %0d/%0d/%0d eos %b exp %0d/%0d/%0d %b",
                   trial, s, c, n, a, eos, rv[2], rv[1], rv[0], reos);
        end
        if (reos) begin n_eos++; break; end
      end
    end
    checks++; if (n_eos == 0) begin failures++; $display("FAIL: no End of Scan seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
