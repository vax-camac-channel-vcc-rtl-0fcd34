// tb_terminate_decoder: all combinations of the mode bits, X, Q, L, time-out and
// cycle kind, against a table-style reference of the acceptance and
// termination rules.
// Combinational, checked 1 ns after each input change. The rules come from the
// CTLW legend (XM1/QM1 transfer data only if X/Q=1, XM2/QM2 end the transfer if
// X/Q=0) plus End of Scan and the R time-out; keeping the data of the cycle
// that ends a scan is this design's choice. Watchdog included.
module tb_terminate_decoder;
  import vcc_pkg::*;
  vcc_ctl_t ctl;
  logic data_cycle, x, q, l, timeout, accept, terminate, xq_stop, eos;
  int checks = 0, failures = 0;
  terminate_decoder dut (.*);
  initial begin
    for (int v = 0; v < 512; v++) begin
      bit e_acc, e_term, e_xq, miss_x, miss_q;
      ctl = '0;
      {ctl.xm1, ctl.qm1, ctl.xm2, ctl.qm2, data_cycle, x, q, l, timeout} = 9'(v);
      ctl.p8 = v[0]; ctl.s = v[1];
      #1;
      miss_x = !x; miss_q = !q;
      e_xq = data_cycle && ((ctl.xm2 && miss_x) || (ctl.qm2 && miss_q));
      if (!data_cycle) begin e_acc = !timeout; e_term = timeout; end
      else begin
        e_term = e_xq || l || timeout;
        e_acc  = !timeout && !e_xq && !(ctl.xm1 && miss_x) && !(ctl.qm1 && miss_q);
      end
      checks++;
      if (accept != e_acc || terminate != e_term || xq_stop != e_xq || eos != (data_cycle && l)) begin
        failures++; $display("FAIL: v=%0d acc=%b term=%b", v, accept, terminate);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
