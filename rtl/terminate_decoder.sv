// terminate_decoder: decides, after each CAMAC cycle, whether the data of the
// cycle is accepted and whether the block transfer ends.
//   XM1 / QM1 : data is transferred only if X=1 / Q=1
//   XM2 / QM2 : the transfer terminates if X=0 / Q=0 (that cycle's data is dropped)
//   L         : the Branch Driver signalled End of Scan; the cycle's data still
//               counts and the transfer terminates
//   timeout   : the addressed crate never gave R; terminate without data
// The mode bits and the L termination follow the source design. Dropping the
// data of an XM2/QM2-terminated cycle and keeping that of the End-of-Scan cycle
// are this design's reading. For cycles addressed to the Branch Driver itself
// (data_cycle=0) only the timeout matters. Purely combinational.
module terminate_decoder
  import vcc_pkg::*;
(
  input  vcc_ctl_t ctl,
  input  logic     data_cycle,
  input  logic     x,
  input  logic     q,
  input  logic     l,
  input  logic     timeout,
  output logic     accept,     // data of this cycle is transferred
  output logic     terminate,  // block transfer ends after this cycle
  output logic     xq_stop,    // cause: XM2/QM2
  output logic     eos         // cause: End of Scan
);
  logic cond_ok;
  always_comb begin
    xq_stop = data_cycle & ((ctl.xm2 & ~x) | (ctl.qm2 & ~q));
    cond_ok = ~(ctl.xm1 & ~x) & ~(ctl.qm1 & ~q);
    eos     = data_cycle & l;
    if (data_cycle) begin
      accept    = cond_ok & ~xq_stop & ~timeout;
      terminate = xq_stop | eos | timeout;
    end else begin
      accept    = ~timeout;
      terminate = timeout;
    end
  end
endmodule
