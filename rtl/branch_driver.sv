// branch_driver: a Branch Driver module of a System Crate. It adds a level of
// indirection to CAMAC: the VCC writes the 24-bit Branch Driver part of the
// CTLW with F(17); from then on F(0) (read) and F(16) (write) on the System
// Crate make the driver run one cycle on its own highway of up to 7 crates, at
// the crate/module/subaddress held in its counters and with the function code
// of the CTLW. After each highway cycle the Scan Sequencer steps the address
// conditioned on the X and Q responses; End of Scan is shown on the station's
// L line. F(1) reads back the CTLW with the current counter values in place of
// the initial address, so the ending scan address can be reported.
// The SLAC protocol lets the dataway strobes S1 and S2 pass straight through to
// the highway (gated by the station's N line and a data command), and the
// highway's R, X, Q and read lines pass back; a cycle of the Branch Driver is
// therefore exactly as long as the VCC makes it.
// Follows the source design: CTLW register, function/C,I buffer, the three
// counters, Scan Sequencer, command decoder, pass-through of S1/S2, X/Q/R.
// This design's own: the CTLW is taken at the rising edge of S1 of the F(17)
// cycle; the counters step on the falling edge of S2 of a data cycle; Inhibit
// is driven as a level while the CTLW's I bit is set and Clear accompanies S2
// of each highway cycle while the C bit is set; the driver answers X=Q=R=1 to
// its own F(1)/F(17) and X=Q=0 to other functions; Z is passed to the highway,
// and B (Busy, printed in the source's figure) only with a highway data cycle.
// The non-dataway LAM system of the source design is not included.
module branch_driver
  import vcc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // System Crate dataway
  input  logic        sel,     // N line of this station
  input  branch_cmd_t dw,      // dataway command lines (n/c fields unused)
  output branch_rsp_t dw_rsp,
  // highway to the remote crates
  output hwy_out_t    hwy,
  input  branch_rsp_t hwy_rsp  // l unused
);
  bd_ctlw_t   ctlw;
  logic       s1_d, s2_d;
  logic [2:0] cnt_c;
  logic [4:0] cnt_n;
  logic [3:0] cnt_a;
  logic       eos;
  logic       cmd_rd, cmd_wr, cmd_ld, cmd_sense, cmd_data;
  logic       load, step;

  // command decoder
  always_comb begin
    cmd_rd    = sel && dw.f == F_RD_DATA;
    cmd_wr    = sel && dw.f == F_WR_DATA;
    cmd_ld    = sel && dw.f == F_WR_CTLW;
    cmd_sense = sel && dw.f == F_RD_CTLW;
    cmd_data  = cmd_rd || cmd_wr;
    load      = cmd_ld && dw.s1 && !s1_d;
    step      = cmd_data && s2_d && !dw.s2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctlw <= '0; s1_d <= 1'b0; s2_d <= 1'b0;
    end else begin
      s1_d <= dw.s1;
      s2_d <= dw.s2;
      if (load) ctlw <= dw.w;
    end
  end

  scan_sequencer u_seq (
    .clk, .rst_n, .load,
    .c_init(dw.w[23:21]), .n_init(dw.w[20:16]), .a_init(dw.w[15:12]),
    .sc(ctlw.sc), .sm(ctlw.sm), .sa(ctlw.sa), .ilq(ctlw.ilq), .in_(ctlw.in_),
    .step, .x(hwy_rsp.x), .q(hwy_rsp.q),
    .c(cnt_c), .n(cnt_n), .a(cnt_a), .eos
  );

  // highway drivers
  always_comb begin
    hwy.cmd.c  = cnt_c;
    hwy.cmd.n  = cnt_n;
    hwy.cmd.a  = cnt_a;
    hwy.cmd.f  = ctlw.f;
    hwy.cmd.s1 = cmd_data && dw.s1;
    hwy.cmd.s2 = cmd_data && dw.s2;
    hwy.cmd.z  = dw.z;
    hwy.cmd.b  = cmd_data && dw.b;
    hwy.cmd.w  = cmd_wr ? dw.w : 24'h0;
    hwy.inh    = ctlw.inh;
    hwy.clr    = ctlw.clr && cmd_data && dw.s2;
  end

  // dataway response
  always_comb begin
    dw_rsp = '0;
    dw_rsp.l = sel && eos;
    if (cmd_data) begin
      dw_rsp.r   = cmd_rd ? hwy_rsp.r : 24'h0;
      dw_rsp.x   = hwy_rsp.x;
      dw_rsp.q   = hwy_rsp.q;
      dw_rsp.rdy = hwy_rsp.rdy;
    end else if (cmd_sense) begin
      dw_rsp.r   = {cnt_c, cnt_n, cnt_a, ctlw[11:0]};
      dw_rsp.x   = 1'b1; dw_rsp.q = 1'b1; dw_rsp.rdy = 1'b1;
    end else if (cmd_ld) begin
      dw_rsp.x   = 1'b1; dw_rsp.q = 1'b1; dw_rsp.rdy = 1'b1;
    end else if (sel) begin
      dw_rsp.rdy = 1'b1;
    end
  end
endmodule
