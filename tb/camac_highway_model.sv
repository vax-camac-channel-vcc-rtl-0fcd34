// camac_highway_model: behavioural stand-in for the crates on one Branch Driver
// highway (crate controllers and CAMAC modules). Crates 1..NCRATES exist, each
// with modules in stations 1..NMOD. X=1 for an existing module. Q=1 when the
// subaddress is not above the station number. Read data is expected_read(c,n,a)
// from the package-free function below; writes (F16..F23) are logged. After
// every S2 the addressed crate drops R (not ready) for RDY_DELAY clocks; a
// missing crate never gives R. Not synthesizable.
module camac_highway_model
  import vcc_pkg::*;
#(
  parameter int NCRATES   = 2,
  parameter int NMOD      = 5,
  parameter int RDY_DELAY = 3
) (
  input  logic        clk,
  input  hwy_out_t    hwy,
  output branch_rsp_t rsp
);
  int          rdy_cnt = 0;
  logic        s2_d = 1'b0, s1_d = 1'b0;
  int          nwrites = 0, nreads = 0, nclears = 0;
  logic [23:0] wlog [64];
  logic [11:0] wadr [64];
  logic        present;

  function automatic logic [23:0] expected_read(logic [2:0] c, logic [4:0] n, logic [3:0] a);
    return {c, n, a, ({c, n, a} ^ 12'hA5C)};
  endfunction

  always_comb begin
    present  = (int'(hwy.cmd.c) >= 1) && (int'(hwy.cmd.c) <= NCRATES);
    rsp      = '0;
    rsp.rdy  = present && (rdy_cnt == 0);
    rsp.x    = present && (int'(hwy.cmd.n) >= 1) && (int'(hwy.cmd.n) <= NMOD);
    rsp.q    = rsp.x && ({1'b0, hwy.cmd.a} <= hwy.cmd.n);
    if (rsp.x && hwy.cmd.f < 5'd8) rsp.r = expected_read(hwy.cmd.c, hwy.cmd.n, hwy.cmd.a);
  end

  always @(posedge clk) begin
    s2_d <= hwy.cmd.s2;
    s1_d <= hwy.cmd.s1;
    if (s2_d && !hwy.cmd.s2) rdy_cnt <= RDY_DELAY;
    else if (rdy_cnt > 0) rdy_cnt <= rdy_cnt - 1;
    if (hwy.cmd.s1 && !s1_d) begin
      if (hwy.cmd.f >= 5'd16 && hwy.cmd.f < 5'd24 && rsp.x && nwrites < 64) begin
        wlog[nwrites] <= hwy.cmd.w; wadr[nwrites] <= {hwy.cmd.c, hwy.cmd.n, hwy.cmd.a};
        nwrites <= nwrites + 1;
      end
      if (hwy.cmd.f < 5'd8) nreads <= nreads + 1;
    end
    if (hwy.clr && !s2_d) nclears <= nclears + 1;
  end
endmodule
