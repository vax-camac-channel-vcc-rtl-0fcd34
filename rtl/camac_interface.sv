// camac_interface: the CAMAC Interface board of the VCC. It is a peripheral of
// the VCC CPU: the CPU drives the I/O ucode bus and the Y bus, reads the DB bus
// and watches a 2-bit CAMAC status. The board holds
//   - the Branch register (crate C and station N of the Branch Driver, plus the
//     function F and subaddress A of the branch cycle),
//   - the VCC byte of the CTLW (S, XM1, QM1, XM2, QM2, P8, P16),
//   - the 24-bit Write register, loaded from the Y bus through a byte shifter,
//   - the 24-bit Read register and the Status register (X, Q, L, front-panel
//     sense switches), read on the DB bus through a byte shifter,
//   - the Cycle Control, with programmable speed in 1.6 us steps, and
//   - the Terminate Decoder.
// Single-clock I/O codes act on the clock edge; a cycle command is latched in
// the instruction register and runs for the length of a CAMAC cycle. The CAMAC
// status bus reads CAS_BUSY while a cycle runs and afterwards one of the three
// results of the cycle: data transferred, no data, or terminate.
// Read data, X and Q are taken at the end of S1; L is taken at the end of the
// cycle, after the Branch Driver has stepped its counters.
// Register set, byte shifters, cycle control and terminate decoder follow the
// source design; the code values, status encoding and sampling points are this
// design's own. Z is not driven (held low).
// rst_n is both the asynchronous reset of the registers and the 'disable iff'
// condition of the handshake assertions, so lint reports it as used both ways.
module camac_interface
  import vcc_pkg::*;
#(
  parameter int unsigned CLK_PER_STEP = 16,
  parameter int unsigned RDY_TIMEOUT  = 10000
) (
  input  logic        clk,
  input  logic        rst_n,
  // VCC buses
  input  io_op_t      io_code,
  input  logic [15:0] y_bus,
  output logic [15:0] db,      // this board's DB bus drive (valid for CA_RD_* codes)
  output logic [1:0]  status,
  input  logic [3:0]  sense,   // front-panel sense switches
  // SLAC differential branch
  output branch_cmd_t br,
  input  branch_rsp_t br_rsp
);
  logic [2:0]  br_c;
  logic [4:0]  br_n, br_f;
  logic [3:0]  br_a, speed;
  vcc_ctl_t    ctl;
  logic [23:0] wreg, rreg, w_new;
  logic        xl, ql, ll, data_cyc, tmo_l;
  logic [1:0]  result;
  logic        acc_l, term_l;
  bs_wsel_t    wsel;
  bs_rsel_t    rsel;
  logic        cyc_start, cyc_busy, b, s1, s2, sample, done, timeout;
  logic        accept, terminate, xq_stop, eos;
  logic [15:0] bs_db;

  // decoder: byte shifter lane selection
  always_comb begin
    unique case (io_code)
      CA_LD_W_HI: wsel = BS_W_HI;
      CA_LD_W_H:  wsel = BS_W_H;
      CA_LD_W_B0: wsel = BS_W_B0;
      CA_LD_W_B1: wsel = BS_W_B1;
      default:    wsel = BS_W_LO;
    endcase
    unique case (io_code)
      CA_RD_HI: rsel = BS_R_HI;
      CA_RD_B0: rsel = BS_R_B0;
      CA_RD_B1: rsel = BS_R_B1;
      default:  rsel = BS_R_LO;
    endcase
  end

  byte_shifter u_bs (.y(y_bus), .w_old(wreg), .wsel, .w_new, .r(rreg), .rsel, .db(bs_db));

  assign cyc_start = (io_code == CA_CYCLE_CMD || io_code == CA_CYCLE_DATA) && !cyc_busy;

  camac_cycle_ctrl #(.CLK_PER_STEP(CLK_PER_STEP), .RDY_TIMEOUT(RDY_TIMEOUT)) u_cyc (
    .clk, .rst_n, .start(cyc_start),
    .sync(io_code == CA_CYCLE_DATA && ctl.s),
    .speed, .rdy(br_rsp.rdy),
    .busy(cyc_busy), .b, .s1, .s2, .sample, .done, .timeout
  );

  terminate_decoder u_term (
    .ctl, .data_cycle(data_cyc), .x(xl), .q(ql), .l(br_rsp.l), .timeout(timeout),
    .accept, .terminate, .xq_stop, .eos
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      br_c <= '0; br_n <= '0; br_f <= '0; br_a <= '0; speed <= 4'd1;
      ctl <= '0; wreg <= '0; rreg <= '0; xl <= 1'b0; ql <= 1'b0; ll <= 1'b0;
      data_cyc <= 1'b0; result <= CAS_DATA; acc_l <= 1'b0; term_l <= 1'b0; tmo_l <= 1'b0;
    end else begin
      unique case (io_code)
        CA_LD_BRANCH: begin br_c <= y_bus[7:5]; br_n <= y_bus[4:0]; end
        CA_LD_FA:     begin br_f <= y_bus[8:4]; br_a <= y_bus[3:0]; end
        CA_LD_CTL:    ctl <= y_bus[7:0];
        CA_LD_SPEED:  speed <= y_bus[3:0];
        CA_LD_W_LO, CA_LD_W_HI, CA_LD_W_H, CA_LD_W_B0, CA_LD_W_B1: wreg <= w_new;
        default: ;
      endcase
      // instruction register: latch the kind of cycle being run
      if (cyc_start) begin
        data_cyc <= (io_code == CA_CYCLE_DATA);
        xl <= 1'b0; ql <= 1'b0;
      end
      if (sample) begin
        rreg <= br_rsp.r; xl <= br_rsp.x; ql <= br_rsp.q;
      end
      if (done) begin
        ll <= br_rsp.l; acc_l <= accept; term_l <= terminate; tmo_l <= timeout;
        result <= terminate ? CAS_TERM : (accept ? CAS_DATA : CAS_NODATA);
      end
    end
  end

  always_comb begin
    status = cyc_busy ? CAS_BUSY : result;
    unique case (io_code)
      CA_RD_LO, CA_RD_HI, CA_RD_B0, CA_RD_B1: db = bs_db;
      CA_RD_STAT: db = {sense, 4'b0, 2'b0, tmo_l, term_l, acc_l, ll, ql, xl};
      default: db = 16'h0000;
    endcase
    br.c  = br_c;
    br.n  = br_n;
    br.a  = br_a;
    br.f  = br_f;
    br.s1 = s1;
    br.s2 = s2;
    br.z  = 1'b0;
    br.b  = b;
    br.w  = wreg;
  end

  // a cycle command is only issued when the previous cycle has finished
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    (io_code == CA_CYCLE_CMD || io_code == CA_CYCLE_DATA) |-> !cyc_busy);
endmodule
