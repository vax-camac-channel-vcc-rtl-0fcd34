// vcc_camac_system: the Mark II CAMAC system from the VAX UNIBUS down to the
// Branch Driver highways. The VAX passes a channel program to the VAX CAMAC
// Channel (VCC) with Start I/O writes; the VCC runs it without further help from
// the VAX, talking to the System Crates over one branch. Each System Crate holds
// Branch Drivers, and every Branch Driver drives a highway of up to 7 crates.
// Inside the VCC: the channel controller (the CPU's program), its 256-word
// scratch RAM, the UNIBUS interface and the CAMAC interface, joined by the DB,
// Y, status and I/O ucode buses. The DB bus is the OR of what the interfaces
// drive (each drives zero unless its read code is on the I/O ucode bus).
// Defaults: 7 System Crates (crate numbers 1..7 on the VCC branch) with 8 Branch
// Drivers each (stations 1..8), i.e. 56 highways of up to 7 crates, the largest
// system the source design describes (56 branches, 392 crates). The split 7 x 8
// is this design's reading. Highways are ports of this module; the crates on
// them (crate controllers and modules) are outside.
// The VCC never drives Z (dataway initialise), so the highways' Z lines stay 0.
// rst_n is both the asynchronous reset of the registers and the 'disable iff'
// condition of the handshake assertions, so lint reports it as used both ways.
module vcc_camac_system
  import vcc_pkg::*;
#(
  parameter int unsigned NUM_SYS_CRATES = 7,
  parameter int unsigned NUM_BD         = 8,
  parameter int unsigned CLK_PER_STEP   = 16,
  parameter int unsigned RDY_TIMEOUT    = 10000,
  parameter int unsigned SSYN_TIMEOUT   = 100,
  parameter logic [17:0] BASE           = 18'o764000,
  parameter logic [15:0] VECTOR         = 16'o300
) (
  input  logic        clk,
  input  logic        rst_n,
  // UNIBUS
  input  logic [17:0] ub_a_in,
  input  logic [1:0]  ub_c_in,
  input  logic [15:0] ub_d_in,
  input  logic        ub_msyn_in,
  input  logic        ub_ssyn_in,
  input  logic        ub_npg_in,
  input  logic        ub_bg_in,
  input  logic        ub_bbsy_in,
  output logic [17:0] ub_a_out,
  output logic [1:0]  ub_c_out,
  output logic        ub_ma_oe,
  output logic [15:0] ub_d_out,
  output logic        ub_d_oe,
  output logic        ub_msyn_out,
  output logic        ub_ssyn_out,
  output logic        ub_npr_out,
  output logic        ub_br_out,
  output logic        ub_sack_out,
  output logic        ub_bbsy_out,
  output logic        ub_intr_out,
  // front panel
  input  logic [3:0]  sense,
  output logic        vcc_busy,
  // Branch Driver highways, index (system crate - 1) * NUM_BD + (station - 1)
  output hwy_out_t    hwy     [NUM_SYS_CRATES*NUM_BD],
  input  branch_rsp_t hwy_rsp [NUM_SYS_CRATES*NUM_BD]
);
  io_op_t      io_code;
  logic [15:0] y_bus, db_bus, db_ub, db_ca;
  logic [1:0]  ub_status, ca_status;
  logic        ram_we;
  logic [7:0]  ram_waddr, ram_raddr;
  logic [15:0] ram_wdata, ram_rdata;
  branch_cmd_t br;
  branch_rsp_t br_rsp;
  branch_rsp_t sc_rsp [NUM_SYS_CRATES];

  assign db_bus = db_ub | db_ca;

  vcc_channel_ctrl #(.VECTOR(VECTOR)) u_ctrl (
    .clk, .rst_n, .io_code, .y_bus, .db_bus, .ub_status, .ca_status,
    .ram_we, .ram_waddr, .ram_wdata, .ram_raddr, .ram_rdata, .busy(vcc_busy)
  );

  vcc_scratch_ram #(.DEPTH(256), .WIDTH(16)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata), .raddr(ram_raddr), .rdata(ram_rdata)
  );

  unibus_interface #(.BASE(BASE), .SSYN_TIMEOUT(SSYN_TIMEOUT)) u_ub (
    .clk, .rst_n, .io_code, .y_bus, .db(db_ub), .status(ub_status),
    .ub_a_in, .ub_c_in, .ub_d_in, .ub_msyn_in, .ub_ssyn_in, .ub_npg_in, .ub_bg_in, .ub_bbsy_in,
    .ub_a_out, .ub_c_out, .ub_ma_oe, .ub_d_out, .ub_d_oe, .ub_msyn_out, .ub_ssyn_out,
    .ub_npr_out, .ub_br_out, .ub_sack_out, .ub_bbsy_out, .ub_intr_out
  );

  camac_interface #(.CLK_PER_STEP(CLK_PER_STEP), .RDY_TIMEOUT(RDY_TIMEOUT)) u_ca (
    .clk, .rst_n, .io_code, .y_bus, .db(db_ca), .status(ca_status), .sense,
    .br, .br_rsp
  );

  for (genvar s = 0; s < NUM_SYS_CRATES; s++) begin : g_sc
    logic [NUM_BD-1:0] sel;
    branch_cmd_t       dw;
    branch_rsp_t       bd_rsp [NUM_BD];

    system_crate_dataway #(.NUM_BD(NUM_BD), .CRATE_NUM(3'(s + 1))) u_dw (
      .br, .br_rsp(sc_rsp[s]), .sel, .dw, .bd_rsp
    );

    for (genvar b = 0; b < NUM_BD; b++) begin : g_bd
      branch_driver u_bd (
        .clk, .rst_n, .sel(sel[b]), .dw, .dw_rsp(bd_rsp[b]),
        .hwy(hwy[s*NUM_BD + b]), .hwy_rsp(hwy_rsp[s*NUM_BD + b])
      );
    end
  end

  // responses of unaddressed System Crates are all zero
  always_comb begin
    br_rsp = '0;
    for (int s = 0; s < int'(NUM_SYS_CRATES); s++) br_rsp = br_rsp | sc_rsp[s];
  end
endmodule
