// vcc_pkg: types and constants shared by the VAX CAMAC Channel (VCC), its
// UNIBUS and CAMAC interfaces, the System Crate dataway and the Branch Drivers.
//
// The 32-bit Control Word (CTLW) splits into a VCC byte (bits 31..24) that the
// channel keeps for itself and a 24-bit Branch Driver part (bits 23..0) written
// to the Branch Driver with F(17). The field set follows the CTLW table of the
// source design: crate/module/subaddress, Inhibit and Clear, the scan enables
// SC/SM/SA, the ILQ and IN scan rules, the function code, the R-synchronise bit
// S, the data acceptance bits XM1/QM1, the termination bits XM2/QM2 and the
// packing bits P8/P16. The exact bit position of each VCC-byte bit and the
// order of crate and module inside bits 23..16 are this design's reading.
//
// The I/O microcode is the 8-bit command the channel controller puts on the
// I/O ucode bus; the UNIBUS interface decodes codes 8'h0x and the CAMAC
// interface codes 8'h8x. The code values are this design's own.
package vcc_pkg;

  // Branch Driver part of the CTLW (bits 23..0)
  typedef struct packed {
    logic [2:0] c;     // 23..21 initial crate
    logic [4:0] n;     // 20..16 initial module (station)
    logic [3:0] a;     // 15..12 initial subaddress
    logic       inh;   // 11 CAMAC Inhibit line
    logic       clr;   // 10 CAMAC Clear line
    logic       in_;   // 9  IN : reset least counter and step the next one if X=0
    logic       ilq;   // 8  ILQ: step the least counter only if Q=0
    logic       sc;    // 7  scan crate
    logic       sm;    // 6  scan module
    logic       sa;    // 5  scan subaddress
    logic [4:0] f;     // 4..0 function code
  } bd_ctlw_t;

  // VCC byte of the CTLW (bits 31..24)
  typedef struct packed {
    logic rsv;   // 31
    logic s;     // 30 wait for R before S1/S2
    logic xm2;   // 29 terminate if X=0
    logic qm2;   // 28 terminate if Q=0
    logic xm1;   // 27 transfer data only if X=1
    logic qm1;   // 26 transfer data only if Q=1
    logic p16;   // 25 pack two 16-bit CAMAC words per longword
    logic p8;    // 24 pack four 8-bit CAMAC words per longword
  } vcc_ctl_t;

  typedef struct packed {
    vcc_ctl_t vcc;
    bd_ctlw_t bd;
  } ctlw_t;

  typedef enum logic [1:0] {PK_NONE = 2'd0, PK_16 = 2'd1, PK_8 = 2'd2} pack_t;

  function automatic pack_t pack_mode(vcc_ctl_t v);
    if (v.p8)       return PK_8;   // P8 wins if both bits are set
    else if (v.p16) return PK_16;
    else            return PK_NONE;
  endfunction

  // CAMAC functions the VCC uses on a Branch Driver
  localparam logic [4:0] F_RD_DATA  = 5'd0;   // read highway data
  localparam logic [4:0] F_RD_CTLW  = 5'd1;   // read CTLW register
  localparam logic [4:0] F_WR_DATA  = 5'd16;  // write highway data
  localparam logic [4:0] F_WR_CTLW  = 5'd17;  // write CTLW register

  // Branch (VCC -> System Crates, and Branch Driver -> highway) command lines
  typedef struct packed {
    logic [2:0]  c;
    logic [4:0]  n;
    logic [3:0]  a;
    logic [4:0]  f;
    logic        s1;
    logic        s2;
    logic        z;
    logic        b;      // Busy: a dataway cycle is in progress
    logic [23:0] w;
  } branch_cmd_t;

  // Branch response lines
  typedef struct packed {
    logic [23:0] r;
    logic        x;
    logic        q;
    logic        rdy;  // R: addressed crate controller ready
    logic        l;    // End of Scan (System Crate L line of the addressed station)
  } branch_rsp_t;

  // Branch Driver highway outputs: command lines plus Clear and Inhibit
  typedef struct packed {
    branch_cmd_t cmd;
    logic        clr;
    logic        inh;
  } hwy_out_t;

  // I/O microcode
  typedef enum logic [7:0] {
    IO_NOP        = 8'h00,
    UB_RD_SIO     = 8'h01,  // DB <- Start I/O word, frees the register
    UB_LD_ADDR_LO = 8'h02,  // UNIBUS address [15:0] <- Y
    UB_LD_ADDR_HI = 8'h03,  // UNIBUS address [17:16] <- Y[1:0]
    UB_LD_DATA    = 8'h04,  // data buffer to UNIBUS <- Y
    UB_DMA_WR     = 8'h05,  // start DATO
    UB_DMA_RD     = 8'h06,  // start DATI
    UB_RD_DATA    = 8'h07,  // DB <- data buffer from UNIBUS
    UB_LD_TDV     = 8'h08,  // Test Device status register <- Y
    UB_LD_VEC     = 8'h09,  // interrupt vector register <- Y
    UB_INTR       = 8'h0A,  // start vectored interrupt
    UB_CLR_ERR    = 8'h0B,  // clear the non-existent-memory flag
    CA_LD_BRANCH  = 8'h80,  // branch register C,N <- Y[7:0]
    CA_LD_FA      = 8'h81,  // F <- Y[8:4], A <- Y[3:0]
    CA_LD_CTL     = 8'h82,  // VCC byte of the CTLW <- Y[7:0]
    CA_LD_SPEED   = 8'h83,  // cycle length in 1.6 us steps <- Y[3:0]
    CA_LD_W_LO    = 8'h84,  // W[15:0] <- Y
    CA_LD_W_HI    = 8'h85,  // W[23:16] <- Y[7:0]
    CA_LD_W_H     = 8'h86,  // W <- Y (16-bit packing)
    CA_LD_W_B0    = 8'h87,  // W <- Y[7:0] (8-bit packing, even byte)
    CA_LD_W_B1    = 8'h88,  // W <- Y[15:8] (8-bit packing, odd byte)
    CA_CYCLE_CMD  = 8'h89,  // CAMAC cycle addressed to the Branch Driver itself
    CA_CYCLE_DATA = 8'h8A,  // CAMAC data cycle (R sync, X/Q acceptance, termination)
    CA_RD_LO      = 8'h8B,  // DB <- R[15:0]
    CA_RD_HI      = 8'h8C,  // DB <- R[23:16]
    CA_RD_B0      = 8'h8D,  // DB <- R[7:0] in the low byte
    CA_RD_B1      = 8'h8E,  // DB <- R[7:0] in the high byte
    CA_RD_STAT    = 8'h8F   // DB <- CAMAC status register
  } io_op_t;

  // UNIBUS status bus
  localparam logic [1:0] UBS_IDLE = 2'b00, UBS_SIO = 2'b01, UBS_BUSY = 2'b10, UBS_ERR = 2'b11;
  // CAMAC status bus: the three exits of a CAMAC cycle, or busy
  localparam logic [1:0] CAS_BUSY = 2'b00, CAS_DATA = 2'b01, CAS_NODATA = 2'b10, CAS_TERM = 2'b11;

  // Byte shifter lane selections
  typedef enum logic [2:0] {
    BS_W_LO, BS_W_HI, BS_W_H, BS_W_B0, BS_W_B1
  } bs_wsel_t;
  typedef enum logic [1:0] {
    BS_R_LO, BS_R_HI, BS_R_B0, BS_R_B1
  } bs_rsel_t;

  // UNIBUS cycle codes on C1,C0
  localparam logic [1:0] UB_DATI = 2'b00, UB_DATO = 2'b10;

endpackage
