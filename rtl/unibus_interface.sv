// unibus_interface: the UNIBUS Interface and UNIBUS Driver boards of the VCC,
// joining the VCC CPU buses to the VAX UNIBUS. Three jobs:
//   slave : the VAX writes Start I/O words to the Start I/O register (BASE+0)
//           and reads the Test Device (TDV) status register (BASE+2). A new
//           Start I/O word is held off (no SSYN) until the CPU has read the
//           previous one, so the two sides need no FIFO.
//   DMA   : as UNIBUS master the board reads (DATI) or writes (DATO) one 16-bit
//           word at the UNIBUS address register, which then steps by 2.
//           Arbitration uses NPR/NPG/SACK/BBSY; a missing SSYN after
//           SSYN_TIMEOUT clocks sets the non-existent-memory error.
//   interrupt: BR/BG arbitration, then the interrupt vector register is put on
//           the data lines with INTR.
// The CPU drives the board with I/O ucode: single-clock codes load registers or
// read them onto the DB bus; DMA and interrupt codes are latched in the
// instruction register and run to completion. The 2-bit UNIBUS status reads
// UBS_BUSY while a transfer runs, UBS_ERR after a non-existent memory error,
// UBS_SIO when a Start I/O word is waiting, UBS_IDLE otherwise.
// The register set (data buffers, TDV, vector, address, control) follows the
// source design. The register addresses, the 18-bit address split, the timing
// of the handshakes and the time-out are this design's own, simplified from
// the UNIBUS rules (one BR level, no deskew delays beyond one clock).
// Bidirectional UNIBUS lines appear as separate in, out and enable signals.
// rst_n is both the asynchronous reset of the registers and the 'disable iff'
// condition of the handshake assertions, so lint reports it as used both ways.
module unibus_interface
  import vcc_pkg::*;
#(
  parameter logic [17:0] BASE         = 18'o764000,
  parameter int unsigned SSYN_TIMEOUT = 100      // 10 us at 10 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  // VCC buses
  input  io_op_t      io_code,
  input  logic [15:0] y_bus,
  output logic [15:0] db,
  output logic [1:0]  status,
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
  output logic        ub_ma_oe,    // enables a, c and msyn drivers
  output logic [15:0] ub_d_out,
  output logic        ub_d_oe,
  output logic        ub_msyn_out,
  output logic        ub_ssyn_out,
  output logic        ub_npr_out,
  output logic        ub_br_out,
  output logic        ub_sack_out,
  output logic        ub_bbsy_out,
  output logic        ub_intr_out
);
  typedef enum logic [3:0] {
    M_IDLE, M_NPR, M_BR, M_SACK, M_ADDR, M_MSYN, M_WAITSS, M_INTR, M_DONE
  } mstate_t;
  mstate_t     mst;
  logic        is_read, is_intr;
  logic [17:0] addr;
  logic [15:0] dbuf_in, dbuf_out, tdv, vec, sio;
  logic        sio_full, nxm;
  logic [15:0] tcnt;
  logic        slave_sel, slave_ack;

  // ---------------- slave side ----------------
  assign slave_sel = ub_msyn_in && !ub_bbsy_out && (ub_a_in[17:2] == BASE[17:2]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sio <= '0; sio_full <= 1'b0; slave_ack <= 1'b0;
    end else begin
      if (io_code == UB_RD_SIO) sio_full <= 1'b0;
      if (!ub_msyn_in) slave_ack <= 1'b0;
      else if (slave_sel && !slave_ack) begin
        if (ub_c_in == UB_DATO && ub_a_in[1] == 1'b0) begin
          if (!sio_full && io_code != UB_RD_SIO) begin
            sio <= ub_d_in; sio_full <= 1'b1; slave_ack <= 1'b1;
          end
        end else begin
          slave_ack <= 1'b1;       // reads, and writes to the read-only TDV
        end
      end
    end
  end

  // ---------------- master side ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mst <= M_IDLE; is_read <= 1'b0; is_intr <= 1'b0; addr <= '0;
      dbuf_in <= '0; dbuf_out <= '0; tdv <= '0; vec <= '0; nxm <= 1'b0; tcnt <= '0;
    end else begin
      unique case (io_code)
        UB_LD_ADDR_LO: addr[15:0]  <= y_bus;
        UB_LD_ADDR_HI: addr[17:16] <= y_bus[1:0];
        UB_LD_DATA:    dbuf_out    <= y_bus;
        UB_LD_TDV:     tdv         <= y_bus;
        UB_LD_VEC:     vec         <= y_bus;
        UB_CLR_ERR:    nxm         <= 1'b0;
        default: ;
      endcase
      unique case (mst)
        M_IDLE: begin
          if (io_code == UB_DMA_RD || io_code == UB_DMA_WR) begin
            is_read <= (io_code == UB_DMA_RD); is_intr <= 1'b0; mst <= M_NPR;
          end else if (io_code == UB_INTR) begin
            is_intr <= 1'b1; mst <= M_BR;
          end
        end
        M_NPR: if (ub_npg_in) mst <= M_SACK;
        M_BR:  if (ub_bg_in)  mst <= M_SACK;
        M_SACK: if (!ub_npg_in && !ub_bg_in && !ub_bbsy_in && !ub_ssyn_in)
                  mst <= is_intr ? M_INTR : M_ADDR;
        M_ADDR: mst <= M_MSYN;                      // address and data settle
        M_MSYN: begin tcnt <= '0; mst <= M_WAITSS; end
        M_WAITSS, M_INTR: begin
          if (ub_ssyn_in) begin
            if (is_read && !is_intr) dbuf_in <= ub_d_in;
            mst <= M_DONE;
          end else if (tcnt == 16'(SSYN_TIMEOUT - 1)) begin
            nxm <= 1'b1; mst <= M_DONE;
          end else tcnt <= tcnt + 1;
        end
        M_DONE: if (!ub_ssyn_in || nxm) begin
          if (!is_intr) addr <= addr + 18'd2;
          mst <= M_IDLE;
        end
        default: mst <= M_IDLE;
      endcase
    end
  end

  always_comb begin
    ub_npr_out  = (mst == M_NPR);
    ub_br_out   = (mst == M_BR);
    ub_sack_out = (mst == M_SACK);
    ub_bbsy_out = (mst == M_ADDR) || (mst == M_MSYN) || (mst == M_WAITSS) ||
                  (mst == M_INTR) || (mst == M_DONE && ub_ssyn_in && !nxm);
    ub_ma_oe    = !is_intr && ((mst == M_ADDR) || (mst == M_MSYN) || (mst == M_WAITSS));
    ub_a_out    = addr;
    ub_c_out    = is_read ? UB_DATI : UB_DATO;
    ub_msyn_out = !is_intr && (mst == M_WAITSS);
    ub_intr_out = (mst == M_INTR);
    ub_ssyn_out = slave_ack;
    // data lines: DMA write data, interrupt vector, or slave read of TDV
    ub_d_oe  = 1'b0;
    ub_d_out = 16'h0000;
    if (!is_intr && !is_read && (mst == M_ADDR || mst == M_MSYN || mst == M_WAITSS)) begin
      ub_d_oe = 1'b1; ub_d_out = dbuf_out;
    end else if (mst == M_INTR) begin
      ub_d_oe = 1'b1; ub_d_out = vec;
    end else if (slave_ack && ub_c_in == UB_DATI) begin
      ub_d_oe = 1'b1; ub_d_out = ub_a_in[1] ? tdv : {15'h0, sio_full};
    end
    unique case (io_code)
      UB_RD_SIO:  db = sio;
      UB_RD_DATA: db = dbuf_in;
      default:    db = 16'h0000;
    endcase
    if (mst != M_IDLE)  status = UBS_BUSY;
    else if (nxm)       status = UBS_ERR;
    else if (sio_full)  status = UBS_SIO;
    else                status = UBS_IDLE;
  end

  a_one_transfer: assert property (@(posedge clk) disable iff (!rst_n)
    (io_code inside {UB_DMA_RD, UB_DMA_WR, UB_INTR}) |-> mst == M_IDLE);
endmodule
