// vcc_channel_ctrl: the channel program of the VCC, built as a hard-wired state
// machine. In the source design this is microcode of a 16-bit AMD 2900
// bit-slice CPU; here the same flow drives the same four VCC buses: the I/O
// ucode bus and the Y bus out, the DB bus and the UNIBUS/CAMAC status buses in.
// Each state issues at most one I/O code, so one state stands for one
// microinstruction that touches a peripheral.
//
// Flow (one pass per packet, as in the microcode flow chart):
//   wait for the 5 Start I/O words (kept in the scratch RAM): channel program
//   address, data buffer address, status buffer address (all as UNIBUS byte
//   address / 4), data buffer length in bytes, cycle speed;
//   fetch a packet (3 longwords) by DMA; load branch register and CTLW and
//   write the Branch Driver part of the CTLW with F(17); work out where the data
//   goes and the direction (F0-F7 read, F16-F23 write, others no data); pick the
//   packing mode; then loop: run a CAMAC cycle, and on 'data transferred' count
//   bytes and move the data to or from VAX memory, on 'no data' just repeat,
//   on 'terminate' leave. The loop also ends when the byte count is reached.
//   Afterwards: align the data pointer to a longword (flushing a half word),
//   read the Branch Driver's CTLW with F(1), write 4 status words
//   (CTLW sense low, VCC byte and CTLW sense high, byte count, TDV), and go on
//   with the next packet if its command-chain bit is set and no error occurred.
//   Finally load the TDV register and raise the vectored interrupt.
// No data buffer: as in the source design, a channel program may run without a
// data buffer; read data is then dropped and CAMAC writes send 0. A data length
// of 0 in the Start I/O words marks this case (this design's own encoding).
// Likewise, without a status buffer (status address 0) no status is written.
// Packet layout (this design's own; the source gives only its contents):
//   longword 0 : CTLW
//   longword 1 : bit 31 command chain, bits 23..16 branch (C in 23..21,
//                station N in 20..16), bits 15..0 maximum byte count
//   longword 2 : bits 15..0 data offset in bytes from the data buffer start
// TDV bits: 0 done, 1 error, 2 R time-out, 3 non-existent memory, 4 data buffer
// too small, 5 ended by XM2/QM2, 6 ended by End of Scan, 7 ended by byte count,
// 15..8 packets completed. Errors abort the channel program.
// DMA: one 16-bit word per request. The UNIBUS address is loaded only when the
// word is not the one right after the previous DMA word (the interface steps
// its address by 2 itself), so the 16-bit-packed read loop takes 8 states per
// CAMAC cycle, not counting waits, the same as the original's basic cycle.
// Bytes per accepted cycle: 4 without packing, 2 with 16-bit, 1 with 8-bit
// packing (from the packing-mode definition).
module vcc_channel_ctrl
  import vcc_pkg::*;
#(
  parameter logic [15:0] VECTOR = 16'o300
) (
  input  logic        clk,
  input  logic        rst_n,
  output io_op_t      io_code,
  output logic [15:0] y_bus,
  input  logic [15:0] db_bus,
  input  logic [1:0]  ub_status,
  input  logic [1:0]  ca_status,
  // scratch RAM
  output logic        ram_we,
  output logic [7:0]  ram_waddr,
  output logic [15:0] ram_wdata,
  output logic [7:0]  ram_raddr,
  input  logic [15:0] ram_rdata,
  output logic        busy
);
  typedef enum logic [5:0] {
    S_IDLE, S_SIO, S_SU0, S_SU1, S_SU2, S_SU3, S_SU4, S_SU5,
    S_FETCH, S_FETCH_ST,
    S_LD0, S_LD1, S_LD2, S_LD3, S_LD4, S_LD5, S_LD6,
    S_DEST, S_SETRW, S_RUN, S_RWAIT, S_TSTAT, S_XFER,
    S_RDL0, S_RDH, S_RDB, S_NEXT,
    S_GET, S_GW0, S_GW1, S_GWH, S_GB0, S_GB1, S_GZ,
    S_TERM, S_SNS0, S_SNS1, S_SNS2, S_SNS3, S_SNS4, S_ST,
    S_FIN0, S_FIN1, S_FIN2, S_FIN3,
    D_A0, D_A1, D_D, D_GO, D_WAIT, D_GET
  } state_t;

  state_t      st, ret;
  logic [2:0]  k;
  logic [17:0] pkt_ptr, dbase, stat_ptr, data_ptr, dma_addr, ua_next;
  logic [15:0] dlen, dma_wdata, dma_rdata, wordreg, bytecnt, maxcnt, sense_lo;
  logic [7:0]  sense_hi, npk;
  logic [15:0] pw [6];
  logic        dma_rd, rd, wr, last, phase, nobuf, nostat;
  logic        e_rtmo, e_nxm, e_small, c_xq, c_eos, c_cnt, done_f;
  logic        ua_ok, skip_a;
  pack_t       pk;
  ctlw_t       ctlw;
  logic [15:0] tdv;

  assign ctlw = {pw[1], pw[0]};
  // The UNIBUS interface steps its address by 2 after each DMA word, so the
  // address is loaded only when the next word is not the one that follows.
  assign skip_a = ua_ok && (ua_next == dma_addr);
  assign tdv  = {npk, c_cnt, c_eos, c_xq, e_small, e_nxm, e_rtmo,
                 (e_rtmo | e_nxm | e_small), done_f};

  function automatic logic [15:0] bpc(pack_t p);
    unique case (p)
      PK_16:   return 16'd2;
      PK_8:    return 16'd1;
      default: return 16'd4;
    endcase
  endfunction

  // ---------------- outputs: one I/O code per state ----------------
  always_comb begin
    io_code   = IO_NOP;
    y_bus     = 16'h0000;
    ram_we    = 1'b0;
    ram_waddr = {5'd0, k};
    ram_wdata = db_bus;
    ram_raddr = 8'd0;
    unique case (st)
      S_IDLE: if (ub_status == UBS_ERR) io_code = UB_CLR_ERR;  // left by an NXM abort
      S_SIO:  begin io_code = UB_RD_SIO; ram_we = 1'b1; end
      S_SU1:  ram_raddr = 8'd1;
      S_SU2:  ram_raddr = 8'd2;
      S_SU3:  ram_raddr = 8'd3;
      S_SU4:  begin ram_raddr = 8'd4; io_code = CA_LD_SPEED; y_bus = ram_rdata; end
      S_SU5:  io_code = UB_CLR_ERR;
      S_LD0:  begin io_code = CA_LD_BRANCH; y_bus = {8'h00, pw[3][7:0]}; end
      S_LD1:  begin io_code = CA_LD_CTL;    y_bus = {8'h00, ctlw[31:24]}; end
      S_LD2:  begin io_code = CA_LD_W_LO;   y_bus = ctlw[15:0]; end
      S_LD3:  begin io_code = CA_LD_W_HI;   y_bus = {8'h00, ctlw[23:16]}; end
      S_LD4:  begin io_code = CA_LD_FA;     y_bus = {7'd0, F_WR_CTLW, 4'd0}; end
      S_LD5:  io_code = CA_CYCLE_CMD;
      S_SETRW: begin io_code = CA_LD_FA; y_bus = {7'd0, (wr ? F_WR_DATA : F_RD_DATA), 4'd0}; end
      S_RUN:  io_code = CA_CYCLE_DATA;
      S_TSTAT: io_code = CA_RD_STAT;
      S_RDL0: io_code = CA_RD_LO;
      S_RDH:  io_code = CA_RD_HI;
      S_RDB:  io_code = phase ? CA_RD_B1 : CA_RD_B0;
      S_GW0:  begin io_code = CA_LD_W_LO; y_bus = dma_rdata; end
      S_GW1:  begin io_code = CA_LD_W_HI; y_bus = dma_rdata; end
      S_GWH:  begin io_code = CA_LD_W_H;  y_bus = dma_rdata; end
      S_GB0:  begin io_code = CA_LD_W_B0; y_bus = dma_rdata; end
      S_GB1:  begin io_code = CA_LD_W_B1; y_bus = wordreg; end
      S_GZ:   io_code = CA_LD_W_H;                  // y_bus = 0: write zero
      S_SNS0: begin io_code = CA_LD_FA; y_bus = {7'd0, F_RD_CTLW, 4'd0}; end
      S_SNS1: io_code = CA_CYCLE_CMD;
      S_SNS3: io_code = CA_RD_LO;
      S_SNS4: io_code = CA_RD_HI;
      S_FIN0: begin io_code = UB_LD_TDV; y_bus = tdv | 16'h0001; end
      S_FIN1: begin io_code = UB_LD_VEC; y_bus = VECTOR; end
      S_FIN2: io_code = UB_INTR;
      D_A0:   if (!skip_a) begin io_code = UB_LD_ADDR_LO; y_bus = dma_addr[15:0]; end
              else if (dma_rd) io_code = UB_DMA_RD;
              else begin io_code = UB_LD_DATA; y_bus = dma_wdata; end
      D_A1:   begin io_code = UB_LD_ADDR_HI; y_bus = {14'd0, dma_addr[17:16]}; end
      D_D:    begin io_code = UB_LD_DATA; y_bus = dma_wdata; end
      D_GO:   io_code = dma_rd ? UB_DMA_RD : UB_DMA_WR;
      D_GET:  io_code = UB_RD_DATA;
      default: ;
    endcase
    busy = (st != S_IDLE) && (st != S_SIO);
  end

  // ---------------- sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ret <= S_IDLE; k <= '0;
      pkt_ptr <= '0; dbase <= '0; stat_ptr <= '0; data_ptr <= '0; dma_addr <= '0;
      dlen <= '0; dma_wdata <= '0; dma_rdata <= '0; wordreg <= '0; bytecnt <= '0;
      maxcnt <= '0; sense_lo <= '0; sense_hi <= '0; npk <= '0;
      for (int i = 0; i < 6; i++) pw[i] <= '0;
      dma_rd <= 1'b0; rd <= 1'b0; wr <= 1'b0; last <= 1'b0; phase <= 1'b0; nobuf <= 1'b0; nostat <= 1'b0;
      pk <= PK_NONE;
      e_rtmo <= 1'b0; e_nxm <= 1'b0; e_small <= 1'b0; ua_next <= '0; ua_ok <= 1'b0;
      c_xq <= 1'b0; c_eos <= 1'b0; c_cnt <= 1'b0; done_f <= 1'b0;
    end else begin
      unique case (st)
        // ---- wait for Start I/O ----
        S_IDLE: if (ub_status == UBS_SIO) st <= S_SIO;
        S_SIO: begin
          if (k == 3'd4) begin k <= '0; st <= S_SU0; end
          else begin k <= k + 3'd1; st <= S_IDLE; end
        end
        S_SU0: begin pkt_ptr  <= {ram_rdata, 2'b00}; st <= S_SU1; end
        S_SU1: begin dbase    <= {ram_rdata, 2'b00}; st <= S_SU2; end
        S_SU2: begin
          stat_ptr <= {ram_rdata, 2'b00}; nostat <= (ram_rdata == 16'd0); st <= S_SU3;
        end
        S_SU3: begin dlen     <= ram_rdata; nobuf <= (ram_rdata == 16'd0); st <= S_SU4; end
        S_SU4: begin
          npk <= '0; done_f <= 1'b0; e_rtmo <= 1'b0; e_nxm <= 1'b0; e_small <= 1'b0;
          st <= S_SU5;
        end
        S_SU5: begin k <= '0; st <= S_FETCH; end
        // ---- fetch packet ----
        S_FETCH: begin
          dma_addr <= pkt_ptr + 18'(2 * k); dma_rd <= 1'b1; ret <= S_FETCH_ST; st <= D_A0;
        end
        S_FETCH_ST: begin
          pw[k] <= dma_rdata;
          if (k == 3'd5) begin k <= '0; st <= S_LD0; end
          else begin k <= k + 3'd1; st <= S_FETCH; end
        end
        // ---- load branch and CTLW ----
        S_LD0: begin
          bytecnt <= '0; phase <= 1'b0; last <= 1'b0;
          c_xq <= 1'b0; c_eos <= 1'b0; c_cnt <= 1'b0; st <= S_LD1;
        end
        S_LD1: st <= S_LD2;
        S_LD2: st <= S_LD3;
        S_LD3: st <= S_LD4;
        S_LD4: st <= S_LD5;
        S_LD5: st <= S_LD6;
        S_LD6: if (ca_status != CAS_BUSY) begin
          if (ca_status == CAS_TERM) begin e_rtmo <= 1'b1; st <= S_SNS0; end
          else st <= S_DEST;
        end
        // ---- determine data destination, direction and packing ----
        S_DEST: begin
          data_ptr <= dbase + 18'(pw[4]);
          maxcnt   <= pw[2];
          rd <= (ctlw.bd.f < 5'd8);
          wr <= (ctlw.bd.f >= 5'd16) && (ctlw.bd.f < 5'd24);
          pk <= pack_mode(ctlw.vcc);
          if (!nobuf && 17'(pw[4]) + 17'(pw[2]) > 17'(dlen)) begin
            e_small <= 1'b1; st <= S_SNS0;
          end else st <= S_SETRW;
        end
        S_SETRW: begin
          if (maxcnt == 16'd0) st <= S_TERM;
          else if (wr) st <= S_GET;
          else st <= S_RUN;
        end
        // ---- CAMAC cycle loop ----
        S_RUN: st <= S_RWAIT;
        S_RWAIT: unique case (ca_status)
          CAS_DATA:   st <= S_XFER;
          CAS_NODATA: st <= S_RUN;
          CAS_TERM:   st <= S_TSTAT;
          default: ;
        endcase
        S_TSTAT: begin
          if (db_bus[5])      e_rtmo <= 1'b1;
          else if (db_bus[2]) c_eos  <= 1'b1;
          else                c_xq   <= 1'b1;
          if (db_bus[3]) begin last <= 1'b1; st <= S_XFER; end
          else st <= S_TERM;
        end
        S_XFER: begin
          bytecnt <= bytecnt + bpc(pk);
          if (!rd || nobuf) st <= S_NEXT;
          else if (pk == PK_8) st <= S_RDB;
          else st <= S_RDL0;
        end
        S_RDL0, S_RDH: begin
          dma_addr <= data_ptr; data_ptr <= data_ptr + 18'd2; dma_wdata <= db_bus;
          dma_rd <= 1'b0; ret <= (st == S_RDL0 && pk == PK_NONE) ? S_RDH : S_NEXT;
          st <= D_A0;
        end
        S_RDB: begin
          if (!phase) begin
            wordreg <= db_bus; phase <= 1'b1; st <= S_NEXT;
          end else begin
            dma_addr <= data_ptr; data_ptr <= data_ptr + 18'd2;
            dma_wdata <= wordreg | db_bus; phase <= 1'b0;
            dma_rd <= 1'b0; ret <= S_NEXT; st <= D_A0;
          end
        end
        S_NEXT: begin
          if (last) st <= S_TERM;
          else if (bytecnt >= maxcnt) begin c_cnt <= 1'b1; st <= S_TERM; end
          else if (wr) st <= S_GET;
          else st <= S_RUN;
        end
        // ---- get write data from the VAX ----
        S_GET: begin
          if (nobuf) st <= S_GZ;
          else if (pk == PK_8 && phase) st <= S_GB1;
          else begin
            dma_addr <= data_ptr; data_ptr <= data_ptr + 18'd2; dma_rd <= 1'b1;
            ret <= (pk == PK_NONE) ? S_GW0 : (pk == PK_16) ? S_GWH : S_GB0;
            st <= D_A0;
          end
        end
        S_GW0: begin
          dma_addr <= data_ptr; data_ptr <= data_ptr + 18'd2; dma_rd <= 1'b1;
          ret <= S_GW1; st <= D_A0;
        end
        S_GW1, S_GWH: st <= S_RUN;
        S_GB0: begin wordreg <= dma_rdata; phase <= 1'b1; st <= S_RUN; end
        S_GB1: begin phase <= 1'b0; st <= S_RUN; end
        S_GZ:  st <= S_RUN;
        // ---- longword align the data pointer ----
        S_TERM: begin
          if (rd && phase) begin
            dma_addr <= data_ptr; data_ptr <= data_ptr + 18'd2; dma_wdata <= wordreg;
            phase <= 1'b0; dma_rd <= 1'b0; ret <= S_TERM; st <= D_A0;
          end else if (rd && !nobuf && data_ptr[1]) begin
            dma_addr <= data_ptr; data_ptr <= data_ptr + 18'd2; dma_wdata <= 16'h0000;
            dma_rd <= 1'b0; ret <= S_TERM; st <= D_A0;
          end else st <= S_SNS0;
        end
        // ---- CTLW sense from the Branch Driver ----
        S_SNS0: st <= S_SNS1;
        S_SNS1: st <= S_SNS2;
        S_SNS2: if (ca_status != CAS_BUSY) begin
          if (ca_status == CAS_TERM) e_rtmo <= 1'b1;
          st <= S_SNS3;
        end
        S_SNS3: begin sense_lo <= db_bus; st <= S_SNS4; end
        S_SNS4: begin sense_hi <= db_bus[7:0]; npk <= npk + 8'd1; k <= '0; st <= S_ST; end
        // ---- packet status to the status buffer ----
        S_ST: begin
          if (k == 3'd4 || nostat) begin
            k <= '0;
            if (e_rtmo || e_nxm || e_small || !pw[3][15]) st <= S_FIN0;
            else begin pkt_ptr <= pkt_ptr + 18'd12; st <= S_FETCH; end
          end else begin
            dma_addr <= stat_ptr; stat_ptr <= stat_ptr + 18'd2; dma_rd <= 1'b0;
            unique case (k)
              3'd0:    dma_wdata <= sense_lo;
              3'd1:    dma_wdata <= {ctlw[31:24], sense_hi};
              3'd2:    dma_wdata <= bytecnt;
              default: dma_wdata <= tdv;
            endcase
            k <= k + 3'd1; ret <= S_ST; st <= D_A0;
          end
        end
        // ---- TDV and interrupt ----
        S_FIN0: begin done_f <= 1'b1; st <= S_FIN1; end
        S_FIN1: st <= S_FIN2;
        S_FIN2: st <= S_FIN3;
        S_FIN3: if (ub_status != UBS_BUSY) st <= S_IDLE;
        // ---- one DMA word ----
        D_A0: if (!skip_a) st <= D_A1;
              else st <= dma_rd ? D_WAIT : D_GO;
        D_A1: st <= dma_rd ? D_GO : D_D;
        D_D:  st <= D_GO;
        D_GO: st <= D_WAIT;
        D_WAIT: begin
          if (ub_status == UBS_ERR) begin e_nxm <= 1'b1; ua_ok <= 1'b0; st <= S_FIN0; end
          else if (ub_status != UBS_BUSY) begin
            ua_next <= dma_addr + 18'd2; ua_ok <= 1'b1;
            st <= dma_rd ? D_GET : ret;
          end
        end
        D_GET: begin dma_rdata <= db_bus; st <= ret; end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
