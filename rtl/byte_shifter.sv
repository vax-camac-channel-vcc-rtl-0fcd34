// byte_shifter: the byte shifters of the VCC CAMAC interface. They sit between
// the 16-bit CPU buses and the 24-bit CAMAC write and read registers and let the
// channel map CAMAC words into VAX longwords in three packing modes:
//   no packing : one CAMAC cycle per longword, bits 23..0 <-> bytes C,B,A
//   16-bit     : two cycles per longword, CAMAC bits 15..0 <-> bytes B,A then D,C
//   8-bit      : four cycles per longword, CAMAC bits 7..0 <-> bytes A,B,C,D
// The three modes follow the source design. Splitting each mode into per-word
// lane selections (the channel controller picks the lane) is this design's own.
// Write side: returns the new write-register value from the old one, the Y bus
// word and the lane. Read side: places part of the read register on the DB bus.
// Purely combinational.
module byte_shifter
  import vcc_pkg::*;
(
  input  logic [15:0] y,       // Y bus word from the CPU
  input  logic [23:0] w_old,   // current write register
  input  bs_wsel_t    wsel,
  output logic [23:0] w_new,   // next write register
  input  logic [23:0] r,       // read register
  input  bs_rsel_t    rsel,
  output logic [15:0] db       // DB bus word to the CPU
);
  always_comb begin
    unique case (wsel)
      BS_W_LO: w_new = {w_old[23:16], y};          // no packing, low word
      BS_W_HI: w_new = {y[7:0], w_old[15:0]};      // no packing, high byte
      BS_W_H:  w_new = {8'h00, y};                 // 16-bit packing
      BS_W_B0: w_new = {16'h0000, y[7:0]};         // 8-bit packing, even byte
      BS_W_B1: w_new = {16'h0000, y[15:8]};        // 8-bit packing, odd byte
      default: w_new = w_old;
    endcase
    unique case (rsel)
      BS_R_LO: db = r[15:0];
      BS_R_HI: db = {8'h00, r[23:16]};
      BS_R_B0: db = {8'h00, r[7:0]};
      BS_R_B1: db = {r[7:0], 8'h00};
      default: db = 16'h0000;
    endcase
  end
endmodule
