// system_crate_dataway: one System Crate as seen from the VCC. The crate's
// Branch Receiver and Crate Controller take the branch command, match the crate
// number C against this crate's number, raise the N line of the addressed
// station and pass F, A, W, S1, S2 and Z to the Branch Drivers on the dataway;
// the addressed station's read lines, X, Q, R and its L line (End of Scan) go
// back on the branch. Branch Drivers sit in stations 1..NUM_BD.
// The source design only names these parts; this is the simplest logic that
// does their routing. An unaddressed crate answers all zeros, so that the
// responses of several System Crates on one branch can be ORed. Combinational.
module system_crate_dataway
  import vcc_pkg::*;
#(
  parameter int unsigned NUM_BD    = 8,
  parameter logic [2:0]  CRATE_NUM = 3'd1
) (
  input  branch_cmd_t br,                 // branch from the VCC
  output branch_rsp_t br_rsp,             // reply to the VCC
  output logic        [NUM_BD-1:0] sel,   // N lines of the Branch Driver stations
  output branch_cmd_t dw,                 // dataway command lines
  input  branch_rsp_t bd_rsp [NUM_BD]     // replies of the Branch Drivers
);
  logic hit;
  always_comb begin
    hit = (br.c == CRATE_NUM);
    dw  = br;
    if (!hit) begin
      dw.s1 = 1'b0;
      dw.s2 = 1'b0;
      dw.b  = 1'b0;
    end
    br_rsp = '0;
    for (int i = 0; i < int'(NUM_BD); i++) begin
      sel[i] = hit && (br.n == 5'(i + 1));
      if (sel[i]) br_rsp = bd_rsp[i];
    end
  end
endmodule
