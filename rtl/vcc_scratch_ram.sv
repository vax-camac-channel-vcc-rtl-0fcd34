// vcc_scratch_ram: the 256 x 16 fast scratch-pad RAM of the VCC CPU, which the
// CPU uses beside its own registers. Size from the source design. One write
// port (written on the clock edge when 'we' is high) and one asynchronous read
// port, like the bipolar RAM chips of the period. The channel controller keeps
// the Start I/O parameter words here.
module vcc_scratch_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;
  assign rdata = mem[raddr];
endmodule
