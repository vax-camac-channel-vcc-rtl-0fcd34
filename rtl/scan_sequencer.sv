// scan_sequencer: the address counters and Scan Sequencer of a Branch Driver.
// Three counters hold the crate (3 bits), module (5 bits) and subaddress
// (4 bits) of the next highway cycle. They are loaded from the CTLW and, after
// every highway data cycle ('step'), updated according to the scan bits:
//   SC/SM/SA enable scanning of crate, module and subaddress. The enabled
//   counters form one chain, subaddress least significant, crate most.
//   default : step the least significant enabled counter; an overflow resets it
//             and steps the next enabled counter.
//   ILQ     : step the least significant counter only if Q=0.
//   IN      : if X=0, reset the least significant counter and step the next.
//   When the most significant enabled counter overflows, End of Scan ('eos')
//   is set and stays set until the next load.
// Counter widths, the scan enables and the ILQ/IN rules follow the source
// design. The counter ranges (subaddress 0-15, module 1-23, crate 1-7), the
// values a reset counter takes (start of its range), IN taking precedence over
// ILQ and no End of Scan when no counter is enabled are this design's choices.
// The update takes effect on the clock edge where 'step' is high.
module scan_sequencer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [2:0] c_init,
  input  logic [4:0] n_init,
  input  logic [3:0] a_init,
  input  logic       sc,
  input  logic       sm,
  input  logic       sa,
  input  logic       ilq,
  input  logic       in_,
  input  logic       step,
  input  logic       x,
  input  logic       q,
  output logic [2:0] c,
  output logic [4:0] n,
  output logic [3:0] a,
  output logic       eos
);
  localparam logic [3:0] A_FIRST = 4'd0,  A_LAST = 4'd15;
  localparam logic [4:0] N_FIRST = 5'd1,  N_LAST = 5'd23;
  localparam logic [2:0] C_FIRST = 3'd1,  C_LAST = 3'd7;

  logic [2:0] c_nx;
  logic [4:0] n_nx;
  logic [3:0] a_nx;
  logic       eos_nx;

  always_comb begin
    logic carry;        // step request travelling up the chain
    logic skip_least;   // IN: the least counter is reset, not stepped
    logic least_done;   // least significant enabled counter already handled
    c_nx = c; n_nx = n; a_nx = a; eos_nx = eos;
    carry = 1'b0; skip_least = 1'b0; least_done = 1'b0;
    if (sa | sm | sc) begin
      if (in_ && !x) begin
        carry = 1'b1; skip_least = 1'b1;
      end else if (ilq && q) begin
        carry = 1'b0;
      end else begin
        carry = 1'b1;
      end
      // subaddress
      if (sa) begin
        least_done = 1'b1;
        if (carry) begin
          if (skip_least || a == A_LAST) begin a_nx = A_FIRST; carry = 1'b1; end
          else begin a_nx = a + 4'd1; carry = 1'b0; end
        end
      end
      // module
      if (sm) begin
        if (carry) begin
          if ((skip_least && !least_done) || n == N_LAST) begin n_nx = N_FIRST; carry = 1'b1; end
          else begin n_nx = n + 5'd1; carry = 1'b0; end
        end
        least_done = 1'b1;
      end
      // crate
      if (sc) begin
        if (carry) begin
          if ((skip_least && !least_done) || c == C_LAST) begin c_nx = C_FIRST; carry = 1'b1; end
          else begin c_nx = c + 3'd1; carry = 1'b0; end
        end
      end
      if (carry) eos_nx = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= '0; n <= '0; a <= '0; eos <= 1'b0;
    end else if (load) begin
      c <= c_init; n <= n_init; a <= a_init; eos <= 1'b0;
    end else if (step) begin
      c <= c_nx; n <= n_nx; a <= a_nx; eos <= eos_nx;
    end
  end
endmodule
