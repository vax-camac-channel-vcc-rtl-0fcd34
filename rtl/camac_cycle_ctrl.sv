// camac_cycle_ctrl: the Cycle Control of the VCC CAMAC interface. In the SLAC
// protocol the host interface makes the dataway timing, so this block generates
// the S1 and S2 strobes of every CAMAC cycle on the branch.
// The cycle length is programmable in steps of 1.6 us (from the source design):
// a cycle lasts speed * CLK_PER_STEP clocks (speed 0 counts as 1) and is split
// into four equal phases: address settle, S1, S2, release. With 'sync' set the
// block first waits for the R (ready) response of the addressed crate before it
// raises S1, as the S bit of the CTLW asks; if R does not come within
// RDY_TIMEOUT clocks the cycle ends with a 'timeout' pulse (together with
// 'done') and no strobes.
// B (Busy) is high for the whole dataway cycle, from the address phase to the
// end of the release phase, but not while the block waits for R.
// 'sample' pulses on the last clock of S1 (read data, X and Q are taken then);
// 'done' pulses on the last clock of the cycle. The clock rate (10 MHz, so 16
// clocks per 1.6 us), the four-phase split and the time-out are this design's own.
module camac_cycle_ctrl #(
  parameter int unsigned CLK_PER_STEP = 16,     // clocks per 1.6 us step, multiple of 4
  parameter int unsigned RDY_TIMEOUT  = 10000   // clocks to wait for R
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       sync,
  input  logic [3:0] speed,
  input  logic       rdy,
  output logic       busy,
  output logic       b,
  output logic       s1,
  output logic       s2,
  output logic       sample,
  output logic       done,
  output logic       timeout
);
  typedef enum logic [2:0] {C_IDLE, C_WAITR, C_ADDR, C_S1, C_S2, C_END} cstate_t;
  cstate_t st;
  logic [31:0] cnt;
  logic [31:0] phase_len;

  always_comb phase_len = ((speed == 4'd0) ? 32'd1 : 32'(speed)) * (CLK_PER_STEP / 4);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; cnt <= '0;
    end else begin
      unique case (st)
        C_IDLE: if (start) begin
          cnt <= '0;
          st <= sync ? C_WAITR : C_ADDR;
        end
        C_WAITR: begin
          if (rdy) begin cnt <= '0; st <= C_ADDR; end
          else if (cnt == RDY_TIMEOUT - 1) st <= C_IDLE;
          else cnt <= cnt + 1;
        end
        C_ADDR, C_S1, C_S2, C_END: begin
          if (cnt == phase_len - 1) begin
            cnt <= '0;
            case (st)
              C_ADDR:  st <= C_S1;
              C_S1:    st <= C_S2;
              C_S2:    st <= C_END;
              default: st <= C_IDLE;
            endcase
          end else cnt <= cnt + 1;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  always_comb begin
    busy   = (st != C_IDLE);
    b      = (st != C_IDLE) && (st != C_WAITR);
    s1     = (st == C_S1);
    s2     = (st == C_S2);
    sample = (st == C_S1) && (cnt == phase_len - 1);
    timeout = (st == C_WAITR) && !rdy && (cnt == RDY_TIMEOUT - 1);
    done    = ((st == C_END) && (cnt == phase_len - 1)) || timeout;
  end
endmodule
