// Counter-based retriggerable one-shot (digital monostable).
//
// A trigger loads the length register into a down counter and starts a
// prescaler; busy then stays high for exactly (len + 1) * PRESCALE clock
// cycles, after which done pulses for one cycle. A trigger while busy
// restarts the interval. The backend uses two of these: the phase-switch
// transition blanking timer (0.1 us units, 8 bits: 0.1 to 25.6 us) and the
// A/D integration timer (1 us units, 8 bits: 1 to 256 us), as the proposal
// specifies. Restarting the prescaler at each trigger, so that every
// interval has the same length to the clock cycle, is this design's choice.
//
// Timing: busy rises the cycle after trig; done pulses in the cycle busy
// falls.
module oneshot #(
  parameter int unsigned PRESCALE = 4,   // clocks per unit
  parameter int unsigned LEN_W    = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             trig,
  input  logic [LEN_W-1:0] len,
  output logic             busy,
  output logic             done
);
  localparam int unsigned PW = (PRESCALE > 1) ? $clog2(PRESCALE) : 1;

  logic [PW-1:0]    pre;
  logic [LEN_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      pre  <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (trig) begin
        busy <= 1'b1;
        pre  <= PW'(PRESCALE - 1);
        cnt  <= len;
      end else if (busy) begin
        if (pre != '0) begin
          pre <= pre - 1'b1;
        end else if (cnt != '0) begin
          pre <= PW'(PRESCALE - 1);
          cnt <= cnt - 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
