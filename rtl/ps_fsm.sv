// Phase-switching state machine.
//
// Sequences the receiver through the 4-state phase-switch cycle and paces
// the A/D converters, following the proposal's step list for every
// phase-switch state:
//   1. once the ADCs report the previous sample acquired, toggle the state;
//   2. wait one transition blanking interval (0.1 us units, 8-bit one-shot);
//   3. start integrating (adc_acquire low) ...
//   4. ... for one integration interval (1 us units, 8-bit one-shot);
//   5. tell the ADCs to acquire (adc_acquire high);
//   6. wait for ready;
//   7. the serial readout starts (serial_rx, on the ready edge) while the
//      machine returns to step 1.
// Integration (adc_acquire low) lasts exactly (integ_len + 1) us. From the
// clock edge that toggles the switches to the start of integration is
// (blank_len + 1) * 0.1 us plus one clock, or longer if the readout of the
// previous sample is still running.
// The next integration also waits for the previous readout to finish, since
// reading the ADCs while they integrate adds noise. A stop request (run low)
// is honoured only after the 4th state of a cycle has been acquired.
//
// The switch pattern is printed in the proposal's timing figure: per state,
// (upper, lower) = (0,180), (180,180), (180,0), (0,0), the master clock
// (phase[0]) being low in the first state. From the 2-bit state counter:
// upper = phase[1] ^ phase[0], lower = ~phase[1]. The demodulator select
// for the sample being read out is the master clock of the state in which it
// was integrated. With psw_en low the switches are frozen in the first
// state, (0,180), whose outputs need no swap, while the state count goes on
// so that stop still waits for a cycle boundary; this is this design's
// choice. A change of psw_en takes effect at the next state, so that no
// sample is integrated across a change of the switches.
module ps_fsm #(
  parameter int unsigned CLK_MHZ = 40      // must be a multiple of 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       run,
  input  logic       psw_en,
  input  logic [7:0] blank_len,
  input  logic [7:0] integ_len,
  input  logic       adc_ready,
  input  logic       readout_busy,
  output logic       adc_acquire,
  output logic       ps_upper,
  output logic       ps_lower,
  output logic       swap,
  output logic       running,
  output logic       acq_wait,
  output logic [1:0] phase
);
  typedef enum logic [1:0] {S_IDLE, S_BLANK, S_INTEG, S_ACQ} st_e;
  st_e st;

  logic blank_trig, blank_busy, integ_trig, integ_busy;

  oneshot #(.PRESCALE(CLK_MHZ / 10), .LEN_W(8)) u_blank (
    .clk, .rst_n, .trig(blank_trig), .len(blank_len),
    .busy(blank_busy), .done());
  oneshot #(.PRESCALE(CLK_MHZ), .LEN_W(8)) u_integ (
    .clk, .rst_n, .trig(integ_trig), .len(integ_len),
    .busy(integ_busy), .done());

  // One-shots get one cycle to raise busy after a trigger.
  logic armed;
  // psw_en as sampled at the start of the current state.
  logic psw_q;

  always_comb begin
    blank_trig = 1'b0;
    integ_trig = 1'b0;
    unique case (st)
      S_IDLE:  blank_trig = run;
      S_BLANK: integ_trig = armed && !blank_busy && !readout_busy;
      S_ACQ:   blank_trig = adc_ready && !(phase == 2'd3 && !run);
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      phase <= 2'd3;          // the first toggle enters state 0
      swap  <= 1'b0;
      armed <= 1'b0;
      psw_q <= 1'b1;
    end else begin
      armed <= 1'b0;
      unique case (st)
        S_IDLE: if (run) begin
          phase <= phase + 1'b1;
          psw_q <= psw_en;
          armed <= 1'b1;
          st    <= S_BLANK;
        end
        S_BLANK: if (integ_trig) begin
          armed <= 1'b1;
          st    <= S_INTEG;
        end else armed <= armed;
        S_INTEG: if (!armed && !integ_busy) st <= S_ACQ;
        S_ACQ: if (adc_ready) begin
          swap <= psw_q & phase[0];
          if (phase == 2'd3 && !run) begin
            st <= S_IDLE;
          end else begin
            phase <= phase + 1'b1;
            psw_q <= psw_en;
            armed <= 1'b1;
            st    <= S_BLANK;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign adc_acquire = ~integ_busy;   // low for exactly the integration
  assign ps_upper    = psw_q & (phase[1] ^ phase[0]);
  assign ps_lower    = ~psw_q | ~phase[1];
  assign running     = (st != S_IDLE);
  assign acq_wait    = (st == S_ACQ);
endmodule
