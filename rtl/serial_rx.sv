// Serial readout controller for the A/D board.
//
// The A/D board sends the 8 MHz serial clock, one serial data line per ADC
// and a single ready line (the AND of the ADC ready outputs). All of them
// are brought into the FPGA clock domain through identical two-flip-flop
// synchronisers, so their relative timing is kept. A rising edge of ready
// while enable is high (the sequencer is waiting for an acquisition; a ready
// edge at any other time, e.g. after power-up, is ignored) starts a readout: for the next SAMPLE_W rising edges of the serial clock a
// one-cycle shift strobe is issued, with sdata_s holding the bit to take.
// After the last bit word_done pulses once and busy falls.
//
// The proposal fixes the 8 MHz serial clock, the 20-bit words and the
// single ready line. The bit-level handshake is this design's model of the
// DDC101: the ADC presents its MSB when it raises ready and changes data on
// falling serial-clock edges. This needs a system clock period below half a
// serial-clock period (62.5 ns); the default 40 MHz gives 25 ns.
module serial_rx #(
  parameter int unsigned NCH      = 16,
  parameter int unsigned SAMPLE_W = 20
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           sclk,
  input  logic [NCH-1:0] sdata,
  input  logic           ready,
  input  logic           enable,
  output logic           ready_s,
  output logic [NCH-1:0] sdata_s,
  output logic           shift,
  output logic           busy,
  output logic           word_done
);
  localparam int unsigned CW = $clog2(SAMPLE_W + 1);

  logic [NCH-1:0] d0;
  logic [1:0]     c, r;
  logic           c_q, r_q;
  logic [CW-1:0]  left;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d0 <= '0; sdata_s <= '0;
      c <= '0; r <= '0; c_q <= 1'b0; r_q <= 1'b0;
    end else begin
      d0 <= sdata; sdata_s <= d0;
      c  <= {c[0], sclk};
      r  <= {r[0], ready};
      c_q <= c[1];
      r_q <= r[1];
    end
  end

  assign ready_s = r[1];
  wire sclk_rise  = c[1] & ~c_q;
  wire ready_rise = r[1] & ~r_q;

  always_comb shift = busy & sclk_rise;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      left      <= '0;
      word_done <= 1'b0;
    end else begin
      word_done <= 1'b0;
      if (!busy) begin
        if (ready_rise && enable) begin
          busy <= 1'b1;
          left <= CW'(SAMPLE_W);
        end
      end else if (sclk_rise) begin
        left <= left - 1'b1;
        if (left == CW'(1)) begin
          busy      <= 1'b0;
          word_done <= 1'b1;
        end
      end
    end
  end
endmodule
