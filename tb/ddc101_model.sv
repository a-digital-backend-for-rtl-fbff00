// Behavioural model of the A/D board: NCH 20-bit integrating ADCs with a
// common 8 MHz serial clock and a single ready line (the AND of the ADC
// ready outputs). Not synthesizable; time unit taken as 1 ns.
//
// When acquire rises each ADC takes the value on its val input, and after
// CONV_NS (aligned to a falling serial-clock edge) raises ready and drives
// its MSB. On every following falling edge the next bit is driven, MSB
// first, until all 20 bits are out; the line then rests low. Ready falls
// when acquire falls (a new integration starts).
module ddc101_model #(
  parameter int NCH     = 16,
  parameter int CONV_NS = 1000
) (
  input  logic            acquire,
  input  logic [19:0]     val [NCH],
  output logic            sclk,
  output logic [NCH-1:0]  sdata,
  output logic            ready
);
  logic [19:0] word [NCH];
  int          bits_left;
  bit          pending;
  longint      due;
  int          conversions = 0;

  initial begin
    sclk = 1'b0; sdata = '0; ready = 1'b0; bits_left = 0; pending = 0; due = 0;
    for (int c = 0; c < NCH; c++) word[c] = '0;
  end

  always begin
    #62 sclk = 1'b1;
    #63 sclk = 1'b0;
  end

  always @(posedge acquire) begin
    for (int c = 0; c < NCH; c++) word[c] = val[c];
    due     = $time + CONV_NS;
    pending = 1;
  end

  always @(negedge acquire) begin
    ready = 1'b0; pending = 0; bits_left = 0;
  end

  always @(negedge sclk) begin
    if (pending && acquire && $time >= due) begin
      for (int c = 0; c < NCH; c++) sdata[c] = word[c][19];
      bits_left = 19;
      pending   = 0;
      ready     = 1'b1;
      conversions++;
    end else if (bits_left > 0) begin
      for (int c = 0; c < NCH; c++) begin
        word[c]  = word[c] << 1;
        sdata[c] = word[c][19];
      end
      bits_left--;
    end else begin
      sdata = '0;
    end
  end
endmodule
