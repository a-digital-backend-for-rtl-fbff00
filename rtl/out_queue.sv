// 64-byte output queue.
//
// Holds one frame of integrations for the host, as the proposal describes:
// eight rows of NBYTES-bit shift registers, row b holding bit b of every
// byte. At the end of an integration the frame is jam-loaded, but only if
// the previous frame has been read out or cancelled (queue empty); otherwise
// the new frame is dropped and the partly read frame stays. byte_out is the
// byte formed by the current last bit of each row; advance (after the host
// has taken the byte) shifts every row by one, and after NBYTES advances the
// queue is empty again. cancel empties it at once.
//
// Byte order, this design's choice: frame byte i is frame[8*i +: 8], i.e.
// channel 0 first and each 32-bit sum least significant byte first.
// loaded / dropped pulse for one cycle when a frame is taken / discarded.
module out_queue #(
  parameter int unsigned NBYTES = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [NBYTES*8-1:0] frame,
  input  logic                advance,
  input  logic                cancel,
  output logic [7:0]          byte_out,
  output logic                empty,
  output logic                loaded,
  output logic                dropped
);
  localparam int unsigned CW = $clog2(NBYTES + 1);

  logic [NBYTES-1:0] row [8];
  logic [CW-1:0]     left;

  assign empty = (left == '0);

  always_comb
    for (int b = 0; b < 8; b++) byte_out[b] = row[b][0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      left    <= '0;
      loaded  <= 1'b0;
      dropped <= 1'b0;
      for (int b = 0; b < 8; b++) row[b] <= '0;
    end else begin
      loaded  <= 1'b0;
      dropped <= 1'b0;
      if (cancel) begin
        left <= '0;
      end else if (load && empty) begin
        left   <= CW'(NBYTES);
        loaded <= 1'b1;
        for (int b = 0; b < 8; b++)
          for (int i = 0; i < NBYTES; i++) row[b][i] <= frame[8*i + b];
      end else begin
        if (load) dropped <= 1'b1;
        if (advance && !empty) begin
          left <= left - 1'b1;
          for (int b = 0; b < 8; b++) row[b] <= {1'b0, row[b][NBYTES-1:1]};
        end
      end
    end
  end
endmodule
