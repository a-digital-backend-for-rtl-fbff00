// Co-addition counter.
//
// A W-bit down counter reloaded from the co-addition count register, which
// holds the number of samples per hardware integration minus one. "last" is
// high while the counter is at zero (the borrow of the proposal's down
// counter): the sample being added then ends the integration, and counting
// that sample reloads the counter. load restarts the count at any time.
// The N-1 encoding, which makes every register value usable, is this
// design's choice.
module coadd_counter #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         count_en,
  input  logic [W-1:0] n_minus1,
  output logic         last
);
  logic [W-1:0] cnt;
  always_ff @(posedge clk) begin
    if (!rst_n)                cnt <= n_minus1;
    else if (load)             cnt <= n_minus1;
    else if (count_en) begin
      if (cnt == '0)           cnt <= n_minus1;
      else                     cnt <= cnt - 1'b1;
    end
  end
  assign last = (cnt == '0);
endmodule
