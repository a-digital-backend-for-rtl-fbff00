// 1PPS interrupter.
//
// The site one-second tick is shared with the data-ready interrupt through
// the FPGA's interrupt mask. This block brings the asynchronous 1PPS level
// into the clock domain through two flip-flops and emits a one-cycle tick at
// each rising edge (the active edge is this design's choice). Latency: the
// tick comes 3 clocks after the edge.
module pps_interrupter (
  input  logic clk,
  input  logic rst_n,
  input  logic pps,
  output logic tick
);
  logic [2:0] s;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s    <= '0;
      tick <= 1'b0;
    end else begin
      s    <= {s[1:0], pps};
      tick <= s[1] & ~s[2];
    end
  end
endmodule
