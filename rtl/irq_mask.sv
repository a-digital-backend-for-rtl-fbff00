// Interrupt mask.
//
// Collects the origins of all interrupts raised since the host last read
// the mask: a pulse on set[i] sets bit i. The interrupt line is high while
// any bit is set. An EPP address read returns the mask: snap (start of the
// read) copies the mask into mask_out, which stays stable for the read, and
// clr (end of the read) clears the bits that were returned. Clearing only
// the returned bits, so a source that fires during the read is not lost, is
// this design's choice. Bit 0 = data frame ready, bit 1 = 1PPS; the other
// bits are free for further sources.
module irq_mask (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] set,
  input  logic       snap,
  input  logic       clr,
  output logic [7:0] mask_out,
  output logic       irq
);
  logic [7:0] mask;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mask     <= '0;
      mask_out <= '0;
    end else begin
      if (snap) mask_out <= mask;
      mask <= (clr ? (mask & ~mask_out) : mask) | set;
    end
  end
  assign irq = |mask;
endmodule
