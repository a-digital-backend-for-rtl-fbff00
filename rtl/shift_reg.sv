// Serial-to-parallel converter for one ADC channel.
//
// Each shift strobe moves the (demodulated) serial bit into the low end of a
// W-bit register, so a word sent most significant bit first is complete
// after W strobes. The proposal gives the 20-bit shift register; the bit
// order (MSB first, as the DDC101 sends it) is this design's assumption.
module shift_reg #(
  parameter int unsigned W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         din,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)     q <= '0;
    else if (shift) q <= {q[W-2:0], din};
  end
endmodule
