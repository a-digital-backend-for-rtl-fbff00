// Phase-switch demodulator for one signal pair.
//
// The phase switches make the two detector/ADC outputs of a pair exchange
// identities every phase-switch state. Following the proposal, the exchange
// is undone on the serial ADC lines, before serial-to-parallel conversion,
// with a pair of 2:1 selectors: with swap low, a goes to r and b to l; with
// swap high they are crossed. Which state counts as unswapped is this
// design's choice (phase-switch master clock low). Purely combinational.
module ps_demod (
  input  logic a,
  input  logic b,
  input  logic swap,
  output logic r,
  output logic l
);
  always_comb begin
    r = swap ? b : a;
    l = swap ? a : b;
  end
endmodule
