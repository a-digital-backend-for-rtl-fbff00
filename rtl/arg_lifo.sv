// Command argument LIFO.
//
// The host sends a command's arguments first, as EPP data writes, and the
// command identifier last (postfix order). Each pushed byte is stacked by
// shifting eight NMAX-bit shift registers, one per bit of the byte, by one
// place, so args[k] is the k-th most recent byte (args[0] = last written).
// A command reads just the newest arguments it needs; older bytes fall off
// the end, so an abandoned command needs no clean-up. The structure follows
// the proposal; NMAX = 2 is the largest argument count of the command set.
module arg_lifo #(
  parameter int unsigned NMAX = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       push,
  input  logic [7:0] din,
  output logic [7:0] args [NMAX]
);
  logic [NMAX-1:0] row [8];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int b = 0; b < 8; b++) row[b] <= '0;
    end else if (push) begin
      for (int b = 0; b < 8; b++)
        row[b] <= (row[b] << 1) | NMAX'(din[b]);
    end
  end

  always_comb
    for (int k = 0; k < NMAX; k++)
      for (int b = 0; b < 8; b++) args[k][b] = row[b][k];
endmodule
