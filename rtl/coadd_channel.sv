// Digital integrator for one radiometer signal.
//
// An ACC_W-bit unsigned accumulator adds each SAMPLE_W-bit sample. When the
// sample that ends an integration is added (add and dump together) the
// complete sum goes into the output latch, which the host reads, and the
// accumulator restarts from zero. clear zeroes the accumulator without
// touching the latch (an integration discarded by the host). Sums wrap at
// 2**ACC_W; with 20-bit samples 4096 full-scale samples always fit, and the
// proposal's 819.2 ms limit keeps real 19-bit data in range. Latency: sum is
// valid the cycle after the dumping add.
module coadd_channel #(
  parameter int unsigned SAMPLE_W = 20,
  parameter int unsigned ACC_W    = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                add,
  input  logic [SAMPLE_W-1:0] sample,
  input  logic                dump,
  input  logic                clear,
  output logic [ACC_W-1:0]    sum
);
  logic [ACC_W-1:0] acc;
  wire  [ACC_W-1:0] nxt = acc + ACC_W'(sample);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0;
      sum <= '0;
    end else if (clear) begin
      acc <= '0;
    end else if (add) begin
      if (dump) begin
        sum <= nxt;
        acc <= '0;
      end else begin
        acc <= nxt;
      end
    end
  end
endmodule
