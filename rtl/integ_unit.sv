// Digital integration unit.
//
// Co-adds a configurable number of samples of each of NCH channels in
// ACC_W-bit unsigned registers. A coadd_counter marks the sample that ends
// each hardware integration; with that sample every channel's sum is
// latched, frame_valid pulses for one cycle (the cycle the latched sums
// appear on frame) and the accumulators restart from zero. restart discards
// the running integration: accumulators are zeroed and the counter reloaded.
//
// The calibration (noise-diode) signal changes only at the start of an
// integration, as the proposal asks: an on/off request is held until the
// next integration boundary or restart. Channel c of frame is
// frame[c*ACC_W +: ACC_W].
module integ_unit #(
  parameter int unsigned NCH      = 16,
  parameter int unsigned SAMPLE_W = 20,
  parameter int unsigned ACC_W    = 32,
  parameter int unsigned COADD_W  = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sample_valid,
  input  logic [NCH*SAMPLE_W-1:0] samples,
  input  logic [COADD_W-1:0]      coadd_n,
  input  logic                    restart,
  input  logic                    cal_on_req,
  input  logic                    cal_off_req,
  output logic [NCH*ACC_W-1:0]    frame,
  output logic                    frame_valid,
  output logic                    cal_on
);
  logic last;
  wire  dump = sample_valid & last & ~restart;

  coadd_counter #(.W(COADD_W)) u_cnt (
    .clk, .rst_n, .load(restart), .count_en(sample_valid),
    .n_minus1(coadd_n), .last
  );

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    coadd_channel #(.SAMPLE_W(SAMPLE_W), .ACC_W(ACC_W)) u_ch (
      .clk, .rst_n,
      .add   (sample_valid),
      .sample(samples[c*SAMPLE_W +: SAMPLE_W]),
      .dump  (last),
      .clear (restart),
      .sum   (frame[c*ACC_W +: ACC_W])
    );
  end

  // Pending cal request: 2'b10 = turn on, 2'b01 = turn off, 0 = none.
  logic [1:0] cal_pend;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      frame_valid <= 1'b0;
      cal_on      <= 1'b0;
      cal_pend    <= '0;
    end else begin
      frame_valid <= dump;
      if (dump || restart) begin
        if (cal_pend[1])      cal_on <= 1'b1;
        else if (cal_pend[0]) cal_on <= 1'b0;
        cal_pend <= '0;
      end
      if (cal_on_req)        cal_pend <= 2'b10;
      else if (cal_off_req)  cal_pend <= 2'b01;
    end
  end
endmodule
