// Digital backend FPGA for a dual-beam continuum radiometer.
//
// Sixteen detector signals (two feeds x two polarisations x four bands) are
// integrated and digitised by 20-bit ADCs on a separate A/D board, whose
// serial outputs, serial clock and combined ready line come into this FPGA.
// The FPGA
//   - runs the 4-state phase-switch cycle of the two 180-degree switches and
//     the blank / integrate / acquire timing of the ADCs (ps_fsm);
//   - reads the ADC words serially (serial_rx) after undoing the phase-switch
//     identity swap of each pair of lines (ps_demod) and converts them to
//     20-bit integers (shift_reg);
//   - co-adds a programmable number of samples per channel into 32-bit sums
//     and switches the calibration diode at integration starts (integ_unit);
//   - offers each completed set of 16 sums to the host as a 64-byte frame
//     (out_queue), dropping it if the previous frame is still being read;
//   - talks to the host over an EPP parallel port (epp_if): arguments go to
//     a LIFO (arg_lifo), commands execute on arrival (cmd_exec), and an
//     interrupt mask (irq_mask) says whether a frame and/or the site 1PPS
//     tick (pps_interrupter) caused the shared interrupt.
// Everything runs on one clock of CLK_MHZ (a multiple of 10 MHz, at least
// 20 MHz so the 8 MHz serial clock can be sampled); the timers derive their
// 0.1 us and 1 us units from it.
//
// Channel numbering: pair p carries ADC lines 2p (a) and 2p+1 (b); after
// demodulation channel 2p is the signal seen on line a in phase states 0 and
// 2, channel 2p+1 the other one. Frame byte 4c+k is byte k (LSB first) of the
// sum of channel c.
module gbt_backend #(
  parameter int unsigned CLK_MHZ  = 40,
  parameter int unsigned NPAIRS   = 8,
  parameter int unsigned SAMPLE_W = 20,
  parameter int unsigned ACC_W    = 32,
  parameter int unsigned COADD_W  = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  // A/D board
  input  logic                adc_sclk,
  input  logic [2*NPAIRS-1:0] adc_sdata,
  input  logic                adc_ready,
  output logic                adc_acquire,
  // front end
  output logic                ps_upper,
  output logic                ps_lower,
  output logic                cal_on,
  output logic [1:0]          gain_sel,
  input  logic                pps,
  // EPP parallel port
  input  logic                epp_nwrite,
  input  logic                epp_ndstrb,
  input  logic                epp_nastrb,
  input  logic [7:0]          epp_din,
  output logic [7:0]          epp_dout,
  output logic                epp_doe,
  output logic                epp_wait,
  output logic                epp_intr,
  output logic                reconfig_n
);
  localparam int unsigned NCH = 2 * NPAIRS;

  // ---------------------------------------------------------------- host side
  logic       arg_push, cmd_go, q_advance, mask_snap, mask_clr;
  logic [7:0] wbyte, q_byte, mask_byte;
  logic [7:0] args [bk_pkg::NMAX];

  logic               run, psw_en, cal_on_req, cal_off_req, cancel, restart;
  logic [7:0]         blank_len, integ_len;
  logic [COADD_W-1:0] coadd_n;

  epp_if u_epp (
    .clk, .rst_n,
    .nwrite(epp_nwrite), .ndstrb(epp_ndstrb), .nastrb(epp_nastrb),
    .din(epp_din), .dout(epp_dout), .doe(epp_doe), .wait_o(epp_wait),
    .data_byte(q_byte), .mask_byte,
    .arg_push, .cmd_exec(cmd_go), .wbyte, .q_advance, .mask_snap, .mask_clr
  );

  arg_lifo #(.NMAX(bk_pkg::NMAX)) u_lifo (
    .clk, .rst_n, .push(arg_push), .din(wbyte), .args
  );

  logic [bk_pkg::COADD_W-1:0] coadd_cmd;
  cmd_exec u_cmd (
    .clk, .rst_n, .exec(cmd_go), .cmd(wbyte), .args,
    .run, .psw_en, .blank_len, .integ_len, .coadd_n(coadd_cmd), .gain_sel,
    .cal_on_req, .cal_off_req, .cancel, .restart, .reconfig_n
  );
  assign coadd_n = COADD_W'(coadd_cmd);

  // ------------------------------------------------------ phase switching
  logic ready_s, rd_busy, swap, acq_wait;

  ps_fsm #(.CLK_MHZ(CLK_MHZ)) u_fsm (
    .clk, .rst_n, .run, .psw_en, .blank_len, .integ_len,
    .adc_ready(ready_s), .readout_busy(rd_busy),
    .adc_acquire, .ps_upper, .ps_lower, .swap, .running(), .acq_wait, .phase()
  );

  // ------------------------------------------- readout and demodulation
  logic [NCH-1:0] sdata_s, demod;
  logic           shift, word_done;

  serial_rx #(.NCH(NCH), .SAMPLE_W(SAMPLE_W)) u_rx (
    .clk, .rst_n, .sclk(adc_sclk), .sdata(adc_sdata), .ready(adc_ready), .enable(acq_wait),
    .ready_s, .sdata_s, .shift, .busy(rd_busy), .word_done
  );

  logic [NCH*SAMPLE_W-1:0] samples;
  for (genvar p = 0; p < NPAIRS; p++) begin : g_pair
    ps_demod u_demod (
      .a(sdata_s[2*p]), .b(sdata_s[2*p+1]), .swap,
      .r(demod[2*p]), .l(demod[2*p+1])
    );
  end
  for (genvar c = 0; c < NCH; c++) begin : g_s2p
    shift_reg #(.W(SAMPLE_W)) u_sr (
      .clk, .rst_n, .shift, .din(demod[c]),
      .q(samples[c*SAMPLE_W +: SAMPLE_W])
    );
  end

  // ---------------------------------------------------------- integration
  logic [NCH*ACC_W-1:0] frame;
  logic                 frame_valid, q_empty, q_loaded, q_dropped;

  integ_unit #(.NCH(NCH), .SAMPLE_W(SAMPLE_W), .ACC_W(ACC_W), .COADD_W(COADD_W)) u_int (
    .clk, .rst_n, .sample_valid(word_done), .samples, .coadd_n,
    .restart, .cal_on_req, .cal_off_req,
    .frame, .frame_valid, .cal_on
  );

  out_queue #(.NBYTES(NCH * ACC_W / 8)) u_q (
    .clk, .rst_n, .load(frame_valid), .frame, .advance(q_advance),
    .cancel, .byte_out(q_byte), .empty(q_empty), .loaded(q_loaded),
    .dropped(q_dropped)
  );

  // ---------------------------------------------------------- interrupts
  logic pps_tick;
  pps_interrupter u_pps (.clk, .rst_n, .pps, .tick(pps_tick));

  logic [7:0] irq_set;
  always_comb begin
    irq_set           = '0;
    irq_set[bk_pkg::IRQ_DATA] = q_loaded;
    irq_set[bk_pkg::IRQ_PPS]  = pps_tick;
  end

  irq_mask u_irq (
    .clk, .rst_n, .set(irq_set), .snap(mask_snap), .clr(mask_clr),
    .mask_out(mask_byte), .irq(epp_intr)
  );

`ifndef SYNTHESIS
  // The shift strobes of a readout never overlap an integration.
  a_no_read_while_integrating: assert property (@(posedge clk) disable iff (!rst_n)
    shift |-> adc_acquire);
`endif
endmodule
