// Workload testbench of the whole backend at its default parameters.
//
// It runs the operating points the instrument is specified for, with the
// same front-end, A/D board and EPP host models as the end-to-end test:
//   A. the shortest hardware integration, 1 ms (10 samples of 100 us, the
//      reset values). Twenty frames are read back to back; none may be
//      dropped, so the host keeps up with the 64 bytes per millisecond.
//   B. the longest timer settings, 25.6 us blanking and 256 us integration.
//   C. the shortest timer settings, 0.1 us blanking and 1 us integration.
//      The readout then stretches the blanking interval.
//   D. the longest hardware integration, 819.2 ms: 8192 samples of 100 us.
//      The samples are near the top of a 19-bit range, so the 32-bit sums
//      come close to their limit without wrapping. They are checked
//      against a 64-bit reference.
// Every integration (adc_acquire low) is timed and must last exactly
// (integration setting + 1) us. Every switch change is timed against the
// start of the next integration, which must follow it by exactly
// (blanking setting + 1) x 0.1 us plus one system clock, or later when a
// readout is still running.
module tb_gbt_workloads;
  localparam int NCH = 16;
  logic clk = 0, rst_n = 0;
  logic adc_sclk, adc_ready, adc_acquire;
  logic [NCH-1:0] adc_sdata;
  logic ps_upper, ps_lower, cal_on, pps = 0;
  logic [1:0] gain_sel;
  logic epp_nwrite = 1, epp_ndstrb = 1, epp_nastrb = 1;
  logic [7:0] epp_din = '0, epp_dout;
  logic epp_doe, epp_wait, epp_intr, reconfig_n;
  logic [19:0] val [NCH];

  int checks = 0, failures = 0;

  gbt_backend dut (.*);
  ddc101_model #(.NCH(NCH), .CONV_NS(1000)) board (
    .acquire(adc_acquire), .val, .sclk(adc_sclk), .sdata(adc_sdata), .ready(adc_ready));

  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #(1.5e9); failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ front end
  // Sample levels: full 20-bit random, or the top 1024 codes of a 19-bit
  // range for the long integration.
  bit near_19bit_max = 0;
  logic [NCH*20-1:0] truth [$];
  always @(negedge adc_acquire) begin
    logic [NCH*20-1:0] t;
    bit straight;
    straight = (ps_upper != ps_lower);
    for (int c = 0; c < NCH; c++)
      t[c*20 +: 20] = near_19bit_max ? 20'((1 << 19) - 1 - ($urandom % 1024)) : 20'($urandom);
    for (int p = 0; p < NCH / 2; p++) begin
      val[2*p]   = straight ? t[2*p*20 +: 20]     : t[(2*p+1)*20 +: 20];
      val[2*p+1] = straight ? t[(2*p+1)*20 +: 20] : t[2*p*20 +: 20];
    end
    if (rst_n) truth.push_back(t);
  end

  // ------------------------------------------------------------- timing
  int unsigned blank_set = 24, integ_set = 99;
  realtime t_sw, t_acq_lo;
  bit sw_pending = 0;
  int n_integ = 0, n_gap = 0, n_stretched = 0;
  always @(ps_upper or ps_lower) if (rst_n) begin t_sw = $realtime; sw_pending = 1; end
  always @(negedge adc_acquire) if (rst_n) begin
    realtime gap, want;
    t_acq_lo = $realtime;
    if (sw_pending) begin
      gap  = t_acq_lo - t_sw;
      want = real'(blank_set + 1) * 100.0 + 25.0;
      n_gap++;
      if (gap > want + 0.5) n_stretched++;
      else check(gap > want - 0.5, $sformatf("blank gap %0.3f ns, expected %0.3f", gap, want));
      sw_pending = 0;
    end
  end
  always @(posedge adc_acquire) if (rst_n && t_acq_lo > 0) begin
    realtime len;
    len = $realtime - t_acq_lo;
    n_integ++;
    check(len > real'(integ_set + 1) * 1000.0 - 0.5 && len < real'(integ_set + 1) * 1000.0 + 0.5,
          $sformatf("integration %0.3f ns, setting %0d", len, integ_set));
  end

  // --------------------------------------------------- reference integrator
  int unsigned coadd_ref = 10;
  logic [63:0] acc_ref [NCH];
  logic [63:0] frame_ref [NCH];
  logic [63:0] loaded_ref [NCH];
  int in_frame = 0, ref_frames = 0, n_loaded = 0, n_dropped = 0;
  realtime t_last_frame = 0, frame_period = 0;
  initial for (int c = 0; c < NCH; c++) acc_ref[c] = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_cmd.restart) begin
      for (int c = 0; c < NCH; c++) acc_ref[c] = 0;
      in_frame = 0;
    end
    if (dut.u_rx.word_done) begin
      logic [NCH*20-1:0] t;
      t = truth.pop_front();
      for (int c = 0; c < NCH; c++) acc_ref[c] += 64'(t[c*20 +: 20]);
      in_frame++;
      if (in_frame == coadd_ref) begin
        frame_ref = acc_ref;
        for (int c = 0; c < NCH; c++) acc_ref[c] = 0;
        in_frame = 0;
        ref_frames++;
      end
    end
    if (dut.u_q.loaded) begin loaded_ref = frame_ref; n_loaded++; end
    if (dut.u_q.dropped) n_dropped++;
    if (dut.u_int.frame_valid) begin
      if (t_last_frame > 0) frame_period = $realtime - t_last_frame;
      t_last_frame = $realtime;
    end
  end
  int dut_frames = 0;
  always @(posedge clk) if (rst_n && dut.u_int.frame_valid) begin
    dut_frames++;
    #1 check(dut_frames == ref_frames, $sformatf("frame boundary %0d vs %0d", dut_frames, ref_frames));
  end

  // ------------------------------------------------------------ host (EPP)
  task automatic epp_write(input bit addr, input logic [7:0] b);
    epp_nwrite = 0; epp_din = b; #30;
    if (addr) epp_nastrb = 0; else epp_ndstrb = 0;
    wait (epp_wait); #40;
    epp_nastrb = 1; epp_ndstrb = 1;
    wait (!epp_wait); #30 epp_nwrite = 1;
  endtask
  task automatic epp_read(input bit addr, output logic [7:0] b);
    epp_nwrite = 1; #30;
    if (addr) epp_nastrb = 0; else epp_ndstrb = 0;
    wait (epp_wait); #40;
    b = epp_doe ? epp_dout : 8'h00;
    epp_nastrb = 1; epp_ndstrb = 1;
    wait (!epp_wait); #30;
  endtask
  task automatic command(input logic [7:0] id);
    epp_write(1, id);
  endtask
  task automatic command1(input logic [7:0] id, input logic [7:0] a0);
    epp_write(0, a0); epp_write(1, id);
  endtask
  task automatic command2(input logic [7:0] id, input logic [15:0] v);
    epp_write(0, v[15:8]); epp_write(0, v[7:0]); epp_write(1, id);
  endtask

  int frames_read = 0;
  realtime t_read_start, t_read_max = 0;
  task automatic read_frame();
    logic [7:0] b;
    t_read_start = $realtime;
    for (int i = 0; i < 4 * NCH; i++) begin
      epp_read(0, b);
      check(b == loaded_ref[i / 4][8*(i % 4) +: 8],
            $sformatf("frame %0d byte %0d: %h expected %h", frames_read, i, b, loaded_ref[i / 4][8*(i % 4) +: 8]));
    end
    if ($realtime - t_read_start > t_read_max) t_read_max = $realtime - t_read_start;
    frames_read++;
  endtask
  task automatic serve(input int n);
    logic [7:0] m;
    int goal = frames_read + n;
    while (frames_read < goal) begin
      wait (epp_intr);
      epp_read(1, m);
      if (m[0]) read_frame();
    end
  endtask

  // Stop at the end of the cycle, throw away what is pending, load new
  // settings and start a fresh integration.
  task automatic reconfigure(input int unsigned blank, input int unsigned integ, input int unsigned n);
    logic [7:0] m;
    command(8'd2);
    wait (!dut.u_fsm.running);
    check(dut.u_fsm.phase == 2'd3, "stop at the end of a cycle");
    repeat (1000) @(posedge clk);
    command(8'd11);
    epp_read(1, m);
    command1(8'd6, 8'(blank));
    command1(8'd7, 8'(integ));
    command2(8'd4, 16'(n - 1));
    blank_set = blank; integ_set = integ; coadd_ref = n;
    command(8'd12);
    command(8'd3);
  endtask

  initial begin
    int integ_before, stretch_before, drops_before;
    for (int c = 0; c < NCH; c++) val[c] = '0;
    #200 rst_n = 1; #200;

    // A. 1 ms integrations at the reset values, read back to back
    command(8'd3);
    serve(20);
    $display("A: frame period %0.1f us, longest frame read %0.1f us, %0.1f kB/s",
             frame_period / 1000.0, t_read_max / 1000.0, 64.0e6 / frame_period);
    check(n_dropped == 0, "no frame dropped at 1 ms integrations");
    check(frame_period >= 1.0e6 && frame_period < 1.1e6, "1 ms frame period");
    check(n_integ >= 200, "integrations timed in A");

    // B. longest blanking and integration settings
    reconfigure(255, 255, 4);
    integ_before = n_integ;
    serve(3);
    check(n_integ - integ_before >= 12, "256 us integrations timed");
    check(frame_period > 4.0 * (25600.0 + 256000.0) && frame_period < 4.0 * (25600.0 + 256000.0 + 3000.0),
          "frame period at the longest timer settings");

    // C. shortest blanking and integration settings
    reconfigure(0, 0, 16);
    integ_before = n_integ;
    stretch_before = n_stretched;
    serve(3);
    check(n_integ - integ_before >= 48, "1 us integrations timed");
    check(n_stretched - stretch_before >= 48, "readout stretches a 0.1 us blanking");

    // D. 819.2 ms: 8192 samples of 100 us, 19-bit samples near full scale
    near_19bit_max = 1;
    drops_before = n_dropped;
    reconfigure(24, 99, 8192);
    serve(1);
    begin
      logic [63:0] lo = '1, hi = '0;
      for (int c = 0; c < NCH; c++) begin
        if (loaded_ref[c] < lo) lo = loaded_ref[c];
        if (loaded_ref[c] > hi) hi = loaded_ref[c];
      end
      $display("D: frame period %0.1f ms, sums %0d .. %0d", frame_period / 1.0e6, lo, hi);
      check(hi < 64'h1_0000_0000, "819.2 ms sums fit in 32 bits");
      check(lo > 64'h0_FF00_0000, "819.2 ms sums use the top of the 32-bit range");
    end
    check(n_dropped == drops_before, "no frame dropped in the long integration");
    command(8'd2);
    wait (!dut.u_fsm.running);

    $display("integrations timed %0d, blank gaps %0d (%0d stretched), frames read %0d",
             n_integ, n_gap, n_stretched, frames_read);
    check(n_gap - n_stretched > 100, "exact blank gaps seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
