// End-to-end testbench of the backend at its default parameters (16
// channels, 20-bit samples, 32-bit sums, 40 MHz clock).
//
// A front-end model makes a fresh random R and L level for every signal
// pair and every phase-switch state, and puts them on the two ADC lines of
// the pair straight when the two switches differ, crossed when they are
// equal (that is what the two 180-degree switches do to the outputs of the
// second magic tee). The A/D board model digitises and sends them serially.
// A host model drives the EPP port: it configures the backend with command
// bytes, answers interrupts by reading the mask, and reads each 64-byte
// frame, which is compared with sums of the R/L levels the front end made.
//
// Besides the frame contents the test checks, and counts, every mechanism
// of the design: the four switch states, both demodulator settings, the
// blanking stretched by a slow readout, frame delivery and a frame dropped
// while the host is late, readout cancel, integration restart, stop at a
// cycle boundary, cal switching at an integration boundary, the 1PPS
// interrupt, phase switching off, gain select and the FPGA reload pulse.
// The first frame is taken with the reset register values (100 us
// integrations, 10 samples per frame).
module tb_gbt_backend;
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
    #40000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ front end
  // One entry per integration: the true R/L level of every channel
  // (channel 2p = R of pair p, 2p+1 = L).
  logic [NCH*20-1:0] truth [$];
  always @(negedge adc_acquire) begin
    logic [NCH*20-1:0] t;
    bit straight;
    straight = (ps_upper != ps_lower);
    for (int c = 0; c < NCH; c++) t[c*20 +: 20] = 20'($urandom);
    for (int p = 0; p < NCH / 2; p++) begin
      val[2*p]   = straight ? t[2*p*20 +: 20]     : t[(2*p+1)*20 +: 20];
      val[2*p+1] = straight ? t[(2*p+1)*20 +: 20] : t[2*p*20 +: 20];
    end
    if (rst_n) truth.push_back(t);
  end

  // --------------------------------------------------- reference integrator
  // Sums the true levels of each sample as the FPGA finishes reading it.
  // The sample count and frame boundary are kept here independently.
  int unsigned coadd_ref = 10;     // samples per frame, reset value
  logic [31:0] acc_ref [NCH];
  logic [31:0] frame_ref [NCH];
  logic [31:0] loaded_ref [NCH];
  int in_frame = 0, ref_frames = 0;
  int n_loaded = 0, n_dropped = 0, n_stretch = 0, n_cal_edges = 0;
  int pat_seen [4] = '{0, 0, 0, 0};
  int swap_seen [2] = '{0, 0};
  logic prev_cal = 0;
  logic [1:0] prev_pat = 2'b00;
  initial for (int c = 0; c < NCH; c++) acc_ref[c] = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_cmd.restart) begin
      for (int c = 0; c < NCH; c++) acc_ref[c] = 0;
      in_frame = 0;
    end
    if (dut.u_rx.word_done) begin
      logic [NCH*20-1:0] t;
      t = truth.pop_front();
      for (int c = 0; c < NCH; c++) acc_ref[c] += 32'(t[c*20 +: 20]);
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
    if (dut.u_rx.shift) swap_seen[dut.swap]++;
    if (dut.u_fsm.st == 2'd1 && !dut.u_fsm.blank_busy && dut.rd_busy) n_stretch++;
    if (cal_on != prev_cal) begin
      n_cal_edges++;
      check(dut.u_int.frame_valid || $past(dut.u_cmd.restart), "cal changed inside an integration");
    end
    prev_cal = cal_on;
    if (!adc_acquire && {ps_upper, ps_lower} != prev_pat) begin
      prev_pat = {ps_upper, ps_lower};
      case ({ps_upper, ps_lower})
        2'b01: pat_seen[0]++;
        2'b11: pat_seen[1]++;
        2'b10: pat_seen[2]++;
        default: pat_seen[3]++;
      endcase
    end
  end
  // frame_valid must come exactly with the reference frame boundary
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
    b = epp_doe ? epp_dout : 8'hxx;
    epp_nastrb = 1; epp_ndstrb = 1;
    wait (!epp_wait); #30;
  endtask
  task automatic command(input logic [7:0] id);
    epp_write(1, id);
  endtask
  task automatic command1(input logic [7:0] id, input logic [7:0] a0);
    epp_write(0, 8'hEE);            // stale byte: must be ignored
    epp_write(0, a0); epp_write(1, id);
  endtask
  task automatic command2(input logic [7:0] id, input logic [15:0] v);
    epp_write(0, v[15:8]); epp_write(0, v[7:0]); epp_write(1, id);
  endtask

  int frames_read = 0, pps_seen = 0;
  task automatic read_frame();
    logic [7:0] b;
    for (int i = 0; i < 4 * NCH; i++) begin
      epp_read(0, b);
      check(b == loaded_ref[i / 4][8*(i % 4) +: 8],
            $sformatf("frame %0d byte %0d: %h expected %h", frames_read, i, b, loaded_ref[i / 4][8*(i % 4) +: 8]));
    end
    frames_read++;
  endtask
  // Serve interrupts until n more frames have been read.
  task automatic serve(input int n);
    logic [7:0] m;
    int goal = frames_read + n;
    while (frames_read < goal) begin
      wait (epp_intr);
      epp_read(1, m);
      if (m[1]) pps_seen++;
      if (m[0]) read_frame();
    end
  endtask

  always begin                       // site 1PPS, sped up
    #300000 pps = 1;
    #1000   pps = 0;
  end

  initial begin
    int frames_before, drops_before;
    logic [7:0] m;
    for (int c = 0; c < NCH; c++) val[c] = '0;
    #200 rst_n = 1; #200;

    // 1. one frame with the reset values: 10 x 100 us integrations
    command(8'd8);                   // cal on from the next integration
    command(8'd3);                   // start
    serve(1);
    check(cal_on, "cal on after first integration");

    // 2. faster settings; restart so the new count applies at once
    command(8'd2);                   // stop
    wait (!dut.u_fsm.running);
    check(dut.u_fsm.phase == 2'd3, "stop honoured at the end of a cycle");
    repeat (200) @(posedge clk);
    command1(8'd6, 8'd0);            // blanking 0.1 us: readout stretches it
    command1(8'd7, 8'd9);            // 10 us integrations
    command2(8'd4, 16'd3);           // 4 samples per frame
    coadd_ref = 4;
    command(8'd12);                  // restart
    command(8'd11);                  // cancel any pending frame
    command(8'd3);
    serve(6);
    command(8'd9);                   // cal off
    serve(3);
    check(!cal_on, "cal off");

    // 3. host late: the next frame is dropped, the old one stays readable
    wait (epp_intr);
    drops_before = n_dropped;
    wait (n_dropped > drops_before);
    epp_read(1, m);
    read_frame();
    check(n_dropped > drops_before, "frame dropped while host late");

    // 4. cancel a frame half read, then carry on
    wait (epp_intr);
    epp_read(1, m);
    for (int i = 0; i < 10; i++) epp_read(0, m);
    command(8'd11);
    frames_before = n_loaded;
    wait (n_loaded > frames_before);
    serve(1);

    // 5. restart in the middle of an integration
    repeat (30000) @(posedge clk);
    command(8'd12);
    serve(3);

    // 6. phase switching off, gain, longer blanking
    command1(8'd5, 8'd0);
    command1(8'd10, 8'd2);
    command1(8'd6, 8'd20);
    serve(3);
    check({ps_upper, ps_lower} == 2'b01, "switches frozen when phase switching is off");
    check(gain_sel == 2'd2, "gain select");
    command1(8'd5, 8'd1);
    serve(2);

    // 7. stop, reload pulse
    command(8'd2);
    wait (!dut.u_fsm.running);
    check(dut.u_fsm.phase == 2'd3, "second stop at cycle end");
    command(8'd1);
    #100 check(!reconfig_n, "reload pulse");
    wait (pps_seen > 0 || frames_read > 1000);

    // mechanisms: each must have happened
    $display("frames read %0d, loaded %0d, dropped %0d, stretched-blank cycles %0d, cal edges %0d, pps %0d",
             frames_read, n_loaded, n_dropped, n_stretch, n_cal_edges, pps_seen);
    $display("switch states %0d %0d %0d %0d, demod straight/crossed bits %0d/%0d",
             pat_seen[0], pat_seen[1], pat_seen[2], pat_seen[3], swap_seen[0], swap_seen[1]);
    check(pat_seen[0] > 0 && pat_seen[1] > 0 && pat_seen[2] > 0 && pat_seen[3] > 0, "all four switch states");
    check(swap_seen[0] > 0 && swap_seen[1] > 0, "both demodulator settings");
    check(n_stretch > 0, "blanking stretched by readout");
    check(n_dropped > 0, "frame dropped");
    check(n_cal_edges >= 2, "cal switched on and off");
    check(pps_seen > 0, "1PPS interrupt");
    check(frames_read >= 20, "frames read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
