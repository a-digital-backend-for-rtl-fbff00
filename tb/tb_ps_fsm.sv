// Testbench for ps_fsm at 40 MHz with a simple ADC model (ready some time
// after acquire rises, a readout of programmable length after ready).
// Checks, state by state: the printed switch sequence (0,180), (180,180),
// (180,0), (0,0); the integration length (integ_len + 1) us to the clock;
// the blanking gap (blank_len + 1) * 0.1 us + 1 clock, stretched while the
// readout is still running (integration never overlaps a readout); the swap
// select given for each readout; stop honoured only after the 4th state; and
// switches frozen in the first state with phase switching disabled.
module tb_ps_fsm;
  logic clk = 0, rst_n = 0, run = 0, psw_en = 1, adc_ready = 0;
  logic readout_busy;
  logic [7:0] blank_len = 8'd3, integ_len = 8'd4;
  logic adc_acquire, ps_upper, ps_lower, swap, running, acq_wait;
  logic [1:0] phase;
  int checks = 0, failures = 0;
  int rd_cycles = 40;
  ps_fsm #(.CLK_MHZ(40)) dut (.*);
  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ADC model: ready 30 clocks after acquire rises, low when it falls.
  // Readout busy for rd_cycles after ready rises.
  int acq_hi = 0;
  always @(posedge clk) begin
    if (!adc_acquire) begin adc_ready <= 0; acq_hi <= 0; end
    else begin
      acq_hi <= acq_hi + 1;
      if (acq_hi == 30 && running) adc_ready <= 1;
    end
  end
  int rd_left = 0;
  always @(posedge clk) begin
    if (adc_ready && !readout_busy && rd_left == 0 && acq_hi == 31) rd_left <= rd_cycles;
    else if (rd_left > 0) rd_left <= rd_left - 1;
  end
  assign readout_busy = (rd_left > 0);

  // Monitors
  int low_len = 0, gap = 0, nstates = 0, exp_idx = 0, nread = 0;
  logic [1:0] exp_pat [4] = '{2'b01, 2'b11, 2'b10, 2'b00};  // {upper, lower}
  logic prev_acq = 1, prev_up, prev_lo, prev_busy = 0;
  bit   counting_gap = 0, read_in_state = 0;
  int   rd_end_gap = 0, nstretch = 0;
  logic [1:0] pat_at_integ;
  always @(posedge clk) if (rst_n) begin
    // switch change starts a state
    if (running && {ps_upper, ps_lower} != {prev_up, prev_lo}) begin
      counting_gap <= 1; gap <= 1;
    end else if (counting_gap) gap <= gap + 1;
    if (!adc_acquire) low_len <= low_len + 1;
    if (prev_acq && !adc_acquire) begin        // integration starts
      counting_gap <= 0;
      if (psw_en) begin
        check({ps_upper, ps_lower} == exp_pat[exp_idx % 4],
              $sformatf("state %0d pattern %b%b", exp_idx, ps_upper, ps_lower));
        exp_idx++;
      end else check({ps_upper, ps_lower} == 2'b01, "frozen pattern");
      check(!readout_busy, "integration overlaps readout");
      if (!psw_en) ;
      else if (!read_in_state)
        check(gap == (int'(blank_len) + 1) * 4 + 1, $sformatf("blank gap %0d", gap));
      else begin
        check(gap >= (int'(blank_len) + 1) * 4 + 1 && gap > rd_end_gap &&
              gap <= ((rd_end_gap + 1 > (int'(blank_len) + 1) * 4 + 1) ? rd_end_gap + 1
                                                                  : (int'(blank_len) + 1) * 4 + 1),
              $sformatf("gap %0d, readout ended at %0d", gap, rd_end_gap));
        if (gap > (int'(blank_len) + 1) * 4 + 1) nstretch++;
      end
      read_in_state <= 0;
      pat_at_integ = {ps_upper, ps_lower};
      low_len <= 1;
    end
    if (!prev_acq && adc_acquire) begin
      check(low_len == (int'(integ_len) + 1) * 40, $sformatf("integration %0d", low_len));
      nstates++;
    end
    if (!prev_busy && readout_busy) begin
      nread++;
      // swap is wanted for the states whose two switches are equal
      check(swap == (pat_at_integ == 2'b11 || pat_at_integ == 2'b00),
            $sformatf("swap %b for pattern %b", swap, pat_at_integ));
    end
    if (prev_busy && !readout_busy && counting_gap) begin rd_end_gap <= gap; read_in_state <= 1; end
    prev_acq <= adc_acquire; prev_up <= ps_upper; prev_lo <= ps_lower; prev_busy <= readout_busy;
  end

  initial begin
    repeat (4) @(negedge clk); rst_n = 1;
    repeat (4) @(negedge clk);
    check(!running && adc_acquire, "idle after reset");
    run = 1;
    wait (nstates == 6);
    run = 0;                                   // mid-cycle stop
    wait (!running);
    repeat (50) @(negedge clk);
    check(nstates == 8 && phase == 2'd3, $sformatf("stopped after %0d states", nstates));
    // long readout stretches the blanking
    rd_cycles = 150; integ_len = 8'd2; blank_len = 8'd0;
    run = 1;
    wait (nstates == 12);
    // no phase switching
    psw_en = 0; rd_cycles = 5; blank_len = 8'd9;
    wait (nstates == 20);
    run = 0;
    wait (!running);
    repeat (300) @(negedge clk);
    check(nstretch >= 3, $sformatf("stretched blanks %0d", nstretch));
    check(nstates == 20 && nread == 20, $sformatf("states %0d reads %0d", nstates, nread));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
