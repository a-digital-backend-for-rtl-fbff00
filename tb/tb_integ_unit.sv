// Testbench for integ_unit (4 channels): random samples, integration of N
// samples, frame sums compared with reference sums, frame_valid once per N
// samples, restart discarding a partial integration, and the cal signal
// changing only at an integration boundary.
module tb_integ_unit;
  localparam int NCH = 4;
  logic clk = 0, rst_n = 0, sample_valid = 0, restart = 0, cal_on_req = 0, cal_off_req = 0;
  logic [NCH*20-1:0] samples = '0;
  logic [15:0] coadd_n = 16'd2;
  logic [NCH*32-1:0] frame;
  logic frame_valid, cal_on;
  int checks = 0, failures = 0, nframes = 0;
  integ_unit #(.NCH(NCH), .SAMPLE_W(20), .ACC_W(32), .COADD_W(16)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && frame_valid) nframes++;
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic integrate(input int n);
    logic [31:0] ref_sum [NCH];
    int f0 = nframes;
    for (int c = 0; c < NCH; c++) ref_sum[c] = 0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      for (int c = 0; c < NCH; c++) begin
        samples[c*20 +: 20] = 20'($urandom);
        ref_sum[c] += 32'(samples[c*20 +: 20]);
      end
      sample_valid = 1; @(negedge clk); sample_valid = 0;
      repeat ($urandom_range(1, 3)) @(negedge clk);
      checks++;
      if (nframes != f0 + ((k == n - 1) ? 1 : 0)) begin
        failures++; $display("frame count %0d at k=%0d of %0d", nframes - f0, k, n);
      end
    end
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (frame[c*32 +: 32] != ref_sum[c]) begin
        failures++; $display("ch%0d %h exp %h", c, frame[c*32 +: 32], ref_sum[c]);
      end
    end
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    integrate(3);
    integrate(3);
    coadd_n = 16'd6; restart = 1; @(negedge clk); restart = 0;
    integrate(7);
    // partial integration, then restart
    for (int k = 0; k < 4; k++) begin
      samples = {NCH{20'hABCDE}}; sample_valid = 1; @(negedge clk); sample_valid = 0; @(negedge clk);
    end
    restart = 1; @(negedge clk); restart = 0;
    integrate(7);
    // cal request waits for the next integration boundary
    cal_on_req = 1; @(negedge clk); cal_on_req = 0;
    repeat (3) @(negedge clk);
    checks++; if (cal_on) begin failures++; $display("cal switched early"); end
    integrate(7);
    checks++; if (!cal_on) begin failures++; $display("cal not switched on"); end
    cal_off_req = 1; @(negedge clk); cal_off_req = 0;
    checks++; if (!cal_on) begin failures++; $display("cal switched off early"); end
    integrate(7);
    checks++; if (cal_on) begin failures++; $display("cal not switched off"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
