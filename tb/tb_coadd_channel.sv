// Testbench for coadd_channel: random 20-bit samples, random integration
// lengths, latched sums compared with a reference sum; clear discards the
// running sum; a long run of full-scale samples checks 32-bit wrap-around.
module tb_coadd_channel;
  logic clk = 0, rst_n = 0, add = 0, dump = 0, clear = 0;
  logic [19:0] sample = 0;
  logic [31:0] sum;
  int checks = 0, failures = 0;
  coadd_channel #(.SAMPLE_W(20), .ACC_W(32)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic integrate(input int n, input bit fullscale);
    logic [31:0] ref_sum = 0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      sample = fullscale ? 20'hFFFFF : 20'($urandom);
      ref_sum += 32'(sample);
      add = 1; dump = (k == n - 1);
      @(negedge clk); add = 0; dump = 0;
    end
    checks++;
    if (sum != ref_sum) begin failures++; $display("n=%0d sum %h exp %h", n, sum, ref_sum); end
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 10; t++) integrate($urandom_range(1, 40), 0);
    // partial integration discarded by clear
    repeat (5) begin sample = 20'h12345; add = 1; @(negedge clk); end
    add = 0; clear = 1; @(negedge clk); clear = 0;
    integrate(3, 0);
    integrate(5000, 1);     // 5000 * 0xFFFFF wraps past 2**32
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
