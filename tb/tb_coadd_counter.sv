// Testbench for coadd_counter: 'last' must be high on exactly every N-th
// counted sample (N = register + 1), restart with load, and follow a new
// register value after the current period.
module tb_coadd_counter;
  logic clk = 0, rst_n = 0, load = 0, count_en = 0, last;
  logic [15:0] n_minus1 = 16'd4;
  int checks = 0, failures = 0;
  coadd_counter #(.W(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic run(input int n, input int samples);
    for (int k = 0; k < samples; k++) begin
      @(negedge clk);
      checks++;
      if (last != ((k % n) == n - 1)) begin
        failures++; $display("n=%0d k=%0d last=%b", n, k, last);
      end
      count_en = 1; @(negedge clk); count_en = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    run(5, 23);
    n_minus1 = 16'd0; load = 1; @(negedge clk); load = 0;
    run(1, 5);
    n_minus1 = 16'd6; load = 1; @(negedge clk); load = 0;
    run(7, 30);
    n_minus1 = 16'd299; load = 1; @(negedge clk); load = 0;
    run(300, 650);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
