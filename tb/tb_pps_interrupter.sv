// Testbench for pps_interrupter: one tick per rising edge of a slow,
// asynchronous pulse train, none on falling edges or while steady.
module tb_pps_interrupter;
  logic clk = 0, rst_n = 0, pps = 0, tick;
  int checks = 0, failures = 0, ticks = 0;
  pps_interrupter dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && tick) ticks++;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 1; i <= 12; i++) begin
      #($urandom_range(200, 500)) pps = 1;
      #($urandom_range(50, 400))  pps = 0;
      #100;
      checks++;
      if (ticks != i) begin failures++; $display("edge %0d ticks %0d", i, ticks); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
