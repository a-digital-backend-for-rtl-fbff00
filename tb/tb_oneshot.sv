// Testbench for oneshot: measures the busy interval for several lengths
// against (len + 1) * PRESCALE clocks, checks the done pulse, and checks
// that a trigger while busy restarts the interval.
module tb_oneshot;
  localparam int unsigned PRE = 4;
  logic clk = 0, rst_n = 0, trig = 0, busy, done;
  logic [7:0] len = 0;
  int checks = 0, failures = 0;

  oneshot #(.PRESCALE(PRE), .LEN_W(8)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int l, input int exp);
    int n = 0, nd = 0;
    @(negedge clk); len = 8'(l); trig = 1;
    @(negedge clk); trig = 0;
    while (busy) begin @(negedge clk); n++; if (done) nd++; end
    // done pulses in the cycle busy falls
    checks++;
    if (n != exp || nd != 1) begin
      failures++; $display("len=%0d busy=%0d expected %0d done=%0d", l, n, exp, nd);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    measure(0, PRE);
    measure(1, 2*PRE);
    measure(24, 25*PRE);
    measure(255, 256*PRE);
    for (int i = 0; i < 10; i++) begin
      int l;
      l = $urandom_range(0, 60);
      measure(l, (l+1)*PRE);
    end
    // retrigger half way
    begin
      int n = 0;
      @(negedge clk); len = 8'd9; trig = 1;
      @(negedge clk); trig = 0;
      repeat (19) @(negedge clk);
      trig = 1; @(negedge clk); trig = 0;
      while (busy) begin @(negedge clk); n++; end
      checks++;
      if (n != 10*PRE) begin failures++; $display("retrigger %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
