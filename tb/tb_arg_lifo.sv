// Testbench for arg_lifo (NMAX = 3): after random pushes args[k] must be
// the k-th most recent byte written.
module tb_arg_lifo;
  localparam int NMAX = 3;
  logic clk = 0, rst_n = 0, push = 0;
  logic [7:0] din = '0;
  logic [7:0] args [NMAX];
  logic [7:0] hist [$];
  int checks = 0, failures = 0;
  arg_lifo #(.NMAX(NMAX)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      din = 8'($urandom); push = 1; hist.push_front(din);
      @(negedge clk); push = 0; din = 8'($urandom);
      repeat ($urandom_range(0, 2)) @(negedge clk);
      for (int k = 0; k < NMAX && k < hist.size(); k++) begin
        checks++;
        if (args[k] != hist[k]) begin failures++; $display("t=%0d args[%0d]=%h exp %h", t, k, args[k], hist[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
