// Testbench for shift_reg: shifts random 20-bit words in MSB first, with
// idle cycles between strobes, and compares the parallel word.
module tb_shift_reg;
  logic clk = 0, rst_n = 0, shift = 0, din = 0;
  logic [19:0] q;
  int checks = 0, failures = 0;
  shift_reg #(.W(20)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      logic [19:0] w;
      w = 20'($urandom);
      if (t == 0) w = 20'hFFFFF;
      if (t == 1) w = 20'h80001;
      for (int i = 19; i >= 0; i--) begin
        din = w[i]; shift = 1; @(negedge clk); shift = 0;
        din = ~din; repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      checks++;
      if (q != w) begin failures++; $display("got %h expected %h", q, w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
