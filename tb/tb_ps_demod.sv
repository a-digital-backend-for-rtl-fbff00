// Testbench for ps_demod: all input combinations against the swap rule.
module tb_ps_demod;
  logic a, b, swap, r, l;
  int checks = 0, failures = 0;
  ps_demod dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 8; i++) begin
      {swap, a, b} = 3'(i);
      #1;
      checks++;
      if (r != (swap ? b : a) || l != (swap ? a : b)) begin
        failures++; $display("a=%b b=%b swap=%b -> r=%b l=%b", a, b, swap, r, l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
