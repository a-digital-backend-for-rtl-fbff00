// Testbench for irq_mask: sources accumulate into the mask, a read returns
// the mask and clears only what it returned, the line follows the mask.
module tb_irq_mask;
  logic clk = 0, rst_n = 0, snap = 0, clr = 0, irq;
  logic [7:0] set = '0, mask_out;
  int checks = 0, failures = 0;
  irq_mask dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic pulse(input logic [7:0] s);
    @(negedge clk); set = s; @(negedge clk); set = '0;
  endtask
  task automatic rd(input logic [7:0] exp, input logic [7:0] during);
    @(negedge clk); snap = 1; @(negedge clk); snap = 0;
    checks++;
    if (mask_out != exp) begin failures++; $display("read %h exp %h", mask_out, exp); end
    set = during; @(negedge clk); set = '0;
    clr = 1; @(negedge clk); clr = 0;
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); checks++; if (irq) begin failures++; $display("irq after reset"); end
    pulse(8'h01); pulse(8'h02);
    checks++; if (!irq) begin failures++; $display("no irq"); end
    rd(8'h03, 8'h00);
    @(negedge clk); checks++; if (irq) begin failures++; $display("irq not cleared"); end
    pulse(8'h02);
    rd(8'h02, 8'h01);                 // bit 0 arrives during the read
    @(negedge clk); checks++; if (!irq) begin failures++; $display("lost a source"); end
    rd(8'h01, 8'h00);
    for (int i = 0; i < 20; i++) begin
      logic [7:0] s;
      s = 8'($urandom);
      pulse(s); rd(s, 8'h00);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
