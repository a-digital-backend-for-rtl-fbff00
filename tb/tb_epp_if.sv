// Testbench for epp_if: a host model runs the four EPP cycle types with the
// wait handshake and checks the decoded actions: data writes push the byte,
// address writes execute it, data reads return data_byte and advance
// afterwards, address reads snapshot the mask and clear it afterwards.
module tb_epp_if;
  logic clk = 0, rst_n = 0;
  logic nwrite = 1, ndstrb = 1, nastrb = 1;
  logic [7:0] din = '0, dout, data_byte = '0, mask_byte = '0, wbyte;
  logic doe, wait_o, arg_push, cmd_exec, q_advance, mask_snap, mask_clr;
  int checks = 0, failures = 0;
  int n_push = 0, n_exec = 0, n_adv = 0, n_snap = 0, n_clr = 0;
  logic [7:0] last_push, last_exec;
  epp_if dut (.*);
  always #12.5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (arg_push) begin n_push++; last_push = wbyte; end
    if (cmd_exec) begin n_exec++; last_exec = wbyte; end
    if (q_advance) begin n_adv++; data_byte = 8'($urandom); end
    if (mask_snap) n_snap++;
    if (mask_clr) n_clr++;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic host_write(input bit addr, input logic [7:0] b);
    nwrite = 0; din = b; #20;
    if (addr) nastrb = 0; else ndstrb = 0;
    wait (wait_o); #30;
    nastrb = 1; ndstrb = 1;
    wait (!wait_o); #20 nwrite = 1;
  endtask
  task automatic host_read(input bit addr, output logic [7:0] b);
    nwrite = 1; #20;
    if (addr) nastrb = 0; else ndstrb = 0;
    wait (wait_o); #30;
    check(doe, "doe during read");
    b = dout;
    nastrb = 1; ndstrb = 1;
    wait (!wait_o); #20;
    check(!doe, "doe released");
  endtask
  initial begin
    logic [7:0] b, e;
    #100 rst_n = 1; #100;
    for (int t = 0; t < 10; t++) begin
      e = 8'($urandom);
      host_write(0, e); #50;
      check(n_push == t + 1 && last_push == e && n_exec == 0, "data write -> push");
    end
    e = 8'd7; host_write(1, e); #50;
    check(n_exec == 1 && last_exec == e && n_push == 10, "address write -> exec");
    for (int t = 0; t < 10; t++) begin
      e = data_byte;
      host_read(0, b); #50;
      check(b == e && n_adv == t + 1, $sformatf("data read %h exp %h", b, e));
    end
    mask_byte = 8'h03;
    host_read(1, b); #50;
    check(b == 8'h03 && n_snap == 1 && n_clr == 1 && n_adv == 10, "address read");
    check(n_push == 10 && n_exec == 1, "no stray actions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
