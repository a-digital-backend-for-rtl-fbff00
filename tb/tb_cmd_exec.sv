// Testbench for cmd_exec: checks reset values, then issues every command
// with random arguments and compares each register or pulse with what the
// command list says; unknown identifiers must change nothing.
module tb_cmd_exec;
  import bk_pkg::*;
  logic clk = 0, rst_n = 0, exec = 0;
  logic [7:0] cmd = '0;
  logic [7:0] args [NMAX];
  logic run, psw_en, cal_on_req, cal_off_req, cancel, restart, reconfig_n;
  logic [7:0] blank_len, integ_len;
  logic [15:0] coadd_n;
  logic [1:0] gain_sel;
  int checks = 0, failures = 0;
  int n_on = 0, n_off = 0, n_cancel = 0, n_restart = 0;
  cmd_exec dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    n_on += int'(cal_on_req); n_off += int'(cal_off_req);
    n_cancel += int'(cancel); n_restart += int'(restart);
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic issue(input logic [7:0] id, input logic [7:0] a0, input logic [7:0] a1);
    @(negedge clk); args[0] = a0; args[1] = a1; cmd = id; exec = 1;
    @(negedge clk); exec = 0; args[0] = 8'($urandom); args[1] = 8'($urandom);
    @(negedge clk);
  endtask
  initial begin
    logic [7:0] a, b;
    args[0] = 0; args[1] = 0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    check(!run && psw_en && blank_len == 8'd24 && integ_len == 8'd99 && coadd_n == 16'd9
          && gain_sel == 0 && reconfig_n, "reset values");
    issue(8'd3, 0, 0);  check(run, "start");
    issue(8'd2, 0, 0);  check(!run, "stop");
    a = 8'($urandom); b = 8'($urandom);
    issue(8'd4, a, b);  check(coadd_n == {b, a}, "coadd");
    issue(8'd5, 8'h00, 0); check(!psw_en, "psw off");
    issue(8'd5, 8'h01, 0); check(psw_en, "psw on");
    a = 8'($urandom); issue(8'd6, a, 0); check(blank_len == a, "blank");
    a = 8'($urandom); issue(8'd7, a, 0); check(integ_len == a, "integ");
    issue(8'd8, 0, 0);  check(n_on == 1 && n_off == 0, "cal on pulse");
    issue(8'd9, 0, 0);  check(n_on == 1 && n_off == 1, "cal off pulse");
    issue(8'd10, 8'h02, 0); check(gain_sel == 2'd2, "gain");
    issue(8'd11, 0, 0); check(n_cancel == 1, "cancel pulse");
    issue(8'd12, 0, 0); check(n_restart == 1, "restart pulse");
    begin
      logic [33:0] snap0;
      snap0 = {run, psw_en, blank_len, integ_len, coadd_n};
      issue(8'd0, 8'h55, 8'h55);
      issue(8'd77, 8'h55, 8'h55);
      check(snap0 == {run, psw_en, blank_len, integ_len, coadd_n}, "unknown ignored");
    end
    check(n_on == 1 && n_off == 1 && n_cancel == 1 && n_restart == 1 && gain_sel == 2, "no stray pulses");
    issue(8'd1, 0, 0);
    begin
      int low = 1;   // already one cycle low after issue()
      while (!reconfig_n) begin @(negedge clk); low++; end
      check(low == 16, $sformatf("reload pulse %0d", low));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
