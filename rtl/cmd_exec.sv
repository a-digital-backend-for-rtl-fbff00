// Command executor.
//
// Runs a command the moment its identifier arrives (EPP address write),
// taking its arguments from the argument LIFO (args[0] = last byte sent).
// It owns the host-programmable registers of the backend:
//   1  reload FPGA       reconfig_n low for 16 clocks
//   2  stop              run <= 0 (the sequencer stops at the end of a cycle)
//   3  start             run <= 1
//   4  co-addition count coadd_n <= {args[1], args[0]} (samples - 1)
//   5  phase switching   psw_en <= args[0][0]
//   6  blanking time     blank_len <= args[0] (units of 0.1 us, minus 1)
//   7  switch period     integ_len <= args[0] (units of 1 us, minus 1)
//   8  cal on            one-cycle request, applied at the next integration
//   9  cal off           likewise
//   10 gain              gain_sel <= args[0][1:0]
//   11 cancel readout    one-cycle pulse to the output queue
//   12 restart           one-cycle pulse: discard and restart the integration
// The command list (1-10) is the proposal's; argument layouts, reset values
// and the numbers of commands 11 and 12 are this design's. Unknown
// identifiers are ignored. Registers update the cycle after exec.
module cmd_exec
  import bk_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               exec,
  input  logic [7:0]         cmd,
  input  logic [7:0]         args [NMAX],
  output logic               run,
  output logic               psw_en,
  output logic [7:0]         blank_len,
  output logic [7:0]         integ_len,
  output logic [COADD_W-1:0] coadd_n,
  output logic [1:0]         gain_sel,
  output logic               cal_on_req,
  output logic               cal_off_req,
  output logic               cancel,
  output logic               restart,
  output logic               reconfig_n
);
  logic [4:0] rcfg_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run         <= 1'b0;
      psw_en      <= 1'b1;
      blank_len   <= BLANK_RST;
      integ_len   <= INTEG_RST;
      coadd_n     <= COADD_RST;
      gain_sel    <= '0;
      cal_on_req  <= 1'b0;
      cal_off_req <= 1'b0;
      cancel      <= 1'b0;
      restart     <= 1'b0;
      rcfg_cnt    <= '0;
    end else begin
      cal_on_req  <= 1'b0;
      cal_off_req <= 1'b0;
      cancel      <= 1'b0;
      restart     <= 1'b0;
      if (rcfg_cnt != '0) rcfg_cnt <= rcfg_cnt - 1'b1;
      if (exec) begin
        unique case (cmd_e'(cmd))
          CMD_RELOAD:  rcfg_cnt    <= 5'd16;
          CMD_STOP:    run         <= 1'b0;
          CMD_START:   run         <= 1'b1;
          CMD_COADD:   coadd_n     <= {args[1], args[0]};
          CMD_PSW_EN:  psw_en      <= args[0][0];
          CMD_BLANK:   blank_len   <= args[0];
          CMD_INTEG:   integ_len   <= args[0];
          CMD_CAL_ON:  cal_on_req  <= 1'b1;
          CMD_CAL_OFF: cal_off_req <= 1'b1;
          CMD_GAIN:    gain_sel    <= args[0][1:0];
          CMD_CANCEL:  cancel      <= 1'b1;
          CMD_RESTART: restart     <= 1'b1;
          default: ;
        endcase
      end
    end
  end

  assign reconfig_n = (rcfg_cnt == '0);
endmodule
