// Shared constants of the continuum-radiometer backend.
//
// Command identifiers are the bytes the host writes with an EPP address
// cycle; any arguments are written beforehand with EPP data cycles and sit in
// the argument LIFO, the last one written being argument 0. Commands 1 to 10
// follow the command list of the backend proposal in order; 11 (cancel the
// readout of the current output frame) and 12 (discard the running
// integration and start a new one) are this design's numbering for two
// functions the proposal asks for without numbering them.
package bk_pkg;

  localparam int unsigned COADD_W  = 16;  // co-addition counter
  localparam int unsigned NMAX     = 2;   // most arguments of any command

  typedef enum logic [7:0] {
    CMD_RELOAD   = 8'd1,   // reload the FPGA from its EPROM
    CMD_STOP     = 8'd2,   // stop at the end of the 4-state cycle
    CMD_START    = 8'd3,
    CMD_COADD    = 8'd4,   // args[1]:args[0] = samples per integration - 1
    CMD_PSW_EN   = 8'd5,   // args[0][0] = phase switching on
    CMD_BLANK    = 8'd6,   // args[0] = blanking - 1, in 0.1 us
    CMD_INTEG    = 8'd7,   // args[0] = integration - 1, in 1 us
    CMD_CAL_ON   = 8'd8,   // cal on from the next integration
    CMD_CAL_OFF  = 8'd9,   // cal off from the next integration
    CMD_GAIN     = 8'd10,  // args[0][1:0] = buffer amplifier gain
    CMD_CANCEL   = 8'd11,  // drop the frame being read out
    CMD_RESTART  = 8'd12   // discard the running integration, start anew
  } cmd_e;

  // Interrupt mask bit positions.
  localparam int unsigned IRQ_DATA = 0;  // a new 64-byte frame is ready
  localparam int unsigned IRQ_PPS  = 1;  // site 1PPS tick

  // Reset values of the host-programmable registers.
  localparam logic [7:0]         BLANK_RST = 8'd24;   // 2.5 us
  localparam logic [7:0]         INTEG_RST = 8'd99;   // 100 us
  localparam logic [COADD_W-1:0] COADD_RST = 16'd9;   // 10 samples, ~1 ms

endpackage
