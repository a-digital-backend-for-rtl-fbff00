// EPP parallel-port peripheral.
//
// The host talks to the backend through an EPP parallel port, which gives
// four hardware-timed single-byte cycles. They map onto the backend's
// transactions as in the proposal:
//   data write     push an argument byte onto the argument LIFO
//   address write  execute the command whose identifier is the byte
//   data read      return the next byte of the output queue, then advance it
//   address read   return the interrupt mask, then clear what was returned
// Handshake (standard EPP; the exact timing is this design's): the strobes
// and nWrite are synchronised with two flip-flops. When a strobe is seen low
// the cycle type is latched, a write byte is captured, for a read the byte is
// driven (doe high; mask_snap pulses first for an address read) and then
// wait_o is raised. When the strobe returns high the write or read action
// pulses for one cycle, doe and wait_o fall, and the next cycle may begin.
module epp_if (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       nwrite,
  input  logic       ndstrb,
  input  logic       nastrb,
  input  logic [7:0] din,
  output logic [7:0] dout,
  output logic       doe,
  output logic       wait_o,
  input  logic [7:0] data_byte,
  input  logic [7:0] mask_byte,
  output logic       arg_push,
  output logic       cmd_exec,
  output logic [7:0] wbyte,
  output logic       q_advance,
  output logic       mask_snap,
  output logic       mask_clr
);
  typedef enum logic [1:0] {IDLE, SETUP, ACK} st_e;
  st_e st;

  logic [1:0] ds, as, ws;
  logic       is_addr, is_write;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ds <= 2'b11; as <= 2'b11; ws <= 2'b11;
    end else begin
      ds <= {ds[0], ndstrb};
      as <= {as[0], nastrb};
      ws <= {ws[0], nwrite};
    end
  end
  wire dstb = ~ds[1];
  wire astb = ~as[1];

  assign dout = is_addr ? mask_byte : data_byte;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= IDLE; is_addr <= 1'b0; is_write <= 1'b0; wbyte <= '0;
      doe <= 1'b0; wait_o <= 1'b0;
      arg_push <= 1'b0; cmd_exec <= 1'b0; q_advance <= 1'b0;
      mask_snap <= 1'b0; mask_clr <= 1'b0;
    end else begin
      arg_push <= 1'b0; cmd_exec <= 1'b0; q_advance <= 1'b0;
      mask_snap <= 1'b0; mask_clr <= 1'b0;
      unique case (st)
        IDLE: if (dstb || astb) begin
          is_addr  <= astb;
          is_write <= ~ws[1];
          wbyte    <= din;
          mask_snap <= astb & ws[1];
          st <= SETUP;
        end
        SETUP: begin             // read byte (or snapshot) settles
          doe    <= ~is_write;
          wait_o <= 1'b1;
          st     <= ACK;
        end
        ACK: if (!(is_addr ? astb : dstb)) begin
          doe    <= 1'b0;
          wait_o <= 1'b0;
          arg_push  <= is_write & ~is_addr;
          cmd_exec  <= is_write &  is_addr;
          q_advance <= ~is_write & ~is_addr;
          mask_clr  <= ~is_write &  is_addr;
          st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
