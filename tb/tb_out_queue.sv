// Testbench for out_queue (64 bytes): a loaded frame must come out byte by
// byte in order (byte i = frame[8i+7:8i]); a frame offered while the queue
// is not empty is dropped and the old frame continues; cancel empties it.
module tb_out_queue;
  localparam int NB = 64;
  logic clk = 0, rst_n = 0, load = 0, advance = 0, cancel = 0;
  logic [NB*8-1:0] frame = '0;
  logic [7:0] byte_out;
  logic empty, loaded, dropped;
  int checks = 0, failures = 0, nloaded = 0, ndropped = 0;
  out_queue #(.NBYTES(NB)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin if (loaded) nloaded++; if (dropped) ndropped++; end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [NB*8-1:0] rnd_frame();
    logic [NB*8-1:0] f;
    for (int i = 0; i < NB; i++) f[8*i +: 8] = 8'($urandom);
    return f;
  endfunction
  task automatic offer(input logic [NB*8-1:0] f);
    @(negedge clk); frame = f; load = 1; @(negedge clk); load = 0;
  endtask
  task automatic read_bytes(input logic [NB*8-1:0] f, input int from, input int to);
    for (int i = from; i < to; i++) begin
      @(negedge clk);
      checks++;
      if (byte_out !== f[8*i +: 8] || empty) begin
        failures++; $display("byte %0d got %h exp %h empty=%b", i, byte_out, f[8*i +: 8], empty);
      end
      advance = 1; @(negedge clk); advance = 0;
    end
  endtask
  initial begin
    logic [NB*8-1:0] f1, f2, f3;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); checks++; if (!empty) begin failures++; $display("not empty after reset"); end
    f1 = rnd_frame(); f2 = rnd_frame(); f3 = rnd_frame();
    offer(f1);
    read_bytes(f1, 0, 20);
    offer(f2);                        // dropped: f1 not yet read out
    read_bytes(f1, 20, NB);
    @(negedge clk); checks++;
    if (!empty || nloaded != 1 || ndropped != 1) begin
      failures++; $display("empty=%b loaded=%0d dropped=%0d", empty, nloaded, ndropped);
    end
    offer(f2);
    read_bytes(f2, 0, 5);
    cancel = 1; @(negedge clk); cancel = 0;
    @(negedge clk); checks++; if (!empty) begin failures++; $display("cancel failed"); end
    offer(f3);
    read_bytes(f3, 0, NB);
    @(negedge clk); checks++; if (!empty || nloaded != 3) begin failures++; $display("end state"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
