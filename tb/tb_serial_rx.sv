// Testbench for serial_rx with the A/D board model: for a series of random
// words, pulses acquire, collects the bits offered with each shift strobe and
// checks the words, the number of strobes (20) and one word_done per
// readout. Time unit 1 ns, 40 MHz system clock.
module tb_serial_rx;
  localparam int NCH = 4;
  logic clk = 0, rst_n = 0;
  logic acquire = 1;
  logic [19:0] val [NCH];
  logic sclk, ready, ready_s, shift, busy, word_done;
  logic [NCH-1:0] sdata, sdata_s;
  int checks = 0, failures = 0;

  ddc101_model #(.NCH(NCH), .CONV_NS(700)) adc (.acquire, .val, .sclk, .sdata, .ready);
  serial_rx #(.NCH(NCH), .SAMPLE_W(20)) dut (.clk, .rst_n, .sclk, .sdata, .ready, .enable(1'b1),
    .ready_s, .sdata_s, .shift, .busy, .word_done);

  always #12.5 clk = ~clk;

  logic [19:0] got [NCH];
  int nshift = 0, ndone = 0;
  always @(posedge clk) begin
    if (shift) begin
      nshift++;
      for (int c = 0; c < NCH; c++) got[c] = {got[c][18:0], sdata_s[c]};
    end
    if (word_done) ndone++;
  end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NCH; c++) val[c] = '0;
    #100 rst_n = 1;
    for (int t = 0; t < 16; t++) begin
      for (int c = 0; c < NCH; c++) val[c] = 20'($urandom);
      if (t == 0) begin val[0] = 20'hFFFFF; val[1] = 20'h00001; val[2] = 20'h80000; end
      #($urandom_range(100, 300)) acquire = 0;
      #($urandom_range(500, 1500)) acquire = 1;
      nshift = 0; ndone = 0;
      wait (ready_s);
      wait (word_done);
      #100;
      checks++;
      if (nshift != 20 || ndone != 1 || busy) begin
        failures++; $display("t=%0d shifts=%0d done=%0d", t, nshift, ndone);
      end
      for (int c = 0; c < NCH; c++) begin
        checks++;
        if (got[c] != val[c]) begin
          failures++; $display("t=%0d ch%0d got %h exp %h", t, c, got[c], val[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
