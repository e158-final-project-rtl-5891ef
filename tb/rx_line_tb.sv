// rx_line_tb: self-checking test of the receive datapath.
// Ten bits of a frame (start, data LSB first, stop) are sampled with en pulses
// a few cycles apart while RxD changes between pulses. After the tenth sample
// stopbit must equal the stop bit; rx_rdy then loads the holding register,
// whose byte must match and must not change while the next frame shifts in.
module rx_line_tb;
  logic clk = 0, reset, RxD, en, rx_rdy, stopbit;
  logic [7:0] rxdata, byte_v, prev;
  logic [9:0] frame;
  int checks = 0, failures = 0;

  rx_line dut (.clk(clk), .reset(reset), .RxD(RxD), .en(en), .rx_rdy(rx_rdy),
               .stopbit(stopbit), .rxdata(rxdata));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; RxD = 0; en = 0; rx_rdy = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    prev = 8'h00;
    for (int t = 0; t < 40; t++) begin
      byte_v = (t == 0) ? 8'hFF : (t == 1) ? 8'h00 : (t == 2) ? 8'h55 : 8'($urandom);
      frame  = {1'($urandom_range(0, 1)), byte_v, 1'b1};
      for (int b = 0; b < 10; b++) begin
        repeat ($urandom_range(0, 3)) begin
          RxD = 1'($urandom);
          @(negedge clk);
          checks++;
          if (rxdata !== prev) begin failures++; $display("holding register changed early"); end
        end
        RxD = frame[b]; en = 1;
        @(negedge clk);
        en = 0;
      end
      checks++;
      if (stopbit !== frame[9]) begin failures++; $display("stopbit=%b expected %b", stopbit, frame[9]); end
      rx_rdy = 1;
      @(negedge clk);
      rx_rdy = 0;
      checks++;
      if (rxdata !== byte_v) begin failures++; $display("rxdata=%h expected %h", rxdata, byte_v); end
      prev = byte_v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
