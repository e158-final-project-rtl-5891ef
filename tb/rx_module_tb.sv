// rx_module_tb: self-checking test of the receive control.
// Frames are driven on RxD with a bit length L that may differ from the
// programmed bit_period. A small model of the datapath's last stage (the last
// sampled bit) feeds stopbit. Checked: every sample strobe falls where worked
// out (cycle bp - bp/2 + k*bp after the start edge) and inside the intended
// bit (a high stop bit is dropped in the cycle after rxdata_rdy, because
// the receiver takes a high line as the next start bit); exactly ten strobes per frame; rxdata_rdy in the cycle after the tenth
// (cycle 77 for bit period 8); rx_fe exactly when the stop bit is high; and a
// 2.5 % slow or fast line at bit period 40 is still sampled inside each bit.
module rx_module_tb;
  logic clk = 0, reset, RxD, rxshift_enable, rxdata_rdy, rx_fe, stopbit;
  logic [7:0] bit_period;
  int checks = 0, failures = 0;

  rx_module dut (.clk(clk), .reset(reset), .bit_period(bit_period), .stopbit(stopbit), .RxD(RxD),
                 .rxshift_enable(rxshift_enable), .rxdata_rdy(rxdata_rdy), .rx_fe(rx_fe));

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (reset) stopbit <= 0; else if (rxshift_enable) stopbit <= RxD;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One frame: start edge in cycle 0, bits of L cycles, then idle low.
  task automatic frame(input int bp, input int L, input logic [7:0] b, input logic stop, input int exact);
    logic [9:0] bits = {stop, b, 1'b1};
    int first = bp - bp / 2, samples = 0, rdy_at = -1, fe_seen = 0;
    int len = 10 * L + bp + 4;
    bit_period = 8'(bp);
    for (int c = 0; c < len; c++) begin
      int k = c / L;
      // A high stop bit is released once the frame is complete, so that it
      // is not taken as the next start bit.
      RxD = (k < 10 && !(k == 9 && c > first + 9 * bp)) ? bits[k] : 1'b0;
      #1;
      if (rxshift_enable) begin
        samples++;
        checks++;
        if (k >= 10 || RxD !== bits[k] || (exact != 0 && c != first + (samples - 1) * bp)) begin
          failures++;
          $display("bp %0d L %0d: sample %0d at cycle %0d outside its bit", bp, L, samples, c);
        end
      end
      if (rxdata_rdy) begin rdy_at = c; fe_seen = rx_fe; end
      else if (rx_fe) begin failures++; $display("rx_fe without rxdata_rdy"); end
      @(negedge clk);
    end
    checks += 3;
    if (samples != 10) begin failures++; $display("bp %0d: %0d samples", bp, samples); end
    if (rdy_at != first + 9 * bp + 1) begin
      failures++; $display("bp %0d L %0d: rxdata_rdy at %0d, expected %0d", bp, L, rdy_at, first + 9 * bp + 1);
    end
    if (fe_seen != stop) begin failures++; $display("bp %0d: rx_fe=%0d stop=%b", bp, fe_seen, stop); end
  endtask

  initial begin
    reset = 1; RxD = 0; bit_period = 8;
    repeat (3) @(negedge clk);
    reset = 0;
    repeat (5) @(negedge clk);
    frame(8, 8, 8'h55, 1'b0, 1);      // rxdata_rdy at cycle 77
    frame(8, 8, 8'h00, 1'b0, 1);
    frame(8, 8, 8'hFF, 1'b1, 1);      // framing error
    frame(40, 41, 8'h3C, 1'b0, 0);    // line 2.5 % slow
    frame(40, 39, 8'hC3, 1'b0, 0);    // line 2.5 % fast
    frame(39, 40, 8'h55, 1'b0, 0);
    frame(255, 255, 8'hA5, 1'b0, 1);
    frame(9, 9, 8'h81, 1'b1, 1);
    for (int i = 0; i < 10; i++) begin
      int bp = $urandom_range(8, 60);
      frame(bp, bp, 8'($urandom), 1'($urandom_range(0, 3) == 0), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
