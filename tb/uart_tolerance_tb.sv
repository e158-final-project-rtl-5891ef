// uart_tolerance_tb: receive tolerance sweep of the UART core.
//
// The receiver is specified to accept a line whose bit length differs from
// bit_period by up to 2.5 % when bit_period is 40 or more, and a line at the
// exact rate for bit periods 8 to 39. This testbench sweeps every bit period
// from 8 to 255. Below 40 it sends one random byte at the exact rate; from 40
// on it sends one byte with bits 2.5 % longer and one with bits 2.5 % shorter
// (bit k starts at cycle floor(k * bit_period * (1000 +- 25) / 1000)). Each
// frame must come back on data_rx without a framing error. The core runs at
// its default (and only) configuration.
module uart_tolerance_tb;
  logic       clk = 1'b0, reset, RxD, TxD, trdy, rxdata_rdy, rx_fe;
  logic [7:0] bit_period, data_rx;
  int         checks = 0, failures = 0, frames = 0, skewed = 0;

  uart dut (
    .clk(clk), .reset(reset), .txdata_write(1'b0), .bit_period(bit_period),
    .data_tx(8'h00), .RxD(RxD), .TxD(TxD), .trdy(trdy), .rxdata_rdy(rxdata_rdy),
    .rx_fe(rx_fe), .data_rx(data_rx)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send byte b with bits of bp * permille / 1000 cycles, then stay low for
  // two bit periods; check the byte that the receiver reports.
  task automatic frame(input int bp, input int permille, input logic [7:0] b);
    logic [9:0] bits = {1'b0, b, 1'b1};
    int         len  = (10 * bp * permille) / 1000;
    logic       got_rdy = 1'b0, fe = 1'b0;
    bit_period = 8'(bp);
    for (int c = 0; c < len + 2 * bp; c++) begin
      int k = 0;
      while (k < 10 && c >= ((k + 1) * bp * permille) / 1000) k++;
      RxD = (k < 10) ? bits[k] : 1'b0;
      #1;
      if (rxdata_rdy) begin
        got_rdy = 1'b1;
        fe      = rx_fe;
        @(negedge clk);
        checks++;
        if (data_rx !== b || fe) begin
          failures++;
          $display("bit period %0d, bits %0d/1000 of it: got %h fe %b, sent %h", bp, permille, data_rx, fe, b);
        end
        continue;
      end
      @(negedge clk);
    end
    checks++;
    if (!got_rdy) begin
      failures++;
      $display("bit period %0d, bits %0d/1000 of it: no rxdata_rdy", bp, permille);
    end
    frames++;
    if (permille != 1000) skewed++;
  endtask

  initial begin
    reset = 1'b1; RxD = 1'b0; bit_period = 8'd8;
    repeat (4) @(negedge clk);
    reset = 1'b0;
    repeat (4) @(negedge clk);
    for (int bp = 8; bp <= 255; bp++) begin
      if (bp < 40) begin
        frame(bp, 1000, 8'($urandom));
      end else begin
        frame(bp, 1025, 8'($urandom));
        frame(bp, 975, 8'($urandom));
      end
    end
    checks++;
    if (skewed < 400) begin failures++; $display("only %0d off-rate frames", skewed); end
    $display("%0d frames, %0d of them off-rate", frames, skewed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
