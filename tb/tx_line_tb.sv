// tx_line_tb: self-checking test of the transmit datapath.
// For a set of bytes (0x00, 0xFF, 0x55 and random ones): write the byte with
// load, then put other data on data_tx to show the holding register keeps it,
// run two tx_rdy cycles with the enable in the second (TxD must be low), then
// give eleven enables a few cycles apart. TxD must show 1, the data LSB first
// and 0, each held until the next enable, and stay 0 afterwards.
module tx_line_tb;
  logic clk = 0, reset, load, tx_rdy, txshift_enable, TxD;
  logic [7:0] data_tx, byte_v;
  logic [9:0] frame;
  int checks = 0, failures = 0;

  tx_line dut (.clk(clk), .reset(reset), .load(load), .data_tx(data_tx), .tx_rdy(tx_rdy),
               .txshift_enable(txshift_enable), .TxD(TxD));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp, input string what);
    checks++;
    if (TxD !== exp) begin
      failures++;
      $display("byte %h, %s: TxD=%b expected %b", byte_v, what, TxD, exp);
    end
  endtask

  initial begin
    reset = 1; load = 0; tx_rdy = 0; txshift_enable = 0; data_tx = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int t = 0; t < 40; t++) begin
      byte_v = (t == 0) ? 8'h00 : (t == 1) ? 8'hFF : (t == 2) ? 8'h55 : 8'($urandom);
      frame  = {1'b0, byte_v, 1'b1};  // sent from bit 0 upward
      data_tx = byte_v; load = 1;
      @(negedge clk);
      load = 0; data_tx = ~byte_v;
      repeat ($urandom_range(0, 3)) @(negedge clk);
      tx_rdy = 1;
      #1 check(1'b0, "first load cycle");
      @(negedge clk);
      txshift_enable = 1;
      #1 check(1'b0, "second load cycle");
      @(negedge clk);
      tx_rdy = 0; txshift_enable = 0;
      for (int b = 0; b < 11; b++) begin
        int gap = $urandom_range(1, 4);
        for (int g = 0; g < gap; g++) begin
          #1 check(b < 10 ? frame[b] : 1'b0, $sformatf("bit %0d", b));
          if (g == gap - 1) txshift_enable = 1;
          @(negedge clk);
          txshift_enable = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
