// uart_testplan_tb: the bring-up sequence for the UART core, step by step.
//
//  1. Reset with all inputs low: trdy must be high and TxD low.
//  2. One txdata_write pulse with all other inputs low (byte 0x00, bit period
//     0, which this design runs as 256 cycles per bit): trdy is low for exactly
//     two cycles, the start bit appears 4 cycles after the write and lasts 256
//     cycles, then the line stays low for the rest of the frame.
//  3. Byte 0x55 at bit period 1: TxD carries 1,1,0,1,0,1,0,1,0,0 one cycle each.
//  4. Bytes at bit periods 8, 20 and 100: every level change of TxD falls on a
//     multiple of the bit period after the start edge and the byte decodes.
//  5. RxD high for two cycles at bit period 1: rxdata_rdy 11 cycles after the
//     first high cycle, byte 0x00 (the first sample, one cycle after the
//     start edge, is the start bit; the data samples that follow are low).
//  6. Bit period 8, RxD toggling every 8 cycles from a start bit: rxdata_rdy in
//     cycle 77 and byte 0xAA (start high, then 0,1,0,1,... LSB first).
//  7. Bit period 39, RxD toggling every 40 cycles (2.5 % slow): rxdata_rdy in
//     cycle 372 and byte 0xAA.
// data_rx is read in the cycle after rxdata_rdy, when the holding register has
// taken the byte. The core runs at its default (and only) configuration.
module uart_testplan_tb;
  logic       clk = 1'b0, reset, txdata_write, RxD, TxD, trdy, rxdata_rdy, rx_fe;
  logic [7:0] bit_period, data_tx, data_rx;
  int         checks = 0, failures = 0;

  uart dut (
    .clk(clk), .reset(reset), .txdata_write(txdata_write), .bit_period(bit_period),
    .data_tx(data_tx), .RxD(RxD), .TxD(TxD), .trdy(trdy), .rxdata_rdy(rxdata_rdy),
    .rx_fe(rx_fe), .data_rx(data_rx)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%s: got %0d (0x%h), expected %0d (0x%h)", what, got, got, want, want);
    end
  endtask

  // Write b at bit period bp; return the TxD level in each of n cycles
  // starting with the write cycle.
  task automatic send(input logic [7:0] b, input logic [7:0] bp, input int n, ref logic line[$]);
    bit_period   = bp;
    data_tx      = b;
    txdata_write = 1'b1;
    line.delete();
    for (int c = 0; c < n; c++) begin
      #1 line.push_back(TxD);
      @(negedge clk);
      txdata_write = 1'b0;
      data_tx      = 8'h00;
    end
  endtask

  // Drive RxD from pattern (one entry per cycle, then low) and return the
  // cycle of rxdata_rdy counted from the first pattern cycle, the byte and
// rx_fe in the rxdata_rdy cycle.
  task automatic receive(input logic [7:0] bp, input logic pattern[$], input int n,
                         output int rdy_at, output logic [7:0] byte_v, output logic fe);
    bit_period = bp;
    rdy_at = -1;
    byte_v = 8'hxx;
    fe     = 1'b1;
    for (int c = 0; c < n; c++) begin
      RxD = (c < pattern.size()) ? pattern[c] : 1'b0;
      #1;
      if (rxdata_rdy && rdy_at < 0) begin
        rdy_at = c;
        fe     = rx_fe;
      end
      @(negedge clk);
      if (rdy_at == c) byte_v = data_rx;
    end
    RxD = 1'b0;
  endtask

  logic       line[$];
  logic       pat[$];
  logic [9:0] frame;
  int         rdy_at, low_cycles, edges, bad_edges;
  logic [7:0] got;
  logic       fe;
  int         bps[3] = '{8, 20, 100};

  initial begin
    // 1
    reset = 1'b1; txdata_write = 1'b0; data_tx = 8'h00; bit_period = 8'h00; RxD = 1'b0;
    repeat (5) @(negedge clk);
    reset = 1'b0;
    #1 expect_eq(32'(trdy), 1, "trdy after reset");
    expect_eq(32'(TxD), 0, "TxD after reset");
    @(negedge clk);

    // 2: trdy observed alongside the frame
    fork
      send(8'h00, 8'h00, 2600, line);
      begin
        low_cycles = 0;
        for (int c = 0; c < 8; c++) begin
          #1 if (!trdy) low_cycles++;
          @(negedge clk);
        end
      end
    join
    expect_eq(low_cycles, 2, "cycles with trdy low after one write");
    for (int c = 0; c < 2600; c++) begin
      logic want;
      want = (c >= 4 && c < 4 + 256);
      if (line[c] !== want) begin
        expect_eq(c, -1, "TxD wrong at bit period 0 in this cycle");
        break;
      end
    end
    expect_eq(32'(line[4]), 1, "start bit 4 cycles after the write");
    repeat (20) @(negedge clk);

    // 3
    send(8'h55, 8'd1, 20, line);
    for (int c = 0; c < 10; c++) begin
      // bit 0 first: start, 1,0,1,0,1,0,1,0, stop
      expect_eq(32'(line[4 + c]), 32'(c == 0 || (c >= 1 && c <= 8 && (c % 2) == 1)), $sformatf("0x55 at bit period 1, bit %0d", c));
    end
    repeat (20) @(negedge clk);

    // 4
    foreach (bps[i]) begin
      logic [7:0] b;
      b = 8'($urandom);
      frame = {1'b0, b, 1'b1};
      send(b, 8'(bps[i]), 4 + 10 * bps[i] + 4, line);
      bad_edges = 0;
      edges = 0;
      for (int c = 5; c < 4 + 10 * bps[i]; c++)
        if (line[c] != line[c - 1]) begin
          edges++;
          if ((c - 4) % bps[i] != 0) bad_edges++;
        end
      expect_eq(bad_edges, 0, $sformatf("TxD edges off the bit grid at bit period %0d", bps[i]));
      checks++;
      if (edges == 0 && b != 8'h00 && b != 8'hFF) begin
        failures++; $display("no TxD edges at bit period %0d", bps[i]);
      end
      for (int k = 0; k < 10; k++)
        expect_eq(32'(line[4 + k * bps[i] + bps[i] / 2]), 32'(frame[k]), $sformatf("bit %0d at bit period %0d", k, bps[i]));
      repeat (10) @(negedge clk);
    end

    // 5
    pat = '{1'b1, 1'b1};
    receive(8'd1, pat, 20, rdy_at, got, fe);
    expect_eq(rdy_at, 11, "rxdata_rdy after a two-cycle pulse at bit period 1");
    expect_eq(32'(got), 32'h00, "byte after a two-cycle pulse");
    repeat (5) @(negedge clk);

    // 6
    pat.delete();
    for (int c = 0; c < 80; c++) pat.push_back(((c / 8) % 2) == 0);
    receive(8'd8, pat, 100, rdy_at, got, fe);
    expect_eq(rdy_at, 77, "rxdata_rdy for the alternating line at bit period 8");
    expect_eq(32'(got), 32'hAA, "byte for the alternating line at bit period 8");
    expect_eq(32'(fe), 0, "no framing error at bit period 8");
    repeat (5) @(negedge clk);

    // 7
    pat.delete();
    for (int c = 0; c < 400; c++) pat.push_back(((c / 40) % 2) == 0);
    receive(8'd39, pat, 420, rdy_at, got, fe);
    expect_eq(rdy_at, 372, "rxdata_rdy for a 40-cycle line at bit period 39");
    expect_eq(32'(got), 32'hAA, "byte for a 40-cycle line at bit period 39");
    expect_eq(32'(fe), 0, "no framing error at bit period 39");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
