// uart_tb: end-to-end test of the UART core.
//
// The transmitter and receiver are exercised at the same time, then joined in
// loopback (RxD = TxD). A monitor decodes TxD cycle by cycle: start bit high,
// data LSB first, each held exactly bit_period cycles, then a low stop bit.
// A byte written to an idle transmitter must start on TxD 4 cycles after the
// write; a byte written while a frame is being sent must follow that frame
// with a 4-cycle stop bit; otherwise the stop level must last at least a bit
// period. data_tx is scrambled right after each write, so the byte sent must
// come from the holding register. A driver sends frames on RxD, some with a
// high (illegal) stop bit and some 2.5 % off the programmed rate; every
// rxdata_rdy must bring the next expected byte and rx_fe exactly for the bad
// stop bits. data_rx is read in the cycle after rxdata_rdy, when the holding
// register has taken the byte. For an exact-rate frame rxdata_rdy must come
// bp - bp/2 + 9*bp + 1 cycles after the start edge (77 for bit period 8).
// Each mechanism is counted and must have happened at least once. The core
// runs with its default (and only) configuration.
module uart_tb;
  logic       clk = 1'b0, reset, txdata_write, RxD, TxD, trdy, rxdata_rdy, rx_fe;
  logic [7:0] bit_period, data_tx, data_rx;
  logic       loopback, rxd_src;
  int         cyc = 0;
  int         checks = 0, failures = 0;

  // mechanisms seen
  int n_tx_frames = 0, n_idle_start = 0, n_back_to_back = 0, n_rx_frames = 0, n_fe = 0;
  int n_rate_skew = 0, n_loopback = 0, n_rx_latency = 0, n_bp_values = 0;

  typedef struct {
    logic [7:0] data;
    logic       fe;
    int         rdy_cycle;  // -1: not checked
    bit         skew;
  } rx_expect_t;

  logic [7:0] txq[$];
  rx_expect_t rxq[$];
  int         expect_start = -1;
  bit         tx_active = 0;

  assign RxD = loopback ? TxD : rxd_src;

  uart dut (
    .clk(clk), .reset(reset), .txdata_write(txdata_write), .bit_period(bit_period),
    .data_tx(data_tx), .RxD(RxD), .TxD(TxD), .trdy(trdy), .rxdata_rdy(rxdata_rdy),
    .rx_fe(rx_fe), .data_rx(data_rx)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("cycle %0d: %s", cyc, msg);
  endtask

  // ---------------------------------------------------------------- TxD monitor
  initial begin : tx_monitor
    static bit  have_start = 0;
    logic [8:0] bits;
    int         bp, stop_len;
    @(negedge reset);
    forever begin
      if (!have_start) begin
        do begin @(negedge clk); #1; end while (TxD !== 1'b1);
      end
      have_start = 0;
      tx_active  = 1;
      bp = (bit_period == 0) ? 256 : int'(bit_period);
      if (expect_start >= 0) begin
        checks++;
        if (cyc != expect_start) fail($sformatf("start bit at %0d, expected %0d", cyc, expect_start));
        else n_idle_start++;
        expect_start = -1;
      end
      checks++;
      if (txq.size() == 0) begin
        fail("start bit with nothing written");
        bits = 9'h1;
      end else begin
        bits = {txq.pop_front(), 1'b1};
      end
      for (int k = 0; k < 9; k++)
        for (int j = 0; j < bp; j++) begin
          checks++;
          if (TxD !== bits[k]) fail($sformatf("TxD bit %0d, cycle %0d of it: %b", k, j, TxD));
          @(negedge clk); #1;
        end
      stop_len = 0;
      while (TxD === 1'b0 && stop_len < bp) begin
        stop_len++;
        @(negedge clk); #1;
      end
      checks++;
      if (TxD === 1'b1) begin
        // next frame follows immediately
        have_start = 1;
        n_back_to_back++;
        if (stop_len != 4) fail($sformatf("back-to-back stop bit of %0d cycles", stop_len));
      end else if (stop_len < bp) begin
        fail("stop bit too short");
      end
      n_tx_frames++;
      tx_active = have_start;
    end
  end

  // ------------------------------------------------------------ receive checker
  initial begin : rx_checker
    rx_expect_t e;
    logic       fe_now;
    int         rdy_at;
    forever begin
      @(negedge clk); #1;
      if (!reset && rx_fe && !rxdata_rdy) fail("rx_fe without rxdata_rdy");
      if (!reset && rxdata_rdy) begin
        checks++;
        if (rxq.size() == 0) begin
          fail("rxdata_rdy with no frame sent");
        end else begin
          e = rxq.pop_front();
          fe_now = rx_fe;
          rdy_at = cyc;
          // rxdata_rdy loads the holding register: data_rx is valid a cycle later
          @(negedge clk); #1;
          if (data_rx !== e.data || fe_now !== e.fe)
            fail($sformatf("received %h fe %b, expected %h fe %b", data_rx, fe_now, e.data, e.fe));
          else begin
            n_rx_frames++;
            if (e.fe) n_fe++;
            if (e.skew) n_rate_skew++;
            if (loopback) n_loopback++;
          end
          if (e.rdy_cycle >= 0) begin
            checks++;
            if (rdy_at != e.rdy_cycle) fail($sformatf("rxdata_rdy at %0d, expected %0d", rdy_at, e.rdy_cycle));
            else n_rx_latency++;
          end
        end
      end
    end
  end

  // -------------------------------------------------------------------- drivers
  // Write a byte once trdy is high. idle: first wait for the line to be quiet
  // and expect the start bit 4 cycles after the write.
  task automatic tx_write(input logic [7:0] b, input bit idle);
    if (idle) while (tx_active || txq.size() != 0 || trdy !== 1'b1) @(negedge clk);
    while (trdy !== 1'b1) @(negedge clk);
    if (idle) expect_start = cyc + 4;
    txq.push_back(b);
    if (loopback) rxq.push_back('{data: b, fe: 1'b0, rdy_cycle: -1, skew: 1'b0});
    data_tx      = b;
    txdata_write = 1'b1;
    @(negedge clk);
    txdata_write = 1'b0;
    data_tx      = ~b ^ 8'($urandom);
  endtask

  // Send one frame on RxD with bits of L cycles; the receiver is set to bp.
  task automatic rx_send(input logic [7:0] b, input logic stop, input int L, input int bp);
    logic [9:0] bits  = {stop, b, 1'b1};
    int         first = bp - bp / 2;
    rx_expect_t e;
    e.data = b; e.fe = stop; e.skew = (L != bp);
    e.rdy_cycle = (L == bp) ? cyc + first + 9 * bp + 1 : -1;
    rxq.push_back(e);
    for (int c = 0; c < 10 * L; c++) begin
      // a high stop bit is dropped once the frame is complete, or the
      // receiver would take it as the next start bit
      rxd_src = (c / L == 9 && c > first + 9 * bp) ? 1'b0 : bits[c / L];
      @(negedge clk);
    end
    rxd_src = 1'b0;
    repeat ($urandom_range(bp + 2, 2 * bp + 2)) @(negedge clk);
  endtask

  task automatic wait_quiet();
    while (tx_active || txq.size() != 0 || rxq.size() != 0 || trdy !== 1'b1) @(negedge clk);
    repeat (20) @(negedge clk);
  endtask

  initial begin
    reset = 1'b1; txdata_write = 1'b0; data_tx = 8'h00; bit_period = 8'd8;
    loopback = 1'b0; rxd_src = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (trdy !== 1'b1 || TxD !== 1'b0) fail("after reset trdy must be 1 and TxD 0");
    reset = 1'b0;
    repeat (3) @(negedge clk);

    // 1: transmitter and receiver at once, minimum bit period
    bit_period = 8'd8; n_bp_values++;
    fork
      begin
        tx_write(8'h55, 1);
        tx_write(8'h00, 0);  // waits in the holding register: back to back
        tx_write(8'hFF, 0);
        for (int i = 0; i < 6; i++) tx_write(8'($urandom), 1'($urandom_range(0, 1)));
      end
      begin
        rx_send(8'h55, 1'b0, 8, 8);
        rx_send(8'hA3, 1'b1, 8, 8);  // framing error
        rx_send(8'h00, 1'b0, 8, 8);
        rx_send(8'hFF, 1'b0, 8, 8);
        for (int i = 0; i < 4; i++) rx_send(8'($urandom), 1'($urandom_range(0, 3) == 0), 8, 8);
      end
    join
    wait_quiet();

    // 2: a line 2.5 % off the programmed rate
    bit_period = 8'd40; n_bp_values++;
    fork
      tx_write(8'h96, 1);
      begin
        rx_send(8'h3C, 1'b0, 41, 40);
        rx_send(8'hC3, 1'b0, 39, 40);
      end
    join
    wait_quiet();
    bit_period = 8'd39; n_bp_values++;
    rx_send(8'h55, 1'b0, 40, 39);
    wait_quiet();

    // 3: longest bit period
    bit_period = 8'd255; n_bp_values++;
    fork
      tx_write(8'hA5, 1);
      rx_send(8'h5A, 1'b0, 255, 255);
    join
    wait_quiet();

    // 4: loopback
    bit_period = 8'd13; n_bp_values++;
    loopback = 1'b1;
    for (int i = 0; i < 4; i++) tx_write(8'($urandom), 1);
    wait_quiet();

    checks++; if (n_tx_frames < 12)    fail($sformatf("only %0d frames sent", n_tx_frames));
    checks++; if (n_idle_start == 0)   fail("no write to an idle transmitter");
    checks++; if (n_back_to_back == 0) fail("no back-to-back frames");
    checks++; if (n_rx_frames < 14)    fail($sformatf("only %0d frames received", n_rx_frames));
    checks++; if (n_fe == 0)           fail("no framing error");
    checks++; if (n_rate_skew < 3)     fail("no off-rate reception");
    checks++; if (n_rx_latency == 0)   fail("no receive latency checked");
    checks++; if (n_loopback < 4)      fail("loopback frames missing");
    $display("sent %0d (idle start %0d, back-to-back %0d), received %0d (framing errors %0d, off-rate %0d, loopback %0d), bit periods %0d",
             n_tx_frames, n_idle_start, n_back_to_back, n_rx_frames, n_fe, n_rate_skew, n_loopback, n_bp_values);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
