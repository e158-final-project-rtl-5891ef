// tx_module_tb: self-checking test of the transmit control.
// For several bit periods a byte is written with the transmitter idle and a
// second one while the first frame is being sent. A schedule worked out in the
// testbench gives, for every cycle: trdy low from the cycle after a write to
// the first load cycle; tx_rdy in the two load cycles; ten txshift_enable
// pulses bit_period apart from the second load cycle. An idle write loads in
// the second cycle after it; a waiting byte loads 4 + 9*bit_period cycles
// after the previous frame's first load cycle. At bit period 1 an eleventh
// enable falls in the cycle the frame is reported done.
module tx_module_tb;
  localparam int N = 12000;
  logic clk = 0, reset, txdata_write, trdy, tx_rdy, txshift_enable;
  logic [7:0] bit_period;
  logic exp_trdy[N], exp_rdy[N], exp_en[N], wr[N];
  int bps[5] = '{1, 3, 8, 20, 37};
  int checks = 0, failures = 0, cyc, t, s1, s2, w1, w2, bp;

  tx_module dut (.clk(clk), .reset(reset), .txdata_write(txdata_write), .bit_period(bit_period),
                 .trdy(trdy), .tx_rdy(tx_rdy), .txshift_enable(txshift_enable));

  always #5 clk = ~clk;

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; txdata_write = 0; bit_period = 8;
    repeat (3) @(negedge clk);
    reset = 0;
    foreach (bps[i]) begin
      bp = bps[i];
      bit_period = 8'(bp);
      // build the schedule relative to this run's cycle 0
      for (int c = 0; c < N; c++) begin exp_trdy[c] = 1; exp_rdy[c] = 0; exp_en[c] = 0; wr[c] = 0; end
      w1 = 5; s1 = w1 + 2;
      w2 = s1 + 1 + $urandom_range(0, 9 * bp + 1);
      s2 = s1 + 4 + 9 * bp;
      wr[w1] = 1; wr[w2] = 1;
      for (int c = w1 + 1; c <= s1; c++) exp_trdy[c] = 0;
      for (int c = w2 + 1; c <= s2; c++) exp_trdy[c] = 0;
      foreach (exp_rdy[c]) if (c == s1 || c == s1 + 1 || c == s2 || c == s2 + 1) exp_rdy[c] = 1;
      for (int j = 0; j < 10; j++) begin exp_en[s1 + 1 + j * bp] = 1; exp_en[s2 + 1 + j * bp] = 1; end
      // at one cycle per bit the generator also fires in the cycle the bit
      // counter reports done, before the shifter is marked empty (a harmless
      // extra shift of the low stop level)
      if (bp == 1) begin exp_en[s1 + 11] = 1; exp_en[s2 + 11] = 1; end
      t = s2 + 12 * bp + 10;
      for (cyc = 0; cyc < t; cyc++) begin
        txdata_write = wr[cyc];
        #1;
        checks++;
        if (trdy !== exp_trdy[cyc] || tx_rdy !== exp_rdy[cyc] || txshift_enable !== exp_en[cyc]) begin
          failures++;
          $display("bp %0d cycle %0d: trdy=%b/%b tx_rdy=%b/%b en=%b/%b (got/expected)", bp, cyc,
                   trdy, exp_trdy[cyc], tx_rdy, exp_rdy[cyc], txshift_enable, exp_en[cyc]);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
