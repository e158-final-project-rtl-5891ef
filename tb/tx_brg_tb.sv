// tx_brg_tb: self-checking test of the transmit bit-rate generator.
// For several bit periods (limit = bit_period - 1) a load pulse is given; the
// pulse must be high in the load cycle, then again every bit_period cycles
// counting from the cycle after load, and low in between.
module tx_brg_tb;
  logic clk = 0, reset, load, shiftbits;
  logic [7:0] limit;
  int checks = 0, failures = 0;
  int periods[6] = '{1, 2, 8, 13, 40, 255};

  tx_brg dut (.clk(clk), .reset(reset), .load(load), .limit(limit), .shiftbits(shiftbits));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; load = 0; limit = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    foreach (periods[p]) begin
      limit = 8'(periods[p] - 1);
      repeat ($urandom_range(3, 30)) @(negedge clk);
      load = 1;
      #1;
      checks++;
      if (!shiftbits) begin failures++; $display("bp %0d: no pulse in load cycle", periods[p]); end
      @(negedge clk);
      load = 0;
      // cycle n after load: pulse when n-1 is a multiple of the period
      for (int n = 1; n <= 4 * periods[p] + 1; n++) begin
        checks++;
        if (shiftbits !== (((n - 1) % periods[p]) == 0)) begin
          failures++;
          $display("bp %0d, cycle %0d after load: shiftbits=%b", periods[p], n, shiftbits);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
