// rx_brg_tb: self-checking test of the receive bit-rate generator.
// After a start pulse in cycle 0 the sample pulse must come in cycle
// bp - bp/2 and then every bp cycles, and nowhere in between. Bit periods
// cover the minimum (8), odd and even values and the largest (255).
module rx_brg_tb;
  logic clk = 0, reset, start, equal;
  logic [7:0] bit_period;
  int checks = 0, failures = 0;
  int periods[7] = '{8, 9, 16, 39, 40, 100, 255};
  int first;

  rx_brg dut (.clk(clk), .reset(reset), .bit_period(bit_period), .start(start), .equal(equal));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; start = 0; bit_period = 8;
    repeat (2) @(negedge clk);
    reset = 0;
    foreach (periods[p]) begin
      bit_period = 8'(periods[p]);
      repeat ($urandom_range(1, 300)) @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      first = periods[p] - periods[p] / 2;
      for (int n = 1; n <= first + 3 * periods[p]; n++) begin
        checks++;
        if (equal !== (n >= first && ((n - first) % periods[p]) == 0)) begin
          failures++;
          $display("bp %0d, cycle %0d after start: equal=%b", periods[p], n, equal);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
