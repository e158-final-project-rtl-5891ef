// bit_counter_tb: self-checking test of the self-clearing bit counter.
// With LIMIT 10: done must rise exactly one cycle after the tenth enable since
// the last clear or done, last one cycle, and never otherwise. Enables and
// occasional clears are random; a reference count is kept in the testbench.
module bit_counter_tb;
  logic clk = 0, clear, enable, done;
  int ref_count, pulses = 0;
  int checks = 0, failures = 0;

  bit_counter #(.WIDTH(4), .LIMIT(10)) dut (.clk(clk), .clear(clear), .enable(enable), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1; enable = 0;
    @(negedge clk);
    ref_count = 0;
    for (int i = 0; i < 3000; i++) begin
      // done reflects the count reached so far
      checks++;
      if (done !== (ref_count == 10)) begin
        failures++;
        $display("cycle %0d: done=%b reference count %0d", i, done, ref_count);
      end
      if (done) pulses++;
      clear  = ($urandom_range(0, 199) == 0);
      enable = ($urandom_range(0, 1) == 0);
      if (clear || ref_count == 10) ref_count = 0;
      else if (enable)              ref_count++;
      @(negedge clk);
    end
    checks++;
    if (pulses < 20) begin
      failures++;
      $display("only %0d done pulses", pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
