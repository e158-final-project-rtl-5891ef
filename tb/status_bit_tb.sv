// status_bit_tb: self-checking test of the set/clear status flip-flop.
// Random reset, set and clear for 1000 cycles; the expected bit is 1 after
// reset or set (set wins over clear), 0 after clear alone, else unchanged.
module status_bit_tb;
  logic clk = 0, reset, set, clr, q;
  logic expect_q;
  int checks = 0, failures = 0;

  status_bit dut (.clk(clk), .reset(reset), .set(set), .clr(clr), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; set = 0; clr = 0;
    @(negedge clk);
    expect_q = 1;
    for (int i = 0; i < 1000; i++) begin
      reset = ($urandom_range(0, 19) == 0);
      set   = ($urandom_range(0, 3) == 0);
      clr   = ($urandom_range(0, 2) == 0);
      if (reset || set) expect_q = 1;
      else if (clr)     expect_q = 0;
      @(negedge clk);
      checks++;
      if (q !== expect_q) begin
        failures++;
        $display("cycle %0d: q=%b expected %b (r=%b s=%b c=%b)", i, q, expect_q, reset, set, clr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
