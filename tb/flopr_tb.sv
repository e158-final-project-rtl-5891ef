// flopr_tb: self-checking test of the flopr cell.
// Random data and reset are applied for 500 cycles at WIDTH 8; after each
// rising edge q must equal the previous cycle's d, or 0 if reset was high.
module flopr_tb;
  logic clk = 0, reset;
  logic [7:0] d, q, expect_q;
  int checks = 0, failures = 0;

  flopr #(.WIDTH(8)) dut (.clk(clk), .reset(reset), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; d = 8'hA5;
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      reset = ($urandom_range(0, 9) == 0);
      d = 8'($urandom);
      expect_q = reset ? 8'h00 : d;
      @(negedge clk);
      checks++;
      if (q !== expect_q) begin
        failures++;
        $display("cycle %0d: q=%h expected %h", i, q, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
