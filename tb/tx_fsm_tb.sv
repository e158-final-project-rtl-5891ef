// tx_fsm_tb: self-checking test of the transmit controller.
// tx_data and tx_busy are driven at random; a reference state machine in the
// testbench (idle, read, load, send) predicts tx_rdy and txdata_read each cycle.
module tx_fsm_tb;
  logic clk = 0, reset, tx_data, tx_busy, tx_rdy, txdata_read;
  int ref_state;  // 0 idle, 1 read, 2 load, 3 send
  int checks = 0, failures = 0, reads = 0;

  tx_fsm dut (.clk(clk), .reset(reset), .tx_data(tx_data), .tx_busy(tx_busy),
              .tx_rdy(tx_rdy), .txdata_read(txdata_read));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; tx_data = 0; tx_busy = 0;
    @(negedge clk);
    reset = 0;
    ref_state = 0;
    for (int i = 0; i < 3000; i++) begin
      tx_data = $urandom_range(0, 1);
      tx_busy = ($urandom_range(0, 2) != 0);
      #1;
      checks++;
      if (txdata_read !== (ref_state == 1) || tx_rdy !== (ref_state == 1 || ref_state == 2)) begin
        failures++;
        $display("cycle %0d: state %0d tx_rdy=%b txdata_read=%b", i, ref_state, tx_rdy, txdata_read);
      end
      if (txdata_read) reads++;
      case (ref_state)
        0: ref_state = (tx_data && !tx_busy) ? 1 : 0;
        1: ref_state = 2;
        2: ref_state = 3;
        default: ref_state = tx_busy ? 3 : (tx_data ? 1 : 0);
      endcase
      @(negedge clk);
    end
    checks++;
    if (reads < 50) begin failures++; $display("only %0d loads", reads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
