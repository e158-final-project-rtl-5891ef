// tx_module: transmit control.
//
// Two status bits track the two transmit registers: trdy (holding register
// empty) is cleared by txdata_write and set by the controller's txdata_read;
// tmt (shift register empty) is cleared by tx_rdy and set by the bit counter's
// done. Both are set by reset. The controller (tx_fsm) starts a frame when
// trdy is low and tmt high, spending two cycles with tx_rdy high. The bit-rate
// generator (tx_brg, limit bit_period-1) and the bit counter are restarted by
// txdata_read; txshift_enable is the generator's pulse gated by !tmt, so the
// first enable, in the second load cycle, loads the frame and ten enables in
// all send it. The counter's done then marks the shifter empty.
//
// Timing from a txdata_write pulse in cycle 0 with the transmitter idle: trdy
// is low in cycles 1-2, tx_rdy high in cycles 2-3, the start bit is on TxD from
// cycle 4 and each bit lasts bit_period cycles. A byte written while a frame is
// being sent starts as soon as the stop bit has reached TxD, so back-to-back
// frames have a stop bit of 4 cycles. All of this is the document's structure.
module tx_module #(
  parameter int unsigned PACKET_BITS = uart_pkg::PACKET_BITS,
  parameter int unsigned BP_WIDTH    = uart_pkg::BP_WIDTH
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                txdata_write,
  input  logic [BP_WIDTH-1:0] bit_period,
  output logic                trdy,
  output logic                tx_rdy,
  output logic                txshift_enable
);

  logic txdata_read, tx_done, tmt, shiftbits;

  status_bit u_trdy (
    .clk  (clk),
    .reset(reset),
    .set  (txdata_read),
    .clr  (txdata_write),
    .q    (trdy)
  );

  status_bit u_tmt (
    .clk  (clk),
    .reset(reset),
    .set  (tx_done),
    .clr  (tx_rdy),
    .q    (tmt)
  );

  tx_fsm u_fsm (
    .clk        (clk),
    .reset      (reset),
    .tx_data    (!trdy),
    .tx_busy    (!tmt),
    .tx_rdy     (tx_rdy),
    .txdata_read(txdata_read)
  );

  bit_counter #(.LIMIT(PACKET_BITS)) u_bits_sent (
    .clk   (clk),
    .clear (reset || txdata_read),
    .enable(txshift_enable),
    .done  (tx_done)
  );

  tx_brg #(.BP_WIDTH(BP_WIDTH)) u_brg (
    .clk      (clk),
    .reset    (reset),
    .load     (txdata_read),
    .limit    (bit_period - 1'b1),
    .shiftbits(shiftbits)
  );

  assign txshift_enable = shiftbits && !tmt;

  // The controller loads only into an empty shift register.
  a_load_when_empty: assert property (@(posedge clk) disable iff (reset)
    txdata_read |-> tmt);

endmodule
