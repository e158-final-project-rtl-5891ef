// rx_module: receive control.
//
// rmt (receiver idle) is set by reset and by rxdata_rdy. While it is set, RxD
// high is taken as a start bit: that cycle presets the bit-rate generator
// (rx_brg) to half a bit period, clears the bit counter and clears rmt. While
// the receiver is busy each generator pulse becomes rxshift_enable, which
// samples RxD into rx_line near the middle of a bit. The tenth sample (the
// stop bit) brings the counter to its limit: rxdata_rdy is high for the next
// cycle, loads the byte into rx_line's holding register, and re-arms the
// receiver. rx_fe is high with rxdata_rdy when the stop bit was sampled high.
//
// Timing, with the first high cycle of the start bit as cycle 0: sample k is
// taken in cycle (bit_period - bit_period/2) + k*bit_period, k = 0..9, and
// rxdata_rdy is high in the cycle after sample 9 (cycle 77 for bit_period 8).
// The receiver listens again from the cycle after that. RxD is used directly,
// so it must be synchronous to clk. All of this is the document's structure.
module rx_module #(
  parameter int unsigned PACKET_BITS = uart_pkg::PACKET_BITS,
  parameter int unsigned BP_WIDTH    = uart_pkg::BP_WIDTH
) (
  input  logic                clk,
  input  logic                reset,
  input  logic [BP_WIDTH-1:0] bit_period,
  input  logic                stopbit,
  input  logic                RxD,
  output logic                rxshift_enable,
  output logic                rxdata_rdy,
  output logic                rx_fe
);

  logic rmt, brg_set, shiftbits;

  assign brg_set = RxD && rmt;

  status_bit u_rmt (
    .clk  (clk),
    .reset(reset),
    .set  (rxdata_rdy),
    .clr  (brg_set),
    .q    (rmt)
  );

  rx_brg #(.BP_WIDTH(BP_WIDTH)) u_brg (
    .clk       (clk),
    .reset     (reset),
    .bit_period(bit_period),
    .start     (brg_set),
    .equal     (shiftbits)
  );

  assign rxshift_enable = shiftbits && !rmt;

  bit_counter #(.LIMIT(PACKET_BITS)) u_bits_received (
    .clk   (clk),
    .clear (reset || brg_set),
    .enable(rxshift_enable),
    .done  (rxdata_rdy)
  );

  assign rx_fe = rxdata_rdy && stopbit;

  // Samples are taken only while a frame is being received.
  a_shift_when_busy: assert property (@(posedge clk) disable iff (reset)
    rxshift_enable |-> !rmt);

endmodule
