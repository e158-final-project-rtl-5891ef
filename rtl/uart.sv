// uart: UART core with independent transmitter and receiver.
//
// Serial frames are 10 bits: a start bit (high), 8 data bits LSB first and a
// stop bit (low); the line idles low. Both directions run at one bit rate set
// by bit_period, the number of clock cycles per bit (8-bit, 1..255; 0 means
// 256). Transmitter: pulse txdata_write for one cycle with a byte on data_tx;
// trdy goes low until the byte has moved into the shift register, after which
// a second byte may be written while the first is sent. Receiver: a high level
// on RxD while idle starts a frame; every bit is sampled near its middle and,
// one cycle after the stop bit is sampled, rxdata_rdy pulses with the byte on
// data_rx (held until the next frame) and rx_fe pulses with it if the stop bit
// was not low.
//
// Structure: two control blocks (tx_module, rx_module) and two datapaths
// (tx_line, rx_line), wired as in the document's core schematic. The
// document's two-phase clock (ph1, ph2) is a single clock clk here, all state
// changing on its rising edge; reset is synchronous and active high.
// txdata_write is also routed to tx_line, to enable its holding register.
module uart
  import uart_pkg::*;
(
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 txdata_write,
  input  logic [BP_WIDTH-1:0]  bit_period,
  input  logic [DATA_BITS-1:0] data_tx,
  input  logic                 RxD,
  output logic                 TxD,
  output logic                 trdy,
  output logic                 rxdata_rdy,
  output logic                 rx_fe,
  output logic [DATA_BITS-1:0] data_rx
);

  logic tx_rdy, txshift_enable;
  logic rxshift_enable, stopbit;

  tx_module #(.PACKET_BITS(PACKET_BITS), .BP_WIDTH(BP_WIDTH)) u_tx_module (
    .clk           (clk),
    .reset         (reset),
    .txdata_write  (txdata_write),
    .bit_period    (bit_period),
    .trdy          (trdy),
    .tx_rdy        (tx_rdy),
    .txshift_enable(txshift_enable)
  );

  tx_line #(.DATA_BITS(DATA_BITS)) u_tx_line (
    .clk           (clk),
    .reset         (reset),
    .load          (txdata_write),
    .data_tx       (data_tx),
    .tx_rdy        (tx_rdy),
    .txshift_enable(txshift_enable),
    .TxD           (TxD)
  );

  rx_module #(.PACKET_BITS(PACKET_BITS), .BP_WIDTH(BP_WIDTH)) u_rx_module (
    .clk           (clk),
    .reset         (reset),
    .bit_period    (bit_period),
    .stopbit       (stopbit),
    .RxD           (RxD),
    .rxshift_enable(rxshift_enable),
    .rxdata_rdy    (rxdata_rdy),
    .rx_fe         (rx_fe)
  );

  rx_line #(.DATA_BITS(DATA_BITS)) u_rx_line (
    .clk    (clk),
    .reset  (reset),
    .RxD    (RxD),
    .en     (rxshift_enable),
    .rx_rdy (rxdata_rdy),
    .stopbit(stopbit),
    .rxdata (data_rx)
  );

endmodule
