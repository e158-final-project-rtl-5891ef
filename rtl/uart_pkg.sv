// uart_pkg: constants and types shared by the UART blocks.
//
// A frame is PACKET_BITS = 10 bits: one start bit (high), DATA_BITS = 8 data
// bits sent least significant bit first, one stop bit (low). The line idles low.
// The bit rate is set by an 8-bit bit period, the number of clock cycles per
// serial bit, shared by transmitter and receiver. These sizes are the
// document's; the encoding of the transmit controller's states is this
// design's own (the original uses one-hot S0..S3).
package uart_pkg;

  localparam int unsigned DATA_BITS   = 8;
  localparam int unsigned PACKET_BITS = 10;
  localparam int unsigned BP_WIDTH    = 8;

  // Transmit controller states.
  //   TX_IDLE  (S0) wait for a byte in the holding register and an empty shifter
  //   TX_READ  (S1) first load cycle: holding register read, BRG and bit count cleared
  //   TX_LOAD  (S2) second load cycle: shift register takes the parallel frame
  //   TX_SEND  (S3) frame is shifted out; leave when the shifter reports empty
  typedef enum logic [1:0] {
    TX_IDLE = 2'd0,
    TX_READ = 2'd1,
    TX_LOAD = 2'd2,
    TX_SEND = 2'd3
  } tx_state_e;

endpackage
