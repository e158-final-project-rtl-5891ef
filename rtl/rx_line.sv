// rx_line: receive datapath (serial-to-parallel shifter and holding register).
//
// A shift register of DATA_BITS + 1 = 9 stages samples RxD into its top stage
// on every clock with en (rxshift_enable) high, the older samples moving down
// one stage. After the ten samples of a frame the start bit has dropped out of
// the bottom, the eight data bits sit in stages 7..0 (LSB at stage 0) and the
// stop bit in stage 8, which is brought out as stopbit for the framing check.
// In the cycle rx_rdy (rxdata_rdy) is high the holding register copies the data
// stages; rxdata then holds the byte until the next frame completes. The
// structure is the document's; its behavioural model has a tenth stage for the
// start bit that drives nothing, left out here as in its schematic.
module rx_line #(
  parameter int unsigned DATA_BITS = uart_pkg::DATA_BITS
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 RxD,
  input  logic                 en,
  input  logic                 rx_rdy,
  output logic                 stopbit,
  output logic [DATA_BITS-1:0] rxdata
);

  logic [DATA_BITS:0] rxshift;

  flopenr #(.WIDTH(DATA_BITS + 1)) u_rxshift (
    .clk  (clk),
    .reset(reset),
    .en   (en),
    .d    ({RxD, rxshift[DATA_BITS:1]}),
    .q    (rxshift)
  );

  flopenr #(.WIDTH(DATA_BITS)) u_rxdata (
    .clk  (clk),
    .reset(reset),
    .en   (rx_rdy),
    .d    (rxshift[DATA_BITS-1:0]),
    .q    (rxdata)
  );

  assign stopbit = rxshift[DATA_BITS];

endmodule
