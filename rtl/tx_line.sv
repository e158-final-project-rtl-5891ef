// tx_line: transmit datapath (holding register and parallel-to-serial shifter).
//
// The holding register takes data_tx in the cycle load (txdata_write) is high.
// The shift register has PACKET_BITS = 10 stages; stage 0 drives the pin. Each
// stage has a 2:1 mux in front of it: while tx_rdy is high the muxes select the
// parallel frame {stop = 0, data, start = 1}, otherwise the next stage up, and
// a 0 enters at the top. The register changes only when txshift_enable is
// high, so the first enable during tx_rdy loads the frame with the start bit
// already at the pin, and each later enable moves the next bit (data LSB
// first, then the stop bit) onto TxD. While tx_rdy is high TxD is forced low.
// Stage order, the constant start and stop levels and the output mux are the
// document's. The enable on the holding register follows the document's
// description of the write strobe (its schematic clocks that register every
// cycle instead); with it data_tx needs to be valid only in the write cycle.
module tx_line #(
  parameter int unsigned DATA_BITS = uart_pkg::DATA_BITS
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 load,
  input  logic [DATA_BITS-1:0] data_tx,
  input  logic                 tx_rdy,
  input  logic                 txshift_enable,
  output logic                 TxD
);

  localparam int unsigned NSTAGE = DATA_BITS + 2;

  logic [DATA_BITS-1:0] txdata;
  logic [NSTAGE-1:0]    txshift, txshift_next;

  flopenr #(.WIDTH(DATA_BITS)) u_txdata (
    .clk  (clk),
    .reset(reset),
    .en   (load),
    .d    (data_tx),
    .q    (txdata)
  );

  // Top stage always takes 0 (the stop level); the others take the parallel
  // frame or the stage above.
  assign txshift_next = {1'b0, (tx_rdy ? {txdata, 1'b1} : txshift[NSTAGE-1:1])};

  flopenr #(.WIDTH(NSTAGE)) u_txshift (
    .clk  (clk),
    .reset(reset),
    .en   (txshift_enable),
    .d    (txshift_next),
    .q    (txshift)
  );

  assign TxD = tx_rdy ? 1'b0 : txshift[0];

endmodule
