// tx_fsm: transmit controller.
//
// Four states (see uart_pkg::tx_state_e). From TX_IDLE it moves to TX_READ when
// the holding register holds a byte (tx_data) and the shift register is empty
// (!tx_busy). TX_READ and TX_LOAD are the two load cycles: txdata_read is high
// in TX_READ (it marks the holding register empty again and restarts the bit
// timing) and tx_rdy in both (it selects the parallel frame into the shift
// register and holds TxD low). TX_SEND waits while the frame is shifted out,
// then goes straight to TX_READ if another byte is waiting, else to TX_IDLE.
// The states and transitions are the document's; reset going straight to
// TX_IDLE and the binary encoding are this design's.
module tx_fsm
  import uart_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic tx_data,
  input  logic tx_busy,
  output logic tx_rdy,
  output logic txdata_read
);

  tx_state_e state, state_next;

  always_ff @(posedge clk) begin
    if (reset) state <= TX_IDLE;
    else       state <= state_next;
  end

  always_comb begin
    unique case (state)
      TX_IDLE: state_next = (tx_data && !tx_busy) ? TX_READ : TX_IDLE;
      TX_READ: state_next = TX_LOAD;
      TX_LOAD: state_next = TX_SEND;
      TX_SEND: begin
        if (tx_busy)      state_next = TX_SEND;
        else if (tx_data) state_next = TX_READ;
        else              state_next = TX_IDLE;
      end
      default: state_next = TX_IDLE;
    endcase
  end

  assign txdata_read = (state == TX_READ);
  assign tx_rdy      = (state == TX_READ) || (state == TX_LOAD);

endmodule
