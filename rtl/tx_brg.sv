// tx_brg: transmit bit-rate generator.
//
// An 8-bit counter counts clock cycles. It is cleared by global reset, by load
// (the first load cycle of a new frame) and when it equals limit; the
// transmitter feeds limit = bit_period - 1, so the count runs 0 .. bit_period-1
// and wraps. shiftbits is high in every cycle where the count is 0, and in the
// load cycle, which makes one shift pulse every bit_period cycles, the first
// one in the cycle after load. bit_period = 1 shifts every cycle; bit_period = 0
// wraps limit to 255 and gives 256 cycles per bit. The structure is the
// document's; the counter register is the flopr cell.
module tx_brg #(
  parameter int unsigned BP_WIDTH = uart_pkg::BP_WIDTH
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                load,
  input  logic [BP_WIDTH-1:0] limit,
  output logic                shiftbits
);

  logic [BP_WIDTH-1:0] count, count_next;
  logic                equal;

  assign equal      = (count == limit);
  assign count_next = count + 1'b1;
  assign shiftbits  = (count == '0) || load;

  flopr #(.WIDTH(BP_WIDTH)) u_count (
    .clk  (clk),
    .reset(reset || equal || load),
    .d    (count_next),
    .q    (count)
  );

endmodule
