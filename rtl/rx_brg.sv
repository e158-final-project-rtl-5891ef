// rx_brg: receive bit-rate generator.
//
// An 8-bit counter counts clock cycles and equal is high when it reaches
// bit_period - 1, after which it restarts from 0, so equal pulses once every
// bit_period cycles. When a start bit is seen (start high) the counter is
// preset to bit_period/2 (bit_period >> 1) instead, so the first pulse comes
// bit_period - bit_period/2 cycles after the start edge: near the middle of the
// start bit, and every later pulse near the middle of a later bit. The preset
// and half-period offset are the document's. Letting start win over the
// wrap-around clear is this design's choice; the original clears first, which
// loses the preset if the start edge lands on the idle counter's wrap cycle.
module rx_brg #(
  parameter int unsigned BP_WIDTH = uart_pkg::BP_WIDTH
) (
  input  logic                clk,
  input  logic                reset,
  input  logic [BP_WIDTH-1:0] bit_period,
  input  logic                start,
  output logic                equal
);

  logic [BP_WIDTH-1:0] count, count_next, half_period, last;

  assign half_period = bit_period >> 1;
  assign last        = bit_period - 1'b1;
  assign equal       = (count == last);

  always_comb begin
    if (start)      count_next = half_period;
    else if (equal) count_next = '0;
    else            count_next = count + 1'b1;
  end

  flopr #(.WIDTH(BP_WIDTH)) u_count (
    .clk  (clk),
    .reset(reset),
    .d    (count_next),
    .q    (count)
  );

endmodule
