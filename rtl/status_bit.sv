// status_bit: set/clear status flip-flop (trdy, tmt and rmt of the UART).
//
// On a rising clock edge q becomes 1 if reset or set is high, 0 if clr is high,
// and otherwise holds. Set wins over clear, and global reset sets the bit, so a
// freshly reset UART reports an empty holding register and an empty shift
// register. Both priorities follow the document's set/reset flop; the result
// is visible one cycle after the request.
module status_bit (
  input  logic clk,
  input  logic reset,
  input  logic set,
  input  logic clr,
  output logic q
);

  always_ff @(posedge clk) begin
    if (reset || set) q <= 1'b1;
    else if (clr)     q <= 1'b0;
  end

endmodule
