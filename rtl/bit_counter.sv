// bit_counter: self-clearing counter of shifted bits.
//
// The count rises by one on every clock with enable high. done is high while
// the count equals LIMIT; that same cycle clears the count, so done is a
// one-cycle pulse that follows the LIMIT-th enable by one clock. clear (global
// reset or the start of a new frame) also zeroes the count and has priority.
// The document counts 10 bits per frame with a 4-bit register and passes the
// limit in as a signal; here the limit is a parameter since it is constant.
module bit_counter #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned LIMIT = 10
) (
  input  logic clk,
  input  logic clear,
  input  logic enable,
  output logic done
);

  logic [WIDTH-1:0] count;

  assign done = (count == WIDTH'(LIMIT));

  always_ff @(posedge clk) begin
    if (clear || done) count <= '0;
    else if (enable)   count <= count + 1'b1;
  end

endmodule
