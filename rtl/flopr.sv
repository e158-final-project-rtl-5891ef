// flopr: resettable flip-flop cell, WIDTH bits wide.
//
// q takes d on every rising clock edge, or all zeros while reset is high
// (synchronous reset). This is the custom datapath cell of the design, which
// the original builds as a master-slave latch pair on a two-phase clock with an
// active-low reset gate in front of the master; here it is one edge-triggered
// register on clk and the reset is active high, as in the behavioural model of
// the same cell. WIDTH defaults to 8 as in that model.
module flopr #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (reset) q <= '0;
    else       q <= d;
  end

endmodule
