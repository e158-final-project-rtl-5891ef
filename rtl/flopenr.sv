// flopenr: resettable flip-flop with enable, WIDTH bits wide.
//
// On a rising clock edge q becomes 0 if reset is high, else d if en is high,
// else it holds. Reset is synchronous and has priority over the enable. This is
// the enabled datapath register used for the shift and holding registers of
// tx_line and rx_line.
module flopenr #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (reset)   q <= '0;
    else if (en) q <= d;
  end

endmodule
