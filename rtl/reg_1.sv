// reg_1: the state register of the encryption loop, a plain WIDTH-bit
// D flip-flop bank written on every rising clock edge.
//
// It has no reset or enable of its own: what it loads is chosen in front of
// it by the input multiplexer (plaintext while the core's rst is high, the
// round result otherwise). q shows d one clock later.
//
// Follows the published schematic (clock and data only); the WIDTH parameter
// is this design's addition.
module reg_1 #(
  parameter int unsigned WIDTH = 128
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) q <= d;

endmodule
