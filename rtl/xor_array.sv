// Row of XOR gates that conditionally inverts a WIDTH-bit word.
//
// With invert = 0 every bit passes unchanged; with invert = 1 every bit is
// flipped (one's complement). Feeding the same invert signal to an adder's
// carry in turns the one's complement into the two's complement, so an adder
// behind this array adds (invert = 0) or subtracts (invert = 1) the word.
//
// Interface: x in, invert in, y out. Purely combinational. Follows the
// design's XOR chain between the counter and the adder.
module xor_array #(
  parameter int unsigned WIDTH = inc_dec_pkg::DEFAULT_WIDTH
) (
  input  logic [WIDTH-1:0] x,
  input  logic             invert,
  output logic [WIDTH-1:0] y
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    assign y[i] = x[i] ^ invert;
  end

endmodule
