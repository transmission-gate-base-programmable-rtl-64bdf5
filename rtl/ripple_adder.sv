// WIDTH-bit parallel adder: a chain of full adders with the carry rippling
// from bit 0 to bit WIDTH-1.
//
// Each cell waits for the carry of the cell below, so the delay grows
// linearly with WIDTH. sum = a + b + cin modulo 2**WIDTH, cout is the carry
// out of the top bit. Purely combinational.
//
// WIDTH defaults to the eight bits of the design; the cascade of full adders
// is the design's own structure.
module ripple_adder #(
  parameter int unsigned WIDTH = inc_dec_pkg::DEFAULT_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];

endmodule
