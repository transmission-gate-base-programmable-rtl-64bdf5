// Full adder built from two half adders and an OR gate.
//
// The first half adder adds a and b; the second adds their partial sum and
// the carry in. A carry leaves the cell if either half adder produced one
// (the two carries can never both be 1, so an OR suffices).
//
// Interface: a, b, cin in; sum, cout out. Purely combinational. The
// two-half-adders-plus-OR structure is the design's own.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic s1, c1, c2;

  half_adder u_ha1 (.a(a),  .b(b),   .sum(s1),  .carry(c1));
  half_adder u_ha2 (.a(s1), .b(cin), .sum(sum), .carry(c2));

  assign cout = c1 | c2;

endmodule
