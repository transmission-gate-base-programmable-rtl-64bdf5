// Half adder in transmission-gate multiplexer form.
//
// The sum is an XOR made of two transmission gates and an inverter: input b
// steers either a (b = 0) or its inverse (b = 1) to the output. The carry is
// a pass-gate AND: b passes a through, otherwise a constant 0 is selected.
// Both outputs are written as the multiplexers they are built from, which
// synthesizes to an ordinary XOR and AND.
//
// Interface: a, b in; sum = a ^ b, carry = a & b out. Purely combinational.
// The XOR-by-two-gates-and-an-inverter structure follows the design; the
// form of the carry gate is this implementation's choice.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  logic a_n;

  assign a_n = ~a;                       // the one inverter

  always_comb begin
    sum   = b ? a_n : a;                 // two transmission gates selected by b
    carry = b ? a   : 1'b0;              // pass-gate AND
  end

endmodule
