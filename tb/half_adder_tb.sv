// Self-checking testbench for half_adder: applies all four input pairs and
// compares sum and carry with the arithmetic a + b.
module half_adder_tb;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      logic [1:0] expect_v;
      {a, b} = i[1:0];
      expect_v = 2'(int'(a) + int'(b));
      #1;
      checks++;
      if ({carry, sum} !== expect_v) begin
        failures++;
        $display("FAIL a=%b b=%b got c=%b s=%b", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
