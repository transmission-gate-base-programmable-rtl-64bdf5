// Self-checking testbench for ripple_adder at its default width: exhaustive
// over all operand pairs and both carry-in values (2**17 cases at 8 bits),
// compared with integer addition.
module ripple_adder_tb;
  localparam int W = 8;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  ripple_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++)
      for (int j = 0; j < (1 << W); j++)
        for (int c = 0; c < 2; c++) begin
          int expect_v;
          a = W'(i); b = W'(j); cin = 1'(c);
          expect_v = i + j + c;
          #1;
          checks++;
          if ({cout, sum} !== (W+1)'(expect_v)) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d+%0d+%0d got %0d", i, j, c, {cout, sum});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
