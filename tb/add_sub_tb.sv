// Workload testbench for the adder module of the incrementer/decrementer:
// the XOR array in front of the ripple-carry adder, with the direction bit
// on both the XOR array's invert input and the adder's carry-in. For every
// pair of 8-bit operands it checks that direction 0 gives load + count and
// direction 1 gives load - count (two's complement, modulo 256), together
// with the carry (INC: sum overflowed; DEC: no borrow).
module add_sub_tb;
  localparam int W = 8;
  localparam int MOD = 1 << W;

  logic [W-1:0] load_v, count_v, count_x, result;
  logic         dir, carry;
  int checks = 0, failures = 0;

  xor_array    u_xor (.x(count_v), .invert(dir), .y(count_x));
  ripple_adder u_add (.a(load_v), .b(count_x), .cin(dir), .sum(result), .cout(carry));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 2; d++)
      for (int l = 0; l < MOD; l++)
        for (int c = 0; c < MOD; c++) begin
          int exp_v, exp_c;
          dir = 1'(d); load_v = W'(l); count_v = W'(c);
          if (d == 0) begin
            exp_v = (l + c) % MOD;
            exp_c = (l + c >= MOD) ? 1 : 0;
          end else begin
            exp_v = (l - c + MOD) % MOD;
            exp_c = (l >= c) ? 1 : 0;
          end
          #1;
          checks++;
          if (result !== W'(exp_v) || carry !== 1'(exp_c)) begin
            failures++;
            if (failures < 10)
              $display("FAIL dir=%0d load=%0d count=%0d got %0d/%b expected %0d/%0d",
                       d, l, c, result, carry, exp_v, exp_c);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
