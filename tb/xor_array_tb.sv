// Self-checking testbench for xor_array: for every 8-bit input and both
// values of invert, checks that the word passes unchanged or inverted.
module xor_array_tb;
  localparam int W = 8;
  logic [W-1:0] x, y;
  logic invert;
  int checks = 0, failures = 0;

  xor_array dut (.x(x), .invert(invert), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++)
      for (int c = 0; c < 2; c++) begin
        logic [W-1:0] expect_v;
        x = W'(i); invert = 1'(c);
        expect_v = (c == 1) ? W'((1 << W) - 1 - i) : W'(i);
        #1;
        checks++;
        if (y !== expect_v) begin
          failures++;
          if (failures < 10) $display("FAIL x=%h inv=%b y=%h", x, invert, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
