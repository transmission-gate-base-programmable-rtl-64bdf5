// Self-checking testbench for full_adder. It applies every ordered pair of
// the eight input combinations (000 ... 111), i.e. all 64 input transitions,
// and checks sum and carry against a + b + cin after each one.
module full_adder_tb;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic apply(input logic [2:0] v);
    logic [1:0] expect_v;
    {a, b, cin} = v;
    expect_v = 2'(int'(v[2]) + int'(v[1]) + int'(v[0]));
    #1;
    checks++;
    if ({cout, sum} !== expect_v) begin
      failures++;
      $display("FAIL a=%b b=%b cin=%b got cout=%b sum=%b", a, b, cin, cout, sum);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int from = 0; from < 8; from++)
      for (int to = 0; to < 8; to++) begin
        apply(3'(from));
        apply(3'(to));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
