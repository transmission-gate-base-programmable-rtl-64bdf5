// Self-checking testbench for ripple_counter at its default width: counts
// through more than one full cycle of 2**8 states, checking after every
// rising clock edge that the count has advanced by exactly one (wrapping
// from 255 to 0), and checks that rst_n clears it in the middle of a count.
module ripple_counter_tb;
  localparam int W = 8;
  logic rst_n, clk;
  logic [W-1:0] count;
  logic [W-1:0] model;
  int checks = 0, failures = 0;
  int wraps = 0;

  ripple_counter dut (.rst_n(rst_n), .clk(clk), .count(count));

  task automatic check(input string what);
    checks++;
    if (count !== model) begin
      failures++;
      if (failures < 10) $display("FAIL %s: count=%0d expected %0d", what, count, model);
    end
  endtask

  task automatic tick();
    clk = 1;
    if (model == W'((1 << W) - 1)) wraps++;
    model = model + 1'b1;
    #5 check("after edge");
    clk = 0;
    #5 check("low phase");
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0; rst_n = 0; model = '0;
    #5 check("in reset");
    rst_n = 1;
    #5 check("after reset");
    for (int i = 0; i < (1 << W) + 20; i++) tick();
    rst_n = 0; model = '0;
    #5 check("mid-count reset");
    rst_n = 1;
    #5;
    for (int i = 0; i < 37; i++) tick();
    checks++;
    if (wraps != 1) begin
      failures++;
      $display("FAIL expected one wrap, saw %0d", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
