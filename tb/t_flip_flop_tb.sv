// Self-checking testbench for t_flip_flop: after reset q must be 0, must
// change state on each rising clk edge and only then, and qn must always be
// the inverse of q.
module t_flip_flop_tb;
  logic rst_n, clk, q, qn;
  logic model;
  int checks = 0, failures = 0;

  t_flip_flop dut (.rst_n(rst_n), .clk(clk), .q(q), .qn(qn));

  task automatic check(input string what);
    checks++;
    if (q !== model || qn !== ~model) begin
      failures++;
      $display("FAIL %s: q=%b qn=%b expected q=%b", what, q, qn, model);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0; rst_n = 0; model = 0;
    #5 check("in reset");
    rst_n = 1;
    #5 check("after reset");
    for (int i = 0; i < 40; i++) begin
      clk = 1; model = ~model;
      #5 check("after rising edge");
      clk = 0;
      #5 check("after falling edge");
    end
    // Reset in the middle of a high clock phase clears the output.
    clk = 1; model = ~model;
    #5 check("rising edge");
    rst_n = 0; model = 0;
    #5 check("reset while clk high");
    rst_n = 1;
    #5 check("release while clk high");
    clk = 0;
    #5 check("falling edge after release");
    clk = 1; model = 1;
    #5 check("first edge after release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
