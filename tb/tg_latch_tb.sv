// Self-checking testbench for tg_latch: checks that q follows d while en is
// 1, holds while en is 0 whatever d does, and is cleared by rst_n. A model
// register updated in the same way gives the expected value.
module tg_latch_tb;
  logic rst_n, en, d, q;
  logic model;
  int checks = 0, failures = 0;

  tg_latch dut (.rst_n(rst_n), .en(en), .d(d), .q(q));

  task automatic check(input string what);
    #1;
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s: rst_n=%b en=%b d=%b q=%b expected %b", what, rst_n, en, d, q, model);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; en = 1; d = 1; model = 0;
    check("reset");
    rst_n = 1; en = 0; d = 1; model = 0;
    check("hold after reset");
    en = 1; model = 1;
    check("transparent 1");
    d = 0; model = 0;
    check("transparent 0");
    d = 1; model = 1;
    check("transparent 1 again");
    en = 0;
    check("close");
    d = 0;
    check("hold 1 while d=0");
    for (int i = 0; i < 200; i++) begin
      en = 1'($urandom);
      d = 1'($urandom);
      rst_n = ($urandom % 16) != 0;
      if (!rst_n) model = 0;
      else if (en) model = d;
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
