// End-to-end self-checking testbench for inc_dec at its default parameters
// (8 bits). A reference model counts rising clock edges since the last
// reset and predicts value = load_val +/- count (mod 256) and the adder
// carry, checked after every edge, so each step of one per clock cycle is
// verified. The sequence:
//   * count up from a load value of 0 and from 16 (the two preset states
//     the design is shown starting from), then down from both;
//   * count up past 255 so the output wraps and carry_out rises, and down
//     below 0 so the subtraction borrows;
//   * switch direction in the middle of a count;
//   * reload: pulse rst_n with a new load value, then random loads,
//     directions and run lengths.
// Each of these events is counted and a failure is counted for any that
// never happened.
module inc_dec_tb;
  import inc_dec_pkg::*;

  localparam int W = DEFAULT_WIDTH;
  localparam int MOD = 1 << W;

  logic         clk, rst_n;
  dir_e         dir;
  logic [W-1:0] load_val, value;
  logic         carry_out;

  int checks = 0, failures = 0;
  int n_inc = 0, n_dec = 0, n_wrap = 0, n_borrow = 0, n_switch = 0, n_reload = 0;
  int edges = 0;

  inc_dec dut (
    .clk(clk), .rst_n(rst_n), .dir(dir), .load_val(load_val),
    .value(value), .carry_out(carry_out)
  );

  task automatic check(input string what);
    int exp_v, exp_c;
    int n;
    n = edges % MOD;
    if (dir == INC) begin
      exp_v = (int'(load_val) + n) % MOD;
      exp_c = ((int'(load_val) + n) >= MOD) ? 1 : 0;
    end else begin
      exp_v = (int'(load_val) - n + MOD) % MOD;
      exp_c = (int'(load_val) >= n) ? 1 : 0;
    end
    checks++;
    if (value !== W'(exp_v) || carry_out !== 1'(exp_c)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: load=%0d dir=%s edges=%0d value=%0d carry=%b expected %0d/%0d",
                 what, load_val, dir.name(), edges, value, carry_out, exp_v, exp_c);
    end
  endtask

  task automatic step();
    logic [W-1:0] prev_v;
    prev_v = value;
    clk = 1;
    edges++;
    #5;
    check("after edge");
    if (dir == INC) begin
      n_inc++;
      if (value < prev_v) n_wrap++;
    end else begin
      n_dec++;
      if (value > prev_v) n_borrow++;
    end
    clk = 0;
    #5;
  endtask

  task automatic reload(input logic [W-1:0] lv, input dir_e d);
    rst_n = 0;
    load_val = lv;
    dir = d;
    edges = 0;
    #5;
    check("in reset");
    rst_n = 1;
    #5;
    check("after reset");
    n_reload++;
  endtask

  task automatic set_dir(input dir_e d);
    if (d != dir) n_switch++;
    dir = d;
    #1;
    check("direction change");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0; rst_n = 0; dir = INC; load_val = '0;
    #5;

    // Count up from 0 and from 16.
    reload(8'd0, INC);
    repeat (20) step();
    reload(8'd16, INC);
    repeat (20) step();

    // Count down from 16 and from 0 (the latter borrows at once).
    reload(8'd16, DEC);
    repeat (20) step();
    reload(8'd0, DEC);
    repeat (5) step();

    // Count up through the top of the range and a full cycle of the counter.
    reload(8'd250, INC);
    repeat (MOD + 10) step();

    // Switch direction mid-count.
    reload(8'd100, INC);
    repeat (7) step();
    set_dir(DEC);
    repeat (7) step();
    set_dir(INC);
    repeat (3) step();

    // Random reloads, directions and run lengths.
    for (int i = 0; i < 30; i++) begin
      reload(W'($urandom), dir_e'($urandom % 2));
      repeat ($urandom % 40) begin
        if ($urandom % 10 == 0) set_dir(dir_e'(~dir));
        step();
      end
    end

    $display("events: inc=%0d dec=%0d wrap=%0d borrow=%0d dir_switch=%0d reload=%0d",
             n_inc, n_dec, n_wrap, n_borrow, n_switch, n_reload);
    checks++; if (n_inc    == 0) begin failures++; $display("FAIL no increment step");   end
    checks++; if (n_dec    == 0) begin failures++; $display("FAIL no decrement step");   end
    checks++; if (n_wrap   == 0) begin failures++; $display("FAIL no wrap past max");    end
    checks++; if (n_borrow == 0) begin failures++; $display("FAIL no borrow below 0");   end
    checks++; if (n_switch == 0) begin failures++; $display("FAIL no direction switch"); end
    checks++; if (n_reload == 0) begin failures++; $display("FAIL no reload");           end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
