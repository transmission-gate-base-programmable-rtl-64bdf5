// Toggle flip-flop made of two transmission-gate latches (master-slave).
//
// The master latch is open while clk is 0 and takes the inverse of the
// output; the slave latch is open while clk is 1 and passes the master's
// value to q. Together they form a positive-edge triggered flip-flop whose
// data input is its own inverted output, so q changes state on every rising
// edge of clk.
//
// Interface: clk in; q and qn out. rst_n (active low, asynchronous) clears
// both latches, so q = 0. Building the toggle stage from two latches follows
// the design's toggle latch; the reset is this implementation's addition.
//
// Tool notes: q feeds the master latch and the master feeds q, so tools
// report a combinational loop through the two latches. The loop is never
// transparent end to end, because the latches are open on opposite clock
// levels; the warning stands.
module t_flip_flop (
  input  logic rst_n,
  input  logic clk,
  output logic q,
  output logic qn
);

  logic master_q;
  logic clk_n;

  assign clk_n = ~clk;                  // clock inverter for the master latch
  assign qn    = ~q;

  tg_latch u_master (.rst_n(rst_n), .en(clk_n), .d(qn),       .q(master_q));
  tg_latch u_slave  (.rst_n(rst_n), .en(clk),   .d(master_q), .q(q));

endmodule
