// Programmable binary incrementer/decrementer (top level).
//
// A ripple counter counts clock edges from 0. An XOR array passes the count
// unchanged when dir is INC and inverted when dir is DEC, and the same dir
// bit is the carry in of a ripple-carry adder whose other operand is the
// load value. The adder therefore forms
//     value = load_val + count   (dir = INC, 0)
//     value = load_val - count   (dir = DEC, 1)
// modulo 2**WIDTH, so after reset the output starts at the load value and
// moves one step up or down on every rising clock edge, usable as a timer
// from a preset state.
//
// Interface: clk; rst_n (active low, asynchronous) clears the counter so
// the output restarts at load_val; load_val is used directly, not
// registered; dir selects the direction. value follows the count
// combinationally; carry_out is the adder's carry (for INC it marks a wrap
// past 2**WIDTH - 1, for DEC it is 0 when the result has borrowed below 0).
// Timing: after reset value = load_val; after the n-th rising clk edge
// value = load_val +/- n. Changing dir mid-count changes the sign applied to
// the current count, not the step from the current output.
//
// The counter, XOR array and adder and the way they are joined follow the
// design; the reset and the carry output are this implementation's choices.
//
// Tool notes: the latch loops reported inside the counter are the
// master-slave toggle stages and are intended (see t_flip_flop).
module inc_dec
  import inc_dec_pkg::*;
#(
  parameter int unsigned WIDTH = DEFAULT_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  dir_e             dir,
  input  logic [WIDTH-1:0] load_val,
  output logic [WIDTH-1:0] value,
  output logic             carry_out
);

  logic [WIDTH-1:0] count;
  logic [WIDTH-1:0] count_x;
  logic             dec;

  assign dec = (dir == DEC);

  ripple_counter #(.WIDTH(WIDTH)) u_counter (
    .rst_n(rst_n),
    .clk  (clk),
    .count(count)
  );

  xor_array #(.WIDTH(WIDTH)) u_xor (
    .x     (count),
    .invert(dec),
    .y     (count_x)
  );

  ripple_adder #(.WIDTH(WIDTH)) u_adder (
    .a   (load_val),
    .b   (count_x),
    .cin (dec),
    .sum (value),
    .cout(carry_out)
  );

endmodule
