// WIDTH-bit asynchronous (ripple) up counter of toggle flip-flops.
//
// Stage 0 toggles on every rising edge of clk. Stage i is clocked by the
// inverted output of stage i-1, so it toggles when stage i-1 falls from 1
// to 0, which is exactly when a binary count carries into bit i. The count
// therefore advances by one per clock; the new value ripples through the
// stages and is complete a few gate delays after the edge (in simulation,
// within the same time step). After 2**WIDTH - 1 it wraps to 0.
//
// Interface: clk in, rst_n in (active low, asynchronous, clears the count);
// count out. The toggle-flip-flop ripple structure follows the design; the
// clear is this implementation's choice.
//
// Tool notes: every stage after the first is clocked by a data signal
// (the previous stage's output). That is what makes the counter
// asynchronous, and it is intended; the latch-loop warnings of
// t_flip_flop appear here once per stage.
module ripple_counter #(
  parameter int unsigned WIDTH = inc_dec_pkg::DEFAULT_WIDTH
) (
  input  logic             rst_n,
  input  logic             clk,
  output logic [WIDTH-1:0] count
);

  // Stage i is clocked by the inverted output of stage i-1; the inverted
  // output of the last stage drives nothing.
  logic [WIDTH-1:0] stage_clk;

  assign stage_clk[0] = clk;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    if (i < WIDTH - 1) begin : g_link
      t_flip_flop u_tff (
        .rst_n(rst_n),
        .clk  (stage_clk[i]),
        .q    (count[i]),
        .qn   (stage_clk[i+1])
      );
    end else begin : g_last
      t_flip_flop u_tff (
        .rst_n(rst_n),
        .clk  (stage_clk[i]),
        .q    (count[i]),
        .qn   ()
      );
    end
  end

endmodule
