// Level-sensitive D latch in transmission-gate form.
//
// A two-input transmission-gate multiplexer feeds a non-inverting buffer
// (two inverters). While en is 1 the multiplexer passes d; while en is 0 it
// passes the buffer's own output back, so the stored value is held. The
// inverse of en, needed by the complementary gates, comes from one extra
// inverter. This storage element is a latch on purpose: the toggle
// flip-flop is made of two of them.
//
// Interface: en (clock), d in; q out. rst_n, active low and asynchronous,
// forces q to 0; the design names no reset, it is added so the counter
// starts from a known state.
//
// Tool notes: the latch inferred here is intended. Once the latch is
// flattened into the toggle flip-flop, a lint tool may report that it finds
// no latch in this always_latch block or a combinational loop through it;
// both come from the latch feeding itself back and are expected.
module tg_latch (
  input  logic rst_n,
  input  logic en,
  input  logic d,
  output logic q
);

  always_latch begin
    if (!rst_n)  q = 1'b0;
    else if (en) q = d;
  end

endmodule
