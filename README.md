# Programmable binary incrementer/decrementer

An 8-bit up/down counter that starts from a preset value. It is not built as
an up/down counter. A plain asynchronous up counter counts clock edges from
zero, and an adder combines that count with the preset:

```
value = load_val + count      (dir = INC, 0)
value = load_val - count      (dir = DEC, 1)      all modulo 256
```

After a clear the output equals the load value. It then moves one step up or
down on every rising clock edge, so the circuit works as a timer from any
preset state. Examples are a program counter or a frequency divider.

The arithmetic is built from transmission-gate cells: half adders, full adders
and a ripple-carry adder. The counter is a chain of toggle flip-flops, each
made of two transmission-gate latches. The RTL keeps that structure, so every
cell is a module of its own and can be checked on its own.

## Data path

```
            +----------------+   count    +-----------+  count or ~count  +---------------+
 clk ------>| ripple_counter |----------->| xor_array |------------------>| b             |
 rst_n ---->|  (8 toggle FFs)|            |  invert   |                   |  ripple_adder |---> value
            +----------------+            +-----^-----+                   |               |---> carry_out
                                                |            load_val --->| a             |
 dir (0 = INC, 1 = DEC) ------------------------+-------------------------->| cin         |
                                                                          +---------------+
```

The direction bit does two jobs. It inverts every count bit in the XOR array,
and it is the adder's carry-in. Inverted bits plus a carry-in of 1 form the
two's complement, so one adder both adds and subtracts.

| module           | what it is |
|------------------|-----------|
| `inc_dec`        | top level: counter, XOR array and adder joined as above |
| `ripple_counter` | WIDTH toggle flip-flops. Stage *i* is clocked by the inverted output of stage *i-1* |
| `t_flip_flop`    | master-slave pair of `tg_latch`. Toggles on each rising clock edge |
| `tg_latch`       | D latch: a transmission-gate 2:1 mux picks `d` (clock high) or the fed-back output (clock low) |
| `xor_array`      | WIDTH XOR gates: pass or invert a word |
| `ripple_adder`   | WIDTH full adders with a rippling carry |
| `full_adder`     | two half adders plus an OR of their carries |
| `half_adder`     | sum = XOR from two transmission gates and an inverter. Carry = pass-gate AND |
| `inc_dec_pkg`    | `DEFAULT_WIDTH = 8` and the direction type `dir_e` (`INC = 0`, `DEC = 1`) |

All data-path modules take a typed parameter `WIDTH`, which defaults to 8.

## The asynchronous counter

Only the counter needs care. Each toggle flip-flop has two latches. The master
latch is open while its clock is low and takes `~q`. The slave latch is open
while its clock is high and passes the master's value to `q`. The result is a
rising-edge flip-flop whose data input is its own inverted output.

Stage 0 is clocked by `clk`. Stage *i* is clocked by `~q[i-1]`. That clock
rises exactly when bit *i-1* falls from 1 to 0, which is when a binary
increment carries into bit *i*. No stage shares a clock with another. A new
count ripples through the stages after each edge and settles within a few
gate delays. In a zero-delay simulation it settles within the same time step.
For that reason `value` (a combinational function of the count) should be
sampled some time after the clock edge, not on it.

Lint and synthesis tools report a combinational loop and latches in
`t_flip_flop` and everything above it. This is the master-slave feedback, and
it is intended. The two latches are never open at the same time, so the loop
never closes. Verilator simulates the latch chain correctly, and the
testbenches check it cycle by cycle.

## Interface and timing (`inc_dec`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | the count advances on each rising edge |
| `rst_n`     | in  | 1     | active low, asynchronous. Clears the counter so `value` restarts at `load_val` |
| `dir`       | in  | `dir_e` | `INC` (0) counts up from the load value. `DEC` (1) counts down |
| `load_val`  | in  | WIDTH | preset value. It is used directly, not registered, so hold it steady while counting |
| `value`     | out | WIDTH | `load_val ± n` after the *n*-th rising edge since the clear |
| `carry_out` | out | 1     | adder carry. INC: 1 once the sum has wrapped past 255. DEC: 0 once the result has gone below 0 |

To load a new start value, set `load_val` and pulse `rst_n` low.

`dir` is a sign applied to the whole count. It does not set the direction of
the next step. If you change `dir` in the middle of a count, the output jumps
from `load_val + n` to `load_val - n` and then continues in the new direction.

## Where this RTL makes its own choices

- **Which operand is complemented.** The XOR array inverts the *counter
  output*, and the adder computes `load - count`. The other wiring, which
  complements the load value, would compute `count - load`. That rises
  with every clock, so it could not count down from the preset.
- **Reset.** The latches have an asynchronous active-low clear. It is the
  only way to restart the counter, and so the only way to "load" a value.
- **Clock polarity.** The latches are open while their clock is high, and
  the flip-flops trigger on the rising edge.
- **Half-adder carry.** The sum is the two-gate transmission-gate XOR. The
  carry is written as a pass-gate AND (`b ? a : 0`), which is this design's
  own choice.
- **Adder type.** The adder is a plain ripple chain of the full-adder cells.
  No propagate/generate (carry-lookahead) network is built.
- **`carry_out`** is an extra output. It is simply the adder's top carry.
- **Transmission gates** are not modelled as bidirectional switches. Each
  one is written as the multiplexer or gate it forms, which a two-state
  simulator and a synthesis tool can both handle. Transistor counts, delay
  and power belong to the transistor-level circuit and have no counterpart here.

## Verification

Each module has a self-checking testbench in `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `half_adder_tb` and `xor_array_tb` are exhaustive.
- `full_adder_tb` applies all 64 ordered transitions between the eight input
  combinations.
- `ripple_adder_tb` is exhaustive at 8 bits (2^17 cases).
- `tg_latch_tb` checks transparency, hold and reset, with random stimulus.
- `t_flip_flop_tb` checks one toggle per rising edge and none on falling edges.
- `ripple_counter_tb` counts through a full wrap and checks a clear in mid-count.
- `add_sub_tb` checks the adder module (XOR array plus adder, with the
  direction bit on both) for every pair of 8-bit operands in both directions.
- `inc_dec_tb` runs the top at its default 8 bits against a reference model
  and checks after every clock edge. It counts up and down from 0 and from 16,
  wraps past 255, borrows below 0, switches direction in mid-count and reloads
  at random. It counts how often each of these happened and fails if one never did.

To run one with Verilator:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -y rtl +libext+.sv \
    rtl/inc_dec_pkg.sv tb/inc_dec_tb.sv --top-module inc_dec_tb
./obj_dir/Vinc_dec_tb
```

Change the width by overriding `WIDTH` on `inc_dec` (or on any data-path
module). The testbenches use `inc_dec_pkg::DEFAULT_WIDTH`, or 8.
