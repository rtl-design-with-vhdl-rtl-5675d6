# Four-input summer: a one-adder RTL datapath with its controller

This design adds four unsigned 8-bit numbers, `sum = a + b + c + d`, with a
single adder and a single register. A tree of three adders would give the
sum in one combinational step. Here the work is spread over several clocks
instead: a small state machine first clears an accumulator and then adds one
input per clock. The result costs more time (six clocks per result) but needs
only one adder, one 4-way input multiplexer and one 8-bit register.

The design is a worked example of register-transfer-level design. It has a
**datapath** (registers, multiplexers and arithmetic) and a **controller** (a
finite state machine whose outputs steer the datapath's multiplexers). Both
run on one clock, so every register transfer chosen during a clock period
takes effect at the rising edge that ends that period.

## The computation schedule

This is the part that needs the most care when using the block. The
controller waits in `hold`. When `update` is high at a rising edge E, it steps
through five working states, one per clock, and then returns to `hold`:

| clock after E | state   | `sel` | `load` | `clear` | `sum` after the edge that ends the state |
|---------------|---------|-------|--------|---------|------------------------------------------|
| E .. E+1      | `clr`   | 11    | 0      | 1       | 0                                        |
| E+1 .. E+2    | `add_a` | 00    | 1      | 0       | a                                        |
| E+2 .. E+3    | `add_b` | 01    | 1      | 0       | a+b                                      |
| E+3 .. E+4    | `add_c` | 10    | 1      | 0       | a+b+c                                    |
| E+4 .. E+5    | `add_d` | 11    | 1      | 0       | a+b+c+d                                  |
| from E+5      | `hold`  | 11    | 0      | 0       | a+b+c+d (kept)                           |

Points that follow from this schedule:

* **Latency.** The final sum is on `sum` just after edge E+5, five edges after
  the edge that sampled `update`.
* **Throughput.** `update` is only looked at in `hold`. The earliest next
  start is edge E+6, so a new result can come every six clocks. If `update` is
  held high, the machine restarts at once each time it gets back to `hold`.
* **Ignored requests.** A pulse on `update` during a computation is lost. It
  does not queue a second computation.
* **Intermediate values are visible.** `sum` is the register itself, so it
  shows 0, a, a+b and a+b+c on the way. Only the value seen in `hold` is the
  result. No "done" flag is given; a user that needs one can decode `hold`
  from the controller, or count six clocks.
* **Input stability.** The inputs are not captured. Input `a` is read during
  `add_a`, `b` during `add_b`, and so on. Each input must be stable during its
  own add state, and in practice from E+1 to E+5.
* **Width.** All arithmetic is modulo 2^WIDTH (default 256). There is no
  carry out; for example 255+255+255+255 gives 252.
* **Before the first computation** `sum` is undefined. The sum register has
  no reset, and it gets a value only from the `clr` state.

## Datapath (`datapath`)

An input multiplexer picks a, b, c or d with the 2-bit `sel`. The 8-bit adder
adds the chosen number to the sum register. A second multiplexer picks the
register's next value:

* `load = 1`: the adder output.
* `load = 0`, `clear = 1`: zero.
* both 0: the register's own value.

`load` wins when both are high. The controller never asks for both at once,
and an assertion in the controller checks this.

The register and its next-value multiplexer are an instance of `reg_cell`,
the generic datapath building block described next.

## Generic register cell (`reg_cell`)

Every register in an RTL datapath can be drawn the same way. A set of
combinational functions of other registers feeds a multiplexer. That
multiplexer also takes the register's own output, for "no change". The
controller drives the multiplexer's select, and the register loads the
chosen value on each clock edge. `reg_cell` is this pattern with parameters:

* `WIDTH`: register width (default 8).
* `NFUNC`: number of function inputs (default 2).
* `sel`: 0 holds, `k` loads `func_in[k-1]`, and codes above `NFUNC` hold.

In the summer, the cell's two functions are "sum + selected input" (code 1)
and "zero" (code 2). The datapath turns `load`/`clear` into that code.

## Controller (`controller`)

The controller is a Moore machine with six states: `clr`, `add_a`, `add_b`,
`add_c`, `add_d` and `hold`. Its outputs depend on the state only, as in the
table above. The states use a 3-bit binary code in that order (0 to 5). The
two unused codes behave like `hold`.

`rst` is synchronous and active high, and forces `hold`. It does not touch
the sum register. Even without a reset the machine reaches `hold` within five
clocks from any state, because every working state leads on towards `hold`.

## Top level (`averager`)

`averager` connects the datapath (`d1`) and the controller (`c1`) through
`sel`, `load` and `clear`. Ports: `a`, `b`, `c`, `d`, `sum` (WIDTH bits),
`update`, `clk` and `rst`. The name is historical: the block outputs the
sum, not the mean. No division is built.

Shared types are in `averager_pkg`:
* `num_t` (8-bit number);
* `state_t` (the state enum);
* `sel_t` and `SEL_A`..`SEL_D` (the input-select code).

## Timing

All registers use the rising edge of the one clock. The longest
register-to-register path runs from the sum register or `sel` through the
input multiplexer, the 8-bit adder and the next-value multiplexer back to the
sum register. The clock period must cover that path plus the register's
clock-to-output and setup times:
t_comb < t_clock − t_setup − t_clk→q.

## What is the original design and what is added here

The following follow the original design:
* the datapath structure;
* the select coding;
* the load-over-clear priority;
* the six states and their order, and the transitions;
* the output decoding;
* the port names and the 8-bit width.

The following are choices made in this RTL:
* the binary state encoding;
* the synchronous `rst` on the controller, which the original has none of;
* wrapping the register in the reusable `reg_cell`;
* the assertion.

Wrap-around on overflow follows from the 8-bit types; it is not stated
explicitly.

## Files

| file | contents |
|------|----------|
| `rtl/averager_pkg.sv` | shared types and constants |
| `rtl/reg_cell.sv` | generic register with next-value multiplexer |
| `rtl/datapath.sv` | input mux, adder, sum register |
| `rtl/controller.sv` | six-state sequencer |
| `rtl/averager.sv` | top level |
| `tb/tb_reg_cell.sv` | random select/function test at two sizes |
| `tb/tb_datapath.sv` | random control test plus one full, wrapping computation |
| `tb/tb_controller.sv` | output table, latency, ignored and back-to-back requests, reset |
| `tb/tb_averager.sv` | end-to-end test at the default size |

## Verification

Each testbench is self-checking. It compares the block against values that
the testbench works out itself, and it ends with a line
`TB_RESULT checks=N failures=M`. A watchdog ends the run with a failure if the
test hangs.

`tb_averager` runs the top level at its default parameters. It does:
* the example 1+2+3+4;
* an all-255 sum that wraps;
* about 300 random computations.

At every edge of every computation it checks the running sum, and it checks
that the result arrives exactly five edges after `update`. It counts, and
requires at least once, each of these:
* a completed computation;
* a wrapping sum;
* an `update` ignored mid-computation;
* a back-to-back restart with `update` held high;
* idle clocks that keep the result while the inputs change;
* a reset that stops a computation.

Each testbench was also run against a deliberately broken copy of its block,
and every broken copy was caught. The broken copies were:
* a lost hold path in `reg_cell`;
* b and c swapped in the datapath input multiplexer;
* a skipped `add_c` state in the controller;
* a and b swapped at the top-level instance.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl \
  rtl/averager_pkg.sv rtl/reg_cell.sv rtl/datapath.sv rtl/controller.sv \
  rtl/averager.sv tb/tb_averager.sv --top-module tb_averager
./obj_dir/Vtb_averager
```

To run another testbench, replace `tb_averager` with `tb_reg_cell`,
`tb_datapath` or `tb_controller`. Each run takes well under a second.

## Changing it

* **Width.** Set `WIDTH` on `averager`. `num_t` in the package stays 8 bits;
  the modules use `WIDTH` for their ports.
* **Speed against area.** More adders mean fewer states. For example, two
  adders working in parallel on (a+b) and (c+d) need fewer clocks. That
  change needs a new datapath and a shorter state sequence.
* **Register-transfer structure.** Further registers can be built from
  `reg_cell` by adding function inputs and select codes.
