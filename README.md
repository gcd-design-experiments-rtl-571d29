# Seven ways to build a subtracting GCD unit

A greatest-common-divisor unit is about the smallest design that still has both
a real data path and a real controller. That makes it a good specimen for one
question: if you keep the function fixed, what changes as you move from a purely
behavioural description to a hand-partitioned register-transfer design? This
repository holds seven synthesizable SystemVerilog versions of the same 16-bit
GCD unit. They span that range.

All seven run the same algorithm:

```
load x <= xi, y <= yi
while x /= y:
    if x < y: y <= y - x
    else:     x <= x - y
xo <= x, rdy <= 1
```

They have the same pins and give the same results. They differ in how many
arithmetic units they spend, and so in how many clock steps one subtraction
takes.

| unit       | arithmetic in the data path                       | controller states                           | steps per subtraction |
|------------|---------------------------------------------------|---------------------------------------------|-----------------------|
| `gcd_bhvc` | implicit: 2 subtractors, 2 comparators            | 4 (one per clock wait of a sequential loop) | 1 |
| `gcd_bfsm` | implicit: 2 subtractors, 2 comparators            | 3: wait, start, ready                       | 1 |
| `gcd_rtl1` | one shared ALU (`-`, `<`, `/=`)                    | 6: wait, start, comp, sub_x_y, sub_y_x, ready | 3 |
| `gcd_rtl2` | one shared ALU (`-`, `<`, `/=`)                    | 5: compare folded into start                | 2 |
| `gcd_rtl3` | ALU (`-`, `/=`) steered by a separate `<` comparator | 3                                         | 1 |
| `gcd_rtl4` | subtractor x-y (its borrow is `<`) and ALU y-x (`-`, `/=`) | 3, same as rtl3                      | 1 |
| `gcd_rtl5` | subtractors x-y and y-x, separate `/=` comparator  | 3, same as rtl3                             | 1 |

`gcd_top` places all seven side by side so that one test or one synthesis run
covers them all.

## Pins and handshake

Every unit has the same ports. `WIDTH` defaults to 16.

| port     | dir | width | meaning |
|----------|-----|-------|---------|
| `clk`    | in  | 1     | rising-edge clock |
| `arst_n` | in  | 1     | asynchronous initialisation, active low: controller to its wait state, `x`, `y`, `xo` and `rdy` cleared |
| `rst`    | in  | 1     | **hold**, not a reset. While 1, an idle unit stays idle. On a clock edge in the wait state with `rst = 0`, the unit loads `xi`, `yi` and starts. |
| `xi`,`yi`| in  | WIDTH | operands, sampled only on the load edge |
| `xo`     | out | WIDTH | result register |
| `rdy`    | out | 1     | result valid (register) |

The name `rst` is historical and misleading: it is the "go" input, active low.
`rst` is ignored while a computation runs. `xi` and `yi` may change freely after
the load edge.

A simple way to drive a unit: present the operands, pull `rst` low for one
clock, raise it again, and wait for `rdy`.

### Latency

Count clock edges from the load edge. With `n` the number of subtractions the
loop performs, `rdy` is first seen high after:

| unit | edges from load to `rdy` | how long `rdy` stays 1 | result period with `rst` held at 0 |
|------|--------------------------|------------------------|------------------------------------|
| `gcd_bhvc` | n + 1  | until the next load | n + 2 |
| `gcd_bfsm` | n + 1  | until the next load | n + 3 |
| `gcd_rtl1` | 3n + 2 | 1 cycle             | 3n + 3 |
| `gcd_rtl2` | 2n + 2 | 1 cycle             | 2n + 3 |
| `gcd_rtl3`, `gcd_rtl4`, `gcd_rtl5` | n + 1 | 2 cycles | n + 3 |

Example: gcd(12, 18) goes (12,18) → (12,6) → (6,6), so n = 2. `gcd_rtl1` answers
after 8 edges, `gcd_rtl2` after 6, and the others after 3.

`n` equals the sum of the quotients of Euclid's remainder sequence, minus one.
For gcd(a, 1) it is a - 1, so the worst case for 16-bit operands is 65534
subtractions.

The three `rdy` shapes come from how each controller finishes:

* **Sticky `rdy` (bhvc, bfsm).** These two write `rdy` only at load (0) and at
  completion (1), so it stays high until new operands are taken. The
  difference between them is the idle state. After a result, `gcd_bfsm` passes
  through `S_READY` before it can load again. `gcd_bhvc` can load on the very
  next edge.
* **One-cycle pulse (rtl1, rtl2).** `rdy` is a register fed by `set_rdy`, which
  is asserted only in `S_READY`. `xo` loads on the same edge.
* **Two-cycle pulse (rtl3 to rtl5).** `set_rdy` is asserted both in `S_START`,
  on the cycle that finds `x = y`, and again in `S_READY`. So `rdy` stays high
  for two cycles, and `xo` is written twice with the same value.

## The seven units

### `gcd_bhvc`: the loop written as a four-wait process

The most abstract form is a sequential process with four clock waits:

1. waiting while `rst = 1`;
2. after the load;
3. inside the subtraction loop;
4. after publishing the result.

`gcd_bhvc` turns each wait into a state:

* 1 stays while `rst = 1` and loads when `rst = 0`.
* 2 and 3 subtract while `x /= y`, or publish the result and go to 4.
* 4 loads again at once if `rst = 0`, or drops back to 1.

A process with several clock waits is not accepted by synthesis tools (the
original comparison lists it as not synthesizable for FPGA). The explicit
machine is cycle-equivalent to it and is synthesizable. The only difference:
the machine waits for the first clock edge after `arst_n`, while the process
would load at time zero.

### `gcd_bfsm`: behavioural state machine

Here the states are explicit: wait, start, ready. The arithmetic is still left
as expressions in the clocked process. The state machine is the same loop with
an extra idle state after completion.

### `gcd_rtl1` and `gcd_rtl2`: one shared ALU

The data path is written out in full:

* registers `x`, `y` and `xo`;
* input multiplexers choosing `xi`/`yi` or the ALU output (`xi_yi_sel`);
* operand multiplexers choosing `x - y` or `y - x` (`sub_y_x`);
* one ALU (`gcd_alu`) that returns the difference `alu_o`, `alu_lt` and
  `alu_ne`.

The controller drives `ena_x`, `ena_y`, `ena_r`, `set_rdy`, `xi_yi_sel` and
`sub_y_x`. All of them are 0 unless a state raises them. These outputs depend
only on the state (and `rst`). The ALU flags feed only the next-state logic,
so there is no combinational path from the flags back through the operand
multiplexers.

`gcd_rtl1` spends three states per iteration:

* `S_START` tests `alu_ne` of x - y;
* `S_COMP` tests `alu_lt`;
* `S_SUB_X_Y` or `S_SUB_Y_X` writes the difference.

`gcd_rtl2` tests both flags in `S_START` and so saves one state per iteration.

### `gcd_rtl3`: comparator steers the ALU

A dedicated comparator computes `sub_y_x = x < y` straight from the registers.
The operand multiplexers therefore always present larger minus smaller. The
same signal gates the single `ena_xy` from the controller into the register
enables:

```
ena_x = (!sub_y_x & ena_xy) | xi_yi_sel
ena_y = ( sub_y_x & ena_xy) | xi_yi_sel
```

The controller shrinks to wait / start / ready. `S_START` either enables one
subtraction (when `alu_ne`) or finishes. That is one step per subtraction.
The critical path is longer: comparator → multiplexers → subtractor → register.

### `gcd_rtl4` and `gcd_rtl5`: both subtractions at once

The controller is the same as in `gcd_rtl3`. The data path computes `x - y`
(into x's input) and `y - x` (into y's input) in parallel. The `<` decision
only chooses which register is enabled, so there are no operand multiplexers.

* In `gcd_rtl4`, the borrow of the x - y subtractor is `x < y`. The y - x unit
  is an ALU whose zero test gives `alu_ne`.
* `gcd_rtl5` adds an independent `x /= y` comparator, so the loop test no
  longer waits on a subtractor.

### `gcd_alu`

This is the combinational subtract / less-than / not-equal unit. It forms
`alu_1 - alu_2` one bit wider than the operands, so the top bit is the borrow
and gives `alu_lt`. `alu_ne` is the OR of the difference bits. `gcd_rtl1` and
`gcd_rtl2` use all three outputs. `gcd_rtl3` and `gcd_rtl4` use it as a
`-` / `/=` unit and leave `alu_lt` open.

## Where this RTL departs from the original descriptions

* **Less-than from a true borrow.** The original takes `x < y` from the top bit
  of the 16-bit difference. That is right only while both operands are below
  2^15. For example, 0x9000 - 0x1000 = 0x8000 would read as "x < y" and send
  the loop wrong. Here every subtractor whose top bit is used as a comparison
  (`gcd_alu`, and the x - y subtractors of `gcd_rtl4`/`gcd_rtl5`) is
  WIDTH + 1 bits wide. The flag is then exact for all 16-bit operands. For
  operands below 2^15 the behaviour is identical.
* **`arst_n` added.** The original relies on signal initial values for its
  starting state. Here an asynchronous active-low input initialises every
  unit. It does not replace `rst`, which keeps its hold/go meaning.
* **`gcd_bhvc` as an explicit machine.** See above.
* **Zero operands are not guarded.** If exactly one operand is 0, the loop
  subtracts 0 forever and `rdy` never comes, just as in the original
  algorithm. If both are 0, the result is 0 at once. Callers must not start
  the unit with a single zero operand.
* **Assertions.** Each unit asserts that a result is only published when
  `x = y` (`a_ready_equal`).

The structure of every unit follows the original: state sets, control
signals, multiplexers and register enables. For reference, the original
comparison reported these results for its 16-bit versions. They come from a
commercial cell library and FPGA flow, and are not reproduced here.

| unit | ASIC equivalent gates / delay | FPGA slices / delay |
|------|-------------------------------|---------------------|
| bhvc | 961 / 20.0 ns  | not synthesizable |
| bfsm | 911 / 19.4 ns  | 108 / 9.9 ns  |
| rtl1 | 986 / 19.8 ns  | 50 / 10.8 ns  |
| rtl2 | 931 / 19.9 ns  | 48 / 10.8 ns  |
| rtl3 | 1134 / 20.0 ns | 58 / 17.0 ns  |
| rtl4 | 976 / 19.9 ns  | 78 / 12.6 ns  |
| rtl5 | 915 / 20.0 ns  | 58 / 8.0 ns   |

## `gcd_top`

`gcd_top` instantiates the seven units. Each gets its own `rst`, `xi`, `yi`,
`xo` and `rdy`, gathered in packed arrays indexed by `gcd_pkg::variant_e`:

| index | unit |
|-------|------|
| 0 | bhvc |
| 1 | bfsm |
| 2 | rtl1 |
| 3 | rtl2 |
| 4 | rtl3 |
| 5 | rtl4 |
| 6 | rtl5 |

`clk` and `arst_n` are shared. The units do not interact. To use a single
unit, instantiate its module directly.

## Files

* `rtl/gcd_pkg.sv`: default width and the variant enumeration.
* `rtl/gcd_alu.sv`: shared subtract / compare unit.
* `rtl/gcd_bhvc.sv`, `rtl/gcd_bfsm.sv`, `rtl/gcd_rtl1.sv` … `rtl/gcd_rtl5.sv`:
  the seven units.
* `rtl/gcd_top.sv`: all seven side by side.
* `tb/gcd_if.sv`: the pin bundle, for testbench use.
* `tb/gcd_tb_pkg.sv`: the reference model, timing model and driver class.
* `tb/tb_gcd_*.sv`: one testbench per module.

## Verification

`tb/gcd_tb_pkg.sv` holds the reference model and a driver class. The reference
computes the GCD by Euclid's remainder method. It takes the subtraction count
`n` from the quotients of the same sequence, not from a copy of the hardware
loop. Each latency in the table above is a function of `n` there.

For every operation the driver checks:

* the result;
* the exact edge count from load to `rdy`;
* how long `rdy` stays high, and that `xo` holds meanwhile;
* the result period when `rst` is held low.

It also scrambles `xi`/`yi` after the load edge.

The operations are:

* directed cases: equal operands, 1, both orders, and operands with the top
  bit set, such as 0x9000 and 0x1000;
* 60 random pairs;
* a free-running phase.

`tb_gcd_top` runs the full suite on all seven units at once through
`gcd_top` at its default parameters. It then requires that every mechanism
occurred in every unit:

* idle cycles with `rst = 1`;
* x - y steps and y - x steps;
* equal operands at load;
* wide operands;
* back-to-back restarts;
* the compare state of `gcd_rtl1`;
* the second `rdy` cycle of `gcd_rtl3`.

`tb_gcd_worst` runs the longest 16-bit operations on all seven units:
gcd(65535, 1), gcd(1, 65535) and gcd(65535, 65534), each 65534 subtractions
(about 197,000 clock edges per operation for `gcd_rtl1`). It checks the exact
edge counts.

Every testbench ends by printing `TB_RESULT checks=N failures=M` and has a
watchdog.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/gcd_pkg.sv tb/gcd_tb_pkg.sv tb/tb_gcd_top.sv --top-module tb_gcd_top
./obj_dir/Vtb_gcd_top
```

Replace `tb_gcd_top` with `tb_gcd_rtl3` (and so on) for a single unit. The
`gcd_alu` bench needs only `rtl/gcd_pkg.sv tb/tb_gcd_alu.sv` (same `-I` options). Each run takes
well under a second.

To change the operand width, set `WIDTH` on any unit or on `gcd_top`. The
testbenches are written for 16 bits (`gcd_tb_pkg::W`).
