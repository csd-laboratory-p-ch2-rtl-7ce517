# Programmable timer (Prog_timer)

A non-retriggerable one-shot timer for a 16 MHz clock. A 24-bit pulse count
`PC` sets the length of the timing period: a trigger pulse on `TRG` drives
`Timer_out` high for `PC` clock periods (PC x 62.5 ns), and after that `ETP`
(end of timing period) is high for a single clock, to show that the timer is
idle and can be triggered again. Triggers that arrive while a period is
running are ignored. With `PC = 0` the timer runs its longest period, 2^24
clocks = 1.048576 s.

The design is split the way a small dedicated processor is: a control unit
(a Moore state machine) and a datapath made of a counter, a register and a
comparator. The datapath reports one status flag back to the control unit.

```
            +--------------+  CNT_E, RST, LD_PC   +----------------------------+
  TRG ----->| control_unit |--------------------->| datapath                   |
            |   (FSM)      |<---------------------|  counter_mod16m  -> CNT_Q  |
            +--------------+        TOF           |  data_reg_24bit  -> PC_R   |
              |       |                           |  comp_24bit: TOF = (CNT_Q  |
          Timer_out  ETP                 PC ----->|              == PC_R)      |
                                                  +----------------------------+
  CLK and CD (asynchronous clear) go to every block.
```

## Pins

| Port        | Dir | Width | Meaning |
|-------------|-----|-------|---------|
| `CLK`       | in  | 1     | 16 MHz time base, rising-edge active |
| `CD`        | in  | 1     | clear direct: asynchronous reset, active high |
| `TRG`       | in  | 1     | trigger, active high. It is sampled on clock edges, so a pulse longer than one clock (62.5 ns) is always seen; pulses of more than 70 ns are specified |
| `PC`        | in  | 24    | pulse count, 0 to 2^24 - 1 |
| `Timer_out` | out | 1     | high for PC clocks after a trigger |
| `ETP`       | out | 1     | one-clock pulse directly after `Timer_out` falls |

## Timing of one operation

`TRG` is sampled on rising clock edges. If the edge at which it is seen high
is edge 0:

| after edge | state      | what happens |
|------------|------------|--------------|
| 0          | `S_LOAD`   | `PC` is captured into the register (at edge 1); the counter steps 0 -> 1 |
| 1 .. PC    | `S_COUNT`  | `Timer_out` = 1, the counter keeps stepping |
| PC + 1     | `S_ETP`    | `ETP` = 1 for one clock, the counter is cleared |
| PC + 2     | `S_IDLE`, or `S_WAIT_TRG` if `TRG` is still high | ready for the next trigger |

So `Timer_out` rises two clocks after the edge that sees the trigger, stays
high for exactly PC clocks, and `ETP` follows without a gap. For example,
PC = 102 gives 6.375 us, PC = 150000 gives 9.375 ms, PC = 2556 gives
159.75 us and PC = 8 gives 500 ns. `PC` only has to be stable at the load
edge; changing it during a period has no effect until the next trigger.

A trigger during a period is ignored: the state machine only looks at `TRG`
while idle. If `TRG` is still high when the period ends, the state machine
waits in `S_WAIT_TRG` until it falls, so a long trigger pulse starts exactly
one period.

## How the period is counted

This is the one detail of the design that is not obvious. The comparator
tests `CNT_Q == PC_R`, and the state machine leaves `S_COUNT` in the cycle in
which that is true. If the counter started at 0 in the first `S_COUNT` cycle,
the state would last PC + 1 clocks. To get exactly PC clocks with outputs that
come straight from the state register (no glitches on `Timer_out`), the
counter:

* is held at 0 whenever the timer is idle (`RST`, a synchronous load of zero),
* is already enabled in the load cycle, so it enters `S_COUNT` at 1,
* therefore shows 1, 2, ..., PC during the PC cycles of `S_COUNT`.

With PC = 0 the counter shows 1, 2, ..., 2^24 - 1, wraps to 0, and only then
matches: the period is 2^24 clocks, the 1.048576 s maximum. Every other PC
gives exactly PC clocks, so the full range of the 24-bit input is usable.

## Blocks

All modules are in `rtl/`, one per file; `prog_timer_pkg` holds the width
`PC_W = 24` and the state type.

* **`prog_timer`** (top): wires the control unit and datapath. The counter's
  `Din` is tied to zero and its `UD_L` to 1 (count up); the comparator's
  cascade inputs are tied to `Gi = 0, Ei = 1, Li = 0` so that its `EQ` output
  is the time-out flag `TOF`. The counter's `TC16M` and the comparator's `GT`
  and `LT` are left unconnected. An assertion checks that `ETP` is one clock
  wide.
* **`control_unit`**: five-state Moore machine (`S_IDLE`, `S_LOAD`, `S_COUNT`,
  `S_ETP`, `S_WAIT_TRG`) with outputs `Timer_out`, `ETP`, `CNT_E` (counter
  enable), `CLR_C` (counter clear, named `RST` in the top) and `LD_R` (register
  load, `LD_PC` in the top). The outputs are decoded from the state alone. An
  assertion checks that clear and enable, and `Timer_out` and `ETP`, are never
  high together.
* **`counter_mod16m`**: 24-bit up/down counter, modulo 2^24. Asynchronous
  clear `CD`, then synchronous load `LD` of `Din`, then count enable `CE`;
  `UD_L = 1` counts up and `0` counts down. `TC16M` is high when `CE` is high
  and the next count wraps.
* **`data_reg_24bit`**: 24-bit register with load enable and asynchronous
  clear; holds `PC_R` for the whole period.
* **`comp_24bit`**: unsigned magnitude comparator, parameter `W`. When `A` and
  `B` differ, `GT` or `LT` is high. When they are equal, `GT`, `EQ` and `LT`
  copy the cascade inputs `Gi`, `Ei`, `Li`, so that slices can be chained as
  with the classic 4-bit comparator chips. With `W = 9` it is also the 9-bit
  comparator of the same family.

## What follows the specification and what is a design choice

Taken from the specification: the pins and their widths, the 16 MHz clock,
the period of PC clocks and its 1.048576 s maximum, the one-clock `ETP`, the
non-retriggerable behaviour, the asynchronous reset, and the block structure
with its signal names and tie-offs (counter cleared by loading zeros, count up,
comparator cascade inputs 0/1/0, `EQ` as the time-out flag).

Choices made here, where the specification says nothing:

* the state machine itself: its states, the counter being enabled in the load
  cycle, and the two-clock delay from trigger to `Timer_out`;
* PC = 0 meaning 2^24 clocks (the only way to reach the 1.048576 s maximum,
  which is 2^24 clocks, with a 24-bit count);
* waiting for `TRG` to fall after a period before a new trigger is accepted;
* `TRG` sampled directly, without a synchronizer. It is an asynchronous
  input, so on real hardware a two-flop synchronizer in front of `TRG` is
  advisable. It adds two clocks of latency but does not change the period;
* active-high `CD`, registers clearing to zero, the counter's load-over-enable
  priority, the `UD_L` encoding and the definition of `TC16M`;
* the comparator's cascade rule.

The RTL is written for any FPGA or ASIC flow, not for a particular device.
At 16 MHz the only long path is the 24-bit increment feeding the 24-bit
compare, which is not critical.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops with a watchdog if it hangs:

* `tb_counter_mod16m`: random enable, load, direction and data against a
  reference count, wrap-around in both directions, load priority, an
  asynchronous clear in mid-cycle.
* `tb_data_reg_24bit`: random loads and holds, asynchronous clear.
* `tb_comp_24bit`: corner cases, every single-bit difference and random
  operands with random cascade inputs, at 24 and 9 bits.
* `tb_control_unit`: the state machine in a loop with a model of the
  datapath. Random trigger widths and counts cover ignored retriggers and
  triggers held past the end of a period. All five outputs are checked every
  clock against a timeline model of the required behaviour.
* `tb_prog_timer`: the whole timer at full size. It runs the four example
  periods above and measures each pulse in ns. It also covers an ignored
  retrigger, a held trigger, a 75 ns trigger that is not aligned to the clock,
  a change of PC during a period, PC = 1, 200 random periods, an asynchronous
  clear and the 2^24-clock period of PC = 0. Each of these must happen at
  least once. It takes about 10 s with Verilator.

To run one, for example the full timer:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl rtl/prog_timer_pkg.sv \
    tb/tb_prog_timer.sv --top-module tb_prog_timer -o sim
./obj_dir/sim
```

Verilator finds the other modules through `-Irtl`. The other testbenches run
the same way: give the package, the testbench and its name as top module.

## Changing it

The count width is `PC_W` in `prog_timer_pkg`; the counter, register and
comparator follow it, and the longest period becomes 2^PC_W clocks. The clock
frequency is not in the RTL: the period is always PC clock cycles.
