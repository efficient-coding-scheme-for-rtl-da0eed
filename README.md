# Pulsed-latch shift register

A long shift register (here 256 bits) is mostly storage cells and clock wiring,
so its area and power follow from the cell it is built from. A pulsed latch —
one latch opened by a short clock pulse — is roughly half the size and clock
load of a master-slave flip-flop. Latches cannot simply be chained under one
pulsed clock, though: while latch *i* is open its output changes, and latch
*i+1*, open during the same pulse, sees its input move. It either takes the
new value (the bit races through) or, in a real sense-amp latch, fails to flip
at all.

This design makes pulsed latches usable in a shift register by two measures:

1. **Reverse-order pulses.** Each latch gets its own pulse, and the pulses fire
   in the opposite order to the data flow: the last latch first, the first
   latch last. Every latch is therefore opened only after the latch it feeds
   has already taken the old value, and its own input is constant for the
   whole of its pulse.
2. **Sub shift registers with a temporary latch.** One pulse per bit would
   need 256 pulses. Instead the register is cut into N/K sub shift registers of
   K bits that all share the same K+1 pulses. Each sub register has one extra
   *temporary storage latch* T that saves its last bit before that bit is
   overwritten, and hands it to the first latch of the next sub register.

With N = 256 and K = 4 the register has 64 sub registers, 320 latches
(256 data + 64 temporary) and 5 pulsed clocks.

## One shift, step by step

Every rising edge of the main clock `clk` starts a *pulse train* of K+1 pulses.
The pulse bus is `clk_pulse[K:0]`, where `clk_pulse[0]` is CLK_pulse[T] and
`clk_pulse[i]` is CLK_pulse[i]. For K = 4, in each sub register:

| order | pulse         | latch written | takes its value from                          |
|-------|---------------|---------------|-----------------------------------------------|
| 1     | CLK_pulse[T]  | T             | Q4 of the same sub register                   |
| 2     | CLK_pulse[4]  | Q4            | Q3                                            |
| 3     | CLK_pulse[3]  | Q3            | Q2                                            |
| 4     | CLK_pulse[2]  | Q2            | Q1                                            |
| 5     | CLK_pulse[1]  | Q1            | `din` (first sub register) or T of the previous one |

All sub registers receive each pulse at the same time. The link between two
sub registers is safe because the previous T is written by the *first* pulse
and read by the *last* one, so it has been stable for the whole train. Had the
next sub register's Q1 been fed from the previous Q4 directly, Q4 would already
hold its new value when CLK_pulse[1] arrives and every fifth bit would be lost;
the temporary latch exists to prevent exactly that.

Net effect seen from outside: one shift per clock edge. After a rising edge
`q[0]` holds the `din` of that edge, `q[i]` the `din` of *i* edges earlier, and
`dout` (the last temporary latch) the value `q[N-1]` had before the edge, i.e.
the `din` of N edges earlier.

## Pulse generator and timing

`delayed_pulse_gen` derives the train from `clk`. The clock passes a delay
chain: the first tap is `T_CP` after the edge and each further tap `T_DELAY`
later. Each tap drives a clock-pulse circuit — an AND gate of the tap and an
inverted copy of the tap delayed by `T_PULSE` — which cuts out one pulse of
width `T_PULSE`. Since the width comes from a delay difference rather than
from edge rates, pulses can be shorter than a rise plus a fall time. Tap 0
drives CLK_pulse[T]; tap *s* drives CLK_pulse[K+1-s].

Defaults (in `pl_shift_pkg`):

| constant     | value  | meaning                                          | origin |
|--------------|--------|--------------------------------------------------|--------|
| `T_PULSE_PS` | 170 ps | pulse width (62 ps minimum for the cell plus margin for rise/fall and noise) | published design |
| `T_INTERVAL_PS` | 50 ps | gap between pulses, absorbs skew between pulse lines | published design |
| `T_DELAY_PS` | 220 ps | pulse-to-pulse delay = width + gap               | published design |
| `T_CP_PS`    | 100 ps | clock edge to first pulse                        | own choice |

Timing rules that follow:

* The train lasts `T_CP + K*T_DELAY + T_PULSE` = 1150 ps for K = 4
  (2030 ps for K = 8). The clock period must be at least this long, so the
  ideal-latch model runs up to about 870 MHz at K = 4 (about 490 MHz at K = 8);
  the fabricated circuits reached 840 MHz and 483 MHz, the difference being
  latch delay, which is not modelled. A larger K saves pulse lines and
  temporary latches but lowers the maximum clock rate in proportion.
* `din` must be stable from the rising edge of `clk` until CLK_pulse[1] has
  ended (1150 ps after the edge at the defaults). The testbenches change it
  just before the edge.
* `q` and `dout` are valid from the end of the train to the next rising edge.
* `clk` must stay high and low for at least `T_PULSE` each, otherwise the
  clock-pulse circuits shorten or drop pulses.

## The latch

`ssaspl_latch` stands for a 7-transistor static differential sense-amp shared
pulse latch: two cross-coupled inverters hold Q and Qb, and a single clocked
NMOS with two data NMOS pulls Q or Qb low while the pulse is high. The cell has
no inverter for the complement input, so it needs both rails, and in the chain
each latch's D/Db come from the previous latch's Q/Qb. The RTL models this as a
level-sensitive latch that is transparent while `clk_pulse` is high, writes
only a differential input (`d != db`; with `d == db` nothing is pulled down and
the cell holds), and holds otherwise. Transistor sizing, the 62 ps minimum
pulse and the real cell's failure to flip when its input moves during the pulse
are electrical effects not captured here; the pulse order ensures that
situation never arises.

## Choosing K

Normalise areas to one latch and let a clock-pulse circuit cost *A*. The
register needs N + N/K latches and K+1 clock-pulse circuits, so the area is
N + N/K + (K+1)·A, minimised at K = sqrt(N/A); in practice K is the divisor of
N nearest to that. The same reasoning with powers instead of areas gives the
power-optimal K. Clock buffers are left out of this estimate: their total
size follows the total clock load, which changes little with K. K is further
bounded by the clock rate, as above. The fabricated chip was built with K = 4
(320 latches) and K = 8 (288 latches); K = 4 is the default here.

## Interface of the top, `pl_shift_register`

| port   | dir | width | meaning |
|--------|-----|-------|---------|
| `clk`  | in  | 1 | main clock, one shift per rising edge |
| `rst`  | in  | 1 | active-high clear of all latches; hold it across at least one clock cycle |
| `din`  | in  | 1 | serial input |
| `q`    | out | N | all data latches, `q[0]` = first bit |
| `dout` | out | 1 | serial output, last temporary latch |

Parameters: `N` (256), `K` (4, N must be a multiple of K), `T_CP`, `T_PULSE`,
`T_DELAY` (ps).

## Where this RTL departs from the published design

* **Clear input.** The transistor latch has no reset; `rst` is added so that
  the register starts from a known state.
* **Input inverter.** The first latch needs a complement rail; an inverter
  makes `din_b` from `din`.
* **`T_CP` = 100 ps** is chosen; its real value was not published.
* **Serial output** is taken from the last temporary latch; all 256 data bits
  are also brought out, as in the published FPGA implementation.
* **No clock buffers or clock tree.** On silicon each pulse line needs
  buffering to all 64 sub registers, and wire skew is bounded by the 50 ps
  gap; in the RTL every pulse reaches all sub registers at once.
* **Timing model, not a netlist.** `delay_line`, `clock_pulse_circuit` and
  `delayed_pulse_gen` use `#` delays and only simulate; a synthesis tool sees
  the delays as wires and the pulses collapse to zero. The latch and the sub
  register are synthesizable latch logic, but turning this into silicon
  means a custom pulse generator and latch cell, not a synthesized one.
* The intermediate schemes used to motivate the design — latches with delay
  elements between them, and one delayed pulse per latch with no sub
  registers — and the flip-flop baseline are not included.

## Files

| file | contents |
|------|----------|
| `rtl/pl_shift_pkg.sv` | default sizes, pulse timing, pulse-bus indexing |
| `rtl/ssaspl_latch.sv` | the pulsed latch |
| `rtl/sub_shift_register.sv` | K data latches + temporary latch |
| `rtl/delay_line.sv` | transport delay element (simulation model) |
| `rtl/clock_pulse_circuit.sv` | delay + AND pulse former (simulation model) |
| `rtl/delayed_pulse_gen.sv` | K+1 reverse-ordered pulses from `clk` (simulation model) |
| `rtl/pl_shift_register.sv` | top: generator + N/K sub registers |
| `tb/tb_*.sv` | self-checking testbenches, one per module plus a K = 8 run |

## Simulating

Every file carries `` `timescale 1ps/1ps ``; the delays need Verilator's
timing support. For example, the full 256-bit test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/pl_shift_pkg.sv tb/tb_pl_shift_register.sv --top-module tb_pl_shift_register
./obj_dir/Vtb_pl_shift_register
```

Swap in `tb_ssaspl_latch`, `tb_sub_shift_register`, `tb_delayed_pulse_gen` or
`tb_pl_shift_register_k8` for the other tests. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops on its own; a watchdog ends a
hung run with a failure.

What the tests cover:

* `tb_ssaspl_latch`: clear, write while pulsed, transparency during the pulse,
  hold afterwards, no write with `d == db`, random sequences.
* `tb_delayed_pulse_gen`: at 100 MHz and 800 MHz, each pulse line fires once
  per cycle at `T_CP + slot*T_DELAY` after the edge, is `T_PULSE` wide, and no
  two lines are ever high together.
* `tb_sub_shift_register`: pulses driven directly; walking one, a lone
  CLK_pulse[T], complement-rail handling, 500 random shifts against a
  reference.
* `tb_pl_shift_register` (default N = 256, K = 4): walking-one latency to
  every bit and to `dout`, random data at 100 MHz, 10 MHz and 800 MHz, a clear
  in mid-stream, and counts of ordered pulse trains, overlaps (must be zero) and
  hand-overs through temporary latches, all compared with a reference every
  cycle.
* `tb_pl_shift_register_k8`: the same register with K = 8 at 100 MHz, 10 MHz and
  480 MHz.

Clocks faster than the pulse train are not supported, and the tests do not
exercise them.
