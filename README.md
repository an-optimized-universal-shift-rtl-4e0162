# Universal shift register built from pulsed latches

A long shift register, such as the 256-bit register here, is mostly storage. Built
from master-slave flip-flops, it needs two latches per bit plus the clock load
of both. Clocking a single latch per bit with a short pulse halves that. But
a plain chain of pulsed latches does not work. All latches are open during
the same pulse, so a bit can race through several stages in one cycle.

This design removes the race without adding delay elements between the
latches:

* The register is split into **sub shift registers** of K bits (K = 4 by
  default). Each one holds K data latches and one extra **temporary latch**.
* One shared generator produces **K+1 non-overlapping pulses** after each
  rising clock edge. Each latch of a sub register gets its own pulse, and the
  order of the pulses ensures that every latch is read before it is
  overwritten.
* The temporary latch is written first. It keeps the bit that leaves its sub
  register, so the next sub register can still read the old value.

The register is *universal*. Each clock cycle performs one of four
operations: hold, shift right, shift left or parallel load. The default
configuration is 256 bits in 64 sub registers of 4 bits. It uses 320 latches
(256 data + 64 temporary) and a generator of 5 pulse stages. For comparison,
a flip-flop design needs 256 flip-flops, i.e. 512 latches.

## The pulse train and the write order

After every rising edge of `clk`, the generator (`pulse_clock_gen`) fires
these pulses, one after the other:

| slot | pulse          | opens                                  |
|------|----------------|----------------------------------------|
| 0    | `CLK_pulse<T>` | the temporary latch of every sub register |
| 1    | `CLK_pulse<4>` | Q4 (`q[3]`) of every sub register      |
| 2    | `CLK_pulse<3>` | Q3                                     |
| 3    | `CLK_pulse<2>` | Q2                                     |
| 4    | `CLK_pulse<1>` | Q1 (`q[0]`)                            |

Take a **shift right** (`q[i] <- q[i-1]`) in one sub register:

1. T copies Q4, the bit about to leave.
2. Q4 copies Q3, Q3 copies Q2, and Q2 copies Q1. At each step the source
   has not yet been overwritten.
3. Q1 copies the T latch of the sub register below. That T latch captured
   its own Q4 in slot 0, before that Q4 changed.

Only one pulse is high at a time. So no latch ever sees its input change
while it is open: the race of a single shared pulse cannot occur.

In RTL, `pulse[k]` is `CLK_pulse<k+1>`, and `pulse_t` is `CLK_pulse<T>`. For
general K the train is T, K, K-1, …, 1.

### Shift left

A shift left (`q[i] <- q[i+1]`) needs the opposite order inside a sub
register: Q1 must be written before Q2, and so on. This design uses one
generator with one fixed order. During a shift left, each sub register
therefore routes the pulses to its data latches in mirror order:

* `q[k]` is opened by `CLK_pulse<K-k>`, so Q1 is written second and QK
  last.
* The temporary latch takes Q1, the bit that leaves towards the sub register
  below.
* QK takes the temporary latch of the sub register above.

The cost is a 2:1 selection on each data latch's pulse and on the temporary
latch's input. Hold and parallel load use the normal order. In hold mode,
every latch is pulsed and reloads its own value.

## Interface of the top, `pulsed_latch_usr`

| port    | dir | width | meaning |
|---------|-----|-------|---------|
| `clk`   | in  | 1     | clock; each rising edge starts one operation |
| `rst_n` | in  | 1     | asynchronous clear of all latches, active low |
| `s1,s0` | in  | 1+1   | operation: `00` hold, `01` shift right, `10` shift left, `11` load |
| `in`    | in  | 1     | serial input of shift right; enters `SR[0]` |
| `in1`   | in  | 1     | serial input of shift left; enters `SR[N-1]` |
| `I`     | in  | N     | parallel input |
| `SR`    | out | N     | stored word. `SR[0]` is Q1 of the first sub register, and sub register m holds `SR[m*K +: K]` |

The serial outputs are `SR[N-1]` (shift right) and `SR[0]` (shift left).

Parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `N`       | 256     | word length |
| `K`       | 4       | sub register width; must divide N |
| `T_DELAY` | 2.0 ns  | delay element of one pulse stage |
| `T_INV`   | 0.5 ns  | inverter delay of one pulse stage |

**Timing.** Pulse j of the train (slot 0 is `CLK_pulse<T>`) behaves as
follows:

* It rises `j*(T_DELAY+2*T_INV)` after the clock edge.
* It stays high for `T_DELAY+T_INV`.
* It is separated from the next pulse by `T_INV`.

The whole operation takes `(K+1)*(T_DELAY+2*T_INV) - T_INV`. With the default
delays, that is 14.5 ns for K=4 and 26.5 ns for K=8. Both fit in one period
(35.7 ns) of a 28 MHz clock.

`s0`, `s1`, `in`, `in1` and `I` must be stable from the rising edge until the
train has ended. They are sampled as late as the last pulse. `SR` is final
when the train ends. The train must end before the next rising edge.

The top holds an assertion that reports a change of `s0`/`s1` while a pulse
is open.

## The pulse generator and what synthesis sees

The generator is a chain of K+1 identical `clock_pulse_circuit` stages:

1. The first stage takes `clk`. Each later stage takes the delayed clock of
   the stage before it.
2. Inside a stage, the clock passes through a delay element and two
   inverters, which gives the delayed clock for the next stage.
3. The pulse is the clock ANDed with the delayed clock after the first
   inversion. This gives a pulse of width `T_DELAY+T_INV` at each rising
   edge.

Because the second inversion also adds `T_INV` to the stage delay,
consecutive pulses are separated by one inverter delay.

`clock_pulse_circuit` is a **behavioural model**: its behaviour comes from
propagation delays, written as `#` delays.

* It simulates correctly with `verilator --timing`.
* A synthesis tool ignores the delays, so the pulse becomes `clk & ~clk`,
  which is 0. The latches and muxes then reduce to almost nothing.

For a real implementation, replace `clock_pulse_circuit` with a custom or
library pulse cell of the same ports. Everything else (`pulsed_latch`,
`usr_mux4`, `usr_sub_shift_register`, `pulse_clock_gen`, the top) is ordinary
latch-based RTL.

The delay values are this design's choice, sized for 28 MHz. Non-overlap
needs only `T_INV > 0` in simulation. In silicon it also needs margin for
skew between the clock buffers.

## Choosing K

A larger K needs fewer temporary latches (N/K of them) but more pulse stages
(K+1). With the area of a pulse stage normalised to a latch as α, the area is
about

    α·(K+1) + N·(1 + 1/K)

This is smallest near K = √(N/α). In practice, pick the divisor of N closest
to that value. The same form applies to power, with α taken as the power of a
pulse stage relative to a latch.

The RTL supports any K ≥ 2 that divides N:

* K = 4 (default): 320 latches, 5 pulse stages.
* K = 8: 288 latches, 9 pulse stages.

## Where this design makes its own choices

The structure is fixed by the pulsed-latch scheme: the sub registers, the
temporary latch, the per-latch 4:1 mux, and the shared chained pulse
generator with its T, K, …, 1 order. The following points are this design's
own choices:

* **Mode encoding** of `s1,s0`, and which serial input (`in` or `in1`) feeds
  which end.
* **Shift-left timing**: the mirrored pulse steering, and the 2:1 choice at
  the temporary latch input.
* **Reset**: an asynchronous active-low clear on every latch.
* **Hold**: every latch is pulsed and reloads its own value. There is no
  pulse gating.
* **Delay values** of the pulse stages, and the modelling of the clock buffers
  as plain wires.
* **No serial output ports**: the serial outputs are bits of `SR`.

Lint reports a combinational loop through the latches. It comes from the
hold feedback and the two-way neighbour connections. It is intended, and it
is explained in `usr_sub_shift_register.sv`.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_pulsed_latch` | clear, transparency (including changes inside the pulse), hold after the pulse |
| `tb_usr_mux4` | all modes × all input combinations |
| `tb_clock_pulse_circuit` | pulse start, pulse width and delayed-clock edges against the delay parameters; no pulse on the falling edge |
| `tb_pulse_clock_gen` | K=4 and K=8 generators: each pulse in its time slot, once per cycle, never two at once |
| `tb_usr_sub_shift_register` | 600 random operations driven by a test-generated pulse train, against a reference model (including the temporary latch) |
| `tb_pulsed_latch_usr` | **full default size** (N=256, K=4) at 28 MHz, 3000 random cycles with long shift runs, against a 256-bit reference model |
| `tb_pulsed_latch_usr_k8` | the same test with K=8 (288 latches) |

The two top-level tests check that `SR` holds before each edge and is correct
after the pulse train. They also check reset at the start and mid-run. They
count every mechanism: hold, both shifts, load, reset, each serial input, and
a bit carried across a sub-register boundary in each direction. A mechanism
that never occurs counts as a failure.

What is not verified:

* Real circuit timing.
* Glitches of the pulse generator at power-up. The first pulses after time 0
  may be spurious until the delay chain settles, so hold `rst_n` low
  meanwhile.
* The area, power and speed of an implementation.

## Simulating

All files use `timescale 1ns/1ps`, and the pulse generator needs timing
support:

    verilator --binary --timing --assert -Irtl -Itb rtl/usr_pkg.sv \
        tb/tb_pulsed_latch_usr.sv --top-module tb_pulsed_latch_usr -Mdir obj -o sim
    ./obj/sim

Replace the testbench name to run another test. The default-size test runs in
well under a second.

## Files

| file | contents |
|------|----------|
| `rtl/usr_pkg.sv` | mode type `usr_mode_e` |
| `rtl/pulsed_latch.sv` | one latch with pulse enable and clear |
| `rtl/usr_mux4.sv` | 4:1 input mux of a data latch |
| `rtl/clock_pulse_circuit.sv` | behavioural model of one pulse stage |
| `rtl/pulse_clock_gen.sv` | chain of K+1 pulse stages |
| `rtl/usr_sub_shift_register.sv` | K data latches, temporary latch, muxes, shift-left pulse steering |
| `rtl/pulsed_latch_usr.sv` | top: N/K sub registers and the shared generator |
