# 10-bit clock-gated digital PWM

A digital pulse width modulator (DPWM) for the controller of a DC-DC buck
converter. A 10-bit duty word `D` sets the output's duty cycle to `D / 1024`,
from 0.1 % (`D = 1`) to 99.9 % (`D = 1023`); `D = 0` keeps the output low. Only
one clock is used, and the target clock is 500 MHz. The PWM period is then
1024 × 2 ns = 2.048 µs, and one duty step is 2 ns.

The design is a counter-comparator DPWM:

* A free-running 10-bit counter defines the period.
* The output is set when the count is 0 and cleared when the count equals `D`.

The flip-flop count stays far below the 2^N that a delay-line or shift-array
DPWM needs. The RTL uses 24 flip-flops in all.

Power is saved in the counter. Each counter bit sits behind its own clock gate.
A bit receives a clock edge only when it is about to change. Over one period the
counter's ten bits get 2046 clock edges instead of 10 240.

The RTL is synthesizable SystemVerilog except for the output driver. The driver
is an analog circuit and is given here as a behavioural model with delays.

## Block structure

```
            +------------------ data_synchronization ------------------+
  clk ----->| clock_counter --c_ns--> pre_synchronizer --p_s--+        |---> p_s
            |  (10 x ccms_dff +          (NOR + falling-edge  |        |
  v_r ----->|   state_prediction)         flip-flop)          v        |
            |      |                                 data_register <---|---- in_data[9:0]
            +------|-c_pe------------------------------------|-d_r----+
                   v                                          v
            +------------------ pulse_generator ----------------------+
            |  zero_state_interceptor --v_sp--+                        |
            |  magnitude_detector     --v_ep--+--> transition_pulse_   |
            |                                      width_generator     |
            +-----------------------------------------|-v_tpwm---------+
                                                      v
            +------------------ buffer_network (behavioural) ----------+
            |  cross_coupled_delay_generation --d_pmos/d_nmos--> buffer_array |---> v_dpwm
            +----------------------------------------------------------+
```

| Module | Role |
|---|---|
| `dpwm_top` | Complete DPWM |
| `data_synchronization` | Counter, sampling pulse and duty-word register |
| `clock_counter` | 10-bit binary up counter made of `ccms_dff` cells |
| `ccms_dff` | Conditional-capture flip-flop with a latch-based clock gate |
| `state_prediction` | Next count, `c_ns = c_pe + 1` |
| `pre_synchronizer` | NOR of `c_ns` sampled at the falling edge, giving `p_s` |
| `data_register` | 10-bit register clocked by the rising edge of `p_s` |
| `pulse_generator` | Start pulse, end pulse and output waveform |
| `zero_state_interceptor` | `v_sp` = falling-edge sample of (count = 0 AND `D` ≠ 0) |
| `magnitude_detector` | `v_ep` = falling-edge sample of (count = `D`) |
| `transition_pulse_width_generator` | Set by `v_sp`, cleared by `v_ep` |
| `buffer_network` | Behavioural dead-time driver and output stage |
| `cross_coupled_delay_generation` | Behavioural non-overlapping gate drives |
| `buffer_array` | Behavioural output stage that holds its level during the dead time |
| `dpwm_pkg` | Shared constants: `N = 10`, 2 ns clock, driver delays |

Every module takes the resolution as the parameter `N` (default 10).

## One PWM period, clock by clock

The subtle part of the design is when each signal changes. The counter changes
on rising clock edges. All pulse-forming flip-flops sample on falling edges.
Below, "count k" means the clock cycle in which `c_pe = k`. `T` is the clock
period.

| Moment | Event |
|---|---|
| Count 1023, falling edge | `c_ns` is 0, so `p_s` rises. The rising edge of `p_s` loads `in_data` into `d_r`. |
| Count 0, rising edge | The counter wraps to 0. `d_r` has already held the new word for half a clock. |
| Count 0, falling edge | `p_s` falls. If `d_r` ≠ 0, `v_sp` rises and `v_tpwm` goes high. |
| Count 1, falling edge | `v_sp` falls. The output stays high on the generator's held state. |
| Count `D`, falling edge | `v_ep` rises and `v_tpwm` goes low. |
| Count `D`+1, falling edge | `v_ep` falls. |

So `v_tpwm` is high from the middle of count 0 to the middle of count `D`. That
is exactly `D·T`. The pulse includes the start pulse's cycle and excludes the
end pulse's cycle.

Why the pre-synchronizer looks at the next count: a NOR of the present count
would fire during count 0. That is half a clock after the new period has begun,
so the new word would arrive too late. The NOR on `c_ns` fires one count
earlier. The falling-edge sampling gives every detector half a clock to settle
before its result is used, so no glitch can pass.

Corner cases:

* `D = 0`: the zero state interceptor blocks `v_sp`. `v_ep` still fires at count
  0, but there is nothing for it to clear, so the output stays low.
* `D = 1023`: the output is high for 1023 clocks and low for one clock, between
  the middle of count 1023 and the middle of count 0.
* A change of `in_data` during a period has no effect until the next rising edge
  of `p_s`. Each word therefore applies to whole periods only. A word that is
  stable at the rising edge of `p_s` is used for the period that starts half a
  clock later.

## The clock-gated counter

`ccms_dff` is a D flip-flop that captures only when its input differs from its
output. Its clock gate works like this:

* `capture = d ^ q`.
* A latch holds `capture` while `clk` is low. It is frozen while `clk` is high.
* The flip-flop is clocked by `clk & latched_capture`.

Because the enable is frozen during the high phase, the gated clock cannot
glitch. This is the usual integrated-clock-gate arrangement. The latch in
`ccms_dff.sv` is intended.

In the counter, each bit's `d` is its bit of `c_pe + 1`. Bit `i` therefore
toggles, and is clocked, once every 2^i cycles. The per-bit enables are brought
out as `clk_gate_en` so that activity can be measured.

Functionally the counter is a plain binary counter. The gating changes only how
often each flip-flop is clocked.

## Output driver (behavioural)

`buffer_network` turns `v_tpwm` into gate drives for a PMOS/NMOS output stage.
The two drives are:

* `d_pmos`: low turns the PMOS on.
* `d_nmos`: high turns the NMOS on.

Each transistor turns on only `DEAD_TIME_PS` (default 100 ps) after the other has
turned off, so the two are never on together.

The real circuit couples the two paths crosswise through a delay. The model gets
the same behaviour without a loop. It compares `v_tpwm` with a copy of itself
delayed by the dead time:

* PMOS on = `v_tpwm` AND delayed copy.
* NMOS on = NOR of `v_tpwm` and the delayed copy.

This is the same as the cross-coupled circuit for every input pulse longer than
the dead time. The shortest PWM pulse is 2 ns.

During the dead time the output stage drives nothing, and the model holds the
last level, as the load capacitance would. `v_dpwm` follows `v_tpwm` with both
edges delayed by `DEAD_TIME_PS + BUF_DELAY_PS` (150 ps), so the pulse width is
preserved. An assertion in `buffer_array` reports shoot-through.

These two modules use `#` delays and need a simulator with timing support. They
are not meant for synthesis. In a real chip they are a custom analog cell.

## Interface of `dpwm_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | Single clock, 500 MHz target |
| `v_r` | in | 1 | Active-high asynchronous reset |
| `in_data` | in | N | Duty word, bit 0 = LSB, sampled once per period |
| `p_s` | out | 1 | Sampling pulse, one clock wide, from mid count 1023 to mid count 0 |
| `v_dpwm` | out | 1 | PWM output |
| `clk_gate_en` | out | N | Counter clock-gate enables, for activity monitoring |

Parameters: `N` (10), `DEAD_TIME_PS` (100), `BUF_DELAY_PS` (50). All modules use
`timeunit 1ps`.

## Design choices not fixed by the original description

The block structure, the 10-bit width, the functions of the counter and the
detectors, and clocking the data register by `P_S` come from the published
design. The following were chosen here:

* **Reset.** `v_r` is an active-high asynchronous reset of every flip-flop.
  Originally it enters only the pulse width generator. Applying it everywhere
  gives a known start state and has no effect after reset.
* **Sampling edges.** The pre-synchronizer is described as sampling on the
  opposite clock edge. The start- and end-pulse flip-flops use the same falling
  edge here.
* **Pulse width generator circuit.** The source gives only its function. Here
  `v_tpwm = (v_sp | held) & ~v_ep & ~v_r`, with `held` a rising-edge copy of
  `v_tpwm`. This avoids an asynchronous set/reset latch.
* **Counter code.** A binary up counter. The source gives only the period 2^N and
  the wrap from all-ones to zero.
* **Conditional-capture cell.** A latch-based clock gate in front of an ordinary
  flip-flop. The transistor-level master-slave cell is not reproduced.
* **Counter state names.** The source distinguishes the counter's current state
  (input of the state predictor) from its output. Here both are the same
  flip-flop outputs.
* **Bit order.** Bit 0 is the least significant bit. For example, the word written
  0000000111 is 7.
* **Driver delays.** The dead time (100 ps) and the buffer delay (50 ps) are
  placeholders. The drive polarities were chosen so that `v_dpwm` follows
  `v_tpwm`.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dpwm_pkg.sv tb/tb_dpwm_top.sv \
          --top-module tb_dpwm_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_dpwm_top` with any other testbench name. The testbenches need
`--timing`. They drive the async reset after time 0 so that the reset edge is
seen.

`tb_dpwm_top` runs the full-size design at its default parameters for 24 periods
(about 25 000 clocks, a few seconds). It applies these duty words:

* 7.
* 0.
* The 20 states of a 10-bit Johnson counter (1, 3, 7, …, 1023, 1022, 1020, …,
  512, 0).
* 1023.

For every period it checks against values it computes itself:

* the number of output pulses;
* the exact pulse width (`D × 2 ns`);
* the rise time (1 ns + 150 ps after count 0);
* the duty cycle against the published sweep values 0.1, 0.3, 0.7, 1.5, 3, 6.1,
  12.4, 24.9, 49.9 and 99.9 %;
* 2046 counter clock edges per period.

In every period it also changes the input to a junk value mid-period, which must
be ignored. At the end it resets the design in the middle of a pulse.

It counts each mechanism, and the test fails if any never occurred: `P_S`, data
loads, start pulses, end pulses, zero-state interception, dead time, gated clock
edges, ignored mid-period changes and reset.

The block testbenches cover:

* `state_prediction`: exhaustively.
* `clock_counter`: three full periods with per-bit clock-edge counts.
* The detectors and the register: randomly, with forced corner cases.
* The driver models: edge timing to the picosecond.

## How far to trust it

* The digital RTL is small, and its cycle behaviour is checked exhaustively over
  whole periods. The testbenches check the behaviour described above, including
  the choices listed in the previous section.
* Timing closure at 500 MHz, power and the analog behaviour of the output stage
  are not represented. The driver models only reproduce dead time and edge order.
* The clock gate relies on the simulator and on synthesis treating `gclk` as a
  clock derived from `clk`. For an ASIC, replace the latch and AND in `ccms_dff`
  with the library's integrated clock-gating cell.
* `data_register` is clocked by `p_s`, a flip-flop output. That is a second clock
  domain for static timing analysis. It is related to `clk`, and the register's
  data path (`in_data`) is expected to be quasi-static.
