# Adaptive DVFS controller: an eight-state FSM with safe voltage/frequency sequencing

Dynamic voltage and frequency scaling (DVFS) saves power by running a processor
slower, at a lower supply voltage, when there is little work. This design
decides in hardware which of eight operating points the processor should run at.
It measures the workload and moves through the points one at a time. It always
keeps the clock within what the supply voltage allows:

* **going up**, the supply is raised first. The clock is sped up only once the
  new voltage has settled.
* **going down**, the clock is slowed first. The supply is lowered only once
  the clock switch has finished.

Next to this adaptive controller sits the simpler datapath it grew from. In
that *basic DVFS* datapath, a 2-bit mode picks one of four divided clocks and a
voltage code. Both are SystemVerilog-2017 RTL and synthesizable. The only parts
left out are the analog ones: the voltage regulator, any PLL and the temperature
sensor.

The RTL follows a published adaptive-DVFS design: its block structure, signal
names, state count and code tables. That source describes most blocks only by
what they do. The circuits inside them, every timing parameter and every
handshake are this implementation's own choices. They are listed in
[Where this departs from, or adds to, the published design](#where-this-departs-from-or-adds-to-the-published-design).

## Structure

```
dvfs_system                      top: the two designs side by side, shared clk/rst only
├── advfs_top                    adaptive controller (ports prefixed adv_ at the top)
│   ├── workload_monitor         busy-cycle counter -> load[2:0]   (or external load code)
│   ├── protection_unit          thermal cap on the target, clock-stall and sequence checks
│   ├── advfs_fsm                8-state Moore FSM with up/down sequencing
│   ├── voltage_request          voltage_out[3:0] to the regulator, settle wait -> v_stable
│   ├── freq_bank                clk/2, clk/4, clk/8, clk/16
│   └── adaptive_freq_controller level code, glitch-free clock select -> cpu_clk, f_done
│       └── glitch_free_clk_mux
└── dvfs_top                     basic four-mode datapath
    ├── dvfs_controller   (dvfs) mode -> freq_sel, voltage_sel, safe order
    ├── freq_bank         (fb)
    ├── frequency_controller (fc) glitch-free select -> freq_out, freq_code
    │   └── glitch_free_clk_mux
    └── voltage_controller (vc)  voltage_sel -> voltage_out
dvfs_pkg                         shared types, mode codes, FSM phase encoding
```

Everything runs on the master clock `clk`, except the clock multiplexers. Their
flip-flops are clocked by the divided clocks. Reset `rst` is asynchronous and
active high everywhere.

## Operating points

### Adaptive controller: eight states

| state | load code | voltage_level / voltage_out | freq_level / freq_out | cpu_clk |
|---|---|---|---|---|
| S0 (idle) | 000 | 000 / 0000 | 000 / 0000 | clk/16 |
| S1 | 001 | 001 / 0001 | 001 / 0001 | clk/16 |
| S2 | 010 | 010 / 0010 | 010 / 0010 | clk/8 |
| S3 | 011 | 011 / 0011 | 011 / 0011 | clk/8 |
| S4 | 100 | 100 / 0100 | 100 / 0100 | clk/4 |
| S5 | 101 | 101 / 0101 | 101 / 0101 | clk/4 |
| S6 | 110 | 110 / 0110 | 110 / 0110 | clk/2 |
| S7 (turbo) | 111 | 111 / 0111 | 111 / 0111 | clk/2 |

The 4-bit codes are the 3-bit levels zero-extended, so bit 3 of both codes is
always 0. An external regulator and an external clock generator can use the
codes directly. Inside the design, the clock comes from the four-clock divider
bank, with two levels per clock. The published operating points run from 800 MHz
at S0 to 1800 MHz at S7. A divider bank fed by one clock cannot produce those
values, so this design does not try to.

### Basic datapath: four modes

| mode | condition | voltage_out | freq_code | freq_out |
|---|---|---|---|---|
| 00 | idle / low power | 0001 | 0001 | clk/16 |
| 01 | light load | 0011 | 0010 | clk/8 |
| 10 | heavy load | 0111 | 0100 | clk/4 |
| 11 | peak / turbo | 1111 | 1000 | clk/2 |

The voltage code is a thermometer code. The frequency code is one-hot and equals
the clock rate in units of clk/16.

## The sequencing FSM (`advfs_fsm`)

This is the heart of the design. The state register holds the operating state
S0..S7. A second register holds the *phase* of the step in progress. The voltage
level and the frequency level are separate registers, so that during a step they
can differ by one.

```
             target > state                     v_stable
 STEADY ───────────────────────► V_UP ─────────────────────────► F_UP ──f_done──► STEADY
 (V=F=n)     voltage_level = n+1      freq_level = n+1, state = n+1
   │
   │         target < state                     f_done
   └─────────────────────────────► F_DOWN ───────────────────────► V_DOWN ─v_stable─► STEADY
             freq_level = n-1         voltage_level = n-1, state = n-1
```

* `target` is the workload code, which may be capped by the thermal check. The
  FSM compares it with the state only in STEADY. Each step moves exactly one
  state, so a jump from S0 to S7 takes seven steps. The target may change while
  a step is under way. The step still finishes, and the new target is used in
  the next STEADY cycle.
* `v_stable` comes from `voltage_request`. It drops in the same cycle that the
  voltage level changes and returns once the regulator has settled. `f_done`
  comes from `adaptive_freq_controller`. It drops in the same cycle that the
  frequency level asks for a different clock, and returns when that clock is
  the only one passing the multiplexer. If the new level uses the same clock,
  `f_done` never drops and that half-step takes one cycle.
* These two rules follow: `freq_level <= voltage_level` holds at all times, and
  the frequency rises only over a settled voltage. Assertions in the FSM check
  both, and the protection unit checks the first one again in hardware.
* While `hold` is high (a protection fault), no new step starts. A step already
  begun finishes.
* The outputs are registers (Moore). `transitioning` is high outside STEADY.
  `step_up` and `step_down` pulse for one cycle when the state changes.

**Timing of one step at the defaults.** The voltage half-step takes
SETTLE_CYCLES + 2 = 18 cycles when the regulator's power-good is already high:
one cycle to register the request, 17 cycles in `voltage_request`, and one cycle
to leave the wait. The clock half-step takes from one cycle (same clock) up to
about 40 cycles (a clk/16 to clk/8 switch). A full sweep from S0 to S7 takes a
few hundred cycles.

## Voltage request and settle (`voltage_request`)

`voltage_out` is the request to the regulator. It changes as soon as
`voltage_level` changes. The module keeps `applied_level`, the last level known
to be stable. When the request differs from it, a timer counts SETTLE_CYCLES
cycles. The module then also waits for `vreg_pgood`, the regulator's power-good,
before taking the new level as applied. A new request while the timer runs
restarts the timer. Tie `vreg_pgood` high to get a timer-only design. Leave the
timer at its minimum and use the power-good input to get a handshake-only
design.

## Clock generation and switching

`freq_bank` is a free-running counter. Its bit *i* is a 50 %-duty clock at
clk / 2^(i+1). The bits are flip-flop outputs, so they are free of glitches and
in phase with `clk`.

`glitch_free_clk_mux` switches between clocks without ever making a shortened
pulse. Each input has an enable. An input asks for its enable only when it is
selected **and** every other enable is off. The request passes a two-flop
synchroniser in that input's own clock domain, first on the rising edge and then
on the falling edge. So an enable changes only while its clock is low. On a
switch:

1. the old enable drops at a falling edge of the old clock;
2. the new enable rises at a later falling edge of the new clock;
3. between the two, the output is low.

The enables are one-hot or zero at all times. `adaptive_freq_controller` brings
them back into the `clk` domain through two flip-flops. It reports `f_done` when
exactly the requested clock is enabled. After reset, no enable is on: `cpu_clk`
stays low for about two cycles of the selected clock, about 24 `clk` cycles for
clk/16.

## Protection (`protection_unit`)

* **Thermal.** While `thermal_alarm` is high, the target is capped at
  THERMAL_CAP (S3). The FSM then steps down to S3 and stays there until the
  alarm clears. `thermal_limited` shows when the cap cuts the target.
* **Unstable clock.** The unit samples `cpu_clk` through two flip-flops. If it
  shows no edge for CLK_TIMEOUT `clk` cycles, `clk_fault` is set. CLK_TIMEOUT
  must exceed the longest gap between edges. That gap is up to about 32 cycles during a
  switch away from clk/16.
* **Invalid transition.** `seq_fault` is set if the state moves by more than one
  step between two cycles, or if the frequency level exceeds the voltage level.

Both faults are sticky until reset, and `fault` holds the FSM. A working design
never raises them. They guard against a broken clock source and against changes
to the FSM.

## Workload monitor (`workload_monitor`)

With `use_ext_load = 0`, the monitor measures utilisation. It counts the cycles
in which `busy` is high over WINDOW cycles. At the end of each window it sets
`load = min(7, floor(8 * busy_cycles / WINDOW))` and pulses `load_update`. With
`use_ext_load = 1`, `ext_load` is registered and used directly. This is the
input interface for an external load estimate, such as queue depth or instruction
rate. With the default WINDOW of 256 cycles, the controller reacts to a change in
load within one window plus the step times.

## Basic four-mode datapath (`dvfs_top`)

This is the simpler design. `dvfs_controller` registers the mode into a voltage
select and a frequency select and keeps the same safe order, one `clk` cycle
apart. Going up, the voltage select moves one cycle before the frequency select.
Going down, the frequency select moves first. Unlike the adaptive FSM, it does
not wait for the clock switch or for the regulator. `frequency_controller`
passes the selected clock through the same glitch-free multiplexer and reports
`switched`. `voltage_controller` is a table lookup. The instance names (`fb`,
`dvfs`, `fc`, `vc`) and signal names are those of the published schematic.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| WINDOW | 256 | workload_monitor, advfs_top, dvfs_system | utilisation window, power of two ≥ 8 |
| SETTLE_CYCLES | 16 | voltage_request, advfs_top, dvfs_system | minimum voltage settle time in clk cycles |
| THERMAL_CAP | 3 | protection_unit, advfs_top, dvfs_system | highest state allowed during a thermal alarm |
| CLK_TIMEOUT | 64 | protection_unit, advfs_top, dvfs_system | clk cycles without a cpu_clk edge before a clock fault |
| NUM_STATES | 8 | advfs_fsm | operating states (at most 8, because the levels are 3 bits) |
| NUM_LEVELS, NUM_CLKS | 8, 4 | adaptive_freq_controller | frequency levels and divided clocks (levels per clock = NUM_LEVELS/NUM_CLKS) |
| NUM_TAPS | 4 | freq_bank | divided clocks, clk/2 … clk/2^NUM_TAPS |
| N | 4 | glitch_free_clk_mux | mux inputs |

Only the eight states and the four divided clocks come from the published
design. All the other values are chosen here.

## Simulating

Each block in `rtl/` has a self-checking testbench in `tb/`, named `tb_<module>`.
Each one prints `TB_RESULT checks=N failures=M`. Compile the package first, for
example:

```
verilator --binary --timing --assert --top-module tb_dvfs_system \
    -y rtl rtl/dvfs_pkg.sv tb/tb_dvfs_system.sv
./obj_dir/Vtb_dvfs_system
```

The `-y rtl` option lets verilator find each module in `rtl/<module>.sv`. The testbenches reset with a real
rising edge on `rst`. A two-state simulator needs that edge for the asynchronous
resets to act.

* `tb_dvfs_system` runs the whole design at its default parameters. The
  adaptive side is driven with external load codes, a thermal alarm and measured
  utilisation (100 %, 30 %, idle). A regulator model holds power-good low after
  every request. The basic side runs the mode sequence 00, 01, 10, 11, 00 and
  then random modes. The testbench checks states, codes and clock periods, and
  counts every mechanism: steps up and down, waits for voltage, clock and
  power-good, the thermal cap, measurement windows, and mode changes both ways.
* `tb_advfs_top` runs the adaptive controller against a utilisation profile,
  with a short window (32) and settle time (4). It has an independent load
  model, and it checks that an up-step waits while power-good is low.
* `tb_advfs_fsm` checks the ordering rules cycle by cycle. A random environment
  delays `v_stable` and `f_done`.
* `tb_glitch_free_clk_mux` measures every output pulse to prove that no glitch
  occurs.
* The clock-stall and invalid-transition faults cannot be provoked from the
  top's ports. `tb_protection_unit` covers them.

Each testbench has a watchdog and finishes in well under a second.

**How far to trust it.** All blocks pass their testbenches in verilator, which is
a two-state, cycle-based simulator. Each testbench has also been shown to fail
against a deliberately broken copy of its block. Every file passes
verilator's `-Wall` lint and the slang elaboration in yosys, and synthesizes
with no latches, combinational loops or multiply-driven nets. One lint note
remains: `rst` is used both as an asynchronous reset and, in the `disable iff`
of the assertions, as a synchronous condition. Nothing has been run at gate
level, on an FPGA or with real clock-domain timing. The clock multiplexer
relies on its inputs being clean flip-flop clocks, as `freq_bank` makes them.
If you feed it clocks from unrelated sources, check its synchronisers against
your metastability budget. Bit 3 of the adaptive `voltage_out` and `freq_out`
codes is constant 0 by construction.

## Where this departs from, or adds to, the published design

* **Two designs, side by side.** The published work shows a basic four-mode
  datapath (a schematic, a mode table and a waveform) and an adaptive eight-state
  controller (a block diagram with tables). They use different codes and are
  never shown in one module. Here they are kept as separate designs under one
  top.
* **Adaptive codes.** The S2 voltage level is printed as 011 in one table and
  010 in the other. Binary 010 is used, which is consistent with the printed
  output 0010. The published MHz values for the frequency levels are not
  reproduced. The two-levels-per-clock grouping onto the divider bank is this
  design's own.
* **Sequencing waits.** The published design states the up/down ordering rule.
  The phase FSM, the one-state-per-step rule and the waits on `v_stable` and
  `f_done` are this design's reading of it.
* **Voltage confirmation.** The published design says the voltage request
  module confirms a settled voltage, and it also lists regulator acknowledgement
  as future work. This design offers both a settle timer and a power-good input.
* **Protection.** The published design only names the three checks. The thermal
  cap, the clock-stall timeout, the definition of an invalid transition and
  the hold reaction are all this design's choices.
* **Workload monitor.** Only a busy/idle utilisation input is built, alongside
  the external load code. Instruction rate and queue occupancy are left to
  whatever drives `ext_load`.
* **Basic datapath.** `dvfs_controller` has a clock and a reset, so that it can
  keep the ordering rule. `frequency_controller` has a reset and a `switched`
  output. The mode table is followed exactly. `freq_out` is the clock, as in the
  schematic. `freq_code` is the 4-bit code shown in the published waveform.
* **Not built.** These are left out:
  * the voltage regulator (PMIC), a PLL and the temperature sensor, which the
    design only talks to;
  * hysteresis, governor modes, sleep states and an operating-point table, which
    the published work lists as future work.
