# Radar timing generator

This is the timing generator of a pulsed radar, written in SystemVerilog. The
original was built from programmable array logic parts. It takes a 20 MHz
time base and a host's command words. From them it produces:

- the transmitter trigger (TXIPP), once per inter-pulse period (IPP);
- the receiver's IPP;
- a programmable gate delay from each IPP to the start of sampling;
- the RDIPP framing pulse, which marks the start of sampling;
- a train of gate width (GW) sampling pulses;
- a calibration pulse (CAL) a programmable time after the gate delay.

Every interval is a count of 100 ns periods of a 10 MHz clock. That clock is
divided from one of two 20 MHz inputs:

- the **fixed** clock, for a stationary target;
- the **drifted** clock, a nearly-20 MHz clock that follows the Doppler
  drift of a moving target.

The transmitter always runs on the fixed clock. The receive side (gate delay,
GW, CAL) can follow either clock.

## Timers

There are six timers: TXIPP, RXIPP, gate delay, gate width, cal delay and
cal width. Each is a 32-bit down counter (`counter_chain`) built from eight
4-bit counters.

Each timer has its own decoder (`ts1_txipp_dec`, `ts2_rxipp_dec`,
`ts3_gd_dec`, `ts5_gw_dec`, `ts7_caldel_dec`, `ts9_calwth_dec`). The decoder
looks at the lowest counter and at a "this counter is zero" flag for each of
the seven upper counters. It produces two kinds of output:

- **Look-ahead enables `e[k]`.** Counter k may count when counter 0 and
  counters 1..k−1 are all zero. The borrow therefore never ripples through
  the chain.
- **Terminal decode `q1`.** It is high at a count of exactly 1. It reloads
  the preset, so a free-running timer with preset N repeats every N counts.

One count clock later the terminal decode is latched as `ql`. The `ql`
signals are what the control logic sees: `qltxipp`, `qlrxipp`, `qlgd`,
`qlgw`, `qlcaldel` and `qlcal`.

Some decoders have an extra term on `q1`:

- TXIPP reloads on the fixed start pulse.
- RXIPP reloads on the rx start pulse.
- GW reloads at the latched end of each gate delay, so the sampling train is
  aligned to every RDIPP.

The TXIPP decoder has one more output, `txipp_q9x`. It decodes the counts 9,
73, 137 and 201 (the low six bits equal 9 and the upper counters are zero).

`rtg_pkg` holds the shared decode functions and the `timer_presets_t` struct
of the six presets.

## Clocking

Each time base has its own synchroniser (`ts11_clk_sync`). It divides 20 MHz
by two. It can also restart the phase of the 10 MHz clock and emit a 100 ns
**start** pulse. A restart comes from one of two commands:

- **immediate start**: the restart happens right away;
- **time tick arm**: `ippholdoff` is raised, and the restart waits for the
  next rising edge of the selected one- or ten-second tick. It is
  synchronised through two flip-flops. `ippholdoff` drops when the start
  appears.

A start, or a pending holdoff, reloads the IPP counters and the gate delay.
The radar can thus begin its pulse sequence on a time mark.

In this RTL no register is clocked by a divided clock. The 10 MHz logic runs
on the 20 MHz clock with a clock enable `ce = NOT clk10` (the synchroniser
also brings it out as `ce10`). The enable is high in the 20 MHz cycle at
whose end the 10 MHz clock rises. Each register therefore samples the same
values it would if it were clocked by the 10 MHz clock. There is also no race
between a derived clock and the data it launches. The wiring is:

- receive side: clock `riclk`, the selected 20 MHz clock; enable NOT `rxclk`;
- TXIPP counter: clock `f20meg`; enable NOT `fixclk`.

Every block with a `ce` port can be clocked straight from a 10 MHz clock by
tying `ce` high.

`ts10_clk_mux` switches `rxclk`, the rx start, `ippholdoff` and `riclk`
between the two time bases. It also chooses the one- or ten-second tick.

## Gate delay, RDIPP and gate width

`ts4_gd_logic` starts a gate delay on any of:

- the latched IPP terminal count of the selected time base (TXIPP when the
  clock is fixed, RXIPP when drifted), only in radar mode;
- the rx start pulse;
- IPP holdoff.

The start loads the gate delay timer through the combinational `lden`. It
also pulls the RDIPP trigger `rdipptgr` low. The trigger stays low until the
latched gate delay terminal count `qlgd`, and the timer counts only while it
is low.

`rdipp_pulse` turns the rising edge of `rdipptgr` into a 100 µs pulse. That is
`RDIPP_CYCLES` = 1000 rx clocks; a new trigger restarts it.

The gate width timer runs freely with period GW. It restarts at `qlgd`.
`ts6_gw_logic` latches its decode and ANDs it with `rxclk`. This gives one
50 ns pulse per GW period. When blanking is selected, GW pulses are
suppressed while the non-gated cal signal `ngcal` is high.

## Calibration

`ts8_cal_logic` works with two timers.

1. `qlgd` sets `cdt_en`, and the cal delay timer counts down.
2. At its latched terminal count (`qlcaldel`), `cdt_en` clears. At the same
   moment `ngcal` and CAL (if enabled) go high, and the cal width timer
   starts.
3. At `qlcal`, both drop.

While idle, both timers sit at their presets. CAL is enabled only in radar
mode.

## Measured timing (10 MHz counts)

These values come from the end-to-end test. P is the IPP preset, G the gate
delay, D the cal delay, W the cal width and N the GW preset.

| interval | length |
|---|---|
| TXIPP period | P |
| IPP to rising edge of RDIPP trigger | G + 2 |
| RDIPP pulse | 1000 |
| RDIPP trigger rise to CAL rise | D + 1 |
| CAL high | W + 1 |
| GW pulse spacing | N |

A preset of 0 wraps the count and gives a period of 2^32 counts.

## Commands and status

A command word is 24 bits. It counts only when bit 23 is set, and takes effect
with the command strobe.

`ts12_cmd_dec` makes pulses that last as long as the strobe:

| bits | meaning |
|---|---|
| 19 | update parameters |
| 4 | clear the status flags |
| 1..0 = 01 | status request |
| 1..0 = 1x | verification request |
| 3..2 = 01 | time tick arm |
| 3..2 = 1x | immediate start |

`ts13_cmd_latch` holds five modes. They load at the falling edge of the
strobe. Each mode has a 2-bit field:

- `00` keeps the mode;
- `01` selects the first choice;
- `1x` selects the second.

| bits | 01 | 1x |
|---|---|---|
| 15..14 | radar mode | continuous mode |
| 13..12 | drifted clock | fixed clock |
| 11..10 | CAL enabled | CAL disabled |
| 9..8 | one-second tick | ten-second tick |
| 7..6 | GW blanked during cal | GW normal |

After reset all five flip-flops are clear. That selects radar mode, the
drifted clock, CAL enabled, the one-second tick and GW blanking.

In **continuous mode** IPP terminal counts do not start gate delays. Only a
start or holdoff does, which gives a single RDIPP, and CAL stays low.

`ts14_ttc` is a self-test. On every rx clock it compares the latched terminal
counts of TXIPP, gate delay, GW, cal delay and cal width with that of RXIPP.
It sets a sticky flag (status bits 19..15) for each one that differs. A clear
command resets the flags; the clear wins over a new mismatch in the same
cycle.

## Top level

`rtg_top` wires all of the above together.

Inputs:

- both 20 MHz clocks;
- the two ticks;
- the command word and strobe;
- the six presets, as a `timer_presets_t`.

Outputs:

- the clocks, TXIPP, RDIPP, GW, CAL and `ngcal`;
- the command pulses and the status flags;
- two of the modes.

The host interface that would write the presets (a data word loaded on the
update command) is not part of this design. The presets are plain inputs.

`rst` is an asynchronous reset that clears every register. That is the
power-up state of registered logic.

## Where this design makes its own choices

- The wiring between blocks follows the shared signal names of the logic
  equations. These are this design's own choices:
  - the time tick arm command drives the tick sync request;
  - the immediate start command drives the immediate start request;
  - the synchronised tick is the selected one;
  - TXIPP is the latched TXIPP terminal count;
  - the gate delay timer counts while the RDIPP trigger is low;
  - the cal timers idle at their presets;
  - CAL is gated by radar mode.
- Where the equations and the drawings disagree, the drawings were followed:
  - the gate delay start selects TXIPP with the fixed clock;
  - `lden` is combinational, with separate start and holdoff terms;
  - the look-ahead enables run E2..E7.
- The GW decoder reloads at `qlgd` rather than at the rx start.
- The 15 ns and 30 ns delay buffers on the rx clock feeding the GW gate are
  not modelled. With the clock-enable scheme, the gate signal and `rxclk`
  change on the same edge.
- The counters are synchronous presettable down counters. The original part
  types are not reproduced.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. With Verilator 5, for example:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/rtg_pkg.sv rtl/*.sv tb/tb_rtg_top.sv --top-module tb_rtg_top
./obj_dir/Vtb_rtg_top
```

Replace the testbench and `--top-module` to test another block.

`tb_rtg_top` runs the whole design at its default parameters, in these
phases:

1. radar mode on the fixed clock, with GW blanking;
2. GW normal;
3. the clear, status, verification and update commands;
4. continuous mode;
5. the drifted clock, with a 100.2 ns period;
6. a time-tick-armed start.

It counts each mechanism (IPPs, RDIPPs, GW pulses, CAL pulses, blanked GWs,
mode switches, starts, status flags) and fails if any never occurs. It
checks the intervals in the table above. It takes well under a second.
