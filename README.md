# TPC-TMR-FF: a temporally pulse clocked, triple redundant D flip-flop

A particle strike on a chip leaves a short voltage spike, a single event
transient (SET), on whatever node it hits. If the spike reaches a flip-flop's
data or clock input at the wrong moment, or flips a stored bit, the machine
state is corrupted. This flip-flop survives any one such event of up to
400 ps. It does so by sampling its data three times, at three moments spaced
further apart than the longest transient, into three separate latches, and
voting on the result.

The three sampling moments come from a pulse generator that is shared by a
whole word of flip-flops (16 bits by default). The expensive part of temporal
hardening is the delay elements. This cell needs three of them per word,
instead of several per bit.

This repository holds a SystemVerilog model of the cell: synthesizable RTL
for the latches, the voter and the C-elements, and behavioural timing models
for the parts whose function *is* a delay. It also holds testbenches that
inject transients and upsets. The cell itself is a transistor-level circuit
(90 nm, typical corner), so read "timing" below as nominal picoseconds.

## Structure

```
              delta         delta         delta
   CLK ──┬──[ DLY ]──D1CLK──[ DLY ]──D2CLK──[ DLY ]──D3CLK
         │      │               │               │
         ├──[ C  CA ]───────────┼───────────────┼──[PGA]── PCLKA ─┐
         ├──────────────────[ C  CB ]───────────┼──[PGB]── PCLKB ─┤  (shared by
         └──────────────────────────────────[ C  CC ]──[PGC]── PCLKC ─┤   all bits)
                                                                      │
   per bit:   D ──┬── LA (open while PCLKA) ── QA ──┐
                  ├── LB (open while PCLKB) ── QB ──┼── majority ── Q
                  └── LC (open while PCLKC) ── QC ──┘
```

| Module | Role | Kind |
|---|---|---|
| `tpc_tmr_ff` | Top: one temporal pulse generator plus a WIDTH-bit latch bank | RTL (structural) |
| `temporal_pulse_generator` | CLK → PCLKA/B/C at 1, 2 and 3 delta after each rising edge | behavioural (delays) |
| `delay_element` | Transport delay of delta (600 ps) | behavioural |
| `muller_c` | Non-inverting C-element | RTL (latch) |
| `pulse_generator` | Rising edge → 180 ps pulse | behavioural |
| `tmr_latch_bank` | Per bit: LA, LB, LC and a voter | RTL |
| `pulse_latch` | WIDTH-bit level-sensitive latch | RTL (latch) |
| `majority_voter` | Bitwise 2-of-3 vote | RTL |
| `tpc_pkg` | Nominal timing constants (delta, pulse width, SET width, word size) | package |

## How one clock edge becomes three pulses

Each pulse comes from a Muller C-element followed by a pulse generator. A
C-element's output copies its inputs when they agree and holds when they
differ. Each C-element compares the clock with a delayed copy of itself:

* CA sees CLK and D1CLK (CLK delayed by delta). It rises delta after the
  clock edge, when D1CLK catches up.
* CB sees CLK and D2CLK (2 delta). It rises 2 delta after the edge.
* CC sees CLK and D3CLK (3 delta). It rises 3 delta after the edge.

Each pulse generator turns its C-element's rising edge into a 180 ps pulse.
Inside, an inverted copy of the input, delayed by the pulse width (DCLKN), is
combined with the input: PCLK is high while the input is high and DCLKN is
still high. Falling edges make no pulse.

This arrangement filters clock transients. A glitch on CLK shorter than delta
reaches the two inputs of a C-element at different times. The C-element sees
disagreement and holds, so the glitch makes neither an extra pulse nor a
missing one. The same holds for a glitch on D1CLK, D2CLK or D3CLK. The
delay elements are transport delays: a 400 ps glitch travels down the chain
intact, as it does in silicon. The C-elements are what stop it.

One condition follows from this and is easy to miss: **each clock phase must
last longer than 3 delta (1.8 ns)**. If CLK falls before D3CLK has risen, CC
never sees its inputs agree, and PCLKC never fires. The testbenches use a
6 ns clock with a 3 ns high phase.

## What one event can and cannot break

With delta = 600 ps and 180 ps pulses, the gap from one pulse's falling edge
to the next pulse's rising edge is 420 ps. A transient of up to 400 ps can
therefore touch at most one of the three sampling windows. The model checks
this at elaboration and warns if `DELTA_PS - PULSE_WIDTH_PS` is below 400.

| Event | Effect inside | Q |
|---|---|---|
| 400 ps glitch on CLK, either phase (type 3/4) | filtered by the C-elements | correct |
| CLK edge early or late by 400 ps (type 1/2) | all pulses shift; a late PCLKC may catch the next word | correct |
| 400 ps glitch on D over one pulse | one latch takes the wrong value | correct, one delta later |
| 400 ps glitch on D between pulses | no latch takes it | correct |
| one pulse lost (SET on PCLKA/B/C) | that latch keeps last cycle's word | correct; one delta later if PCLKA or PCLKB was lost |
| upset of one stored bit | one copy wrong until its next pulse | correct |
| SET on D spanning the closing edges of two pulses (600 ps or more) | two copies wrong | **wrong** (beyond the design limit) |

Two simultaneous strikes can defeat the vote when each spoils a different
copy. The table below gives the outcome of every pairing of a strike on the
pulse-generator side (rows) with a strike on the latch side (columns). 1
means Q is wrong. Pairs marked 1 must not sit next to each other in the
layout. The testbench `tb_dual_fault_table` reproduces all 28 entries.

|        | D | QA | QB | QC |
|---|---|---|---|---|
| CLK    | 0 | 0 | 0 | 0 |
| D1CLK  | 0 | 0 | 0 | 0 |
| D2CLK  | 0 | 1 | 1 | 0 |
| D3CLK  | 0 | 1 | 1 | 0 |
| PCLKA  | 0 | 0 | 1 | 1 |
| PCLKB  | 0 | 1 | 0 | 1 |
| PCLKC  | 0 | 1 | 1 | 0 |

In the model each row's strike is specific. A late-rising D2CLK or D3CLK
delays PCLKC enough for LC to take the next word. A lost PCLKx leaves Lx
stale. The D strike falls in the gap between pulses. A column's Qx strike
flips every bit of latch x. Other strike times give other matrices. This set
is the one that matches the reference table.

## Timing

All numbers are with zero-delay latches, C-elements and voter (see below).
The edge is the rising edge of CLK at time 0.

| | Without SET | Tolerating one SET |
|---|---|---|
| Setup: D stable from | before PCLKA rises, +600 ps | same |
| Hold: D stable until | PCLKB falls, +1380 ps | PCLKC falls, +1980 ps |
| Q settles (clk→Q) | PCLKB rises, +1200 ps | PCLKC rises, +1800 ps |

In silicon the latch setup/hold and the latch and voter propagation delays
add to these numbers. The cell's dead time (setup plus clk→Q) is large, about
1.5 ns in silicon. This is the price of hardening.

**Hold buffers.** Q moves as soon as two copies agree, at the second pulse.
The next flip-flop's third latch still samples one delta later. A register
feeding a register directly therefore races. `tb_shift_register` shows three
cases:

* **Direct connection.** The second stage takes the first stage's new word in
  the same cycle, so the register collapses.
* **600 ps (delta) buffer.** This is the buffer size the original design
  used. The second stage shifts, but its LC takes the next word every cycle.
  In the following cycle PCLKA makes LA agree with that early LC, Q moves one
  delta early, and the third stage races. In this zero-delay model, one delta
  of buffer is not enough. In silicon, the latch and voter delays supply part
  of the missing margin.
* **800 ps (delta + pulse width + margin) buffer.** Every stage shifts and all
  three copies always agree. This is the value to use with this model.

## Modelling choices and departures

* **Behavioural parts.** Delay elements and pulse generators are analog
  timing circuits. `delay_element` is an exact transport delay. Each input
  change launches a process that writes the value `DELAY_PS` later. The
  transistor sizing for fast SET recovery is not modelled. `pulse_generator`
  uses one such delay for its inverter chain. Both simulate under Verilator's
  `--timing` and parse in synthesis front ends. A synthesis tool drops their
  delays, however, so a netlist of `tpc_tmr_ff` is not a working cell.
* **Zero delay elsewhere.** C-elements, latches and the voter switch
  instantly. Only delta and the pulse width shape the timing.
* **Polarity.** The C-elements and the voter are non-inverting, as the cell
  requires. Descriptions of the generic circuits show inverting versions of
  both (an inverting C-element output; the classic complex-gate voter). The
  RTL follows the cell's usage.
* **C-element as a latch.** `muller_c` is a latch enabled when the inputs
  agree, with input `a` as data. This is its truth table written as storage.
  Latches in `muller_c` and `pulse_latch` are intended.
* **Clock buffers.** The drive buffers between the pulse generators and the
  latches carry no logic and are wires here.
* **No reset.** The cell has none. Latch and C-element contents are unknown
  until the first clock edges. The testbenches run two edges with a constant
  word before checking.
* **Output start value.** Delay-element outputs start low, which matches an
  idle-low clock.
* **Not modelled.** The physical side of the cell is not modelled:
  * vertical interleaving of two flip-flops to space critical nodes;
  * the 16-bit cell layout;
  * Monte Carlo sizing of the pulse width (a 128 ps minimum against a 180 ps
    nominal);
  * power and area.

  The hardened clock-gating cell and the AES test design used in the
  synthesis flow are not described in enough detail to build.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/tpc_pkg.sv \
          tb/tb_tpc_tmr_ff.sv --top tb_tpc_tmr_ff -o sim
./obj_dir/sim
```

| Testbench | What it shows |
|---|---|
| `tb_tpc_tmr_ff` | End to end at default parameters. Runs 13 mechanisms: normal capture with clk→Q timing, CLK SET types 1–4, D SETs on and between pulses, each pulse lost, latch upsets, delayed-clock glitches, and an over-long SET that must corrupt Q. Counts each mechanism and the pulses on each pulse clock. |
| `tb_dual_fault_table` | The 28 double-strike pairs of the table above. |
| `tb_shift_register` | Hold buffers: direct, delta and 800 ps. |
| `tb_cell_variants` | An 8-bit cell, the 16-bit default and a 16-bit cell with delta = 900 ps, side by side under the same events. A 700 ps SET on D corrupts the 600 ps cells but not the 900 ps one. |
| `tb_temporal_pulse_generator` | Pulse positions on a 10 ps grid; eight kinds of clock-node glitch filtered. |
| `tb_tmr_latch_bank` | Voting order (Q changes at PCLKB), lost pulses, upsets, a double fault. |
| `tb_delay_element`, `tb_pulse_generator` | Transport delay and pulse shape against a sampled reference. |
| `tb_muller_c`, `tb_pulse_latch`, `tb_majority_voter` | Truth tables and latch behaviour. |

Faults are injected with `force`/`release`. Forcing a net such as `pclk_a`
or `u_tpg.d2clk` and releasing it models a transient: the net returns to its
driver afterwards. Forcing a latch's stored variable (`u_bank.u_la.q`) and
releasing it models an upset: the latch keeps the forced value until its
next pulse. The simulator is two-state, so anything not initialised starts
random. The testbenches do not depend on that.

## Changing it

`WIDTH`, `DELTA_PS` and `PULSE_WIDTH_PS` are parameters of `tpc_tmr_ff`, with
defaults in `tpc_pkg`. To tolerate longer transients, raise `DELTA_PS` so
that `DELTA_PS - PULSE_WIDTH_PS` stays above the SET width. Then lengthen the
clock phases beyond `3 * DELTA_PS` and the hold buffers beyond
`DELTA_PS + PULSE_WIDTH_PS`.
