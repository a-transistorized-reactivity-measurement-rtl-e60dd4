# Pulsed-neutron reactivity measurement system

This is the control and counting logic of an instrument that measures how
far below delayed critical a reactor is. The reactor is hit with a short
burst of neutrons. After the burst, the neutron flux dies away as
exp(-αt). The decay constant α tells you the reactivity: with α_c measured
at delayed critical, reactivity in dollars is $ = 1 - α/α_c.

The instrument measures α by counting. Each cycle has these steps:

1. Count the detector pulses for one channel width Δt to get the background.
2. Fire the pulsed neutron source (PNS).
3. Wait N channel widths for the early transients to die out.
4. Count in ten back-to-back channels, each Δt wide.

Cycles repeat 1 to 10 times a second. The counts build up over 10, 100 or
1000 cycles. Then they are read out one channel at a time. Subtract the
background from each channel and plot log(count) against channel number.
The slope is -αΔt.

The original was built in 1960 from discrete transistor flip-flops, decade
counter cards and a stepping switch. This RTL is a synchronous version of
that logic: one master clock, and every pulse of the original is a
one-clock enable.

## Quick reference

| Quantity | Range | Set by |
|---|---|---|
| Timing base | 50 kc (20 µs) | `timing_pulse_source`, from `CLK_HZ` |
| Channel width Δt | W × 20 µs, W = 1..100 (20..2000 µs) | `width_tens` (0..9) × 10 + `width_units` (1..10) |
| Delay, trigger to channel 1 | N × Δt, N = 1..10 | `delay_sel` |
| Repetition rate | 1..10 cycles/s | `rep_period` in 50 kc pulses (50000..5000) |
| Cycles per measurement | 10 / 100 / 1000 | `ops_sel` (`OPS_10`, `OPS_100`, `OPS_1000`) |
| Counting channels | background + 10 | — |
| Decades per channel | 6 for channels 1–6, 5 for background and 7–10 | — |

## One measurement cycle

Seven flip-flops in `gate_control` sequence a cycle: A, B, C, D, E, G and H.
An eleven-stage ring, F1..F11 in `shift_register`, works alongside them.
Everything moves on the channel-width pulse T. T comes from the 50 kc base
divided by W in `channel_width_selector`.

```
rep pulse  H on, G on (leading edge of H)
T          A' = G·S·T·B̄     A on, B on, G off      background counter gated by A
T          A·T              A off, C on
T          C·T              C off, D on            PNS trigger; delay counter counts T·(C+D)
...        N-th T·(C+D)     D off, E on
T          E·T = shift      F1 off, F2 on          counter 1 gated by F2
T          shift            F2 off, F3 on          counter 2
...
T          shift            F11 off, F1 on         B, E, H off; one count into the operation counter
```

Some parts of this sequence are easy to get wrong:

- **B prevents a second start.** B is set together with A and cleared only
  when the ring returns to F1. A repetition pulse that arrives while B is
  on does nothing, because H is already on. The cycle keeps its own timing
  even if the repetition period is shorter than the cycle.
- **The start gate S is checked only when a cycle begins.** STOP clears S
  straight away. The cycle in progress still runs to its end. The next
  cycle does not start until START sets S again. While S is off, H and G
  stay set, so the request is held. The cycle starts on the first T after
  START.
- **How the delay is counted.** The delay counter counts the T pulses that
  arrive while C or D is on. The first is the pulse that turns D on and
  fires the trigger. The N-th turns D off and E on. The first shift comes
  one T later, so channel 1 opens exactly N channel widths after the
  trigger. With N = 1, the delay counter finishes on the same pulse that
  would turn D on. D then stays off, E is set at once, and the trigger
  still fires.
- **Only one gate is ever open.** A, C, D and E are never on together (an
  assertion in `gate_control` checks this). Exactly one F stage is on. So
  each detector pulse reaches at most one counter.

### Exact windows, in master clocks

These are useful when checking counts in simulation. Let tt be the first
clock on which `pns_trig` is high, and let Tw = W × CLK_HZ / 50000.

- A detector pulse whose rising edge is on `count_in` in clock j reaches
  the gates in clock j + 2. There are two clocks of synchronisation.
- It is counted as **background** if j + 2 falls in [tt − 2Tw, tt − Tw − 1].
- It is counted in **channel c** (1..10) if j + 2 falls in
  [tt + (N + c − 1)Tw, tt + (N + c)Tw − 1].

The longest cycle is 23 channel widths: up to one width waiting for T,
two widths for background and gap, ten for the delay, and ten channels.
At 2 ms widths that is 46 ms, which fits the 100 ms period at 10 cycles/s.

## Counters and the 1-2-2-4 code

Every counter decade (`decade_counter`) has four stages with weights 1, 2,
2 and 4. A digit is the weighted sum of its stages. The weight-1 stage
toggles on every count. The other three step through
`000 → 100 → 110 → 011 → 111` (bits 1,2,3), which gives 0, 2, 4, 6 and 8.
`rms_pkg::to_1224` and `from_1224` convert between this code and binary.
The code comes from the original counter card. The order of the
upper-stage states is this design's choice.

The decade outputs are the readout signals. All counter buses (`counts`,
`readout`, `ops_count` and the lamp ports) carry digits in this code, least
significant decade first.

`counting_channel` chains decades with a ripple carry. It wraps silently
past its top decade, and there is no overflow flag.
`decade_counter_chassis` holds the eleven channels: index 0 is background
and 1..10 are the time channels. The sixth decade of a five-decade channel
reads 0.

## Preset counters: the selectors

Some counters divide by a value set on a switch. For these, a decade is
preset: it is set to P, counts up, and on the pulse that would carry out
of the last decade it gives one output pulse and reloads P. This divides
by 10^DIGITS − P (`preset_counter`).

- The channel-width selector is a two-decade preset counter with P = 100 − W.
- The delay counter is a one-decade preset counter with P = 10 − N. It is
  reloaded at the start of every cycle.
- The operation counter is a plain three-decade counter from zero. The
  carry out of decade 1, 2 or 3 sets `ops_done`. `ops_done` turns the start
  gate off and holds until reset.

## Readout: the scanner

`scanner` models the stepping switch. It has twelve positions: home (0),
background (1), and channels 1–10 (2–11). It advances one position every
`SCAN_STEP_DIV` pulses of 50 kc, which is one step per second.

- **Continuous mode** (`scan_manual` = 0): once the switch leaves home it
  keeps stepping until it is back home. Hold `scan_start` until the first
  step, as with the original push button.
- **Manual mode** (`scan_manual` = 1): the switch steps only while
  `scan_start` is held, and stays where it is when released.

`readout` is the selected channel's six decades, and all zeros at home.
Reading does not disturb the counters. Do not scan while a measurement is
running, because the counts are still changing.

Two more ports show counts without the scanner:

- `ch1_lamps` shows decades 4–6 (×10³..×10⁵) of channel 1.
- `ch10_lamps` shows decades 3–4 (×10²..×10³) of channel 10.

## Top-level interface (`reactivity_measurement_system`)

Parameters:

- `CLK_HZ` is the master clock (10 MHz by default). It must be a multiple
  of 50 kHz.
- `PNS_PULSE_CYCLES` is the trigger width (10 clocks by default).
- `SCAN_STEP_DIV` is the number of 50 kc pulses per scanner step (50000
  by default).

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst` | in | master clock; synchronous RESET, clears every counter and flip-flop |
| `start`, `stop` | in | START and STOP buttons (levels; STOP wins) |
| `width_tens`, `width_units`, `delay_sel`, `ops_sel`, `rep_period` | in | the panel settings listed above |
| `count_in` | in | detector pulses, asynchronous; each must be ≥ 1 clock high and ≥ 1 clock low |
| `pns_trig` | out | trigger to the neutron source |
| `operate_lamp` | out | on while the start gate is armed or a cycle is running |
| `ops_count`, `ops_done` | out | operation counter and its done flag |
| `counts` | out | all eleven channels, six decades each |
| `scan_start`, `scan_manual` | in | scanner START and manual switch |
| `scan_position`, `readout` | out | scanner position and selected channel |
| `ch1_lamps`, `ch10_lamps` | out | panel lamps |

The switch inputs are read continuously. Change them only between
measurements. The width divider picks up a new setting at the end of its
current period.

## Where this differs from the original

- **One synchronous clock.** The original used pulse-triggered
  flip-flops. Here there is one synchronous clock domain. The crystal
  oscillator, the pulse shapers and the blocking oscillators become a
  clock divider and one-clock enables. The reload of a preset counter
  takes effect on the same clock, with no delay.
- **Repetition oscillator.** The original was a free-running analog
  oscillator set by a potentiometer. Here it is a counter of 50 kc pulses
  with a period input.
- **Detector input.** A two-flop synchroniser and an edge detector replace
  the analog pulse shaper.
- **Switches.** The rotary switches are binary inputs. Out-of-range values
  are clamped. The TEST position of the operations switch is not defined
  and acts like 1000.
- **Scanner mechanics.** The relay and interrupter of the stepping switch
  are replaced by a step timer. The timer restarts whenever stepping is
  disabled.
- **Channel-width range.** The original describes the range as
  100–2000 µs in one place and as 20–2000 µs (÷1..÷100) in another. The
  hardware range, 20–2000 µs, is built.
- **Parts not in the RTL.** These have no logic function: power supplies,
  output and level-shifting amplifiers, the digital printer, the in-line
  display, the lamps themselves, and the cabling.
- **Stage order.** The order of the 2-2-4 stages in a decade is a choice
  made here (see above).

## Simulating

Each file holds one module, so plain Verilator finds them with `-y`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/rms_pkg.sv tb/tb_reactivity_measurement_system.sv \
    --top-module tb_reactivity_measurement_system -o sim
./obj_dir/sim
```

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
with a watchdog if something hangs.

- `tb_<module>` tests one module each. They compare against reference
  values computed in the testbench: weighted digit sums, division ratios,
  event times.
- `tb_reactivity_measurement_system` runs the whole system at a 1 MHz
  clock. It has three phases:
  - Phase 1: W = 2, N = 3, 10 cycles.
  - Phase 2: W = 1, N = 1, a repetition period shorter than the cycle, and
    STOP then START part-way.
  - Phase 3: a full continuous scan, then manual stepping.

  A detector model gives background plus an exponentially decaying burst
  after each trigger. Every counter is checked against counts predicted
  from the logged pulse and trigger times, using the windows above. The
  testbench also counts each mechanism it exercises and fails if any never
  happened.
- `tb_rms_workloads` runs the two conditions the instrument was sized
  for. It uses a 1 MHz clock, and the detector starts at 10⁵ counts/s.
  - Delayed critical: τ = 6.35 ms, 1.9 ms channels, 1000 cycles. Channel 1
    reaches about 164 000 counts, so it needs all six decades. The channel
    totals follow 164, 122, 90 … 11 per cycle.
  - −15 $: τ = 0.4 ms, 100 µs channels, 100 cycles.

  For both, it fits the time constant from channels 1 and 10. The run
  takes about a minute and a half.
- `tb_rms_full_size` runs one complete 10-cycle measurement with every
  parameter at its default (10 MHz clock, 200 µs channels), then scans all
  channels at one step per second. That is about 130 million clocks and
  takes a few minutes.

## How far to trust it

All RTL files pass Verilator lint (`-Wall`) and elaborate in Yosys/slang.
The only lint warnings are for a few unused bits: the top carry of a
counting channel, the scanner's step pulse, and decade outputs that a
preset counter does not need. Synthesis reports no latches, loops or
multiply-driven nets. Every testbench passes.

Each block's testbench has been run against a deliberately broken copy of
that block, and each broken copy made the testbench fail.

The flip-flop sequencing follows the original logic equations and timing
diagram closely. The parts most open to interpretation are these:

- the moment G is cleared (taken here as when A is set);
- the treatment of a one-width delay;
- the scanner's home position and stepping rule.
