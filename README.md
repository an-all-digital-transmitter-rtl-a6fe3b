# All-digital pulsed-UWB transmitter (SystemVerilog)

This is RTL for an impulse-radio ultra-wideband (IR-UWB) transmitter in the
3-5 GHz band, in the style of IEEE 802.15.4a. No mixer, PLL or analog
pulse filter is involved. A burst of 2 ns pulses is built from digital parts only:

- a ring oscillator that is switched on only while a burst is sent;
- a divider made of latches, whose internal phases give the timing of the pulse envelope;
- a bank of tri-state inverter slices, switched on and off in groups to give the envelope four steps;
- a scrambler that flips the carrier phase of each pulse (BPSK).

The two PA outputs idle at opposite rails and are added through coupling
capacitors. The slow turn-on and turn-off transients therefore cancel at the
antenna, while the RF adds.

The architecture follows a published 90 nm transmitter design. Where the
original description leaves a detail open, this implementation makes its own
choice. Those choices are listed under "Departures and limits" below, and
each source file's header comment repeats the ones that concern it.

## What happens in one burst

1. **Start.** A rising edge on `start_tx` sets `tx_en`. This starts the
   DCO, a 3-stage current-starved ring whose first stage is a NAND with the
   enable. It also releases the reset of everything clocked by the DCO.
2. **Pulse clock.** The latch divider divides the DCO down to the pulse
   rate. The channel is chosen by the number of latches in use: 3494.4 MHz
   with 7 latches, 3993.6 MHz with 8 and 4492.8 MHz with 9 all give
   499.2 MHz. One divider period is one 2 ns pulse slot.
3. **Shaping.** In every slot the pulse shaper makes four envelope signals
   S1..S4 from four divider phases. The activation network connects each of
   the 30 inverter slices to one of S1..S4, or to ground. The number of
   slices driving therefore rises and falls in up to four steps within the
   slot.
4. **Phase.** The scrambler picks, per pulse, whether the slices see the
   oscillator or its inverse.
5. **End.** A 5-bit counter counts slots. Pulses are sent while
   `count < n_pulses`. At E/L Count, Pre-Early goes high. At Shut-down
   Count, `shutdown` is asserted, and the next DCO edge ends the burst:
   `tx_en` falls, the DCO stops, and every DCO-domain block returns to
   reset.

   `tx_en` is the XOR of two toggle flops: one toggled by the Start-TX edge
   while idle, one clocked by the DCO that catches up at the end of the
   burst. Each flop therefore has only the chip reset as an asynchronous
   control.
6. **Early/late.** The falling edge of `start_tx` stores Pre-Early in
   `early_late`. A 1 means the DCO reached E/L Count before the reference
   edge, so it is too fast.

All logic after the DCO runs in the DCO clock domain. The divider provides
a one-cycle strobe, `tick`, in the last DCO cycle of each slot, and that
strobe serves as the pulse-rate enable. There is no separately routed
divided clock.

## The latch divider and its uneven phases

This is the least conventional block (`htl_divider`). In the original
circuit, fourteen half-transparent latches form a chain. Any latch can be
bypassed, and a pre-charge unit closes the chain. At the start of each
divide cycle the pre-charge unit sets every latch high and launches a
falling edge. The edge advances one enabled latch per DCO cycle. When it
reaches the end, the pre-charge unit starts the next cycle.

With N latches enabled, the period is N DCO cycles. The k-th enabled latch
stays high for k of the N cycles. Its output is therefore a phase with duty
cycle k/N rather than 50%. The shaper relies on this.

The RTL models this cycle by cycle:

- `q[i]` is the latch state.
- A bypassed latch passes the edge straight through within the same cycle.
- `tick` is high in the cycle where the edge would leave the last enabled
  latch.
- In that cycle every latch is set again.

`phase[i]` is the output seen at latch i. For a bypassed latch, it is the
output of the enabled latch before it.

Example, divide by 8 (latches 0-7 enabled, the default): phase 1 is high for
2 of 8 cycles, phase 2 for 3, phase 4 for 5 and phase 5 for 6.

## Four-level pulse shaping

`pulse_shaper` selects four phases Φ1..Φ4 by latch index
(`phi_sel`). It forms two signals:

- wide = Φ1 xor Φ4
- narrow = Φ2 xor Φ3

With the default phases, wide is high in cycles 2-5 of the slot and narrow
in cycles 3-4. Each signal then passes through a one-tap FIR: the signal
itself and a copy delayed by `fir_delay` DCO cycles (0-7). This gives:

| signal | content |
|---|---|
| S1 | wide |
| S2 | wide, delayed |
| S3 | narrow |
| S4 | narrow, delayed |

Each inverter slice follows the signal it is assigned to. The envelope at
the combining node is then the sum of the slice counts of the signals that
are high at that moment. With the default assignment (6, 6, 9 and 9 slices
on S1..S4, both PAs on), the envelope steps through 12, 42 and 60 active
inverters over a slot. Gain is reduced by grounding slices.

The shaper's `busy` output stays high while a signal is still inside a delay
line. The pre-charge and pre-discharge devices stay off until it falls.

## PAs and common-mode cancellation

Behavioural model: `dual_pa`; control logic: `pa_drive_network`.

Each PA is 30 tri-state inverters driving one node: A for the top PA and B
for the bottom PA. Both nodes couple to the output node C through a 2 pF
capacitor each. Between pulses the slices are tri-stated. A pre-charge
device then holds A at VDD and a pre-discharge device holds B at ground.
Because the two nodes start at opposite rails and are driven by identical
slices, their slow drift during a burst is equal and opposite at C. The RF
component, which is in phase on both nodes, adds.

The control logic keeps both devices off whenever any shaping signal is
active, so they never fight an active slice. The model asserts this.
For testing, each node's idle level can be programmed (`cm_a_high`,
`cm_b_high`), and each PA can be switched off (`pa_en`).

`dual_pa` reports the drive at each node as counts of inverters pulling up
or down. Node C is given as a signed sum, where positive means pulling
towards VDD while the oscillator is high. Capacitor charge and the antenna
are not modelled.

## Frequency calibration by early/late detection

The DCO has no reference of its own. Calibration (`fll_sar`, clocked by the
31.2 MHz reference) sends Start-TX symbols at 15.6 MHz: one reference cycle
high, one low. It binary-searches the 10-bit tuning code on the early/late
result:

- start at 512;
- for each bit from the MSB down, clear the bit if the DCO was early, then
  try the next lower bit;
- finish after ten decisions, i.e. 20 reference cycles (0.64 µs).

The result is the fastest code whose Pre-Early arrives after Start-TX falls.
That is within one code (about 5 MHz) of the target. In simulation the
three channels settle at 3508.0, 4008.4 and 4508.8 MHz.

Shut-down Count has to leave room for the decision. At divide by 7 a
20-slot burst ends after about 31.5 ns, before the 32 ns reference edge,
and every decision would read late. The test uses 24 there.

With E/L Count 16 and 499.2 MHz slots, Pre-Early would ideally coincide with
the 32 ns Start-TX high time. The model's oscillator needs about one slot
to start, so the end-to-end test uses E/L Count 15. During calibration the
internal Start-TX is taken from `fll_sar` instead of the `start_tx` pin.

The linear code maps onto the oscillator's controls (`tune_to_dco`) as
follows:

- Three thermometer capacitors select one of four regions of 192 codes each.
- Within a region, the fine value v = 3·strength + extra1 + extra2 runs
  from 0 to 191.
- strength is the 6-bit DAC value shared by all three stages.
- extra1 and extra2 raise the second and third stage by one step each.

## Scrambler

`lfsr_scrambler` is a 15-bit LFSR with g(D) = 1 + D^14 + D^15. That is,
s[n] = s[n-14] xor s[n-15]. The default start state is s0 = s1 = 0 and
s2..s14 = 1. A run-length limiter follows it. With a limit L of 3, 4 or 5,
any bit that would make a run of L+1 equal outputs is inverted. The result
is registered, so the first pulse after a reload always has phase bit 0.

The register advances once per transmitted pulse, and its state carries
over from burst to burst. It is reloaded on reset and after every
configuration load. The load request crosses from the `sclk` domain by a
toggle, and takes effect on the first DCO edge of the next burst.

## Configuration register

`cfg_shift_reg` is a 159-bit shift register (`sclk`, `sdi`, `sdo`). A shadow
copy drives the design. Raising `sload` during the last shift copies the
shifted word, including that last bit, into the shadow. Reset loads the
defaults into both. Bit 0 is shifted in first. The layout is
`uwb_tx_pkg::tx_cfg_t`:

| bits | field | default |
|---|---|---|
| 13:0 | `div_bypass`, 1 = latch bypassed | latches 0-7 used (÷8) |
| 29:14 | `phi_sel[3:0]`, 4-bit latch index for Φ1..Φ4 | 1, 2, 4, 5 |
| 32:30 | `fir_delay`, DCO cycles | 1 |
| 122:33 | `pa_sel[29:0]`, 3 bits per slice: 0 off, 1-4 = S1-S4 | 6×S1, 6×S2, 9×S3, 9×S4 |
| 124:123 | `pa_en`: [1] PA on node A, [0] PA on node B | both |
| 125 | `cm_a_high`, node A idle level | 1 |
| 126 | `cm_b_high`, node B idle level | 0 |
| 131:127 | `n_pulses`, pulses per burst | 16 |
| 136:132 | `el_count`, E/L Count | 16 |
| 141:137 | `shutdown_count`, Shut-down Count | 20 |
| 156:142 | `lfsr_init`, s14..s0 | s0 = s1 = 0, rest 1 |
| 158:157 | `rll_mode`: off, 3, 4, 5 | off |

Shut-down Count must be at least E/L Count. Start-TX must fall before
Shut-down Count is reached. Otherwise Pre-Early has already been cleared and
the result reads as late.

## Files

| file | contents |
|---|---|
| `rtl/uwb_tx_pkg.sv` | sizes, configuration layout and defaults, code mapping |
| `rtl/uwb_tx_top.sv` | the transmitter |
| `rtl/cfg_shift_reg.sv` | serial configuration |
| `rtl/fll_sar.sv` | successive-approximation calibration |
| `rtl/dco.sv` | ring oscillator, behavioural model |
| `rtl/htl_divider.sv` | latch divider |
| `rtl/burst_counter.sv` | enable, pulse counter, Pre-Early, Shut-down, Early/Late |
| `rtl/lfsr_scrambler.sv` | LFSR and run-length limiter |
| `rtl/pulse_shaper.sv` | XOR pairs and one-tap FIRs |
| `rtl/pa_drive_network.sv` | 30 activation multiplexers, pre-charge/discharge control |
| `rtl/dual_pa.sv` | the two PAs and the combining node, behavioural model |
| `tb/tb_<module>.sv` | self-checking testbench per module |

`dco` and `dual_pa` stand for analog circuits and use delays or abstract
counts. The rest is synthesizable. A synthesis tool reports one
combinational loop, the ring oscillator inside `dco`, which is intended.

## Simulating

Every file sets `timeunit 1ps; timeprecision 1fs`. Any testbench runs with
plain Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl rtl/uwb_tx_pkg.sv rtl/*.sv \
    tb/tb_uwb_tx_top.sv --top-module tb_uwb_tx_top -Mdir obj -o sim
./obj/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. It has
a watchdog. Variables start at random values in a two-state simulator, so
the testbenches drive reset low explicitly.

The end-to-end test `tb_uwb_tx_top` runs the top at its defaults. Its
scenario:

1. programs the configuration serially;
2. calibrates the DCO on each of the three channels (divide by 7, 8 and 9),
   checking the code against a search over the model's frequency law and
   the measured frequency against 3494.4, 3993.6 or 4492.8 MHz ±1%;
3. sends bursts at divide ratios 7, 8 and 9, with 1, 5 and 16 pulses, and
   bursts 10 µs apart (100 kHz symbol rate);
4. repeats with RLL 3, with 12 slices, with one PA, and with both nodes
   idling high.

For every pulse it checks the following against values computed from the
configuration alone:

- pulse and slot counts, and DCO cycles per slot;
- the BPSK sign;
- that every envelope level is a sum of slice weights;
- the idle common-mode levels.

It also counts each mechanism (early and late decisions, shut-down, RLL
inversions, four-level pulses, the three divide ratios) and fails if any
never occurs.

## Departures and limits

- **One clock domain.** The divider's strobe replaces a separate divided
  clock net. The divider is modelled at cycle level, with its reset at the
  end of each divide cycle made synchronous. The asynchronous latch
  behaviour of the silicon is not reproduced.
- **FIR delays.** These are whole DCO cycles (0-7), not chains of inverter
  buffers.
- **Calibration on chip.** The calibration loop is built into the design.
  The original ran it in test equipment, converging in 12 steps; this one
  takes 10, one per bit of the 10-bit code.
- **Shared activation bus.** Both PAs take their activations from one
  30-line bus, with a per-PA enable. Per-PA slice programming is not built.
- **Pulse count field.** The number of pulses per burst (`n_pulses`) is
  compared on the same 5-bit counter. How the original programs it is not
  detailed.
- **Oscillator law.** The frequency law is a straight line from 2.2 to
  6.0 GHz over 768 codes, with a 2 ns start-up. Real silicon is non-linear
  and slower to start, so calibration results in simulation are only
  indicative.
- **PA model.** The PA output is a count of active slices. No waveform,
  spectrum or power figure can be taken from it.
- **Not built.** The coupling capacitors and antenna are passive parts. The
  test equipment that generates Start-TX and programs the chip is outside
  the design; its signals are ports.
