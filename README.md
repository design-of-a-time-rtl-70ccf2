# Time-to-voltage converter with an eight-channel analog memory

This converter measures the time between a START pulse and a later STOP pulse.
During that interval it steers a constant current onto a storage capacitor.
The capacitor is precharged to the supply, so the interval ends up stored as a
voltage drop:

    Vout = VDD - (Io / C) * t        Io = 50 uA, C = 1 pF  ->  50 mV per ns

Eight capacitors share one current source, and a select input chooses which
one takes the next measurement. The converter can therefore hold eight
measurements, taken one after another, until the voltages are read out. The
intended use is time-of-flight ranging. A laser pulse leaving gives START and
its reflection coming back gives STOP. Intervals of a few tens of nanoseconds
are the design range.

The converter has two halves:

* **Digital.** The *width generator* turns the two asynchronous pulses into a
  clean pair of complementary pulses, Vright and Vleft. Vright is high for the
  interval and Vleft is low for it. The width generator is synchronised to a
  250 MHz clock. A row of AND gates then routes Vright to the chosen channel.
* **Analog.** A current source and a dump transistor M0 form a differential
  pair with the channel transistors M1..M8. M0 takes the current outside the
  interval. The selected Mn takes it during the interval and discharges its
  capacitor.

The digital half is synthesizable RTL. The analog half is given as a
behavioural model, so the whole converter can be simulated end to end.

```
 start ─┐   ┌──────────────────┐ vright ┌────────────────┐ gate_mn[0..7] ┌─────────────┐
 stop  ─┼──►│ width_generator  ├───────►│ channel_select ├──────────────►│ tvc_channel │x8 ──► vout[0..7]
 clk   ─┤   │ (capture+retime) ├───────►│  (8 AND gates) ├──► gate_m0    │ (Cn, S1, Mn)│
 clr_n ─┘   └──────────────────┘ vleft  └────────────────┘      ▲        └─────────────┘
                                              select[7:0] ───────┘             ▲ precharge
 start/stop/clk/clr_n ──► widthgen_sync (register-transfer form) ──► sync_vleft / sync_vright
```

## The width generator

This is the only part with real design content on the digital side. It is
also the part whose timing needs the most care.

### Structure

Each input goes through two flip-flops. All four flip-flops are cleared by
the active-low `clr_n`.

1. **Capture flip-flop, clocked by `input AND clk`.** It sets the first time
   the input and the clock are high together. This happens in one of two ways:
   * at a rising clock edge that falls inside the pulse;
   * at once, if the pulse rises while the clock is already high.

   So any pulse of at least half a clock period (2 ns) is caught. The gated
   clock can only rise while the input is high, so the flip-flop can only set.
   It then stays set until `clr_n`. In the original circuit its D pin is the
   input itself. Here it is the constant 1, which is the same function and
   keeps the input off a data pin.
2. **Re-timing flip-flop, clocked by `clk`.** It samples the capture
   flip-flop, so each result changes only on a rising clock edge. This is also
   the second synchroniser stage against metastability.

The outputs are gated from the re-timing flip-flops:

    vright = start_s AND NOT stop_s
    vleft  = NOT start_s OR stop_s

Vleft uses an OR gate on the flip-flops' inverted outputs instead of an
inverter after Vright. The two paths then have the same depth, and in silicon
the steering pulses stay aligned.

### Timing

Call `t_cap(x)` the moment input `x` is first high together with `clk`. Then:

* Vright rises on the first rising `clk` edge strictly after `t_cap(start)`.
* Vright falls on the first rising `clk` edge strictly after `t_cap(stop)`.

Every pulse width is a whole number of clock periods (4 ns at 250 MHz). The
capacitor voltage therefore moves in 0.2 V steps. The error against the true
START-to-STOP distance is less than one period. Which of the two neighbouring
values you get depends on the phase of the pulses against the clock.

Example: the clock is high at t = 0 and rises at 4, 8, 12 ns. START rises at
2.1 ns and STOP at 22.1 ns. START is captured at 4 ns and Vright rises at 8 ns.
STOP is captured at 24 ns and Vright falls at 28 ns. The result is a 20 ns
pulse and Vout = 4.0 V.

### Single shot

After STOP both capture flip-flops are set. Further START or STOP pulses
change nothing until `clr_n` is pulsed low. This is deliberate: one clear, one
measurement. The START-to-next-START dead time is whatever the surrounding
system needs to clear and reselect. Pulling `clr_n` low in the middle of an
interval ends the interval at once.

### Register-transfer form (`widthgen_sync`)

There is also a simpler width generator written at register-transfer level. It
has one input register per signal. A state bit is set by the registered START
and cleared by the registered STOP. START has priority when both are
registered on the same edge.

This version differs from the gate-level one in three ways:

* Its pulse is on **vleft**, and vright is the complement. The naming is
  reversed.
* It is not single shot: a new START re-arms it.
* Each input has to be high at a rising edge to be seen.

Its output rises two edges after the edge that first samples START. In
`tvc_top` it sits beside the converter on the same inputs, and its outputs are
brought out as `sync_vleft` and `sync_vright` for comparison. It steers no
channel.

## Channel steering and the analog memory

`channel_select` is one AND gate per channel, `gate_mn[n] = vright & select[n]`,
plus `gate_m0 = vleft` for the dump transistor. In silicon the M0 drive is a
two-inverter buffer. Only one select bit may be high at a time. An assertion in
`channel_select` enforces this, because two channels on together would split
the current.

`tvc_channel` is the behavioural model of one channel. It is written in
event-driven SystemVerilog with `real` voltages and is **not synthesizable**.
It behaves as follows:

* While `precharge` is high, the capacitor is held at VDD (5 V). One precharge
  input serves all eight channels.
* Each gate pulse of length t removes `Io/C * t`. Pulses accumulate if there
  is no precharge between them.
* The voltage never goes below 0 V. Full scale is 100 ns at the nominal values.
* `vout` is updated when the gate pulse ends and holds between pulses. Reading
  it never disturbs it.

A complete operation runs in this order:

1. Pulse `precharge` high. All capacitors go to 5 V.
2. Set `select` to one channel.
3. Pulse `clr_n` low, then release it.
4. Apply START, then STOP.
5. Read that channel's `vout` and move `select` on.

Nothing in this RTL sequences `select` and `precharge`. They are inputs, to be
driven by whatever system uses the converter.

## Where the model and the circuit differ

* **No make-before-break overlap.** In the circuit, gate delays make Vright
  rise slightly before Vleft falls. M1 is therefore on before M0 is off, and
  the current source is never left floating. The overlap adds a small,
  constant offset to every reading. In this zero-delay RTL both edges happen
  at the same instant. The channel model adds no offset, because its size is
  not known.
* **Clock-delay inverters omitted.** The circuit puts two inverters in the
  clock path ahead of each capture AND gate. Here they are wires.
* **Ideal analog part.** The model has no switching transient at the common
  source node, no parasitic capacitance and no charge injection. It also does
  not show the non-linearity for short intervals. The circuit is linear only
  from roughly 17-19 ns up to 33-34 ns. The model is linear from 0 to 100 ns.
* **Resolution.** Because the width generator quantises to the clock, the
  resolution of this converter is one clock period (4 ns at 250 MHz). A
  0.5 ns accuracy, as quoted for this class of converter, needs finer timing
  than a synchronised width generator provides.
* **Clock frequency.** Figures of 40, 100, 200 and 250 MHz are all used for
  this circuit in different places. The eight-channel converter is specified
  at 250 MHz, and the testbenches use that. The RTL itself has no notion of
  frequency.
* **`widthgen_sync` reset.** The register-transfer width generator clears its
  registers on `rst_n` (asynchronous, active low). Its original description
  registers the reset but never uses it.
* **Devices.** The reference netlists use bipolar transistors where the
  description speaks of MOS transistors in saturation. The behavioural model
  does not depend on which.

Not represented at all: the common-centroid layout of the storage capacitors.
It exists to make C1..C8 match. In the model they match exactly.

## Files

| file | contents |
|---|---|
| `rtl/tvc_pkg.sv` | constants: 8 channels, VDD = 5 V, Io = 50 uA, C = 1 pF, 4 ns clock period; `droop_v()` |
| `rtl/width_generator.sv` | gate-level width generator (synthesizable) |
| `rtl/widthgen_sync.sv` | register-transfer width generator (synthesizable) |
| `rtl/channel_select.sv` | per-channel AND gates and M0 drive (synthesizable) |
| `rtl/tvc_channel.sv` | behavioural model of one analog channel (not synthesizable) |
| `rtl/tvc_top.sv` | the eight-channel converter, with `widthgen_sync` beside it |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_tvc_workloads` |

The parameters of `tvc_top` are `N_CHANNELS` (default 8), `VDD_V`, `IO_A` and
`C_F`. Changing `IO_A` trades range against resolution, exactly as changing
the current source would in silicon. The `vout` port is an unpacked array of
`real`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each also has a watchdog. The package has to be compiled first:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/tvc_pkg.sv rtl/*.sv tb/tb_tvc_top.sv --top-module tb_tvc_top -o sim
./obj_dir/sim
```

Substitute the testbench you want. Each runs in well under a second.

* `tb_width_generator` runs 43 START/STOP trials at 250 MHz with random
  sub-nanosecond phases. It checks each Vright edge against the capture rule
  above, computed independently in the testbench. It also checks:
  * Vleft is the complement of Vright on every clock phase;
  * half-period pulses are caught;
  * STOP alone does nothing;
  * a second START is ignored without a clear;
  * a clear ends an interval.
* `tb_widthgen_sync` checks the two-edge latency of the register-transfer
  form, START priority, re-arming and reset.
* `tb_channel_select` checks every legal select value against every
  Vleft/Vright combination. It also checks that complementary drive always
  steers the current to exactly one transistor.
* `tb_tvc_channel` checks the 50 mV/ns slope for fixed widths (including 17,
  25 and 33 ns) and 50 random widths. It also checks holding for 500 ns,
  accumulation of two pulses, the 0 V floor and precharge.
* `tb_tvc_top` is the full converter at default parameters. It precharges all
  eight channels and makes one measurement on each. After every measurement it
  checks all eight voltages, so each channel must keep its value while the
  others are used. It then measures with no channel selected, re-precharges,
  and sweeps 17 to 31 ns across the channels. It counts each mechanism
  (precharge, measurement, hold, single shot, unselected measurement, second
  width generator) and fails if any never happened.
* `tb_tvc_workloads` has two parts:
  * It reproduces the reference width-generator stimulus: clock high at 0,
    clear released at 1 ns, START at 2-8 ns, STOP at 22-28 ns. Both pulses are
    moved 0.1 ns later so they do not coincide with a clock edge. It expects
    Vright from 8 to 28 ns and 4.0 V on channel 1.
  * It sweeps the 17-33 ns range in 0.5 ns steps. It checks every reading
    against the quantised interval and against the measured Vright width.
