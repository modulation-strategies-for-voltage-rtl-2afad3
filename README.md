# FPGA modulators for a two-level inverter and a matrix converter

This RTL drives the gates of two kinds of power converter from an FPGA. A
host PC does the control arithmetic and writes the results over the ISA
bus. The FPGA turns those numbers into IGBT gate pulses that are exactly
timed and safe.

- **VSI modulator.** It drives a two-level three-phase voltage source
  inverter (six IGBTs). The host writes three phase voltage references. The
  modulator adds the common voltage of the chosen method:
  - sinus modulation (SM);
  - space vector modulation (SVM);
  - a "new" method (NewM) that clamps the highest phase to the positive
    rail. That half bridge then does not switch for a third of the output
    period, which cuts switching losses.

  The modulator compares the result with a triangular carrier and inserts
  dead times.
- **Matrix converter (MC) modulator.** It drives a direct 3x3 matrix
  converter: nine bidirectional switches, each made of two IGBTs, 18 gates
  in all. It implements indirect space vector modulation (ISVM). A virtual
  rectifier and a virtual inverter each pick two active vectors per carrier
  period, and their products give the switch pattern. Its hardest part is
  commutation: moving an output phase from one input phase to another must
  neither short two input phases nor cut the inductive load current. Two
  methods are built, and a phase can switch between them:
  - four step voltage commutation, which uses the input voltage polarity;
  - two step current commutation, which uses the output current sign.

The two modulators are independent. Each one sits behind its own ISA
I/O-to-Avalon bridge. `modulator_system` places both side by side, sharing
only `clk` and `reset`.

## Register interface (both modulators)

The bridge (`isa_io2avalon`) decodes an I/O window at `BASE_ADDR`, which
defaults to 0x300. It answers with `iocs16` so that every transfer is 16
bits wide.

- **Addressing.** The host writes register *n* at I/O address
  `base + 2*n`. Inside the modulator the register number is Avalon
  `address[4:1]`.
- **Write timing.** The ISA write strobe is synchronised into the clock
  domain. On its trailing edge the bridge emits a one-clock
  `avalon_write_enable`, 2-3 clocks later, carrying the captured address
  and data.
- **Read timing.** Reads are combinational while `ior` is low.

Each modulator has a control unit (`*_avalon_decoder`). It holds shadow
registers, executes a 4-bit command register (register 0), and reports
status in an interrupt register (register 1). New settings travel to the
working units through an **enable/acknowledge handshake**:

1. The enable rises and stays high.
2. The unit takes the value at a safe moment and answers with a one-clock
   ack.
3. The ack sets the matching "LOADED" status flag.

If the host writes a register while its enable is still high, the write is
refused and a "WRITING ERROR" flag is set. The flag is cleared by ERROR
CONFIRMATION.

| VSI reg | Meaning | MC reg | Meaning |
|---|---|---|---|
| 0 | command (write) | 0 | command |
| 1 | status: SL DTL PVL ML PB PM DE SE PVE ME DTE SM DTO (bits 0..12) | 1 | status: SL DTL TL FS PB PM DE SE TE OO DTE - SM (bits 0..12) |
| 2 | modulation method 0 SM, 1 SVM, 2 NewM | 3 | commutation step n |
| 3 | dead time n (8 bits) | 4, 5 | saw period p, divider d |
| 4, 5 | saw period p, divider d | 6, 7 | driver errors, input-side and output-side IGBTs |
| 6 | driver error flags | 10..14 | times T_IN1, T11, T12, T21, T22 |
| 10..12 | phase references U, V, W (two's complement) | 15 | sector: [7:4] rectifier, [3:0] inverter (1..6) |

**VSI commands:**

| Code | Command |
|---|---|
| 1 / 2 | block / unblock pulses |
| 3 / 4 | programming mode on / off |
| 5 | saw data enable |
| 6 | PWM data enable |
| 7 / 8 | safe mode on / off |
| 9 | error confirmation |
| A / B | dead time on / off |

**MC commands:** codes 1-5 are as for the VSI, then:

| Code | Command |
|---|---|
| 6 | times data enable |
| 7 / 8 | optimized pattern on / off (only in programming mode) |
| 9 | error confirmation |
| A | four step commutation |
| B | two step commutation |
| D / E | safe mode on / off |

**Programming mode** is the state after reset, and pulses are blocked in
it. In this mode:

- the dead time is loaded;
- the MC saw values are loaded;
- the MC pattern type can be changed.

Leaving programming mode restarts the carrier at the bottom of a fresh
period.

**Safe mode.** A captured driver error turns pulse blocking on. After ERROR
CONFIRMATION, the host should wait until the DE status bit has cleared
before it sends UNBLOCK. The error flag is registered and stays set for
about two clocks after the confirmation. An UNBLOCK sent in that window is
overridden by the still-present error.

## Carrier

`saw_generator` counts 0, 1, ..., p, p, p-1, ..., 0 on a clock enable that
comes every d+1 clocks. One period is therefore 2(p+1)(d+1) clocks, so
`f_saw = f_clk / (2(p+1)(d+1))`. `saw_sync` pulses at the start of each
period, and units that load "at the start of a period" load on it:

- the VSI modulator loads saw and PWM values at the period start, or at once
  in programming mode;
- the MC modulator loads times and sectors at the period start;
- the MC saw itself loads only in programming mode (`LOAD_AT_SYNC = 0`).

## VSI datapath

- **`vsi_modulation`.** A two-stage pipeline, so the PWM enable is delayed
  by two clocks. With V_DC = (p+1)/2 saw counts, it computes
  `level = v + v0 + V_DC`, clamped to 0..p+1, where v0 is:
  - 0 for SM;
  - −(max+min)/2 for SVM;
  - V_DC − max for NewM.

  Use an odd p, so that NewM's clamp reaches exactly p+1, where the upper
  IGBT is permanently on.
- **`vsi_pwm_unit`** (three instances, loading in lockstep):
  - `compared = saw < level`;
  - a four-state machine inserts n+1 clocks with both IGBTs off at every
    change, so `T_DT = (n+1)/f_clk`;
  - if `compared` flips back during a dead time, the previous IGBT turns on
    again. A pulse no longer than the dead time is therefore dropped;
  - with dead time generation off, the gates follow `compared` directly.
- **`vsi_pulse_blocking`.** Zeroes all six gates in programming mode or
  pulse blocking, through one register stage.
- **`vsi_error_handling`.** Stores every active-high error line. ERROR
  CONFIRMATION clears the store and raises `error_confirm_out`, which the
  drivers need. That output is held until no error line is active any
  more. `vsi_top` inverts the driver error lines by default
  (`ERRORS_ACTIVE_LOW`).

## MC datapath: pattern generation

The host computes, per carrier period, the sector numbers r (rectifier) and
k (inverter). It also computes five times in saw counts:

- `T_IN1 = d_r1/(d_r1+d_r2) * p`
- `T11 = d_r1*d_i1*p`
- `T12 = d_r1*d_i2*p`
- `T21 = d_r2*d_i1*p`
- `T22 = d_r2*d_i2*p`

`mc_time_adjustment` turns the times into thresholds c1 ≤ ... ≤ c5 on the
ramp 0..p, with P = p+1:

```
standard:             c1 = T11, c2 = T11+T12, c3 = T_IN1, c4 = P-T21-T22, c5 = P-T21
optimized, r+k odd:   c1 = T12, c2 = T12+T11, c3 = T_IN1, c4 = P-T21-T22, c5 = P-T22
```

(c4 and c5 saturate at 0.)

`mc_modulator` splits the saw value into six parts:

- Parts 0-2 use the first rectifier vector (r), parts 3-5 the second
  (r+1).
- Parts 2 and 3 are zero vectors.
- Parts 0, 1, 4 and 5 are active vectors v_k, v_k+1, v_k+1, v_k. With the
  optimized pattern and r+k odd, the order is v_k+1, v_k, v_k, v_k+1.

Because the saw runs up and then down, one carrier period plays the
pattern forwards and then mirrored.

The lookup is computed rather than stored:

- The rectifier vectors are UV, UW, VW, VU, WU, WV: the input phases on the
  positive and negative rail for sectors 1..6.
- The inverter vectors are 100, 110, 010, 011, 001, 101.
- An output whose inverter bit is 1 takes the positive-rail input,
  otherwise the negative-rail input.
- The zero vector is 111 for odd k and 000 for even k. With the optimized
  pattern the choice is made by r instead, which removes switching during
  the zero vector.
- A sector number outside 1..6 gives no reference, and the outputs hold.

The switch references are nine bits, with bit `8 − (3·x + y)`, where x
counts input phases U, V, W and y counts output phases A, B, C. That puts AU
at bit 8 and CW at bit 0, the order of the error registers.

## MC commutation

For each output phase, `mc_commutation` runs a four step and a two step
unit in parallel, both following the same reference. Each step lasts n+1
clocks. A unit accepts a new reference only when it is idle, so references
that arrive during a commutation wait their turn.

- **Four step** (`mc_four_step_commutation`). It commutates from input 1 to
  input 2 using the sign of v12 = v1 − v2, sampled at the start:

  | v12 | Step 1 | Step 2 | Step 3 | Step 4 |
  |---|---|---|---|---|
  | > 0 | SI2 on | SI1 off | SO2 on | SO1 off |
  | ≤ 0 | SO2 on | SO1 off | SI2 on | SI1 off |

  SI is the IGBT that conducts towards the load, SO the one that conducts
  back. The sequence never turns on the pair that would short v1 and v2,
  and it always leaves a path for either current sign. A commutation takes
  4(n+1) clocks.
- **Two step** (`mc_two_step_commutation`). In steady state it keeps on
  only the IGBT that carries the present current sign (both while the sign
  is undecided). With a known sign it goes "new IGBT on, old IGBT off",
  which takes 2(n+1) clocks. If the sign is undecided when a reference
  arrives, the unit raises `force_4step`, and the four step unit carries
  out that commutation.
- **Method selection.** The host's FOUR STEP / TWO STEP choice is taken per
  phase in programming mode. Outside it, the choice is taken only when both
  units are idle and show the same connected input phase, so that changing
  method never moves the output. Gates are zero in programming mode and in
  pulse blocking.

The polarity information comes from `mc_voltage_current_direction`:

- **Voltage polarities.** V_UV, V_VW and V_WU are supplied by the host. Each
  passes a three-sample filter (`sample_filter`: a value is taken after
  three equal samples, and appears four clocks after the change).
- **Current sign** (`mc_current_decoder`, one per output phase). Each IGBT
  has a comparator that reports a voltage drop above the IGBT threshold,
  meaning current flows through it. The comparators of the single connected
  input phase (taken from the actual gates) decide the sign:

  | comp_I, comp_O | Current sign |
  |---|---|
  | 1, 0 | positive |
  | 0, 1 | negative |
  | 0, 0 | undecided |
  | 1, 1 | undecided (detection error) |

  The sign is undecided while two inputs are connected, because the
  decoder cannot tell which one carries the current.

`mc_error_handling` sets an error bit after three consecutive active
samples. Set bits stay until ERROR CONFIRMATION. `mc_top` inverts the
driver error and comparator lines by default (`INPUTS_ACTIVE_LOW`).

## Where this departs from, or adds to, the original description

The register maps, command codes, status bits, the carrier and dead-time
formulas, the common-voltage equations, the ISVM vector tables and the two
commutation principles follow the original. The following are choices of
this design:

- **Pattern thresholds.** The formulas c1..c5 are a reading of the
  switching pattern tables.
- **Four step order.** The exact step order for each voltage sign.
- **Two step steady state.** The single-IGBT steady state of the two step
  method.
- **Method hand-over.** The condition for handing a phase from one
  commutation method to the other.
- **VSI scaling and clamp.** The VSI level offset, its clamp, and treating
  method code 3 as SM.
- **Reset state.** After reset, pulses are blocked, programming mode is on,
  four step commutation is selected, and each MC phase is connected to
  input U.
- **Refused writes.** A write that causes a writing error is dropped, and
  ERROR CONFIRMATION also clears writing errors.
- **VSI error confirmation.** It is sent whatever the error state. The
  original text also says it confirms only when no error is present and
  safe mode is on. Here, `error_confirm_out` is instead held until the
  drivers release their error lines.
- **ISA bridge.** The ISA write strobe is synchronised, not used as a
  clock. The data bus is split into in/out/output-enable, with the
  tri-state pad outside the design.
- **Clock frequency.** None is assumed: all times are in clocks.

Not built, because they are not logic: the host CPU board, the converters
and their drivers, the analog IGBT voltage comparators, and the matrix
converter's input filter and clamp. Their signals are ports of the top.

## Files

- `rtl/*_pkg.sv`: register maps, command codes and the shared Avalon
  request struct.
- `rtl/`: one module per file. `modulator_system` is the top, `vsi_top` and
  `mc_top` are the two modulators.
- `tb/tb_<module>.sv`: a self-checking testbench for every module. Each
  prints `TB_RESULT checks=N failures=M` and stops on a watchdog.
  `tb/mc_pattern_pkg.sv` holds the ISVM switching table used as the
  reference model.
- `tb/tb_modulator_system.sv`: runs the complete system at its default
  parameters. It drives both modulators purely through ISA bus cycles,
  checks every gate against independent models, and counts that each
  mechanism occurred. The counted mechanisms are:
  - programming-mode exits and load waits;
  - dead-time gaps;
  - all three VSI methods;
  - writing errors, error confirmation and safe-mode blocking;
  - four step, two step and forced four step commutations;
  - both MC patterns.
- `tb/tb_vsi_sine_workload.sv`: sine references at M = 0.9, with 240
  carrier periods per output period (12 kHz switching for 50 Hz), for all
  three methods. It checks:
  - every on-time;
  - that line-to-line volt-seconds do not depend on the method;
  - that NewM leaves each leg unswitched for a third of the period and
    saves a third of the switching edges.
- `tb/tb_mc_sine_workload.sv`: the matrix converter on a 50 Hz input at
  three output settings (35 Hz / M_o 1.15 / optimized / four step, 20 Hz /
  1.0 / optimized / two step, 45 Hz / 0.9 / standard / two step). The
  testbench acts as the host and computes the ISVM duty cycles, and an
  ideal-switch load model turns the gates into voltages. The averaged output
  line voltages must follow the intended sine within 3 % of the input
  amplitude.

## Simulating

From the repository root, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/avalon_pkg.sv rtl/vsi_pkg.sv rtl/mc_pkg.sv tb/mc_pattern_pkg.sv \
    tb/tb_modulator_system.sv --top-module tb_modulator_system -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. Verilator has no X
state, so every testbench resets the design before it checks anything.
