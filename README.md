# Bunch-by-bunch transverse feedback processor

A transverse damper keeps the bunches of a circular hadron collider from
oscillating sideways. Every bunch passes two beam position pick-ups on every
turn. The beam position front-ends turn each passage into one signed 16-bit
position word per bunch slot, at the bunch clock of 40.08 MHz. The processor in
this repository turns those words into the drive signal of a kicker. It does so
in such a way that each bunch, one turn later, receives a kick that opposes its
own betatron oscillation. That means a kick of the right size, the right
betatron phase and the right timing.

The SystemVerilog here implements the FPGA part of such a processor card:

- the resynchronisation of the two pick-up links;
- the 40.08 MHz bunch-by-bunch processing;
- the handover to an 80.16 MHz clock whose phase sets the fine timing;
- the 80.16 MHz filters that shape the amplifier drive;
- the excitation generator;
- the diagnostic recorders and the parameter registers.

The top module is `dspu_top`.

## Signal path

```
 link 1 ─ bunch_sync ─ gain_balance(a1) ─ notch_filter ─ phase_shifter ─┐ (pick-up on/off)
                                                                         ├─ pickup_mixer(b1,b2) ─ turn_delay(delay)
 link 2 ─ bunch_sync ─ gain_balance(a2) ─ notch_filter ─ phase_shifter ─┘
        ─ bunch_sign(±1 per bunch, loop on/off)                              [clk40, 40.08 MHz]
        ─ fine_delay_cdc ─ interpolator(×2) ─ perturbation_gen(+excitation)
        ─ fir_filter(32-tap phase compensation) ─ gain_equalizer(sets) ─ fir_lowpass ─ dac_interface ─ 14-bit DAC
                                                                             [clk80d, delayed 80.16 MHz]
 observation_memory, postmortem_memory: 8 channels from the clk40 part → two external SRAM banks
 dspu_regs: all settings, tables and coefficients, behind a 16-bit register bus
```

The stages of one pick-up do the following:

- **bunch_sync** aligns the link to the common revolution marker.
- **gain_balance** multiplies by a factor `a` between 0 and 2 (unsigned 1.15). This
  normalises the pick-up signal to the square root of the beta function at
  that pick-up.
- **notch_filter** removes the closed orbit. The closed orbit is the part of
  a bunch's position that is the same on every turn.
- **phase_shifter** is an optional 3-turn FIR. It turns the betatron phase of
  the pick-up signal.

`pickup_mixer` then forms `b1*x1 + b2*x2`. The mixing coefficients come from an
external phase function and set the phase of the kick. An ideal pair satisfies
`b1² + b2² + 2·b1·b2·cos Δφ = 1`, where Δφ is the phase advance between the two
pick-ups.

For pick-ups at betatron phases φ1 and φ2 (Δφ = φ2 − φ1), a kicker at phase
φk and a fractional tune Qf, the coefficients that give the damping phase are:

```
b1,2 = -1/2 · ( cos D / cos(Δφ/2)  ∓  sin D / sin(Δφ/2) )
D    = 3π·Qf + φk − (φ1 + φ2)/2
```

The 3π·Qf term holds two parts. The one-turn delay contributes 2π·Qf. The
closed-orbit notch contributes the rest (π·Qf), because its one-turn
difference shifts the betatron phase by half a turn's advance. So these values
assume the notch is on. The closed-loop test below damps with exactly these
coefficients.

With the 3-turn filters doing the phase adjustment, the loop can run on one
pick-up alone: switch the other one off with its pick-up switch. It can also
add both pick-ups (`b1 = b2 = 1`) to improve the signal-to-noise ratio.

`turn_delay` adds the delay, in whole bunch periods, that makes pick-up to
kicker last exactly one turn plus the bunch's time of flight. `bunch_sign` can
turn the kick of chosen bunches into anti-damping. That is used to excite them
deliberately.

## One-turn memories: how bunch identity is kept

Much of the chain works on "the same bunch, one or more turns ago". The
hardware gets this by indexing memories with the **bunch number** instead of
with time:

- `bunch_sync` counts bunch slots on each link from that link's own marker.
  The marker is a flag on the word of bunch 1. Each word is written at its
  slot number.
- The memory is read in the clk40 domain. The read counter restarts at the
  common revolution marker `frev`. Both pick-ups therefore come out with the
  same bunch number on the `bunch` output, whatever their link latency. An
  assertion in `dspu_top` checks that the two sync stages agree.
- The bunch number then travels along the pipeline in the shift register
  `bpipe`, in step with the samples.
- `notch_filter` stores each sample at its bunch number and reads, in the same
  place, the sample of the previous turn. This gives `y = (x[n] − x[n−T]) / 2`,
  with T one turn. The halving keeps the result within 16 bits.
- `phase_shifter` keeps two such memories, one and two turns back. It forms
  `c0·x[n] + c1·x[n−T] + c2·x[n−2T]`.
- `bunch_sign` looks up a one-bit table at the number of the bunch the sample
  was measured on. To keep that number, `dspu_top` sends the bunch number
  through a second `turn_delay` with the same delay as the signal. When the
  delay function makes the loop last exactly one turn, this is also the bunch
  that receives the kick.

The turn length is never a parameter of these filters. It is whatever the
revolution marker makes it, up to the memory depth `DEPTH = 4096`. That depth
covers the 3564 bunch slots of one LHC turn. `bunch_sync` wraps its counters at
`TURN = 3564` if a marker is missing.

Whether a word is read out in the turn it arrived or one turn later depends on
where the two markers fall relative to each other. That difference is constant
and is taken up by the delay function.

## Two clock domains and the fine delay

The delay function sets the loop timing in steps of 25 ns. Finer timing (the
card is specified for 10 ps) comes from outside the FPGA. A programmable delay
line shifts the 80.16 MHz clock, and everything after the sign stage runs on
that delayed clock, `clk80d`. The two clocks share a source, so their phase
difference is unknown but fixed.

`fine_delay_cdc` performs the handover:

1. The clk40 side writes each sample alternately into one of two holding
   registers and flips a toggle bit.
2. The clk80d side passes the toggle through two flip-flops.
3. On a change, it copies the register written last. That register then stays
   untouched for two bunch periods.

A `dvalid` pulse marks each new sample, every second clk80d cycle. Its latency
is 2 to 3 clk80d cycles after the clk40 edge.

`interpolator` then doubles the rate. For each new sample `x[k]` it outputs the
midpoint `(x[k−1] + x[k]) / 2` and then `x[k]`.

## 80 MHz shaping and the DAC

- `perturbation_gen` holds two banks of 4096 × 16-bit excitation records. It
  adds the selected record to the signal.
  - At the full rate, each entry lasts one bunch period.
  - With `pert_rate = k`, an entry lasts 2^k bunch periods. The output is then
    interpolated linearly between entries, so a slow record stays smooth.
  - Playing loops over addresses 0 to `pert_len`. A restart command or the
    `pert_trig` input starts it again from address 0.
- `fir_filter` is the 32-tap direct-form phase-compensation filter. The power
  amplifier's low-pass response turns the phase by up to −90° over the band.
  The taps are chosen so that amplifier plus filter have a constant group
  delay. The taps are loaded at run time; after reset the filter is a
  pass-through.
- `gain_equalizer` is a 16-tap FIR with three coefficient sets. The timing
  input `geq_sel` chooses the set on every clock, so the gain-versus-frequency
  shape can differ between, for example, injection damping and instability
  control.
- `fir_lowpass` is a 15-tap symmetric, linear-phase low-pass. It sets the
  roll-off above about 20 MHz. The symmetry lets it store only 8 taps and
  pre-add pairs of samples. After reset it is a pure delay of 7 samples.
- `dac_interface` rounds to 14 bits, saturates and outputs offset binary
  (8192 = zero). The overall loop gain is not applied in logic. The gain
  function leaves on `dac_gain_ref` for the DAC's reference circuit.

## Diagnostics

Eight channels are recorded at the bunch clock:

| Channel | Signal |
|---|---|
| 0 | pick-up 1 after sync |
| 1 | pick-up 2 after sync |
| 2 | turn-delay output (the loop output before the sign stage) |
| 3 | mixer output |
| 4 | sign-stage output |
| 5–7 | spare, recorded as zero |

Each recorder writes one bank of four external 36-bit synchronous SRAM chips
(256k × 36). Every chip holds two channels, so one address stores one complete
sample of all eight channels. The shared engine is `circ_recorder`.

- **`observation_memory`** records circularly into 2^18 samples.
  - The rate is 40.08 MHz / 2^k, with k from 0 to 15. That spans 6.5 ms of
    record at full rate down to 214 s at 1.223 kHz.
  - Before decimation, each channel is averaged over the 2^k samples it
    replaces.
  - A hardware trigger or a software trigger stops it.
- **`postmortem_memory`** always records at full rate. Only the machine-wide
  post-mortem trigger stops it.

In both, `arm` restarts recording. After a stop, `last_addr` holds the newest
sample. Any address can then be read back over the register bus.

The top parameter `MEM_AW` (default 18) sets the depth of both recorders.
Set it to 19 for 512k × 36 chips, which the board can take instead. The
readback address-high register has room for up to 20 address bits.

## Registers and external inputs

`dspu_regs` uses a synchronous bus in the clk40 domain:

- `bus_wr` and `bus_rd` are one-clock strobes.
- Addresses and data are 16 bits.
- Read data is valid the clock after `bus_rd`.

The register map is in the header of `rtl/dspu_regs.sv`. In short:

| Address | Contents |
|---|---|
| `0x0000` | enables: notch, 3-turn filter, pick-up, loop, perturbation, perturbation bank |
| `0x0001`–`0x0002` | gain factors a1, a2 |
| `0x0003`–`0x0008` | 3-turn filter taps |
| `0x0009`–`0x000B` | observation rate; perturbation rate and length |
| `0x000C` | command pulses |
| `0x000D` | status |
| `0x0010`–`0x001C` | readback of the two recorders |
| `0x01xx`, `0x02xx`, `0x03xx` | taps of the three 80 MHz filters |
| `0x1000`+bunch | per-bunch sign |
| `0x2000`+bank·4096+address | perturbation memory |

Writes for the 80 MHz domain are handed over with a toggle handshake. Leave at
least 4 clk40 cycles between two such writes. The assertion `a_w80_gap` flags
a violation in simulation.

After reset, the block spends 4096 clocks clearing the sign table.

The four continuously changing machine functions arrive as parallel ports:

- `func_b1` and `func_b2`, the mixing coefficients;
- `func_delay`, the delay;
- `func_gain`, the loop gain.

On the card these functions arrive serially encoded on the backplane. That
receiver is not part of this RTL.

Number formats:

| Quantity | Format |
|---|---|
| samples | signed 16-bit |
| a1, a2 | unsigned 1.15 |
| b1, b2 | signed 3.13 (±4, because ideal coefficients can exceed 1) |
| all FIR and 3-turn taps | signed 2.14 |

Every multiplying stage, the perturbation adder and the DAC scaling round to
nearest and saturate. An overflow therefore clips instead of reversing the
kick. The halvings in the notch and the interpolator cannot overflow. They
shift right and so round toward minus infinity.

## Latency

| Section | Latency |
|---|---|
| sync output → mixer output | 7 clk40 |
| turn_delay | delay + 1 clk40 |
| bunch_sign | 2 clk40 |
| fine_delay_cdc | 2–3 clk80d |
| interpolator | 1–2 clk80d |
| perturbation adder | 1 clk80d |
| fir_filter, gain_equalizer | 2 clk80d each |
| fir_lowpass | 2 clk80d + 7 samples of group delay |
| dac_interface | 1 clk80d |

The delay function must absorb all of this, the cable and electronics delay,
and the bunch's flight time, so that the total comes to one turn. In the
closed-loop test, the loop takes 1041 bunch periods at delay 1. Of these,
1017 are the offset between the link markers and the common revolution
marker. A delay of 2524 then closes the turn.

## What is this design's own choice

The chain, its order, the clock domains, the memory sizes (4096 × 16
excitation banks, 2^18 × 8 channels, 32 phase taps, 3-turn filters), the rates
and the triggers follow the published description of the card.

The following are choices made here where that description gives only the
function:

- the one-turn comb as the closed-orbit notch;
- linear interpolation, both in the 40 → 80 MHz interpolator and for slow
  excitation records;
- boxcar averaging as the decimation filter;
- the equaliser's 16 taps and 3 sets;
- the low-pass with 15 symmetric taps;
- all number formats;
- offset-binary DAC code;
- the revolution marker as a flag that comes with the word of bunch 1;
- the reading of the diagram's switches. The switch after each phase shifter
  is the pick-up on/off. The switch after the sign multiplier is the loop
  on/off.
- carrying each sample's bunch number through a second turn delay, so the
  sign table is looked up with the bunch the sample belongs to;
- running the interpolator and the perturbation adder on the delayed 80 MHz
  clock. The card's block diagram draws them just before the 80 MHz domain
  box, but their output rate is 80.16 MHz.
- which signals fill the recorded channels. The description names two inputs,
  the output, two intermediate signals and three spares.
- the register map and bus;
- the SRAM read latency of two clocks.

No coefficient values are built in. The phase-compensation taps depend on the
amplifier and must be loaded, as must the low-pass and equaliser taps and the
mixing and 3-turn coefficients.

Known limitations:

- Settings read in the clk80d domain are taken across unsynchronised and must
  be static while the beam is present. These are the perturbation
  enable/bank/rate/length and `geq_sel`.
- `fir_lowpass` draws a constant-comparison lint warning at the default size,
  from its generic address range check.

## Not in this RTL

These parts lie outside the FPGA logic and appear as ports of `dspu_top`:

- the gigabit transceivers (their 16-bit words, word clocks and marker flags
  are the `rx1_*`/`rx2_*` inputs);
- the external delay line (its clock is `clk80d`);
- the 14-bit DAC and its gain reference (`dac_data`, `dac_gain_ref`);
- the SRAM chips (`obs_sram_*`, `pm_sram_*`);
- the VME slave (the `bus_*` register bus stands in for it);
- the serial function receivers (the `func_*` inputs).

A third link channel of the card, reserved for extensions, is not used.

## Files

- `rtl/dspu_pkg.sv`: the sample type, the `dspu_cfg_t` settings struct, and
  the rounding and saturation helpers.
- `rtl/<block>.sv`: one module per block, as named above, plus
  `circ_recorder` and `reset_sync`.
- `tb/tb_<block>.sv`: one self-checking testbench per block.
- `tb/tb_damping_loop.sv`: the closed-loop test with a beam model.
- `tb/sram_model.sv`: a behavioural SRAM bank used by the recorder and top
  testbenches.

## Simulating

Each testbench runs with plain Verilator 5. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_dspu_top -Irtl -y rtl -y tb +libext+.sv \
  rtl/dspu_pkg.sv tb/tb_dspu_top.sv
obj_dir/Vtb_dspu_top
```

Any other testbench runs the same way with its name in place of
`tb_dspu_top`.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

The block testbenches compare against values they compute themselves, and
several shrink the turn or the buffer depth to stay short. They cover:

- bunch alignment across phase-shifted link clocks;
- rounding and saturation corners;
- one- and two-turn histories;
- delay settings up to 4095;
- clock-domain handover at five clock phases, including its latency window;
- interpolated excitation;
- coefficient-set switching;
- the full DAC code range;
- decimating, stopping and reading back both recorders;
- the register map.

`tb_dspu_top` runs the whole design at its default sizes, with the real turn
length, two SRAM banks and four clocks. Its main check uses the pick-ups
sending a running count. Then every DAC code must be exactly one more than the
code before it. A setting change must move the offset between code and time
by the amount worked out from the setting:

| Setting change | Offset change |
|---|---|
| delay +10 | −20 |
| 3-turn filter set to "previous turn" | −7128 |
| pick-up 2 alone | +200 |
| both pick-ups at half weight | +100 |

It then checks fixed DAC levels for:

- gain balance;
- the notch removing a constant orbit;
- exactly one negated bunch per turn;
- loop off;
- the excitation record;
- each loaded FIR;
- saturation.

It also triggers and reads back both recorders over the bus. At the end, the
testbench counts each of these mechanisms and fails if any of them never
happened. It takes a few seconds.

`tb_damping_loop` closes the loop through a beam model and checks that the
design does its actual job. In the model:

- each of the 3564 bunches rotates in betatron phase space by a tune of 0.31
  per turn;
- pick-up 1 measures position, and pick-up 2 sits 90° further on;
- the kicker is at pick-up 1 and uses the DAC sample that is present while
  the bunch passes.

The test runs in three steps:

1. It measures the loop latency with a single-bunch impulse. It then sets the
   delay function so that the loop takes exactly one turn.
2. It checks that the impulse comes back on the same bunch, and negated once
   that bunch is marked in the sign table.
3. It runs 40 turns with every bunch oscillating. The notch is on, and each
   pick-up also carries a constant closed-orbit offset. The mixing
   coefficients come from the formula given under "Signal path" (b1 = 0.976,
   b2 = −0.218).

The damped bunches must fall below 35% of their start amplitude, and the one
bunch marked for anti-damping must grow. Every bunch must stay within 10 LSB
of an ideal floating-point model of the same loop. In the recorded run:

- the damped bunches fell from 2000 to at most 382;
- the marked bunch grew to about 10000;
- every bunch stayed within 2 LSB of the ideal model.
