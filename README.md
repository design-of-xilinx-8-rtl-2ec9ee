# Five-level PWM generator for a single-phase multilevel inverter

A conventional full-bridge inverter can only put +Vdc, 0 or −Vdc across its
load. This inverter adds two switches (S5, S6) and four diodes that reach the
midpoint of a split DC bus, so the load can also see +Vdc/2 and −Vdc/2. Five
output levels approximate a sine much better than three, which lowers the
harmonic content before any filtering.

The SystemVerilog here is the digital half of that system: the FPGA logic that
turns a 4 MHz clock and two front-panel settings into the six gate pulses
S1..S6. A behavioural model of the power bridge is included so that the gate
pulses can be checked as load voltages. It follows the published description
of a Spartan-II based prototype. That description names the blocks and gives
the main numbers but not their insides, so many details are choices made here.
They are listed in [Where this RTL makes its own choices](#where-this-rtl-makes-its-own-choices).

## How five levels come out of two comparators

The modulation is level-shifted carrier PWM on a rectified sine:

```
 2Ac  /\/\/\/\/\/\/\/\     upper carrier  = lower + Ac
  Ac  \/\/\/\/\/\/\/\/     lower carrier  0..Ac (up/down counter)
   0  /\/\/\/\/\/\/\/\
      reference = 2*Ac*Ma*|sin(wt)|, one hump per half cycle
```

* The reference is the *magnitude* of the sine. A separate half-cycle flag
  gives the sign.
* Comparator 1 asks "reference > upper carrier?" and comparator 2 asks
  "reference > lower carrier?". The number of carriers the reference is
  above (0, 1 or 2) is the level's magnitude in units of Vdc/2.
* The modulation index is Ma = Am / (2·Ac), where Am is the reference peak.
  If Ma ≤ 0.5, the reference never rises above Ac. It then never beats the
  upper carrier, and the output has three levels (0, ±Vdc/2). If Ma > 0.5,
  the top of each hump crosses into the upper band and all five levels appear.

This gives four operating modes per fundamental cycle. The `op_mode` output
reports them:

| mode | half cycle | reference  | output switches between |
|------|------------|------------|-------------------------|
| 1    | positive   | above Ac   | +Vdc/2 and +Vdc         |
| 2    | positive   | at/below Ac| 0 and +Vdc/2            |
| 3    | negative   | at/below Ac| 0 and −Vdc/2            |
| 4    | negative   | above Ac   | −Vdc/2 and −Vdc         |

If Ma ≤ 0.5, only modes 2 and 3 occur.

## The switch table

Every level is made by turning on exactly two of the six switches. The
mapping lives in one function, `mlpwm_pkg::level_to_gates`:

| level    | switches on | Va     | Vb     |
|----------|-------------|--------|--------|
| +Vdc     | S4, S1      | Vdc    | 0      |
| +Vdc/2   | S4, S6      | Vdc/2  | 0      |
| 0 (pos.) | S4, S3      | 0      | 0      |
| 0 (neg.) | S2, S1      | Vdc/2  | Vdc/2  |
| −Vdc/2   | S2, S3      | 0      | Vdc/2  |
| −Vdc     | S2, S5      | 0      | Vdc    |

Which zero pattern is used depends on the half cycle. So S4 stays on for the
whole positive half cycle and S2 for the whole negative half cycle, and only
the second switch of each pair is pulse-width modulated.

**Caution: the last two rows.** They follow the published switch table. The
published scope traces of the gate signals at Ma = 0.4 look different: in
the half cycle where S2 is on, they show S1 and S5 switching. That fits
−Vdc/2 = S2,S5 and −Vdc = S2,S3, i.e. those two rows swapped. The Va/Vb
column for the negative-half zero state (both Vdc/2) is also copied as
published. Before driving real hardware, check these rows against your
bridge's wiring. To swap them, edit the two case items in `level_to_gates`
and the matching rows in `bridge_model`. Also update `expected_gates` in
`tb/mlpwm_ref_pkg.sv` and the patterns in `tb/bridge_model_tb.sv`.

There is **no dead time**. Consecutive gate patterns change on one clock edge,
and a change can turn one switch off and another on together (e.g. S6→S1).
Any real build needs dead-time insertion, either here or in the gate driver.

## Rates and timing

Everything runs on the single 4 MHz clock. `clock_divider` produces a
one-clock enable every 50 clocks, i.e. an 80 kHz step. Each step does two
things at once:

* it moves the sine to its next sample, and
* it moves the 5-bit up/down counter one count.

| quantity                   | value at defaults                        |
|----------------------------|------------------------------------------|
| step rate                  | 4 MHz / 50 = 80 kHz                      |
| Ac (carrier peak)          | 2^5 − 1 = 31; upper carrier 31..62       |
| carrier period             | 2·31 = 62 steps → 1.29 kHz               |
| sine samples per cycle     | 500 / 1000 / 1500 (mode 1 / 2 / 3)      |
| fundamental                | 160 / 80 / 53.3 Hz                       |
| frequency modulation index | ≈ 24 in mode 3                           |
| latency, step → gates      | 3 clocks (750 ns)                        |

The 4 MHz clock, the divide-by-50 and the 500/1000/1500 sample counts are the
published numbers. Taken together they give 53.3 Hz at 1500 samples, not the
50 Hz of the published measurements. They were kept rather than retuned.
The fundamental is 4 MHz / (`PRESCALE` × samples), so 50 Hz needs a product
of 80,000. For example, `PRESCALE` = 80 with mode 2 (1000 samples) gives
exactly 50 Hz, and so does `SAMPLE_BASE` = 800 with mode 2 at the default
prescaler.

The carrier counter sweeps 0→31→0. One carrier period is therefore 2(2^n − 1)
steps: a full up-and-down sweep.

## Front-panel controls

| input        | width | meaning                                                    |
|--------------|-------|------------------------------------------------------------|
| `readmodind` | 4     | modulation-index switch: Ma = value/10, values > 10 act as 10 |
| `mode`       | 2     | 0 = all gates off; 1, 2, 3 = 500, 1000, 1500 samples/cycle |
| `hardrst`    | 1     | synchronous, active-high reset                             |

Both encodings are choices made here. The original only says that a 4-pin
switch sets the pulse width and that a mode input is present. With /10, the
switch values 4 and 8 give the published Ma = 0.4 and 0.8 directly.

A change of `mode` in the middle of a cycle takes effect at once. The phase
then restarts at zero instead of wrapping, so the next cycle still begins at
the zero crossing.

## Block structure

```
five_level_inverter           top: generator + bridge model
 ├─ mpw_modulator             the FPGA PWM generator
 │   ├─ clock_divider         /50 enable
 │   ├─ sine_sampler          phase counter, quarter-sine ROM, × modulation index
 │   ├─ carrier_gen           up/down counter (lower) + adder (upper = lower + Ac)
 │   ├─ comparator  (×2)      reference > upper, reference > lower
 │   └─ pulse_logic           level, gate pair, operating mode
 └─ bridge_model              behavioural: gates → Va, Vb, Vo (not hardware)
mlpwm_pkg                     level/gates/op-mode types, switch table
```

**sine_sampler** is the least obvious block. A phase counter counts in units
of 1/3000 of a cycle (3000 is a multiple of 500, 1000 and 1500). It advances by
6, 3 or 2 per step. The phase is folded into a quarter wave, and that address
reads a 751-entry table holding |sin| · 2·Ac · 2^8 / 10. A function fills the
table while the design is elaborated (`$sin` in a constant function), so no
data file is needed. The word read out is multiplied by the switch value,
rounded and shifted right by 8. The result is the reference 2·Ac·Ma·|sin|,
within half an LSB of the exact value.

The reference and the carrier change on the same step edge. Comparators
register them one clock later, and `pulse_logic` registers the gates one
clock after that. `pulse_logic` also delays the half-cycle flag by one clock
so that it lines up with the comparator results. Two assertions in
`pulse_logic` check the invariants: "above upper implies above lower" and
"exactly two switches on while running".

**bridge_model** is combinational, with no dead time, device drops or
ringing. It flags any gate pattern outside the switch table (`valid` low).
It also flags both switches of one full-bridge leg being on together
(`shoot_through`, legs taken as S1/S3 and S2/S4).

Not modelled: the 74LS245 buffer and PC817 optoisolators, the IR2130 gate
driver (with its protection features), and the power supplies. The top
brings the gate pulses out on `gatecntr`, where these stages would attach.

## Where this RTL makes its own choices

These points are not in the original description:

* single clock with enables, register stages and the 3-clock latency
* synchronous active-high reset; all gates off in reset and in mode 0
* `readmodind` → Ma mapping, `mode` → sample count mapping
* 5-bit carrier counter (a 5-bit `count` appears in the original simulation
  screen; the text gives no width)
* lower and upper carriers in phase; strict "greater than" comparisons
* choice of zero-volt pattern by half cycle
* quarter-wave table format and the phase-restart rule on a mode change

The original simulation screen also shows two inputs, `pulseinput` and
`autocontrol`. Their function is not described, so they are not implemented.

## Parameters

| parameter     | default | where           | meaning                                  |
|---------------|---------|-----------------|------------------------------------------|
| `PRESCALE`    | 50      | top, modulator  | clocks per sample/carrier step           |
| `N_BITS`      | 5       | top, modulator  | carrier counter width, Ac = 2^N_BITS − 1 |
| `SAMPLE_BASE` | 500     | top, modulator  | samples per cycle in mode 1 (even)       |
| `MI_STEPS`    | 10      | modulator       | switch value meaning Ma = 1              |
| `FRAC`        | 8       | modulator       | fraction bits of the sine table          |

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mlpwm_pkg.sv tb/mlpwm_ref_pkg.sv tb/five_level_inverter_tb.sv \
    --top-module five_level_inverter_tb -o sim && obj_dir/sim
```

For a block test, substitute `<block>_tb`. `tb/mlpwm_ref_pkg.sv` is the
testbenches' independent model. It holds the ideal real-valued sine, the
ideal triangle and a second copy of the switch table.

| testbench                | what it shows                                             |
|--------------------------|-----------------------------------------------------------|
| `five_level_inverter_tb` | whole design at default parameters (about 3 s)            |
| `mpw_modulator_tb`       | generator with prescaler 5, every clock against the model |
| `sine_sampler_tb`        | every sample of full cycles, all modes, several indices   |
| `carrier_gen_tb`         | triangle shape, period 62, offset, hold                   |
| `pulse_logic_tb`         | random inputs: level, gates, op mode, alignment           |
| `comparator_tb`          | random and equal/adjacent operands                        |
| `clock_divider_tb`       | tick spacing for 7 and 50, reset restart                  |
| `bridge_model_tb`        | all 64 gate patterns                                      |

`five_level_inverter_tb` runs at Ma = 0.8, 0.7 and 0.4 in 1500-sample mode.
It also runs 500 and 1000 samples, a switch value above 10, a mode change in
mid-cycle, a reset in mid-cycle and mode 0. Each is counted and must happen
at least once. At every clock it compares the bridge model's load voltage
with the ideal model and checks that no forbidden pattern or shoot-through
occurs. It measures every fundamental period as 50 × samples clocks.

Samples where the ideal reference lies within 0.6 LSB of a carrier are not
judged, because fixed-point rounding decides them. All other samples must
match exactly. The testbenches check the digital behaviour only. They say
nothing about harmonic content, which depends on the power stage and the
load.

## Resources

After generic synthesis, the generator needs about 145 word-level cells and
51 flip-flops. The sine table needs about 11 kbit of ROM: 751 × 11 bits,
mapped to a 1024-word memory. This fits comfortably in a small Spartan-II
class device of about 1700 logic cells.
