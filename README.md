# Sine-modulated PWM generator

This design produces a pulse-width-modulated output whose duty cycle follows a
sine wave. A small table holds one period of a sine. A slow clock divider steps
through the table. For each sample, a three-state machine puts out one PWM
period that is high for roughly `sample / 4096` of its length. Low-pass filter
the output (for example with a motor winding or an RC filter) and you get a sine
voltage. Its frequency is set by the divider, and its amplitude by an 8-bit
scale factor.

The RTL re-implements a sine PWM modulator that was first written in VHDL for a
Virtex-5 FPGA. Block structure, table size, counter width and the state diagram
follow that design. The details it leaves open are choices made here, listed in
[Interpretations and departures](#interpretations-and-departures).

## Signal path

```
             +-------------------- sine_gen --------------------+
 sw0 ------->| freq_trigger --> address  --> sine_rom --> x(amp+1)>>8 |--> sine_out
 amp ------->|  (8196 / 4098)   counter     256 x 12 bit   (register)  |      |
             +--------------------------------------------------+      |
                                                                       v
 sw0 -------> freq_trigger (2 / 1) ---- tick ---------------------> pwm_fsm --> pwm
 clk --------------------------------------------------------------------^
```

| module         | role |
|----------------|------|
| `pwm_pkg`      | Shared constants (`DEF_DEPTH_G = 8`, `DEF_WIDTH_G = 12`, `DEF_AMP_W = 8`), the state enum and the sine-table function. |
| `freq_trigger` | Clock divider. Gives a one-clock pulse every `div_fact` clocks. `sw0` picks one of two factors. |
| `sine_rom`     | Synchronous ROM holding 256 x 12-bit samples, computed at elaboration. |
| `sine_gen`     | Divider, address counter, ROM and amplitude scaling. |
| `pwm_fsm`      | The period state machine that makes the pulses. |
| `pwm_top`      | Connects the blocks. It adds a second `freq_trigger` that paces the state machine. |

The same `freq_trigger` is used twice. The slow copy inside `sine_gen` sets
the sample rate. The fast copy in `pwm_top` sets how quickly the state machine's
12-bit counter runs, and so sets the PWM carrier frequency.

## The period state machine

`pwm_fsm` is the heart of the design and the part to read carefully. It moves
only on clocks where `tick` is high, and each such clock is one *step*. It has
a 12-bit counter `C` and a register `T`.

| state     | condition (checked in this order) | next state | `pwm` written | counter |
|-----------|-----------------------------------|------------|---------------|---------|
| `LOAD`    | `sine1 == 0`                      | `PWM_MIN`  | 0             | `T <= sine1`, `C <= 0` |
| `LOAD`    | `sine1 > 0`                       | `PWM_MAX`  | 1             | `T <= sine1`, `C <= 0` |
| `PWM_MAX` | `C == 4095`                       | `LOAD`     | 1             | hold |
| `PWM_MAX` | `C == T`                          | `PWM_MIN`  | 1             | hold |
| `PWM_MAX` | otherwise                         | `PWM_MAX`  | 1             | `C + 1` |
| `PWM_MIN` | `C == 4095`                       | `LOAD`     | 0             | hold |
| `PWM_MIN` | otherwise                         | `PWM_MIN`  | 0             | `C + 1` |

`pwm` is a register, so a value written on a step is seen from that step's clock
edge onward. The sample is captured only in `LOAD`, so changes of `sine1` during
a period have no effect. Counting the steps from one exit of `LOAD` to the next
gives:

| sample `T`       | period (steps) | `pwm` high (steps) |
|------------------|----------------|--------------------|
| 0                | 4097           | 0                  |
| 1 ... 4094       | 4098           | `T + 2`            |
| 4095             | 4097           | 4097 (always high) |

So the duty cycle is `(T + 2) / 4098`, which rises monotonically with the
sample. The extra two steps come from the `LOAD` step and from the step that
moves from `PWM_MAX` to `PWM_MIN`. This design keeps that offset rather than
correcting it. Multiply step counts by the PWM divider to get clocks.

Reset is synchronous and active low. It puts the machine in `LOAD` with `pwm`
low and both `C` and `T` cleared.

## Sine table and amplitude

The table holds one period in 256 unsigned entries:

```
table[k] = round( 2047 * (1 + sin(2*pi*k/256)) ),   k = 0 .. 255
```

It starts at 2047, peaks at 4094 (k = 64) and falls to 0 (k = 192). In general
the scale is `2**(WIDTH_G-1) - 1`. `pwm_pkg::sine_sample` evaluates this in real
arithmetic while the design elaborates. No real arithmetic reaches the
synthesized logic, and no data file is needed. Changing `DEPTH_G` or `WIDTH_G`
regenerates the table. This scaling is the one that reproduces the sample values
of the reference simulation exactly: entries 132 ... 158 are 1846, 1796, 1747,
... 710, 672.

The sample is then scaled:

```
sine1 = (table[addr] * (amp + 1)) >> 8
```

With `amp = 255` the table passes through unchanged. Smaller values shrink the
whole unsigned wave toward zero, so the average duty cycle drops along with the
swing. Entry 192 is 0, so once per sine period a sample of 0 reaches the state
machine. That period stays low for its full length.

## Rates

With the defaults, one PWM period is 4098 steps. The dividers are chosen so
that one PWM period lasts one sine sample:

| `sw0` | sine divider | PWM divider | clocks per sample | sine frequency at 100 MHz | PWM frequency at 100 MHz |
|-------|--------------|-------------|-------------------|---------------------------|--------------------------|
| 0     | 8196         | 2           | 8196              | 47.7 Hz                   | 12.2 kHz                 |
| 1     | 4098         | 1           | 4098              | 95.3 Hz                   | 24.4 kHz                 |

In general the sine frequency is `f_clk / (SINE_DIV * 256)` and the PWM
frequency is about `f_clk / (PWM_DIV * 4098)`. Periods for samples 0 and 4095
are one step shorter than the rest. Because of that, the PWM period slides
slowly against the sample clock, and now and then a period repeats a sample or
skips one. The dividers run freely and are not synchronized with each other.

`freq_trigger`'s counter counts `0 .. div_fact-1` and clears itself. It
registers a pulse on the clock where it reaches `div_fact-1`. The first pulse
after reset therefore comes `div_fact` clocks after reset. A factor of 0 acts
like 1.

## Top-level interface and parameters

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock |
| `rst_n`     | in  | 1     | synchronous reset, active low |
| `sw0`       | in  | 1     | rate select for both dividers (0 = slow, 1 = fast) |
| `amp`       | in  | 8     | sine amplitude; 255 = full scale |
| `pwm`       | out | 1     | PWM output |
| `sine_out`  | out | 12    | sample currently offered to the state machine |
| `fsm_state` | out | 2     | `pwm_pkg::pwm_state_e`, for observation |

| parameter       | default | note |
|-----------------|---------|------|
| `DEPTH_G`       | 8       | table address bits (256 samples) |
| `WIDTH_G`       | 12      | sample width and period-counter width (end count 4095) |
| `AMP_W`         | 8       | amplitude width |
| `DIV_W`         | 16      | divider counter width |
| `SINE_DIV_LOW`, `SINE_DIV_HIGH` | 8196, 4098 | clocks per sample |
| `PWM_DIV_LOW`, `PWM_DIV_HIGH`   | 2, 1       | clocks per state-machine step |

Latency: after the sine divider fires, the new sample shows on `sine_out` three
clocks later. The three registers are the address, the ROM read and the scaling
register.

A generic synthesis run gives 81 flip-flop bits and a 3072-bit ROM. The ROM maps
to one block RAM or to distributed ROM. The original FPGA build reported
59 registers. The difference comes from the two registers in the sample path
and from keeping `T` and `C` in separate 12-bit registers.

## Interpretations and departures

- **Duplicate arc label in the state diagram.** In the original diagram, the
  `PWM_MAX` self-loop and the `PWM_MAX -> PWM_MIN` arc both carry the condition
  "Count = t". Here the self-loop is read as `C != T`, because otherwise the
  machine could never reach `PWM_MIN`. The arc to `PWM_MIN` does not increment
  `C`, since its label has no `c = c + 1`. `C == 4095` is tested first because
  the `PWM_MIN` arc is labelled "Count < 4095".
- **Registered Mealy outputs.** The `pwm` values on the arcs are written into a
  register. This causes the `T + 2` high time shown above.
- **Amplitude rule.** The original gives an 8-bit amplitude, shown at
  `11111111` in its simulation, but not how it is applied. The `(amp+1) >> 8`
  scaling is this design's choice. It matches the original exactly at full
  scale.
- **Division factors and wiring of `sw0`.** The original's divider values are
  not known. The ones here give one PWM pulse per sample, which matches the
  original waveform's look of about one pulse per sample. Both dividers
  share the one `sw0` switch.
- **Divider ports.** The original divider shows a single "Div_fact" input and
  picks between a low and a high factor with `sw0` inside. Here both factors are
  ports and `sw0` chooses between them.
- **Reset, widths of internal counters and ROM read timing** are this design's
  own choices (synchronous active-low reset, 16-bit divider counter,
  registered ROM).
- **Not included:** board pin constraints, the vendor's on-chip logic analyser
  and the FPGA-specific timing and power results. These describe the
  implementation flow, not logic.

## Verification

Each testbench checks its block against values computed independently, and
prints `TB_RESULT checks=N failures=M`:

| testbench         | what it checks |
|-------------------|----------------|
| `tb_freq_trigger` | Pulse spacing and single-clock width for fixed and random factors and both `sw0` settings. Factors 0 and 1 are included. |
| `tb_sine_rom`     | All 256 entries against the formula, the 27 reference values, the range 0..4094, and one-clock read latency. |
| `tb_sine_gen`     | Every clock: `sine1` against a reference pipeline over several periods, amplitudes 255/100/0, both rates and address wrap. |
| `tb_pwm_fsm`      | Random pacing and a random `sine1` outside `LOAD`. Checks period length, high time and `LOAD` timing for samples 0, 1, 2, 2047, 3000, 4093, 4094, 4095 and random values. All four transitions out of `LOAD`/`PWM_MAX` are taken. |
| `tb_pwm_top`      | Default parameters, ports only, about 4.2 M clocks. Runs full sine periods at both rates and at two amplitudes. Checks the table sequence and sample rate, the length and high time of every PWM period, and about one period per sample. It counts each mechanism: entry through `PWM_MAX`, entry through `PWM_MIN` on a zero sample, `sw0` switched both ways, and an amplitude change. |

The `PWM_MAX -> LOAD` arc (sample 4095) cannot happen in the full design,
because the table peaks at 4094. Only `tb_pwm_fsm` exercises it.

To run a test with Verilator:

```
verilator --binary --timing --assert -Irtl \
    rtl/pwm_pkg.sv rtl/freq_trigger.sv rtl/sine_rom.sv rtl/sine_gen.sv \
    rtl/pwm_fsm.sv rtl/pwm_top.sv tb/tb_pwm_top.sv --top-module tb_pwm_top
./obj_dir/Vtb_pwm_top
```

Substitute another testbench and its modules as needed. `tb_pwm_top` runs in
a few seconds.
