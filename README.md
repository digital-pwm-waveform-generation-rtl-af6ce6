# Adder-based PWM generator (phase-accumulator carrier)

A conventional digital PWM uses a counter that runs from 0 up to a period
value and a comparator. The carrier then has a fixed slope (one count per clock) and an
amplitude equal to the period. At a high PWM frequency the period holds only a few
clocks, so resolution and gain collapse. Only whole-clock periods can be
chosen, so the frequency can be set only coarsely.

This design builds the carrier the way a direct digital synthesis (DDS) core
builds its phase: **every clock a phase increment is added to an accumulator
that wraps modulo 2^ACC_W**. The accumulator is a sawtooth whose amplitude is
always the full accumulator range. The frequency is set by its *slope*:

    f_pwm     = increment * f_clk / 2^ACC_W
    increment = f_pwm * 2^ACC_W / f_clk

The top DUTY_W bits of the accumulator are compared with a duty register, so:

* the PWM gain is constant and the duty resolution is always DUTY_W bits,
  whatever f_pwm and f_clk are;
* the frequency can be set to within f_clk / 2^ACC_W (15 Hz for 16 bits at
  1 MHz), and changed from one clock to the next by rewriting the increment
  (frequency spreading, PFM, phase locking to another signal);
* phase-shifted carriers for multilevel converters need only one extra adder
  each: a fixed offset is added to the accumulator value (not fed back).

## Block diagram

```
             inc_load                         clk
                |                              |
 inc_in --> [phase_increment_reg] --inc--> [phase_adder] --next--> [phase_accumulator] --phase-->
   (ACC_W)                                    ^    |carry=wrap                |
                                              +----|--------------------------+
                                                   v
   for k = 0 .. NUM_CARRIERS-1:
     phase --> [carrier_offset_adder  +k*2^ACC_W/N] --carrier[MSBs DUTY_W]--> [pwm_comparator] --> pwm_out[k]
                                                                                    ^
 duty_in --> [duty_reg] --duty (DUTY_W)---------------------------------------------+
   duty_load
```

| Module | Function |
|---|---|
| `pwm_pkg` | default sizes: `ACC_W_DEF = 16`, `DUTY_W_DEF = 8`, `NUM_CARRIERS_DEF = 4` |
| `phase_increment_reg` | ACC_W-bit register with load enable; holds the increment |
| `phase_adder` | ACC_W-bit modulo adder; its carry out marks a carrier wrap |
| `phase_accumulator` | ACC_W-bit register loaded every clock; the base carrier |
| `duty_reg` | DUTY_W-bit register with load enable; holds the duty value |
| `carrier_offset_adder` | adds a constant `OFFSET` to the phase; one shifted carrier |
| `pwm_comparator` | `pwm = duty > carrier_msb` on DUTY_W bits |
| `adder_pwm_gen` | top: all of the above, `NUM_CARRIERS` outputs |

The defaults are a 16-bit accumulator, an 8-bit duty register and comparator,
and four carriers spaced a quarter period apart (offsets 0, 16384, 32768,
49152). `pwm_out[0]` uses offset 0 and is the plain single-carrier generator.
The four outputs together drive the four cells of a five-level converter:
`$countones(pwm_out)` is the output level 0..4.

## How the carrier behaves: uneven periods and dithering

The carrier is easiest to understand from the small example that the
end-to-end testbench checks clock by clock. It uses an 8-bit accumulator, a
1 MHz clock and an increment of 6, aiming at about 22 kHz. The phase runs

    0, 6, 12, ..., 246, 252, 2, 8, ..., 248, 254, 4, 10, ..., 250, 0, 6, ...

On a wrap the accumulator does not return to 0. It keeps the remainder, so each
sweep starts at a different low value. The periods are 43, 43 and 42 clocks,
repeating. The average period is 256/6 = 42.67 clocks, i.e. 23.4 kHz. No
single period has that length, but the average is exact. The alternation
spreads the carrier harmonics a little, which lowers their peaks, while the
modulating signal is unaffected. Every period has a jitter of one clock.

With an *even* increment only even phases occur, and the sequence repeats
after 2^ACC_W / gcd(increment, 2^ACC_W) steps (128 for increment 6), so
the LSB of an 8-bit comparison is never exercised. With an *odd*
increment every phase value is visited exactly once per 2^ACC_W clocks. Over
that window an output with duty D is high for exactly D * 2^(ACC_W-DUTY_W)
clocks, the full DUTY_W-bit resolution, even when a single carrier period is
only ~45 clocks long. Choose odd increments. For example, 1441 with a 16-bit
accumulator at 1 MHz gives 21 988 Hz, periods of 45 and 46 clocks, and a
65536-clock repeat.

## The comparison

Only the top DUTY_W bits of the accumulator (or of a shifted carrier) go
to the comparator. This is valid because the accumulator always sweeps its
whole range, so its MSBs are a full-scale DUTY_W-bit sawtooth for any ACC_W.
The test must be a magnitude test, not an equality test. The carrier can
advance by many counts per clock and would step over an equal value.

Polarity in this RTL: the output is high while `duty > carrier_msb`. Duty 0
gives a constant low output, and duty D gives an average of D / 2^DUTY_W.
Duty 2^DUTY_W - 1 leaves one low code per sweep. The comparator output is
combinational from two registers (the accumulator and the duty register), as
in the reference structure. Register it outside if the PWM pin must be
glitch-free.

## Phase-shifted carriers

Carrier k is `phase + k * 2^ACC_W / NUM_CARRIERS` (mod 2^ACC_W). The offset
is added in front of the comparator and never written back, so all carriers
share one slope and one frequency and stay locked together. In the 8-bit
example the offsets are 0, 64, 128, 192, and at reset the second carrier
starts at 64 while the first starts at 0. `NUM_CARRIERS` must divide 2^ACC_W,
which an elaboration-time assertion checks.

All carriers are compared with the **same** duty register. This is the
phase-shifted-carrier scheme for a cascaded multilevel converter. A design that
needs a different reference per cell needs one `duty_reg` per carrier.

## Interface and timing (`adder_pwm_gen`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | module clock |
| `rst_n` | in | 1 | asynchronous, active low; clears increment, duty and phase to 0 |
| `inc_load`, `inc_in` | in | 1, ACC_W | write the phase increment |
| `duty_load`, `duty_in` | in | 1, DUTY_W | write the duty value |
| `phase` | out | ACC_W | accumulator value (base carrier) |
| `wrap` | out | 1 | high in a cycle whose next rising edge makes the accumulator overflow |
| `pwm_out` | out | NUM_CARRIERS | bit k: PWM of carrier k |

* A write is a synchronous enable. The value is taken at the rising edge where
  `*_load` is high.
* A new increment changes the step from the edge *after* it is loaded. The
  phase continues from its current value, with no restart and no
  discontinuity.
* A new duty acts at once. There is no shadow register that waits for a wrap,
  so a duty change mid-period shortens or lengthens that pulse. For a
  sampled-data controller, write it on `wrap` if that matters.
* After reset the increment is 0, so the carrier stands still at phase 0
  until an increment is written. The outputs are low while the duty is 0.

## Where this RTL goes beyond the reference structure

The datapath (increment register, adder, accumulator, duty register,
greater-than comparator on the accumulator MSBs), the widths 16/8 and the
offset scheme for multiple carriers follow the published structure. The
following are choices made here:

* Load strobes are clock enables in the single `clk` domain. The reference
  drawing shows the two registers written on the edge of a separate Load
  signal.
* The asynchronous reset and its values (all zero).
* The `wrap` output (the adder carry), brought out for synchronising duty
  updates and for measuring the carrier.
* The comparison polarity (`duty > carrier`).
* The shared duty register for all carriers, and `NUM_CARRIERS = 4` as the
  default. The single-carrier structure is `NUM_CARRIERS = 1`.
* Each carrier has its own offset adder. A variant that time-shares one adder
  between the carriers under a small state machine is possible but is not
  built.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
compares against values worked out in the testbench, has a watchdog, and
prints `TB_RESULT checks=N failures=M`.

| Testbench | Configuration | What it shows |
|---|---|---|
| `tb_phase_increment_reg`, `tb_duty_reg` | 16 / 8 bits | load, hold, asynchronous reset |
| `tb_phase_adder` | 16 and 8 bits | sum and carry, wrap points of the increment-6 sequence |
| `tb_phase_accumulator` | 16 and 8 bits | loads every clock, reset to 0, closed loop 0, 6, 12, 18 |
| `tb_carrier_offset_adder` | 16 and 8 bits | offsets 0/16384/32768/49152 and 64 |
| `tb_pwm_comparator` | 8 bits | exhaustive; D high codes per sweep |
| `tb_adder_pwm_gen` | ACC_W = 8, 4 carriers | the 8-bit worked example: the exact sequence, periods 43/43/42, repeat after 128, carrier offsets, full resolution over 256 clocks for odd increments, on-the-fly frequency change, all five output levels |
| `tb_adder_pwm_full` | defaults (16/8/4) | increment 1441: 1441 wraps and duty*256 high clocks per output in 65536 clocks; a 50 Hz, 0.9-depth sine reference over 20 ms, with the 1 ms mean of the four outputs within 0.01 of the mean duty; frequency change and back |
| `tb_adder_pwm_wide` | ACC_W = 32 | 1 s at 1 MHz with increment 94 437 741: exactly 21 988 periods, all 45 or 46 clocks, and a one-count increment change |

Both top-level testbenches compare every output with a model on every clock.
They also count the mechanisms (wraps, increment changes, duty writes,
full-resolution windows, each output level) and fail if one never occurs.
The spectra of the PWM outputs are not computed. The testbenches check
averages, periods and exact sequences instead.

Running a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/pwm_pkg.sv tb/tb_adder_pwm_full.sv \
              --top-module tb_adder_pwm_full -Mdir obj_full
    ./obj_full/Vtb_adder_pwm_full

Each one finishes in well under a second.

## Changing the design

* `ACC_W` sets the frequency resolution, f_clk / 2^ACC_W: 16 bits give 15 Hz
  at 1 MHz, 122 Hz at 8 MHz and 610 Hz at 40 MHz, and 32 bits give 0.00023 Hz
  at 1 MHz. DDS cores commonly use 24 to 48 bits.
* `DUTY_W` sets the PWM resolution independently of `ACC_W` (it must not
  exceed it).
* `NUM_CARRIERS` sets the number of equally spaced carriers.
* Pick an odd increment for the full-length sequence and full duty
  resolution.

Synthesised, the default top is two 16-bit registers (increment and
accumulator) and one 8-bit register (duty), 40 flip-flops in all. It also has
one 16-bit adder, three constant-offset adders (which reduce to a few bits,
because the offsets are multiples of 2^(ACC_W-2)) and four 8-bit comparators.
