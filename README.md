# 12-bit Direct Digital Synthesizer

A direct digital synthesizer (DDS) makes a sine wave from a fixed clock by
walking a phase counter around the circle and looking the sine of each phase up
in a table. The sine itself is nonlinear, but its phase is not: it advances by
the same angle every clock. Therefore a plain adder sets the frequency and a ROM
does the nonlinear part. A DAC turns the table value into a voltage.

This design is a small, single-chip DDS:

```
 tuning_word[11:0] ──►┌────────────────────┐ phase[11:0] ┌─────────────┐ addr[7:0] ┌──────────────────┐ code[9:0] ┌─────────┐
                      │ phase_accumulator  ├────────────►│ rom_pointer ├──────────►│ sine_lut         ├──────────►│ dac_10b ├──► vout
        clk (fall) ──►│ 3 × CLA4 + latches │             │ quadrant    │ neg       │ 256×8 ROM, sign, │           │ 3 V..4 V│
                      └────────────────────┘             │ folding     ├──────────►│ output latches   │           └─────────┘
                                                         └─────────────┘           └──────────────────┘
```

The output frequency is

    f_out = tuning_word × f_clk / 4096,   0 ≤ tuning_word ≤ 4095

With the 50 MHz maximum clock, the frequency step is 50 MHz / 4096 ≈ 12.2 kHz,
which is finer than one part in four thousand. The intended tuning range goes up
to 20 MHz (tuning word 1638). Nyquist caps any DDS below f_clk / 2, which is
tuning word 2048.

## Phase accumulator

`phase_accumulator` is a 12-bit register that adds the tuning word to itself on
every clock. The 12-bit range 0..4095 stands for the angle 0..2π. The adder drops
its final carry, so the phase wraps from 2π back to 0 by itself, and one wrap is
one output period.

The adder is built from three 4-bit carry-lookahead slices (`cla_adder4`):

* Four bit cells (`full_adder_1b`) each give a generate term (`a & b`) and a
  propagate term (`a | b`).
* A lookahead unit (`carry_lookahead4`) writes every carry as a flat sum of
  products of those terms and the slice carry-in. Nothing ripples inside a slice.
* The bit cells then form their sum bits as `a ^ b ^ c`.
* Between slices, the carry is passed from one slice to the next.
* The slice stops at four bits because the widest product, the carry into bit 4,
  already has five inputs. Wider lookahead would need gates with more inputs.

Each slice's sum goes into a 4-bit register (`nedge_latch`), and that register
feeds back into the adder. The registers keep the adder's inputs apart from its
outputs, so the loop is never transparent.

The tuning word goes into the adder straight from the input pins. A new word
changes the step size from the next clock on. The phase never jumps, so frequency
hops are phase-continuous: the output has no discontinuity when the frequency
changes.

## Quadrant folding: one quarter of a sine in 256 bytes

The ROM holds only the first quarter of a sine wave: 256 magnitudes from 0 to
π/2. The rest of the wave comes from symmetry. The phase word is split like this:

| phase bits | role |
|---|---|
| 11 | half-wave sign: 0 = positive half (0..π), 1 = negative half |
| 10 | falling quarter: 0 = Q1/Q3 (magnitude rising), 1 = Q2/Q4 (magnitude falling) |
| 9..2 | position inside the quarter: the ROM address |
| 1..0 | not used for lookup; they only add frequency resolution |

`rom_pointer` reads the ROM backwards in a falling quarter: it takes the ones'
complement of bits 9..2 when bit 10 is set (address `255 - i`). It passes bit 11
on as `neg`.

Backward reading gives an exact mirror only because of how the table is sampled.
Entry i holds the sine at the centre of step i, not at its edge:

    ROM[i] = round(255 × sin((i + 0.5) × π / 512)),   i = 0..255

The angle of step `255 - i` is then π/2 minus the angle of step i. Each falling
quarter is therefore the exact time reverse of the rising quarter. Q1 runs from
1 to 255, and Q2 runs from 255 back down to 1, with no repeated or skipped
sample at the peak. `sine_rom` computes this table at elaboration time in a
constant function. No data file is needed.

## From magnitude to DAC code

`sine_lut` joins the 8-bit magnitude `m` and the sign into a 10-bit
offset-binary code for the DAC:

| half wave | code | range |
|---|---|---|
| positive (`neg = 0`) | 512 + 2m | 514 .. 1022 |
| negative (`neg = 1`) | 511 − 2m | 1 .. 509 |

In bits, this is `{~neg, m ^ {8{neg}}, neg}` (`dds_pkg::dac_code`). The two halves
mirror each other exactly about mid-scale (511.5). The wave therefore has no DC
offset, and it steps by the same amount as every other sample where it crosses
zero. The 8-bit ROM limits the amplitude resolution to 9 bits (sign plus
magnitude), so code bit 0 only carries the sign.

The code is stored in a 10-bit falling-edge register in front of the DAC. All DAC
inputs therefore change together, whatever the delays through the ROM were.

`dac_10b` is a behavioural model of the analog converter, not synthesizable
logic. The real part is a resistor summing network: one buffer holds its summing
node at a 3.5 V bias, and a second buffer drives the pin. The model keeps only
the ideal static transfer, `vout = 3.0 V + code / 1023 V` (a 3 V to 4 V swing),
after 1 ns. It does not model load (the part was characterised with 20 pF),
settling or distortion.

## Timing

Every register in the design changes on the **falling** edge of `clk`. This is
unusual, but it is what the chip does. The tuning word is sampled on the same
falling edge.

| falling edge | phase register | DAC code |
|---|---|---|
| k (new word W first sampled) | p + W | sin(p) (old phase) |
| k + 1 | p + 2W | sin(p + W), the first sample that shows W |

A new tuning word therefore reaches the DAC input two clocks after it is applied.
The phase register takes the new step size within one clock, which is 20 ns at
50 MHz.

`rst_n` is a synchronous, active-low reset, sampled on the falling edge. It
clears the phase and the DAC code to 0. The chip's own pin list has no reset.
This design adds `rst_n` so that simulation starts from a known state.

## Top level

`dds_top` has these ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, up to 50 MHz; all registers use its falling edge |
| `rst_n` | in | 1 | synchronous active-low reset |
| `tuning_word` | in | 12 | frequency word D0–D11 |
| `dac_code` | out | 10 | DAC input code, brought out for test |
| `vout` | out | `real` | analog output, from the behavioural DAC |

Its only parameter is `PHASE_W` (default 12). The package `dds_pkg` holds the
shared widths (`PHASE_W`, `ADDR_W`, `MAG_W`, `DAC_W`), the types and the
magnitude-to-code function. `sine_lut` checks its widths in an elaboration-time
assertion, because the code mapping is defined only for an 8-bit magnitude and a
10-bit DAC.

## What is specified and what is chosen here

These parts follow the chip's description:

* the 12-bit accumulator made of three 4-bit lookahead slices, with OR-based propagate;
* the falling-edge registers;
* the two-clock update delay;
* the use of the top 10 phase bits;
* the ones'-complement folding on the second MSB;
* the 256-entry quarter-wave ROM;
* the 10-bit DAC with a 3 V to 4 V swing.

These are this design's own choices:

* the ROM contents and scaling (half-step sampling, full scale 255);
* the magnitude-to-code mapping for the DAC;
* the reset;
* the `dac_code` test output;
* the DAC delay;
* treating the described "latches" as edge-triggered registers.

Not included:

* A phase-offset input for phase modulation. The chip is said to support phase
  modulation, but its pin list has only the tuning word. Frequency modulation
  works by changing `tuning_word`.
* Square, triangle and sawtooth outputs. These were only simulated for this chip
  and never put on it.
* Any analog behaviour of the DAC beyond its static transfer.
* Process timing. The 50 MHz figure belongs to a 0.6 µm CMOS full-custom
  implementation, and RTL simulation cannot confirm it.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and exits. With Verilator 5, run from the folder
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/dds_pkg.sv tb/tb_dds_top.sv --top-module tb_dds_top
./obj_dir/Vtb_dds_top
```

Use the same command with another testbench name to run a single block. All
testbenches, and the RTL, use `timeunit 1ns; timeprecision 1ps`.

What the tests cover:

* `tb_full_adder_1b`, `tb_carry_lookahead4`, `tb_cla_adder4`: all input
  combinations against integer addition (bit cell, all carries, full slice).
* `tb_nedge_latch`: the register loads only on falling edges, holds through
  rising edges and between edges, and resets.
* `tb_phase_accumulator`: the phase against a modulo-4096 model, with extreme
  and random tuning words changed at random times. It counts wrap-arounds.
* `tb_rom_pointer`: all 4096 phases against an address worked out from the
  quadrant and the position inside the quarter.
* `tb_sine_rom`: every entry against the formula, computed with `$sin`, and
  that the table never decreases.
* `tb_sine_lut`: all address/sign pairs and random ones against the
  offset-binary formula. The code must change only on the falling edge.
* `tb_dac_10b`: end points, mid-scale and random codes against
  3 + code/1023 V.
* `tb_dds_top`: runs the whole chain at full size against a real-arithmetic
  reference model, comparing the code and the voltage on every clock. It
  measures the two-clock update delay after a frequency hop. It counts exactly T
  positive zero crossings in 4096 clocks for tuning words 1, 37, 1000 and 1638
  (20 MHz at 50 MHz). It also runs tuning word 2048 (Nyquist), tuning word 0
  (output holds) and 400 random phase-continuous hops. It fails if any of these
  events (hop, wrap, Nyquist, hold, each quadrant) never happened.
