# A fixed-point IIR filter bank on one multiply-accumulate pipeline

This design runs IIR filters made of cascaded second order sections (SOS) on an
FPGA with nearly double-precision accuracy. It uses a single pipelined multiplier
and one accumulator per filter. The filter is computed once per *filter cycle* of
2^CYCLES clocks, and the filter cycles are locked to a GPS-disciplined time
counter. Every filter cycle takes one new input sample. All sections then run back
to back, one coefficient product per clock, and one output sample comes out.
Several inputs can be filtered in parallel with the same coefficients
(`FILTERS` lanes). Several coefficient sets can be kept in memory and switched
between without glitches.

## Arithmetic

Each section is a direct form I biquad with a power-of-two pre-scale:

    y[n] = 2^c0 · ( x[n] + b1·x[n-1] + b2·x[n-2] ) + a1·y[n-1] + a2·y[n-2]

The first section's input is the filter input times an overall gain `g`. Every
other section's input is the previous section's output.

| Quantity | Format |
|---|---|
| Coefficient | 53-bit two's complement, 51 fraction bits, range [-2, 2). Stored left-aligned in bits 63:11 of a 64-bit memory word. |
| c0 | Signed value in bits 7:0 of the a2 word. The low `SHIFT_BITS` bits are used, range −32..+31 at the default of 6. |
| Section value (history) | 52-bit two's complement. The `FILTER_WIDTH`-bit input/output integer sits in the upper bits, so at 32 bits there are 20 fraction bits. |
| Accumulator | 68 bits: 8 guard fraction bits below the section LSB. It saturates to 67 significant bits. |

A product of a 52-bit value and a 53-bit coefficient is 105 bits wide. It enters
the accumulator shifted right by 43. The gain·input product is stored as the first
section's newest input, shifted right by 51. A section result is rounded down to
52 bits when it is written to the history. The filter output is the result shifted
right by the fraction bits.

Overflow is handled by saturation. The output overflow flag is set when any of
these happens:

- the shifted running sum was clamped;
- an accumulation was clamped;
- a section value did not fit 52 bits;
- the output did not fit `FILTER_WIDTH` bits;
- the input arrived with its overflow flag set.

The flag is sticky for the current computation.

## The schedule ("5x" configuration)

The main trick is that a section's output never leaves the accumulator: it is
already the running sum the next section starts from. A section then costs four
products (b2, b1, a2, a1). The c0 scaling is applied as a shift of the running sum
just before the first a-term is added. A filter cycle of 2^CYCLES steps therefore
holds

    NSOS = (2^CYCLES − 4) / 4 = 2^(CYCLES−2) − 1 sections

| CYCLES | Steps | Sections |
|---|---|---|
| 3 | 8 | 1 |
| 4 | 16 | 3 |
| 5 | 32 | 7 |
| 6 | 64 | 15 |
| 7 | 128 | 31 |
| 8 | 256 | 63 |
| 9 | 512 | 127 |

Step k of one computation:

| k | Operation |
|---|---|
| 0 | b2·x[-2] of section 0. The accumulator starts from zero. |
| 1 | b1·x[-1] of section 0 |
| 2 | g·x: the new input times the gain. This product is also written to the history as section 0's newest input. |
| 3+4n | a2·y[-2] of section n. The running sum is first multiplied by 2^c0. |
| 4+4n | a1·y[-1] of section n. The result y_n is written to the history and, for the last section, becomes the output. |
| 5+4n, 6+4n | b2, b1 of section n+1, on the history of y_n (y_n is section n+1's input) |
| last 3 | Idle. The two switch words are read; the filter selection is taken over. |

The multiplier is named "5x" after the five DSP slices it spans on the target
devices. Here it is one generic `a*b` followed by `MULT_STAGES` registers, so that
synthesis can map and retime it.

### Pipeline and latency

The microcode runs `MEMORY_DELAY + MULT_STAGES + 1` steps ahead of the cycle
count. This makes the last section's result land in the accumulator in the last
step of the filter cycle. Counted in steps of the filter cycle, at `LBD = 0`:

| Event | Step |
|---|---|
| Input sampled (`x_old` shows it) | 1 |
| Output, `FILTER_REG = 1` | 0 of the next filter cycle, with `y_valid` |
| Output, `FILTER_REG = 0` | Last step of the same cycle, with `y_valid` |

Latency from the input to its filtered output is thus one filter cycle.

### History and the odd/even swap

Each section boundary keeps two past values, −1 and −2, in a small synchronous
RAM per lane. The address is `{section, h}`. `h` is 1 for the −2 value, and is
inverted in every odd filter cycle. The value written as "newest" in one cycle
therefore becomes the −1 value in the next, and the old −1 value becomes −2,
without any copying. The output values of section n are the input values of
section n+1, so they are stored once.

The filter output flows from the accumulator straight into the output register.
The parallel lanes share all control and the coefficient word, and each lane has
its own history, multiplier and accumulator.

## Coefficient memory

The memory is a true dual-port RAM (`MEMORY_TYPE = MEM_TDPRAM`) or a ROM
(`MEM_SPROM`). It is `2^MEMORY_DEPTH` words of 64 bits, split into
`2^(MEMORY_DEPTH−MEMORY_BANK)` filter sets of `2^MEMORY_BANK` words each. The
defaults give 1024 words and 8 sets of 128 words. `fsel` picks the set.

Within a set the words are in groups of four:

| Group | Word 0 | Word 1 | Word 2 | Word 3 |
|---|---|---|---|---|
| 0 | zero | switches 0 | switches 1 | gain g |
| n+1 | b1 | b2 | a1 | a2, with c0 in bits 7:0 |

Rules for loading a set:

- Sections beyond the ones used must be left all-zero. A zero section with zero
  shift passes its input through unchanged.
- The filter side reads 64-bit words.
- The host port is 32 bits wide (`DATA_B_WIDTH = 32`, address bit 0 selects the
  lower or upper half) or 64 bits wide. It has its own clock.
- `MEMORY_DELAY` adds read latency on the filter side, and `MEMORY_REG` adds
  registers on the host side.
- A ROM is loaded from `MEMORY_FILE` with `$readmemh`, one 64-bit word per line in
  hex. A RAM can be preloaded the same way. The file `tb/iir_rom_demo.hex` is an
  example of the format.

Writing into the set that is being computed takes effect on whichever step the
write lands. To load a new filter, write an unused set and then change `fsel`.
The selection changes only between two computations.

## Switches

With `GAIN_SWITCH = 1`, bit 0 of switch word 0 replaces the overall gain by zero. The filter then
sees zero input, and its output decays from the state it had.

With `SOS_SWITCH = 1`, bit n+1 turns section n off. Sections 0..30 are in word 0,
bits 1..31. Sections 31..62 are in word 1, bits 0..31. An off section is replaced
by a plain gain g_n taken from an alternate gain table:

- For section 0, the a2 step becomes g_1·x (the held input). Its b terms use the
  zero word.
- For a later section, the a1 step becomes g_n·(running sum), through the bypass
  path of the operand mux. Its b terms and a2 use the zero word.

The alternate gains live at `ALT_BASE + set·2^(MEMORY_BANK−2) + n + 1`:

| Memory holds | ALT_BASE |
|---|---|
| 2 sets | Start of the second set (so only set 0 is usable) |
| 4 or more sets | Start of the last quarter of the memory (its sets are then not usable for filters) |

Switch bits are read in the idle steps before a computation, so a change applies
to whole computations only.

## Timing source and resets

`time_sub` is the fraction of the current second in units of 2^−RESOLUTION s. It
counts one per clock and wraps on the pulse-per-second. The clock divider takes
its bits directly:

| Signal | Source |
|---|---|
| Clock enable | High when the low `LBD` bits are all ones |
| Step count | The next `CYCLES` bits |
| Odd/even bit | The bit above the step count |

Every filter cycle thus starts on a fixed tick of the second.

`rst` resets the pipeline registers and asks for a history clear. The history
clear depends on `RESET_TYPE`:

| RESET_TYPE | History is cleared |
|---|---|
| `RESET_FULL` | For at least one complete filter cycle, and released at the start of a filter cycle |
| `RESET_INSTANT` | Only while `rst` is high |
| `RESET_GOERTZEL` | While `rst` is high, and also during the last filter cycle of every second |

The Goertzel case restarts e.g. a single-frequency detector each second. A clear
empties the history at once (there are valid bits per entry). While it lasts, all
history reads return zero and writes are dropped.

## Files

| File | Purpose |
|---|---|
| `rtl/iir_pkg.sv` | Widths, enums and the control word |
| `rtl/iir_filter_bank.sv` | Top |
| `rtl/iir_clock_divider.sv` | Clock divider |
| `rtl/iir_microcode.sv` | Microcode sequencer |
| `rtl/iir_coeff_mem.sv` | Coefficient memory |
| `rtl/iir_filter_engine.sv` | Filter engine |
| `rtl/iir_history_buffer.sv` | Engine part: history buffer |
| `rtl/iir_multiplier.sv` | Engine part: multiplier |
| `rtl/iir_accumulator.sv` | Engine part: accumulator with shifter |
| `tb/iir_ref_pkg.sv` | Bit-exact reference model of the arithmetic and coefficient word packing |
| `tb/tb_iir_<block>.sv` | Self-checking test for each block |
| `tb/tb_iir_filter_bank.sv` | End-to-end test, with `tb/tb_iir_bank_checker.sv` |
| `tb/tb_iir_filter_bank_full.sv` | Runs the top with all parameters at their defaults |
| `tb/tb_iir_filter_bank_rom.sv` | Runs the top with a ROM preloaded from `tb/iir_rom_demo.hex` (one filter set, three sections) |
| `tb/tb_iir_sos_capacity.sv` | Fills every section at each cycle length from 8 to 512 steps, with `tb/tb_iir_capacity_run.sv` |

The end-to-end test runs three banks:

| Bank | Configuration |
|---|---|
| A | The defaults |
| B | 32-step cycles, two lanes, no output register, both switch kinds, a memory delay and a 64-bit host port |
| C | 16-step cycles at one step per two clocks (`LBD = 1`), the Goertzel reset, and a second only 2^11 clocks long so that the once-a-second reset occurs |

All three banks:

- load filter sets through the host port and read them back;
- change the input in mid-cycle;
- switch sets;
- drive overflowing inputs;
- pulse the reset.

Each output is compared with the reference model, including the step it appears
in. The test counts how often each mechanism occurred and fails if one never did.

Simulate with Verilator 5, from the top of the repository (the ROM test reads
its hex file by a path relative to it). The package must come before the modules
that import it:

    RTL="rtl/iir_pkg.sv rtl/iir_multiplier.sv rtl/iir_accumulator.sv \
         rtl/iir_history_buffer.sv rtl/iir_coeff_mem.sv rtl/iir_clock_divider.sv \
         rtl/iir_microcode.sv rtl/iir_filter_engine.sv rtl/iir_filter_bank.sv"
    verilator --binary --top-module tb_iir_filter_bank $RTL tb/iir_ref_pkg.sv \
        tb/tb_iir_bank_checker.sv tb/tb_iir_filter_bank.sv
    ./obj_dir/Vtb_iir_filter_bank

The other tests build the same way. Add `tb/tb_iir_bank_checker.sv` for the
full-size test and `tb/tb_iir_capacity_run.sv` for the capacity test.

Every test prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Where this design departs or chooses for itself

- **Multiplier configuration.** Only the 5-slice schedule is built. There is no
  2-slice configuration (three 17-bit passes, 12 steps per section) and no
  DSP-family parameter.
- **Shifter.** The shifter acts in the same step as the add. No separate
  shifter register stage is used.
- **Own choices.** These are not fixed by the specification:
  - the fraction-bit placement of the input/output;
  - the guard bits and saturation;
  - rounding by truncation;
  - the multiplier depth;
  - the step order inside a section;
  - the alternate gain addressing;
  - the exact release rule of the full reset.
- **Shift range.** c0 ranges −2^(SHIFT_BITS−1)..2^(SHIFT_BITS−1)−1.
- **Switch words.** They use only the lower 32 bits of each word. This gives a
  gain switch plus 63 section switches, so with `SOS_SWITCH` at `CYCLES = 9` the
  sections above 62 cannot be switched off.
- **Larger cycles.** `CYCLES` 8 and 9 (63 and 127 sections) need `MEMORY_BANK`
  raised to 8 and 9, so that a set holds 4·(sections+1) words. The capacity test
  runs them that way. The other tests use 8 to 64-step cycles.
- **Host access.** The host interface (e.g. PCIe) is not part of the design. The
  memory's second port and `fsel` are the top-level ports it would drive.
