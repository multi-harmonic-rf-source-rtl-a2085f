# Delayed-output multi-harmonic DDS

A direct digital synthesiser (DDS) that makes a sine and a cosine at a chosen
harmonic of a particle beam's revolution frequency. What sets it apart from a
plain DDS is that its output can be shifted in time by a delay set on the front
panel, from 0 to 9999 ns in 1 ns steps. Part of the beam phase measurement sees
the beam through cables and pick-ups, and the delay is set to match that path.
The phase of the RF reference then lines up with the beam signal at any
harmonic and any revolution frequency. No one has to recompute a phase
correction as the machine accelerates, because the design works out the phase
that corresponds to the delay from the live revolution frequency and harmonic
number.

The design is the logic of one programmable device. It takes a harmonic
number, a revolution frequency word and a tagged clock, and it produces two
12-bit DAC words plus error and test outputs. The analogue parts around it
(DACs, filters, buffers, clock receiver, delay line, timer) are not part of
this RTL.

## Signal flow

```
 SDATA/SDDLY/SDTO ─► hn_receiver ─► h[15:0] ─┬─► phase_accumulator (17 bit) ──► phase
                                             │        ▲ parst / ACCU_RESET         │
 TCLK, TCLK_DLY ─► tag_detect ─► tag_monitor ─► tagstb ─► pa_reset_ctrl ─┘       │
                                             │                                    ▼
 FPROG[22:0], STROBE ─► hmult_sync ◄─────────┘ h[15:10]               phase_offset_adder ─► addr[13:0]
 DELAY (BCD) ─► d2b ─► delay[13:0] ─┘   └─► po[15:0] ──────────────────────┘     │
                                                                         sincos_rom ─► SIN, COS [11:0]
 HNM, HN_ENBL, HN_VAR ─► hnm_gen ─► SDOUT (test pulse train, looped to SDATA outside)
```

The whole design runs on TCLK at 128 times the revolution frequency f_rev. The
only logic outside that clock is the serial input shift register, which is
clocked by the delayed pulse train itself.

## Frequency and phase

The phase accumulator is 17 bits wide and adds the 16-bit harmonic number `h`
every clock:

    f_RF = h / 2^17 * f_clock = h / 2^10 * f_rev        (f_clock = 128 f_rev)

`h` is a fixed-point number with 6 integer bits and 10 fraction bits. Its
value is the harmonic of f_rev, from 0 to 63.999. A change of `h` changes the
frequency on the next clock without a phase jump.

### Phase locking through the tag

Once per revolution the clock carries a tag: one clock pulse is high for a
quarter period instead of half. Whenever `h` reaches a new integer value (ten
fraction bits zero, integer part different from the last integer seen), a
reset is armed (`pend_rst`). It fires on the next tag strobe: `parst` clears
the accumulator. With an integer `h`, the accumulator returns to the same value
every 128 clocks. So after this reset, every source on the same tagged clock
has the same phase with respect to the revolution, whatever happened before.
A fractional `h` (a frequency ramp between harmonics) never causes a reset.

Detecting the tag takes a timing reference inside one clock period.
`tag_detect` samples TCLK on the rising edge of `tclk_dly`, a copy of the clock
delayed by more than a quarter and less than half a period. At that instant a
normal pulse is still high and the tag pulse is already low. The delay element
is outside the module and drives the `tclk_dly` port. The sample is retimed
into TCLK and appears as `tag`, one cycle long, in the cycle after the tagged
edge.

`tag_monitor` guards against a bad clock. The first tag after reset starts a
free-running modulo-128 counter, which then produces its own tag image `itag`
in exactly the cycle where the next tag is due. The strobe used for the reset
is `tag | itag`, so a lost tag does not delay a pending reset. Once the counter
runs, any cycle where `tag` and `itag` differ sets the tag error latch. The
counter is started only by the first tag after reset. If the tag stream moves
for good, the error stays on after BLANK until the design is reset.

## Harmonic number input

`h` arrives as 16 return-to-zero pulses, MSB first, with a 250 ns period. A
62.5 ns pulse is a 0 and a 125 ns pulse is a 1. On the board the train
`sdata` passes through a 90 ns delay line to give `sddly`. On each rising
edge of `sddly` a shift register takes the current level of `sdata`. At that
point the line is still high only for a long pulse, so the word decodes itself
with no clock recovery. The first pulse also starts a 4.5 µs timer, `sdto`.
The pulse counter is held clear while `sdto` is low.

When the counter reaches 16, the event passes through a two-flop synchroniser
to TCLK and the word is loaded into the harmonic number register. When `sdto`
ends, a count other than 16 sets `h_err`. A train that stops short is never
loaded. A train with extra pulses is loaded when the count passes 16, and it
still raises the error. BLANK clears both error latches.

## Phase offset for the delay

A time shift τ at frequency f_RF is a phase shift of f_RF·τ turns. With
f_RF = h_int·f_rev, `hmult_sync` computes it with two multipliers:

    rf  = h[15:10] * fprog[22:5]              6 x 18 -> 24 bits  ("digital RF")
    po  = (rf[23:6] * delay)[22:7]            18 x 14 -> 32 bits, 16 kept

`po` is in units of 2^-16 turn. It is added to or subtracted from the
accumulator's 16 MSBs (front-panel +/- switch), and the 14 MSBs of the sum
address the ROM. Only the integer part of `h` enters the offset, so during a
fractional ramp the offset belongs to the integer harmonic.

Which product bits form `po` depends on the units of the frequency word, and
no units are given for it. This design takes the LSB of the 23-bit frequency
word as 1e9/2^34 Hz, about 0.0582 Hz. At that scale the PS revolution
frequency (about 478 kHz at most) nearly fills the 23 bits. All
scale factors are then powers of two: the 18 used bits have an LSB of
1.86 Hz, the truncated RF an LSB of 119.2 Hz, and the product an LSB of
2^-23 turn per ns of delay. If the source of the frequency word uses
another scale, change `PO_LSB` in `mhsdo_pkg` (for a power-of-two change) or
rescale the word before the port. Truncating the RF to 18 bits limits the
accuracy to about 119 Hz × τ, which is 0.6 mturn (0.2°) at 5 µs.

The revolution frequency changes during a cycle and comes with a STROBE. After
a two-flop synchroniser each strobe gives three one-cycle pulses on
consecutive clocks, `sync1`, `sync2` and `sync3`. They load the registers in
the reverse order of the data flow:

| pulse | loads                                                    |
|-------|----------------------------------------------------------|
| sync1 | `po` from the second multiplier                          |
| sync2 | truncated RF, the binary delay, the `arf` test word      |
| sync3 | the 18 frequency bits and the 6 integer bits of `h`      |

Both multipliers are combinational, and this order gives each of them a whole
strobe period to settle. The price is latency: a new frequency or harmonic
reaches `po` on the third strobe that follows, and a new delay on the second.
The design needs regular strobes, and `po` does not change between them.

`d2b` turns the four BCD switch digits into binary (thousands·1000 +
hundreds·100 + tens·10 + units, at most 0x270F).

## Sine and cosine words

`sincos_rom` stores a quarter wave: 4096 11-bit magnitudes
M[j] = floor(2048·sin(2π(j+0.5)/16384)), computed when the design is
elaborated. Each sample sits half a step off the quadrant boundaries, which
makes the symmetry exact. The second and fourth quadrants read the table
backwards (index `~j`), and the lower half-wave negates the word. The words
are offset binary (2048 is zero): a positive half gives `{1, M}`, and the
negative half gives its bit inverse. The cosine is the sine read a quarter
turn further on. `sgn` inverts both outputs by adding half a turn to the
address.

From a change of the accumulator to the DAC words there are three register
stages: the offset adder, the ROM magnitude and the output word.

## Test facilities

* `hnm_gen` sends a pulse train in the input format on `sdout`. A rising edge
  of `hn_enbl` starts it. The word comes from the 16 switch bits `hnm`, or,
  with `hn_var` high, it steps through the integer harmonics 8, 9, … 20 and
  wraps to 8 after each train. The pulse timing is set in clocks by
  parameters: the defaults of 16/4/8 clocks give 250/62.5/125 ns at 64 MHz.
  `lf_out` is a slow divided clock (2^22 clocks) that can drive `hn_enbl` to
  step `h` on its own. Outside the logic, `sdout` is jumpered to the
  receiver's input.
* `accu_rs` (ACCU_RESET) holds the accumulator at zero, so the outputs show
  the delay offset alone.
* `ahn` (12 MSBs of `h`), `phi_off` (12 MSBs of the signed offset, offset
  binary) and `arf` (16 MSBs of h_int·f_rev) feed monitor DACs. `pa_reset`
  brings out `parst`, and `pa_bus` the accumulator.

## Top-level interface (`delayed_dds`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| tclk | in | 1 | clock, 128 × f_rev, tag = quarter-period pulse |
| tclk_dly | in | 1 | tclk delayed 0.25…0.5 period (tag sampling) |
| rst_n | in | 1 | asynchronous reset, active low |
| sdata, sddly, sdto | in | 1 each | pulse train, train delayed 90 ns, time-out window (high while a train is expected) |
| fprog, strobe | in | 23, 1 | revolution frequency word and its strobe |
| delay_bcd | in | 16 | delay in ns, four BCD digits, thousands in [15:12] |
| dly_sub | in | 1 | 1: subtract the delay offset |
| blank | in | 1 | clear both error latches |
| sgn | in | 1 | invert the outputs while high |
| hnm, hn_enbl, hn_var, accu_rs | in | 16, 1, 1, 1 | test switches and jumpers |
| sin_o, cos_o | out | 12 each | DAC words, offset binary |
| ahn, phi_off, arf | out | 12, 12, 16 | monitor words |
| pa_reset, h_err, tag_err | out | 1 each | accumulator reset, error latches |
| pa_bus | out | 17 | accumulator |
| sdout, lf_out | out | 1 each | test pulse train, slow edge source |

`blank`, `sgn` and `accu_rs` are synchronised inside. `fprog` must hold still
around the strobe, and `dly_sub` and `delay_bcd` are switch levels.

## Where this RTL goes its own way

These points were chosen here, with no published detail to follow:

* Frequency word units and the bit position of the phase offset (see above).
* The order of the three strobe pulses, and the synchronisers on every
  asynchronous input.
* The tag sampling by a delayed clock copy. All that is known is that a
  flip-flop inside the device detects the tag.
* The ROM is a quarter-wave table built at elaboration. The original splits
  the sine table into two files, which hints at another organisation with
  the same function.
* SGN inverts the outputs while it is high. One description of the original
  speaks of an inversion on each positive edge of SGN. The level reading
  matches its definition as an active-high input.
* The delay converter's full scale is 9999 (0x270F), which follows from the
  BCD range.
* An explicit power-on reset, and the wrap of the stepping test harmonic
  from 20 to 8.

No timing closure has been done. The original runs at up to 70 MHz in a
mid-1990s programmable device. The two multipliers are combinational between
registers that load a strobe period apart, so they can be treated as
multicycle paths.

## Files

`rtl/`: `mhsdo_pkg.sv` (widths and constants), `delayed_dds.sv` (top),
`hn_receiver.sv`, `tag_detect.sv`, `tag_monitor.sv`, `pa_reset_ctrl.sv`,
`phase_accumulator.sv`, `d2b.sv`, `hmult_sync.sv`, `phase_offset_adder.sv`,
`sincos_rom.sv`, `hnm_gen.sv`.

`tb/`: a self-checking testbench `tb_<block>.sv` for each block and for the
top. `tb_workload_range.sv` measures the delay compensation as a time
shift. It runs the top at the ends of the clock range and at the 55 MHz
reference setting:

* 61.2 MHz clock, h = 8, 9999 ns added;
* 53.2 MHz clock, h = 24, 5000 ns subtracted;
* 55 MHz clock, h = 10, 5000 ns added.

It finds the mid-scale crossings of the sine word by interpolating between
samples. It checks that one revolution holds exactly h output periods. It
then checks that the crossings move by the delay, modulo one RF period, to
within 2 ns. The errors seen are below 0.4 ns. They come from the truncated RF word and offset, and from
the interpolation. There are also two behavioural models of board parts: `tclk_source.sv`
(the tagged clock with its delayed copy) and `sd_frontend.sv` (the 90 ns delay
line and the 4.5 µs timer).

## Simulation

The sources have no `` `timescale ``, so give one on the command line. For
example, the end-to-end test at full size:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
  rtl/mhsdo_pkg.sv tb/tb_delayed_dds.sv --top-module tb_delayed_dds
obj_dir/Vtb_delayed_dds
```

Each testbench ends with `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. The top-level test runs a 55.6 MHz tagged clock with f_rev =
f_clock/128 through the following steps:

1. An external train loads h = 10. The accumulator resets on the next tag,
   and the phase on every later tag is checked to be the same.
2. The offsets for 5000 ns and 1234 ns delays are checked, added and
   subtracted, with the sign inverted.
3. A run of missing tags: a new h = 12 still resets on the internal tag, the
   tag error is set, and BLANK clears it.
4. A 15-pulse train sets the h error.
5. ACCU_RESET holds the accumulator at zero.
6. The internal generator sends a fractional word (no reset) and the stepping
   harmonics 8 and 9.

In the quiet stretches the test compares every output word with a sine and
cosine worked out from the accumulator. It counts each of these events and
fails if one never happens. Building the ROM table makes Verilator's
elaboration take several seconds and a few GB of memory.
