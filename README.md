# OQPSK transmitter with ring-type magnitude modulation and LINC decomposition

A power amplifier is most efficient near saturation, but a filtered OQPSK
signal has a varying envelope that saturation would distort. This design
attacks the problem twice, in digital logic ahead of the DACs:

* **Ring-type magnitude modulation (RMM)** scales each symbol, before pulse
  shaping, by a factor chosen from the symbols around it, so that the filtered
  signal stays inside a ring between a minimum and a maximum radius.
* **LINC (linear amplification with nonlinear components)** splits every
  complex sample `s` into two samples of constant magnitude,
  `S1 = s(1 + j e)/2` and `S2 = s(1 - j e)/2`, with
  `e = sqrt(MAX/|s|^2 - 1)`. Each branch can then drive a saturated
  amplifier; adding the two amplified branches gives `s` back.

RMM keeps the envelope within the range LINC can represent, so fewer samples
need clipping in the LINC step.

The RTL is a streaming datapath clocked at 100 MHz. It produces one complex
sample per clock: random OQPSK symbols, RMM, upsampling by 8, a 113-tap
root-raised-cosine (RRC) filter, and LINC. LINC is built two ways: one block
computes `e`, the other looks it up in a table. Two push buttons switch RMM
on and off and choose what is sent back to the host for inspection.

## Signal chain

```
            +------------------------ generator -------------------------+
 run ------>| lcg_rng -> 14-bit symbol window -> rmm_lut -> rmm_scaler -> |
 mm_on ---->|                                   oqpsk_upsampler (x8)     |
            +---------------------------+----------------+---------------+
                                        | sample          | frame_done
                                   sync_fifo (64)    frame_counter
                                        |                 | rrc_en (32 cycles)
                                        +---- rrc_fir <---+
                                               | one complex sample / clock
                                          pair_packer  (s[n], s[n+1])
                                               |
                                         sync_fifo (16)
                                      +--------+--------+
                                  linc_lut         linc_calculator
                                      |                 |
                                 tx_lut_*          tx_calc_*  ---> DAC path
                                                        |
              rrc output / LINC left branch --> output_selector --> host FIFO
```

`rmm_linc_tx_top` wires the chain. Two button blocks sit beside it:
`rmm_activator` (button SW5) drives `mm_on`, and `output_selector`
(button SW7) drives the feedback channel.

## Number formats

`Qi.f` below means a signed number with `i` integer bits (sign included)
and `f` fractional bits.

| Point in the chain            | Format        | Width |
|-------------------------------|---------------|-------|
| RMM coefficient               | Q2.18         | 20    |
| sqrt(8) gain constant         | Q3.18         | 21    |
| generator output / RRC input  | Q4.18         | 22    |
| RRC tap                       | Q0.16         | 16    |
| RRC output                    | Q7.9          | 16    |
| LINC input and branch samples | int16         | 16    |
| LINC table entry `e`          | unsigned Q6.14| 20    |
| calculator's internal `e`     | unsigned Q16.16 | 32  |

The LINC blocks read the Q7.9 RRC output as a plain 16-bit integer. This
scales the signal by 2^9, which is what the DACs expect. Typical RRC outputs
stay below about 700 in these units. The RMM and scaling products are
truncated toward minus infinity and wrap on overflow. The RRC output keeps
bits 40..25 of the full-precision sum, which truncates the low bits. The
LINC branches saturate to int16.

## Symbol source

`lcg_rng` is a linear congruential generator:
`seed' = (seed * 4096 + 150889) mod 714025`, starting from 357. Each step
also emits the symbol `floor(4 * seed / 714025)`, taken from the seed before
the update. Bit 0 of the symbol is the I bit and bit 1 is the Q bit.
Multiplying by 4096 is a shift, so the modulo is done as twelve
double-and-subtract steps in one clock. The generator avoids an LFSR because
an LFSR never produces the all-zero word, which would make the four QPSK
symbols unequally likely.

## The RMM window and table

This is the least obvious part of the design. The filtered signal at a given
instant depends on several neighbouring symbols, so the right scaling factor
for a symbol depends on its neighbours too. The generator keeps the last
seven symbols in a 14-bit shift register: the symbol being sent, three
before it and three after it (D = 3). The new symbol enters at bits 1:0. The
whole register is the address into two 16384-entry tables, one for I and one
for Q, each holding a Q2.18 factor. The factor scales the middle symbol of
the window (bits 6 and 7). The output is therefore three symbols behind the
random source, so "future" symbols are known when their effect is needed.

The table contents come from an offline optimisation. It starts with all
factors at 1, filters the sequence, finds samples outside the ring, lowers
the factors of the symbols that caused them, and repeats. That result is
not part of this RTL. `rmm_lut` resets to 1.0 everywhere, which makes RMM
transparent, and has a write port (`lut_we`, `lut_waddr`, `lut_wi`,
`lut_wq`) so a computed table can be loaded at run time. The two tables
take 2 x 16384 x 20 bits = 655,360 bits of block RAM.

A window of 11 symbols (D = 5) would match the filter length better. It
needs 2 x 4^11 entries, about 168 Mbit, which is far beyond the target
device. The filter reaches seven symbols on each side while the RMM window
reaches three, and that gap is accepted.

`rmm_scaler` maps each bit to `+1/sqrt(2)` (bit 0) or `-1/sqrt(2)`
(bit 1). It multiplies by the table factor, or by 1.0 when `mm_on` is low,
and then by `sqrt(8)`. The `sqrt(8)` gain keeps the average power unchanged
when zeros are inserted by the x8 upsampler. The final amplitude is
`+/-2 * factor` in Q4.18.

## Upsampling and the OQPSK offset

`oqpsk_upsampler` turns each symbol into eight samples. The I impulse is at
phase 0 and the Q impulse at phase 4 of the same eight-sample group, so the
quadrature rail is half a symbol (4 samples) late. All other samples are
zero. The vendor FIR core the design was first built around could upsample,
but it could not offset one rail against the other, so the upsampling sits
in the generator.

## Frames, the Counter and flow control

The generator was first written as a function that produced four symbols
(32 sample pairs) per call and then signalled "done". The RRC filter takes
one complex sample per clock, so a Counter between them enabled the filter
for 32 cycles after each done.

This RTL keeps that structure but runs continuously:

* `generator` streams one sample per clock when `run` is high and its output
  is ready. It pulses `frame_done` one cycle after every 32nd sample.
* A 64-deep FIFO takes the samples. When the FIFO is full, the generator
  stalls.
* `frame_counter` opens a 32-cycle `rrc_en` window for each `frame_done`.
  Done pulses that arrive during a window are remembered (up to 7), and the
  next window follows with no gap. In steady state `rrc_en` therefore stays
  high, and the filter produces one output per clock.
* The filter reads the FIFO only when `rrc_en` is high and the FIFO is not
  empty. A frame is counted only after its 32 samples are in the FIFO, so a
  window never finds the FIFO empty. The testbench checks this.

The generator takes about three cycles to produce its first sample, after
which output is continuous.

## Pulse-shaping filter

`rrc_fir` is a direct-form FIR with separate I and Q rails. It has
`2 * NSYM * 8 + 1` taps: 113 for NSYM = 7 (the default) and 81 for
NSYM = 5. The filter has roll-off 0.25 and 8 samples per symbol. The taps
are the 57 unique values of the symmetric 113-tap response, rounded to
Q0.16 and stored in `glinc_pkg`. The 81-tap filter uses the middle 81 of
them; the published 81-tap response is exactly that part. Each enabled
clock shifts one sample into the delay line. All products are summed at
full precision, and the Q7.9 result leaves two cycles after the input.
Summing all products in one clock keeps the code short. A faster-clocked
implementation would add pipeline registers in the adder tree.

## LINC decomposition

Both decomposers take a 64-bit word of two adjacent samples, `s[n]` in
lane 0 and `s[n+1]` in lane 1. This is the layout the DAC path uses.
`pair_packer` builds these words from the filter output. Each decomposer
produces `left = S1` and `right = S2` for both lanes. In terms of the I and
Q parts `x` and `y`:

```
S1 = ((x - e*y) + j (y + e*x)) / 2
S2 = ((x + e*y) + j (y - e*x)) / 2
```

`e*x` and `e*y` are floored to integers. The halving is an arithmetic
shift, and the results saturate to int16. Both blocks are fully pipelined:
one pair per clock, latency 3 cycles.

**Calculator (`linc_calculator`).** This block computes
`u = x^2 + y^2` and compares it with the 32-bit input `max_sq` (MAX). If
`u > MAX` or `u = 0`, `e` is 0: the sample is clipped, both branches carry
`s/2`, and the `clip` flag is raised for that lane. Otherwise
`e = sqrt(MAX/u - 1)` is computed in Q16.16 as
`isqrt(((MAX - u) << 32) / u)`. This takes a 64-bit divider and a bitwise
square root, both combinational inside one pipeline stage. It is the
largest logic in the design.

**Table (`linc_lut`).** This block drops the divider and the square root.
Bits 22..11 of `u` address a 4096-entry table, and entry `a` holds
`sqrt(4095/a - 1)` rounded to Q6.14. In effect, MAX is fixed at
`4095 * 2^11`. Entry 0 is all ones (the largest value) and entry 4095 is 0.
Dropping the 11 low bits of `u` gives coarse steps for small samples,
where `e` changes fastest. Any sample with `u >= 2^23` aliases back into the
table, but RRC outputs below about 700 give `u < 10^6`, well inside the
range. The table is filled at start-up from the formula, so it is a ROM of
81,920 bits. The testbench checks it against published sample rows:
entry 1 = `0xFFF00`, 4091 = `0x200`, 4095 = 0.

The two decomposers get the same input and run side by side. Their outputs
are separate top-level ports (`tx_lut_*`, `tx_calc_*`), so the DAC path can
take either one.

## Controls and the feedback channel

`button_toggle` synchronises a push button through two flip-flops. It
requires the button to be stable for `DEBOUNCE` clocks (default 1,000,000,
or 10 ms at 100 MHz) and flips its state on each debounced press.

* `rmm_activator`: button SW5 toggles `mm_on`. After reset, RMM is off. The
  LEDs `led[1:0]` show the state and `led[2]` follows the button.
* `output_selector`: button SW7 chooses what goes to the host output FIFO:
  the RRC output (after reset) or the LINC left branch. By default the left
  branch comes from the calculator; set `FEEDBACK_LUT = 1` to use the table
  instead. The RRC sample is repeated in both halves of the 64-bit word.
  `host_stop` blanks the channel. `led[4:3]` is lit while the RRC output is
  selected, and `led[5]` follows the button.

The generator's state (`gen_seed`, `gen_sreg`) can be read, and reloaded
with `gen_load`, so a stopped sequence can be resumed where it left off.

## Top-level parameters

| Parameter      | Default   | Meaning                                         |
|----------------|-----------|-------------------------------------------------|
| `RRC_NSYM`     | 7         | filter span in symbols per side (7: 113 taps, 5: 81 taps) |
| `GEN_FIFO`     | 64        | depth of the generator-to-filter FIFO           |
| `LINC_FIFO`    | 16        | depth of the FIFO in front of the decomposers   |
| `DEBOUNCE`     | 1,000,000 | button debounce time in clocks                  |
| `FEEDBACK_LUT` | 0         | feedback channel takes the left branch of the table decomposer (1) or the calculator (0) |

## Where this design departs from the original

* **Streaming.** The original blocks were high-level-synthesis functions
  with start/done handshakes, with latencies of 144 (generator), 50 (vendor
  RRC core), 75 (calculator) and 4 (table) cycles. Here every block streams
  with valid/ready or valid-only handshakes. The latencies are 3, 2, 3 and 3
  cycles, and the throughput is the same: one sample per clock.
* **One FIFO per link.** The original put an output FIFO after each block
  and an input FIFO before the next one. Here each link has a single FIFO
  (64 words after the generator, 16 pairs in front of the decomposers).
  Two FIFOs in a row behave like one deeper FIFO. The filter output needs
  none, because the filter is only enabled when it can deliver.
* **Counter backlog.** The original counter would miss a done pulse that
  arrived during an active window. This one queues it.
* **Calculator arithmetic.** The original used floating point for `|s|^2`
  and `e`. This one uses exact integers and a Q16.16 `e`. Outputs saturate,
  as the original's description says, although its code cast to 16 bits
  with wrap-around.
* **Clipping rule.** A sample above MAX gets `e = 0` (its branches are `s/2`,
  not constant-envelope), as in the original block diagram. The textbook
  rule would instead scale `s` down to the maximum radius.
* **Table decomposer scale.** The original code multiplied the table
  decomposer's branch outputs by 10. Here both decomposers use the same
  `(s +/- j e s)/2` scale, so their outputs can be compared directly.
* **Both LINC variants in one top.** The original built them as two
  separate systems.
* **RMM table contents** are not included (see above).
* **Buttons.** A busy-wait loop in the original button code is replaced by a
  synchronous debounce counter of the same length.

## Not included

The RF daughter card (DACs, IQ modulator, PLL), the vendor firmware around
it (DAC PHY, the 16K-sample waveform memory, the receive and host FIFOs,
command bus, I2C and Ethernet host interface) and the ARM software are
outside this RTL. The top brings out the signals that would connect to
them: the two LINC outputs for the DAC path, `host_dval`/`host_data` for
the host FIFO, `max_sq`, the RMM table write port and the generator state.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/glinc_pkg.sv tb/tb_ref_pkg.sv tb/tb_rmm_linc_tx_top.sv \
    --top-module tb_rmm_linc_tx_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. `tb/tb_ref_pkg.sv` holds the
reference models the testbenches share (generator recurrence, real-valued
filter taps, real-valued LINC). They are written from the equations, not
from the RTL.

* `tb_rmm_linc_tx_top` runs the whole design at its default parameters,
  including the 1,000,000-cycle debounce. It simulates about 4 million
  samples in roughly half a minute. It loads random RMM tables and checks:
  the generator output against the reference model, the RRC output
  bit-exactly against a convolution of the generator samples, both LINC
  outputs against real-valued decomposition, and the host channel cycle by
  cycle. It also counts events that must each happen at least once: RMM
  switched on and off by its button, symbols sent with and without RMM,
  feedback channel switched both ways, host stop, clipped and unclipped
  samples, back-to-back Counter windows, and a generator state read back,
  reloaded and resumed. It checks one RRC output per clock in steady state.
* `tb_rmm_linc_tx_nsym5` runs the same checks on the top built with the
  81-tap filter (`RRC_NSYM = 5`) and a short debounce.
* Each block has its own testbench (`tb_<block>.sv`). The button
  testbenches set a short `DEBOUNCE`. `tb_rrc_fir` runs the 113-tap and
  81-tap filters side by side.

## How far to trust it

The datapath matches its reference models: exactly for the RNG, the filter,
the FIFOs, the counter and the packing, and within a few LSBs for the
fixed-point scaling and LINC. Each testbench was also run against a
deliberately broken copy of its block and caught the fault. The checks are
functional only. No timing analysis was done, so 100 MHz is not
demonstrated: the single-cycle 113-tap sum and the calculator's divider and
square root are the likely critical paths. The RMM behaviour is only as good
as the table loaded into it. With the reset table (all 1.0), RMM on and RMM
off give the same signal.
