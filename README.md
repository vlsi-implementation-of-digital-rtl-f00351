# Binary keying modulators: BASK, BFSK and BPSK from a PROM, a shift register and a multiplexer

These three modulators show binary digital keying in its simplest hardware form. A
16-bit message word sits in a small read-only memory. A parallel-in serial-out (PISO)
shift register turns the word into a bit stream. Each bit drives the select line of
a 2:1 multiplexer. The two multiplexer inputs decide which keying you get:

| keyer | mux input for data 0 | mux input for data 1 | default bit period |
|-------|----------------------|----------------------|--------------------|
| BASK  | ground (all zeros)   | carrier              | 1000 clocks        |
| BFSK  | carrier F2           | carrier F1           | 4000 clocks        |
| BPSK  | carrier (0°)         | inverted carrier (180°) | 2000 clocks     |

The carriers are 16-bit sampled sine waves, one sample per system clock. The
modulated output is therefore a 16-bit sample stream that a DAC could turn into an
analog waveform. Because the message comes from memory, nobody has to enter the bits
by hand.

## Top level

`digital_keying_top` puts the three keyers side by side. They share only `clk` and
`rst`. Each keyer has its own ports:

| port (x = ask, fsk, psk) | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous reset, active high |
| `x_en` | in | 1 | runs the keyer's carrier generator(s); the carrier holds while low |
| `x_sl` | in | 1 | 0 = load the PROM word into the PISO, 1 = shift it out |
| `x_address` | in | 4 | PROM word to send |
| `bask_signal` / `bfsk_signal` / `bpsk_signal` | out | 16 | modulated samples |
| `x_bit` | out | 1 | the data bit currently keying the output |

Parameters `N_ASK`, `N_FSK` and `N_PSK` (1000, 4000, 2000) set clocks per data bit.

Sending a word works like this:
1. Hold `sl` low for at least one clock with `address` set. The PISO loads the
   word, and the word's MSB appears on the bit output one clock later.
2. Raise `sl`. The MSB stays on the output for N clocks, counted from the first
   clock edge that sees `sl` high. Each later bit also lasts N clocks.
3. After 16 bits the PISO has shifted in zeros, so the output stays as for a 0 bit.
   BASK then outputs zero, BFSK outputs F2 and BPSK outputs the 0° carrier. This
   lasts until the next load.

## Carrier generation and sample coding

`sine_wave_gen` is a minimal direct digital synthesiser. A 6-bit phase counter steps
through a table holding one sine period of 64 samples. Each enabled clock it advances
by `STEP`, so f_carrier = STEP · f_clk / 64. The table is computed at elaboration
time in `keying_pkg::sine_sample`, so there is no data file:

    sample(k) = 32768 + round(32767 · sin(2πk / 64))

Samples are **unsigned offset binary**: 32768 is the zero line of the sine. This
coding is what makes the BPSK inverter work. A bitwise NOT of a sample x gives
65535 − x, which mirrors the waveform about mid-scale. The result is the same sine
shifted by 180°, with an error of at most one LSB. It also means the BASK "off"
level, the grounded mux input, is the all-zeros word. That is the bottom of the
range, not the sine's zero line. The BASK output therefore drops to the bottom rail
during a 0 bit, as the grounded-input circuit implies. If you need it to rest at
mid-scale instead, tie `d0` of the BASK multiplexer to `16'h8000`.

In BFSK both generators run all the time. By default F1 = 4 × F2 (16 and 64 clocks
per carrier period). A bit edge therefore switches between two free-running
carriers, and the output's phase jumps there. It is not continuous-phase FSK.

## Bit timing

`bit_clock_div` counts N system clocks and gives a one-clock `tick`. The PISO shifts
only on a tick. The tick is a clock enable, not a divided clock, so the whole design
is in one clock domain. The counter is held cleared while `sl` is low, so the first
bit after `sl` rises gets a full N clocks. The divider also gives `clk_div`, a square
wave that toggles once per bit (period 2N). Each keyer brings it out for observation.

## Blocks

| module | role |
|---|---|
| `keying_pkg` | widths (16-bit data and carrier), 4-bit PROM address, default PROM image, sine-table function |
| `sine_wave_gen` | table-lookup sine carrier, registered output |
| `prom` | 16 × 16-bit read-only table, combinational read, contents set by the `INIT` parameter |
| `piso` | 16-bit shift register: loads while `sl` = 0, shifts left on `shift_en` while `sl` = 1, MSB first, zero fill |
| `bit_clock_div` | bit-rate strobe every N clocks |
| `mux2` | 2:1 multiplexer |
| `inverter` | bitwise NOT: the 180° carrier |
| `bask_generator`, `bfsk_generator`, `bpsk_generator` | one keyer each: generator(s), PROM, divider, PISO, multiplexer (plus inverter for BPSK) |
| `digital_keying_top` | the three keyers side by side |

The PROM image in `keying_pkg::PROM_INIT` holds the following words:
- Word 0 is the 11-bit example sequence `00110100010`, right-aligned.
- Word 1 is `0011001100110011`.
- The rest are test patterns.

Override `INIT` on a keyer to program other data.

## What comes from the original design and what is this implementation's

These parts follow the design as described:
- the four-block structure of each keyer and its connections;
- the 16-bit data word and the 16-bit carrier;
- the grounded BASK input and the inverter for BPSK;
- the mapping of data values to outputs;
- the bit periods of 1000, 4000 and 2000 clocks;
- the names of the control signals `en`, `sl` and `address`;
- PROM word 1.

These are this implementation's own choices:
- the table size and carrier frequencies;
- the offset-binary coding;
- `sl` = 0 meaning load;
- MSB-first order and zero fill;
- the synchronous reset;
- the tick-based divider;
- the PROM depth and its other contents;
- putting the three keyers under one top.

The description disagrees with itself on which BFSK frequency goes with which bit
value. This design sends **F1 for a 1 bit and F2 for a 0 bit**. To swap them,
exchange `STEP_F1` and `STEP_F2`.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. The reference models in
`tb/tb_ref_pkg.sv` (sine samples and PROM words) are written separately from the RTL.

- `tb_sine_wave_gen` compares every sample with the reference sine at two step
  sizes. It also checks the pause with `en` low, the 64-clock period, the output
  range and reset.
- `tb_piso` uses random words and randomly spaced strobes. It checks the bit order,
  the hold between strobes, that nothing shifts while loading, the zero fill and
  reset.
- `tb_bit_clock_div` checks the tick spacing for N = 7 and N = 1000, that the first
  tick after a clear comes N clocks later, and that `clk_div` toggles.
- `tb_prom`, `tb_mux2` and `tb_inverter` check every input they try.
- `tb_bask_generator`, `tb_bfsk_generator` and `tb_bpsk_generator` run short bit
  periods (9–12 clocks). A cycle-accurate reference model covers the carrier phase,
  the load, the shifting and the keying. Each test sends six words, pauses the
  carrier and resets in mid-word.
- `tb_digital_keying_top` runs the top with its default parameters (1000, 4000 and
  2000 clocks per bit). It checks every output sample of all three keyers over
  128,000 clocks: two full BFSK words and correspondingly more BASK and BPSK words,
  starting with `0011001100110011`. It counts loads, shifts, both keyed states of
  each keyer, a carrier pause and a reset, and fails if any of them never happened.
  It runs in well under a second.

To run one, for example the top-level test:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/keying_pkg.sv tb/tb_ref_pkg.sv tb/tb_digital_keying_top.sv \
      --top-module tb_digital_keying_top -Mdir obj
    ./obj/Vtb_digital_keying_top

Verilator finds the other modules in `rtl/` through `-Irtl`.

## Limits

- The output is a stream of digital samples. No DAC or analog output stage is part
  of the design.
- Carrier frequency and purity are set by the 64-point table and `STEP`. There is
  no fractional phase accumulator, so only f_clk/64 multiples are available. Widen
  the counter and take the table index from its top bits if you need finer
  frequency steps.
- The PISO sends one word per load. To send a long message, sequence `address` and
  `sl` from outside.
- Lint reports unused observation outputs at the top (`data`, `clk_div`, the
  individual carriers). These are left open on purpose.
