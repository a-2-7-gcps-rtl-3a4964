# 7-channel CDMA serial link with two-step synchronization

A point-to-point serial link that carries seven independent data channels over
one differential line by code-division multiplexing. Each channel's bit is
spread by its own length-8 Walsh code. The transmitter adds the eight coded
chip streams into one multilevel waveform. The receiver samples that waveform
once per chip, gathers eight samples into a symbol, and recovers each channel
by correlating the symbol with the channel's code. Because the codes are
orthogonal, each correlation sees only its own channel. Which channel uses
which code is held in a writable register. That lets bandwidth move between
data streams while the link runs: a stream gets one channel of bandwidth for
each code it owns.

The hard part is synchronization. The receiver must find where each symbol
begins and where inside each chip to sample. A 9-level line has small steps
between levels, so edge-based clock recovery does not work. The receiver
synchronizes in two steps:

1. **Code synchronization** finds the symbol boundary to a whole chip. It
   rotates the order of the eight sampler clocks.
2. **Chip synchronization** is a delay-locked loop. It then slides the
   sampling instant to the chip centres in fractions of a chip.

The reference chip runs at 2.7 Gchip/s, which is 337.5 Msymbol/s and about
338 Mbit/s per channel. The RTL is a digital, one-chip-per-clock model of that
circuit. Its analog parts are represented by their digital function (see
*Departures*).

## Codes and channel map

The eight codes are the Walsh codes of length 8. A code bit of 1 means +1 and
0 means −1. Chip 0 is the leftmost bit, and `code_t` is `logic [0:7]`.

| slot | code | chips 0..7 | channel |
|------|------|-----------|---------|
| 0 | a | 11111111 | 0 |
| 1 | b | 01010101 | 1 |
| 2 | c | 00110011 | 2 |
| 3 | d | 01100110 | 3 |
| 4 | e | 00001111 | 2 (same bit as c) |
| 5 | f | 01011010 | 4 |
| 6 | g | 00111100 | 5 |
| 7 | h | 01101001 | 6 |

Codes c and e are reserved for synchronization, and they always carry the
same bit. Their element-wise product is then known, whatever the data. The
product of the two correlations is ≥ 0 and peaks only at the true symbol
boundary. Both synchronizers rely on this, so eight codes give seven channels.
Channel 2 drives both slot 2 and slot 4 (`cdma_pkg::ch_to_slot`).

## Timing model: eight phase clocks on one clock

The chip itself uses an 8-stage ring oscillator. It produces eight clocks
`ck0..ck7` at the symbol rate, each high for half a symbol and each delayed one
chip from the previous. Circuits clocked by different phases then work at the
chip rate while every flip-flop runs at the symbol rate.

The RTL replaces the oscillator with one chip-rate clock and a 3-bit phase
counter `ph` (`cdma_ring_phases`):

- `ck[k]` is the level of clock k during the current chip slot. It is high
  when `(ph − k) mod 8 < 4`.
- `rise[k]` marks the slot that ends with the rising edge of `ck_k`.
- A flip-flop "clocked by `ck_k`" is a register that loads when `rise[k]` is
  high.

Everything is in one clock domain. The phase relations of the original are
kept exactly, slot for slot.

## Transmitter

`cdma_transmitter` consists of the data buffer, the Walsh code register, the
coder and the line driver.

- **Data buffer.** Latches the 7-bit word at the end of slot 0. The
  transmitter's `take` output marks that slot, so a source can present the next word there.
- **Encoder, one per code slot.** The data bit is XORed with the code. The
  work is split over two clock phases: chips 0–3 are encoded and registered
  on `ck4`, and chips 4–7 one half-symbol later on `ck0`. A bit 1 comes out as
  the inverted code.
- **Buffer MUX.** A time-shared selector. Branch i conducts only while both
  `ck_i` and `ck_(i+5)` are high, and that overlap is exactly chip slot i. The
  branch drives the inverse of encoded chip i. Net effect: data 1 is sent as
  +code and data 0 as −code.
- **CML driver.** Adds the eight chip streams. `line` is the signed sum, −8 to
  +8 in units of one code's swing.

**Latency.** A word latched at the end of slot 0 is on the line for the 8
cycles that start 16 cycles later. `sym_start` marks chip 0.

## Receiver

`cdma_receiver` takes the line as `rx_sub[0:OVS-1]`, which is OVS samples of
the waveform per chip clock. `rx_sub[j]` is the line at time `n + j/OVS`.

### Delay circuit and rotator

In the chip, the eight sampler clocks pass through a rotator (a MUX) and
voltage-controlled delay lines. In the RTL, the delay becomes a selector
(`cdma_delay_circuit`):

- It keeps the previous chip's sub-samples, so its window spans two chips.
- It outputs the sample at instant `(n−1) + dly/OVS`.
- `dly` runs from 0 to 2·OVS−1 and starts at OVS.

The rotator (`cdma_rotator`) renumbers the phase strobes: sampler clock i is
ring clock `(i + rot) mod 8`. Advancing `rot` by one moves the receiver's
symbol window by one chip.

### Wave sampler

`cdma_wave_sampler` deinterleaves eight chips into one parallel symbol. It has
three ranks of sample-and-hold, clocked as in the original:

| rank | elements | loads on |
|------|----------|----------|
| A | A_i | its own clock `ck_i`, catching chip i |
| B | B0..B3 | `ck0` |
| B | B4..B7 | `ck4` |
| C | all eight | `ck0` |

All eight outputs change together once per symbol. The outputs for one
symbol appear two symbols after its chip 0.

### Decoders

Each of the seven decoders (`cdma_decoder`) is a correlator followed by a
clocked comparator:

- **Correlator.** Crossbar switches pass or negate each sample according to
  the code bit. A multi-input adder sums them.
- **Comparator.** Outputs 1 when the sum is positive. A sum of exactly 0 gives
  0.

The decoders read their codes from the receiver's own code register. The two
ends must therefore be written with the same assignment. `rx_valid` pulses
once per symbol.

### Code synchronizer

`cdma_code_sync` works as follows:

1. It correlates each symbol with c and with e, and multiplies the results
   (`cdma_gilbert_cell`).
2. It adds the products over `2^AVG_LOG2` (64) symbols and compares the sum
   with `THR_Q8/256` of the aligned value, where the aligned value is
   `64·(8·AMP)²`.
3. If the sum is below the threshold, it advances the rotator by one chip,
   waits `SETTLE` symbols for the sampler pipeline to refill, and tries again.
4. If the sum reaches the threshold, it raises `cnt_sw` (CntSW) to
   `PHASE_CHIP_SYNC`. This freezes the rotation and starts the loop.

Lock takes at most 8 × (3 + 64) symbols. `resync` restarts the search.

**Why average.** With all seven channels carrying random data, a single
symbol's product at a wrong boundary can exceed the aligned value. One
comparison would therefore lock falsely. Averaging over 64 symbols separates
the two cases reliably.

### Chip synchronizer (DLL)

`cdma_chip_sync` is an early/late discriminator:

- Four correlators use c and e rotated one chip right and one chip left.
- Gilbert cell B multiplies the right-shifted pair, giving j.
- Gilbert cell C multiplies the left-shifted pair, giving k.
- With a band-limited line, j − k is zero when the samples sit on the chip
  centres. It is positive when sampling is early and negative when it is late.

The loop filter is an integrator. Each time it passes
`±(64·AMP² << LF_LOG2)`, it moves `dly` one step (1/OVS chip) and clears:

- a positive crossing raises `dly` (pulse `step_late`);
- a negative crossing lowers it (pulse `step_early`).

During code synchronization `dly` is held at its middle value. The original
chip clamps the delay control voltages there with two switches.

**Loop wander.** Near zero error the discriminator is dominated by the data of
the other channels. With seven channels of random data, the delay code
therefore wanders one to three steps (up to 3/8 chip) around the chip
centre, and a larger `LF_LOG2` narrows the wander at the cost of slower
tracking. With the linear line model no decoding errors occurred at this
wander.

**Pull-in range.** The discriminator only steers correctly when the error is
under one chip. Larger errors are the code synchronizer's job.

## Parameters

| name | default | meaning |
|------|---------|---------|
| `N_CH`, `CODE_LEN` | 7, 8 | channels, chips per symbol (package constants) |
| `OVS` | 8 | sub-chip samples per chip, so the delay step is 1/8 chip |
| `SW` | 8 | bits per sample |
| `AMP` | 8 | sample value of one code's +1 chip; 8 codes use ±64 |
| `AVG_LOG2` | 6 | code-sync averaging: 64 symbols |
| `THR_Q8` | 115 | code-sync threshold, 115/256 of the aligned value |
| `SETTLE` | 3 | symbols ignored after each rotation |
| `LF_LOG2` | 3 | loop-filter integration depth |

Only the channel count and the code length come from the reference design.
The other values are choices made for this model.

## Departures from the reference circuit

- **Analog parts as integer arithmetic.** The sample-and-holds, differential-
  pair adders, Gilbert cells, RC loop filter and voltage-controlled delays
  are all modelled as integer arithmetic. The line is delivered as sub-chip
  samples instead of a continuous waveform.
- **Parts not modelled:**
  - the PLL that locks the ring oscillator to the 338 MHz reference;
  - the 50 Ω on-chip terminations.

  The chip-rate clock is an input.
- **Code synchronization design choices.** The averaging, the threshold
  value, the settle time and `resync` are all this design's own. The original
  makes one comparison against a threshold whose value is not given.
- **Loop filter.** The step-threshold integrator is this design's own.
- **Bandwidth example.** In the bandwidth example of the original, codes c
  and e belong to different streams. That contradicts the rule that they
  carry the same bit, and this design keeps the rule. So a stream that wants
  code c also gets e, and there are seven allocatable channels, not eight.
- **Synthesis.** The RTL is synthesizable. No timing closure at 2.7 GHz is
  implied: the original runs only the MUX and driver at the chip rate.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Support files:

- `tb_cdma_ref_pkg` holds the reference code table.
- `cdma_line_model` is a behavioural line. It delays the transmitter output
  by `dsub` sub-chip steps (at least two chips), and between chip instants it
  moves linearly from one level to the next.

The end-to-end tests run the transceiver at its default parameters:

- **`tb_cdma_serial_top`**
  1. Locks from a delay of 5 3/8 chips.
  2. Makes the DLL step both later and earlier.
  3. Swaps the codes of two channels on both ends while running.
  4. Resynchronizes after a resync to a new delay.

  It checks about 1700 decoded words and counts each mechanism: clock
  rotations, locks, late and early DLL steps, re-assignment and resync.
- **`tb_cdma_flexible_bw`** shares the seven channels among three streams. It
  switches the split from 3:1:3 to 3:2:2 mid-run and checks every stream bit
  and each stream's rate.

To run one with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/cdma_pkg.sv tb/tb_cdma_ref_pkg.sv tb/tb_cdma_serial_top.sv \
  --top-module tb_cdma_serial_top -o sim && ./obj_dir/sim
```

Replace `tb_cdma_serial_top` with any other testbench name. The whole-link
tests take a few seconds each.
