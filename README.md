# Baseband digital communication kit in SystemVerilog

This is a laboratory kit for teaching and studying baseband digital transmission. A complete link is built in two FPGAs:

- The **master** FPGA generates a bit stream and line-codes it. It shapes the pulses, passes them through a transmitter filter and a channel filter, and adds Gaussian noise. The result leaves through a DAC.
- The **slave** FPGA digitises that signal with an ADC. It filters it, recovers the symbol clock from the signal itself, samples, decides levels and decodes the bits.

Every stage has test points. Two of them at a time can go to a probe DAC for an oscilloscope (Continuous mode), or be captured in a FIFO for the host PC (Step-by-Step mode). Every parameter is a word in a configuration RAM that the embedded processor writes: code, rates, amplitudes, filter coefficients, noise level and thresholds.

The RTL here covers all the logic of both FPGAs. The embedded processors, their bus and UARTs, the converter chips and the display panel are not logic of this design. They appear as ports: a register port and a FIFO read port per FPGA, the DAC and ADC serial lines, and the display text. Behavioural models of the DAC and ADC chips are in `tb/`.

## Signal path

```
master (rtl/master_fpga.sv)
  seq_gen ──bit──> line_coder ──level──> level_interp ──> fir_filter (tx)
     PRBS / programmed   8 codes           ±A, impulses      23 taps
                                                               │
  chain DAC <── + awgn_gen noise <── fir_filter (channel) <────┘
     │
     ╰─ analog ─> slave (rtl/slave_fpga.sv)
                  ADC ──> fir_filter (rx) ──> data_recover ──> decoded bits
                                              level decision, clock recovery,
                                              sampling, decision, line decoding
```

Samples are 12-bit two's complement, with full scale ±2047 (`kit_pkg::sample_t`). A line-coded level is a 2-bit value: 01 = +V, 00 = 0, 11 = −V. The DACs and ADCs use offset binary (sample + 2048).

## Timing: one clock, four enables

Each FPGA runs from one 50 MHz clock. `clock_gen` derives all chain rates from it as one-cycle enables, not as separate clocks:

| enable | rate | used by |
|---|---|---|
| `fifo_tick` (B) | twice per sample | FIFO: channel 1 and channel 2 of each sample |
| `smp_tick` (C) | `clk / CLKDIV` | every sample-rate register |
| `sym_tick` (E) | once per symbol (every SF samples) | sequence generator |
| `half_tick` (F) | start of the second half-symbol | return-to-zero timing |

`smp_idx` gives the position of the current sample inside its symbol. `run` freezes all enables. In Step-by-Step mode `run` is the FIFO write flag, so the chain stops while the processor reads and no sample is lost.

## Configuration

The processor writes a data word into register 31, then a RAM address into register 30. The write to register 30 stores the data (`chain_regs`). The RAM is 320 words in the master and 448 in the slave. Every word is wired to the blocks directly. A second, one-cycle read port feeds the filter coefficient loaders. Registers 0..7 read back status words (FIFO count and flag, generator word, slips, decoded-bit count, recovery counters).

The word map is in `rtl/kit_pkg.sv`:

| address | contents |
|---|---|
| 0 | register length n of the generator (3..32, 0 = 32) |
| 1 | seed |
| 2 | system clocks per sample |
| 3 | bit 3 Step-by-Step, bit 2 PRBS (1) or programmed (0), bit 1 reload seed, bit 0 hold clocks |
| 64 | probe selection: bits 2:0 channel 1, bits 18:16 channel 2 |
| 65 | FIFO channel enables |
| 128 | line code 0..7 |
| 129 | amplitude A (0..2047) |
| 130 | RZ duty cycle: bits 8:1 percent, bit 0 enable |
| 192 | samples per symbol SF |
| 193 | bit 3 impulse shaping for raised cosine, bit 2 channel filter on, bit 1 tx/rx filter on, bit 0 reload coefficients (rising edge) |
| 194 / 206 / 218 | 12 words each of tx / channel / rx coefficients: word k holds b(2k) in bits 15:0 and b(2k+1) in bits 31:16 |
| 256 | bits 11:0 noise standard deviation (2047 = full scale), bit 31 noise on |
| 384..387 | receiver upper threshold, lower threshold, log2 of the clock-recovery memory (0..5), sampling phase |

Both FPGAs must get the same rate and code words, because the slave makes its own sample clock.

## Transmitter

**Sequence generator** (`seq_gen`).
- The PRBS (`prbs_gen`) is a modular (Galois) right-shift LFSR with 32 flip-flops, of which n = 3..32 are active. Each cell has a small multiplexer:
  - a plain cell takes its neighbour;
  - a tap cell takes its neighbour XOR the output bit;
  - the top cell takes the output bit.
- `prbs_poly_rom` holds one primitive polynomial per length, as a tap mask. Power p of the right-shift polynomial sets mask bit p−1. With that rule every length checked in simulation (3..20) gives a maximal sequence of 2ⁿ−1 bits.
- The programmed generator (`prog_seq_gen`) rotates the n-bit seed, which sends a user pattern with period n.
- Both generators reload the seed on command. `seed_det` marks a completed period.

**Line coder** (`line_coder`).
- The codes, numbered 0..7, are:
  - unipolar NRZ and RZ;
  - polar NRZ and RZ;
  - Manchester (1 = +,−);
  - bipolar (AMI) NRZ and RZ;
  - CMI (1 = alternating ++/−−, 0 = −,+).
- A symbol is two half-symbols. A programmable duty cycle can replace the half split for RZ codes.
- The coder takes the bit on the first sample of a symbol, so its output lags the generator by one symbol.

**Shaping and filters.**
- `level_interp` maps levels to ±A or 0. For raised-cosine shaping it keeps only the first sample of each symbol, giving one impulse per symbol.
- The three filters are the same `fir_filter`: 23 taps, 16-bit coefficients, a full-precision sum, then an arithmetic shift by 11 with saturation. A coefficient of 2048 therefore has gain 1.
- `coef_loader` streams a coefficient set from the RAM, b22 first. The filter collects it in a shadow set and switches on the last coefficient, so it never runs on a half-loaded set.
- In the master the transmitter set loads first, then the channel set, sharing the RAM read port.

## Noise generator

`awgn_gen` draws Gaussian samples by inverting the half-normal distribution with five small ROMs instead of one huge one:

- Level 1 (`awgn_rom`) tabulates z = √2·erfinv(x) at the centres of 512 equal segments of [0, 1).
- Level 2 re-divides only the last segment, [511/512, 1), into 512. Level 3 re-divides the last segment of level 2, and so on.
- Each level has its own 9-bit LFSR index; their lengths are 20, 22, 23, 25 and 28 cells.
- Level 1 gives the value unless its index is 511. In that case level 2 is used, then level 3, and so on. The result behaves like a uniform x with 9 bits of resolution near 0 and 45 bits in the far tail, where they matter.
- Entries are Q3.8 (11 bits), reaching 7.6σ.
- A 31-cell LFSR gives the sign.
- The unit sample z is multiplied by the standard-deviation word, noise = z·sd/256, and saturated to ±2047.
- The ROM contents are computed during elaboration by a constant function. It uses a rational approximation of the inverse normal CDF (Acklam's, relative error 1.2·10⁻⁹), so no data file is needed.

## Receiver: clock and data recovery

The receiver has no clock from the transmitter. It finds the symbol timing in the data (`clock_recovery`, `data_recover`), using the signal names of the original design:

- **B**: the filtered sample is decided into +V/0/−V by two thresholds (`level_decision`). The negative level is used only by the three-level codes: polar RZ, bipolar NRZ and bipolar RZ.
- **C1..C4, the clock recovery circuit**:
  - C1 flags a change of B.
  - C2 counts samples since the last restart. It restarts on an edge, or on reaching the limit C4, so it keeps a half-symbol rhythm through long runs without edges.
  - On each edge the length just measured is clamped to SF/2−2..SF/2 and stored (C3) in a circular memory of 1 to 32 words. RZ signals, with two edges per symbol, do no harm this way.
  - C4 is the rounded mean of that memory. A larger memory is steadier under noise but slower to follow.
- **D1..D5**: the signal is sampled when C2 equals the programmed phase, once per half-symbol. D5 is the input delayed by SF/2+1 samples, aligned with the sampling instants for display.
- **E1, E2**: the two decided half-symbol levels.
- **F**: the decoded bit. `line_decoder` maps the pair (E1, E2) back to a bit for each code.

Which sample is the first half of a symbol is not known at start-up. When a pair is one the current code cannot produce, the receiver moves its half-symbol flag by one and counts a slip. Examples: an RZ pulse whose second half is not zero, Manchester halves that are equal, or CMI "+ then not +". After a few symbols it locks; NRZ codes need no alignment.

## FIFO and the master–slave flag (Step-by-Step)

Each FPGA has a 32767 × 32-bit FIFO (`sync_fifo`). `fifo_ctrl` writes channel 1 on the FIFO tick that coincides with a sample tick, and channel 2 on the next one. Each word is the 16-bit channel value, sign-extended.

In the master, the write flag:
- is set by reset;
- falls when more than 32759 words are stored;
- rises again when the processor has read the FIFO down to 4 words.

While it is low the chain is frozen and the processor may read. The two marks keep the FIFO away from both full and empty.

The flag goes to the slave on a dedicated line. The slave synchronises it with two flip-flops and uses it both as its write flag and as its run enable. Both FIFOs therefore hold the same time window. This is how the host compares transmitted and received bits (points A and O) to measure the error rate. Continuous mode writes nothing and drives the probe DACs. Status register 1 gives the processor the FIFO's valid, empty and full signals and the read flag (the complement of the write flag).

## Converters and display

- `dac_driver` (for two DAC121S101 chips) sends a 16-bit frame: four zero control bits and 12 data bits, MSB first. One more serial clock with nSYNC high ends the conversion: 17 serial clocks of 25 MHz, about 1.47 MS/s.
- `adc_driver` (for two ADCS7476 chips) follows IDLE → SHIFTIN (16 bits, 4 leading zeros) → SYNCDATA (nCS high for one serial clock) at 12.5 MHz, about 735 kS/s.
- Both run back to back. Each chain sample takes the latest finished conversion, so the sample rate must stay below the ADC rate (`CLKDIV` ≥ 68).
- `display_ctrl` is a Moore machine. It sits in IDLE until the text the processor wants shown differs from the text held for the display. It then holds `update` high in START_COUNT, copying the text, for STOP+1 clocks.

## Test points

| master | signal | slave | signal |
|---|---|---|---|
| A | data bit | I | ADC input |
| B | channel output (with noise) | J | receiver filter output |
| C | line-coded level | K | decided level B |
| D | shaped pulses | L | edge flag C1 |
| E | transmitter filter output | M | delayed signal D5 |
| F | channel filter output | N | decided half-symbol E1 |
| G | noise | O | decoded bit F |
| H | symbol clock | | |

## Where this design departs from the original kit, or fills gaps

- **Clocks.** B, C, E and F are enables of one clock, not divided clocks.
- **Processor.** There is no embedded processor or bus. Each FPGA exposes a register write/read port and a FIFO read port in its place.
- **Word map.** The configuration word map and the test-point assignment are this design's own.
- **32-cell polynomial.** The PRBS polynomial for n = 32 is derived from the left-shift form by the subtraction rule, giving taps 31, 30, 29, 27, 25. It is not the other printed variant.
- **Receiver internals.** These are this design's own reading of the signal descriptions: the clamp of the clock-recovery measure, the slip rule of the line decoder, and the D5 delay of SF/2+1.
- **Noise generator.** The LFSR lengths of the noise generator and its output scaling are chosen here.
- **Converters.** The DACs and ADC convert continuously instead of once per sample.
- **Display.** The display size (4 × 16 characters) and the refresh time (STOP = 1000 clocks) are chosen here.
- **FIFO mode.** The two FPGAs' FIFO modes are not forced equal by the hardware. Both must be configured alike.
- **Analog stages.** The anti-alias and reconstruction filters are not modelled. The testbenches pass the DAC code straight to the ADC.

## Simulating

Every block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`. Simulate one with Verilator, package first, for example:

```
verilator --binary --timing -y rtl -y tb rtl/kit_pkg.sv tb/tb_fir_filter.sv --top tb_fir_filter
./obj_dir/Vtb_fir_filter
```

Dependencies are found by module name through `-y`. The chip models `tb/dac_chip_model.sv` and `tb/adc_chip_model.sv` are needed by the converter and top-level testbenches.

- **`tb_comm_kit_top`** uses a 256-word FIFO. It runs the whole link through the DAC and ADC models, with the two FPGAs on separately phased clocks. It covers:
  - all eight line codes with no errors;
  - the programmed generator;
  - a coefficient reload of all three filters;
  - noise at 0 dB SNR, which does cause errors;
  - a full Step-by-Step cycle: the flag falls, both chains stall, the FIFO is read back, the flag rises and the chains resume;
  - the probe DAC and the display.

  It counts each of these mechanisms.
- **`tb_comm_kit_full`** runs one complete operation at the default sizes. It does a polar NRZ transfer, then fills, reads back (32757 words) and releases the full 32767-word FIFO. It takes about 15 s in Verilator.

The unit testbenches compare against independent models: the polynomial table, a bit-serial LFSR, code tables, a convolution model, a queue FIFO, the chip models and reference values of the inverse normal table.
