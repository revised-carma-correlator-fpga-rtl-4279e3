# FPGA logic for a CARMA correlator card and digitizer card

This RTL is the data-path logic of the revised CARMA correlator hardware. It covers two
board types, each with four data FPGAs and one controller FPGA:

- **Correlator card.** Eight antenna sample streams come in on four front-panel inputs. The
  four FPGAs pass the streams to each other so that together they compute all 16 cross
  baselines of antennas A–D × E–H (two geometries). Each baseline has 256 positive and
  256 negative lags.
- **Digitizer card.** Two antennas (A, B) arrive as eight 8-bit samples per clock. Along the
  way the card does the following:
  - Gain and offset are applied, with rounding to 6 bits.
  - The streams are delayed in whole nanoseconds and by a fraction of a sample with a
    reloadable 80-tap polyphase FIR.
  - The samples are downconverted and phase-corrected by a per-integration phase offset.
  - The card then computes the lag sets AA, AB+, AB− and BB.

Every FPGA shows a common memory map to the board CPU. There are 32 control registers and
one 2^19-bit M-RAM block per baseline. After each integration the lags are dumped into that
block, one 64-bit quadword per clock.

Everything runs on one clock (125 MHz in the real system), with one synchronous active-high
reset.

## Hierarchy

```
carma_top
├── cor_board               correlator card
│   ├── sysctrl             chip-select decode of the 20-bit CPU address
│   └── cor_fpga ×4         bus routing, alignment delays, corl_mode(2) multiplexers
│       ├── bus_ioe         I/O registers of buses 1a–1e, 2a–2e
│       ├── delay_line      alignment delays
│       ├── mmap → mram     control registers + M-RAM blocks
│       ├── corl_status     STATUS register
│       └── correlation     4 baselines
│           └── lag_stream  one lag bank (NUM_LAGS accumulators)
└── dig_board               digitizer card
    ├── sysctrl
    └── dig_fpga ×4
        ├── #1/#2: samp_scale → int_delay → frac_delay, delay_reload
        ├── #0/#3: phase_rot, delay_line (D=6)
        └── bus_ioe, mmap, corl_status, correlation (1 baseline)
```

`carma_pkg` holds the register addresses, bus indices, memory map constants and the shared
structs (`cpu_req_t`, `ram64_req_t`).

The two cards are independent in `carma_top`, and each card's ports are brought out.

Several parts are not built, and their signals are top-level ports:

- The digitizer's decimation filters. The filter coefficients are not specified, so
  `dig_dec` comes in and `dig_rot_*` goes out.
- The NCO that turns the phase into cos/sin, which is a vendor core. `dig_phase` goes out
  and `dig_cos`/`dig_sin` come in.
- The LVDS receivers, the ADCs and the board CPU.

## The correlator pipeline

A front-panel word carries two antennas: the first antenna in bits 15–0 and the second in
bits 31–16, with eight 2-bit samples each. A 2-bit code c stands for the level 2c − 3.

Words are passed between FPGAs on buses. Bus 2x of FPGA k connects to bus 1x of FPGA k+1.
Each hop costs two clocks: the sender's output register and the receiver's input register.
Local inputs are delayed so that every correlator sees time-aligned streams:

| FPGA | local pair | delay | baselines (prompt × delay) |
|------|-----------|-------|------------------------------|
| #0 | AB | 4 | AI BI AJ BJ |
| #1 | CD | 2 | KC LC EM FM |
| #2 | EF | 0 (forwarded only) | AG BG AH BH |
| #3 | GH | 2 | EG FG EH FH |

In FPGA #1, bit 2 of `CTRL_REG_CORL_MODE` selects the geometry:

- `0` gives IJ = CD, KL = EF and M = D.
- `1` gives IJ = EF, KL = AB and M = C.

FPGA #1 sends I and J to FPGA #0.

Test modes are set by bits 1–0 of CORL_MODE:

- `01` replaces the correlator inputs with the patterns in TEST_PIN/TEST_DIN.
- `11` replaces the front-panel word itself, so the patterns travel the whole pipeline.

## The correlation engine

`correlation` runs NUM_CORL baselines. Each baseline has two lag banks (`lag_stream`): one
for positive lags and one for negative lags.

- Positive lag k is Σ p[n]·d[n−k].
- Negative lag k is Σ p[n−k]·d[n].

Each bank keeps a shift register of past delay (or prompt) words and adds 8 samples × L
products per clock. The products for lags below 8 are taken within the current word.

While `correlate` is high, the engine accumulates. When `correlate` falls, it dumps one
quadword per clock into the baseline's M-RAM block, in this order:

1. L quadwords of {−lag, +lag} (−lag in the upper 32 bits).
2. NUM_META quadwords of {delay metadata, prompt metadata}.
3. NUM_QCNT quadwords of quantization-state counts. Word q counts the prompt samples in
   state q for q < 4, and the delay samples in state q − 4 otherwise.

`done` comes DUMP_CNT + 2 clocks after the last active clock.

If `correlate` rises again before the dump has finished, the dump is abandoned and `err`
pulses.

A continuous sample dump (the raw input words) fills the rest of the block's first half
once per integration, starting when `correlate` rises.

CONF1 and CONF2 report the generics.

High-resolution mode (CORL_MODE bit 3) chains the four lag banks of baseline 0 through
their shift-register tails. That baseline then gives 4 × NUM_LAGS lags per sign.

The STATUS register (`corl_status`) has these fields:

| Bits | Content |
|------|---------|
| 30–8 | Active-cycle counter, which saturates |
| 7–4 | Sticky overflow bits |
| 3 | Front-panel unlock: set when the receiver is unlocked for more than 8 consecutive active cycles |
| 2 | Digitizer unlock: set the same way |
| 1 | Error |
| 0 | Done |

Any write to STATUS clears it.

## Memory map

- Local addresses are 17 bits.
- Words 0–31 are the control registers. Registers 0–15 are read-only: VERSION, COMPAT,
  CONF1, CONF2 and the bus readbacks.
- Block b (b ≥ 1) is at b·0x4000. Block 0 shares its address range with the registers. The
  register window does not write into the RAM underneath, so tables in block 0 start at
  quadword 0x40.
- On the CPU side a block is 32 bits wide and little-endian: quadword q is words 2q and
  2q+1.
- Blocks that are not built read 0xDEADBEEF.
- Reads return one clock after the request.
- The card controller adds a 3-bit chip select above the 17-bit local address, giving a
  20-bit system address.

VERSION has this layout:

| Bits | Content |
|------|---------|
| 23–20 | FPGA type (C for correlator, D for digitizer) |
| 19–16 | Revision (D) |
| 15–8 | Major version |
| 7–0 | Minor version |

The specified layout overlaps major and minor at bit 7. Here the major number starts at
bit 8.

## Digitizer delay path

`samp_scale` computes x′ = round((GAIN·x + OFFSET)/1024) and saturates to 6 bits. This is
the specified /256 followed by rounding from 8 to 6 bits.

`int_delay` is a ring buffer of 8-sample words. It reads a pair of adjacent words and picks
8 samples at the sub-word offset, so the delay can be any whole number of samples up to
1015.

`frac_delay` is an 80-tap FIR evaluated for eight outputs per clock:

- Output i uses inputs x_{i−79} … x_i.
- Each output's filter is split into 8 sub-filters with taps a_j^k = c_{8j+k}. Each
  sub-filter is split into two 5-tap halves.
- Each half is built as distributed arithmetic. A 31-entry table holds s_m = Σ a_l over
  the bits l set in m, and it is indexed by one bit slice of five 6-bit samples. The sign
  slice is weighted negatively.
- The result is rounded by 2^12 and saturated to 8 bits. Latency is 2 clocks.
- Tables are written into a shadow copy and take effect on `swap`.

`delay_reload` runs at the falling edge of `correlate`. It reads the next of 48 sets of
167 quadwords, which form a circular buffer starting at quadword 0x40 of block 0:

- Quadwords 0–165 each carry three coded 18-bit values. Coded value v belongs to stream
  2·(v div 62) + (v mod 62) mod 2, at index (v mod 62)/2 + 1.
- Quadword 166 carries the whole-ns delay in bits 15–0 and the phase offset in bits 47–32.

The reload takes 169 clocks and ends with `swap`. FPGA #1 then drives the new phase on bus
1e to FPGA #0, and FPGA #2 drives it on bus 2e to FPGA #3.

`phase_rot` multiplies sample k by i^k·e^{iφ}:

- cos/sin are 18-bit with a scale of 2^17.
- The result is rounded to 12 bits and saturated.
- `negate` flips the sign. It is driven by the phase-switch demodulation bit
  CTRL_REG_DEMOD[integration mod 16].

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_carma_top -y rtl -y tb \
  +libext+.sv rtl/carma_pkg.sv tb/tb_carma_top.sv && obj_dir/Vtb_carma_top
```

There are three kinds of testbench:

- **Unit testbenches** (`tb_mram`, `tb_mmap`, `tb_correlation`, `tb_frac_delay`, …)
  compare each unit with an independent model in the testbench.
- **`tb_carma_top`** is the end-to-end test at 16 lags per stream. It checks the following:
  - The lags of all 16 correlator-card baselines, read back over the CPU bus, in both
    geometries.
  - High-resolution mode and both test modes.
  - The error, unlock, done and counter fields, and the 0xDEADBEEF fill.
  - The digitizer path from raw samples through reload, scaling, both delays and phase
    correction. The testbench includes a stand-in NCO.
  - Demodulation, overflow, and the four digitizer lag sets.

  It counts each of these mechanisms and fails if any never happened.
- **`tb_carma_full`** runs the same test with every parameter at its default: 256 lags
  per stream, 4 metadata words and 4 count words. It takes about half a minute.

## Known departures and limits

- **Not built.** The decimator, the phasor-disable counter (which belongs to the
  decimator) and the NCO. The decimator's filter coefficients and requantization levels
  are not specified, and the NCO is a vendor core.
- **Own choices.** The following are choices made here, not specified:
  - Lag sign convention and level mapping.
  - The two-clock bus hop.
  - Metadata contents: when CORL_MODE bit 4 is set, the metadata word is {FPGA number,
    baseline}.
  - Maximum whole-ns delay, accumulator width (32 bits) and output widths.
- **M-RAM count.** Each FPGA builds only the M-RAM blocks it uses: 5 on correlator FPGAs
  and 2 on digitizer FPGAs. The hardware allows up to 6.
