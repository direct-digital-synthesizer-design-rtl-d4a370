# Quarter-wave sine ROM for a direct digital synthesizer

A direct digital synthesizer (DDS) makes a sine wave from a single reference
clock. A phase accumulator adds a frequency word to a phase register every
clock. A sine table converts the phase to an amplitude, and a DAC turns the
amplitude into a voltage. This RTL is the sine-table part of such a chip. It
takes the 12-bit phase of the accumulator and gives out one 10-bit DAC code per
clock. It stores only one quarter of the sine period and builds the other three
quarters from it by symmetry.

The memory is a 256-word × 9-bit NOR mask ROM. It is split into four 64-word
sub-ROMs, each with its own tree decoder, and a tree of 2:1 multiplexers picks
one of them. This split keeps each bit line short: it has fewer cells and less
capacitance. Falling-edge D flip-flops latch the ROM word. A second bank latches
the final DAC code, so that the DAC never sees the glitches of the
combinational code conversion.

The accumulator and the DAC are separate blocks of the chip and are not
included here. The top module's `phase` input and `dac_code` output are their
connections.

## The table and why a quarter of it is enough

Word `n` (0 ≤ n < 256) of the ROM holds

    table[n] = round(511 · sin((n + ½) · 90° / 256))

So the first sample sits half a step (0.1758°) above 0°. The steps are 0.3516°
apart, and the last sample sits half a step below 90°. The values run from 2 to
511, so they fill the 9-bit range.

The half-step offset matters. The samples are placed symmetrically inside the
quadrant, so the sample that mirrors row `n` about 90° is exactly row `255 − n`,
which is the bitwise complement of `n`. No row is shared between rising and
falling quarters, so no extra correction is needed. The same holds in the
vertical direction, as follows:

| phase[11:10] | quadrant | ROM address          | DAC code        |
|--------------|----------|----------------------|-----------------|
| 00           | 0°–90°   | `phase[9:2]`         | 512 + table     |
| 01           | 90°–180° | `~phase[9:2]`        | 512 + table     |
| 10           | 180°–270°| `phase[9:2]`         | 511 − table     |
| 11           | 270°–360°| `~phase[9:2]`        | 511 − table     |

`511 − x` is the bitwise complement of `512 + x` in 10 bits. The output is
therefore offset binary, symmetric about mid-scale 511.5, and it uses the whole
range 0…1023. The result is a 1024-sample full period from a 256-word table.
Phase bits [1:0] are below the table's resolution and are not used.

The table is not stored as a list of numbers. The package function
`dds_rom_pkg::sine_word(n)` computes it at elaboration, with an 8-term Taylor
series in Q30 fixed-point integer arithmetic. The result is exact for all 256
words, including row 79, whose real value 239.49999 lies next to a rounding
boundary. Synthesis therefore needs neither real numbers nor a data file, and
the table changes with `ROM_ADDR_W` and `ROM_DATA_W`.

## ROM organisation

The 8-bit ROM address splits as `{M, N, row[5:0]}`.

* **Tree decoders (`tree_decoder`)**: one per sub-ROM. Each turns `row` into
  64 one-hot word lines. The decoder is a binary tree of pass switches whose
  root is tied high. Each level uses one address bit, starting from the LSB,
  and halves the set of live branches. The RTL models each level as a
  split of the previous level's lines.
* **Sub-ROMs (`rom64`, parameter `SEGMENT`)**: each is a NOR array. Every bit
  line is pulled high. A stored 0 is a pull-down transistor gated by its word
  line, and a stored 1 is no transistor. The RTL computes, for each bit line,
  the mask of rows that hold a 0, and reads
  `bit_line[b] = NOR(word_line & zero_rows[b])`. With no word line active, all
  bits read 1. The sub-ROMs are named after where they sit in the table:

  | M N | sub-ROM | rows     |
  |-----|---------|----------|
  | 0 0 | D       | 0–63     |
  | 0 1 | C       | 64–127   |
  | 1 0 | B       | 128–191  |
  | 1 1 | A       | 192–255  |

* **Multiplexers (`mux2to1`)**: 9-bit path selectors, `z = a·sel + b·sel'`,
  each bit made of two transmission gates in silicon. Mux 1 chooses A or B,
  and mux 2 chooses C or D, both controlled by N. Mux 3 chooses between them,
  controlled by M.
* **Output latch (`dff_reg`, W = 9)**: master-slave D flip-flops that trigger
  on the falling clock edge.

All four sub-ROMs and decoders work in parallel on every access. Only the mux
tree depends on the top two address bits.

## Timing

Only the latches are clocked, and both trigger on the **falling** edge:

1. The phase must be stable before a falling edge. At that edge, `rom256`
   latches the table word, and a 1-bit latch stores the sign beside it
   (`phase[11]`), so that the sign stays aligned with its word.
2. During the next half-cycles, `rom_to_dac` forms the 10-bit code from the
   latched word and sign.
3. At the next falling edge the 10-bit latch captures the code, and
   `dac_code` changes.

The latency is 2 clock periods, from the falling edge that samples the phase to
the falling edge that updates `dac_code`. The throughput is one sample per
clock. The target clock is 50 MHz. An accumulator that updates on the rising
edge gives the ROM path half a period of setup time. The RTL does not model
timing. There is no reset: `dac_code` is valid from the second falling edge
after the phase is valid.

## Files

| file | contents |
|------|----------|
| `rtl/dds_rom_pkg.sv` | sizes (`ROM_ADDR_W` = 8, `ROM_DATA_W` = 9, `SEG_ADDR_W` = 6, `DAC_W` = 10, `PHASE_W` = 12), the sub-ROM enum, the table function |
| `rtl/dds_rom_chip.sv` | top: pointer → ROM → converter → latch |
| `rtl/rom_pointer.sv` | quadrant folding of the phase |
| `rtl/rom256.sv` | four decoders, four sub-ROMs, mux tree, 9-bit latch |
| `rtl/tree_decoder.sv`, `rtl/rom64.sv`, `rtl/mux2to1.sv`, `rtl/dff_reg.sv` | leaf blocks |
| `rtl/rom_to_dac.sv` | sign and offset to the 10-bit DAC code |
| `tb/tb_*.sv` | one self-checking testbench per module |

## What follows the original design and what is this implementation's own

These parts follow the source design:

* the 256 × 9 quarter-wave table and its formula
* the four 64-word NOR sub-ROMs, each with a 6-to-64 tree decoder fed
  LSB-first
* the A/B/C/D selection table and the 9-bit 2:1 multiplexers
* the falling-edge master-slave flip-flops
* the converter between the ROM latch and a second latch before the 10-bit
  DAC

These parts are choices made here. The source design names the blocks, or
needs them, but does not describe them:

* **Phase folding (`rom_pointer`)**: the source design only says that the
  accumulator output goes through a "ROM pointer". The standard quarter-wave
  fold above is used, with `phase[11:10]` as the quadrant and `phase[9:2]` as
  the address.
* **Converter coding (`rom_to_dac`)**: the source design names a ROM-to-DAC
  converter from 9 to 10 bits but does not give its coding. Offset binary is
  used.
* **Sign latch**: a 1-bit latch keeps the sign aligned with the latched word.
* **No reset.**

Some parts of the source design are left out:

* **Sense amplifiers** on the ROM bit lines. They restore full logic levels,
  and in RTL the bit lines already have them.
* **Decoder line pull-downs and restoring inverters.** These are electrical
  details; in the model, unselected lines are simply 0.
* **Transmission gates as switches.** Each pair forms a path selector, which
  the RTL writes as an AND-OR.
* **The gate-level master-slave structure of the flip-flops.** It would
  create combinational loops; each latch bank is one `always_ff` instead.
* The accumulator, the DAC and the pad ring.

## Verification

Each testbench computes its expected values independently of the RTL, and
prints `TB_RESULT checks=N failures=M`:

* `tb_tree_decoder`: all 64 addresses; the word lines must be one-hot at the
  right index.
* `tb_rom64`: all four sub-ROMs, every row, compared with the formula
  evaluated with `$sin`. It also checks seven words from the published table
  and the all-high bit lines when no row is selected.
* `tb_rom256`: every address, twice, in two orders. It checks that the word
  appears at the falling edge and not before it, and counts the selections
  of each sub-ROM.
* `tb_mux2to1`, `tb_dff_reg`, `tb_rom_pointer` (all 4096 phases),
  `tb_rom_to_dac` (all 1024 inputs).
* `tb_dds_rom_chip`: end to end, at the default sizes. A phase accumulator
  is modelled in the testbench and runs with frequency words 1, 64, 37 and
  1000, changing words mid-run. Every output is compared with a directly
  computed full-period sine (`512 + round(s)` or `511 − round(−s)`,
  `s = 511·sin(2π(⌊phase/4⌋ + ½)/1024)`) taken two falling edges earlier.
  The number of sine periods must match the frequency word. The testbench
  counts every quadrant, address mirroring, the negative half, every
  sub-ROM, and both DAC extremes (0 and 1023), and it fails if any of them
  never occurs.

To run one, for example the end-to-end test:

    verilator --binary --timing -y rtl rtl/dds_rom_pkg.sv tb/tb_dds_rom_chip.sv \
        --top-module tb_dds_rom_chip -Mdir obj
    ./obj/Vtb_dds_rom_chip

Every testbench passes, and each one fails when a deliberate fault is put in
its module. Examples of such faults: swapped sub-ROMs, inverted mux select,
rising-edge latches, and an unlatched sign bit.

## Changing it

* **Table size:** `ROM_ADDR_W` and `ROM_DATA_W` in `dds_rom_pkg` set the table
  size and its amplitude (`2^ROM_DATA_W − 1`). `SEG_ADDR_W` sets the size of
  each sub-ROM. The mux tree in `rom256` is written for four sub-ROMs, so
  `ROM_ADDR_W − SEG_ADDR_W` must stay 2.
* **Phase width:** a wider accumulator only needs the `PHASE_BITS` parameter
  of `dds_rom_chip` and `rom_pointer`. The extra low bits are ignored, and
  `PHASE_BITS` must be at least `ROM_ADDR_W + 2`.
