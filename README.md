# WiMAX (IEEE 802.16e) channel deinterleaver with a floor-free address generator

A WiMAX receiver must undo the channel interleaver of the transmitter: within
each forward-error-correction block of Ncbps coded bits, received bit *n* has to
be put back at its original position *k(n)*. The standard defines that
position through two permutations built from floor and modulo operations on
Ncbps, which are awkward in hardware and usually end up in a look-up ROM per
block size.

This design computes the addresses instead. It uses the observation, from
the article *Algorithm Based FPGA Implementation of Address Generator for
WiMAX Deinterleaver*, that when the block is seen as a grid of d = 16 rows, the address
reduces to

    kn = d * col(i, j) + j

where *j* is the row, *i* the column, and `col` is a tiny function of *i* and
*j* that depends only on the modulation. Two counters, three small
column-term blocks, a multiplexer, a multiply-by-16 and an adder produce one
address per clock for every modulation, code rate and block size of the
standard. A pair of block memories used in ping-pong fashion turns those
addresses into a streaming deinterleaver.

## The address rule

The received bits of a block are numbered n = j·C + i, with C = Ncbps/d
columns, j = 0…15 the row and i = 0…C-1 the column. The standard's
deinterleaver is

    m = s·⌊n/s⌋ + (n + ⌊d·n/Ncbps⌋) mod s
    k = d·m − (Ncbps − 1)·⌊d·m/Ncbps⌋

with s = 1, 2, 3 for QPSK, 16-QAM and 64-QAM. Because ⌊d·n/Ncbps⌋ is just
the row j, and because the first step only moves n within its group of s
neighbours, which never crosses a row boundary (C is even for every 16-QAM
depth and a multiple of 3 for every 64-QAM depth), the second step always
lands in row j and collapses to k = d·(m − j·C) + j. What remains is the
column term:

| modulation | row j            | column i        | col       |
|------------|------------------|-----------------|-----------|
| QPSK       | any              | any             | i         |
| 16-QAM     | even             | any             | i         |
| 16-QAM     | odd              | even            | i + 1     |
| 16-QAM     | odd              | odd             | i − 1     |
| 64-QAM     | j mod 3 = 0      | any             | i         |
| 64-QAM     | j mod 3 = 1      | i mod 3 = 2     | i − 2     |
| 64-QAM     | j mod 3 = 1      | i mod 3 ≠ 2     | i + 1     |
| 64-QAM     | j mod 3 = 2      | i mod 3 = 0     | i + 2     |
| 64-QAM     | j mod 3 = 2      | i mod 3 ≠ 0     | i − 1     |

For 16-QAM the ±1 is the same as inverting bit 0 of i, so that block is a
single XOR with the parity of j. For 64-QAM the block forms i mod 3 and
j mod 3 of the 6-bit and 4-bit counter values and picks one of three sums.

Example, 576-bit 64-QAM block (C = 36), first rows and columns:

| j \ i | 0  | 1  | 2  | 3  | 4  |
|-------|----|----|----|----|----|
| 0     | 0  | 16 | 32 | 48 | 64 |
| 1     | 17 | 33 | 1  | 65 | 81 |
| 2     | 34 | 2  | 18 | 82 | 50 |
| 3     | 3  | 19 | 35 | 51 | 67 |

The rule only holds for the block depths below; it is not a general
permutation for arbitrary Ncbps.

## Block depths

`deint_depth_table` turns the modulation, the code rate and a size row into
Ncbps. Each (modulation, rate) pair has a one-slot depth, and row r of the
table is (r + 1) times that depth, up to 576 bits:

| modulation | rate | Ncbps for rows 0, 1, 2, …       |
|------------|------|---------------------------------|
| QPSK       | 1/2  | 96, 192, 288, 384, 480, 576     |
| QPSK       | 3/4  | 144, 288, 432, 576              |
| 16-QAM     | 1/2  | 192, 384, 576                   |
| 16-QAM     | 3/4  | 288, 576                        |
| 64-QAM     | 1/2  | 288, 576                        |
| 64-QAM     | 2/3  | 384                             |
| 64-QAM     | 3/4  | 432                             |

That gives 19 valid configurations. All other codes (rate 2/3 with QPSK or
16-QAM, a row past the end of a column, modulation code 3) are invalid.

Encodings (`deint_pkg`): `mod_t` QPSK = 0, 16-QAM = 1, 64-QAM = 2;
`rate_t` 1/2 = 0, 2/3 = 1, 3/4 = 2; the size row is 0…5.

## Address generator (`deint_addr_gen`)

```
  column counter i ──┬──────────────── QPSK (wire) ──┐
  (0..Ncbps/d-1)     ├── 16-QAM block ───────────────┤ M6  ── ×d (ML3) ──(+)── reg ── kn
                     └── 64-QAM block ───────────────┤ mux            (A6)  ^
  row counter j ─────┴── (to both QAM blocks) ───────┘ sel = mod         |
  (0..15, steps on column wrap) ─────────────────────────────────────────┘
```

The labels M6, ML3 and A6 name the multiplexer, multiplier and adder of the
original block diagram. Each clock with `en_i` high consumes one grid
position. The column counter steps every time. The row counter steps when
the column counter wraps. The address of that position is registered and
appears on `kn_o` one clock later with `kn_valid_o`. `kn_last_o` marks
position Ncbps−1. The modulation and the column count are taken at the first
position of a block and held until its end, so the configuration inputs may
change freely in mid-block. The multiply by d = 16 is written as a multiply;
synthesis reduces it to a shift.

## Ping-pong deinterleaver (`wimax_deinterleaver`)

Two single-port memories, M-1 and M-2 (`deint_ram`, 576 × 1 bit each),
alternate under a bank select `sel`:

* `sel = 1`: the incoming block is written into M-1 and the previous block
  is read from M-2;
* `sel = 0`: the other way round.

Each memory has one address port, so a multiplexer per memory, controlled by
`sel`, chooses between the write address and the read address. M-2's write
enable is the inverse of M-1's, and an output multiplexer picks the bank
being read. Received bit n is written at the generated address kn. The full
bank is then read at linear addresses 0…Ncbps−1, so the output comes out in
original order.

### Handshake and timing

* Input: `in_valid_i` / `in_ready_o` / `in_data_i`, one bit per accepted
  clock, with the configuration on `mod_i`, `rate_i`, `size_i`. The
  configuration is sampled with the first bit of each block.
* Output: `out_valid_o` / `out_data_o` / `out_last_o`, one bit per clock.
  There is no back-pressure.
* `sel` toggles when the write bank is complete and the read bank is either
  idle or reading its last word in that clock. With a continuous input and
  blocks of equal size, the deinterleaver accepts a bit every clock with no
  pause between blocks.
* **Stall:** if a block finishes writing while the reader is still emptying
  a larger previous block, `in_ready_o` stays low until the reader
  finishes.
* **Refused configuration:** while the generator is at the start of a block
  and the inputs select an invalid configuration, `cfg_err_o` is high and
  `in_ready_o` low.
* **Latency:** the first bit of a block appears three clocks after the
  clock that accepted its last input bit, or straight after the previous
  block's last bit, whichever is later. The three clocks are one each for
  the address register, the bank swap with read issue, and the synchronous
  memory read. With an idle reader, the last bit of a block therefore
  leaves Ncbps + 2 clocks after its last input bit was accepted.
* Reset is synchronous and active low. After reset `sel = 1`, so the first
  block goes into M-1. Memory contents are not reset. A bank is only read
  after a complete block has been written into it.

An assertion in the top checks that every write address lies inside the
current block, and that the last write of a block happens with the bank
marked full.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `D` (all modules) | 16 | number of rows. The column-term rules and the depth table assume 16. |
| `DEPTH` (`wimax_deinterleaver`, `deint_ram`) | 576 | words per bank. This is the largest Ncbps. |
| `DW` | 1 | bits per word. Use it for soft-decision samples instead of hard bits. |

The shared widths in `deint_pkg` (6-bit column, 4-bit row, 10-bit address)
follow from 576 and 16.

## What follows the article and what is this design's own

These parts follow the article:

* the grid view and the three column rules;
* the column and row counters;
* the QPSK, 16-QAM and 64-QAM blocks;
* the modulation multiplexer, the multiply by d and the final adder;
* the set of block depths;
* the two-memory structure with `sel`, the address multiplexers, the
  inverted write enable and the output multiplexer.

The article gives no pipeline, handshake, reset or encoding. These are this
design's own choices:

* the output register of the address generator;
* the configuration hold;
* the valid/ready input and the swap/stall rule;
* the refusal of invalid configurations;
* synchronous memory reads;
* one bit per word.

The article says the received data is written while the other memory is
read, but not which side uses the generated address. Here the generator
supplies the write address and the read side counts linearly. The opposite
assignment (linear write, read at kn) turns the same structure into the
transmit-side interleaver. That mode is not built.

The 64-QAM rows with j mod 3 = 2 and i mod 3 ≠ 0 use d·(i−1) + j. This is
the value the standard's formulas give and what the article's example
addresses show.

The article's results come from a Spartan-3 FPGA implementation. This RTL
was not synthesised for an FPGA, so its resource use and clock rate are
not compared with those figures. The rest of the transceiver (randomiser,
RS-CC codec, mapper, FFT and so on) is outside this design. The
deinterleaver's input and output are plain ports.

## Files

| file | contents |
|------|----------|
| `rtl/deint_pkg.sv` | widths, `mod_t`, `rate_t` |
| `rtl/deint_depth_table.sv` | Ncbps and Ncbps/d per configuration |
| `rtl/deint_col_counter.sv`, `rtl/deint_row_counter.sv` | grid counters |
| `rtl/deint_qam16_block.sv`, `rtl/deint_qam64_block.sv` | column terms |
| `rtl/deint_addr_gen.sv` | complete address generator |
| `rtl/deint_ram.sv` | one block memory |
| `rtl/wimax_deinterleaver.sv` | top: ping-pong deinterleaver |
| `tb/deint_ref_pkg.sv` | reference: depth list, the standard's interleaver and deinterleaver formulas |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

The reference model in `tb/deint_ref_pkg.sv` does not reuse the RTL's case
split. It evaluates the standard's two-step formulas directly:

* interleaver: m = (Ncbps/d)·(k mod d) + ⌊k/d⌋, then
  j = s·⌊m/s⌋ + (m + Ncbps − ⌊d·m/Ncbps⌋) mod s;
* deinterleaver: the formula in "The address rule" above.

What each testbench checks:

* `tb_deint_depth_table`: all 128 input codes, and that exactly 19 are
  valid.
* `tb_deint_col_counter`, `tb_deint_row_counter`: random enable and clear
  against a model counter.
* `tb_deint_qam16_block`, `tb_deint_qam64_block`: every grid position of
  every depth of their modulation, against the deinterleaver formula.
* `tb_deint_addr_gen`: all 19 configurations with random enable gaps and
  scrambled mid-block configuration inputs. It checks every address, the
  last flag and the one-clock latency. It also checks the first 4 × 5
  addresses of three example blocks: 96-bit QPSK 1/2, 192-bit 16-QAM 1/2
  and 576-bit 64-QAM 3/4.
* `tb_deint_ram`: a full write/read pass and random mixed access.
* `tb_wimax_deinterleaver` (default parameters): 29 blocks, covering all 19
  configurations, random repeats and a final run of four equal gap-free
  blocks that must stream without a stall. It interleaves random data with the
  standard's forward permutation and expects the original order back. It
  checks the exact clock of each block's first output bit. It counts, and
  requires at least once each:
  * bank swaps in both directions;
  * a stall;
  * a refused configuration;
  * simultaneous write and read;
  * back-to-back blocks;
  * input gaps;
  * blocks of each modulation.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/deint_pkg.sv tb/deint_ref_pkg.sv tb/tb_wimax_deinterleaver.sv \
    --top-module tb_wimax_deinterleaver
./obj_dir/Vtb_wimax_deinterleaver
```

For another testbench, substitute its name. `deint_ref_pkg.sv` is only
needed by the testbenches that import it. Every testbench runs in well under
a second.
