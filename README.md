# Row-control logic for a 168 × 168 pixel sensor

This RTL models the digital logic that sits beside the pixels of a 168 × 168
monolithic pixel sensor built for particle detection. During a bunch train every
pixel's hit output is sampled on a fixed time grid. Each sample that saw a hit
is stored locally as a time-stamped word, and the stored words are read out
after the train. A separate chain of shift registers programs, and reads back,
each pixel's threshold trim and mask bits.

The hit path has three ideas:

* **Double-edge sampling.** A ping-pong latch-hold cell captures the hit on
  *both* edges of the `Hold` signal. `Hold` only has to toggle once per
  sampling interval (150 ns), yet every interval gets a sample.
* **Sparse storage by bank.** The 42 pixels a row block serves form 7 banks of
  6. Only banks that saw something are written, one 22-bit word each:
  `{timecode[12:0], bank code[2:0], hit pattern[5:0]}`.
* **A shift-register memory read backwards.** Each row block keeps its words
  in a 20-stage bidirectional shift register. Writes push words in, and reads
  pull them back out of the same end, newest first. At the bottom of each
  column a passive row encoder reports which row is driving the readout bus.

## Hierarchy

```
fdr_top
├── config_array            FAST / SLOW / READBACK configuration registers
├── master_controller       Hold, timecode, sample strobe, readout sequencing
└── per logic column (4) ──┬── hit_row × 168     one per pixel row
                           │   ├── latch_hold (42 cells)
                           │   ├── mux6x7
                           │   └── sram_bidir_shift (20 × 22 bit)
                           └── column_readout
                               └── row_encoder (168 rows)
```

`fdr_pkg` holds the shared widths, the hit-word struct `hit_word_t`, the bank
code table and the row-code function. Each file begins with a description of its
module's behaviour, interface and timing.

## From a pixel hit to a stored word

1. **Mask.** A pixel whose MASK configuration bit is 1 is ignored.
2. **Latch-hold.** See the next section. The output holds the hit state that
   was present at the last `Hold` edge.
3. **Sample strobe.** `master_controller` toggles `Hold` every `HOLD_CYCLES`
   clocks (15 clocks = 150 ns at 100 MHz). Each toggle advances the 13-bit
   timecode, so the first sample of an acquisition is stamped 1.
   `SETTLE_CYCLES` later a one-clock `sample_strobe` goes to every row.
4. **Bank selection (`mux6x7`).** On the strobe, each row block marks as
   pending every bank that has at least one hit. With the active-low
   `override_b` asserted, every bank is marked, hits or not. Then one pending
   bank is written per clock, starting at the highest bank position.
   `DataValid` is high while a write happens. With no valid bank the data code
   rests at zero, as the pulled-down bus of the silicon does. A sample with k
   hit banks therefore keeps a row busy for k clocks, so a sampling interval
   must be longer than `SETTLE_CYCLES + 7` clocks. An assertion in
   `master_controller` checks this.
5. **Row memory (`sram_bidir_shift`).** The word is pushed into stage 0 and
   every stored word moves one stage deeper. A valid bit travels with each
   word, and the OR of all 20 valid bits says whether the row holds data. A
   push into a full memory drops the deepest, oldest word and pulses `overflow`.

The bank codes for positions 0 to 6 are `100 101 111 110 010 011 001`. Bank 0
holds the first six pixels of the 42: pixel `p` of a logic column is bit `5 - p % 6` of
bank `p / 6`, so a printed pattern reads left to right in pixel order.

## The ping-pong latch-hold cell

`latch_hold` has two storage paths:

| `hold` | path A (upper)          | path B (lower)          | `latched_hit` |
|--------|-------------------------|-------------------------|---------------|
| 0      | tracks `hit_in`         | holds falling-edge hit  | path B        |
| 1      | holds rising-edge hit   | tracks `hit_in`         | path A        |

At every edge the path that was tracking freezes and becomes the output, and
the other path starts tracking. The output therefore always equals the input at
the last edge and is stable for a whole half period. That is what the write
sequencer relies on.

`safe_b` (active low) puts the cell in a power-down state. It forces path A's
storage node to "no hit". The result is the cell's state table:

| `hold` | `safe_b` | behaviour                                   |
|--------|----------|---------------------------------------------|
| 0      | 0        | incorrect: a hit at the next rising edge is lost |
| 0      | 1        | latched                                     |
| 1      | 0        | safe power-down: output 0                   |
| 1      | 1        | latched                                     |

So `safe_b` may only be taken low while `hold` is high. It should be released
before the next rising edge whose sample matters.

The storage elements are real level-sensitive latches (`always_latch`), because
that is what the cell is. Linters report them as latches, which is intended.
The cell's charge storage, hold time and supply current are analog properties
and are not modelled. A `WIDTH` parameter builds a row of cells that share
`hold` and `safe_b`.

## Readout and the row encoder

After `acquire` falls and all writes have finished, a `readout_start` pulse
puts the controller in the reading state. Each logic column then reads on its
own, one word per clock:

* `column_readout` raises `RowReadActive` for the lowest-numbered row that
  still holds data. It pops that row's port word and registers it.
* `row_encoder` turns the RowReadActive lines into the 9-bit address of that
  row. In silicon each row has fixed pull-down transistors onto a precharged
  column bus. In the RTL the bus is the bitwise AND of the codes of all active
  rows, and all ones when no row is active.
* Row `r` has the reflected Gray code of `r` as its address: row 0 is
  `000000000` and row 167 is `011110100`. Bit 8 of every code is 0, so the
  idle all-ones bus is never a valid address. `valid` reports this.

Because the memory is last-in first-out, a row returns its newest sample
first. Within one sample the banks come out in position order 0..6, because
they were written highest position first. When no memory holds data,
`readout_done` pulses.

## Configuration registers

Each pixel holds five configuration bits: Trim0..Trim3 for its analog
threshold and MASK. `config_array` loads them through three shift registers,
each with its own shift enable and active-low reset:

* **FAST**: one stage per column, shifted from `config_in` to `config_out`.
* **SLOW**: one per column, running down through the column's 168 pixels with
  5 stages per pixel. On `slow_shift` every column takes its FAST bit in at the
  top, and everything moves down one stage.
* **READBACK**: one stage per column at the bottom. `parallel_load` captures the
  bits leaving every column, and `readback_shift` moves them out towards
  `readback_out`, with `test_in` entering at the far end.

To program the array:

1. Start from the bottom row. For each row load Trim0, Trim1, Trim2, Trim3,
   then MASK.
2. For each of those bits, shift the 168 column bits into FAST, last column
   first, then give one `slow_shift`.
3. After `168 × 5` such steps each pixel holds, from top to bottom, MASK,
   Trim3, Trim2, Trim1, Trim0.
4. Optionally, pad FAST with zeros.

`pixel_cfg[row][j][column]` exposes the stored bits in that order. `fdr_pkg`
names the bit positions `CFG_MASK` and `CFG_TRIM3`..`CFG_TRIM0`.

A full readback repeats `parallel_load`, 168 readback shifts and one
`slow_shift` for each of the 840 stages. The bottom pixel's Trim0 comes out
first. A single `parallel_load` without a slow shift reads the bottom stage
without disturbing the configuration.

## Parameters and sizes

| parameter       | default | meaning                                      |
|-----------------|---------|----------------------------------------------|
| `ROWS`          | 168     | pixel rows; row blocks per logic column      |
| `PIXEL_COLS`    | 168     | pixel columns; `PIXEL_COLS / 42` logic columns |
| `SRAM_DEPTH`    | 20      | words per row memory                         |
| `HOLD_CYCLES`   | 15      | clocks per `Hold` level (150 ns at 100 MHz)  |
| `SETTLE_CYCLES` | 1       | clocks from a `Hold` toggle to the strobe    |

At the defaults the design has 672 row blocks, each with 20 × 22 memory bits
and 42 latch-hold cells, and 141,120 configuration flip-flops.

## Where this RTL makes its own choices

The array size, the 42-hit row block with 7 banks of 6, the bank codes, the
22-bit word with the timecode in the upper bits, the 20-word memory, the
168-entry row encoder, `Hold` toggling every 150 ns, active-low OVERRIDE and
SafeB, and the three configuration registers with their load order all come
from the chip's design. The following are choices made here:

* **Clocking.** The silicon clocks its shift registers with two-phase clocks
  (phi1, phi2) and its SRAM cells with three phases. Here every register uses
  one clock edge per shift, and `clk` is assumed to run at 100 MHz.
* **Logic columns.** Each 168-pixel row is split into four logic columns of 42
  pixels, with a readout and row encoder per column. The pixel-to-bank mapping
  is as given above.
* **OVERRIDE.** Only its polarity is known. Here it forces every bank to be
  written, which is useful for testing the memories.
* **Safe mode.** It is modelled as forcing path A to "no hit", which reproduces
  the cell's state table.
* **Sequencing.** The write order (highest bank first), one write per clock,
  the lowest-row-first readout scan, losing the oldest word on overflow, and
  the controller's state machine and interface were all chosen here.
* **Memory encoding.** Memory contents are stored as true values. The silicon
  reads some fields back complemented, for example the timecode, and that raw
  encoding is not reproduced.
* **Outside this RTL.** The pixel front end, monostables, sense amplifiers,
  clock and control buffers, and pads are analog or physical. `pixel_hit`
  stands in for the front ends' outputs, and the trim bits leave on
  `pixel_cfg`.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. A watchdog stops it if it hangs. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/fdr_pkg.sv tb/tb_fdr_top.sv --top-module tb_fdr_top -o sim
./obj_dir/sim
```

Substitute any other testbench name. The block testbenches are:

* `tb_row_encoder`: all 168 codes, uniqueness, the idle bus and the wired AND.
* `tb_latch_hold`: double-edge sampling against a model, and the safe-mode
  table.
* `tb_mux6x7`: random patterns against a selection model.
* `tb_sram_bidir_shift`: random pushes and pops against a LIFO model,
  including overflow.
* `tb_hit_row`: the three-sample sequence with 11 words, checking write cycles
  and readout order, then override and overflow.
* `tb_master_controller`: the `Hold` period, timecode and strobe timing.
* `tb_column_readout`: scan order, addresses and one word per clock.
* `tb_config_array`: full-size programming, every pixel checked, full
  readback, and the `test_in` path.

`tb_fdr_top` runs the whole design at its default size. It:

* programs random trims and about 6 % masked pixels through the configuration
  registers and checks them;
* runs 16 samples of random hits, with one safe-mode sample and three override
  samples that make every row memory overflow;
* reads out all 13,440 words and compares each word and row address with a
  reference model.

It counts each mechanism (masking, safe mode, override, overflow, multi-bank
writes, row switching in the readout) and fails if any never occurred. It builds
in about a minute and simulates in under a minute.
