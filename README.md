# Error-correcting reversible-cell SRAM with a clock-split memory self-test

This design is a small embedded memory that protects itself two ways.
Each stored word carries a *decimal matrix code* (DMC), which corrects a
burst of flipped bits in a word when it is read. A built-in self-test
(BIST) can also take over the memory, write and read every word, and
report what it finds. The self-test's address generator is built to
switch as little as possible. It is split into two parts that run on
separate, gated clocks. The upper part changes one bit per address. The
lower part is clocked only once every four addresses.

The memory array is made of one-bit cells described at gate level as
reversible logic: a Fredkin gate (controlled swap) and a Feynman gate
(controlled NOT). The default configuration is 32 words of 32 data bits,
plus 36 check bits per word.

```
            background           start / done / fail / counters
                |                        |
          +-----v------+   inv    +------v---------+
          | data_gen   |<---------| bist_controller|------ ag_init/ag_step
          +-----+------+          +--+---------+---+            |
                | pattern      we    |  cmp_valid         +------v----------+
                |      +-------------+  |                 | ldmlt_addr_gen  |
  func port ----+------+--> mode mux <--+-----------------+ ring (clock-2)  |
                          |  addr/we/wdata                | LFSR (clock-1)  |
                   +------v-----------------------------+ +-----------------+
                   | ft_memory                          |
                   |  wdata --> [mux] --> dmc_encoder --+--> H,V --> redundancy SRAM (32x36)
                   |             ^  (reused on reads)   |
                   |  info SRAM (32x32) --read--+       |
                   |                            v       |
                   |  dmc_decoder: syndrome -> locator -> corrector --> rdata
                   +------------------------------------+
                          | rdata, err, sym_err
                   +------v-----+
                   | comparator |--> fail, fail_addr, mismatch/detect/correct counts
                   +------------+
```

## The decimal matrix code

The code protects a 32-bit word `D[31:0]`. The word is cut into eight
4-bit *symbols*. Symbol `j` is `D[4j+3:4j]`. The symbols are laid out,
only logically, as a 2 x 4 matrix:

```
             column 3   column 2   column 1   column 0
  row 0:     sym 3      sym 2      sym 1      sym 0        H[9:0]
  row 1:     sym 7      sym 6      sym 5      sym 4        H[19:10]
             V[15:12]   V[11:8]    V[7:4]     V[3:0]
```

**Horizontal check bits** come from adding symbols as plain unsigned
integers. This is the "decimal" part of the name: the symbols are added as
numbers, not XORed. In each row, the symbols two columns apart form a
pair, and each pair has a 5-bit sum:

| field      | sum             |
|------------|-----------------|
| `H[4:0]`   | sym0 + sym2     |
| `H[9:5]`   | sym1 + sym3     |
| `H[14:10]` | sym4 + sym6     |
| `H[19:15]` | sym5 + sym7     |

**Vertical check bits** are the XOR of the two rows, column by column:
`V[i] = D[i] ^ D[i+16]`.

So a word carries 20 + 16 = 36 check bits. They are stored in a separate
*redundancy* array, next to the 32-bit *information* array.

**Decoding.** On a read, the check bits are recomputed from the word as
read. This gives `H'` and `V'`. The syndrome has two parts:

* `dH = H' - H` for each of the four fields (integer subtraction, 5 bits);
* `S = V' ^ V` (16 bits, 4 per column).

A symbol is declared wrong when two things hold: the `dH` of its field is
non-zero, and the `S` bits of its column are non-zero. It is then
corrected by XORing in the `S` bits of its column. If only one symbol of a
column is hit, `S` for that column is exactly the pattern of flipped bits.
Examples:

* An error pattern `0111` in symbol 2 of `F5AFF6AC` changes the word to
  `F5AFF1AC`. It makes `dH[4:0]` non-zero and `S[11:8] = 0111`, so
  symbol 2 is restored.
* Any upset confined to one symbol is corrected, whatever its bit
  pattern.
* A burst along one matrix row is corrected when each hit symbol of the
  row lies in a different horizontal field. For example, symbols 0 and 1
  can both be hit.
* Two symbols of the *same* column (for example symbols 0 and 4) cannot be
  separated, because their flips cancel or mix in `S`. The word then
  comes out wrong, and `err` is set.
* Hits in different rows *and* columns can mislead the locator: with
  symbols 3 and 5 hit, symbol 1 shares a field with 3 and a column with
  5, so it is also "corrected".
* An error in the check bits alone sets `err` and leaves the data
  unchanged.

**Other geometries.** The encoder, decoder, coded memory and top level
take the matrix shape as parameters:

* `K1` rows and `K2` columns of symbols;
* `M` bits per symbol, so the word is K1·K2·M bits wide;
* `K2` must be even.

In each row, column `c` is paired with column `c + K2/2`. Each vertical
bit is the XOR of its bit column over all `K1` rows. The word then has
K1·(K2/2)·(M+1) + K2·M check bits:

| matrix  | symbol bits | word bits | check bits |
|---------|-------------|-----------|------------|
| 2 x 4   | 4           | 32        | 36 (default) |
| 2 x 8   | 4           | 64        | 72         |
| 4 x 4   | 2           | 32        | 32         |
| 2 x 2   | 8           | 32        | 34         |

Wider symbols catch longer bursts inside one symbol. More symbols per
row give more independent fields.

**Encoder reuse.** There is only one encoder. While the write strobe is
high, it encodes the incoming word, and its outputs are written to the
redundancy array. Otherwise it encodes the word coming out of the
information array. Its outputs are then the recomputed `H'`/`V'` that the
decoder compares with the stored bits. The encoder's enable is therefore
simply the read/write direction (`ft_memory`).

## Address generation with split clocks

For 2^N rows (N = 5 by default), the address is `{Q1, Q2, L}`.

* **Q1, Q2** (the two MSBs) come from a two-flip-flop ring. FF1 takes
  the inverted output of FF2, and FF2 takes FF1. It runs through
  `00, 10, 11, 01`: each output is the clock divided by four, the two a
  quarter period apart, and only one bit changes per step
  (`clock_splitter`).
* **L** (the N-2 LSBs) is an LFSR with characteristic polynomial
  1 + x + x^(N-2). Stage `R[i]` shifts into `R[i-1]`, and the top stage
  takes `R[N-3] ^ R[0]`. A maximal LFSR never reaches the all-zero state.
  A second XOR term, active when the upper stages are all zero, splices
  that state in. The LFSR therefore walks all 2^(N-2) values
  (`mlt_lfsr`).

The two parts have their own clocks, each made by a latch-based clock
gate (`clock_gate`) from the one input clock:

* **Clock-2** pulses on every address step and drives the ring.
* **Clock-1** pulses only on the step where the ring leaves `01` and wraps
  to `00`, and drives the LFSR. So it is the step clock divided by four.

Neither clock pulses while the generator is idle. The LFSR's flip-flops
receive one clock edge per four addresses and toggle at most that often.
The ring changes one bit per address.

The combined sequence visits every one of the 2^N addresses exactly once
in 2^N steps. It then returns to its first address, `{00, 001}`. For N = 5
the lower part runs `001, 000, 100, 110, 111, 011, 101, 010`.

The polynomial must be primitive at width N-2. Trinomials 1 + x + x^n are
primitive for n = 2, 3, 4, 6, 7, 15, …. Valid address widths are therefore
N = 4, 5, 6, 8, 9, …. Other widths give a shorter cycle, and the test
would miss rows.

## The reversible SRAM cell and array

Each cell (`rev_sram_cell`) has a word line `wl`, a data input and one
output.

* The Fredkin gate's control input is the word line. Its output
  `wl ? data : stored` feeds a Feynman gate whose second input is tied
  to 1.
* One Feynman output (the stored value itself) feeds back into the
  Fredkin gate.
* The other output (stored XOR 1) is the cell output. It is therefore the
  *complement* of the stored bit.

Logically the cell is a latch: it is transparent while `wl` is high and
holds while `wl` is low. It is written as `always_latch`. The
gate-diffusion-input transistor implementation of the gates is below the
level of this RTL.

`gdi_sram` arranges ROWS x WIDTH cells:

* Writes: a one-hot row decoder (`addr_decoder`, 5 x 32) turns the
  address, gated by `we`, into word lines.
* Reads: reads are asynchronous. The addressed row's outputs are selected
  and inverted back to true data.

As with any latch array, `addr` and `wdata` must be steady while `we` is
high. The controller and the functional port both drive them from the
same clock edge.

## Self-test sequence

`bist_controller` runs four passes, one address per clock:

1. write the background (`data_generator`, e.g. `F5AFF6AC`) to every
   address;
2. read every address and compare the *corrected* word with the
   background;
3. write the complemented background;
4. read and compare with the complement.

It then holds `done` until the next `start`. Each pass ends when the
address generator flags its last address, and the generator is restarted
for the next pass. A run takes 4 x 2^N + 1 clocks from the edge that
samples `start`: 129 clocks for 32 rows.

The `comparator` keeps:

* a sticky `fail` flag (the word was still wrong after correction);
* the first failing address;
* saturating counts of:
  * words that failed;
  * words with a non-zero syndrome (detected);
  * words in which symbols were corrected.

A memory with a correctable upset therefore *passes*, but shows non-zero
detect and correct counts. An uncorrectable one fails and names the
address.

## Top level: `mbist_top`

| port group | signals | notes |
|---|---|---|
| clock/reset | `clk`, `rst_n` | asynchronous active-low reset |
| mode | `test_mode` | 1: BIST drives the memory, 0: functional port |
| BIST | `start`, `background`, `bist_state`, `bist_busy`, `bist_done`, `bist_fail`, `bist_fail_addr`, `bist_mismatch_cnt`, `bist_detect_cnt`, `bist_correct_cnt` | |
| functional | `func_addr`, `func_we`, `func_wdata`, `func_rdata`, `func_rdata_raw`, `func_err`, `func_sym_err` | asynchronous read; write in the cycle `func_we` is high |
| upset injection | `flip_en`, `flip_addr`, `flip_mask` | XORs `flip_mask` into the word read from `flip_addr`; tie `flip_en` low in use |

Parameters:

* `ROWS`: default 32. It must be a power of two, and log2(ROWS) - 2 must
  be a primitive-trinomial width.
* `CW`: counter width, default 8.
* `K1`, `K2`, `M`: code geometry, default 2, 4, 4. The word width is
  K1·K2·M.

## Where this RTL goes beyond, or departs from, its source description

The block structure, the DMC geometry for a 32-bit word, encoder reuse,
the two-flop clock-splitting ring, the (N-2)+2 split of the address LFSR
with its polynomial, and the Fredkin/Feynman cell follow the published
description the design is based on. The following are choices made here:

* **Test algorithm.** The source names a BIST controller, data generator
  and comparator but gives no test sequence. The background/complement
  write–read passes are this design's.
* **Low-transition output network.** The source's low-transition LFSR also
  has a small state machine (two enables) and a row of XOR gates as a
  "data selector", but does not define them. They are not built. The
  enable role is played by the split clocks.
* **Word width vs. array figure.** The array is also shown with 8 cells
  per row, while the example run uses a 32 x 32 memory and a 32-bit coded
  word. 32 bits are used.
* **Default matrix.** The source's stated final choice is a 2 x 8 matrix
  of 4-bit symbols, which implies a 64-bit word. Its worked example and
  its simulation use 32-bit words in a 2 x 4 matrix. The 2 x 4 matrix is
  the default, and `K2 = 8` gives the 2 x 8 code.
* **Redundancy counts.** The source quotes redundancy counts for several
  matrices. Its 32 (4 x 4, 2-bit symbols) agrees with the formula above.
  Its 72 agrees for 2 x 8, although it is quoted for 2 x 4. Its 80 for
  2 x 2 with 8-bit symbols does not agree: this pairing rule gives 34.
* **Symbol pairing.** Which symbol pairs share a horizontal field is
  printed only for two pairs, (0,2) and (5,7). The pairs (1,3) and (4,6),
  and the order of the fields in `H`, follow by symmetry.
* **Cell details.** The Fredkin output that feeds the Feynman gate, and
  hence the complemented cell output, are a reading of the cell diagram
  using the textbook gate definitions.
* **Additions.** Mode multiplexer, functional port, upset injection, the
  error flags and counters, and reset values.

No timing, area or power figure of the source is reproduced or checked.
The latch-based array and clock gates would need a proper memory compiler
or timing constraints in a real implementation.

## Files

`rtl/`:

| file | contents |
|---|---|
| `mbist_pkg.sv` | DMC geometry, symbol/field mapping functions, BIST state type |
| `mbist_top.sv` | top level |
| `bist_controller.sv`, `data_generator.sv`, `comparator.sv` | self-test |
| `ldmlt_addr_gen.sv`, `clock_splitter.sv`, `mlt_lfsr.sv`, `clock_gate.sv` | address generator |
| `ft_memory.sv`, `dmc_encoder.sv`, `dmc_decoder.sv` | coded memory |
| `gdi_sram.sv`, `addr_decoder.sv`, `rev_sram_cell.sv` | array |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb_mbist_top` runs the whole design at its default size. It covers:

* a clean test with background `F5AFF6AC`, checking the 129-clock length
  and that every address was written;
* the same test with the `0111` upset in symbol 2 of one word, which must
  pass with two detections and two corrections;
* an uncorrectable same-column upset, which must fail at the right
  address;
* functional reads and writes, including a corrected read;
* mode switches.

It counts each of these mechanisms and fails if one never happens.

`tb_dmc_geometries` runs the encoder and decoder at the four matrix
shapes of the table above. The helper `dmc_geom_check` holds the checks
for one shape.

`tb_mbist_top_wide` builds the whole design with the 2 x 8 code (64-bit
words, 72 check bits each). It runs a clean test, a corrected upset in
symbol 9 and a failing same-column upset in symbols 0 and 8.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/mbist_pkg.sv tb/tb_mbist_top.sv --top-module tb_mbist_top -o sim
./obj_dir/sim
```

Replace `tb_mbist_top` with any other testbench name to test one block.
The simulator has two states: the array and all other uninitialised
storage start with arbitrary values, which the tests rely on not
mattering. All testbenches finish in well under a second.

For lint: `verilator --lint-only -Wall -y rtl +libext+.sv rtl/mbist_pkg.sv
rtl/mbist_top.sv`. The latches it and synthesis tools report are
intended:

* the memory cells;
* the enable latches of the two clock gates.
