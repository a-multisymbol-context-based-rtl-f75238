# Two-symbol context-based arithmetic encoder for MPEG-4 shape coding

MPEG-4 codes the shape of a video object as binary alpha blocks (BABs): 16x16
bitmaps that say, pixel by pixel, whether the pixel belongs to the object.
Each pixel is coded with context-based arithmetic encoding (CAE). A template of
already-coded neighbours forms a 10-bit context (INTRA mode) or a 9-bit context
(INTER mode, which also uses the motion-compensated BAB of the previous frame).
The context indexes a table that gives the probability of a 0, and that
probability drives a multiplicative binary arithmetic coder. The coder is
serial by nature: every symbol changes the coder's range `R` and lower bound
`L`, and the next symbol needs the result.

This design breaks part of that serial chain without changing a single output
bit. It rests on one observation. Inside and outside an object, whole runs of
pixels have a context that is all zeros or all ones. For those two contexts
the probability of the less probable symbol (cLPS) is a small fixed constant,
so "multiply the range by cLPS" reduces to a few shifts and adds. The encoder
therefore:

* codes an ordinary symbol in one clock with a full 16x16 multiplier (**RU**);
* codes *two* successive symbols in one clock (**RU2**) when both have the same
  all-0 or all-1 context. RU2 chains two constant-multiplier range updates.

The output is bit-identical to a one-symbol-per-clock coder. Only the clock
count drops, by one clock for every pair coded together. How much that saves
depends on the shape: smooth shapes with long uniform runs gain most.

## Block overview

```
            host writes rows            host writes tables
                  |                            |
        +---------v--------+   +---------------v-----+
        | cae_bab_buffer   |   | cae_prob_table      |
        | 20x20 + 18x18    |   | 1K x16 INTRA        |
        | row/column read  |   | 512x16 INTER        |
        +---------+--------+   +----------^----------+
                  | line + line_ready        | ctx(X)        c0
        +---------v--------+             |               |
 CG     | cae_context_gen  |-------------+               |
        | 3 line registers |  ctx(X), ctx(X'), X, X'     |
        | counter +1 / +2  |----------> cae_ru2_ctrl     |
        +------------------+            pair? clps_sel   |
                                               |         |
 PL     ===================== pipeline registers ===================
                                               |
 RU     cae_range_update:  RU (cae_ru) | RU2 (cae_ru2 + 8x cae_cu) | RN (cae_rn)
        R, L, bits_to_follow; stalls CG/PL while renormalising
                  |  {code bit, bits_to_follow}
                  v
        cae_rn_buffer (8 entries)  ->  cae_bitstream_gen  ->  cae_bitstream_buffer
                                       (expands runs)          (2 x 298 bits)
```

`cae_top` connects these blocks and adds the control and status registers.
Shared constants and types are in `cae_pkg`.

## When two symbols go together

`cae_ru2_ctrl` pairs the current symbol X with the next one, X', in the same
line, and sends the pair to RU2 only if all of these hold:

1. Two-symbol processing is enabled (`ms_en`).
2. X is not the last pixel of its line. Pairs never cross a line end.
3. The context of X is all zeros or all ones.
4. X' has exactly the same context.
5. X' is the more probable symbol (MPS) of that context: 0 for the all-0
   context, 1 for the all-1 context.

Condition 5 also makes X an MPS, because X is the bit `c0` of the context of
X'. It is needed because RU2 only implements the MPS update,
`R <- R - R[31:16]*cLPS`. An MPS leaves `L` unchanged, so the pair only
touches `R`. The four constants are:

| context        | cLPS | built in `cae_cu` as                 |
|----------------|------|--------------------------------------|
| INTRA, all 0   | 269  | 256 + 8 + 4 + 1                      |
| INTRA, all 1   | 235  | 256 - 16 - 4 - 1 (signed digits)     |
| INTER, all 0   | 4    | 4                                    |
| INTER, all 1   | 14   | 16 - 2 (signed digits)               |

`cae_ru2` has two rows of four constant units. The first row gives `R` after
X, the second gives `R` after the pair. The `pred_type` (INTRA/INTER) and
`clps_sel` (all-0/all-1) inputs pick the column.

The probability tables must hold the matching values in their end entries,
or RU and RU2 would code the same symbol differently:

| table entry | c0 (probability of a 0) |
|-------------|-------------------------|
| INTRA[0]    | 65267 (= 65536 - 269)   |
| INTRA[1023] | 235                     |
| INTER[0]    | 65532 (= 65536 - 4)     |
| INTER[511]  | 14                      |

## Pipeline and stalls

There are three stages.

* **CG** (`cae_context_gen`): holds three bordered lines of the current BAB
  and three of the motion-compensated BAB. A counter marks the template
  position. It gives the contexts of X and X' and their pixel values. The
  counter advances by one, or by two for a pair.
* **PL** (inside `cae_top`): looks up `c0` for X, decides pair or single in
  `cae_ru2_ctrl`, and registers c0, both symbols, the pair flag, `clps_sel`
  and an end-of-BAB flag.
* **RU** (`cae_range_update`): holds `R`, `L` and `bits_to_follow`. Each clock
  it does exactly one thing, in this priority order:
  1. one renormalisation iteration, if the last update left `R` below
     QUARTER;
  2. the stored second symbol of a split pair (see below);
  3. one of the two termination clocks after the last symbol;
  4. take a new single symbol or pair from PL.

PL hands over to RU with a valid/ready handshake. `in_ready` is high only in
case 4. While it is low, PL holds its register and CG does not advance. This is
how renormalisation stalls the pipeline.

There are three stall sources:

| cause | effect |
|-------|--------|
| renormalisation | one clock per iteration; CG and PL wait |
| renormalisation buffer full | the RN iteration waits. In `cae_top` this cannot happen: the bitstream generator drains one entry per clock and RN produces at most one. The unit testbench of the range update exercises it. |
| BAB line not yet written | CG's `valid` stays low until the host has written the line it needs |

### The split pair

Sometimes the first symbol of a pair already brings `R` below QUARTER. X' must
not then be coded with the un-renormalised range. RU applies only X (using
RU2's first-row result), stores X' and its probability in `pend_sym`/`pend_c0`,
and runs the renormalisation. It then codes X' through the ordinary RU in an
extra clock. CG has already moved past both symbols, which is why the stored
copy is needed. A split pair costs the same as two single symbols. The
`stat_splits` counter records how often this happens.

If only the *second* symbol of a pair needs renormalisation, nothing special
happens. RN runs after the pair, exactly as after a single symbol.

### Clock count

For an N x N BAB (N = 16, 8 or 4), the clocks from `start` to `done` are
exactly:

```
cycles = 7 + (N*N - pairs) + splits + rn_iterations + 2
```

The 7 clocks are the fixed overhead: start register, three line loads and
the pipeline fill. The final 2 are the two termination clocks. `cae_top`
reports `cycles`, `stat_pairs`, `stat_splits` and `stat_rn`. The end-to-end
testbench checks this formula for every coding process it runs.

With two-symbol processing off (`ms_en = 0`) the design is a
one-symbol-per-clock coder. The same BAB then takes `pairs - splits` more
clocks.

## Context generation

The bordered current BAB is 20x20: the 16x16 block plus two pixels of border
on every side. The bordered motion-compensated BAB is 18x18, with a border of
one. Filling the border (padding) is the host's job.

Template bits, with X at row `y`, column `x`:

* **INTRA (10 bits):**
  * `c0`, `c1`: the two pixels to the left of X;
  * `c2..c6`: the line above, columns x+2 down to x-2;
  * `c7..c9`: two lines above, columns x+1 down to x-1.
* **INTER (9 bits):**
  * `c0`: the pixel left of X;
  * `c1..c3`: the line above, columns x+1 down to x-1;
  * `c4`: the MC pixel below;
  * `c5..c7`: the MC pixels x+1, x, x-1 on X's own line, with `c6` aligned
    with X;
  * `c8`: the MC pixel above.

`cae_context_gen` reads three current lines (`lb3` two above, `lb2` one
above, `lb1` the coded line) and the three matching MC lines. It forms both
contexts by indexing with the counter, X at `x` and X' at `x+1`.

At the end of a line, the registers move up by one line and the next bordered
line is read in the same clock, so a line change costs no clocks. Loading the
first three lines at start takes three clocks through the buffer's single read
port.

**Vertical scan** transposes the BAB. The buffer then returns columns instead
of rows, and the rest of the logic is unchanged.

**Subsampled BABs:** `bab_size` selects 16x16, 8x8 or 4x4. The host writes the
bordered subsampled block (N+4 lines, N+2 for MC) into the top-left corner of
the buffers. The counter wraps at N, and the last-pixel and last-line flags
follow N.

### Waiting for the host

`cae_bab_buffer` keeps one "written" flag per row. `bab_clear` resets them for
a new BAB. `line_ready` reports whether the line being read holds data:

* **Horizontal scan:** the row must be written, and for INTER coding the MC
  row too.
* **Vertical scan:** every column needs every row, so the whole bordered BAB
  (and, for INTER, the whole MC BAB) must be written.

Coding may therefore start while the host is still writing rows. CG holds its
start load, or holds `valid` low, until the line arrives.

## Renormalisation and bit output

`cae_rn` does one iteration per clock. The three cases are:

* the interval is in the upper half: output 1, then `bits_to_follow` 0s;
* the interval is in the lower half: output 0, then `bits_to_follow` 1s;
* the interval straddles the middle: `L -= QUARTER` and `bits_to_follow++`.

After each case it doubles `R` and `L`. An output is pushed into
`cae_rn_buffer` as a 9-bit entry `{code bit, bits_to_follow}` (8 entries deep).

`cae_bitstream_gen` pops one entry per clock. It writes it as a run of
`bits_to_follow + 1` bits into the bitstream buffer: the code bit followed by
its complements.

**Coder start and end.** The coder starts with `L = 0` and `R = 0x7FFFFFFF`.
After the last symbol it terminates with two bits. It picks
`V = L` rounded up to a multiple of QUARTER. Since `R >= QUARTER` at that
point, `V` lies inside the final interval `[L, L+R)`. It outputs `V[31]`
(with any pending `bits_to_follow`), then `V[30]`. A decoder that reads 0s
past the end of the bitstream sees exactly `V`, and so recovers every
symbol.

`bits_to_follow` is 8 bits wide, so it can count up to 255 straddle cases in
a row. That is far more than a 298-bit bitstream can hold.

## Bitstream buffer and best-bitstream selection

An INTRA BAB is coded twice (horizontal and vertical scan) and an INTER BAB
four times (INTRA/INTER x horizontal/vertical). The shortest bitstream is
kept.

`cae_bitstream_buffer` has two banks of 298 bits:

* One bank holds the shortest bitstream of the current BAB so far
  (`best_bank`, `best_len`).
* Each coding process writes the other bank.
* When it finishes, the new bitstream becomes the best if it is strictly
  shorter. Otherwise the old best stays. The first process of a BAB always
  becomes the best.
* `new_bab` with `start` forgets the previous best.
* A bitstream longer than 298 bits is clipped to 298 bits and flagged
  (`last_overflow`). It then competes with a length of 298.

The host reads a bank as 16-bit words (`bs_rd_bank`, `bs_rd_addr`), with the
earliest bit in the MSB.

### Stopping a process that cannot win

With `roe_en` set at `start`, the process is compared against the best of the
BAB while it runs (redundant operation elimination). The comparison is
`length so far > best_len`. The length only grows, so once it is larger the
process can no longer be selected, and it is stopped in that clock:

* the context generator and the range update unit receive `stop` and go idle;
* the PL register and the renormalisation buffer are cleared;
* `done` pulses with `last_aborted` set;
* the best bitstream and its bank are untouched.

`cycles` then shows how early the process ended. A process whose final length
only equals the best runs to the end (and is not selected). The first process
of a BAB is never stopped, since there is no best yet.

## Using `cae_top`

1. Reset with `rst_n` low (asynchronous, active low). Control state is reset;
   the buffer and table arrays are not, because they are written before use.
2. Load both probability tables: `plt_wr_en`, `plt_wr_mode`, `plt_wr_addr`,
   `plt_wr_data`, one entry per clock. The tables are not built in: they are
   the fixed tables of the MPEG-4 standard, and must respect the four end
   values above.
3. For each BAB:
   * pulse `bab_clear`;
   * write the bordered rows with `bab_wr_en`, `bab_wr_mc`, `bab_wr_row`,
     `bab_wr_data`. Bit j of a row is column j.
4. For each coding process, pulse `start` with `mode`, `scan`, `bab_size`,
   `ms_en` and `roe_en`. Set `new_bab` on the first process of a BAB.
5. `busy` is high while a process runs. `done` pulses at the end, with
   `last_len`, `last_bank`, `last_overflow`, `last_aborted` and the
   statistics valid.
6. After the last process of the BAB, read bank `best_bank`, `best_len` bits
   long.

Coding may start right after `bab_clear`; the pipeline waits for missing
lines.

## Files

| file | contents |
|------|----------|
| `rtl/cae_pkg.sv` | constants (HALF, QUARTER, cLPS values, sizes) and types |
| `rtl/cae_top.sv` | the encoder: pipeline registers, control, status, bank policy |
| `rtl/cae_bab_buffer.sv` | bordered BAB storage, row/column read, written flags |
| `rtl/cae_context_gen.sv` | line registers, counter, INTRA/INTER contexts of X and X' |
| `rtl/cae_prob_table.sv` | the two probability tables, host-written |
| `rtl/cae_ru2_ctrl.sv` | pair decision |
| `rtl/cae_ru.sv` | one-symbol range update (full multiplier) |
| `rtl/cae_cu.sv` | one constant unit, `R - R[31:16]*cLPS` by shift-and-add |
| `rtl/cae_ru2.sv` | two-symbol range update from 2x4 constant units |
| `rtl/cae_rn.sv` | one renormalisation iteration |
| `rtl/cae_range_update.sv` | the RU stage: R/L/bits_to_follow, priorities, split pair, termination |
| `rtl/cae_rn_buffer.sv` | 8-entry FIFO of `{code bit, bits_to_follow}` |
| `rtl/cae_bitstream_gen.sv` | run expansion, bitstream length and overflow |
| `rtl/cae_bitstream_buffer.sv` | 2 x 298-bit banks, run write, word read |
| `tb/cae_ref_pkg.sv` | reference encoder, test shapes and test probability tables |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_cae_workload.sv` | clocks per coding process on a synthetic shape sequence |

## Verification

Every testbench compares against values computed independently of the RTL.
Most use `tb/cae_ref_pkg.sv`: a straightforward software encoder and decoder working on
two-dimensional pixel arrays. It codes one symbol at a time, with no
pipeline. Besides the bits, it counts the pairs, split pairs and
renormalisation iterations the hardware should see.

The test probability tables are defined by a formula, not by data:

* The four end entries take the fixed values above.
* Otherwise `c0 = 1 + hash(ctx) mod 65535`.
* Contexts with at most two 1s are pulled to `60000 + hash mod 5500`.
* Contexts with at most two 0s are pulled to `1 + hash mod 5000`.

Test shapes are seeded elliptical blobs, optionally with random noise pixels.

`tb_cae_top` is the end-to-end test at full size. It runs:

* twelve BABs through all four coding processes, with two-symbol processing
  on and off;
* two BABs that are written while coding already runs;
* eight BABs with redundant operation elimination on; afterwards it checks
  that the best bank holds the shortest reference bitstream;
* 8x8 and 4x4 BABs.

It checks every bitstream bit for bit, plus the lengths, banks, best
selection, statistics and the clock-count formula. A reference arithmetic
decoder then decodes each bitstream read from the buffer back into pixels and
compares them with the BAB. This also proves the termination rule. At the end it prints how
often each mechanism occurred. It counts a failure for any mechanism that
never happened:

* pairs, split pairs, renormalisation after a pair, renormalisation
  iterations;
* a change of best bank, overflow;
* INTER, vertical scan, subsampled sizes;
* waits for BAB lines;
* processes stopped by redundant operation elimination.

`tb_cae_workload` measures throughput on a short synthetic sequence: a
smooth object moving over four frames of 5x5 BABs. Each of the 42 boundary
BABs is coded as an inter-frame BAB (four processes) in three
configurations, all checked bit for bit. Average clocks per coding process:

| configuration | clocks |
|---------------|--------|
| one symbol per clock (`ms_en = 0`) | 313.2 |
| two-symbol processing | 215.8 |
| two-symbol processing + elimination (`roe_en = 1`) | 172.0 |

These numbers depend on the probability tables and the shapes; with the
standard tables and real sequences they will differ.

Simulate with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_cae_top \
    rtl/cae_pkg.sv tb/cae_ref_pkg.sv tb/tb_cae_top.sv \
    $(ls rtl/*.sv | grep -v cae_pkg) -Mdir obj_top -o sim
./obj_top/sim
```

Each testbench ends with a line `TB_RESULT checks=<n> failures=<m>`. Swap in
another `tb/tb_<module>.sv` and `--top-module` to run a unit test. The top
test takes a few seconds.

## Where this design departs from the original architecture

* **Context generator.** The original moves the pixels through four shift-register
  chains, with separate border registers that are re-routed step by step for
  16x16, 8x8 and 4x4 BABs. Here each line is a whole register, and the
  template is selected by the counter. The contexts are the same. The
  register count and the multiplexers differ.
* **Probability tables.** The original synthesises the standard tables as
  combinational logic. Here they are a host-written register array with a
  combinational read. The contents are the MPEG-4 standard's and must be
  loaded.
* **Coder termination.** The two-bit termination above is this design's own,
  and the start-code emulation stuffing of the MPEG-4 bitstream is not done.
  The bitstreams are correct arithmetic codes, but they are not
  byte-identical to a standard MPEG-4 encoder's output.
* **Redundant operation elimination** is an option (`roe_en`), off unless the
  host sets it. Stopping a process does not start the next one: the host
  issues the next `start`.
* **Host interface.** The control and status registers are plain ports. The
  two-bank policy is this design's reading of "2 x 298-bit bitstream buffer
  plus keep the shortest".
* **Pairs only.** The general n-symbol range update is not built; the
  two-symbol configuration is.
* **`bits_to_follow`** is 8 bits and is not saturated. More than 255 straddle
  cases in a row would wrap, but that would need a bitstream far longer than
  the 298-bit buffer.
* **No timing closure.** The RTL has no timing constraints. The critical path is
  RU's 16x16 multiply plus two 32-bit adds, as in the original.
