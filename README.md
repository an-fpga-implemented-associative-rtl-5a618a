# Associative-memory online learner

Lazy (memory-based) learning keeps training samples as they are and decides
at query time by finding the most similar stored sample. Training costs
nothing. Answering costs a nearest-neighbour search over everything that has
been stored, and the store grows without limit.

This RTL deals with both costs in hardware:

* **Search.** The nearest-neighbour search runs in a parallel associative
  memory. Every stored reference row computes its own distance to the query
  at the same time. A two-stage minimum search then picks the winner.
* **Storage.** A *short/long-term rank list* bounds the store and lets it
  adapt online. A query that is close enough to its winner counts as a
  match, and the winner moves up the list. A query that is too far away is
  stored as a new reference near the top of the short-term part. When that
  part is full, the lowest-ranked reference is forgotten. References that
  keep matching climb into the long-term part, where new inputs no longer
  push them out.

The design follows the architecture of F. An, H. J. Mattausch and T. Koide,
"An FPGA-implemented Associative-memory Based Online Learning Method", which
applies it to handwritten character recognition. The default size is the
published one: 1024 references of 64 features of 16 bits, in 32 blocks of
32 rows. Anything the publication leaves open was filled in for this RTL, and
each such choice is marked as this design's own below and in each file's
header.

## Processing one query

```
 16x16 binary image ──► feature_extractor ──┐
                                            ├─► query_buffer ──► am_parallel ──► learn_ctrl ──► rank_memory
 host feature words ────────────────────────┘      (64x16)       (32 x am_block)     │
                                                        ▲                             │ learned:
                                                        └──────── copy query ◄────────┘ write row
```

1. The query, a vector of 64 16-bit features, goes into `query_buffer`.
   The host can write it word by word (`q_wr_*`, then `go`). Or
   `feature_extractor` can compute it from a 16x16 binary character image
   (`img_start`), and the learner then starts on its own.
2. `am_parallel` searches all stored references and returns the nearest
   address and its distance.
3. `learn_ctrl` compares that distance with `threshold`:
   * **distance <= threshold: match.** The winner jumps up `jump_val`
     places in the rank list. The stored vectors do not change.
   * **distance > threshold, or nothing stored yet: learn.** The rank list
     inserts a new entry and names the row it will use: a never-used row, or
     the row of the reference it has just forgotten. The query is copied
     into that row, and the row takes part in searches from then on.
4. `res_valid` pulses once with the outcome:
   * `res_matched`;
   * `res_addr`: the winner on a match, the new row when learned;
   * `res_dist`;
   * `res_evicted`: a reference was forgotten.

The hardware returns reference addresses, not class labels. Mapping an
address to a character class is left to the host.

## The distance engine

### One row (`row_unit`)

Each reference row has its own small Row RAM (64 x 16 bit) and its own
datapath. Each element of the vector goes through three registered stages:

| stage   | operation                             | width |
|---------|---------------------------------------|-------|
| diff    | \|query - reference\|                 | 16    |
| square  | diff^2 (or diff in Manhattan mode)    | 32    |
| acc     | acc + square                          | 40    |

The subtractor forms the absolute difference of unsigned features. This
keeps the result in 16 bits, and its square equals the square of the signed
difference. The accumulator ends up holding the squared Euclidean distance.
No square root is taken, because it does not change which row is nearest.
With `metric = 1` the rows add up absolute differences instead (Manhattan
distance; with 1-bit features this is the Hamming distance).

Each dimension takes four cycles that do not overlap: Row RAM read,
difference, square, accumulate. One search therefore spends 64 x 4 = 256
cycles computing distances. That is the published cycle count. The stages
are not pipelined across dimensions.

### One block (`am_block`)

A block holds 32 rows driven by a shared controller. After the 256
distance cycles, a selection multiplexer steps through the 32 rows, one per
cycle. Each row's sum goes into the block's Sum RAM, and the search unit
keeps the smallest sum among valid rows. A block search takes
256 + 32 = 288 cycles, which is 2.51 µs at the 114.81 MHz reported for the
FPGA.

### Two stages (`am_parallel`)

Scanning all 1024 rows one after another would take 1024 cycles. The
design splits the scan into two stages instead:

* **First stage.** The 32 blocks each scan their own 32 rows, all at the
  same time.
* **Second stage.** A second selection multiplexer steps through the 32
  block results, one per cycle. It fills the Min_value RAM and the
  Address-of-Min_value RAM, and a final comparator keeps the global
  minimum.

The second stage starts in the cycle the blocks report done. A full search
takes **256 + 32 + 32 = 320 cycles**. The address of a reference is
`{block, row}`.

Search rules:

* When two distances are equal, the lower address wins.
* Each row has a valid flag, and rows that are not valid never win. If no
  row is valid, `found` is 0.
* The Sum RAM and Min_value RAMs can be read back through ports, for
  inspection by the host.

## The short/long-term rank list (`rank_memory`)

This is the part that makes the learner adapt online. The list has 1024
positions, one per reference row. Position 0 is the highest rank. Each
position holds a reference address and an occupied flag.

`boundary` sets the split:

* positions `0 .. boundary-1` are the **long-term** part;
* the rest is the **short-term** part.

Both operations below take a single cycle.

**Insert (learning a new reference).**

* *Insertion point.*
  * With `ins_mode = 0`, the new entry enters at the top of the short-term
    part (position `boundary`).
  * With `ins_mode = 1`, it enters at the top of the whole list (position
    0) while the long-term part still has a free position. Once the
    long-term part is full, insertion moves to the short-term top.
* *Move-down.* The entries from the insertion point downwards move down by
  one. The move stops at the first free position, which it fills.
* *Forgetting.* If there is no free position below the insertion point, the
  short-term part is full. The entry at the last position falls out: that
  reference is forgotten, and its row is reused for the new one. Otherwise
  the new reference gets the next never-used row.

**Jump (a match).**

* The entry of the winning reference moves from its position `p` to
  `q = max(p - jump_val, 0)`.
* The entries at `q .. p-1` each move down one place.
* A reference that matches often climbs this way across the boundary into
  the long-term part. There, new short-term inserts no longer push it
  towards forgetting.

Example: 8 positions, `boundary = 4`, `ins_mode = 0`, `jump_val = 2`.
Uppercase letters are references, `.` is a free position.

```
position      0 1 2 3 | 4 5 6 7
start         . . . . | D C B A     short-term full
learn E       . . . . | E D C B     A forgotten, E reuses A's row
match on C    . . . . | C E D B     C: 6 -> 4
match on C    . . C . | . E D B     C: 4 -> 2, now long-term; position 4 freed
learn F       . . C . | F E D B     fills the free position, nothing forgotten
```

To find the winner's position, the list compares all positions in parallel.
For 1024 entries this is a wide but shallow piece of logic, which buys the
single-cycle update.

## Gradient features (`feature_extractor`)

The input is a 16x16 binary image. For every pixel the extractor forms the
3x3 Sobel derivatives:

```
Sx(i,j) = I(i-1,j+1) + 2I(i,j+1) + I(i+1,j+1) - I(i-1,j-1) - 2I(i,j-1) - I(i+1,j-1)
Sy(i,j) = I(i-1,j-1) + 2I(i-1,j) + I(i-1,j+1) - I(i+1,j-1) - 2I(i+1,j) - I(i+1,j+1)
```

Here `i` is the row and `j` the column, and pixels outside the image count
as 0. The derivatives are summed over each 2x2-pixel cell of the 8x8 grid.
The cell's feature is the direction `theta = arctan(sum Sy / sum Sx)`.

An 18-step vectoring CORDIC computes the arctangent. The vector is first
folded into the right half-plane. Features come out in raster order of the
cells, coded as follows:

```
code = 16384 + theta * 65536 / 360     (-90° -> 0, 0° -> 16384, +90° -> 32768)
```

Special cases:

* a cell with no gradient gets 16384;
* `sum Sx = 0` gives exactly ±90°.

Each cell takes 20 cycles, so an image takes 1280 cycles. The result is
within about 0.02° of the exact value.

## Top-level interface (`am_learning_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous reset, active low |
| `metric` | in | 0 = sum of squared differences, 1 = sum of absolute differences |
| `ins_mode` | in | 0 = insert at the short-term top; 1 = long-term first |
| `boundary` | in | number of long-term positions (0 .. 1024) |
| `jump_val` | in | places a matched reference moves up |
| `threshold` | in | largest winner distance that still counts as a match |
| `q_wr_en`, `q_wr_dim`, `q_wr_data` | in | host writes one query word |
| `go` | in | process the query in the buffer |
| `img_start`, `img[255:0]` | in | extract features from an image (bit `16*row+col`) and process them |
| `busy` | out | extraction, search or learning in progress |
| `res_valid` | out | one-cycle pulse with the outcome |
| `res_matched`, `res_found`, `res_evicted`, `res_addr`, `res_dist` | out | outcome of the query |
| `rank_rd_pos` → `rank_rd_ref`, `rank_rd_valid` | in/out | read one rank position |
| `ref_count` | out | number of stored references |
| `sum_rd_addr` → `sum_rd_data` | in/out | distance of any row in the last search |
| `min_rd_blk` → `min_rd_dist`, `min_rd_addr`, `min_rd_found` | in/out | a block's local minimum in the last search |
| `rank_insert`, `rank_jump`, `rank_ins_pos`, `rank_jump_from`, `rank_jump_to` | out | rank-list events, valid in the cycle of the strobe |

Set the configuration inputs while the learner is idle. `go` and
`img_start` are accepted only when `busy` is low. Host writes to the query
buffer are ignored while features are being written into it.

### Timing

All numbers are at the default size and count clock cycles.

| step | cycles |
|------|--------|
| host `go` to `res_valid`, match | 320 + 3 = 323 |
| host `go` to `res_valid`, learned | 320 + 64 + 4 = 388 |
| image path | adds 1280 for feature extraction, plus 1 |
| one block's search (start to done) | 288 |

A learned query spends its 64 extra cycles copying the query into the new
row, one word per cycle.

## Files

| file | content |
|------|---------|
| `rtl/am_pkg.sv` | sizes (`DIMS`, `ROWS`, `N_BLOCKS`, widths, `CYC_PER_DIM`) and the `metric_e`, `ins_mode_e` types |
| `rtl/row_unit.sv` | one reference row: Row RAM, \|diff\|, square, accumulator, valid flag |
| `rtl/am_block.sv` | 32 rows, selection, Sum RAM, first-stage minimum search |
| `rtl/am_parallel.sv` | 32 blocks, Min_value / address RAMs, second-stage search |
| `rtl/rank_memory.sv` | short/long-term rank list with forgetting |
| `rtl/learn_ctrl.sv` | match/learn sequencer |
| `rtl/feature_extractor.sv` | Sobel + CORDIC gradient-direction features |
| `rtl/query_buffer.sv` | query register file with two read ports |
| `rtl/am_learning_top.sv` | the whole learner |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/am_top_harness.sv` | stimulus and reference model shared by the two top-level testbenches |

## Simulating

Every testbench checks itself. It prints `TB_RESULT checks=N failures=M`
and calls `$finish`, and a watchdog ends a run that hangs. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/am_pkg.sv tb/tb_am_learning_top.sv --top-module tb_am_learning_top -o sim
./obj_dir/sim
```

| testbench | what it covers |
|-----------|----------------|
| `tb_row_unit` | distance of one row against a model, both metrics, extreme values, 4 cycles per dimension |
| `tb_am_block` | nearest row, Sum RAM, empty block, ties, 288-cycle latency |
| `tb_am_parallel` | 8 blocks x 4 rows against a model, both RAMs, ties across blocks, latency |
| `tb_rank_memory` | 16-entry list under random inserts and jumps against a model, with random boundary, mode and jump value |
| `tb_learn_ctrl` | match and learn sequences, threshold equality, cycle counts (memory and list replaced by simple responders) |
| `tb_feature_extractor` | features of blank, striped, diagonal and random images against a real-arithmetic model |
| `tb_am_learning_top` | 4 x 4 rows, 160 mixed queries |
| `tb_am_learning_top_full` | default size (1024 rows), 1400 queries; about 40 s to build and 30 s to run |

The two top-level testbenches model the stored vectors, the rank list and
the decisions. They compare each result, its latency and the whole rank list
after every query. They also count the mechanisms, and fail if one of these
never happened:

* learning into an empty memory;
* forgetting;
* a match with jump-up;
* a jump across the boundary;
* both insertion modes;
* both metrics;
* both query paths.

## Changing the size

* The top's parameters `N_BLK` and `ROWS_N` set the number of references
  (`N_BLK * ROWS_N`). Both should be powers of two.
* The feature length `DIMS = 64` and the widths live in `am_pkg`. The
  feature extractor always produces 64 features, so change `DIMS` only if
  the host supplies the features.
* The accumulator width (40) is enough for 256 dimensions of 16-bit
  squares.

## How far this follows the published design

**Taken from the publication:**

* the row datapath and its widths (16/32/40);
* 32 rows per block and 32 blocks;
* selection, Sum RAM, Min_value and address RAMs, and the two-stage search;
* 4 cycles per dimension and 32 cycles per search stage;
* the sum of squares without a square root;
* the threshold decision (a distance equal to the threshold still counts as
  a match);
* the rank list's two insertion approaches, move-down, forgetting of the
  lowest rank, and jump by subtraction of the jump value;
* the Sobel formulas, the 8x8 grid of 2x2 cells and the arctangent feature.

**Choices made here where the publication is silent:**

* the valid flag per row, and the rule that empty memory always learns;
* lower address wins a tie;
* the exact phase order within the 4 cycles and the handoff between the two
  search stages;
* where the move-down stops (the first free position), the address
  allocation, and clamping a jump at the top;
* the run-time configuration inputs. The publication gives no threshold,
  jump value or long/short-term split;
* the query buffer;
* the CORDIC and the angle coding of features;
* zero padding at the image border;
* reset behaviour.

**Added beyond the described FPGA datapath:**

* the Manhattan (`metric = 1`) option. The learning method is also
  described with a Manhattan/Hamming measure, while the FPGA memory computes
  Euclidean distance. Euclidean is the default here;
* the read-back ports.

**Not included:**

* the image preprocessing that produces the 16x16 image: noise filtering,
  Otsu binarization, labeling, segmentation and normalization. It is
  described only as a software flow;
* the PCI Express link to the host PC;
* the earlier mixed-signal and time-domain associative memories that the
  publication mentions as related circuits.

**Resources.** The publication reports 19,931 LUTs and 114.81 MHz on an
Altera Stratix device for one 32-row block. This RTL has not been
synthesized for an FPGA, so no comparable numbers are claimed. Two parts
will be large at the full size:

* the 1024 multipliers of the row datapaths;
* the single-cycle 1024-entry rank list.
