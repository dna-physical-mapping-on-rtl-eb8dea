# Consecutive-ones accelerator for DNA physical mapping

Physical mapping orders cloned DNA fragments along a chromosome. Each clone is
tested against a set of short probes, giving a binary matrix **M** with one
row per clone and one column per probe (1 = the probe binds to the clone).
Mapping means finding a column order in which the 1s of every row are
consecutive: the *consecutive-ones problem*. A classical polynomial algorithm
solves it in three steps:

1. split the rows into components: rows *i* and *j* are linked when their
   column sets S<sub>i</sub> and S<sub>j</sub> overlap without one containing
   the other (the overlap graph G<sub>C</sub>), and components are its
   connected parts;
2. permute the columns of each component, row by row, using the sizes of the
   pairwise intersections to decide on which side a new row goes;
3. build, for every permuted column, the *column set* (which original probes
   it stands for) and join the components.

In software almost all of the time goes into two repetitive bit-level
operations: **comparing two rows** (do they intersect, is one contained in the
other, how many columns do they share) and **constructing the column sets**.
This RTL is the FPGA half of a hybrid solver: the host keeps the graph work
and sends these two operations to the accelerator, which streams long rows
through 32-bit datapaths, one block per datapath step.

The hardware follows a published software/hardware partitioning of this
algorithm (a Virtex-II board at 50 MHz with 2 MB SRAM banks, linked to a PC by
its network interface). The datapaths of the row comparator and the set
constructor, the split into controller / compare / construct / receive / send
units, the use of the board banks and the parallel arrangement with two
comparators and two constructors come from that design. Command format, bank
layout, the pipelines around the datapaths and everything about the host link
are this implementation's own; they are listed in *Departures and choices*
below.

## Block diagram

```
 host words ──► receive_data ──► c1p_control ──► send_data ──► host words
  (32-bit)     FIFO + framing     state machine    record FIFO
                                   │        │
                      start/result │        │ start/words
                                   ▼        ▼
                         compare_engine   construct_engine
                         2 x row_comparator  2 x set_constructor
                                   │        │
                                   └──┬─────┘  bank multiplexer (in c1p_control)
                                      ▼
      bank 0: M even blocks   bank 1: M odd blocks
      bank 2: component by columns   bank 3: component row indexes
```

`c1p_accel` is the top. The four SRAM banks are outside it (they are chips on
the board); the top has one request port and one read-data port per bank.
The board has a fifth bank, which this design does not use.

## Comparing two clones (row_comparator, compare_engine)

A row of M is cut into 32-bit blocks (128 blocks for 4096 probes). For a
block pair `d1` (row *i*) and `d2` (row *j*) the comparator forms
`R = d1 & d2` and, in the same cycle:

| output | test per block | meaning after the last block |
|---|---|---|
| `rel[2]` | `R != 0` | the rows intersect |
| `rel[1]` | `(d1 ^ R) != 0` | row *i* has a column outside row *j* |
| `rel[0]` | `(d2 ^ R) != 0` | row *j* has a column outside row *i* |
| `count` | `popcount(R)` (6 bits) | size of the intersection (24-bit accumulator) |

The three flags are sticky (ORed over the blocks). The host reads the
relation from them: `rel[2]=0` disjoint; `rel[2]=1` and one of `rel[1:0]`
clear: one row contains the other; `rel = 3'b111`: an edge of the overlap
graph.

`compare_engine` holds two comparators. M is stored *block-interleaved*:
block *b* of row *r* is word `r*HB + b/2` of bank `b % 2`, with
`HB = ceil(blocks/2)`. Comparator A walks the even blocks in bank 0 while
comparator B walks the odd blocks in bank 1; at the end the flags are ORed
and the counts added. Each bank delivers one word per cycle and a block pair
needs two words, so a comparison takes:

* `done` is high **2·HB + 2 cycles** after the start cycle (130 cycles for
  4096-column rows);
* with the controller's own two cycles, a complete comparison costs
  **2·HB + 4 cycles per pair**, plus one cycle for each returned record.

At 50 MHz that is about 2.6 µs per pair of 4096-column rows, in line with
the FPGA-only times the original two-comparator hardware reported (13.92 s
for 5,393,970 pairs, 10.70 s for 4,148,640 pairs).

In stream mode (`OP_CMP_STREAM`) the host sends the two rows' blocks
alternately in one packet and comparator A consumes them as they arrive; no
bank is used. This serves a host that does not keep M on the board.

## Constructing column sets (set_constructor, construct_engine)

After the host has permuted a component, each component column *c* must be
turned into the set of original columns it represents. Starting from "all
columns", every row *k* of the component narrows it:

```
P = all ones
for every row k of the component:
    P = P & (comp[k][c] ? S_row(k) : ~S_row(k))
```

A 1 keeps only the row's own columns (the first 1 therefore copies
S<sub>row</sub>), a 0 removes them. `set_constructor` is exactly this, for one
32-bit block of P: a 5-bit index picks the bit of the current 32-row block of
the component column, a multiplexer picks the row-set block or its
complement, an AND updates P, and the index counts down by one per row,
wrapping from 0 to 31, so a new column block is needed every 32 rows.

`construct_engine` runs two constructors in lock step, A on set block 2h and
B on set block 2h+1, with a three-stage pipeline:

| stage | action |
|---|---|
| 0 | read component row index *k* from bank 3 |
| 1 | read word `idx*HB + h` from banks 0 and 1 (blocks 2h, 2h+1 of that row); every 32 rows read the next component-column word from bank 2 |
| 2 | both constructors apply their block |

Each pass covers one column and one pair of set blocks and takes
`ncrows + 3` cycles plus one cycle per output word; a whole component takes
`ncols · (HB·(ncrows+3) + blocks)` cycles when the host accepts every word.
The output order is column 0 blocks 0..blocks-1, then column 1, and so on.

## Host protocol

All traffic is 32-bit words with valid/ready handshakes. A packet starts with a
header `{op[3:0], a[13:0], b[13:0]}` (constants in `rtl/c1p_pkg.sv`):

| op | name | a, b | payload | reply |
|---|---|---|---|---|
| 1 | `OP_LOAD_M` | rows, blocks per row | rows·blocks words, row-major | none |
| 2 | `OP_LOAD_COMP` | component rows, component columns | `a` row numbers of M, then `b·ceil(a/32)` column words | none |
| 3 | `OP_CMP_PAIR` | row *i*, row *j* | none | pair record |
| 4 | `OP_CMP_ALL` | – | none | a pair record for every intersecting pair *i<j*, then `{4'hD, count}` |
| 5 | `OP_CONSTRUCT` | – | none | `ncols·blocks` column-set words, then `{4'hD, count}` |
| 6 | `OP_CMP_STREAM` | –, blocks per row | 2·blocks words: *i*<sub>0</sub>, *j*<sub>0</sub>, *i*<sub>1</sub>, *j*<sub>1</sub>, … | pair record with *i = j = 0* |

A pair record is two words: `{4'h1, i[13:0], j[13:0]}` and
`{5'b0, rel[2:0], count[23:0]}`. In component column words, component row
*k* is bit `31 - (k mod 32)` of word `k/32` (first row in the MSB). Column
*p* of M is bit `p mod 32` of block `p/32`. Unknown opcodes are dropped.
`OP_CMP_PAIR`, `OP_CMP_ALL` and `OP_CONSTRUCT` use what the last load
commands stored. Only intersecting pairs are returned by `OP_CMP_ALL`:
a disjoint pair neither links two rows nor contains one in the other.

With these commands one design serves every host organisation studied for
this problem: rows streamed per pair; whole M sent once followed by pair
requests; whole M sent once followed by a complete comparison; and set
construction in hardware, in any combination.

## Sizes

| parameter | value | where |
|---|---|---|
| block width `DATA_W` | 32 | `c1p_pkg` |
| bank address `ADDR_W` | 19 (512K words = 2 MB) | `c1p_pkg` |
| row index `ROW_W` | 14 (16,384 rows or component columns) | `c1p_pkg` |
| blocks per row `BLK_W` | 8 (up to 255 blocks, 8160 columns; larger header values are not supported) | `c1p_pkg` |
| intersection counter `CNT_W` | 24 | `c1p_pkg` |
| FIFO depths `RX_DEPTH`, `TX_DEPTH` | 16 | `c1p_accel` parameters |

A 3,285 × 4,096 matrix (the larger of the two chromosome data sets the
original design was measured on) takes 210,240 words per M bank; a component
made of all its rows takes 421,888 words in bank 2. Both fit the 524,288-word
banks.

## Departures and choices

* **Configuration.** Only the fully parallel hardware (two comparators, two
  constructors) is built; a single-unit variant would be the same engines
  with one datapath.
* **Interleaving** of M is by 32-bit block. The original only says that M is
  interleaved in two banks so that the two units of each kind work in
  parallel.
* **Relation numbering**: output 2 is the intersection test, 1 the test on
  the first row, 0 the test on the second row.
* **Set initialisation**: P starts at all ones instead of copying the row set
  on the first 1; the result is identical and the datapath stays a single
  AND.
* **Host link**: a plain word stream stands in for the network interface; the
  packet format, FIFOs, record format and the filtering of disjoint pairs are
  this design's.
* **Banks**: synchronous SRAM with one-cycle read latency is assumed. Board
  ZBT SRAM with a longer pipeline would need the response pipelines of both
  engines lengthened.
* **Reset**: active-low asynchronous, everything cleared.
* Not built: the host software (component forming, permutation, joining), the
  network interface and the SRAM chips.

## Files

| file | content |
|---|---|
| `rtl/c1p_pkg.sv` | widths, opcodes, tags, bank request struct |
| `rtl/row_comparator.sv` | clone comparison datapath |
| `rtl/set_constructor.sv` | column-set datapath |
| `rtl/compare_engine.sv` | two comparators, bank read sequencing, stream mode |
| `rtl/construct_engine.sv` | two constructors, three-stage fetch pipeline |
| `rtl/c1p_control.sv` | command state machine, bank multiplexer |
| `rtl/receive_data.sv`, `rtl/send_data.sv`, `rtl/sync_fifo.sv` | host link |
| `rtl/c1p_accel.sv` | top |
| `tb/sram_bank.sv` | behavioural SRAM bank model (testbenches only) |
| `tb/tb_*.sv` | self-checking testbenches, one per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
(including on a watchdog). With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
    rtl/c1p_pkg.sv tb/sram_bank.sv tb/tb_c1p_accel.sv --top-module tb_c1p_accel
./obj_dir/Vtb_c1p_accel
```

Replace `tb_c1p_accel` with any other testbench. What they cover:

* `tb_row_comparator`, `tb_set_constructor`: the datapaths against a
  reference, including the 8-clone × 9-probe textbook example (its overlap
  edges l1–l2, l4–l5, l6–l7, l6–l8, and the column sets {1}, {2,4,5,7,9},
  {3,6,8} of component {l1, l2}).
* `tb_compare_engine`, `tb_construct_engine`: bank layouts, odd block counts,
  components over 32 rows, output back-pressure, and exact cycle counts.
* `tb_receive_data`, `tb_send_data`, `tb_c1p_control`: framing, queueing,
  bank layout written by the load commands, filtering, held records.
* `tb_c1p_accel`: every command end to end with random stalls on both sides
  of the host link; counts each mechanism (demand, complete and streamed
  comparison, filtered pairs, all three relation kinds, set construction,
  receive FIFO full, output stalled) and fails if one never happened; checks
  the cycle count of a complete comparison.
* `tb_c1p_accel_full`: the top at its default parameters with 2 MB bank
  models: loads a 3,285 × 4,096 matrix, runs 400 demand comparisons, builds
  the 24 column sets (128 blocks each) of a 70-row component, then a complete
  comparison of 48 rows.
* `tb_workload_chromosome`: both chromosome-sized data sets (3,285 and 2,881
  clones × 4,096 probes) at default parameters: full-size load, demand
  comparisons, and a timed complete comparison of 600 rows (179,700 pairs,
  every record checked). It measures 132.1 cycles per pair and projects the
  full pair counts to 14.25 s and 10.96 s at 50 MHz, within 2.5 % of the
  13.92 s and 10.70 s FPGA times reported for the original two-comparator
  hardware; the test fails beyond 5 %. A complete comparison of all rows
  (about 712 million cycles for 3,285 rows) was not simulated.

The testbenches drive inputs on the falling clock edge; the DUTs are purely
rising-edge.
