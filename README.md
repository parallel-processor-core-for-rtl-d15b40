# Semantic comparison core: Bloom-filter-driven sparse dot product

Search engines and semantic routers compare the *meaning* of two texts by a
dot product of two sparse tensors. Each tensor is a list of basis vectors
(terms or phrases, i.e. character strings) with a weight each; the dot
product is the sum of `w1 * w2` over the strings both lists contain. With
about a thousand strings per tensor and very few of them shared, the hard
part is not the arithmetic but finding the shared strings.

This core finds them in a fixed, small number of clock cycles by spending
area instead of time. Every row of both tables gets its own hardware slice;
all rows are hashed at once, a Bloom filter of one tensor is built from all
rows at once, and every row of the other tensor is tested against it at
once. Only the few rows that pass (true matches plus rare false positives)
go on to a small number of exact-match lookup units (CAMs), and only the
confirmed pairs reach an even smaller number of multipliers.

The RTL follows the architecture published by Mohan, Tripathy, Biswas and
Mahapatra ("Parallel Processor Core for Semantic Search Engines"). The
published description fixes the stages, slice counts and cycle-level timing
model; the host interface, several encodings and the inside of some blocks
are this implementation's own. Those points are listed under
[Where this RTL goes beyond or departs from the source](#where-this-rtl-goes-beyond-or-departs-from-the-source).

## Default configuration

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 1024 | rows per table, and number of slices in stages A, B, C |
| `M` | 131072 | Bloom filter length in bits (17-bit index) |
| `K` | 7 | Bloom filter indices per row |
| `B` | 16 | lookup lanes (RAM unit + CAM unit pairs) in stage D |
| `P` | 8 | multipliers in stage E |
| `L` | 5 | multiplier latency in cycles |
| `STR_BYTES` | 40 | maximum string length; also the hashing time in cycles |

Coefficients are 16-bit fixed-point numbers, vector IDs are 64 bits, and the
result is a 42-bit sum of 32-bit products.

## Data flow of one comparison

The two tables are called D1 and D2. The filter is built from D2; the rows
of D1 are tested against it.

```
            host row writes
                  |
        +---------+---------+
        | input_table D1/D2 |   (N rows: string, length, coefficient, valid)
        +---------+---------+
                  | row r
   Stage A  [stage_a_slice x N]  FNV-1a 64 -> vector ID, bf_index_gen -> K indices
                  |
   Stage B  [stage_b_slice x N]  per-row M-bit filter, one bit set per cycle
                  |
            [bf_consolidate]     OR of the N row filters          (1 cycle)
                  |
   IC 1     [bf_distribute]      one filter copy per stage-C slice (1 cycle)
                  |
   Stage C  [stage_c_slice x N]  K-cycle membership test -> RowSelect[N]
                  |
   IC 2     [row_scheduler]      up to B candidates per cycle -> lane j
                  |
   Stage D  [coef_ram x B] -> [coef_cam x B]   D1 ID/coef -> CAM search in D2
                  |                  Coeff_a, DataReady, Coeff_b per lane
   IC 3     [pair_buffer]        pack confirmed pairs, issue P per cycle
                  |
   Stage E  [pipe_mult x P] -> [sum_accumulator]  -> similarity
```

`ssc_controller` runs the phases in this order. The stage-A slices are used
twice: first for D2 (its IDs and coefficients are loaded into all B CAM
units, and its indices fill the row filters), then for D1 (its IDs and
coefficients are loaded into all B RAM units, its indices into the stage-C
slices).

## How a row becomes K filter indices

Each stage-A slice hashes its string with 64-bit FNV-1a, one byte per cycle
(bytes past the string's length leave the hash unchanged, so all slices
finish together after `STR_BYTES` cycles). The 64-bit hash is the row's
vector ID. From the same hash the K indices are derived without further
hashing:

```
fold(x)  = ((x >> 17) ^ x) [16:0]
f1       = fold(rotl64(hash, 33))
f2       = fold(hash)
index[i] = rotl17(f1, i) ^ f2          i = 0 .. K-1
```

This is double hashing: `f1` and `f2` act as two independent hashes and the
rotations of `f1` give K different combinations, all in one level of XOR
logic.

## Membership test and the three interconnects

* **Stage B and consolidation.** Every D2 row owns an `M`-bit filter and sets
  one of its K bits per cycle. After K cycles, `bf_consolidate` ORs the `N`
  filters into D2's filter in one registered step.
* **Interconnect 1** (`bf_distribute`) copies that filter into a private
  register for each stage-C slice in one cycle, so all `N` slices can read it
  without sharing a port.
* **Stage C.** Each slice holds the K indices of one D1 row and reads one
  filter bit per cycle. RowSelect is high if the row is valid and all K bits
  were set.
* **Interconnect 2** (`row_scheduler`) turns the `N`-bit RowSelect vector
  into lookup work. In each cycle it takes the (up to) `B` lowest pending
  rows and gives the j-th to lane j. `G` candidates therefore take
  `ceil(G/B)` cycles.
* **Stage D.** Lane j reads the candidate's vector ID and coefficient from
  RAM unit j, which holds a full copy of D1's table. It then searches CAM
  unit j, which holds a full copy of D2's table keyed by vector ID. A hit
  raises DataReady and returns D2's coefficient one cycle later. A miss is a
  Bloom filter false positive and is dropped.
* **Interconnect 3** (`pair_buffer`) packs the confirmed pairs from the `B`
  lanes into a buffer with no gaps. It then feeds them `P` per cycle to the
  multipliers. The buffer holds `N` pairs, because every row may match.
* **Stage E.** `P` multipliers with a latency of 5 cycles feed one adder,
  which adds all valid products to the accumulator in one cycle.

## Cycle count

From the cycle after `start` to the last busy cycle the core takes

```
2*STR_BYTES + 3*K + 2                (hash D2, write filters, OR, distribute,
                                      hash D1, write D1 indices, test)
+ max(1, ceil(G/B)) + 1 + 1          (lookups, last CAM result, last append)
+ max(1, ceil(Mt/P)) + L + 1         (multiply issue, multiplier, adder)
```

Here `G` is the number of Bloom filter candidates and `Mt` the number of
confirmed matches. `done` pulses in the following cycle, and `cycles` holds
the count.
At the defaults with 102 of 1024 rows shared this is
80 + 21 + 2 + 7 + 2 + 13 + 6 = **131 cycles**. With all 1024 rows shared it
is 103 + 64 + 2 + 128 + 6 = **303 cycles**. Both are the published counts of the
source architecture, and both are reproduced in simulation at full size.
Table loading is not included: the host writes one row per cycle
beforehand.

The phases do not overlap: the multipliers start only after the last
lookup. That is what the timing model describes. Overlapping them would
save a few cycles.

## Host interface (`semantic_core`)

| Port | Dir | Width | Use |
|---|---|---|---|
| `wr_en`, `wr_tbl`, `wr_row` | in | 1, 1, log2 N | write one row of D1 (`wr_tbl`=0) or D2 (1) |
| `wr_str`, `wr_len` | in | 8*STR_BYTES, log2(STR_BYTES+1) | string, first character in bits [7:0]; its length |
| `wr_coef` | in | 16 | coefficient |
| `tbl_clear` | in | 1 | invalidate every row of both tables |
| `start` | in | 1 | begin a comparison (ignored while busy) |
| `busy`, `done` | out | 1 | running; one-cycle end pulse |
| `similarity` | out | 32+log2 N | sum of `coef1*coef2` over common strings |
| `cand_count`, `match_count` | out | log2(N+1) | candidates G; confirmed matches |
| `cycles` | out | 32 | busy cycles of the last comparison |

Rows that were not written since the last `tbl_clear` take no part, so
tables of any size up to `N` can be compared. Do not write rows while
`busy`. The result is an unsigned integer. Its binary point is the sum of
the two coefficients' binary points (for example Q0.16 × Q0.16 gives
Q0.32). Duplicate strings in D2 resolve to the lowest row.

## Where this RTL goes beyond or departs from the source

* **Host interface, table storage and row-valid bits** are this design's
  own. The source leaves system integration (it mentions PCI Express) out
  of scope. Tables with more than `N` rows must be split into `N`-row
  partitions by the host, as the source suggests; combining partial results
  is left to the host.
* **String length and hash timing.** The source gives no number for the
  hashing time. `STR_BYTES = 40`, at one byte per cycle, is the value for
  which the timing model gives the source's published 131 and 303 cycles.
  FNV-1a (rather than FNV-1) and the byte order are choices.
* **Index derivation.** The fold `((x>>17)^x)`, left rotations and indices
  0..K-1 are this design's reading of a short description.
* **Which tensor gets the filter.** The stage descriptions build D2's
  filter and test D1's rows, and that is what the RTL does. One passage of
  the timing description assigns the consolidation step to the other table.
  The cycle total is the same either way.
* **Lane select width.** The source's interconnect drawing labels the
  per-lane select lines log2(b) bits wide. Here each RAM unit holds a whole
  copy of D1's table, so each lane carries a full log2(N)-bit row address.
* **Interconnect 3** is only named in the source. The packing buffer is
  this design's own.
* **Multiplier and adder.** The operands are unsigned. The product is
  formed in the first stage and delayed to the 5-cycle latency. The
  accumulator is 42 bits wide so that it cannot overflow.
* **Parallel loads.** The RAM and CAM copies and the stage-C index
  registers are written from all `N` stage-A slices at once. This matches
  the one-cycle and K-cycle write terms of the timing model, but needs very
  wide write paths.
* **Size.** The defaults are kept at the source's values. The `N` row
  filters and the `N` filter copies are each 1024 × 131072 bits
  (128 Mbit) of registers. That is the cost of the fully parallel
  structure, and a physical implementation would map them to memory
  macros. The RTL simulates at full size in about 100 MB.

## Files

`rtl/` has one module per file. `ssc_pkg.sv` holds the shared widths, the
FNV constants, the coefficient pair type and the phase encoding. The other
files are `semantic_core.sv` (top), `ssc_controller`, `input_table`,
`stage_a_slice` (built from `fnv64_hasher` and `bf_index_gen`),
`stage_b_slice`, `bf_consolidate`, `bf_distribute`, `stage_c_slice`,
`row_scheduler`, `coef_ram`, `coef_cam`, `pair_buffer`, `pipe_mult` and
`sum_accumulator`.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`, plus:

* `tb_semantic_core.sv`: 44 comparisons at a reduced size (N=16, M=64, K=3,
  B=4, P=2). The small filter makes false positives common. The testbench
  checks the dot product, G, the match count and the exact cycle count
  against a reference model written in the testbench. It also counts that
  multi-round lookups, multi-round multiplies, rejected false positives,
  partial tables, no-match and all-match cases all occur.
* `tb_semantic_core_full.sv`: the default-size core with 102 and with 1024
  shared rows, checking the 131- and 303-cycle counts. It then runs tables
  of 8, 400 and 512 rows with 10% shared (113, 119 and 122 cycles) and 1024
  rows with 50% shared (207 cycles) on the same full-size core.

Every testbench prints `TB_RESULT checks=<n> failures=<n>`. Each has a
watchdog that ends the run if it hangs.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ssc_pkg.sv \
    tb/tb_semantic_core.sv --top-module tb_semantic_core -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. The full-size testbench takes
a few minutes to compile and about 20 seconds to run. The random stimulus
uses `$urandom`, so pass `+verilator+seed+<n>` to vary it.
