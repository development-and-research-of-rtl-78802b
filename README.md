# Improved conveyor sorting device

A pipelined ("conveyor") hardware sorter for arrays of N unsigned binary
numbers. It takes a new unsorted array on every clock cycle and returns
each array in descending order a fixed number of cycles later. It is built
from one kind of cell, a compare-and-exchange element, and from pipeline
registers on every line between two tiers of elements.

A plain conveyor built on the modified bubble method sorts all N values with
one triangle of N(N-1)/2 elements, arranged in 2N-3 tiers. This design
instead sorts the two halves of the array in two independent bubble
conveyors of N/2 values each. The halves are sorted side by side, so they
share tiers. A merge conveyor then interleaves the two sorted halves. For
N = 8 the result is:

| structure                       | elements | register ranks | registers (8 lanes) |
|---------------------------------|---------:|---------------:|--------------------:|
| single bubble conveyor, 8 values |       28 |             14 |                 112 |
| this design, 8 values           | 22 = 6 + 6 + 10 |       10 |                  80 |

For general even N the design has 3((N/2)² − N/2)/2 + N/2 elements and
3N/2 − 2 register ranks of N registers each.

The default build is 8 values of 8 bits (`N = 8`, `W = 8`).

## Lanes and ordering

The N values travel down N lanes. Lane 0 carries the first input (x1) and
the first output (y1). Every compare-and-exchange moves the larger value
towards the lower-numbered lane. The output is therefore descending:
`d_out[0]` is the largest value and `d_out[N-1]` the smallest. Equal values
are allowed and come out adjacent.

For example, the input array `01 07 15 36 42 08 88 12` (hex, lane 0 first)
leaves as `88 42 36 15 12 08 07 01`.

## The basic sorting element (`bse`, `cmp_gt`)

A comparison scheme (`cmp_gt`) forms the sign `x1 > x2`. Two 2-input
multiplexers take that sign as their select:

- M1 takes the sign itself and outputs the smaller number on `y_min`.
- M2 takes the inverted sign and outputs the larger number on `y_max`.

The element is combinational. The comparator is written as a plain `>`
because no gate-level structure is specified for it; synthesis picks one.

## Conveyor tiers (`csd_tier`, `conv_reg`, `csd_pkg`)

A tier is one row of elements followed by one rank of registers, one
register (`conv_reg`) per lane. The parameter `PAIRS` lists the elements of
a tier as a lane mask. Bit `c` set means that an element joins lanes `c+1`
and `c`:

- lane `c+1` feeds the element's `x1` input and receives the minimum;
- lane `c` feeds its `x2` input and receives the maximum.

Lanes without an element pass straight down to their register. An
elaboration-time check rejects masks whose elements share a lane.

`csd_pkg` computes every mask, so each structure below is a generate loop
over tiers:

- `bubble_mask(m, t)` gives tier t of an m-value bubble conveyor.
- `merge_mask(n, j)` gives tier j of the merge triangle.
- `even_pairs(n)` gives lanes (1,0), (3,2), ...

The package also gives the latency and the element count. The package's
testbench checks these counts against the closed-form counts for every even
N up to 128.

## Half sorters (`bubble_csd`)

Each half runs a bubble conveyor of M = N/2 values, which works like
insertion sort. An input register rank is followed by 2M−3 tiers. Insertion
round r (r = 1 … M−1) carries the value that started in lane r down to
lane 0. The element on lanes (c+1, c) in round r works in tier 2r−1−c, so
consecutive rounds overlap by one tier. For M = 4, listing each element as
the lane pair it joins:

| tier | elements (lane pairs) |
|-----:|-----------------------|
| 1 | (1,0) |
| 2 | (2,1) |
| 3 | (1,0) (3,2) |
| 4 | (2,1) |
| 5 | (1,0) |

The top level runs two copies on lanes 0–3 and 4–7. Together with the input
rank they take 6 register ranks. With `M = 8`, `bubble_csd` is exactly the
single 8-value bubble conveyor from the comparison table, with 28 elements
and 14 ranks. Its testbench also runs that size.

## The merge conveyor (`csd_merge`)

This is the least obvious part. Its input is half A in lanes 0…M−1 and
half B in lanes M…N−1, each descending. It works in two steps.

1. **Cross tier.** The i-th value of A is compared with the i-th value of
   B. The larger goes to lane 2i and the smaller to lane 2i+1. Afterwards
   lane 0 holds the overall maximum and lane N−1 the overall minimum. Every
   other value is at most a few places from its final position.
2. **Triangle.** Tier j (j = 1 … M−1) joins the neighbouring lanes
   (c+1, c) for c = j, j+2, …, N−j−2. Each tier therefore has one element
   fewer than the one above, and its outer lanes are already final. For
   N = 8:

| merge tier | elements (lane pairs) |
|-----------:|-----------------------|
| 0 (cross) | A0:B0→(0,1), A1:B1→(2,3), A2:B2→(4,5), A3:B3→(6,7) |
| 1 | (2,1) (4,3) (6,5) |
| 2 | (3,2) (5,4) |
| 3 | (4,3) |

The merge has M + (M−1) + … + 1 = ((N/2)² − N/2)/2 + N/2 elements in M
tiers, each tier with its own register rank.

The published structure gives this placement for N = 8 only. For other even
N this design continues the same pattern. An exhaustive 0/1 simulation of
the network, for every even N up to 16, sorts every input. By the 0-1
principle of sorting networks, that covers all input values at those
sizes. Larger N, up to 128, passes random tests but is not proven.

## Interface and timing (`csd_improved`)

| port | width | meaning |
|------|-------|---------|
| `clk`   | 1 | conveyor clock; every register loads on each rising edge |
| `rst`   | 1 | synchronous, active high; clears every register to 0 |
| `d_in`  | N × W, packed | unsorted array, `d_in[0]` = x1 |
| `d_out` | N × W, packed | sorted array, `d_out[0]` = largest |

- **Latency.** The rising edge that samples `d_in` loads the input rank.
  The sorted array is on `d_out` 3N/2 − 3 rising edges later: 9 edges
  for N = 8, through 10 register ranks.
- **Throughput.** One array per clock. There is no valid or ready
  handshake, so the conveyor always advances.
- **Reset.** A reset flushes every array in flight. The outputs read zero
  until the first array loaded after the reset reaches them.

If a system needs to know which outputs are meaningful, add a 1-bit shift
register of the same depth alongside the data.

The numbers are unsigned. For signed data, invert the sign bit on entry
and on exit.

## Choices made where the source design is silent or unclear

- The register, comparator and reset style are this design's own. The
  registers use a synchronous active-high reset to zero. The comparator is
  a behavioural `>`.
- Element outputs: one sentence of the original description calls the
  larger value the *first* output. Its element diagram and the multiplexer
  description both put the minimum on Y1. This design follows the diagram:
  Y1 = min, Y2 = max.
- Register count of the bubble conveyor: the original text states
  N(2N−3) registers. Its drawing and its worked example use (2N−2) ranks of
  N registers. This design follows the drawing.
- Latency: the original reports the result "at the 9th cycle". This
  design reads that as 9 rising edges after the edge that loads the input
  rank, which is what 10 register ranks give.
- Sizes other than N = 8 are a generalisation, described above. `N` must
  be even and between 4 and 256.

The two alternative conveyors that the original also discusses are not part
of this design: the odd-even transposition sorter and Batcher's sorter.

## Files

| file | content |
|------|---------|
| `rtl/csd_pkg.sv` | lane-mask type, tier placement functions, counts |
| `rtl/cmp_gt.sv` | comparison scheme `x1 > x2` |
| `rtl/bse.sv` | basic sorting element (comparator, M1, M2) |
| `rtl/conv_reg.sv` | conveyor register |
| `rtl/csd_tier.sv` | one tier: elements from a mask plus a register rank |
| `rtl/bubble_csd.sv` | bubble conveyor of M values |
| `rtl/csd_merge.sv` | merge conveyor of two sorted halves |
| `rtl/csd_improved.sv` | top level: two half sorters and the merge |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_csd_sizes` for other array sizes |
| `tb/csd_size_check.sv` | helper of `tb_csd_sizes`: drives and checks one instance |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops.
Build and run one, for example the end-to-end test at the default size,
from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/csd_pkg.sv \
    tb/tb_csd_improved.sv --top-module tb_csd_improved -Mdir obj_top
./obj_top/Vtb_csd_improved
```

Replace the testbench name to run another. `rtl/csd_pkg.sv` must be listed
first, because all other modules import it.

What the testbenches cover:

- `tb_cmp_gt` and `tb_bse` are exhaustive over all pairs of 8-bit
  operands.
- `tb_csd_tier` checks two different masks against a reference model.
- `tb_bubble_csd` streams random arrays through the 4-value and 8-value
  conveyors. It checks their latencies (6 and 14 edges) and that the
  outputs are zero before the first array arrives.
- `tb_csd_merge` checks the 8-lane and 6-lane merges. It covers interleaved
  halves and halves where one side is entirely larger.
- `tb_csd_improved` streams 2000 back-to-back arrays through the default
  device, and checks the exact latency on every cycle. The stream includes:
  - the example array above;
  - all 256 arrays of 0/1 values (a complete proof of the default
    network);
  - arrays with repeated values;
  - halves that arrive in ascending order;
  - an upper half larger than the lower half;
  - a reset in mid-stream.

  The testbench counts each of these events and fails if one never
  happens.
- `tb_csd_sizes` (with its helper `csd_size_check`) runs the device at
  N = 4, 16, 24, 32, 48 and 64 and checks latency and order on every cycle.
  At N = 4 and 16 it streams all 0/1 arrays, which proves those networks.
  N = 96 and 128 pass the same test but take several minutes to build, so
  they are left out of the list.
- `tb_csd_pkg` checks the tier masks for 8 values against the placement
  tables above, and the element and rank counts for every even N up to 128.

To change the size, override `N` and `W` on `csd_improved`. The structure,
masks and register ranks follow automatically.
