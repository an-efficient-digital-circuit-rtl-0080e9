# Edit distance engine with an n+2 entry row shifter

This circuit computes the edit distance between two strings of equal length
n. The edit distance is the smallest number of single-character insertions,
deletions and changes, each costing 1, that turn one string into the other.
This is the unit-cost form of the Needleman-Wunsch dynamic program that is
used to align DNA sequences. In software the distance comes from an
(n+1) x (n+1) table:

    D(i,0) = i,   D(0,j) = j
    D(i,j) = min( D(i-1,j-1) + [S1[i] != S2[j]],   D(i-1,j) + 1,   D(i,j-1) + 1 )

The answer is D(n,n). The hardware fills this table one cell per clock. It
never stores the table, or even two full rows of it. A single shift register
of **n+2 entries** holds everything the next cell needs. On every clock one
combinational cell evaluator reads three fixed taps of that register and
writes its result back into the register's tail.

The default size is n = 8 characters of 8 bits each. Distances and counters
are 4 bits wide.

## The row shifter: why n+2 entries are enough

Computing cell D(r,c) needs three neighbours:

- the diagonal neighbour D(r-1,c-1)
- the upper neighbour D(r-1,c)
- the left neighbour D(r,c-1)

Cells are computed row by row, left to right. At any moment the values that
are still needed are these:

- the part of the previous row from column c-1 onwards
- the part of the current row computed so far, including its first entry
  D(r,0)

That is (n+2-c) + c = n+2 values. If they are kept in order in a shift
register S[0..n+1], the three neighbours always sit at fixed positions:

| tap          | holds        | used as                |
|--------------|--------------|------------------------|
| `out1` = S[0]   | D(r-1,c-1) | diagonal (change/match) |
| `out2` = S[1]   | D(r-1,c)   | above (one edit)        |
| `out3` = S[n+1] | D(r,c-1)   | left (one edit)         |

Each clock the register shifts towards S[0]. This drops D(r-1,c-1), which no
later cell needs, and the new cell D(r,c) enters at S[n+1]. After n such
shifts the register holds `[D(r-1,n), D(r,0), D(r,1), ..., D(r,n)]`. One
more shift, the **row-start shift**, drops D(r-1,n) and inserts D(r+1,0) =
r+1. A 2-to-1 mux in front of S[n+1] makes this insert: the `reset` control
selects `reset_input` instead of the computed value. After that shift the
taps line up for D(r+1,1).

The register starts as `[0, 1, 2, ..., n, 1]`. That is row 0, followed by
D(1,0).

### Worked trace (n = 3, S1 = "cat", S2 = "cut")

In this implementation the fast index walks S1 and the slow one walks S2. So
each "row" below belongs to one character of S2. With unit costs the table
is symmetric in this respect, so the final value is the same either way.

| cycle | S before the edge | chars compared | new entry          |
|------:|-------------------|----------------|--------------------|
| 1  | 0 1 2 3 1 | c / c | min(0+0, min(1,1)+1) = 0 |
| 2  | 1 2 3 1 0 | a / c | min(1+1, min(2,0)+1) = 1 |
| 3  | 2 3 1 0 1 | t / c | min(2+1, min(3,1)+1) = 2 |
| 4  | 3 1 0 1 2 | row start | 2 |
| 5  | 1 0 1 2 2 | c / u | 1 |
| 6  | 0 1 2 2 1 | a / u | 1 |
| 7  | 1 2 2 1 1 | t / u | 2 |
| 8  | 2 2 1 1 2 | row start | 3 |
| 9  | 2 1 1 2 3 | c / t | 2 |
| 10 | 1 1 2 3 2 | a / t | 2 |
| 11 | 1 2 3 2 2 | t / t | min(1+0, min(2,2)+1) = 1 |

After cycle 11 the register is `2 3 2 2 1` and `out3` = 1. This is the
distance from "cat" to "cut".

## Cell evaluator

`compute_block` is purely combinational:

- An XOR of the two 8-bit characters is OR-reduced into a 1-bit change
  cost.
- One adder adds the change cost to `out1`.
- A 2-MIN comparator picks the smaller of `out2` and `out3`.
- A second adder adds 1 to that minimum.
- A final 2-MIN comparator chooses between the two sums.

The sums are one bit wider than the distances. This matters because
min(out2,out3)+1 can reach n+1, which would wrap when n = 2^W - 1. An
immediate assertion checks that the selected result always fits in W bits.

## Sequencing and timing

`counter_block` has two counters:

- **C1, `index_i`**: a mod(n+1) counter that runs 1, 2, ..., n, 0, 1, ...
  It selects the S1 character. The value 0 marks the row-start cycle, in
  which `reset` is high.
- **C2, `index_j`**: an accumulator that adds 1 in the row-start cycle and
  0 otherwise. It selects the S2 character and names the current row. In
  the row-start cycle, `reset_input` = `index_j` + 1.

Both string multiplexers (`string_register`) are combinational and 1-based.
Index 0 returns 0.

Timing of one computation:

- A computation takes n compute cycles per row, plus one row-start cycle
  between rows. That is **n·(n+1) − 1 clocks** from the start edge to
  `done`: 71 for n = 8, 271 for n = 16, 1055 for n = 32.
- The critical path runs from the counters through the string multiplexer,
  XOR, adder and two comparators, and back into the shifter.
- There is no pipelining. One cell is computed per clock.

## Top-level interface (`edit_distance_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock; everything is rising-edge |
| `rst_n` | in | 1 | synchronous, active low; clears `busy`, `done`, counters |
| `start` | in | 1 | one-cycle pulse: loads the initial row and begins |
| `s1`, `s2` | in | N × 8 | the strings; position p (1-based) is element `[p-1]`; hold stable while `busy` |
| `busy` | out | 1 | table fill in progress |
| `done` | out | 1 | result valid; stays high until the next `start` |
| `edit_distance` | out | W | D(N,N), read from the shifter's last entry |

Parameters:

- `N`: string length, default 8.
- `W`: distance width, default ceil(log2(N+1)).

A `start` while `busy` abandons the running computation and begins again.

## Modules

```
edit_distance_pkg      char_t (8-bit character), dist_width()
edit_distance_top
 ├─ counter_block      C1 / C2 counters, row-start control, start/busy/done
 ├─ string_register ×2 N-to-1 character multiplexers for S1 and S2
 ├─ compute_block      one table cell per evaluation
 │   └─ min2_comparator ×2
 └─ algo_shifter       n+2 entry row shift register with input mux
```

## What comes from the original design and what was added

These parts follow the published design:

- the four blocks and how they are wired
- the n+2 entry shifter with its taps at S[0], S[1] and S[n+1]
- the reset/reset_input mux
- the XOR / adder / 2-MIN structure of the cell evaluator
- the mod(n+1) counter and the 0/1-accumulator

These parts are this implementation's own choices:

- **Widths.** The original sizes distances and counters at log2(n) bits.
  That cannot represent the distance n itself when n is a power of two. Here
  they are ceil(log2(n+1)) bits, which is 4 rather than 3 for n = 8.
- **Row-start value.** The row-start value is the first entry of the row
  that begins, which is `index_j` + 1. The original's counter description
  names it D(index_i,0). Taken literally that would be 0, because index_i
  is 0 in that cycle.
- **Cycle count.** The original estimates t² cycles per t × t table. The
  schedule it describes, and this RTL, takes t·(t+1) − 1.
- **Control signals.** `start`, `busy`, `done` and `rst_n` are new. So are
  the shifter's `load` (initial row) and `en` (hold after completion). The
  original assumes the register is already filled and shifts on every edge.
- **String storage.** The strings are plain input buses. How they are
  loaded into the string registers is left to the surrounding system.
- **Character compare.** A change is charged when the two characters differ
  in any of their 8 bits.
- **Out-of-range index.** Index 0 of a string multiplexer returns 0.

Limits to keep in mind:

- The engine solves one complete n × n problem from the fixed boundary row
  0, 1, ..., n. To cover long sequences, the original proposes running
  software loops over t × t tiles on such a unit, with t = 8, 16 or 32.
  Exact tiling needs each tile to start from the bottom row and right column
  of its neighbours. This engine has no inputs for those, so it cannot
  compute tiles of a larger table exactly as it stands.
- Only the distance is produced, not the edit script.
- Timing, area and power of a standard-cell implementation were not
  reproduced.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| bench | what it checks |
|-------|----------------|
| `tb_min2_comparator` | all 256 input pairs at 4 bits |
| `tb_compute_block` | all neighbour triples 0..9, equal characters and characters differing in each single bit |
| `tb_string_register` | every select value, random strings |
| `tb_algo_shifter` | load contents; random shift, row-start and hold sequences against a queue model |
| `tb_counter_block` | exact cycle-by-cycle counter sequence, row-start value, n·(n+1)−1 latency, restart |
| `tb_edit_distance_top` | whole engine at default N = 8 |
| `tb_edit_distance_workloads` | whole engine at N = 16 and N = 32 |

Both whole-engine benches use `tb/ed_driver.sv`. It compares every cell the
engine produces, cycle by cycle, with a software table. It also checks the
final distance, the latency, that the result holds, a restart and a reset
while busy. It counts row starts, matches, mismatches and wins of the
diagonal and side paths, and fails if any of them never occurred. The
stimulus includes:

- identical strings
- strings with no characters in common
- `aaaabcda` → `aaabcada` (distance 2: one delete and one insert)
- random DNA strings
- random 2-letter strings

To run a bench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_edit_distance_top \
    rtl/edit_distance_pkg.sv tb/tb_edit_distance_top.sv
./obj_dir/Vtb_edit_distance_top
```

Swap in any other bench name. Verilator finds the remaining modules through
`-Irtl -Itb`. Each whole-engine bench runs in well under a second.

To change the string length, set `N` on `edit_distance_top`. `W` follows
automatically.
