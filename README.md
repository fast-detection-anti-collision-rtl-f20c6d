# FDACA: a four-at-a-time tag identifier for RFID readers

When several RFID tags in a reader's field answer at once, their replies
collide. Tree-based (deterministic) anti-collision schemes resolve this by
having the reader walk a binary tree of ID prefixes bit by bit, so the time to
identify a tag grows with both the number of tags and the ID length, and the
tags must remember where in the tree the reader is.

The Fast Detection Anti-Collision Algorithm (FDACA) implemented here takes a
different route. Tags are treated as plain *address carriers*: they answer
with their whole ID, and the reader takes four answers in parallel, each on
its own input lane. In every **read cycle** the four IDs are captured at
once, ordered from the smallest to the largest by a two-level compare tree
(a binary tree with four leaves), and then put out one per system clock. The
result is one identified tag per system clock, independent of ID length:
at a 3 ns clock that is 333 million tags per second.

This RTL describes the digital reader side only. The tags and the radio link
are not part of it; on an FPGA a data generator stands in for them.

## Block structure

```
               +----------------+   4 x ID    +-------------+  4 x ID  +----------+
 (fdaca_top)   | data_generator |------------>| fast_search |--------->| read_tag |--> data_out
               +----------------+             +-------------+          +----------+--> sel_out
                       ^ tag_rise             ^ tag_rise   ^ tag_fall        ^ sel
                       |                      |            |                 |
                    +---------------------------------------+      +------------------+
                    |            clock_divider              |      | select_generator |
                    +---------------------------------------+      +------------------+
                       |-- tag_clk
 fdaca_core = everything except data_generator (IDs enter on data0..data3)
```

| Module             | Role |
|--------------------|------|
| `fdaca_pkg`        | Shared constants: group size 4, tag clock ratio 4, default ID width 8, select type. |
| `clock_divider`    | Tag clock of period 4 system clocks; one period is one read cycle. Also gives `tag_rise` / `tag_fall` enables. |
| `data_generator`   | Stand-in for the tags: four new IDs at every tag clock rise. |
| `fast_search`      | Captures four IDs at tag clock rise, orders them, stores them at tag clock fall. |
| `select_generator` | Select count 0,1,2,3 per read cycle, one step per system clock. |
| `read_tag`         | Holds the ordered group and puts out one ID per clock under the select lines. |
| `fdaca_core`       | The on-chip reader: ports `clk`, `reset`, `data0..data3`, `data_out` (plus `sel_out`, `tag_clk`, `tag_rise` for observation and pacing). |
| `fdaca_top`        | Full system: `data_generator` feeding `fdaca_core`. |

Everything runs on one clock, `clk`. The "tag clock" exists as the
`tag_clk` output for observation, but the modules do not use it as a clock:
its rising and falling edges are turned into one-cycle enables (`tag_rise`,
`tag_fall`) that are high in the system clock cycle ending with the
corresponding tag clock edge. A logic that updates "at the tag clock's
negative edge" therefore updates on the system clock edge where `tag_fall`
is high. This is a choice of this implementation; it avoids a derived clock.

Reset is synchronous and active high on every module and clears all
registers. The clock divider and the select generator reset together, so the
select count always equals the tag clock phase (an assertion in `fdaca_core`
checks this).

## The read cycle, clock by clock

Number the system clock edges so that the edge where `tag_rise` is high is
*E*. The group that sits on `data0..data3` just before *E* moves through the
core as follows:

| Edge  | Tag clock | What happens |
|-------|-----------|--------------|
| E     | rises     | `fast_search` copies the four IDs into its input registers. |
| E+1   | high      | The compare tree settles (it has two clocks). |
| E+2   | falls     | The ordered group is written into `fast_search` output registers `min[0..3]`. |
| E+4   | rises     | `read_tag` copies `min[0..3]` into its input registers (the edge that ends select slot 3); `fast_search` already captures the next group. |
| E+5 … E+8 | | `data_out` shows the IDs smallest first, `sel_out` = 0, 1, 2, 3. |

A new group is sampled every four clocks while the previous one is being
shown, so `data_out` carries a new identified ID on every clock without gaps.
The latency from sampling to the first ID is five clocks.

In `fdaca_top`, the data generator updates its outputs on the same edge on
which the fast search samples, so the search takes the group the generator
presented during the previous read cycle: a group generated at edge *G*
appears on `data_out` after edges *G*+9 … *G*+12.

The compare tree path (from the `fast_search` input registers to its output
registers) is a two-cycle path by construction: the registers are loaded two
clocks apart. A timing constraint can declare it as such.

## The compare tree

`fast_search` orders four IDs in two levels:

1. **Level 1**, two branches in parallel: the *left* branch orders IDs 0 and
   1, the *right* branch orders IDs 2 and 3, each with a single if-else
   compare, giving (l_min, l_max) and (r_min, r_max).
2. **Level 2**: the smallest ID is the smaller of l_min and r_min, the
   largest is the larger of l_max and r_max. The two that remain (the larger
   minimum and the smaller maximum) are ordered by one more compare and
   become the second and third ID.

That is five comparators in all, a complete sorting network for four
inputs: whatever the input order, `min[0] <= min[1] <= min[2] <= min[3]`
holds, which `fast_search` asserts. Equal IDs are kept as separate entries.
The split into a left and a right branch and the smallest-first order come
from the original description of the algorithm; the exact wiring of the
second level is this design's completion of it.

Example (the group used throughout the tests): 18, 03, 0C, 24 (hex, lanes
0..3) leaves as 03, 0C, 18, 24.

## The data generator

The generator is a deterministic counter *k* that steps once per read cycle,
starting from 0 after reset. Its four lanes carry

    lane 0 = 8k,  lane 1 = k,  lane 2 = 4k,  lane 3 = 12k    (all mod 2^ID_WIDTH)

so successive groups are 18,03,0C,24 / 20,04,10,30 / 28,05,14,3C /
30,06,18,48 for k = 3..6. The lanes arrive out of order, and once 12k wraps
past the ID width lane 3 becomes the smallest, so the compare tree sees
changing orders. Group 0 (all zeros) and k = 2^(ID_WIDTH-2) give
groups with equal IDs. The low bits of lanes 0 and 2 are always zero.

The original algorithm describes this block as producing *random* IDs of
any length; the counter pattern reproduces its published example groups
rather than a random source. The generator is only a test source; on a chip
the IDs come in on `fdaca_core`'s `data0..data3`.

## Parameters

| Parameter  | Where | Default | Meaning |
|------------|-------|---------|---------|
| `ID_WIDTH` | `fdaca_top`, `fdaca_core`, `data_generator`, `fast_search`, `read_tag` | 8 | Tag ID width in bits. 16 is the other width named for the design and is tested. |
| `DIV`      | `clock_divider` | 4 | System clocks per tag clock period. Must be even. |
| `N`        | `select_generator` | 4 | Slots per read cycle. |

The group size of four is fixed by the two-level tree (`fdaca_pkg::N_TAGS`);
`DIV`, `N` and `N_TAGS` must stay equal for the core to work, which is why
`fdaca_core` takes them from the package rather than exposing them.

## Departures and open points

- The original text lists "two" clock dividers and "two" fast search modules
  in one place, but its block diagram and its count of five sub-modules show
  one of each. One of each is built.
- Widening throughput by multiplexing several four-lane FDACA units is
  mentioned as an option but not designed; only one unit is built.
- The random ID source is replaced by the counter pattern above. The IDs of
  the original FPGA run (20,40,60,88 then 24,48,6C,89) come from a rule that
  is not known; the core test feeds them directly instead.
- The tag clock is realised as enables in one clock domain (see above).
- The moment `read_tag` loads its input registers (end of select slot 3),
  the registered `data_out`, and the `sel_out` port are this design's choices.
- Reset type and polarity are chosen (synchronous, active high).
- The reported 0.18 µm synthesis figures (3 ns clock, 26,677 µm² cell area,
  3.45 mW) belong to the original implementation; this RTL has not been
  through that flow. Its cycle behaviour gives one ID per clock, so 333 M
  tags/s follows if it closes timing at 3 ns.
- Tags, the RF front end and the host data management software are outside
  the scope of this RTL.

## Testbenches

All testbenches are self-checking and end with a line
`TB_RESULT checks=<n> failures=<n>`; each has a watchdog.

| Testbench | What it checks |
|-----------|----------------|
| `tb_clock_divider`   | Tag clock shape and period (4), position of `tag_rise`/`tag_fall`, restart after a mid-period reset. |
| `tb_data_generator`  | Lanes equal 8g, g, 4g, 12g after the g-th irregularly timed load; hold without load; example group 3. |
| `tb_select_generator`| 0,1,2,3 sequence and restart after reset. |
| `tb_fast_search`     | Example group, equal IDs, all 24 orderings of four distinct values, 300 random groups; outputs hold between stores. |
| `tb_read_tag`        | Loads only on slot 3, one ID per clock in lane order, `sel_out` aligned with `data_out`. |
| `tb_fdaca_core`      | 199 groups (examples, FPGA-run groups, random) through the core; exact E+5..E+8 timing; one ID per clock with no gaps. |
| `tb_fdaca_top`       | The whole system at default parameters over all 256 counter values plus a wrap, then a reset in the middle of a read cycle; counts read cycles, reorders, lane wraps, equal-ID groups, counter wraps and mid-run resets, and fails if any never happens. |
| `tb_fdaca_top_16`    | The same with `ID_WIDTH = 16`, over all 65,536 counter values. |

To run one with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/fdaca_pkg.sv tb/tb_fdaca_top.sv \
          --top-module tb_fdaca_top -o sim
./obj_dir/sim
```

Replace `tb_fdaca_top` with any testbench name above. For lint only:
`verilator --lint-only -Wall -Irtl rtl/fdaca_pkg.sv rtl/fdaca_top.sv`.
