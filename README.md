# Multiple Group Illinois Scan: a shared scan-in network with grouped inputs

Scan testing shifts every test pattern through the chip's flip-flops. With one
long chain, every pattern costs as many tester clocks and as many stored bits
as there are flops. The Illinois Scan architecture (ILS) cuts the chain into
short segments and, in **broadcast mode**, feeds all of them from one scan-in
pin. Each pattern then costs only one segment length. The price is a
constraint: every segment receives the same bits, so some faults cannot be
tested. Classic ILS falls back to a slow **serial mode** (the original long
chain) for those faults.

**Multiple Group ILS** replaces serial mode with **groups mode**. The
segments are split into a few groups. Segments of one group share a scan-in
pin, and different groups use different pins. Two segments that need opposite
values in the same bit position for some test go into different groups. All
segments still shift in parallel, so a groups-mode pattern costs a segment
length in clocks and (segment length × number of groups) stored bits. A
serial pattern costs the full flop count in both. All segment outputs are
compacted in a multiple-input signature register (MISR).

This repository holds synthesizable SystemVerilog for this scan network. The
segments, the per-segment input multiplexers, optional inverters and the MISR
are parameterized. The default size is one published configuration of the
ISCAS-89 benchmark s38584.1: 1426 flops, segments of 12 (ILS-12), so 119
segments, and 8 scan-in groups. The repository also holds testbenches that
apply the published pattern counts of several benchmark configurations. They
reproduce the published clock counts and stored-bit counts exactly.

## Segments and the fold-over

Number the flops 1..N in the order of the original full-scan chain. In an
ILS-k configuration, segment c (counting from 0) holds flops c·k+1 … c·k+k.
The last segment takes whatever is left, so it may be shorter. Position 1 of
every segment is next to its scan input. Position k drives its scan output.

Shifting k bits into all segments at once **folds** a full-length pattern:
position j of every segment receives the j-th bit of its segment's stream.
The last segment is short, but it sits on the same input side. Because the
shifting runs k clocks, its position j also receives the j-th bit. So
"position j" means the same thing in every segment.

A pattern is loadable in broadcast mode only if no two segments need
different values in the same position. A loadable pattern may leave bits
unspecified (X). Here is a 12-flop example with three segments of 4:

```
serial pattern (positions 1..12):  X 0 1 X | 1 1 X X | X X 1 1
folded:   SC1 = X 0 1 X
          SC2 = 1 1 X X      <- position 2: SC1 needs 0, SC2 needs 1
          SC3 = X X 1 1
```

No single stream loads this pattern. With SC1 on pin 1, and SC2 and SC3
together on pin 2, it loads: pin 1 carries 0 0 1 0 and pin 2 carries
1 1 1 1. `tb_ils_fig_example` checks this on the RTL. It tries all 16
broadcast streams, and none of them meets the pattern. The groups-mode and
serial-mode loads both meet it.

## Modes and the segment input multiplexer

Each segment has an `ils_input_mux` in front of it:

| mode (`ils_pkg::ils_mode_e`) | segment c shifts in | MISR | `scan_out` |
|---|---|---|---|
| `MODE_BROADCAST` | `scan_in[0]` | compacts | MISR top bit |
| `MODE_GROUPS` | `scan_in[GROUP_MAP[c]]` (inverted if `INVERT_MAP[c]`) | compacts | MISR top bit |
| `MODE_SERIAL` (only if `HAS_SERIAL`) | segment c-1's output (`scan_in[0]` for c = 0) | holds | end of last segment |

Two parameters of `ils_top` decide which multiplexer inputs exist:

* `HAS_BROADCAST=1, HAS_SERIAL=0` (default): the two-input multiplexer.
  Broadcast mode covers most faults, and groups mode covers the rest.
* `HAS_BROADCAST=1, HAS_SERIAL=1`: the three-input multiplexer. Use it when
  some faults still need serial patterns. Classic ILS is this setting with
  `NUM_GROUPS=1`.
* `HAS_BROADCAST=0, HAS_SERIAL=0`: the multiplexer becomes a wire, and every
  segment is hard-wired to its group pin. This is for test sets that use
  groups mode alone. It saves the multiplexers and routing. The cost is more
  stored data, because every pattern then uses all group pins.
* `HAS_BROADCAST=0, HAS_SERIAL=1`: groups mode plus a secondary serial mode.
  This suits a flow that leaves a few very conflicting patterns out of the
  grouping and applies them serially.

If you select a mode that the configuration lacks, the multiplexer falls back
to the group input, and an assertion in `ils_top` reports the error.

`scan_in[0]` has three roles: it is the broadcast pin, the serial-mode pin
and the pin of group 0. So the first pin of Multiple Group ILS is the pin
that classic ILS already has.

## Where the group map comes from

`GROUP_MAP` (one 8-bit group number per segment) is fixed when the chip is
designed. It is derived from test generation, not by hardware:

1. Generate broadcast-mode patterns, and record the faults that broadcast
   mode cannot test.
2. For those faults, generate patterns without random fill, so that
   unneeded bits stay X.
3. Fold each pattern onto the segments. Whenever two segments need opposite
   values in some position, add an edge between them in an
   *incompatibility graph*.
4. Colour the graph so that adjacent nodes get different colours (the
   DSATUR heuristic, seeded with a maximum clique). Each colour is one
   scan-in pin, so the colour of a segment is its group.

A segment can also join a group in inverted form, if its complement is
compatible with the group. `INVERT_MAP[c]` then puts an inverter on segment
c's group input. The inverter acts in groups mode only. The inverted
segment then receives the complement of its group's stream.

The default map is round robin (segment c in group c mod `NUM_GROUPS`). It
only shows the structure and is not a real colouring. For a real circuit,
pass the colouring result as `GROUP_MAP`.

## Response compaction

The `misr` has one stage per segment. It is an internal-XOR LFSR:

```
sig' = {sig[W-2:0], 0} ^ (sig[W-1] ? POLY : 0) ^ segment_outputs
```

It compacts on every shift clock in broadcast and groups mode. It holds
during capture clocks and in serial mode. `misr_clear` zeroes it and takes
priority over compaction. The polynomial comes from `ils_pkg::misr_taps`.
That function returns a primitive polynomial for widths 2–8, 16 and 119
(x^119 + x^111 + 1 for the default), and x^W + x + 1 for other widths, which
is not guaranteed to be maximal-length. If your width matters, supply your
own polynomial through `ils_top`'s `MISR_POLY` parameter. The top bit of the
signature drives `scan_out`. The full signature is on the `signature` port
for parallel readout. The MISR is only safe if the circuit never captures
unknown values, as with any MISR-based compaction.

## Test application: clocks and stored bits

The tester loads the first pattern. After that, unloading each response
overlaps with loading the next pattern. With shift length F (the longest
segment in broadcast and groups mode, all flops in serial mode) and V
patterns:

```
clocks      = F + (1 + F) · V
stored bits = (PI + F · pins) · V      pins = 1 (broadcast, serial), NUM_GROUPS (groups)
```

PI is the number of primary inputs. Responses are not stored, because they
are compacted. For s38584.1 ILS-12 with 8 groups, 105 broadcast patterns and
509 groups patterns, this gives 1377 + 6629 = 8006 clocks and
5250 + 68206 = 73456 bits. Full scan needs 906 144 clocks for the same
circuit.

### Transition-fault patterns

A transition (slow-to-rise or slow-to-fall) test needs two vectors. The flops
are loaded with the first vector's state. One functional clock applies the
first vector's primary inputs and loads the circuit's own next state. A
second clock, with the second vector's primary inputs, captures the response,
which is then shifted out. The scan network is the same hardware as for
stuck-at testing. Only the tester sequence differs: two non-shift clocks per
pattern, and 2·PI stored input bits.

The published clock counts for these tests use F + (1 + F) · P, which allows
one non-shift clock per pattern. The testbenches model the two clocks
described above and expect F + (2 + F) · P, which is one clock per pattern
more. The stored-bit counts, (2·PI + F) · P, match the published ones
exactly.

## Files

| file | contents |
|---|---|
| `rtl/ils_pkg.sv` | mode enum, group-map type, segment-count/length helpers, MISR polynomials |
| `rtl/scan_segment.sv` | segment of LEN mux-D scan flops |
| `rtl/ils_input_mux.sv` | per-segment scan-input multiplexer (3-, 2-input or wire) |
| `rtl/misr.sv` | W-stage MISR |
| `rtl/ils_top.sv` | the scan network: segments, multiplexers, inverters, MISR |
| `tb/ils_tester.sv` | behavioural tester and stand-in circuit logic, with a bit-level reference model |
| `tb/ils_workload_run.sv` | one `ils_top` plus tester, for running configurations side by side |
| `tb/tb_*.sv` | self-checking testbenches, described below |

### `ils_top` interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (all flops and the MISR to 0) |
| `mode` | in | `ils_mode_e` | broadcast / groups / serial |
| `scan_en` | in | 1 | 1 = shift, 0 = capture `capture_d` |
| `scan_in` | in | `NUM_GROUPS` | scan-in pins |
| `misr_clear` | in | 1 | synchronous signature clear |
| `capture_d` | in | `NUM_FF` | next-state bits from the circuit's logic; bit i = flop i+1 |
| `ff_q` | out | `NUM_FF` | flop state to the circuit's logic |
| `signature` | out | `NUM_CHAINS` | MISR contents |
| `scan_out` | out | 1 | MISR top bit, or the chain end in serial mode |

Parameters: `NUM_FF` (1426), `SEG_LEN` (12), `NUM_GROUPS` (8),
`HAS_BROADCAST` (1), `HAS_SERIAL` (0), `GROUP_MAP` (round robin),
`INVERT_MAP` (none) and `MISR_POLY` (from `ils_pkg::misr_taps`). `NUM_CHAINS
= ceil(NUM_FF / SEG_LEN)` is derived. The group map covers at most 256
segments and 256 groups (`ils_pkg::MAX_CHAINS`, `GROUP_W`).

The circuit under test is not part of this RTL. Connect its next-state logic
between `ff_q` and `capture_d`. Every transfer takes one clock. A loaded
pattern is visible on `ff_q` right after the last shift clock. A bit shifted
in reaches the segment output `SEG_LEN` clocks later.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_scan_segment`: random shift and capture traffic against a queue
  model, plus the LEN-clock latency to `scan_out`.
* `tb_ils_input_mux`: all four multiplexer variants, exhaustively.
* `tb_misr`: a 3-stage MISR must be maximal-length (period 7). The default
  119-stage MISR is checked every clock against a model built from the
  polynomial's coefficients.
* `tb_ils_top`: end to end on 14 flops (three segments of 4 and one of 2),
  3 groups with one inverted segment, and serial mode. It runs broadcast,
  groups, transition and serial sessions. Every clock, it compares the flop
  state, the signature and `scan_out` with the tester's reference model.
  After every load, it checks the fold-over. It checks the clock and bit
  totals of each session, and that every mode and mechanism occurred.
* `tb_ils_fig_example`: the 12-flop example above.
* `tb_ils_full`: the default configuration without overrides, running the
  s38584.1 ILS-12 test (105 + 509 patterns, 38 primary inputs). Expected
  result: 8006 clocks and 73456 bits.
* `tb_ils_workloads`: published configurations side by side, each with
  its published clock and bit totals. These are s13207.1 ILS-6, s15850.1
  ILS-6 and s38417 ILS-14 (groups), s38584.1 ILS-128 (broadcast + serial),
  and s38417 ILS-128 with transition patterns. A sixth run is s38584.1
  ILS-12 with groups mode alone, on the multiplexer-free variant
  (`HAS_BROADCAST=0`, 634 patterns: 8254 clocks, 84956 bits). It simulates
  about 400 000 clocks and takes about two minutes.

The pattern data is random, and the circuit logic is a stand-in function
(see `tb/ils_tester.sv`). So these tests show that the scan network loads,
captures, compacts and counts clocks correctly. They say nothing about the
fault coverage of any real test set.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ils_pkg.sv tb/tb_ils_top.sv \
          --top-module tb_ils_top -o sim && ./obj_dir/sim
```

Use the same command for the other testbenches. Change the file and top
names.

## Limits and departures

* The group map is a parameter, and the default one is illustrative.
  Computing a real one (pattern generation, compatibility analysis,
  colouring) is software and is not included.
* Segments are equal-length cuts of one chain. Designs whose existing scan
  chains have unequal lengths cannot be described by `NUM_FF` / `SEG_LEN`.
  That would need a per-segment length table.
* The scan-cell style (mux-D), the reset, the MISR polynomial and clear
  input, reading the signature through `scan_out`, and where the inverter
  sits are choices made for this RTL.
* Transition patterns are modelled with two non-shift clocks per pattern,
  one more than the published clock counts assume (see above).
* Synthesis of the default `ils_top` gives 1545 flip-flops: 1426 scan flops
  and 119 MISR stages.
