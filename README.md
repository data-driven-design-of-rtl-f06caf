# Displaced-vertex track segment finder

The level-1 track trigger of the Belle II drift chamber starts with a track
segment finder (TSF): for every wire of a super layer it checks a small
neighbourhood of wires and reports a *track segment* (TS) when the hits look
like a piece of a track. The classic finder uses an hourglass of five layers and
asks for at least four hit layers. That works for tracks from the interaction
point but loses flat, low-angle tracks from displaced decay vertices.

This RTL is a finder for those tracks. It replaces the fixed "four of five
layers" rule with a **trained look-up table**: every hitmap is a small set of
wires, their hit bits form an address, and a one-bit memory says whether that
pattern is a track segment. Which patterns are accepted is decided offline
from labelled simulated or recorded events. A threshold on a per-pattern score
trades hit purity against hit efficiency. The hardware does not change when the
threshold changes; only the table contents do.

One instance serves one super layer, i.e. one trigger board. Its defaults are
sized for the outermost super layer SL8, the largest one: five trigger layers of
384 wires (1920 inputs), 768 track segments, evaluated every clock with a fixed
latency of 8 clocks (63 ns at 127 MHz).

## Hitmaps: upper and lower halves

The five trigger layers of a super layer are numbered 0 to 4. The middle layer
(2) holds the **address wire** of each segment. Every address wire `w` owns two
segments:

* the **lower** TS, identifier `w`, whose hitmap covers layers 2, 1, 0;
* the **upper** TS, identifier `WIRES + w`, covering layers 2, 3, 4.

So a hitmap is three layers high, and there are twice as many segments as
address wires. A hitmap widens with the distance `d` from the address layer, so
that tracks crossing at a shallow angle stay inside it. Three sizes are
provided, named by their number of wires, and chosen with the `VERSION`
parameter:

| `VERSION` | wires at d = 0 / 1 / 2 | address bits N | table entries |
|-----------|------------------------|----------------|---------------|
| `LUT5`    | 1 / 2 / 2              | 5              | 32            |
| `LUT9`    | 1 / 3 / 5              | 9              | 512           |
| `LUT12`   | 2 / 4 / 6              | 12             | 4096          |

A window of width `W` covers wire offsets `-floor((W-1)/2)` to
`W-1-floor((W-1)/2)` relative to the address wire. For LUT12 that means offsets
0..1, then -1..2, then -2..3. Wire numbers wrap around in phi, so wire 0 and
wire `WIRES-1` are neighbours. Address bit `k` counts the windows in the order
d = 0, 1, 2 and, inside a window, from the lowest offset up. The upper hitmap
is the mirror image of the lower one in the layer direction and has the same
bit order, so both halves read **the same table**. All of this geometry is in
`rtl/tsf_pkg.sv` (`layer_width`, `hm_bits`, `hm_dist`, `hm_offset`). To try
other shapes, change `layer_width`; everything else follows from it.

The window shapes are this design's choice. The structure follows the published
design: the upper/lower split, three layers per hitmap, hitmaps wider than the
classic ones, and 5, 9 and 12 wires. The half-cell stagger between neighbouring layers
is not modelled separately; it is folded into the window offsets.

## The pattern table

The table holds one bit per hitmap pattern: 1 = accept as a track segment,
0 = reject as noise. Entry 0 (no wire hit) should be 0. For LUT-5 the table is
small enough to write by hand; one example, used in the tests, accepts 6 of the
32 patterns (`tb/lut5_patterns.mem`). LUT-9 and LUT-12 tables come from the
offline training.

All 768 segments must be classified in every clock, so each address wire has its
own copy of the table (`pattern_lut`) with two read ports, one for its lower TS
and one for its upper TS. That is 384 copies: 384 x 4096 bits for LUT-12. This
is the shape of one dual-port block RAM per address wire. The small LUT-5 and
LUT-9 tables fit in distributed (LUT) memory instead; the synthesis tool makes
that choice from the size.

Contents are loaded in two ways:

* **at start-up**, from `INIT_FILE`: a text file of `2**N` lines, one binary
  digit per line, entry 0 first (the format of `$readmemb`);
* **between runs**, through the configuration port: `cfg_we_i`, `cfg_addr_i`,
  `cfg_data_i` write one entry per clock into all copies at once. A full LUT-12
  table takes 4096 clocks. Frames processed while a load is in progress see a
  mix of old and new contents, so load only while the trigger is not taking
  data.

Each board can hold its own table, for example to match the background in its
super layer.

## Pipeline and timing

```
hits_i ──► [1] input register
           [2] hitmap_extract     768 addresses of N bits
           [3] pattern_lut read   384 copies x 2 ports
           [4] pattern_lut output register
           [5] ts_output_limiter: flags, counts per group of 32
           [6]                    prefix sums of the group counts
           [7]                    rank of every TS, keep if rank < MAX_OUT
           [8]                    slot multiplexers ──► ts_*_o
```

A frame is one clock's worth of hits. A new frame can enter every clock. A frame
presented with `hits_valid_i` before clock edge `n` appears with `ts_valid_o`
after edge `n+7`: a latency of 8 clocks. At 127 MHz that is 63 ns, well inside
the 200 ns allowed for the whole board, receiving and sending included.
`hits_valid_i` only travels with the data as a tag. The finder never stalls, and
an invalid frame is still processed.

## Link budget

The optical link to the next trigger stage can carry only a limited number of
segments per frame. `ts_output_limiter` keeps the first `MAX_OUT` accepted
segments in identifier order (all lower TS before all upper TS, low wire
numbers first) and discards the others. The kept ones fill slots
`0..k-1` of `ts_slot_valid_o` / `ts_id_o` in increasing identifier order; an
assertion checks that the filled slots are always the lowest ones.
`ts_found_o` reports how many segments were accepted and `ts_dropped_o` how
many were discarded. If frames are dropping segments in normal running, the
table's threshold is too loose and should be lowered.

The budget of 16 segments per clock, the order of priority and the slot format
are this design's choices. Adapt them to the real link format.

## Interface of `displaced_tsf`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | system clock (127 MHz in the target system) |
| `rst_n` | in | 1 | asynchronous active-low reset of the frame-valid pipeline only |
| `hits_valid_i` | in | 1 | frame tag |
| `hits_i` | in | 5 x `WIRES` | wire hits, `hits_i[layer][wire]` |
| `cfg_we_i` | in | 1 | write one table entry into all copies |
| `cfg_addr_i` | in | N | table entry |
| `cfg_data_i` | in | 1 | accept bit |
| `ts_valid_o` | out | 1 | frame tag, 8 clocks later |
| `ts_slot_valid_o` | out | `MAX_OUT` | filled output slots |
| `ts_id_o` | out | `MAX_OUT` x 10 | TS identifiers (lower `w`, upper `WIRES+w`) |
| `ts_found_o` | out | 10 | accepted segments in the frame |
| `ts_dropped_o` | out | 10 | accepted segments discarded |

Parameters: `VERSION` (`LUT12`), `WIRES` (384), `MAX_OUT` (16),
`INIT_FILE` (empty). The widths of 10 bits hold for the default `WIRES`;
in general they are `$clog2(2*WIRES)` and `$clog2(2*WIRES+1)`.

Hits are taken as they come, one bit per wire per clock. Widening hits in time
to cover the drift time has to happen upstream. Only the valid tags are reset;
the data registers and the tables are not, and the tables must be loaded
before use.

## Files

| file | content |
|------|---------|
| `rtl/tsf_pkg.sv` | versions, constants and hitmap geometry |
| `rtl/hitmap_extract.sv` | hits to pattern addresses (stage 2) |
| `rtl/pattern_lut.sv` | one-bit pattern table, 1 write + 2 read ports (stages 3-4) |
| `rtl/ts_output_limiter.sv` | link-budget selection (stages 5-8) |
| `rtl/displaced_tsf.sv` | top: input register and the blocks above |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_displaced_tsf_versions` |
| `tb/lut5_patterns.mem` | example LUT-5 table with 6 accepted patterns |

## Verification

Each testbench computes its expected values on its own and prints
`TB_RESULT checks=N failures=M` at the end. A watchdog stops a run that hangs.

* `tb_pattern_lut`: random loads and reads on both ports. It checks the
  2-clock read latency and that a read colliding with a write returns the old
  value.
* `tb_hitmap_extract`: all three sizes on a 16-wire layer, compared bit by bit
  with hand-written tables of (layer, offset). Single-hit frames and random
  frames are used, and phi wrap-around must occur.
* `tb_ts_output_limiter`: 100 segments, budget 8, random densities. It checks
  every slot, both counts and the 4-clock latency. It requires frames below,
  exactly at and above the budget, and empty frames.
* `tb_displaced_tsf`: the full default configuration (LUT-12, 5 x 384 wires).
  It loads two different tables (a reconfiguration), sweeps the hit density and
  inserts gaps in `hits_valid_i`. Every output frame is compared with a
  reference model, and a single-frame probe measures the 8-clock latency. The
  run requires overflow frames, accepted segments in both halves, segments
  whose hitmap wraps around in phi, and idle frames.
* `tb_displaced_tsf_versions`: LUT-5 (table from `tb/lut5_patterns.mem`) and
  LUT-9 (random table through the configuration port) at SL8 size, checked
  frame by frame against the same kind of reference.

Simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`
(the testbenches read `tb/lut5_patterns.mem` by that relative path):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/tsf_pkg.sv tb/tb_displaced_tsf.sv --top-module tb_displaced_tsf
./obj_dir/Vtb_displaced_tsf
```

Replace `tb_displaced_tsf` with any other testbench name. The full-size test
builds in well under a minute and runs in about a second.

## What to trust, and what is a choice

These parts follow the published design of this finder: the upper/lower split and the doubled TS count, three
layers per hitmap, the three sizes, one trained one-bit table per board that can
be reloaded between runs, the SL8 size, discarding segments beyond the link
capacity, and the 8-clock latency.

These parts are this design's own choices and should be checked against the
real system:

* the exact hitmap windows and address bit order;
* upper and lower hitmaps sharing one table;
* the output budget, priority and format;
* the file format and configuration port;
* the split of the 8 clocks among the stages;
* the reset scheme.

Not included: the offline training that produces the tables, the classic
hourglass finder that runs beside this one on the same FPGA, the chamber
readout that feeds `hits_i`, and the board, transceivers and downstream trigger
stages.
