# Road Warrior: a duplicate-road filter for the CDF Silicon Vertex Tracker

The CDF Silicon Vertex Tracker (SVT) finds tracks in two stages. An associative-memory
pattern recognition stage finds coarse *roads*: each road is a set of five silicon
superstrips plus one track from the drift chamber track trigger (XFT). A Track Fitter
then fits every hit combination of every road at full resolution. When a road may be
accepted with a hit missing on one of the five silicon layers ("4 out of 5"), one real
track often produces several roads: a 5-of-5 road plus one or more 4-of-5 roads. They
carry the same four hits, and the Track Fitter fits them again and again. At roughly
300 ns per fit, these *ghost* roads cost real processing time.

The Road Warrior sits in the word stream between the Hit Buffer and the Track Fitter and
recognises ghosts before they are fitted. It keeps, for the current event, a small
associative memory of the roads already passed on. Each new road is compared with all of
them at once. If at least 4 of its 5 silicon hits and its XFT track equal those of a
stored road, the road is a duplicate. Its road word is then tagged (tag field = `0xF`) so
that the Track Fitter skips it. Otherwise the road is stored in the next free row. No word
is removed or added: the stream passes through a fixed 3-cycle pipeline, and only the
road words of duplicates change. The memory is emptied at the end of every event.

This repository holds synthesizable SystemVerilog for the complete filter, a
self-checking testbench per block, and an end-to-end testbench with an independent
reference model.

## The word stream

All words are 23 bits wide, modelled as `rw_pkg::svt_word_t`:

| field  | bits | meaning |
|--------|------|---------|
| `ee`   | 22   | end of event |
| `ep`   | 21   | end of packet: this word is a road word |
| `data` | 20:0 | payload |

The board recognises three kinds of word:

* **Hit word** (`ep=0, ee=0`): `data[20:18]` is the layer. Layers 0-4 are the silicon
  layers and layer 5 is the XFT track. The remaining bits are the hit itself. The whole
  21-bit word is what gets compared.
* **Road word** (`ep=1, ee=0`): closes a road packet. All hits of the road come before
  it, in layer order. `data[20:17]` is the tag field, set to `0xF` for a duplicate.
* **End-event word** (`ee=1`): closes the event. `data[8]` carries the even parity of
  all data bits of the event's earlier words.

Layer-by-layer delivery, last-hit-wins and the `0xF` tag come from the published
description of the board. The 21-bit width, the EP/EE framing and the field positions
are choices of this implementation, modelled on the usual SVT conventions. They live in
`rw_pkg.sv` and are easy to change.

## Pipeline, cycle by cycle

```
            +------+   +----+  layer  +-------------+   +------------------+   +-----------+
 svt_in --> | FIFO |-->| s1 |--demux->| Lay0..5 reg |-->| AM layer 0..5    |-->| match gen |--+
            +------+   +----+         +-------------+   | 64 pattern regs  |   | majority  |  | match
                          |                              | 64 comparators   |   | OR, CE    |  |
                          |                              +------------------+   +-----------+  |
                          |   +-------+  +------------+   +---------+                           |
                          +-->| delay |->| flag / mux |-->| out reg |--> svt_out                |
                              +-------+  +------------+   +---------+                           |
                                   ^-------------------------------------- dup_q <--------------+
```

Counting from the clock edge at which a word is read from the input FIFO:

1. **Edge 1.** The word enters the first register `s1`. If it is a hit, the
   demultiplexer writes it into the temporary register of its layer on the next edge. A
   later hit of the same layer overwrites an earlier one.
2. **While a road word is in `s1`.** Every hit of the packet is already in the temporary
   row. In this one cycle, with combinational logic only:
   * each of the 6 x 64 comparators checks its layer against one stored pattern
     (`match_lay[l][p]`);
   * a majority cell per pattern counts the silicon matches and checks the XFT match;
   * the 64 results are ORed into the global `match`.

   If there is no match, the clock enable of the next free pattern row is raised, and the
   row is written on the same edge that moves the road word on. The temporary row is then
   emptied for the next packet.
3. **Edge 2.** The word moves into the delay register. The global match, qualified by
   "this is a road word" and "filter enabled", is registered beside it as `dup_q`.
4. **Edge 3.** The flag multiplexer chooses the tagged or the untagged word. The
   end-event word gets its parity bit recomputed over the words actually sent. The result
   goes into the output register with its data strobe `svt_out_ds`.

Writing into the input FIFO takes one more cycle. So a lone word appears at the output 4
clock cycles after its input strobe, and 3 cycles after it was read from the FIFO. The
pipeline accepts one word per clock, with no stall of its own.

Only patterns written since the start of the event take part in the comparison. The
match generator keeps this as the `pat_used` mask, next to the counter that points at
the next free row.

## The match rule

A stored pattern matches the new road when

* at least `min_si` of the five silicon locations hold equal hits (4 by default), and
* if `xft_req` is set (the default), the XFT location holds an equal track.

A location whose packet carried no hit for that layer never matches. Each temporary and
stored location has a *present* bit for this. So a 4-of-5 road matches a 5-of-5 road
with the same four hits, in either order of arrival. Two roads that differ on two silicon
layers, or on the XFT track, are both kept.

The published description states the rule in two ways: "5 out of 6 locations" and
"4 of 5 silicon plus XFT". The second is used here, because the figures of the match
logic also show it. Both thresholds can be changed at run time through the mode
register. For example, `xft_req=0, min_si=5` would accept any pattern with all five
silicon hits equal.

When all 64 rows are in use, later roads that do not match anything are passed on
unflagged and are not stored. `am_full` shows this state in the status register. The
published figures suggest about 30 hit combinations per event, so 64 rows is ample in
normal running.

## Flow control

The published description only calls the board a straight pipeline that adds no
bottleneck. The hold scheme below is this implementation's own:

* `svt_in_hold` goes high when `HOLD_MARGIN` (8) or fewer of the FIFO's 64 places are
  free. The Hit Buffer must stop sending within 8 cycles. A word written into a full FIFO
  is dropped and sets a sticky overflow bit.
* `svt_out_hold` from the Track Fitter stops FIFO reads at once. The up to three words
  already in the pipeline still come out, so the receiver must accept three more words
  after raising hold.

## Registers

A plain synchronous register port (`bus_addr`, `bus_wdata`, `bus_we`, combinational
`bus_rdata`) stands in for the board's VME slave:

| addr | name   | contents |
|------|--------|----------|
| 0    | MODE   | bit 0 `enable` (reset 1), bit 1 `xft_req` (reset 1), bits 4:2 `min_si` (reset 4) |
| 1    | PARERR | bits 15:0 count of input events whose parity was wrong; any write clears it |
| 2    | STATUS | bit 0 memory full, bit 1 input FIFO overflowed (sticky until reset) |

With `enable=0` the stream passes through unchanged and nothing is stored. Change the
mode only between events.

## Parity

The published description mentions only that "a parity calculation" is part of the
error checking. This implementation uses this scheme:

* At the input, one `rw_parity` instance accumulates the XOR of all data bits of each
  event. It compares the result with bit 8 of the end-event word and counts mismatches in
  PARERR.
* At the output, a second instance rewrites that bit over the words actually sent.
  Tagging a road word changes data bits, so without this the Track Fitter would see a
  parity error for every event that had a duplicate.

## Files

| file | block |
|------|-------|
| `rtl/rw_pkg.sv` | word type, field positions, sizes, mode struct |
| `rtl/road_warrior.sv` | top level: wiring, first register, control strobes |
| `rtl/svt_fifo.sv` | input FIFO with hold |
| `rtl/rw_tmp_reg.sv` | layer demultiplexer and temporary register row |
| `rtl/rw_am_layer.sv` | one layer of the associative memory (64 registers + comparators), instantiated 6 times |
| `rtl/rw_match_gen.sv` | majority cells, global OR, pattern counter and clock enables |
| `rtl/rw_out_stage.sv` | delay register, flag multiplexer, output register |
| `rtl/rw_parity.sv` | event parity check / regeneration |
| `rtl/rw_regs.sv` | mode and status registers |

The top's parameters are `N_PAT` (64), `FIFO_DEPTH` (64) and `HOLD_MARGIN` (8). The
layer count and word format are package constants. At the default sizes, coarse
synthesis gives about 3000 word-level cells and 8.7k flip-flop bits, nearly all of them
the 6 x 64 pattern registers and their comparators. The FIFO is 64 x 23 bits of memory.

## Verification

Each block has a self-checking testbench in `tb/` that compares its outputs with a model
written independently in the testbench. Each testbench ends with a
`TB_RESULT checks=N failures=M` line and has a cycle watchdog.

`tb/tb_road_warrior.sv` runs the whole design at its default sizes. Its stimulus is
built from random tracks, in these forms:

* a 5-of-5 road followed or preceded by 4-of-5 roads from the same hits;
* exact repeats;
* roads that differ in the XFT track or in two silicon layers;
* packets with two hits on one layer;
* two events with more than 64 distinct roads.

A reference model predicts every output word, including the tags and the recomputed
parity. The testbench also:

* applies random hold bursts from the Track Fitter, long enough to fill the FIFO and
  raise hold towards the source, which reacts 3 cycles late;
* runs events with the filter disabled, with `min_si=5`, and with `xft_req=0`;
* injects wrong input parity and reads back the error counter;
* checks the 4-cycle strobe-to-strobe latency.

It counts how often each mechanism occurs (duplicate flagged, pattern stored, memory
full, last-hit overwrite, both holds, disabled mode, parity error, each mode setting).
Any mechanism that never occurs counts as a failure. A run takes well under a second.

`tb/tb_rw_workload.sv` sends a typical load back to back at one word per clock. Each
event has 30 hit combinations: 15 tracks, each giving a 5-of-5 road and a 4-of-5 ghost.
The testbench checks the following:

* exactly the 15 ghosts of each event are tagged;
* all words come out;
* the last word leaves 4 cycles after the last one went in, so the filter never slowed
  the stream.

Over 200 events it tags 3000 of 6000 roads. At 300 ns per fit, that is about 4.5 µs of
Track Fitter work removed per event. This is an upper bound on the saving, because the
real events are not all this ghost-rich.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/rw_pkg.sv tb/tb_road_warrior.sv \
          --top-module tb_road_warrior -o sim
./obj_dir/sim
```

Replace `tb_road_warrior` with any other testbench name to run that block alone. All
state that is read is reset, so results do not depend on the simulator's initial values.

## What this implementation does not cover

* The VME bus protocol and the Pulsar carrier board (FPGAs, SRAMs, connectors) are
  outside the RTL. Only the register side of the VME slave is modelled.
* The Hit Buffer and Track Fitter are not part of the design. The testbench plays both.
* FPGA timing closure at the 30 MHz SVT clock has not been checked. The critical path
  is the single cycle from the temporary row through 64 comparators, the majority cells
  and the 64-input OR to the pattern clock enables.
* Any further error checks or mode settings the original firmware may have had are not
  known and are not modelled.
