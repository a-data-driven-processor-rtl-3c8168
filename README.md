# Data driven trigger processor for the E605 spectrometer

This is a SystemVerilog model of a modular, data driven processor. It is
built for an online trigger in a fixed-target dimuon experiment. The machine
has no program counter and no instruction stream. Each computation is a
network of small hardware modules joined by cables. A module acts whenever a
word reaches its input, and it stops whenever the module after it is not
ready. The trigger is a fixed wiring of such modules. It runs these steps:

1. finds drift-chamber hit pairs;
2. forms every pair of track positions behind the magnet;
3. projects each pair forward and tests it against the chamber hits in front of the magnet (a "road");
4. cuts on momentum and on a target-pointing quantity;
5. combines the surviving tracks into a trigger decision.

For an event with few tracks the decision takes 35 to 80 clocks of a 40 MHz clock, which matches the original's 1 to 2 µs dead time. It tells
the readout buffers to send the event on or to drop it.

The RTL covers these parts:

- the cable protocol and every general-purpose module type;
- the readout encoders;
- the ring buffers and the event generator;
- the trigger wired as a top module, `e605_trigger`;
- the bit-serial Σ (sigma) module;
- a serial adder, which stands beside the trigger.

## The cable: words, names, completes and hold

All modules talk over the same cable. It is defined as `word_t` in
`rtl/ddp_pkg.sv`.

| field   | width | meaning |
|---------|-------|---------|
| `valid` | 1 | the word is present (not an empty slot) |
| `cmpl`  | 1 | "complete": marks the end of a block (one event, one list) |
| `name`  | 4 | which data subset the word belongs to; modules branch, page tables and select operations by name |
| `data`  | 16 | the value |

A `hold` wire runs in the opposite direction. A word moves in a clock where
`valid && !hold`.

**The main protocol trick is in `ddp_outreg`.** Every module drives its
cable through this output stage. The hold from the destination reaches the
output register one clock late. So the stage has a second register, the
latch, that catches the one word that would otherwise be lost. The module
core may push only while `can_push` is high. `can_push` comes straight from
a flip-flop, so holds are re-timed at every module boundary, and a long
chain has no long combinational hold path. An output register that holds no
valid word loads whatever the hold is. Empty slots therefore absorb holds
instead of passing them upstream.

**Completes align the inputs of two-input modules.** Such modules are
`arith_op`, `table_binary`, `ordered_merge`, the index generators and the
lists. They take one word from each input at a time. When one input shows a
complete, the other is drained up to its own complete, and then the two
completes leave as one. This keeps blocks (events) aligned through the
whole network without any central control.

`ddp_branch` sends a word to one or both outputs by a mask on its name.
Completes always go to both outputs.

## Processing modules

Each module has preset registers: names, modes, thresholds and patches.
In this RTL they are ports or parameters. Timing is one clock per word
through each module unless stated otherwise.

| module | what it does |
|---|---|
| `list_index` | Stores a block by arrival count. A read word carries an index and gets the stored value back. |
| `list_counter` | Closes a loop. Words sent into a test pass through, and those of one name are stored by count. Words coming back are counted; a word named "pass" retrieves the stored word with the same count. `MAX_OUT` limits the words in flight so that a loop cannot fill up and lock. Because of that limit, the memory is used as a ring, so a block may hold many more words than `DEPTH`. |
| `ddp_buffer` | A 128-word FIFO. It is read and written in the same clock. |
| `ddp_map` | A one-bit cell per possible position. A read returns the 9 cells around a projected position: this is the road test. The optional 16-cell form takes two cycles and gives two words. The map erases only the cells that were written, one per clock, after both completes. |
| `index_gen_binary` | Counts the two inputs and emits every index pair (i, j) of the cross product, one per clock, as the counts grow. |
| `index_gen_unary` | Emits every pair j < i of one block, and each single (i, i) under another name. |
| `page_gen` | Repeats a word of one name a preset number of times, with consecutive names. This reuses a chain of table modules for several "pages". |
| `arith_op` | Add, subtract (either order), and, or, xor, or pass one input, on aligned words. |
| `normalizer` | F(x1) + G(x2) from two 256-word tables. The address bits are picked from the 20 name+data bits by a patch, so one module gives a·x + b for a 16-bit x, or one normalization per name. |
| `table_unary`, `table_binary` | A 256-word lookup through a patch over one or two input words. Table bits may set the output name, so a table can act as a test. |
| `ordered_merge` | Merges two sorted blocks by a masked key. Equal keys leave once under a special name, or both leave in turn. |
| `associate` | Names a word by the difference to its neighbour. In pair mode, adjacent wires become one word with a half-wire bit. |
| `cut` | Names a word below, inside or above two limits. |

Tables are 256 × 16 and are loaded through a parallel port. A patch is an
array of eight 6-bit selectors; `ddp_pkg::patch8` applies it to a 40-bit
source (word a, word b, names).

## Readout and ring buffers

On `strobe` the readout encoders capture the front-end data. They then send
the hits as sparse words:

- `mwpc_encoder`: coincidence-register bits of an MWPC crate, as 10-bit wire numbers. It sends one word per 2 clocks (20 MHz), has a word-count limit, and puts the event number in the complete word.
- `drift_encoder`: hits of a 32-channel TDC card, with the wire number and a 6-bit time converted from Gray code. It sends one word per clock, with the plane in the name.
- `adc_readout`: codes of 8 ADC channels above a per-channel digital cut, at 20 MHz.
- `register_readout`: a fixed block of 16-bit coincidence registers, at 20 MHz.

`sparse_scan` is the shared priority scan over a card.

Each segment writes into its own `ring_buffer`. That buffer passes the words
on to the processor at once, and keeps them until the decision.

`event_gen` does these things:

- collects the trigger words (12 id bits and a 4-bit frequency code);
- when the event's complete arrives, issues `read` or `skip` on a shared command bus;
- on a read, sends a header: the id bits, the event's track parameter words (one per track candidate, up to 256), then the event count.

A trigger with frequency code f fires in 1 of 2^f events.

The bus hold is the OR of all ring buffers' holds, so every buffer acts on
the same event in the same clock.

## The E605 trigger chain (`e605_trigger`)

- **Drift chambers Y3 and Y4.** Each has two staggered planes. They are merged in wire order and paired by `associate`. This gives positions in half-wire units.
- **MWPC planes Y1 and Y2.** Their hits go into two maps.
- **Track candidates.** The Y3 and Y4 positions are stored in lists L3 and L4. A binary index generator emits every (i3, i4) pair. The pair goes through the list counter and a page generator into the list read ports. The four normalizers and two adders then project each pair onto Y1 and Y2.
- **The road loop (name 1).** The projections read the maps. A road table turns the two 9-cell roads into pass (name 2) or fail (name 4). A buffer returns the result to the list counter. A pass retrieves the index pair, which makes a second trip as names 2 and 3.
- **Momentum and pointing.** Name 2 goes through two log tables and a subtracter (log P), then `cut`. Name 3 goes through a Y_y table. The two cut results are buffered and joined by a parametrization table into one word per candidate.
- **The decision.** The candidates are stored in two lists. A unary index generator forms every track pair and every single track. A trigger table makes the trigger word, and `event_gen` issues the command. The parametrization words also go to `event_gen`, which sends them out with a read event.

The table port `tbl_tgt` selects:

| `tbl_tgt` | table |
|---|---|
| 0–3 | normalizers N3a, N3b, N4a, N4b (`tbl_hi` selects F) |
| 4 | road table |
| 5, 6 | log tables |
| 7 | Y_y table |
| 8 | parametrization table |
| 9 | trigger table |
| 10 | sigma table |

The contents are physics constants that the user loads. The testbench loads
a simple geometry in which straight tracks hit the same wire number in every
plane.

## Σ module and serial adder

`sigma_module` forms Y = Σ A_i X_i + A_0 for up to eight variables at once.
The X_i arrive bit-serially, MSB first, one wire each. Each clock, the eight
current bits address a 256-word table. Entry k of the table holds the sum of
the A_i whose bit is set in k. The entry is added to a shifting accumulator,
and the sign step subtracts. After NBITS clocks the result leaves in two
forms:

- as a word on the cable;
- bit-serially on `y_bit`, LSB first.

Extra address bits can stand for a selector instead of a variable. With
5 variables and 3 selector bits, one module gives 8 different linear
combinations.

`serial_adder8` adds eight pairs of LSB-first serial numbers, one carry
flip-flop per pair. It is used to sum results that are spread over several
Σ modules.

## Where this RTL departs from the original

The hardware it models departs from the original in these ways:

- **Maintenance bus.** The original loads every register and memory over a bit-serial maintenance bus. Here tables load through a parallel port, and presets are ports or constants.
- **Read bus tags.** The original read bus carries two tag bits (source or destination address, value or command). That encoding is not modelled. Read and skip are a separate command bus driven by `event_gen`.
- **Left out.** The host and tape interfaces, the analog ADC and TDC front ends, and the track-fit processor are not modelled. The track-fit processor would be about 70 Σ and serial modules, whose wiring is not given.
- **Extra projections.** The original also copies out projections onto the calorimeter, the muon detector and the hodoscope during the second pass. Those detectors are not modelled, so the page generator makes only the two copies needed here (log P and Y_y).
- **The map** has both read forms, but the trigger uses only the 9-cell form. The 16-cell form returns two words of 8 cells each.
- **Design choices.** These were chosen here and are not taken from the original:
  - the cable encoding: a complete word also has `valid` set;
  - the exact names used in the trigger;
  - the patch selections;
  - the way the two cut results are joined;
  - the meaning of the frequency code (a power-of-two prescale);
  - the MSB-first order of Σ inputs;
  - sizes the original does not give: ring buffer depth 1024, 1024 MWPC wires, 4 coincidence registers and `MAX_OUT` = 256 (64 in the trigger);
  - the limits of one block: 255 words per index generator input, and 256 words per list.

  Each file's opening comment says which of its parts follow the original
  and which are choices.

## Simulating

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`,
for example `tb/tb_list_counter.sv`. The testbenches share the stimulus
source `tb/tb_src.sv` and the sink `tb/tb_snk.sv`. Both can insert random
gaps and holds. Each testbench ends by printing
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

```sh
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/ddp_pkg.sv tb/tb_cut.sv \
          --top-module tb_cut -Mdir obj_cut -o sim
./obj_cut/sim
```

Some unit testbenches mix integer widths in their reference models, and
verilator reports these as width warnings. `-Wno-fatal` keeps such
warnings from stopping the build. The RTL itself has no width warnings.

`tb_e605_trigger` runs the whole trigger at its default sizes. It loads the
tables, sends 24 events with random tracks and noise, and compares with a
model of the chain:

- every read or skip decision;
- every header, including the track parameter word of every candidate;
- every word read out of every ring buffer;
- the decision latency.

It also counts every mechanism, and it fails if any of them never happened.
The mechanisms include:

- road passes and fails;
- list counter retrievals and page copies;
- wire pairs and singles;
- both sides of both cuts;
- track pairs and singles;
- reads and skips;
- holds on the read bus and on the cables;
- map erasing and the loop buffer.

Two events carry many tracks and noise. One of them has more track
candidates than the list counter memory holds.

After the events, the Σ module forms eight linear combinations. The serial
adder adds its serial result to a constant. Both results are checked. The
build takes about 10 s, and the run takes well under a second.

Rates and latencies checked by the testbenches:

- the 20 MHz MWPC word rate;
- one word per clock for the processing modules and index generators;
- one Σ result per 16 clocks;
- a decision in at most 80 clocks for an isolated event with few track candidates (at most 6 Y3 × Y4 pairs). Each extra pair costs about 2 to 3 clocks.
