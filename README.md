# Pipelined memory sequencer with dynamic address support

DSP and video kernels spend much of their time moving data between memory
banks and a datapath. When the access sequence is fully known in advance, a
*memory sequencer* can generate every bank address itself. The datapath then
exchanges only data with the memory, never addresses, and accesses can be
pipelined one per cycle. Many real algorithms are only *mostly* predictable,
though. Fast motion-estimation searches are an example: which block is read
next depends on data just computed.

This RTL implements a sequencer that keeps the static, pipelined schedule for
the predictable part and still accepts data-dependent ("dynamic") accesses in
slots reserved for them:

* **Static accesses** take their bank address from counter-based address
  streams.
* **Dynamic accesses** take a *logical* address. A translation table maps it to
  a (bank, physical address) pair, so one array can be spread over several
  banks.
* The logical address can come from the datapath over a data bus (the **first
  form**). It can also be computed inside the sequencer by a small **dynamic
  address datapath** (the **extended form**). In the extended form the
  datapath sends only what the computation needs, for example one base address
  per block. Address traffic between the two units then drops from one word per
  pixel to one word per block.

```
            +------------------------- pmc_top ------------------------------+
            |  +------------------- memory_sequencer ---------------------+  |
            |  |            memory_access_scheduler (slot table)          |  |
            |  |        /           |                |          \         |  |
 bank 0 <---|--|-- dynamic_address_ address_     router      dynamic_   |  |
 ...        |  |   controller       generator   (crossbar)   address_   |  |
 bank 3 <---|--|--   ^ (bank, pa)                  ^  |       datapath  |  |
 (mem_bank) |  |   address_translation_table <-----+--|--------/        |  |
            |  |          ^ logical address           |                 |  |
            |  +----------|---------------------------|-----------------+  |
            +-------------|---------------------------|--------------------+
                          bus_wdata[0..3]       bus_rdata[0..3]
                                 application datapath
```

## Files

| file | content |
|---|---|
| `rtl/pmc_pkg.sv` | sizes, the schedule slot word `sched_instr_t`, stream and table entry types |
| `rtl/pmc_top.sv` | sequencer + 4 banks; the top of the design |
| `rtl/memory_sequencer.sv` | wiring of the six sequencer units |
| `rtl/memory_access_scheduler.sv` | slot table, repeat and loop sequencing |
| `rtl/address_generator.sv` | 8 two-dimensional static address streams |
| `rtl/address_translation_table.sv` | logical page -> (bank, physical page) |
| `rtl/dynamic_address_controller.sv` | per-bank choice between the static access and the dynamic access |
| `rtl/router.sv` | bus/bank data crossbar with read-latency alignment |
| `rtl/dynamic_address_datapath.sv` | multiplier, three-input adder and their registers |
| `rtl/mem_bank.sv` | single-port synchronous RAM standing in for a memory bank |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## The schedule: one slot word per cycle

Everything is driven by `sched_instr_t`, the word in each schedule slot. After
`start` the scheduler executes slot 0, then one slot per clock cycle:

* `rep`: the slot runs `rep+1` consecutive cycles. An 8×8 block read is one
  slot with `rep = 63`.
* `loop_end` / `loop_tgt` / `loop_cnt`: jump back to `loop_tgt` until the loop
  body has run `loop_cnt+1` times. There is one loop level with a single loop
  counter, which is cleared on exit, so loops may follow each other but not
  nest.
* `last`: the schedule ends after this slot, and `done` pulses one cycle later.

Fields acting on the memory in the slot's cycle:

| field | meaning |
|---|---|
| `st_en[b]`, `st_we[b]` | bank `b` does a static read/write |
| `st_sid[b]` | address stream used by bank `b` (each use steps the stream) |
| `st_bus[b]` | bus connected to bank `b` |
| `ag_rst[s]` | stream `s` restarts: this cycle's address is its base |
| `dyn_en`, `dyn_we` | a dynamic read/write takes place |
| `dyn_src` | 0: logical address = `bus_wdata[dyn_abus]`; 1: the address datapath output |
| `dyn_abus` | bus carrying the dynamic address, or the value given to the address datapath |
| `dyn_dbus` | bus carrying the dynamic access's data |
| `adp` | register loads of the address datapath (below) |

The datapath is assumed to be scheduled statically too, in lockstep with the
sequencer. The `pc` output (the slot in execution) is there so that a
datapath, or a testbench model of one, can follow the schedule.

### Timing

Addresses and commands reach the banks combinationally in the slot's cycle.
This includes the dynamic path: bus → translation table → bank. A bank reads
synchronously, so read data appears on the routed bus in the **next** cycle,
flagged by `bus_rvalid[j]`. Write data is taken from the routed bus in the
slot's cycle. The datapath must therefore drive a dynamic address, or the value
for the address datapath, during the cycle of the slot that uses it.

## Dynamic accesses

**Translation.** The logical space (`LA_W` = 14 bits) is cut into 64-word
pages. Each of the 256 table entries binds one page to a bank and to a
physical page in that bank. The offset inside the page passes through. Binding
consecutive pages to different banks splits a vector over several memories.

**Routing.** `dynamic_address_controller` gives the translated bank the
dynamic command and address, and marks it in `dyn_hit`. `router` then connects
that bank to `dyn_dbus`. All other banks keep their static accesses. Suppose
the schedule also gave the targeted bank a static access in that cycle. That
can only be known at run time. The dynamic access then wins, the static access
is dropped, and `conflict` is high for the cycle. The mapping and schedule
should be built so that this does not happen.

**Address datapath.** It has a multiplier with input registers `m0`, `m1` and
output register `mq`, and an adder `aq = a0 + a1 + a2` with output register
`aq`. Input registers load from one of three buses: the value sent by the
datapath (`SRC_EXT`), a constant in the slot word (`SRC_IMM`), or `mq`
(`SRC_MUL`). They can also load from `aq` (`SRC_ADD`). `a2` is the feedback
register:

* `a2_acc` makes it capture the adder result together with `aq`, which gives
  an accumulator that advances once per cycle.
* `a2_clr` clears it.

The address operators use `ADP_W` = `LA_W` bits, narrower than the data.
Shifts by a constant are done as multiplications by a power of two.

A W×W block at logical `base` in an image of pitch P is walked with 5 slots and
one transfer from the datapath:

| slot | cycles | accesses | address datapath |
|---|---|---|---|
| S0 | 1 | – | `a1 ← ext (base)`, `a0 ← 0`, `a2 ← 0` |
| S1 | 1 | – | `aq, a2 ← base`, `a1 ← 1` |
| S2 | W−2 | at `aq` | `aq, a2 += 1` |
| S3 | 1 | at `aq` | `aq, a2 += 1`, `a0 ← P−W` |
| S4 | 1, loop to S2 W times | at `aq` | `aq, a2 += 1 + (P−W)`, `a0 ← 0` |

## Static address streams

Each of the 8 streams holds a base, a row pitch, a row width and a row count
(the last two stored minus one). Each cycle a stream is used, it steps
row-major through its block. It returns to its base after the last element, or
when its descriptor is rewritten, or on `ag_rst`. Two banks naming the same
stream in one cycle receive the same address, and the stream steps once.

## Configuration

Before `start`, a host writes three things through simple one-word write
ports:

* the slot table (`sched_we/waddr/wdata`);
* the stream descriptors (`ag_we/widx/wdata`);
* the translation entries (`tt_we/widx/wdata`).

The slot table and the stream descriptors may be rewritten between runs. These
contents correspond to what a generator would produce from the application's
annotated data-flow graph:

* which accesses are static;
* which accesses are dynamic, and in which slots;
* where each array lives;
* which address computations are moved into the sequencer.

The tables could also be hard-wired, which is an easy change since they are
plain registers. The generator itself is not part of this RTL.

Reset (`rst_n`, synchronous, active low) clears the scheduler, the streams,
the translation table and the address datapath. The bank arrays and the slot
table are not reset.

## Example and measured results: three-step search

`tb/tb_pmc_top.sv` runs block-matching motion estimation on the full-size
design. A datapath model on the buses computes sums of absolute differences.
The search has three steps:

* step 1: the centre and its 4 neighbours at distance d1. These five blocks are
  known in advance and read by static streams. The reference block is read in
  parallel from another bank.
* step 2: 4 neighbours of the best match so far, at distance d2.
* step 3: 4 neighbours of the best match so far, at distance d3.

With c = (window − block)/2 the search starts at (c, c) and uses d1 = c,
d2 = c/2, d3 = max(c/4, 1); positions are clamped inside the window. That is
13 candidate blocks plus the reference block.

Steps 2 and 3 depend on the data and are dynamic accesses (8 blocks). The best
position of each step is then written by dynamic writes into a result vector
whose pages are bound to banks 2 and 3.

| block / window | form | cycles | address words sent by the datapath |
|---|---|---|---|
| 8×8 / 16×16 | addresses over the bus | 841 | 512 (8 blocks × 64) |
| 8×8 / 16×16 | extended (address datapath) | 857 | 8 |
| 24×24 / 48×48 | addresses over the bus | 7497 | 4608 (8 × 576) |
| 24×24 / 48×48 | extended | 7513 | 8 |

The extended form costs 2 cycles per dynamic block (S0, S1), because the base
must be loaded before the first access. In exchange, the datapath sends 8 words
instead of one per pixel. That matters when a bus transfer takes several
cycles, and it cuts bus switching activity.

The published evaluation of this architecture differs in one place. It gives 2048
address words for the 24×24 case of the first form, which is 8 blocks of 256
words. This design counts 576 words per 24×24 block.

## Sizes and how to change them

All sizes are in `pmc_pkg`:

| parameter | value | meaning |
|---|---|---|
| `NB_BANKS` | 4 | banks |
| `NB_BUSES` | 4 | data buses |
| `DATA_W` | 16 | data bits |
| `BANK_AW` | 12 | 4096 words per bank |
| `LA_W` | 14 | logical address bits |
| `PAGE_W` | 6 | bits of the translation page |
| `NB_STREAMS` | 8 | static address streams |
| `SCHED_DEPTH` | 64 | schedule slots |
| `REP_W` | 12 | bits of the repeat count |
| `LOOP_W` | 8 | bits of the loop count |
| `ADP_W` | `LA_W` | width of the address operators |

None of these values comes from a published specification. They were chosen
so that a 48×48 search window fits one bank and a three-step search fits the
schedule. The struct layouts follow the package, so change sizes there. The
testbenches use package constants and mostly adapt. `tb_address_translation_table`
assumes `PAGE_W` ≥ 5 and `PPAGE_W` ≥ 4.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pmc_pkg.sv tb/tb_pmc_top.sv \
          -y rtl --top-module tb_pmc_top -Mdir obj && obj/Vtb_pmc_top
```

Replace `pmc_top` with any module name to run that unit's testbench. The
simulator is two-state. The testbenches drive or reset everything they read,
and they avoid `randomize()`.

## Deviations and open points

* Widths, counts, the slot-word encoding, the repeat/loop sequencing, the
  page-table form of the translation table and the conflict rule are design
  choices here; the architecture only fixes the units and their roles.
* How the address datapath's buses are driven is this design's choice. So is
  the reading of its third adder register as an accumulator.
* The buses are drawn as bidirectional; here each has a write and a read
  direction.
* Memory banks are modelled as on-chip synchronous RAM with one-cycle read
  latency. External memories with longer or variable latency would need a
  deeper read-alignment pipeline in `router`.
* Dynamic accesses are limited to one per cycle, through one translation table
  and one address datapath.
* Conditional accesses (fetching only one of several possible blocks) are not
  supported. The schedule must reserve a slot for every dynamic access.
* The application datapath is not part of this RTL; the testbenches contain a
  behavioural model of a block-matching datapath.
