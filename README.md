# BugSifter: a programmable event filter for instruction-grain monitors

An instruction-grain monitor (a memory checker, a taint tracker, a race or
atomicity checker) keeps a small piece of *metadata* for every application
word and register and runs a software handler for every instruction the
application commits: read the operands' metadata, check it against a rule,
maybe write new metadata. On a log-based monitoring system the application
runs on one core, its committed instructions are shipped as *events* to a
second core, and that core runs one handler per event. That is 3x to 10x
slower than the unmonitored program.

Most of those handlers do nothing useful. The check passes because the
metadata is already in its "clean" state, or the update copies a value onto
itself. Stack frames are the other big cost. Every call and return sets the
metadata of a whole frame to one value, which in software is a loop of a
hundred or more instructions.

BugSifter is a small block next to the monitor core that handles these
cases in hardware and still works for many monitors. Monitor software
programs it with:

* a **filter table**: for each event type, which operands matter and which
  test to apply;
* an **invariant** register (the "clean" metadata value);
* a **metadata factor**: how many metadata bits one application word has;
* two **stack values**: the metadata a frame gets on call and on return.

For each event BugSifter reads the operand metadata from its own **metadata
register file** and **metadata cache**. It then does one of three things:

* drops the event;
* clears a stack frame with its **stack update unit**;
* hands the monitor core the address of the handler to run.

Handlers use the same register file and cache through Load/Store Metadata
operations.

The RTL here implements that block: the filter table, filter logic,
configuration registers, metadata register file, metadata cache with its
fill path to the L2, stack update unit and handler jump table. The cores,
the L2, and the logic that captures and logs events are not part of it.
They connect through ports.

## Block diagram

```
 events ──► bs_filter_logic ──────────────────────────────► bs_event_dispatch ──► handler
  (ev_t)     │   │   │   │                                   (jump table)          address
             │   │   │   └── bs_filter_table (30 entries, CAM on event type)
             │   │   └────── bs_cfg_regs (INV, factor, call/return values)
             │   └────────── bs_md_rf (8 x 32 b, 2 read ports) ◄── core writes
             ▼
      bs_stack_update_unit
             │        ┌────────── filter logic reads
             ▼        ▼       ┌── core Load/Store Metadata, flush
          bs_md_arb (SU > filter > core)
             │
          bs_md_cache (4 KB, 2-way, 64 B lines) ◄──► L2 (fill / write-back)
```

`rtl/bugsifter.sv` is the top. `rtl/bs_pkg.sv` holds the shared types.

## Events and the filter table

An event (`bs_pkg::ev_t`) carries:

* an 8-bit event type;
* the program counter;
* up to two operands, a source and a destination. Each is a register number
  or a 32-bit application address, or absent;
* for stack events, the frame's lowest address (esp) and its length in
  bytes.

Instructions with more operands are simply not entered in the table, so
they always go to software.

The table holds 30 entries. Each one is matched by event type; if two
entries have the same type, the lowest index wins. An entry's bits are:

| bit(s) | field  | meaning |
|--------|--------|---------|
| 15     | valid  | entry in use |
| 14:7   | evid   | event type |
| 6      | src    | source operand takes part |
| 5      | dst    | destination operand takes part |
| 4      | cc     | clean check: filter if every named operand's metadata equals INV |
| 3      | ru     | redundant update: filter if source metadata equals destination metadata |
| 2      | su     | stack update: the frame goes to the stack update unit |
| 1      | pf     | partial filter: run the check, but always dispatch; a pass picks the simple handler, a fail the complex one |
| 0      | su_ret | stack update writes the return value (else the call value) |

Some examples of how monitors use these bits:

* **MemCheck.** A load whose source is "initialised" and whose destination
  register is already "initialised" passes a clean check. A `mov` between
  two locations with equal metadata is a redundant update.
* **AtomCheck.** INV holds the current thread id, and software rewrites it
  on every thread switch. A memory access by the thread that accessed the
  location last then passes a partial check and gets the cheap handler.

An event with no entry, or whose check fails, goes to its full software
handler.

## Metadata factor and where metadata lives

The factor `f` is 1, 2, 4, 8, 16 or 32. Each application word gets an
*item* of `32/f` bits. Some settings:

* LockSet uses `f = 1` (32-bit items);
* MemCheck, TaintCheck and AtomCheck use `f = 4` (one byte);
* AddrCheck uses `f = 8` (4 bits);
* MemLeak uses `f = 32` (1 bit).

Internally the factor is kept as `lf = log2 f`.

Metadata memory is a scaled image of application memory. The item of the
word at application address `A` sits at metadata bit address:

```
bit = (A >> 2) * (32 >> lf)          (bs_pkg::md_bit_addr)
```

So the 32-bit metadata word at byte address `(bit >> 5) * 4` holds it, at
bit position `bit[4:0]`. Items never straddle a word. The filter logic
shifts and masks the item out of the word. It compares items and INV only
over the item width (INV is masked by `bs_pkg::item_mask`). Register
metadata is one 32-bit register per IA32 register, masked the same way.

Changing the factor does not move existing metadata. Software changes it
only when it switches monitors, after a flush.

## Filter logic timing

`bs_filter_logic` takes one event at a time:

* **Accept** (`ev_valid && ev_ready`). The event is captured and the table
  is looked up in the same cycle.
* **Read.** Register metadata comes from the two RF ports in one cycle.
  Memory metadata comes from the one-port cache, one read per cycle, source
  first. A cache hit answers in the next cycle. Reads wait while the stack
  update unit is busy, so they always see its writes.
* **Decide.** The result is reported on `res_valid`/`res` (`result_e`). A
  filtered event frees the unit in the same cycle.

A register-only event is therefore filtered every 2 cycles, and one with a
memory operand every 3 on a cache hit.

A dispatched event goes to `bs_event_dispatch`. BugSifter then waits for the
monitor core's `hnd_done` before taking the next event. A handler may
change metadata that the next event's check reads, so filtering must not
run ahead of it.

When an entry has both cc and ru, the event is filtered if either test
passes, and the result reports cc.

## Stack update unit

On a call or return the monitor sets the metadata of the whole frame to one
value. `bs_stack_update_unit` gets the frame's esp, length and value. It
works as follows:

1. It rounds the frame out to whole words (start down, end up).
2. It turns the frame into a range of metadata bits.
3. It covers that range with as few cache writes as it can:
   * one **block-wide write** (`MD_WRBLK`: the whole 64-byte block set to a
     repeated pattern) for every block the range covers completely;
   * one **masked word write** (`MD_WR`) for every other word the range
     touches, at its two ends. Only the frame's bits are set in the mask.

The writes go in ascending address order, one per cycle the cache accepts
one. Up to three can be outstanding. `busy` stays high until the last one
is acknowledged. The value's low item is repeated across 32 bits
(`bs_pkg::replicate`). A push or pop is just a frame of 4 bytes.

A frame whose metadata is larger than the whole cache is not done in
hardware. This is a frame of more than `4096*8/(32>>lf)` words, which is
16 KB of stack at factor 4. The event goes to software instead. The
expected handler first flushes the cache (`MD_FLUSH`) and then writes the
frame with Load/Store Metadata.

## Metadata cache

`bs_md_cache` is 4 KB, two-way set associative, with 64-byte lines, LRU
replacement, write-back and write-allocate. It has one request port,
shared through `bs_md_arb` by the stack update unit (highest priority), the
filter logic and the monitor core. It supports four operations:

* `MD_RD`: read one 32-bit word. On a hit the data comes the cycle after
  the request is accepted, and a new request is accepted in that same
  cycle.
* `MD_WR`: write a word under a 32-bit bit mask (the sub-block interface).
* `MD_WRBLK`: fill a whole line with a pattern (the block-wide interface).
  A miss allocates the line without fetching it, since every byte is
  overwritten.
* `MD_FLUSH`: write back every dirty line, then invalidate all of them.

Misses evict (writing back if dirty) and fill through the `mem_*` port, one
whole 64-byte line per request. At the top this is the `l2_*` port.
`stat_hit` and `stat_miss` pulse per lookup.

## Handler dispatch

`bs_event_dispatch` holds a 512-entry jump table of handler addresses,
indexed by `{variant, event type}`. The variant is full or simple (partial
filter pass). It is a one-deep register stage with a valid/ready handshake.
The top's `hnd_*` port presents the event, the variant and the address to
the monitor core.

## Programming the top

`bugsifter` has one write port `cfg_we/cfg_addr[9:0]/cfg_wdata[31:0]`:

| address       | target |
|---------------|--------|
| 0x000 – 0x01D | filter table entry n (`cfg_wdata[15:0]`, layout above) |
| 0x020         | INV |
| 0x021         | metadata factor (1, 2, 4, 8, 16 or 32; other values ignored) |
| 0x022         | stack value on call |
| 0x023         | stack value on return |
| 0x200 – 0x3FF | jump table entry `{variant, event type}` |

At reset:

* all table entries are invalid;
* INV is 0, the factor is 4, and both stack values are 0;
* every metadata register is 0, and every cache line is invalid;
* the jump table is not reset. Program it before use.

Handlers write register metadata through `mdrf_*`. They read and write
memory metadata, and flush, through `sw_md_*`.

## Parameters

| module | parameter | default | note |
|--------|-----------|---------|------|
| bugsifter | FT_ENTRIES | 30 | filter table size |
| bugsifter | CACHE_BYTES | 4096 | metadata cache capacity; 512 B to 16 KB are sensible alternatives |
| bugsifter | CACHE_WAYS | 2 | |
| bugsifter | LINE_BYTES | 64 | line size, also the L2 transfer size |
| bs_md_rf | NREG, WIDTH | 8, 32 | |

At the defaults the top synthesises to about 5,700 cells and 1,700
flip-flops, plus 50 kbit of memory (cache data and tags, jump table).

## Where this design goes its own way

The original design gives the blocks and what they do. It does not give
encodings, handshakes or timing. This implementation chose the following:

* Event descriptor fields, the 8-bit event type and a flat two-operand
  format. The compressed event log of the underlying logging system is not
  modelled.
* Table lookup by event type, plus the pf and su_ret bits. An entry is 16
  bits, so the table is 60 bytes; the original budgets about 200 bytes for
  the table.
* Factors up to 32, so that a one-bit-per-word monitor fits.
* One event at a time, waiting for the handler to finish. A faster design
  could overlap the filtering of later events with a running handler, if
  it could tell which metadata the handler touches.
* The flush writes dirty lines back, because the cache is write-back. The
  original only says the cache is invalidated before a software stack
  update. The line size, write policy and replacement policy are not
  specified there.
* The stack update unit's rounding to words, its write order and the limit
  of three writes in flight.
* The arbitration order on the cache port and the programming address map.

Not built: the event capture logic, the event log in the L2, the cores, the
L1 caches and L2, and metadata-cache coherence for several monitor cores.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and finishes. `tb/bs_l2_model.sv` is a
behavioural L2 with a fixed latency.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/bs_pkg.sv tb/tb_bugsifter.sv --top-module tb_bugsifter -o sim
./obj_dir/sim
```

Verilator finds the other modules in `rtl/` and `tb/` through `-y`.
`--assert` turns on the handshake assertions in the RTL. They check that
handler, stack-update and cache-write offers are held until taken, and
that the filter logic never reads the cache during a stack update. Swap
the testbench file and the top module for any other testbench:

* `tb_bs_filter_table`
* `tb_bs_cfg_regs`
* `tb_bs_md_rf`
* `tb_bs_event_dispatch`
* `tb_bs_md_cache`
* `tb_bs_stack_update_unit`
* `tb_bs_filter_logic`

Each finishes in seconds.

`tb_md_cache_sweep` runs six metadata caches side by side, from 512 B to
16 KB, with the same access program. Each cache's data is checked against
a reference memory. The test also checks the capacity behaviour:

* a 4 KB working set misses only on first touch in caches of 4 KB and up;
* in the smaller caches, every block visit misses.

It prints each size's miss counts. `tb/bs_cache_sweep_point.sv` is one
point of that sweep.

`tb_bugsifter` runs the top at its default parameters. It programs
BugSifter, as monitor software would, for six monitor styles in turn:

* MemCheck, TaintCheck, AddrCheck, AtomCheck (with a thread switch),
  LockSet and MemLeak;
* factors 1, 4, 8 and 32.

In each phase it sends random events, plays the monitor core's part for
dispatched events, and checks each event's outcome against a reference
model. After each phase it flushes the cache and compares the L2 contents
with the model's metadata. The reference model keeps its own metadata, so
stack updates, software handlers and cache evictions are all checked
end-to-end.

It also counts each mechanism and fails if any never happened:

* both kinds of filtering;
* hardware stack updates, with block-wide and sub-block writes;
* oversized frames;
* simple and complex dispatch;
* cache misses, write-backs and flushes;
* two-memory-operand reads;
* reads held behind the stack unit.

A rate check requires 32 register-only filtered events within 64 cycles.
