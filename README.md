# A snooping data cache with an ownership protocol

Several processors share one bus and one main memory, and each has a private
data cache. This RTL describes that cache as a single chip. Each chip watches
("snoops") every bus operation the other masters make, so that no processor
reads a stale copy of a block. Consistency comes from **ownership**:

- At most one cache owns a block.
- The owner may change the block without telling anyone.
- The owner supplies the block to other caches in place of main memory.
- The owner writes the block back when it replaces it.

Memory needs no knowledge of the protocol. The owning cache simply *inhibits*
memory and answers the request itself.

The default build has these properties:

- Sixteen direct-mapped entries.
- One 64-bit block per entry, made of four 16-bit words.
- A 19-bit word address.
- A 16-bit processor bus with byte lanes, modelled on the 68010.
- A synchronous system bus with an INHIBIT line and three bits of operation code.

## Block states and bus operations

Every entry holds one of four states, in two bits:

| state | meaning | processor may write locally |
|---|---|---|
| Invalid (`ST_INV`) | no copy | – |
| UnOwned (`ST_UNO`) | read-only copy; memory or another cache owns the block | no |
| Owned Exclusively (`ST_EXC`) | the only copy, owned here | yes, without the bus |
| Owned NonExclusively (`ST_NON`) | owned here, other caches hold UnOwned copies | no |

The bus carries five operations:

| operation | issued for | effect in the other caches |
|---|---|---|
| Read | read miss | an owner supplies the block and inhibits memory; EXC becomes NON |
| Read-For-Ownership (RFO) | write miss, or a read with the non-shared hint | an owner supplies the block; every copy becomes Invalid |
| Write-For-Invalidation (WFI) | first write to an UnOwned or NON copy | every copy becomes Invalid; one beat with no data |
| Write-Without-Invalidation (WWI) | write-back of an owned block being replaced | none |
| Write | uncached masters, such as I/O | every copy becomes Invalid |

A cache that writes a block it holds as UnOwned or NON *steals* ownership with
a WFI. A cache that misses on a write fetches the block with an RFO. Either
way, the writer ends up holding the block Owned Exclusively. After that, further
writes cost no bus traffic.

## The two controllers

The chip (`snoop_cache_chip`) joins five parts around the cache memory:

```
 processor ── proc_bus_if ── cache_controller ──┐            ┌── snoop_controller
                                 │   B side      │  interlock  │      │ A side
                                 └──────── cache_datapath ─────┴──────┘
                                                  │ Aassembly
                                             sys_bus_if ── system bus
```

- **cache_controller** serves the processor.
  - A read hit is answered from the B side of the cache memory.
  - Every other request first takes the system bus. Then, on the A side:
    1. It re-reads the entry.
    2. If the victim is owned, it flushes the victim with WWI.
    3. It fetches the block with Read or RFO, or issues a WFI.
    4. It merges the processor's word and writes the new state.
    5. It releases the bus.
  - Test-and-set is handled as a write. It returns the old word and leaves
    `0x0001` in its place.
- **snoop_controller** answers other masters' operations. For each one it does
  the following:
  1. Reads the entry on the A side.
  2. Decides within one cycle.
  3. If it owns the block, raises INHIBIT by the third cycle of the operation.
  4. Supplies the four words from Aassembly.
  5. Writes the new state.

  The full table is in `rtl/snoop_controller.sv`.

## Critical sections: why the sequencing looks the way it does

Most of the design's subtlety lies here. Two agents can change an entry: the
cache controller and the snoop. If they interleave badly, the protocol breaks.
Three rules prevent that.

**1. The bus is the lock for everything except writes to Owned Exclusively
blocks.**

- A cache controller needs the bus to do anything but a read hit or an EXC
  write.
- While it is bus master, no other master can start an operation, so its own
  snoop is idle.
- The controller keeps the bus from the moment it re-reads the entry until the
  entry is updated.
- Releasing the bus between the WFI and the data write would let another cache
  steal the block back at once. The two caches could then take it from each
  other forever.

**2. Re-read after winning the bus.** The controller first looked at the entry
before it asked for the bus. While it waited for arbitration, its snoop may have
invalidated that entry because of a WFI or RFO from another cache. So after the
grant, the controller reads state and tag again on the A side. It then decides
from the fresh value:

- An entry that became Invalid is handled as a miss.
- An entry still UnOwned gets its WFI.

**3. An asymmetric interlock for Owned Exclusively writes** (`rtl/interlock.sv`).

A write to an EXC block uses no bus, so the bus cannot protect it. Meanwhile,
another cache's Read or RFO may arrive for that same block. If the snoop
supplied the block while the local write was half done, the requester would get
stale data, and the state would then claim a copy was shared or invalid.

Two lines guard the entry: **ProcHas** (from the cache controller) and
**SnoopWants** (from the snoop).

- The cache controller may raise ProcHas in the cycle it asks, unless
  SnoopWants is already up.
- The snoop raises SnoopWants, waits one cycle, and enters its safe state only
  if ProcHas is low.
- A tie therefore goes to the processor. That is deliberate: the processor's
  local write is the common case.

The two critical sections are:

| snoop (Read/RFO hitting EXC) | cache controller (write hitting EXC) |
|---|---|
| read block; raise INHIBIT | read block |
| obtain interlock | obtain interlock |
| re-read the data | re-read the state |
| supply the four words | still EXC: merge word, write block |
| store NON or INV | not EXC: give up and take the bus path |
| release; lower INHIBIT | release |

Both agents re-read inside the lock. The snoop therefore always supplies the
block either before or after the local write, never in between. A controller
that loses the race sees the new state and restarts as a bus write.

An NON block does not need the interlock. A processor write to an NON block
goes through the bus, which keeps the snoop idle anyway.

Within one cycle, a read and a write of the same row return the old value. A
reader therefore sees a row either before or after a write, never a mix. This
stands in for the separate read and write cycles of the original two-phase
datapath.

## The cache memory (`cache_datapath`)

The cache memory has three arrays: two state bits, thirteen tag bits and a
64-bit block per entry. Two row decoders give a dual-ported read.

- **A side:** serves the bus, meaning snoop look-ups, fills and flushes. Its
  registers are Astate, Atags and Aassembly. Its word is chosen by the one-hot
  `MuxA[3:0]`.
- **B side:** serves the processor. Its registers are Bstate, Btags and
  Bassembly. Its word is chosen by address bits [1:0], with upper and lower byte
  lanes on writes.

All writes go from the registers into the arrays:

| write strobe | source register | target array |
|---|---|---|
| `WrAData` | Aassembly (a fill) | data |
| `WrBData` | Bassembly (a processor write) | data |
| `WrBTags` | Btags, loaded from the processor tag by `SetBTags` | tag |
| `WrAState` | Astate, loaded with `StateValue` by `SetAState` | state |

The state array can change without touching tag or data.

The word address is split as follows:

| bits | field |
|---|---|
| [18:6] | tag |
| [5:2] | index |
| [1:0] | word in block |

`MatchA` and `MatchB` require an equal tag and a state other than Invalid.

## System bus (`sys_bus_if`)

The original design targets the Intel MultiBus with one extra line. It relies
on three properties of that bus:

- Memory can be inhibited.
- Protocol operations can be signalled.
- At most one request is pending.

This RTL uses a simple synchronous bus of its own with those properties:

- Every output is zero while it is not driven, so the bus is the OR of all
  agents' outputs.
- A master holds `cmd`, `op` and the word address for the whole operation.
  After each acknowledge it steps to the next word.
- A block operation has four beats. WFI has one beat and carries no data.
- A responder acknowledges with one-cycle pulses that are never adjacent, so
  one beat takes at least two cycles.
- Counting the operation's first cycle as cycle 0, an owning snoop raises
  INHIBIT by cycle 2. Memory may not acknowledge before cycle 3, so an inhibit
  always arrives in time.
- Arbitration is external (`sb_req`/`sb_gnt`). A grant must not change while
  `cmd` is high.

## Processor bus (`proc_bus_if`)

This is a synchronous, active-high version of a 68000-family bus cycle.

- **Inputs:** `p_as` (address strobe), `p_rw`, and the byte strobes `p_uds` and
  `p_lds`.
- **Extra qualifiers:** `p_tas` marks an atomic test-and-set. `p_own` is the
  non-shared hint, which turns a read miss into an RFO.
- **Handshake:** `p_dtack` rises with the data and stays high until `p_as`
  drops.

A read hit takes four clock edges from the address strobe to DTACK. The
original description gives no cycle counts.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `IDX_W` | 4 | index bits: 16 entries |
| `TAG_W` | 13 | tag bits; the word address is `TAG_W+IDX_W+2` = 19 bits |
| `WORD_W` (package) | 16 | word width |
| `WORDS` (package) | 4 | words per block |

The defaults match the original chip. All shared types are in `rtl/bop_pkg.sv`:
`state_e`, `bus_op_e` and `proc_op_e`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` at the end and has a
watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bop_pkg.sv tb/tb_snoop_cache_chip.sv --top-module tb_snoop_cache_chip
./obj_dir/Vtb_snoop_cache_chip
```

Add `+trace` to print every bus operation.

| testbench | what it checks |
|---|---|
| `tb_cache_datapath` | every output against a cycle-accurate reference model, under random legal strobes |
| `tb_interlock` | mutual exclusion, processor priority on ties, the snoop's one-cycle wait |
| `tb_proc_bus_if` | request latching, DTACK timing, byte strobes, test-and-set, hint |
| `tb_sys_bus_if` | master beats for each operation, responder beats and spacing, held snoop address |
| `tb_snoop_controller` | the full operation × state × hit/miss table, INHIBIT timing, data re-read under the lock |
| `tb_cache_controller` | one cache on a modelled bus: each protocol path, bus operations issued, waiting on the interlock, random reads against a reference memory |
| `tb_snoop_cache_chip` | three chips at default size (described below) |

`tb_snoop_cache_chip` runs three chips at their default size, with a modelled
arbiter, main memory and I/O master (`tb/tb_sysbus_model.sv`). It covers:

- Every protocol case.
- The EXC-write-against-foreign-Read race at 14 relative timings. Both outcomes
  must occur.
- Two caches stealing the same block at once.
- Random sharing.
- A test-and-set spin lock protecting a counter.
- Checks that each mechanism happened at least once:
  - each bus operation;
  - an inhibited read;
  - a local EXC write;
  - an aborted local write;
  - a snoop waiting on the interlock.

It also measures the bus cost of one non-shared block that is read, written
twice and then replaced:

- **Plain read:** 3 operations (Read, WFI, WWI).
- **Read with the non-shared hint:** 2 operations (RFO, WWI).

This is the comparison the original design uses to argue for processor hints.

It also hands a test-and-set lock word from cache to cache six times. Each
hand-over must cost exactly one bus operation, a Read-For-Ownership answered by
the previous owner, and the lock word is never written back to memory.

## How far it follows the original, and where it departs

The following follow the original description:

- The four states and five operations.
- The snoop's response table.
- The processor read and write flows.
- The re-read after bus arbitration and holding the bus until the update.
- The step-by-step critical sections of the snoop and the cache controller.
- The asymmetric interlock's two lines and its P1/P2 and S1/S2/S3 states.
- The cache organisation: sizes, address split, and A/B sides with assembly
  registers.
- The datapath signal names.

The following are this design's own choices:

- **Clocking:** one rising-edge clock stands for the original two-phase clock.
  Each edge is one datapath read or write cycle.
- **System bus:** the bus protocol is new; the original used an extended
  MultiBus.
- **Processor interface:** the handshake is synchronous, and test-and-set and
  the hint have their own pins.
- **Fills:** fills write data through Aassembly (`WrAData`), not through
  Bassembly. The A decoder uses the processor's index at that point, so the
  row is the same.
- **Test-and-set:** it writes the word `0x0001`. The 68010 instruction sets one
  bit of a byte.
- **Non-shared hint:** the hint installs a block Owned Exclusively, but no dirty
  bit is added. A hinted block is always written back on replacement, even if
  it was never written.
- **Bus arbitration:** the cache controller does not take the bus while its own
  snoop is still finishing an operation.
- **Reset:** every entry becomes Invalid.
- **State and operation encodings:** these are this design's own.
- **Figure signal `BusAdrB`:** the original figure shows this signal (bus
  address on the B decoder), but it has no described use and is omitted.

Not included:

- Main memory, the processor and the bus arbiter. These are ordinary parts
  outside the chip; the testbenches model them.
- The physical chip. The original was laid out in CMOS and missed its 10 MHz
  timing.

## Capacity against the studied configurations

The default cache holds 16 × 8 bytes, or 128 bytes. The protocol comparison
that motivated the design used a 64 KB cache with 64-byte blocks and an 8 KB
cache with 8-byte blocks (VAX 11/780 style). Neither configuration fits this
organisation; reaching them needs wider `IDX_W` and, for the first, wider
blocks. The block-level operation counts above do not depend on capacity.
