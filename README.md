# MIPS-X node: processor external interface, caches and coprocessors

This is synthesizable SystemVerilog for one MIPS-X processor node as seen from
the processor's pins. The node has:

- the processor (`mipsx_cpu`), which holds the 512-word on-chip instruction
  cache (`icache`);
- an external, direct-mapped, virtually addressed write-back cache with its
  controller (`ecache`);
- the external address latch that feeds the coprocessors (`bus_latch`);
- up to eight coprocessors (`cop_unit`). The first one is the floating-point
  unit, with its own load/store path to memory.

The top level is `mipsx_system`. It joins the devices with a shared 32-bit
data bus, the address bus and one wired-OR stall line, **Miss**.

The integer datapath is not part of this RTL: the register file, ALU,
shifter, decoder and branch logic. The processor reaches it through a small
"core" port: each cycle the core names the bus usage of the instruction in
the ALU stage and supplies the Result Bus value. Also outside, behind ports:

- main memory, behind the Ecache's memory port;
- the coprocessors' arithmetic, behind each `cop_unit`'s execution port.

All files are in `rtl/`, one module or package each. Self-checking
testbenches are in `tb/`.

## Clocking and conventions

The chip uses a two-phase non-overlapping clock. Here one clock edge ends one
processor cycle. Where the chip says "valid in phase 2 of ALU, stable in
phase 1 of MEM", the RTL drives the signal combinationally during the ALU
cycle, and the external latch captures it at the edge that ends ALU.

**Miss** is the only stall. No device changes state at an edge where Miss is
high. All processor-side state holds, and so do the external latch, the
Ecache address register and the coprocessors. Miss is the OR of:

- the Ecache's `mem_miss`;
- each coprocessor's `stall`.

The data bus is modelled as the OR of the enabled drivers, standing in for a
tri-state bus. The top asserts that no two devices drive it in the same
cycle.

Bit numbering: the chip numbers its pins from the most significant bit, so
pin AddressN is `addr[31-N]`. FPReg1 is the MSB of `fpreg`.

Shared types are in `mipsx_pkg`:

- the instruction kinds the core reports (`K_LD`, `K_ST`, `K_LDT`, `K_STT`,
  `K_LDF`, `K_STF`, `K_MOVTOC`, `K_MOVFRC`);
- the latched bus-cycle record;
- the coprocessor word;
- the reset vector (byte address `0x07FFFF80`) and the exception vector (0).

## The processor pipeline and its pins (`mipsx_cpu`)

The pipeline has five stages: IF, RF, ALU, MEM, WB. The bus protocol hangs
off the stages like this.

| Stage | What happens on the bus |
|---|---|
| ALU | The address pins show the Result Bus: an address, or a coprocessor word for coprocessor instructions. MemCycle, CopCycle, Read/Write_b, BypassCache and FPReg describe the access. |
| MEM | Read data is latched at the end of the cycle. A movtoc drives its data. |
| WB | A store drives its data here, the delayed write. WBEnable is high for a coprocessor instruction. The instruction commits. |

### Late miss and the re-latch

The Ecache decides hit or miss one cycle after it returned the data.
Meanwhile the processor has already latched that data at the end of MEM.

If the access missed, the Ecache holds Miss high through the load's WB
cycle. While Miss is high, the processor's data latch loads again at every
edge: the load is re-executed. When the Ecache finally presents the right
word, it drops Miss, and the last latch holds the good data. Loads must be
idempotent for this to work, which is a compiler rule.

The same re-latch serves the second Icache fill word (see below). That is
why the latch remembers its target and, for a fill, the Icache address.

### Delayed write and the store slot

A store probes the Ecache in its MEM cycle. It drives its data in the next
cycle, once Miss is low, for exactly one cycle. Raising Miss earlier does not
stretch it.

The Ecache writes the word during that cycle, which is the MEM slot of the
following instruction. So software must not put a memory or coprocessor
instruction right after a store. The assertion `a_store_slot` flags
violations in simulation.

### Icache miss sequence (the hardest part of the processor)

When a fetch misses in the Icache, the processor takes over the bus for two
cache-miss cycles:

1. **Miss cycle.** The PC replaces the ALU-stage instruction's address on the
   pins, with MemCycle and read. The displaced ALU-stage access is
   remembered.
2. **CM1.** The word for the PC comes back and is written into the Icache.
   The pins send PC+4.
3. **CM2.** The second word comes back. The pins re-send the displaced
   ALU-stage access, so the Ecache sees it one cycle late but in order.
4. The first word enters RF. The second word is written into the Icache and
   taken straight from the fill register as the next fetch.

The instruction in MEM when the miss starts must not commit early. Its WB,
including any WBEnable, is postponed until after CM2. A load in MEM has
already latched its data. If that load misses in the Ecache, the Ecache
runs its normal miss sequence with address reload before the CM cycles
proceed.

**Store interlock.** If a store is in MEM when the fetch misses, its delayed
write needs the next bus slot. The processor then inserts one interlock cycle
with no memory cycle before the fetch address goes out. This is the only
hardware interlock.

### Bus hold under Miss

Several devices can hold Miss while the bus carries a value that someone
re-latches, for example a coprocessor stalling while the Ecache is presenting
load data. To cover this, every device that drove the data bus in the last
cycle with Miss low keeps driving the same value for as long as Miss stays
high. This applies to:

- the processor (movtoc data, ICacheTest words);
- the Ecache (read data);
- a coprocessor (movfrc data).

This matches the rule that movtoc data "stays driven until Miss is released".
It also makes every re-latch during a stall idempotent. Store data and stf
data are the exception: they are on the bus for exactly one cycle with Miss
low.

### Interrupts and exceptions

Interrupt is sampled every cycle and is maskable. Once taken, it is masked
until the core signals the PSW write (`int_unmask`). Exception is not latched
and not maskable.

Both act only at an edge where Miss is low. A stall delays the action but
does not lose it. The actions are:

- The WB instruction completes.
- A store in MEM still performs its write next cycle.
- A coprocessor instruction in MEM gets no WBEnable.
- Everything younger is squashed. An instruction in ALU puts no memory or
  coprocessor cycle on the pins.
- Fetching restarts at address 0. The core receives the restart PC
  (`exc_pc`).

An exception during the CM cycles is handled the same way.

### Reset and test modes

While Reset is high, the reset vector is forced on the address pins, and
fetching starts there when Reset falls. Reset clears the Icache tags unless
ICacheTest is high.

With ICacheTest high:

- the PC only increments;
- a first pass fills the Icache from the data pins through ordinary miss
  cycles;
- after a second reset, the data pins show the Icache word of each fetch.

ICacheDisable makes every fetch miss, so the processor runs on cache-miss
cycles only.

## On-chip instruction cache (`icache`)

The cache holds 512 words: 4 sets × 8 ways × 16-word blocks. Replacement
uses a one-hot ring counter that rotates every clock.

Each block has one tag and a valid bit per word, because a miss brings in
only two words. A fill to a block that is not present allocates the first
invalid way of the set, otherwise the way the ring counter points at.

Address split:

| Bits | Field |
|---|---|
| [5:2] | word in block |
| [7:6] | set |
| [31:8] | tag |

Lookup is combinational. A write stores one word at the clock edge.

## External cache and controller (`ecache`)

This is the largest block.

**Organisation.** The cache is direct-mapped with 4-word blocks and
write-back. Its size is the `WORDS` parameter, default 16K words. It can be
set to 32K or 64K words, the other sizes considered for this cache. The
testbenches run at 16K; at 64K, verilator lint flags the wide reset of the
valid and dirty vectors.

The cache is virtually addressed, so each tag holds `{PID, address tag}`.
The PID register lives in the controller. The controller is coprocessor
number 0: a movtoc with fn = 0 sets a new PID. The PID is written on
WBEnable and is dropped if another coprocessor instruction reaches MEM
first.

**Pipeline.** The cache has a two-stage pipeline:

1. The address register (AR) captures the address bus at every edge where
   Miss is low.
2. In the following cycle, the data array is read at AR and driven for a
   read, while the tag compare runs alongside. The compare result is
   registered.
3. In the cycle after that (the processor's WB), `mem_miss` goes high if the
   access missed.

**Miss handling.** The controller is a state machine with these states:

| State | Action |
|---|---|
| `S_IDLE` | Normal operation. |
| `S_WBK` | Write the dirty victim back, 4 words. |
| `S_FILL` | Fetch the block, 4 words, then write the tag. |
| `S_LDT` | Load-through read of one word. |
| `S_RELOAD` | Assert AddressTristate and drive the missed address back into AR. |
| `S_PRESENT` | Drive the data with Miss still high, while putting the displaced next address back into AR. |
| `S_RESTORE` | For a store miss: only restore the displaced address. |

The reload is needed because the next access had already displaced the
missed address in AR. Throughout, the processor keeps re-latching, and the
last latch gets the word presented in `S_PRESENT`. A store miss fills the
block and then lets the delayed write go ahead.

**Writes.** The delayed write happens in the cycle after the store's probe
cycle, with Miss low. It writes the word and sets the dirty bit.

**Bypassed accesses.**

- Store-through (`stt`) goes into a one-word posted-write register. It
  drains to memory in the background, and also updates the word if the
  block is cached.
- Load-through (`ldt`) reads memory directly and does not look for a cached
  copy.

**Memory port.** One word per request: `mm_req`/`mm_we`/`mm_addr`/`mm_wdata`,
answered by a one-cycle `mm_ack` with `mm_rdata`. Memory is addressed with
the virtual address, because translation is outside this design.

## Coprocessor interface (`cop_unit`) and the external latch (`bus_latch`)

`bus_latch` captures the ALU-cycle bus: the address or coprocessor word, the
control pins and FPReg. It holds them through MEM, and holds longer while
Miss is high.

A `cop_unit` decodes the latched cycle. It takes instructions with CopCycle
high, MemCycle low and its own number. The FPU also takes CopCycle together
with MemCycle, which means ldf/stf.

The coprocessor word layout is this design's own:

| Bits | Field |
|---|---|
| [2:0] | coprocessor number |
| [6:3] | rd |
| [10:7] | rs1 |
| [14:11] | rs2 |
| [31:15] | fn, where 0 means a plain move |

The instructions behave as follows:

- **movtoc** takes the bus data at the end of MEM.
- **movfrc** drives the register during MEM.
- **aluc** is a move with a non-zero fn. It starts the execution unit
  (`ex_*` ports) and ignores the data.
- **ldf** latches the data like a processor load, including the re-latch
  under Miss.
- **stf** drives the register in the following cycle for one cycle.

**Write-back enable.** Every register write is held as pending until
WBEnable arrives. If another coprocessor instruction, for any unit, finishes
MEM first, the pending write is squashed. This makes coprocessor
instructions restartable after an interrupt. A movfrc of a pending register
gets the pending value (bypass) once that write's WBEnable has been seen,
in the same cycle or earlier. Without it, the movfrc is the instruction that
squashes the write, so it reads the old value.

**Stall.** A unit runs one operation at a time. An instruction for a busy
unit raises the unit's `stall`, and through it Miss, until the operation
finishes.

## Testbenches

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_icache` | Hits and misses, eviction by the ring counter, ICacheDisable, tag clearing at reset and its suppression by ICacheTest, a full 512-word fill. |
| `tb_bus_latch` | Random cycles with random Miss, against a reference. |
| `tb_cop_unit` | Move commit and squash, bypass (and no bypass of a squashed write), movfrc hold under Miss, operation stall, ldf re-latch, stf timing, and 600 random moves with on-time, delayed or withheld WBEnable against a reference. |
| `tb_ecache` | 3000 random loads, stores, ldt, stt and PID changes on conflicting addresses, checked against a reference memory. Final comparison of all dirty blocks. |
| `tb_mipsx_cpu` | The processor with an ideal late-miss responder and a random program. Checks pin values, the re-latch, WBEnable at commit, interrupts, an exception in CM1, the ALU-stage squash, and ICacheTest. |
| `tb_mipsx_system` | The full node at default sizes. Counts each mechanism and fails if any never happened. Compares all loads and coprocessor registers with a reference. Checks that no write or coprocessor cycle leaves the chip when an exception is taken. |

`tb_core` is a helper, not a testbench. It stands in for the integer datapath
and keeps the reference model.

## Differences from the source description

- **Clocking.** The design uses one clock instead of two phases. Phase-level
  timing is collapsed to cycle boundaries:
  - Miss falling up to 10 ns before phase 1 ends;
  - Interrupt sampled on phase 1 and Exception on phase 2;
  - the asynchronous AddressTristate.

  Reset is synchronous; it does not need to be held for 4 cycles.
- **Revision 2 behaviour only.** This covers the processor's own store
  interlock, and data driven when Miss falls. The Revision 1 precharged
  address pins and the Test pin are not modelled.
- **Not present:**
  - Ecache flush;
  - the proposed bus-locking coprocessor instruction;
  - the shared multiprocessor bus and cache coherence;
  - address translation;
  - the PadMem pin observation in test mode;
  - the pin map and electrical pins (Vdd, Gnd, Vbias, clocks).
- **Reset address.** The byte address on the pins, `0x07FFFF80`, is used.
  The word address given for the PC unit, `0x7ffffe0`, does not correspond
  to it. The value seen on the pins was followed.
- **Own choices where the source is silent:**
  - the coprocessor word layout;
  - the Ecache controller as coprocessor 0 and the FPU as coprocessor 1;
  - the ldf/stf encoding as CopCycle together with MemCycle, following the
    pin description;
  - an 8-bit PID;
  - WBEnable also for ldf/stf;
  - interrupts unmasked after reset;
  - the Icache's per-word valid bits and allocation rule;
  - one reload cycle and one present cycle in the Ecache miss sequence;
  - load-through ignoring cached copies;
  - the bus-hold rule under Miss.
- **Software duties stay with software.** These are not checked by
  hardware:
  - the slot after a store (only asserted in simulation);
  - idempotent loads;
  - converting a restarted store or non-idempotent coprocessor instruction
    into the nop at address 0.
