# Dual-core pipelined MIPS with MESI-coherent private caches

This is a small shared-memory multiprocessor meant for teaching. It has two
identical five-stage MIPS cores. Each core has its own direct-mapped
instruction cache and data cache. Both cores reach one small main memory
through a bus system. The data caches are write-back, so a core may hold the
only up-to-date copy of a block. The bus system therefore keeps the two data
caches coherent with the MESI protocol, and it is the part that holds the
design together.

- Every data-cache line carries a two-bit state: Modified, Exclusive,
  Shared or Invalid.
- When one core needs a block, the bus looks the block up in the other
  core's cache before granting the request.
- If the other cache holds it Modified, the bus has that cache write it back
  first.
- The other copy is then downgraded to Shared or invalidated.

The whole design is synthesizable SystemVerilog-2017. It runs in Verilator
with no vendor primitives.

```
        +-------------------------+         +-------------------------+
        | core 0 (RESET_PC 0x000) |         | core 1 (RESET_PC 0x100) |
        |  F  D  E  M  W pipeline |         |  F  D  E  M  W pipeline |
        |  icache      dcache     |         |  icache      dcache     |
        +----|-----------|--------+         +----|-----------|--------+
             |   req/gnt/done, word requests     |           |
             |           |  snoop: wb_in, op, snp_addr, snp_state, wb_done
        +----v-----------v-----------------------v-----------v--------+
        | bus_system: instruction path (round robin)                   |
        |             data path (round robin + MESI snooping)          |
        +---------------|------------------------------|---------------+
                        v                              v
        +---------------------------------------------------------------+
        | main_memory: 512-byte instruction segment | 512-byte data seg. |
        +---------------------------------------------------------------+
```

## Module hierarchy

| module | role |
|---|---|
| `multicore_top` | two `mips_core`, one `bus_system`, one `main_memory`; load port and debug read port |
| `mips_core` | pipeline, `icache`, `dcache`, `bht`, `regfile`, `alu`, `muldiv_hilo`, `main_control`, `rtype_control`, `hazard_unit` |
| `icache` | 4 lines x 4 words, valid bit, fill FSM |
| `dcache` | 4 lines x 4 words, MESI state, FSM with victim write-back, fill and snoop write-back |
| `bus_system` | arbitration and routing of both memory paths; snooping and write-back requests |
| `main_memory` | two 128-word segments, word-serial transfers with `Mem_rdy` |
| `mips_pkg` | shared types: opcodes, control word, MESI encoding, bus structs |

## Memory map and address split

Instructions and data live in separate 512-byte segments, so both start at
address 0. Each segment holds 32 blocks of four 32-bit words. Both caches
split a byte address the same way:

```
 31                          6 5    4 3    2 1    0
+-----------------------------+------+------+------+
|            tag (26)         | line | word | byte |
+-----------------------------+------+------+------+
```

With four lines, a cache holds 64 bytes, which is an eighth of a segment.
Memory ignores address bits above the segment size: the data segment uses
bits 8:2. Addresses 256 bytes apart (0x40 and 0x80, for example) fall in the
same cache line. The end-to-end test uses this to force an eviction.

## The core

The pipeline has five stages: fetch (F), decode (D), execute (E), memory
access (M) and write-back (W). All registers change on the rising clock
edge.

- **Fetch.** The PC addresses the instruction cache. A branch history table
  of 64 two-bit counters is indexed by `pc[7:2]`. It predicts conditional
  branches as soon as they are fetched, and fetch computes the target from
  the fetched immediate. `j` and `jal` are recognised in fetch and
  redirected at no cost.
- **Decode.** The opcode and funct decoders build a `ctrl_t` control word.
  The register file is read with write-through, so a value written in this
  cycle is read in this cycle.
  - Branches are resolved here. They compare register values forwarded from
    M when needed, and they update the BHT.
  - When the prediction was wrong, or for `jr`/`jalr`, decode redirects the
    PC and flushes the one instruction fetched behind the branch.
  - There is no delay slot.
- **Execute.** The ALU, the link address for `jal`/`jalr`, and the
  multiply/divide unit with the Hi and Lo registers.
  - mult/multu/div/divu finish within the cycle.
  - Hi and Lo are readable by the very next instruction's `mfhi`/`mflo`.
- **Memory.** The data cache handles byte, half and word loads (sign- or
  zero-extended) and stores, little-endian within a word. Stores place
  their data in byte lanes and drive byte enables.
- **Write-back.** Writes the register file.

The hazard unit handles forwarding and stalls:

| situation | action |
|---|---|
| ALU operand produced by the instruction in M or W | forward (M wins) |
| branch/jr operand produced by an ALU instruction now in M | forward into decode |
| instruction in D uses the result of a load in E | `lwstall`: hold F and D one cycle, bubble into E |
| branch/jr in D needs a result from E, or from a load in M | `bstall`: hold F and D, bubble into E |
| either cache reports `stall` | freeze every pipeline register |
| `hlt` decoded | stop fetching; older instructions drain |

`hlt` is opcode `111100` (word `F0000000`). The core's `halted` output rises
when `hlt` reaches write-back.

The decoders accept 50 MIPS-I integer instructions plus `hlt`:

- arithmetic and logic: add/addu/sub/subu, and/or/xor/nor, slt/sltu and the
  immediate forms, lui;
- shifts: sll/srl/sra and the variable forms;
- multiply and divide: mult/multu/div/divu, mfhi/mflo/mthi/mtlo;
- loads and stores: lb/lh/lw/lbu/lhu, sb/sh/sw;
- branches: beq/bne/blez/bgtz/bltz/bgez;
- jumps: j/jal/jr/jalr.

Overflow never traps. Unknown opcodes execute as no-ops.

## Caches

### Instruction cache

The instruction cache is read-only. Each line has a 26-bit tag and a valid
bit.

1. On a miss, the cache requests the instruction path of the bus.
2. Once granted, it walks four word states `rw0`..`rw3`. Each state drives
   `memrd`, a word number `wsel`, and `Rst_dly = 0`. It advances when memory
   answers `Mem_rdy`.
3. It then passes through a `read cache` state. That state delivers the
   instruction and returns the bus (`done`).

A miss costs `2 + 4*(LATENCY+1)` stall cycles.

### Data cache

Each data-cache line has a 26-bit tag and a MESI state, encoded I=00,
S=01, E=10, M=11. Reset makes every line Invalid.

A read hits in S, E or M. A write hits in E or M: E becomes M without any
bus traffic. A hit is served in the same cycle with `stall = 0`. Otherwise
`stall = 1` freezes the pipeline until the controller has done its work.

| state | what it does |
|---|---|
| `idle` | serve hits; on a miss or a write to S, request the data bus |
| `ww0`..`ww3` | write the Modified victim back, one word per `Mem_rdy` |
| `rw0`..`rw3` | read the new block, one word per `Mem_rdy` |
| `read cache` / `write cache` | serve the access after the bus work, hand the bus back |
| `swb0`..`swb3` | write a Modified line back because the bus asked (`wb_in`) |

A snoop write-back request takes priority over the core's own pending
access.

- **Write misses allocate.** The block is read in first and then written.
  Otherwise the line would carry a new tag over three words that belong to
  the old block.
- **Upgrades.** A write to a Shared line also goes through the bus. The
  other copy is invalidated, and the write then completes in
  `write cache`.
- **Fill state.** After a fill the line is Exclusive. It is Shared instead
  when the bus reports that another cache still has a copy (`shared`).

Stall cycles seen by the core, with memory answering every word after
`LATENCY` cycles:

| case | stall cycles |
|---|---|
| read or write miss, clean line | `1 + 4*(LATENCY+1) + 1` |
| miss replacing a Modified line | `1 + 8*(LATENCY+1) + 1` |
| write to a Shared line (upgrade) | 2 |
| snoop write-back in this cache (no local access pending) | none; it runs in the background for `4*(LATENCY+1)` cycles, but a local miss waits for it |

## Coherence: how the bus system and the data caches cooperate

This is the subtle part of the design. Everything below concerns the data
path. The instruction path is a plain round-robin arbiter, because
instructions are never written.

**Snoop interface.** The bus has one broadcast address `snp_addr`. Each data
cache answers combinationally with `snp_state`, the MESI state it holds for
that block. The bus gives each cache a command `snp_i`:

- `op` is `NONE`, `SHARE` (go to S) or `INV` (go to I);
- `wb_in` asks the cache to write the block back first.

A cache reports the end of a snoop write-back with a one-cycle `wb_done`.

**A transaction, step by step.**

1. In `B_IDLE`, round robin picks a requesting data cache, and
   `snp_addr` shows that cache's address. The bus reads the other cache's
   `snp_state` in the same cycle.
2. If the other cache holds the block Modified, the bus enters `B_WB`.
   - It raises `wb_in` to that cache with the pending `op`: `SHARE` if the
     requester reads, `INV` if it writes.
   - It routes that cache's word requests to memory.
   - The owning cache runs `swb0`..`swb3`, applies `op` to its line on the
     last word, and pulses `wb_done`. The bus then moves to `B_OWN`.
3. Otherwise the bus goes straight to `B_OWN`. On that same clock edge it
   applies `op` to the other cache's copy: E or S becomes S for a reader;
   any copy becomes I for a writer.
4. In `B_OWN` the requester has `gnt`. It does its own victim write-back and
   fill, or just its upgrade, then signals `done`.
5. The bus registers whether any other copy remained (`shared`). The
   requester uses it to fill in S or E.

**Race protection.** Two things could go wrong, and the design guards against
both:

- **Stale snoop answer.** A cache that is about to be snooped could change
  its line in the same cycle by serving a local write. To prevent this, a
  data cache holds back its local access for one cycle while a snoop `op` is
  addressed to the line it wants. The state change happens first, and the
  local write then takes the normal miss or upgrade path.
- **Write-back against a miss.** A cache asked for a write-back may itself
  be waiting for the bus with a miss. The write-back request comes first.
  The cache cannot be the owner while it is written back, and the assertion
  `a_wb_not_owner` in `bus_system` checks this.

`a_no_share_of_modified` in `dcache` checks one more rule: a cache is never
told to share or invalidate a Modified line without first writing it back.

**Example**, from the end-to-end test:

1. Core 0 sums 1..16 and stores 0x88 to 0x40. Its line becomes M.
2. Core 1 finishes 7! and loads 0x40. The bus sees M in core 0 and asks for
   a write-back with `SHARE`. Both caches then hold S.
3. Core 1 stores 0x1438 to 0x40, an upgrade: core 0's copy is invalidated
   and core 1's becomes M.
4. Core 1 stores to 0x80, which maps to the same line. Its dirty 0x40 block
   goes back to memory as a victim write-back.

## Main memory and the word handshake

`main_memory` holds two arrays of 128 words, one per segment. Each segment
has a port that transfers one word at a time. The request carries:

- the block address, made of the tag and line bits followed by four zero
  bits;
- `wsel`, the word number inside the block;
- `rd` or `wr`;
- `Rst_dly`.

While `Rst_dly = 1` memory is idle and its delay counter is cleared. During
a transfer the counter runs, and `Mem_rdy` rises when it reaches `LATENCY`.
The cache takes the word, or memory stores the written word, on that edge.
The cache's next word state then starts a new count.

`LATENCY` defaults to 0, so a word transfers every cycle.

A load port (`ld_we`, `ld_seg`, `ld_addr`, `ld_data`) writes either segment.
Testbenches use it to place programs while reset is held. A combinational
debug port (`dbg_addr`, `dbg_data`) reads the data segment.

## Top-level interface (`multicore_top`)

| parameter | default | meaning |
|---|---|---|
| `NCORES` | 2 | number of cores (only 2 is tested) |
| `RESET_PC` | `'{0x000, 0x100}` | entry address of each core |
| `SEG_BYTES` | 512 | bytes per memory segment |
| `MEM_LATENCY` | 0 | cycles from a word request to `Mem_rdy` |

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | rising-edge clock, synchronous active-high reset |
| `ld_we`, `ld_seg`, `ld_addr`, `ld_data` | in | load port (`ld_seg` 0 = instructions, 1 = data) |
| `dbg_addr` / `dbg_data` | in / out | data-segment read |
| `halted[c]` | out | core `c` has retired `hlt` |
| `memwrite[c]`, `memread[c]`, `dataadr[c]`, `writedata[c]` | out | the load/store core `c` performs this cycle |
| `retire[c]` | out | core `c` retires an instruction this cycle |

To use it:

1. Hold `rst` high.
2. Load the instruction words and any data through the load port.
3. Release `rst`.
4. Wait for `halted`.
5. Read the results through the debug port.

Dirty lines still in a cache are not visible there. Evict them first, or
watch `memwrite`.

## Performance on the reference program

The reference program adds 1..16, computes 7! with `mult`/`mflo`, adds the
two results, and stores 0x1438 to 0x40 and Hi (0) to 0x44. It retires 93
instructions including `hlt`. At the default parameters this design
measures:

| configuration | cycles | CPI | speedup |
|---|---|---|---|
| one core runs everything | 160 | 1.72 | 1 |
| summation on core 0, factorial on core 1 | 135 | - | 1.19 |

The source document reports 125.5 and 86.5 cycles for the same program,
with a speedup of 1.45. Two things explain the gap:

- Every cold miss here costs a full four-word fill: 6 stall cycles at
  `LATENCY` 0. The program touches five instruction blocks and one data
  block.
- Each loop iteration ends with a decrement followed directly by the `bne`
  that tests it. Because branches compare in decode, that `bne` waits one
  cycle every iteration: 23 cycles in the one-core run.
- The source's pipeline uses both clock edges, which its half-cycle counts
  suggest.
- The two-core split here has core 1 poll 0x40 until core 0's sum arrives.
  The source does not say how it split the program.

Memory latency was also varied:

| `MEM_LATENCY` | one core (cycles) | two cores (cycles) | speedup | results |
|---|---|---|---|---|
| 1 | 184 | 181 | 1.02 | correct |
| 3 | 232 | 242 | 0.96 | correct (`tb_multicore_slow_memory`) |

The second core helps less as memory slows down. Core 1 can only finish
after core 0's sum reaches it, and that block travels through memory: a
write-back from core 0's cache, then a fill into core 1's.

## Where this design departs from the source description

- One clock edge throughout. The source captures some registers on the
  falling edge. Register-file write-through stands in for a write in the
  first half cycle.
- `stall` is active high. The source's controller tables use 1 for "run".
- Cache hits are served in `idle`, in the same cycle. The source's state
  diagrams route a hit through `read cache` or `write cache`. Here those
  states are used only after a fill or an upgrade.
- After writing back a Modified victim, a write miss also fetches the block.
  The source's data-cache state diagram goes from the last write-back state
  straight to `write cache` on a write.
- The source draws Hi/Lo next to decode. Here they sit with the one-cycle
  multiply/divide unit in execute.
- The source counts 49 instructions without listing them. Here 50 are
  decoded, plus `hlt`.
- Everything the source leaves open was chosen here:
  - the MESI bit encoding;
  - the bus protocol (request/grant/done, `shared`, snoop commands) and the
    round-robin arbitration;
  - the BHT index and reset value;
  - memory latency, the load and debug ports, reset values;
  - divide-by-zero results (Lo = all ones, Hi = dividend);
  - the entry address of core 1.
- In the reference program, the second loop's `bne` at 0x30 is encoded
  `140BFFFB`, a branch back to 0x20.
- The source drives a 640x480 VGA screen showing both memory segments. That
  display is not part of this RTL; the debug port serves the same purpose
  in simulation.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_multicore_top` | both runs of the reference program at default parameters: stores, results in memory, retired counts, cycle counts (two cores faster); counts every mechanism and fails any that never occurs (I and D fills, shared fill, victim and snoop write-backs, upgrade, invalidation, load-use and branch stalls, M and W forwarding, correct and wrong predictions, multiply, bus contention) |
| `tb_multicore_slow_memory` | the same two runs with `MEM_LATENCY` 3: stores, final memory contents and retired counts (cycle counts printed) |
| `tb_mips_core` | one core on a program covering every instruction class, with a memory model in the testbench; results compared with precomputed values, and the retired count checked |
| `tb_dcache` | hit and miss latencies, E→M, byte writes, victim write-back, shared fill, upgrade, snoop invalidate, snoop write-back with priority over a pending miss, local write held during a snoop |
| `tb_icache` | cold-miss latency, same-cycle hits, conflict refill, 200 random fetches against a model |
| `tb_bus_system` | round robin and routing; read of an E block (SHARE, `shared`); write of an M block (`wb_in` + INV, grant only after `wb_done`) |
| `tb_main_memory` | `Mem_rdy` exactly `LATENCY` cycles after a request (built with 2), `Rst_dly`, `wsel`, segment independence, debug port |
| `tb_alu`, `tb_regfile`, `tb_muldiv_hilo`, `tb_bht`, `tb_main_control`, `tb_rtype_control`, `tb_hazard_unit` | each against a reference model or table, directed and random |

To run one testbench with Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/mips_pkg.sv \
    $(ls rtl/*.sv | grep -v mips_pkg) tb/tb_multicore_top.sv \
    --top-module tb_multicore_top -o simx
./obj_dir/simx
```

Lint warnings are limited to unused signals and parameters: a few control
bits that a stage does not consume, and unused address bits. Neither tool
reports a latch, combinational loop or multiply-driven net.
