# TRIPS polymorphous grid-processor core in SystemVerilog

This is one TRIPS core. It runs programs made of **blocks**. A block holds up
to 128 instructions. It is fetched and mapped onto a 4x4 array of integer
execution nodes as a unit. Inside the block, instructions do not name
registers for their results. Each one names the instructions that consume its
result. An instruction fires as soon as its operands reach its reservation
station. Only values that live beyond the block go through the register file
or memory.

Each node has 64 reservation stations. Station *f* of all 16 nodes together
forms **frame** *f*. Eight frames form an **A-frame**, which holds one block.
That gives eight A-frames, so up to eight blocks can be in flight at once.
The same hardware is used in three ways, chosen by configuration and by the
block header:

* **D-morph** (instruction-level parallelism): one thread, with up to eight
  blocks in flight. The seven youngest run speculatively behind a block exit
  predictor.
* **T-morph** (thread-level parallelism): 2, 4 or 8 threads. Each thread owns
  an equal share of the A-frames and has its own PC, exit history, return
  stack and register copy.
* **S-morph** (data-level parallelism): a header can give a repeat count N.
  The block is fetched and mapped once and then *revitalized* in place N-1
  times. Operands marked constant stay in the stations between iterations.

## Tile map and the operand network

All tiles talk over one operand network. It is a 5x5 mesh with
dimension-order (X then Y) routing and a two-entry FIFO on every router
input:

```
 mesh col:   0        1        2        3        4
 row 0:    RegB0    RegB1    RegB2    RegB3    BlockCtl
 row 1:    N(0,0)   N(0,1)   N(0,2)   N(0,3)   DBank0
 row 2:    N(1,0)   N(1,1)   N(1,2)   N(1,3)   DBank1
 row 3:    N(2,0)   N(2,1)   N(2,2)   N(2,3)   DBank2
 row 4:    N(3,0)   N(3,1)   N(3,2)   N(3,3)   DBank3
```

There are also five instruction-cache banks: one for block headers and one
per row. They feed the array over dedicated wires, not over the mesh.

A packet carries:

* its destination tile
* a kind: operand, register write, load, store, branch or nullified store
* the A-frame and the generation of the block that produced it
* a slot and an index
* a 64-bit value and a 32-bit address

Each A-frame has a generation counter. It advances every time the A-frame is
freed or squashed. Every tile throws away packets whose generation no longer
matches. This is how work from squashed blocks disappears from the network
without being chased down.

Routers step a packet one hop per cycle when the next FIFO has room. A tile
that cannot accept a packet holds it back (valid/ready handshake). Deadlock
is avoided because every consumer can always make progress:

* Stations accept every operand addressed to a mapped frame.
* Register banks and block control absorb everything they receive.
* Data banks have a request queue deep enough for every live memory
  operation (8 A-frames x 32 load/store IDs).

## Block format

A block is 640 bytes: a 128-byte header chunk, then one 128-byte chunk per
row. In row chunk *r*, word *f·4+c* is the instruction for node *(r,c)*, frame
*f* of the block's A-frame.

**Header.** The header has 32 words. Word *j·4+b* holds read slot *b.j* and
write slot *b.j* of register bank *b*:

| bits   | field |
|--------|-------|
| 31:27  | 5 of the 160 header H bits (word 0 holds H[4:0]) |
| 26     | read valid |
| 25:21  | register within bank (architectural register = 32·b + this) |
| 20:12  | read target (9-bit target, below) |
| 11     | constant: the operand survives revitalization |
| 5      | write valid |
| 4:0    | register within bank |

The H bits have this design's own meaning:

* H[31:0] is the mask of store LSIDs the block will produce. The block is
  not complete until each one is done or nullified.
* H[47:32] is the repeat count N. Values 0 and 1 both mean "run once".

**Targets (9 bits).** `[8:7]` give the kind, `[6:5]` the row, `[4:3]` the
column and `[2:0]` the frame inside the A-frame:

* kind 10 is the left operand, 11 the right operand, 01 the predicate.
* `00 00 b w` goes to write slot *w* of bank *b*.
* `00 01 lsid` names a store LSID (used by NULL to nullify a store).
* All zeros means no target. So the left operand of node (0,0), frame 0,
  cannot be reached from a register write slot.

**Instruction formats.** There are six. The opcode is in [31:25] and the
predicate in [24:23]:

| format | fields |
|---|---|
| G | op, pr, unused[22:18], T2[17:9], T1[8:0] |
| I | op, pr, unused, imm9[17:9], T1 |
| L | op, pr, LSID[22:18], imm9, T1 |
| S | op, pr, LSID, imm9, unused |
| B | op, pr, exit[22:20], offset20[19:0] |
| C | op, const16[24:9], T1 |

The predicate codes are: 00 no predicate, 11 fire on true, 10 fire on false.
An instruction predicated the wrong way does not fire and sends nothing.
Opcode numbers are listed in `rtl/trips_pkg.sv`.

Branches work like this:

* BRO and CALLO add their offset to the block's own address. The offset
  counts 128-byte chunks.
* BR, CALL and RET take an absolute address from their left operand.
* SCALL ends the thread when its block commits.

## Life of a block (block control: the hardest part)

`trips_block_ctrl` is where the ordering decisions live, so it is described
in the most detail.

1. **Choosing.** A thread is eligible when it has a free A-frame in its
   share, its next block address hits in the instruction-cache tags, no
   repeat block is holding it back, and it has not halted. Eligible threads
   are picked round-robin.

   On a tag miss, `imiss`/`imiss_addr` are raised until the tag is refilled
   through the refill port. The core has no memory behind the L1. Whoever
   drives the core must write the block's words and then its tag.
2. **Mapping.** The header goes to all four register banks in one cycle. The
   four row banks then stream 8 frames x 4 nodes each into the stations,
   over 8 cycles. At the same time the exit predictor and the target
   predictor give the address of the next block. That address becomes the
   thread's fetch address, so the next fetch can start right away.
3. **Register reads and stitching.** Each bank looks at every read slot of
   the new block. It searches the same thread's older blocks in flight, from
   youngest to oldest, for a write to that register:
   * If the write has arrived, its value is forwarded at once.
   * If the write has not arrived, the read waits for it.
   * If no older block writes the register, the committed copy is read.
   * If the write arrived *nullified*, the read waits until that block
     commits.

   Each bank sends one resolved read per cycle.
4. **Dataflow execution.** A station is ready when all its operands and its
   predicate (if any) have arrived. Each node fires one ready station per
   cycle and sends up to two result packets: T1 and T2. The ALU covers the
   integer ISA. Results can go to:
   * other stations
   * register write slots
   * a data bank (loads and stores, which carry their LSID)
   * block control (branches, which carry exit number, next address and type)
5. **Completion.** A block is complete when three things have happened:
   * its branch has reported
   * every register write in its header has arrived
   * every store in its H-bit mask has been done or nullified
6. **Commit.** Only the oldest block of a thread can commit, and only when it
   is complete. One block commits per cycle. At commit:
   * the banks copy its writes into the thread's registers
   * the data banks drain its stores
   * both predictors are trained
   * the A-frame is cleared and its generation advanced
7. **Misprediction.** Each block records the next address that was predicted
   for it. When its branch reports a different address, every younger block
   of that thread is squashed and fetch restarts at the right address. The
   squash is immediate: generations advance and the stations are cleared.
   Packets still in the network die on arrival.
8. **Revitalization (S-morph).** A block with repeat count N > 1 blocks
   further fetch for its thread. After each iteration except the last:
   * its register writes and stores commit as usual
   * the A-frame gets a revitalize pulse instead of a clear: stations drop
     their operands except those marked constant, and the banks re-arm the
     non-constant reads

   After iteration N the block commits normally and fetch resumes at its
   exit.

**Threads.** `cfg_lg_threads` = 0..3 gives 1, 2, 4 or 8 threads. Thread *t*
owns A-frames *t·P .. t·P+P-1*, where P = 8 >> `cfg_lg_threads`. It uses
them as a circular buffer whose head is its oldest block. Threads start with
`thr_start` and a PC. Change the mode only while no thread runs.

## Memory ordering

Each data bank owns one 64-byte line in four. The bank is chosen by address
bits [7:6]. Loads and stores wait in the bank's request queue and are
performed **only for the oldest block of their thread**, in LSID order:

* A store goes straight into the store buffer. The bank then tells block
  control that the store is done.
* A load is performed once every store of its block with a smaller LSID is
  done. It reads the array and overlays, byte by byte, the youngest older
  store of the same block still in the buffer. The value is zero-extended to
  64 bits.
* Buffered stores write the array only when their block commits, at one per
  cycle. Loads wait while this happens. A squashed block therefore never
  changes memory.

This is conservative: speculative blocks do no memory work at all. It is
simple and clearly correct, but it gives up memory-level parallelism across
blocks.

## Predictors

* **Exit predictor** (`trips_exit_predictor`). It predicts an exit number (0
  to 7) per block, not a direction per branch. It is a tournament of a local
  predictor (a per-block history of three exits) and a global predictor
  (four exits of per-thread history, hashed with the block address). A
  choice table picks between them. Each table entry holds an exit and a
  2-bit confidence.
* **Target predictor** (`trips_target_predictor`). The predicted exit, the
  block address and the predicted branch type select one of three sources:
  * a branch target buffer
  * a call target buffer
  * a per-thread return address stack
  A call pushes the address of the block after the caller. Both predictors
  are read at fetch and trained at commit.

## Files

| file | what it is |
|---|---|
| `rtl/trips_pkg.sv` | constants, opcodes, decoder, header and packet formats |
| `rtl/trips_alu.sv` | integer ALU (combinational) |
| `rtl/trips_opn_router.sv` | one 5-port mesh router with XY routing |
| `rtl/trips_opn.sv` | the 5x5 operand network |
| `rtl/trips_exec_node.sv` | 64 reservation stations, select logic, ALU, packet output |
| `rtl/trips_reg_bank.sv` | 32 registers x 8 threads, read/write slots, stitching |
| `rtl/trips_dcache_bank.sv` | data bank, request queue, store buffer, LSID ordering |
| `rtl/trips_icache_bank.sv` | instruction bank that streams a chunk into one row |
| `rtl/trips_block_ctrl.sv` | fetch, tags, A-frames, commit, squash, revitalize, threads |
| `rtl/trips_exit_predictor.sv` | tournament exit predictor |
| `rtl/trips_target_predictor.sv` | BTB, call BTB, return stacks |
| `rtl/trips_core.sv` | top level, `trips_core` |
| `tb/tb_trips_asm_pkg.sv` | instruction and header encoders for the tests |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Departures from the TRIPS description

* **No floating point.** FP opcodes decode, but they raise `exc` and produce
  zero.
* **Memory below the L1 is missing.** There are no secondary memory tiles,
  no L2, no on-chip network, no memory controllers and no multi-core chip.
  Instead, the L1 banks are preloaded and inspected through ports, and
  instruction misses are serviced by the environment.
* **No load/store dependence prediction.** Loads wait for all older stores
  of their own block, and memory work is done only for the oldest block.
* **Large store buffer.** Each data bank's store buffer holds 256 entries (8
  threads x 32 LSIDs), not 32. Stores leave only at commit. A smaller buffer
  could fill up with stores of a block that cannot complete, and the core
  would deadlock.
* **Revitalization only by repeat count.** A block is reused in place only
  when its header asks for it. Reusing the oldest block automatically, when
  the predicted next block is the same block, is not built.
* **No streaming memory path.** The streaming register file in the memory
  tiles, its wide row channels into the array and the load-multiple-word
  instruction are not built. S-morph loops use ordinary loads and stores.
* **Frame count.** The design uses 64 frames per node (8 A-frames), the
  prototype figure. The larger 128-frame space and the super A-frame
  (several blocks merged into one larger unit) are not built.
* **Design choices made here**, because the document leaves them open:
  * opcode numbers and a 64-bit datapath
  * the H-bit meaning
  * the read-slot layout
  * generation tags
  * one commit per cycle
  * predictor training at commit
  * chunk-counted branch offsets
  * division by zero gives all ones
  * SCALL stops the thread

## How far to trust it

**Tested:**

* Every module has its own self-checking testbench, with random stimulus
  against a reference model where one makes sense. Each testbench catches a
  deliberately planted bug in its module.
* `tb_trips_core` runs the full-size core with default parameters through
  these programs:
  * a D-morph loop program (exercising misprediction,
    register stitching and store drains)
  * a T-morph run with two threads in flight together
  * an S-morph repeat block
  * instruction misses serviced through the refill port

  It checks final registers and memory. It also counts each mechanism (miss
  stalls, blocks in flight, mispredictions, stitched reads, drains,
  revitalizations, thread overlap) and fails if any of them never happened.
* The RTL passes Verilator lint and a second SystemVerilog front end.

**Not established:**

* timing closure or area. The full core is large: the store buffers and
  station arrays are flop arrays, and synthesis of the top is slow.
* behaviour with 4 or 8 threads at core level. This is tested in the block
  control unit test only.
* long random programs

Treat the core as a functional model that is synthesizable in principle. It
is not a tuned implementation.

## Simulating

You need Verilator 5 or later (for `--timing`). Build and run the core test:

```sh
verilator --binary --timing -Wno-fatal --top-module tb_trips_core \
  rtl/trips_pkg.sv tb/tb_trips_asm_pkg.sv \
  rtl/trips_alu.sv rtl/trips_opn_router.sv rtl/trips_opn.sv \
  rtl/trips_exec_node.sv rtl/trips_reg_bank.sv rtl/trips_dcache_bank.sv \
  rtl/trips_icache_bank.sv rtl/trips_exit_predictor.sv \
  rtl/trips_target_predictor.sv rtl/trips_block_ctrl.sv rtl/trips_core.sv \
  tb/tb_trips_core.sv
./obj_dir/Vtb_trips_core
```

A unit test works the same way. Pass the package, the encoder package if
the test uses it, the module under test and the modules it instantiates,
then the test. For example:

```sh
verilator --binary --timing -Wno-fatal --top-module tb_trips_reg_bank \
  rtl/trips_pkg.sv tb/tb_trips_asm_pkg.sv rtl/trips_reg_bank.sv tb/tb_trips_reg_bank.sv
```

Every testbench ends with a line `TB_RESULT checks=N failures=M` and then
stops. A watchdog ends a hung run with a failure. Pass `+verilator+seed+N`
to change the random seed.
