# TFlex: a composable chip multiprocessor in SystemVerilog

A conventional CMP fixes the size of its processors when the chip is
designed. TFlex does not. The chip is a mesh of 32 small single-issue cores
with no shared central resource. The operating system groups cores into
*logical processors* of 1, 2, 4, 8, 16 or 32 cores by writing a few
configuration registers in each core. Each group then runs one thread.
A thread that has a lot of instruction-level parallelism gets many cores.
A serial thread gets one, and the other cores run other threads.

This only works because of the instruction set. It is a block-structured
dataflow ISA (EDGE, in the style of TRIPS):

- A program is a sequence of *blocks*. Each block has a 128-byte header and
  up to 128 instructions.
- A block commits all of its results or none of them.
- Inside a block there are no register names. Each instruction names the
  instructions that consume its result, by their number in the block.
- Registers and memory are read and written only at block boundaries.

Because of this, spreading a block over N cores is only a matter of
arithmetic on instruction numbers, register numbers and addresses. Every
core computes the same mapping from its configuration registers.

This repository holds synthesizable RTL for the whole chip:

- 32 cores on a 4 x 8 mesh;
- the operand mesh that links the cores;
- a broadcast control network;
- a memory network that leads to one L2 port. The L2 itself is outside.

It also holds a self-checking testbench for every unit and one for the full
chip.

## The composition mapping

Each core's configuration (`cfg_t` in `rtl/tflex_pkg.sv`) has these fields:

- `log2n`: the processor has N = 2^log2n cores;
- `log2w`: the cores form a rectangle 2^log2w wide;
- `pos`: this core's participant number, 0..N-1;
- `base`: the physical id of participant 0.

Participant p sits at physical core

    base + (p mod 2^log2w) + (p div 2^log2w) * 4

because the mesh is 4 cores wide. Every distributed structure is then
spread over the participants by taking the low-order bits of some number:

| what | home participant | position there |
|---|---|---|
| instruction i of a block | i mod N | window entry {slot, i div N} |
| block at address A (its *owner*) | (A >> 7) mod N | header cache entry (A >> (7+log2n)) mod 32 |
| architectural register r | r mod N | register file entry r |
| data address A (D-cache and LSQ bank) | (A >> 4) mod N | set (A >> (4+log2n)) mod 256 |

An instruction has these fields: opcode 7 bits, predicate 2, extra opcode
(XOP) 5, and two 9-bit targets T1 and T0. A target is {type[1:0], id[6:0]}.
The type selects the operand slot the result goes to: none, predicate, left
or right. A producer sends its result to participant `id mod N`. That core
writes it into window entry `{slot, id >> log2n}`
(`rtl/tflex_target_xlate.sv`).

With one core, the window simply holds the 128 instructions. With four
cores, each core holds 32 instructions of the block. The higher index bits
are left free for a block slot.

## How a block runs across cores

All coordination happens through messages on the control network
(`cm_kind_e` in the package). Every core sees every message. A core keeps a
message only if its `base` field names the core's own logical processor.

1. **NEXT.** NEXT hands a block address to the block's owner. The OS sends
   it (`os_*` port) to start a thread. After that, the owner of the previous
   block sends it. The message carries the global exit history and the top
   two return-stack entries.
2. **Lookup and prediction.** The owner looks up the block in its header
   cache and its I-cache tags. In the same cycle, it predicts the block's
   exit and the next block's address (`rtl/tflex_nbp.sv`).
3. **Fill on a miss.** On a miss, the owner reads the 640-byte block over
   the memory network. It keeps the header. It sends each instruction as an
   IFILL message to the I-cache bank of the participant that will execute
   it.
   - Each owner manages 8 lines of every bank.
   - A line holds the 128/N instructions that one block places in that bank.
   - The instruction banks therefore need no tags. The owner's tags say
     which block every line holds.
4. **FETCH and register reads.** The owner broadcasts FETCH, with the
   I-cache line and the block's store mask. Every participant then copies
   its instructions into its window, one per cycle. The owner also sends one
   READ per register read in the header. The core that holds the register
   reads it and injects the value as an operand. If the value is still in
   that core's register-forwarding queue, it comes from there.
5. **Dataflow execution.** Each core issues one ready instruction per cycle.
   - A result goes to up to two targets.
   - A local target is written straight into the window in the issue cycle.
     This is the *bypass*: a dependent instruction on the same core can
     issue in the next cycle.
   - A remote target leaves through the operand router as a 64-bit operand
     packet.
   - A predicated instruction whose predicate does not match is squashed. It
     is consumed and produces nothing.
6. **Outputs.** Every output of the block reports back to the owner:
   - a register write (WR) goes to the register's home core, where it waits
     in the forwarding queue, and that core sends WRDONE;
   - a store goes to its LSQ bank, which sends STDONE;
   - the exit (BRO) sends BRANCH, with the target, to the owner.
7. **Commit.** The header gives the number of register writes and the store
   mask. When the owner has seen all writes, all stores and the branch, it
   broadcasts COMMIT.
   - The LSQ banks write their stores to the D-cache in LSID order.
   - The forwarding queues drain into the register files.
   - Every participant then sends CDONE.
8. **Hand-off.** After all CDONEs, the owner trains its predictor with the
   real exit. It counts a misprediction if its guess was wrong. Then it sends
   NEXT to the next block's owner. An exit to address 0 broadcasts HALT.

**Stale packets.** A block instance is identified by a 4-bit *epoch*, and
every participant clears it on a configuration write and advances it at
FETCH. Every operand and memory packet
carries its epoch. A packet from a finished block is dropped. A packet from
a block that this core has not started yet waits at the head of the
in-queue. Without the epoch, an early operand for the next block and a late
one from the previous block could not be told apart.

### Header format

The document does not give the header encoding, so this one is local to
this design:

- word 0, bits [5:0]: number of register writes;
- word 1: store mask, one bit per LSID;
- words 2..31: register reads, each {valid[31], register[15:9], target[8:0]}.

## Memory ordering and the LSQ flow control

Each core has a 40-entry LSQ bank (`rtl/tflex_lsq.sv`) in front of its
8 KB 2-way D-cache bank. Banks are interleaved by 16-byte line, exactly like
the caches.

**Load ordering.** A load must not pass an older store of its block, and
the store may sit in a different bank. At FETCH every bank learns the
block's store mask, and every bank sees each STDONE. A load waits until all
older stores in the mask have been seen. It then takes the value of the
youngest older store to the same address in its own bank, or reads the
D-cache. This is conservative and never needs a replay. The document
instead lets a dependence predictor decide which loads wait. No such
predictor is built here.

**Flow control.** Four entries of every bank are reserved for the oldest
block in flight:

- A request from a younger block that finds only reserved entries free is
  NACKed. The NACK returns to the issuing window entry, which re-issues
  after the next commit.
- A request from the oldest block that finds the bank full raises
  `overflow`. This is the case that calls for a flush and a single-block
  re-run.

Stores write the D-cache only at commit, so a squashed block leaves no
trace.

## What is simplified, and how far to trust it

**One block at a time.** Each logical processor keeps one block in flight.
The next-block prediction is made and checked, and mispredictions are
counted. The predicted block is not started before commit, however. As a
result, end to end, the LSQ never NACKs and never overflows, and nothing is
ever flushed. These parts are still built:

- the window index has its slot bits;
- the LSQ has per-slot store masks;
- NACK and overflow are tested at unit level.

The step still missing is a speculative fetch of the predicted block into
slot 1.

**Instruction subset.** The core runs an integer subset of an EDGE ISA:

- ALU operations;
- `MOVI`/`ADDI` with a signed 9-bit immediate in T1;
- compare-and-predicate tests;
- `LD`/`ST`, with the LSID in XOP and the address as the left operand;
- `WR`, with the register number in T1;
- `BRO`, with the exit number and kind (branch, call, return) in XOP.

The opcode numbers are this design's own. There is no floating-point unit.

**Networks.**

- The operand router is single-channel. It uses XY routing, 4-deep input
  queues and round-robin arbitration.
- The control network is a single arbitrated broadcast bus. It is
  functionally correct but not scalable. The document only names these
  networks.

**Predictor.** The predictor slice has these parts:

- a local/global tournament predictor for the exit;
- an 18-bit history folded to 9 bits;
- a target buffer for branches and calls;
- a return stack whose top two entries travel with NEXT.

It does not track which core predicted a call, so spilled stack entries
stay on that core. It uses about 7 of the 8 Kbit budget.

**Not built.**

- The 2 MB, 15-cycle L2. `tb/tflex_l2_model.sv` stands in for it in the
  testbenches.
- The OS save/flush sequence for recomposition. Writing a configuration
  register invalidates the header cache and restarts the epoch count. It
  does not flush the D-cache; that is left to the OS.

## Files

| file | unit |
|---|---|
| `rtl/tflex_pkg.sv` | types, instruction and message formats, mapping functions |
| `rtl/tflex_chip.sv` | top: 4 x 8 mesh of cores, control and memory networks |
| `rtl/tflex_core.sv` | one core: fetch loader, issue/emit, out-queue, dispatch, ports |
| `rtl/tflex_block_ctrl.sv` | owner-side block control (contains header cache and predictor) |
| `rtl/tflex_inst_window.sv` | 128-entry window, operand buffers, wakeup and select |
| `rtl/tflex_target_xlate.sv` | target -> core / window entry |
| `rtl/tflex_int_alu.sv` | integer ALU |
| `rtl/tflex_regfile.sv`, `rtl/tflex_reg_fwd.sv` | 128 x 64 register file, write-forwarding queue |
| `rtl/tflex_lsq.sv`, `rtl/tflex_dcache.sv` | 40-entry LSQ bank, 8 KB 2-way D-cache bank |
| `rtl/tflex_icache_bank.sv`, `rtl/tflex_header_cache.sv` | 4 KB instruction bank, 4 KB header cache with I-tags |
| `rtl/tflex_nbp.sv` | next-block predictor slice |
| `rtl/tflex_opn_router.sv` | 5-port operand router |
| `rtl/tflex_ctrl_net.sv`, `rtl/tflex_mem_net.sv` | control broadcast bus, memory network |
| `rtl/tflex_cfg_regs.sv`, `rtl/tflex_fifo.sv` | configuration registers, generic FIFO |

The parameter defaults are the design's sizes: 128-entry window, 128
registers, 40/4 LSQ, 8 KB 2-way D-cache, 4 KB I-cache bank, 4 KB header
cache, 64-bit operands, 128-bit memory beats, and a 4 x 8 chip.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. For example, with Verilator 5:

    verilator --binary --timing -Wno-fatal rtl/tflex_pkg.sv rtl/tflex_*.sv \
        tb/tflex_l2_model.sv tb/tb_tflex_chip.sv --top-module tb_tflex_chip
    ./obj_dir/Vtb_tflex_chip            # add +trace to print every bus message

`tb_tflex_chip` runs the full 32-core chip at its default size. Two logical
processors run at once: a 4-core processor (cores 0, 1, 4, 5) and a 1-core
processor (core 2). Both run the same two-block program twice. The first run
misses in the header caches; the second hits. Then all 32 cores are
recomposed into one logical processor, which runs the program a third time.
The program exercises:

- immediates and fan-out;
- cross-core operands and the local bypass;
- a squashed predicate path;
- a store forwarded to a same-block load;
- an L2 load;
- register writes and reads across a block boundary;
- a committed store read back by the next block;
- owner hand-off and halt.

It checks every result register and counts each mechanism. A mechanism that
never happens counts as a failure.

`tb_tflex_core` runs the same program on a single core with its control
output looped back. The unit testbenches check the following:

- **window:** wakeup, predication and NACK;
- **router:** random traffic on a 4 x 8 mesh;
- **LSQ:** load waiting, forwarding, ordered drain, NACK at 36 entries, and
  overflow at 40;
- **D-cache:** random traffic against a shadow memory, with evictions and
  write-backs;
- **header cache:** hits and tag replacement;
- **predictor:** learning a biased and an alternating exit, and a call and
  return through the stack;
- **control and memory networks:** ordering, fairness, back-pressure and
  routing.
