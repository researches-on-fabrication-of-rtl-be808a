# Variable-depth pipeline core and a generated heterogeneous cache/bus fabric

This repository holds SystemVerilog for two pieces of a low-energy
heterogeneous multi-core:

1. **The VSP core.** VSP stands for *variable stages pipeline*. It is an
   in-order MIPS R3000-style integer core that changes its pipeline depth
   while running:
   - When the program runs well, it uses a 7-stage **high-speed (HS)**
     pipeline at the full clock.
   - When instruction throughput is low anyway (cache-bound or
     branch-bound phases), it merges neighbouring stages into a 3-stage
     **low-energy (LE)** pipeline running at a quarter of the clock.
   - A tiny hardware monitor decides the switch every cycle. The monitor
     counts retired instructions and branches over the last 32 cycles.
   - Switching costs no cycles: the pipeline is merged only in the shadow of
     a branch misprediction, which flushes the front end anyway.
2. **The FabHetero memory side.** These are the building blocks that a
   multi-core generator puts around its cores:
   - an L1 instruction cache split into two interleaved banks, so that a
     superscalar fetch bundle crossing a line boundary is still read in
     one access;
   - a set-associative, LRU, write-through L1 data cache;
   - a shared bus with round-robin or fixed-priority arbitration, a snoop
     broadcast and wired-OR snoop answers.

The two pieces are independent designs. The top level `vsp_hetero_top`
places them side by side.

## The VSP pipeline

```
HS:  F | D | R | EX1 | EX2 | M | W        (every clock)
LE:  F D R     | EX1 EX2   | M W          (one LE cycle every 4 clocks)
```

- **Branches.** Branches resolve in EX1 and have one delay slot. In HS mode
  a 1K-entry gshare predictor, looked up in D, steers fetch. A wrong
  prediction squashes everything younger than the delay slot.
- **LE mode.** The predictor is frozen in LE mode. There, a branch is
  resolved before the next fetch, so it is never mispredicted.
- **ALU.** The ALU is split over EX1 (low 16 bits and carry) and EX2 (high
  half, compares).
- **Forwarding.** Results are forwarded from EX2, M and W.
- **Interlocks.** HS mode interlocks for one cycle on a consumer right
  behind an ALU producer. Both modes interlock on a load-use pair. In LE
  mode the ALU never interlocks.
- **Clocking.** The design runs on one clock. Quarter-rate operation is
  modelled with two clock enables, one for the front end and one for the
  back end. The same enables also stand for the clock gating of idle
  pipeline registers.

### Changing depth without a penalty

Going deeper (LE → HS) is easy. At an LE cycle boundary, the instructions in
F, EX1 and M simply continue in their HS stages. The pipeline registers in
between are emptied.

Going shallower (HS → LE) is harder. Simply merging the stages would drain
the pipeline, which costs about 7 cycles each time. Instead, the core waits
until two things are true at once:

- the depth controller asks for LE;
- a branch misprediction is detected in EX1.

The front end is being flushed at that moment anyway. The delay slot moves
on to EX1, and the core enters **migration mode** (`MODE_MIG`):

- The front end (F, D and R) is already merged and runs at the LE rate.
- The back end keeps the HS rate and drains.
- After exactly four clocks the first new instruction reaches EX1, the back
  end is empty, and the core is in LE mode.

No cycle is lost. The testbenches check that migration always takes four
clocks. If the delay slot is stalled in R at the misprediction, this design
skips the migration and waits for the next misprediction.

### LDS-cell

Merging stages means two stages' worth of combinational logic sits between
two clock edges. Glitches from the first half would then ripple through the
second half and waste energy.

The EX1/EX2 boundary register is therefore an *LDS-cell* (latch/D-flip-flop
selector). It is a master-slave flip-flop whose master-latch output is also
brought to an output multiplexer:

- **Separate stages:** the cell is an ordinary flip-flop.
- **Merged stages:** the cell is the master latch. The latch is closed
  during the first half of the cycle, so glitches from the first half do
  not reach the second half.
- **Gated cycles:** the cell clock is held high, so the latch also blocks.

`lds_cell` models the gate as an enable. It does not derive a clock net.

### Depth controller (`depth_ctrl`)

The controller has two 32-entry one-bit shift registers:

- one records "an instruction retired in this processor cycle";
- the other records "... and it was a branch".

A running sum of each register gives the recent IPC (out of 32) and the
recent branch count. The three thresholds are compared against these sums:

| mode | request LE when |
|------|-----------------|
| HS   | `ipc_sum <= IPC_HtoL` |
| LE   | not (`ipc_sum > IPC_LtoH` and `br_sum < #BR`) |

Why the branch count matters: in LE mode, branch mispredictions no longer
hurt IPC. A branch-heavy phase would therefore look fast in LE mode and be
sent back to HS mode, where it would be slow again. The branch count keeps
such phases in LE.

- **Reset thresholds.** The reset values are 15/21/6, the "TH1" setting of
  the original design.
- **Changing thresholds.** Software changes the thresholds with MTC0 to
  co-processor registers 22 (`IPC_HtoL`), 23 (`IPC_LtoH`) and 24 (`#BR`).
- **Disabling the controller.** With `ctrl_en` low, the controller is
  stopped and `fixed_le` selects a fixed HS or LE mode. This matches the
  chip pin that clock-gates the controller.

### Instruction set

It implements:

- ALU and immediate instructions;
- immediate and variable shifts (SLLV, SRLV, SRAV);
- LUI;
- LB/LBU/LH/LHU/LW and SB/SH/SW, little-endian;
- the unaligned-word pair LWL/LWR and SWL/SWR;
- all the conditional branches: BEQ, BNE, BLEZ, BGTZ, BLTZ, BGEZ and the linking BLTZAL, BGEZAL;
- J/JAL/JR/JALR;
- MULT/MULTU/DIV/DIVU and MFHI/MFLO;
- MTC0 to the three threshold registers.

The multiply/divide unit takes four clocks (`MDU_LAT`), as the thesis gives
for its four-stage MDU. The result is computed when the instruction is in
EX1 and written to HI/LO `MDU_LAT` clocks later. An MFHI/MFLO waits in R
until then. In LE mode the four clocks fit in one LE cycle, so nothing
waits. Division by zero gives LO = all ones and HI = the dividend; MIPS
leaves that result undefined.

It does not implement:

- SYSCALL and BREAK;
- exceptions and interrupts;
- the rest of the system co-processor.

So compiled C programs that make system calls will not run. The
instruction and data memories are outside the core and must answer in the
same clock. A store drives `dmem_be` with the byte lanes it writes and
repeats a byte or halfword in every lane of `dmem_wdata`.

## FabHetero memory side

### Bus (`fabbus`, `fabbus_arbiter`, `fabbus_pkg`)

- **Widths.** Addresses are 64 bits and data beats are 256 bits.
- **Ports.** There are 1 to 16 masters and 1 to 16 slaves.
- **Handshake.** A master raises `req` and holds it, with a stable payload,
  until a one-clock `ack`. Only one transaction is in flight at a time.
- **Grant.** When the bus is free, the arbiter grants one requester. The
  grant is round robin by default, or fixed priority with master 0 first.
- **Snoop.** In the grant clock the request is broadcast on `snoop` to every
  other master. Their `snoop_hit` answers are ORed and returned to the
  owner as `rsp.shared`.
- **Slaves.** The request goes to the slave selected by the address bits
  above `SLV_LSB`. The slave's `ack` and `rdata` go straight back to the
  owner.
- **Single master.** With one master, no snoop is broadcast.

This request/acknowledge handshake is simpler than the AMBA signalling of
the original bus framework.

### L1 data cache (`fabcache_l1d`)

- **Geometry.** `WAYS` × `SETS` × `LINE_WORDS` words. The default is 4 ×
  256 × 4, which is 16 KB with 16-byte lines. `WAYS = 1` is a direct-mapped
  cache built from the same code.
- **Misses.** Miss handling is blocking. A line is refilled in one bus beat.
- **Replacement.** Each way of a set holds an LRU value:
  - the way just used gets `WAYS-1`;
  - the ways above its old value move down by one;
  - on a miss, the way with value 0 is replaced, but an invalid way is
    used first.
- **Writes.** Writes go through to the bus as one-word strobed writes. A
  write updates the cache on a hit and never allocates a line.
- **Snoops.** A snooped write by another master invalidates the line.
- **Timing.** A read hit is acknowledged in the clock of the request. A
  read miss costs the bus transaction plus one clock.

### L1 instruction cache (`fabcache_l1i`)

- **Lines and banks.** A line is `FETCH_W` words, 4 by default. Even lines
  live in bank 0 and odd lines in bank 1. Each bank is direct mapped with
  `BANK_SETS` lines, 128 by default.
- **Fetch.** A fetch at any word address returns `FETCH_W` consecutive
  instructions. The bundle's two lines are always in different banks, so
  they are read in the same clock.
- **Misses.** The missing line (or each of the two lines) is refilled over
  the bus, and the fetch is retried.
- **Snoops.** The instruction cache does not snoop.

## Top level (`vsp_hetero_top`)

- **VSP core.** Its memory ports and event outputs are brought out.
- **Bus.** A three-master `fabbus` connects:
  - master 0: an uncached port for a core without caches (`x_req`/`x_rsp`);
  - master 1: the instruction cache of one generated core (`f_*` fetch
    port);
  - master 2: the data cache of that core (`d_*` load/store port).
- **Shared memory.** The bus slave port (`mem_req`/`mem_rsp`) leads to
  shared memory.
- **Generated cores.** The cores themselves are produced by a separate
  superscalar generator and are not part of this RTL. Their cache ports
  are the top's ports.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
The testbenches are written for Verilator's two-state simulation. For
example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/vsp_pkg.sv rtl/fabbus_pkg.sv tb/vsp_prog_pkg.sv \
  rtl/lds_cell.sv rtl/gshare_bp.sv rtl/depth_ctrl.sv rtl/vsp_core.sv \
  rtl/fabbus_arbiter.sv rtl/fabbus.sv rtl/fabcache_l1i.sv rtl/fabcache_l1d.sv \
  rtl/vsp_hetero_top.sv tb/tb_bus_mem.sv tb/tb_vsp_hetero_top.sv \
  --top-module tb_vsp_hetero_top -Mdir obj && obj/Vtb_vsp_hetero_top
```

| testbench | what it shows |
|-----------|---------------|
| `tb_depth_ctrl` | FIFO sums, both compare rules, threshold writes and disable, against a queue model |
| `tb_gshare_bp` | index and counter behaviour against a model; trained always-taken and never-taken branches; frozen when disabled |
| `tb_lds_cell` | flip-flop behaviour when separate, latch behaviour and glitch blocking when merged, hold when gated |
| `tb_vsp_core` | runs a test program in fixed HS, fixed LE and controller modes; compares every retired PC, memory and registers with an instruction-level model; checks the 4-clock migration and the LE timing |
| `tb_fabbus_arbiter` | round-robin and fixed-priority grants against a model; fairness |
| `tb_fabbus` | three masters with random traffic; snoop payload, `shared`, owner-only ack, read data against a shadow memory |
| `tb_fabcache_l1d` | hits, misses, LRU evictions, write-through and snoop invalidation against an LRU model |
| `tb_fabcache_l1i` | bundles straddling lines, refill counts and hit latency against a bank model |
| `tb_vsp_mibench` | the four kernels in six configurations each (next section) |
| `tb_vsp_hetero_top` | all of the above together at the default sizes; fails unless every mechanism (misprediction, stall, migration, LE entry, return to HS, cache hits and misses of both caches, snoop invalidation, shared answer, bus contention) happened |

`tb/vsp_prog_pkg.sv` holds a small assembler, the test program and the
reference model. The test program has phases that favour each mode:

- an ALU-dense loop;
- a load-use chain;
- data-dependent branches;
- multiplies and divides whose results are read at once, so MFHI/MFLO wait;
- variable shifts, every compare-with-zero branch and a JALR;
- byte and halfword stores and loads, including negative values;
- an unaligned word at each byte offset, stored with SWR/SWL and loaded
  with LWR/LWL;
- a call and return.

It also writes one threshold with MTC0. `tb/tb_bus_mem.sv` is a
shared-memory model with random latency. A word that was never written
reads as a fixed hash of its address.

## Kernel runs and what they show

`tb_vsp_mibench` runs four small integer kernels on the core, each in six
configurations:

- fixed HS;
- fixed LE;
- the controller with four threshold sets.

The threshold sets are written as IPC_HtoL / IPC_LtoH / #BR:

| set | IPC_HtoL | IPC_LtoH | #BR |
|-----|----------|----------|-----|
| TH0 | 15 | 18 | 6 |
| TH1 | 15 | 21 | 6 |
| TH2 | 18 | 21 | 6 |
| TH3 | 18 | 24 | 6 |

The kernels are bit count, integer square root, quicksort and string
search. They are written by hand in the implemented instruction subset, and
their inputs come from a xorshift generator. Every run is checked against
the instruction-level model and against results computed directly in the
testbench.

Clocks per run, with the share of clocks spent outside HS mode:

| kernel | HS | LE | TH0 | TH1 | TH2 | TH3 |
|--------|----|----|-----|-----|-----|-----|
| bit count | 7,895 | 21,914 | 7,895 (0%) | 7,895 (0%) | 21,204 (97%) | 21,280 (97%) |
| int sqrt | 7,451 | 19,450 | 7,451 (0%) | 7,451 (0%) | 18,661 (96%) | 18,709 (96%) |
| quicksort | 6,952 | 19,462 | 6,952 (0%) | 6,952 (0%) | 9,795 (44%) | 9,953 (46%) |
| string search | 7,064 | 18,926 | 7,064 (0%) | 7,064 (0%) | 13,460 (70%) | 13,516 (70%) |

What the table shows:

- **Ordering.** Raising IPC_HtoL and IPC_LtoH moves more of the run into LE
  mode. This trades time for energy, and the order TH0 → TH3 is monotonic.
- **TH0 and TH1 stay in HS.** These kernels reach an IPC above 15 of 32 in
  HS mode, so those sets never unify the pipeline.
- **Branch-heavy kernels.** Quicksort and string search go back to HS more
  often: their phases alternate between dense and branchy code.
- **LE slowdown.** LE mode costs about 2.7× the clocks here. At a quarter of
  the clock rate, one LE cycle equals four HS cycles. But LE mode has no
  misprediction penalty and no ALU interlock, which wins part of that back.

The testbench requires all of the following:

- every controller run is between the HS and LE times;
- the LE share does not fall from TH0 to TH3;
- at least one migration happens.

## Departures and choices to be aware of

- **Instruction subset.** The core implements the R3000 user-mode integer
  instructions except SYSCALL/BREAK. It
  has no exceptions, so ADD, ADDI and SUB do not trap on overflow (see
  above). Where the ALU is split, the forwarding paths and the
  interlock rules are this design's own.
- **Migration rule.** Migration is skipped when the delay slot is stalled.
  LE → HS happens at an LE cycle boundary.
- **Threshold registers.** Thresholds are 6-bit values in CP0 registers
  22–24. The register numbers are this design's choice.
- **LDS-cells.** Only the EX1/EX2 boundary uses an LDS-cell. The other
  merged boundaries are a register plus a bypass multiplexer, which is
  logically the same.
- **Clocking.** The quarter-rate LE clock and the clock gating are modelled
  as enables on a single clock.
- **Bus.** The bus uses a plain request/acknowledge handshake with one
  outstanding transaction. Slaves are decoded by high address bits.
- **Caches.**
  - Write-through, no write-allocate, blocking, and invalidate on a snooped
    write. Non-blocking and write-back variants are not provided.
  - The data cache associativity (4) and the instruction cache bank size
    are assumed.
  - Fully associative caches and burst refills are not provided.
- **Not built.** There is no L2 cache and no MOESI/MOSI/MEI protocol. These
  options are only listed for the original generator, not described.
- **Reset values.**
  - The depth controller starts with a full IPC history, so the core
    begins in HS mode.
  - The gshare counters start weakly not-taken.
