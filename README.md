# XMT: an explicit multi-threading processor in SystemVerilog

XMT runs programs written in a *spawn/join* style. Serial code runs on one
hardware thread. At a `spawn` instruction, every thread unit on the chip starts
the same block of code (the *spawn block*). Each unit keeps drawing new
virtual threads until none are left, then executes `join`. When every unit
has joined, serial execution resumes. Threads never wait for one another
inside a spawn block. The only thing they share is *prefix-sum*, a
fetch-and-add on a global register. When many threads add to the same
register at the same moment, all of them get their result in constant time.

The hardware is built around keeping that cheap and decentralised:

* Thread units (TCUs) are grouped in clusters. A cluster has shared functional
  units and its own instruction cache and data cache.
* A small central block computes prefix-sums, holds the global registers and
  coordinates spawn and join.
* Traffic between the clusters and the centre is reduced to a few narrow
  broadcast wires. These wires are assumed to take more than one cycle.

By default the design has 32 clusters of 4 TCUs (128 TCUs), 32-bit words and
100-cycle level-2 memory.

## Block map

```
                 +--------------------- xmt_top ----------------------+
                 |  central management                                |
  TCU requests   |   xmt_ps_coord   (prefix-sum groups, bus owner)    |
  (1 per TCU) -->|   xmt_greg_coord (master global registers)         |
  join lines  -->|   xmt_sj_coord   (spawn / join state)              |
  (1 per cluster)|        | broadcast bus: message + 2 bits per TCU    |
                 |   xmt_link (LINK_DELAY) both directions            |
                 |   xmt_cluster x N_CL                               |
                 |     xmt_tcu x N_TCU, xmt_regfile (banked)          |
                 |     xmt_alu x N_ALU, branch (xmt_alu) x N_BR       |
                 |     xmt_muldiv x N_MD, xmt_lsb, xmt_dcache         |
                 |     xmt_icache, xmt_ps_if (global register copy)   |
                 |   xmt_l2_imem, xmt_l2_dmem  (shared, round robin)  |
                 +----------------------------------------------------+
```

`xmt_pkg` holds the shared types: the opcodes, the request and message
structs, and the instruction-encoding helper functions that the testbenches
use to assemble programs.

## Prefix-sum: how one broadcast serves many threads

This is the central mechanism, and the hardest part to follow.

1. A TCU executing `ps`/`psi` sends three things over its own request line:
   the base register number, a one-bit increment and a request flag.
2. The coordinator (`xmt_ps_coord`) keeps one pending slot per TCU.
3. Each cycle it chooses one base register: the one named by the
   lowest-numbered pending TCU. It then serves *every* pending request on that
   base together:
   * the master register advances by the number of 1-increments;
   * the old base value, the register number, a participation bit per TCU and
     an increment bit per TCU go out as a single bus message.
4. The coordinator is pipelined with `PS_LATENCY` (3) cycles, so several groups
   can be in flight.

No per-thread result crosses the chip. Each cluster's interface unit
(`xmt_ps_if`) works out its own TCUs' results from the broadcast bits:

```
result(TCU i) = base + popcount(participate & increment & (bits of TCUs ranked below i))
```

The ranking is static: the lower global TCU number goes first. Every interface
unit also advances its copy of the register by
`popcount(participate & increment)`. The clusters therefore stay in step with
the master copy without receiving the new value.

Increments are one bit: `psi rR, rB, k` uses `k[0]`, and `ps rR, rB` uses bit
0 of `rR`. That is enough to allocate thread IDs and array slots.

## Global registers

The 32 global registers g0–g31 live in the centre (`xmt_greg_coord`). Every
cluster keeps a full copy of them in `xmt_ps_if`, so TCUs read global
registers locally at register-file speed. g0 is always zero.

A TCU that writes a global register sends the write to the centre. The centre
broadcasts the write on the same bus that carries prefix-sum results. The
writing TCU continues once it sees its own write come back.

Because every write is broadcast, no copy is ever stale, and nothing needs to
be invalidated at the end of a spawn. Within a spawn the programming model
already requires each global register to be one of:
* read only;
* owned by a single thread;
* updated only by prefix-sums.

Bus priority is fixed: spawn/join messages first, then one prefix-sum group,
then one global-register write.

## Spawn and join

`xmt_sj_coord` has three states: SERIAL, WAIT and PARALLEL.

1. TCU 0 executes `spawn`. The coordinator puts a SPAWN message with the start
   PC on the bus, and every TCU jumps there.
2. The coordinator then waits `MIN_WAIT` cycles before it looks at the join
   lines. Until then the lines still show the idle state from before the
   spawn. The top sets `MIN_WAIT = PS_LATENCY + 2*LINK_DELAY + 4`.
3. Each cluster's join line is the AND of its TCUs' `joined` signals.
4. When the AND of all join lines is high, the coordinator sends END. TCU 0
   continues after its `spawn`, and every data cache is invalidated.

Side effect: even a one-instruction spawn block costs at least `MIN_WAIT`
cycles plus the link delays.

Thread IDs are handed out in software. Each spawn block starts with
`psi t0, g2, 1` and compares the result with the spawn size in g1:

```
GO:  psi  t0, g2, 1     ; next thread id
     slt  t1, t0, g1
     beq  t1, g0, END   ; no more work: join
     ...                ; body of thread t0
     j    GO
END: join
```

A TCU draws IDs until one is out of range. The counter therefore ends at
N + (number of TCUs).

## Instruction set and encoding

The instruction word is 32 bits.

| Field | Bits |
|---|---|
| opcode | `[31:26]` |
| `rd` | `[25:20]` |
| `rs` | `[19:14]` |
| `rt` | `[13:8]` |
| R-type `funct` | `[5:0]` |
| I-type immediate (signed) | `[13:0]` |

Register numbers 0–31 are the global registers. Numbers 32–63 are the TCU's
private locals t0–t31.

| Format | Instructions | Notes |
|---|---|---|
| R (`op=0`) | add sub and or xor nor slt sltu sll srl mul divu | `rd = rs op rt`; shifts use `rt` |
| I | addi slti andi ori lui | `rd = rs op imm`; andi/ori zero-extend |
| I | lw sw | address `rs + 4*imm`; sw stores `rd` |
| LA | lwa swa | address `rB + 4*rI + 4*c8`. `rd`=data, `rs`=rB, `rt`=rI, `c8`=`[7:0]` |
| I | beq bne | compare `rd` with `rs`; target `pc+4+4*imm` |
| J | j | `{pc[31:28], target26, 00}` |
| XMT | spawn | target `pc+4+4*imm`; only TCU 0 in serial mode |
| XMT | join, halt | |
| XMT | ps, psi | `rd` gets the result; `rs` is the base (a global register) |

Opcodes and function codes are listed in `xmt_pkg.sv`.

Because the immediate is 14 bits, `ori` reaches constants up to 16383. Larger constants need `lui`, which puts the immediate in bits 29:16.

`mul` returns the low 32 bits. `divu` is unsigned, and dividing by zero gives
all ones.

## Cluster and TCU timing

* **TCU** (`xmt_tcu`): one instruction in flight, in four steps: FETCH
  (instruction cache hit), DECODE (operands read, address formed), ISSUE (held
  until a unit is granted) and WAIT (result, write-back, next PC). A branch is
  resolved before the next fetch, which is a stall on every branch.
* **Issue arbitration**: in TCU order. A TCU refused for lack of a free unit
  is counted in `fu_stalls`.
* **ALU and branch results**: registered, so 1 cycle.
* **Multiply/divide** (`xmt_muldiv`): 2-cycle multiply and 40-cycle divide,
  not pipelined. The unit stays busy until it finishes.
* **Load/store buffer** (`xmt_lsb`): four entries, drained in order one at a
  time into the data cache.
* **Data cache** (`xmt_dcache`):
  * 2-way, LRU, 4-word lines, 64 sets;
  * write-through, with no fetch on a write miss;
  * blocking, with one miss outstanding.
* **Instruction cache** (`xmt_icache`):
  * direct mapped, 128 lines of 4 words;
  * one combinational fetch port per TCU;
  * one miss at a time.
* **Level-2 stores** (`xmt_l2_imem`, `xmt_l2_dmem`):
  * grant one cluster request per cycle, round robin;
  * return a line `MEM_LATENCY` cycles later;
  * apply write-through stores at grant;
  * they always hit. They stand for the on-chip level-2 cache together with
    the memory behind it.

## Where this design departs from the XMT description

These are simplifications. None of them changes program results; all of them
affect timing.

* **Words and TCU pipeline**
  * Words are 32 bits; the reference machine uses 64-bit words.
  * The reference TCU is a six-stage single-issue pipeline with a 4-slot
    dispatch buffer. Here each TCU has one instruction in flight.
* **Data path to memory**
  * The data cache has one port and one outstanding miss. The reference has
    four ports and many pending reads (up to 200). The instruction cache also
    has a single outstanding miss.
  * Level-2 memory is modelled as "real" memory: 100 cycles latency and one
    read per cycle. The "perfect" configuration, with 8 reads per cycle, is
    not built.
* **Thread creation**
  * Thread IDs come from the general prefix-sum on g2. The dedicated
    thread-ID prefix-sum unit is not built.
* **Central management**
  * The base value and the result bits go out in one bus message.
  * One prefix-sum base is served per cycle.
  * The interface unit has no request buffer, because each TCU has at most one
    request pending.
* **Own choices**
  * The instruction encoding, the `halt` instruction, `MIN_WAIT` and the
    link delay are this design's own.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end and includes a watchdog.

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_xmt_top \
    rtl/xmt_pkg.sv $(ls rtl/*.sv | grep -v xmt_pkg) tb/tb_xmt_top.sv
./obj_dir/Vtb_xmt_top
```

Use the same command for any block, changing the testbench name.

The two full-processor testbenches run array compaction (spawn, prefix-sum
slot allocation, `lwa`/`swa`), followed by a serial `mul` and `divu`. They
check:
* the compacted array, as a multiset;
* the counters left in the global registers;
* that each mechanism happened at least once:
  * a spawn and its END, sent only after every cluster has joined;
  * a prefix-sum group with several participants;
  * global-register broadcasts;
  * functional-unit contention;
  * multiply/divide;
  * data-cache hits and misses;
  * instruction-cache misses.

| Testbench | Configuration | Problem size | Time |
|---|---|---|---|
| `tb_xmt_top` | 4×4 TCUs, 10-cycle memory | 200 elements | seconds |
| `tb_xmt_top_full` | every parameter at its default: 128 TCUs, 100-cycle memory | 1000 elements | about 3300 cycles; about two minutes to compile, under a second to run |

`tb_xmt_stream` runs a STREAM-style triad `A[i] = B[i] + q*C[i]`, one thread
per element, at 50 and 500 elements on the 16-TCU machine. On that machine
it takes 488 and 4074 cycles.

`tb_xmt_max` computes a tree maximum with one spawn per tree level, at 64 and
512 elements (6 and 9 spawn/join rounds; 1225 and 4088 cycles). Each round
reads data that other clusters wrote in the previous round. The test
therefore also checks that the data caches are invalidated at the end of
every spawn.

To write a program, build the words with `enc_r`, `enc_i`, `enc_la` and
`enc_j` from `xmt_pkg`. Load them through `ld_*` while reset is held. Read
results back through `dbg_*` and `greg_*`.

## Changing the configuration

Everything is a parameter of `xmt_top`:

| Parameter | Meaning |
|---|---|
| `N_CL`, `N_TCU` | machine size: clusters, and TCUs per cluster |
| `LINK_DELAY` | cycles on each cluster–centre wire |
| `PS_LATENCY` | prefix-sum pipeline depth |
| `MEM_LATENCY` | level-2 latency |
| `L2D_WORDS`, `L2I_WORDS` | level-2 sizes |
| `N_ALU`, `N_BR`, `N_MD`, `LSB_DEPTH` | functional-unit counts and load/store buffer depth |
| `IC_LINES`, `DC_SETS` | cache sizes |

The reference study's smaller machines are 8 and 32 TCUs with 2K- and 8K-word
data memories: set `N_CL` to 2 or 8 and `L2D_WORDS` to 2048 or 8192. Its
longer join delays correspond to `LINK_DELAY` of 2 or 8.
