# Large-warp GPU core with database-search extensions

A GPU core runs its threads in lock-step groups called warps: all threads of a
warp share one program counter and execute the same instruction on a row of
SIMD lanes. Two kinds of program waste that hardware. When the threads of a
warp take different sides of a branch, the lanes of the inactive threads sit
idle. When every warp waits on DRAM at the same time, all lanes sit idle.
Database searches have both problems. They also have a third: their natural
GPU code needs several instructions to append a warp's matching rows to an
output buffer, or to choose the next node of a search tree.

This core attacks all three problems:

* **Large warps.** The core holds a few big warps (4 warps of 256 threads on
  32 lanes) instead of many small ones. Each cycle it packs the threads of a
  large warp that are still active into a full 32-wide *sub-warp*. After a
  branch splits the threads, the lanes are still kept busy.
* **Two-level fetch scheduling.** Warps are split into fetch groups, and one
  group at a time has priority. The groups therefore reach their long memory
  stalls at different times, and one group computes while another waits.
* **Conditional accumulate and tree traverse.** These two instructions do the
  append and the tree step in hardware, with a shared log-depth prefix-sum
  circuit.
* **Row-buffer locality hints.** A load can carry a hint bit. After a hinted
  load, the DRAM controller keeps the row open for a short while, so the
  dependent request that follows (the next step of the same search) finds it
  still open.

Everything is SystemVerilog in `rtl/`. The top module is `lwm_core`. Every
block has a self-checking testbench in `tb/`.

## Large warps and the active mask

A large warp of K x N threads (8 x 32 by default) has one PC, one divergence
stack and a K-row by N-column active mask. Thread `t` of warp `w` lives in:

* row `r = (t / 32) % 8`
* column (lane) `c = t % 32`

Thread IDs are `w*256 + r*32 + c`.

Each lane has its own register-file bank, indexed by {warp, row, register}.
Lane `c` can therefore serve any row's thread of column `c` in any cycle. What
it cannot do is serve two threads of the same column at once. That restriction
is the packing rule:

**Sub-warp packing (`subwarp_former`).** When an instruction is fetched, its
warp's mask is copied into the former. Each cycle, every column that still has
threads left contributes its *lowest* remaining row. The result is one sub-warp
with at most one thread per lane, each lane carrying its own row number. Fetch
is stalled while the former is busy.

Example: a mask whose columns hold rows {0,1,6,7}, {0,2,5}, {2,3,4,7} and
{1,2,4,5} is issued in four cycles:

| Cycle | Rows taken (columns 0..3) |
|---|---|
| 1 | 0 0 2 1 |
| 2 | 1 2 3 2 |
| 3 | 6 5 4 4 |
| 4 | 7 - 7 5 |

A fully populated mask gives exactly K sub-warps.

The former has two other modes:

* **Row mode.** Used for loads, conditional accumulate and tree traverse. One
  whole row goes out per cycle. This keeps the threads of a row together, so a
  coalesced load stays one line and the database instructions see the real
  32-thread group.
* **Single mode.** Used for jumps and exits. One sub-warp with no lanes is
  enough to change the PC.

## Issuing early without breaking dependences

If the warp had to wait for all K sub-warps before the next instruction could
be fetched, large warps would lose most of their advantage. Two rules solve
this.

**Re-fetch after the first sub-warp.** For ordinary instructions, the warp
becomes ready again as soon as its first sub-warp writes back. The PC moves on
to PC+1.

Branches, jumps, exits and loads wait until all of their sub-warps are done:

* A branch needs every thread's outcome before the new mask is known.
* A load needs all of its data back. This is the long-latency stall that the
  fetch scheduler sees.

**Per-thread dependency bits (`thread_scoreboard`).** There is one bit per
thread (1024 in all).

* The bit is set when the thread is packed into a sub-warp.
* It is cleared when that sub-warp writes back. For a load, it is cleared when
  the row's data returns.

A thread whose bit is still set is not packed into the next instruction's
sub-warps:

* In the normal (packing) mode, its column offers its next free row instead.
* In row mode, the row waits.

The next instruction can therefore start on threads that are finished, while
the others are still in flight.

The back end after the former has three stages:

1. **Register read.** Each lane reads two operands and the thread's predicate
   bit from its bank, at the thread's row.
2. **Execute.** Lane ALUs; the conditional-accumulate / tree-traverse unit;
   the load request to the memory controller.
3. **Writeback.** Registers, predicates and scratchpad are written, the
   dependency bits are cleared, and branch outcomes are gathered.

## Branch divergence

Each thread has a predicate bit, written by `SETLT` and `SETGT`. A branch is
taken by the threads whose predicate is set.

While the branch's sub-warps go by, the outcomes of their threads are
collected in a temporary taken mask and a not-taken mask for the warp
(`branch_mask_buf`). When the last sub-warp has written back, the warp is
resolved:

* **All threads go the same way.** Only the PC changes, to the target or to
  PC+1.
* **Threads split.** The warp continues at the target with the taken mask.
  Two entries are pushed on its divergence stack (`div_stack`), each holding a
  reconvergence PC, a mask and an execute PC:
  1. A *join* entry: the reconvergence PC, the mask from before the branch,
     and the reconvergence PC again as its execute PC.
  2. A *divergent* entry: the reconvergence PC, the not-taken mask, and PC+1
     as its execute PC.

  The reconvergence PC is given by the branch instruction itself (`rpc`
  field).

  Two entries are left out when they are not needed:
  * The join entry is skipped when the top entry already reconverges at the
    same PC. That entry's mask covers this one.
  * The divergent entry is skipped when the not-taken path starts at the
    reconvergence PC, as when threads leave a loop.

  So a loop whose threads leave at different iterations uses one stack entry,
  however many times its backward branch diverges.

Whenever a warp's PC equals the reconvergence PC on top of its stack, the stack
is popped before the next fetch, and PC and mask are taken from the entry:

* The first pop sends the warp down the not-taken path.
* The second pop restores the full mask at the join point.

Stacks are 16 entries deep.

## Two-level round-robin fetch scheduling

`two_level_sched` groups the W warps into fetch groups of FG warps. The
default FG is 1 large warp, giving 4 groups.

**Choosing a warp.** The prioritised group is searched round-robin first. The
other groups are then searched in order after it.

**Moving priority.** Priority moves to the next group in either of two cases:

* Every warp of the current group is stalled on a long-latency operation (a
  load waiting for DRAM, or an exited warp).
* The group has been prioritised for TIMEOUT fetches (32768 by default).

The timeout matters when a group of one large warp never stalls on memory but
keeps branching. Without it, that group would keep priority forever.

## Conditional accumulate and tree traverse

Both instructions run on one 32-thread row at a time, using row-mode
sub-warps. Both start from a prefix sum of the row's predicate bits
(`prefix_sum`):

* log2(N) levels of adders.
* At level d, lane i adds the value of lane i - 2^d.
* Each level's adders are one bit wider than the previous level's.
* The output is 6 bits wide, so that 32 true predicates can be counted.

**`CACC rd, rs1, rs2` (conditional accumulate).** Every thread whose predicate
is true writes its `rs2` into the scratchpad, so that the writes form one
contiguous block. The block starts at the row's base address: `rs1` of the
lowest active lane.

* A thread's address is the base plus its *exclusive* prefix sum shifted left
  by the element size (4 bytes here). The exclusive sum is the inclusive sum
  minus the thread's own bit.
* The number of elements written (the full sum) goes to `rd` of every thread
  of the row.
* A program can then advance its output pointer with an add.

This replaces the usual sequence: ballot, population count, masked count,
branch, store.

**`TTRAV rd, rs1, rs2` (tree traverse).** It computes
`rd = base + (popcount(predicates) << log2(node size))`, where base is `rs1`
and node size is `rs2` (a power of two), both taken from the lowest active
lane.

With sorted keys in a tree node and predicates `key > node_key[lane]`, this is
the address of the child to visit next. That gives one instruction per level
of a P-ary search.

The output side is `scratchpad`:

* 32KB, split into 32 banks, one per lane.
* Word-interleaved, so that contiguous writes never collide.
* On a bank conflict the lowest lane wins.
* Word reads are available to the host through `spm_*`.

## DRAM scheduling with row-buffer locality hints

`mem_ctrl_rbh` is an open-row controller for 8 banks with first-ready,
first-come-first-serve (FR-FCFS) scheduling.

**Queue and issue.** Requests wait in arrival order. Each cycle at most one
request issues:

1. The oldest request that hits the open row of an idle bank.
2. Failing that, the oldest request to an idle bank.

**Timing.** A row hit keeps its bank busy for T_HIT = 100 cycles. A row
conflict (or an access to a closed bank) keeps it busy for T_CONF = 300
cycles. Bandwidth limits and pipelining of hits are not modelled.

**Hints.** When a request with the hint bit completes, its bank is *held*:

* Only row hits may issue to the bank.
* The hold lasts up to HOLD = T_CONF - T_HIT = 200 cycles.
* A hit ends the hold early.
* When the time runs out, conflicting requests go ahead.

Waiting longer than HOLD costs more than the conflict it tries to avoid, so
HOLD is the break-even point.

**Address map.** Line offset [6:0], column [11:7], bank [14:12], row [31:15].
A 4KB block aligned to 4KB is one DRAM row of one bank.

**Loads.** A load fetches one 128-byte line per row, at the address held by
the lowest active lane. Lane `c` receives word `c`. The request tag is
{warp, row}.

## Instruction set

The instruction set is small and exists to drive the mechanisms above. The
decoded instruction (`gpu_pkg::inst_t`) has these fields:

`{op, rd, rs1, rs2, imm[15:0], target, rpc, hint}`

There are 16 registers per thread.

| op | effect per active thread |
|---|---|
| `NOP` | none |
| `ADD rd, rs1, rs2` | `rd = rs1 + rs2` |
| `ADDI rd, rs1, imm` | `rd = rs1 + sext(imm)` |
| `LI rd, imm` | `rd = zext(imm)` |
| `TID rd` | `rd = thread ID` |
| `SETLT rs1, rs2` | `pred = rs1 < rs2` (unsigned) |
| `SETGT rs1, rs2` | `pred = rs1 > rs2` (unsigned) |
| `BRA target, rpc` | taken where `pred`; reconverge at `rpc` |
| `JMP target` | uniform jump |
| `LD rd, rs1, hint` | row gets the line at `rs1` of its lowest active lane |
| `CACC rd, rs1, rs2` | conditional accumulate (see above) |
| `TTRAV rd, rs1, rs2` | tree traverse (see above) |
| `EXIT` | warp finishes |

## Interface of `lwm_core`

| Port | Use |
|---|---|
| `launch_i`, `launch_pc_i` | Start all warps at a PC with all threads active. |
| `fetch_valid_o`, `fetch_warp_o`, `fetch_pc_o` | Instruction fetch. |
| `inst_i` | The decoded instruction for the fetch PC, in the same cycle. The instruction cache and decoder are outside the core. |
| `dram_rd_o`, `dram_addr_o`, `dram_rdata_i` | Line read. Data comes back combinationally in the same cycle. The DRAM latency is modelled inside the controller. |
| `spm_re_i`, `spm_raddr_i`, `spm_rdata_o` | Scratchpad read, one cycle of latency. |
| `done_o` | All warps have exited and the pipeline has drained. |
| `n_*_o` | Event counters: fetches, sub-warps, thread-instructions, fetch stalls, interlocks, divergences, stack pops, single and row sub-warps, group switches and timeouts, conditional accumulates, tree traverses, row hits and conflicts, holds begun, ended by a hit, and expired. |

## Modules

| File | Contents |
|---|---|
| `gpu_pkg.sv` | Opcodes, instruction struct, sub-warp modes. |
| `lwm_core.sv` | Top: warp table, scheduling, resolution, pipeline. |
| `subwarp_former.sv` | Sub-warp packing. |
| `thread_scoreboard.sv` | Per-thread dependency bits. |
| `banked_rf.sv` | Per-lane register banks. |
| `div_stack.sv` | Divergence stack. |
| `branch_mask_buf.sv` | Taken / not-taken masks. |
| `two_level_sched.sv` | Fetch scheduler. |
| `lane_alu.sv` | Lane ALU. |
| `prefix_sum.sv` | Predicate scan. |
| `cond_acc_unit.sv` | Conditional accumulate / tree traverse. |
| `scratchpad.sv` | Banked scratchpad. |
| `mem_ctrl_rbh.sv` | FR-FCFS controller with hints. |

The default parameters of `lwm_core`:

| Parameter | Default | Meaning |
|---|---|---|
| N | 32 | lanes |
| K | 8 | rows per large warp |
| W | 4 | large warps |
| R | 16 | registers per thread, so a 64KB register file |
| FG | 1 | warps per fetch group |
| TIMEOUT | 32768 | fetches before a forced group switch |
| STACK | 16 | divergence stack depth |
| SPM_BYTES | 32768 | scratchpad size |
| NBANK | 8 | DRAM banks |
| T_HIT | 100 | row-hit latency in cycles |
| T_CONF | 300 | row-conflict latency in cycles |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself. A
watchdog counts a failure if the run hangs. Build and run one with plain
Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv -Irtl \
      --top-module tb_lwm_core rtl/gpu_pkg.sv tb/tb_lwm_core.sv
    ./obj_dir/Vtb_lwm_core

Every block has its own `tb_<module>`. The core-level testbenches are:

* **`tb_lwm_core`** (TIMEOUT reduced to 8).
  * A 26-instruction kernel runs on all 1024 threads. It loads data, branches
    on it (if/else with reconvergence), gathers both paths with `CACC`, uses
    `TTRAV` to form a dependent load address, and accumulates that load's data.
  * Every scratchpad word is recomputed.
  * It checks that each mechanism occurred: divergence, pops, interlocks, fetch
    stalls, single and row sub-warps, group switches and timeouts, row hits,
    conflicts, holds, held-row hits and expired holds.
* **`tb_lwm_core_full`.** The same kernel with every parameter at its default.
* **`tb_lwm_scan`** (defaults). A full table scan of 8192 values with a
  counted loop and `CACC`, at selectivities 1/2, 1/8 and 1/1024. Each row's
  output area is 1KB of scratchpad.
* **`tb_lwm_loop`** (defaults). A loop that every thread leaves after its own
  trip count (1 to 20). It checks the sums, the divergence count, and that
  each warp needs exactly one reconvergence pop.
* **`tb_lwm_index`** (defaults). 32 concurrent two-step 31-ary searches, each
  inside one 4KB DRAM row holding 960 keys. They run with and without the hint
  bit, and the found positions are checked. The run prints cycle counts and
  hold statistics.

## Where this departs from the architecture it follows, and how far to trust it

**Tested and believed faithful:**

* the large-warp mask layout and lowest-row-per-column packing
* per-lane register banks
* per-thread interlock bits
* the re-fetch rule
* row and single sub-warps
* the taken / not-taken buffers and the two-entry push on divergence
* two-level round-robin with timeout
* the prefix-sum hardware, `CACC` address generation and `TTRAV`
* FR-FCFS with a hold of T_CONF - T_HIT after a hinted request

Each block's testbench was also run against a deliberately broken copy of the
block and reported failures.

**This design's own choices:**

* **Instruction set and encoding.** The architecture is defined on top of an
  existing instruction set. Here a minimal one stands in for it.
* **Three back-end stages** (read, execute, writeback) after fetch and
  sub-warp formation. The reference pipeline is longer; latency differs, not
  behaviour.
* **Blocking loads.** A load blocks its warp until the data of all its rows
  has returned. So a search row's second, dependent request goes out only when
  the slowest row of its warp is served. In `tb_lwm_index` most holds expire
  for this reason, and the hint gains only a few percent.
* **Per-row instructions.** `CACC` and `TTRAV` act on each 32-thread row
  separately. They are defined for a 32-thread warp.
* **Simplified loads.** Loads are simplified to one line per row at the lowest
  active lane's address. There is no data cache and no L2.
* **Scratchpad only.** `CACC` writes only the scratchpad, not global memory.
  There are no store instructions, so outputs larger than 32KB must be
  collected by the host between kernels.
* **Memory controller simplifications.** Queue depth is W*K, one slot per
  row. One request issues per cycle and one response returns per cycle. The
  address map is this design's. Bandwidth (32 GB/s) is not modelled.
* **Scratchpad size.** 32KB, the size used for the database configuration. A
  general-purpose configuration would use 128KB; set `SPM_BYTES`.
* **Divergence stack depth (16).** The stack has an overflow assertion but no
  spill.

**Not built.** The instruction cache and decoder, the data cache and L2, and
the DRAM devices. In the testbenches, the DRAM is a behavioural function of
the line address.

**Synthesis.** Register banks and scratchpad banks are written as one array per
bank, so synthesis tools see 32 small memories instead of one wide array with
many ports. Generic yosys synthesis of the full-size core (before technology
mapping) gives about 7,700 logic cells, 13,100 flip-flop bits and 805 kbit of
memory:

* 512 kbit of registers
* 256 kbit of scratchpad
* the divergence stacks

The 1024 dependency bits and the 2 x 256-bit branch buffers per warp are flip-flops.
