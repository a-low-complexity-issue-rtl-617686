# Low-complexity instruction issue: the First-use and Distance schemes

A conventional out-of-order issue queue compares every produced register tag
against every waiting operand. It then picks among all ready entries. That
compare-and-select loop grows with issue width × window size and limits the
clock. This RTL implements two issue schemes that avoid most or all of that
associative search while still letting instructions issue out of program
order:

* **First-use scheme.** Only the *first* reader of a not-yet-produced value is
  parked, in a table indexed by the physical register it waits for. When the
  register is produced, that entry is read directly by register number; no
  tag search is needed. Instructions with all operands ready go to in-order
  ready queues, one per functional-unit class. Anything else stalls dispatch,
  or goes to a small optional I-buffer.
* **Distance scheme.** Latencies are known at decode (except for loads). So
  the cycle in which an instruction can issue is computed at dispatch, and the
  instruction is written straight into the row for that cycle of a circular
  issue queue. Every cycle, the head row is issued and the head advances. A
  small wait queue holds instructions whose operand times are not yet known,
  which happens behind loads.

Both schemes sit between register renaming and the functional units of an
8-wide-dispatch, 4-wide-issue core with 96 physical registers, up to 64
instructions in flight, 3 ALUs, 1 multiplier/divider and 3 data-cache ports.
The top module `issue_logic_top` places the two schemes side by side. They are
alternatives for the same pipeline slot and share no logic.

## Files

| file | contents |
|---|---|
| `rtl/issue_pkg.sv` | machine sizes, unit classes, the instruction record `instr_t` |
| `rtl/ready_queue.sv` | multi-push, multi-pop in-order FIFO (one per class) |
| `rtl/first_use_table.sv` | First-use table with partner pointers |
| `rtl/ibuffer.sv` | optional I-buffer, out-of-order or in-order |
| `rtl/first_use_issue.sv` | First-use scheme: scoreboard, dispatch steering, issue select |
| `rtl/reg_avail_table.sv` | register-availability table (known bit + cycle) |
| `rtl/wait_queue.sv` | wait queue snooping (register, time) broadcasts |
| `rtl/dist_issue_queue.sv` | circular issue queue, rows × slots, head row issues |
| `rtl/distance_issue.sv` | Distance scheme: timing arithmetic, placement, loads |
| `rtl/issue_logic_top.sv` | both schemes, ports prefixed `fu_` and `ds_` |
| `tb/tb_*.sv` | one self-checking testbench per module, plus drivers and a size sweep |

## The instruction record

Rename delivers groups of up to 8 `instr_t` in program order, slot 0 oldest:

| field | meaning |
|---|---|
| `tag` | 6-bit in-flight identifier (64 in flight) |
| `fu` | unit class: `FU_MEM`, `FU_MUL`, `FU_ALU` (branches count as ALU) |
| `is_load` | load: result time unknown until write-back (Distance only) |
| `src1_v/src1`, `src2_v/src2` | physical source registers, 7 bits each |
| `dst_v/dst` | physical destination register |
| `lat` | execution latency known at decode (Distance only) |

Both schemes report back how many of the offered instructions they accepted
(`disp_cnt`, always a prefix of the group). The rest must be offered again in
the next cycle. Issued instructions appear on `iss_v/iss_i`, with up to 4 per
cycle and never more per class than there are units (3 / 1 / 3).

## First-use scheme (`first_use_issue`)

### Steering at dispatch

A register scoreboard holds one ready bit per physical register. All bits are
ready after reset. A dispatched destination is cleared; a completion
(`wb_v/wb_preg`) sets it. Each dispatched instruction is steered in program
order. Later instructions of the group see the effects of earlier ones:

1. **All sources ready → ready queue** of its class.
2. **Every non-ready source is a first use → First-use table.** A source is a
   first use when that register's table entry is still free. One missing
   register takes one entry. Two missing registers take both entries, which
   point at each other.
3. **Otherwise → I-buffer.** With no I-buffer, or a full one, dispatch stops
   at this instruction until the operand is produced.

A "first use" is the oldest reader *that claimed the table entry*. A reader
that went to the I-buffer does not block the entry for a later, younger
reader. An instruction reading the same missing register in both operands
uses one entry.

### The First-use table and its pointers

This is the part that replaces the wake-up search. Take two loads writing P1
and P2, then `ADD P3 = P1 + P2`, then `ST [P6] = P3`:

```
entry   instruction      pointer
P1      ADD P3,P1,P2     -> P2
P2      ADD P3,P1,P2     -> P1
P3      ST  [P6],P3      NIL
```

The first load to complete (say P1) reads entry P1. The pointer is not NIL,
so the ADD still waits for something. The logic clears the *partner's*
pointer (entry P2 becomes NIL) and frees entry P1. When P2 completes, entry P2
has a NIL pointer, so the ADD is forwarded to the ALU ready queue. When the
ADD's result P3 is signalled, the store is forwarded in the same way. Each
completion is one indexed read plus at most one indexed pointer write.

Up to 4 completions are handled per cycle, in port order. If both registers
of one instruction are produced in the same cycle, the first port clears the
partner pointer and the second port forwards. The instruction therefore
reaches the ready queue exactly once. Completions are applied before the
same cycle's dispatch writes. Dispatch never places an instruction in the
entry of a register produced in that cycle, because it already sees that
register as ready.

### Ready queues

There is one in-order FIFO per class (16 entries each). Each cycle it accepts
up to 4 forwards and 8 dispatches, and can pop up to 3 entries from its head.
Dispatch sends an instruction to a ready queue only if it leaves room for the
4 forwards the table might produce in the same cycle. A forward is therefore
never refused. Otherwise dispatch stalls.

### I-buffer (optional)

* **Out-of-order (`IBUF_OOO=1`, the default, 8 entries).** Each entry keeps
  one ready bit per source and compares every completion against its
  sources. This is the only associative search in the scheme. Any ready
  entry may issue, oldest first.
* **In-order (`IBUF_OOO=0`).** There is no comparison. The oldest entries
  whose sources are ready in the scoreboard are offered as a run, and the
  issue stage takes a prefix of that run. An entry never issues before an
  older one.

### Issue selection

Each cycle:

1. An in-order I-buffer's ready run goes first.
2. Then the classes are served in the order memory, multiply, ALU. Within a
   class, ready out-of-order I-buffer entries (oldest first) come before the
   ready queue's head entries.
3. Stop when the class's units or the 4 issue slots run out.

Timing: a register signalled on `wb_v` in cycle *t* lets its readers issue
from cycle *t+1*. That holds whether they were forwarded from the table, sit
in an I-buffer or are dispatched in cycle *t*. Issue is combinational from the
queue heads. `iss_v` is valid in the cycle the instruction leaves.

## Distance scheme (`distance_issue`)

### Time arithmetic

`now` is a free-running 32-bit cycle counter, and times are compared modulo
2^32. The register-availability table holds, per physical register, a
*known* bit and the first cycle in which a reader may issue.

For an instruction dispatched in cycle `now` whose source times are all
known:

```
MaxSource    = latest availability time of its sources (0 if none)
displacement = max(0, MaxSource - (now + 1))
row          = first row >= displacement with a free slot and a free unit of its class
issue cycle  = now + 1 + row          (the cycle it appears on iss_v)
result time  = now + 1 + row + lat    (written to the table for its destination)
```

The `+1` is needed because issue is registered. The head row, including
anything written into it this cycle, is driven on `iss_v/iss_i` during the
next cycle, and the head then advances. Example at `now = 10`: an ALU
instruction whose sources are ready by cycle 11 gets displacement 0. It is
issued in cycle 11, and its result time is 12. A dependent ALU instruction
in the same dispatch group sees MaxSource 12 and goes to row 1. It is issued
in cycle 12, back to back with its producer.

The issue queue has 4 rows of 4 slots. If the displacement is 4 or more, or
no row from the displacement on has room, the instruction cannot be placed
and dispatch stops there for this cycle. A row holds at most 3 memory, 1
multiply and 3 ALU instructions. An instruction pushed down by a full row
(`ev_conflict`) simply issues later. Its result time already includes that
delay, because the time is computed from the row it actually got.

### Loads and the wait queue

A load's latency is not known: its destination is marked *unknown* at
dispatch. When the cache reports the load's write-back (`ld_wb_v/ld_wb_preg`
in cycle *w*, up to 3 per cycle), three things happen:

* the table records *w*, so readers may issue from *w+1*;
* the pair (register, *w*) is broadcast to the wait queue;
* dispatch in the same cycle already sees the new table entry.

An instruction with an unknown source time goes to the 8-entry wait queue.
Its own destination is set to unknown too, so its dependents also wait. Each
wait-queue entry captures broadcast times for its sources. Once both times
are known, the entry is ready. Up to 2 ready entries (oldest first) move to
the issue queue per cycle, using the same placement rule as dispatch. Their
result times are written to the table and broadcast, which wakes the next
level of dependents. Loads leaving the wait queue do not broadcast; their
write-back does.

Order of work within a cycle: load write-backs, then wait-queue departures,
then the dispatch group. Each step sees the table writes of the earlier ones.
Results of instructions placed directly at dispatch are written to the table
but not broadcast. Only younger instructions can read them, and those read
the table.

`WQ_EN=0` gives the scheme with no associative part at all. An instruction
with an unknown source time stalls dispatch until the load writes back.

## Parameters

| parameter | default | where |
|---|---|---|
| `NUM_PREGS` | 96 | physical registers |
| `DISPATCH_W` / `ISSUE_W` | 8 / 4 | dispatch and issue width |
| `WB_W` | 4 | completions signalled per cycle (First-use) |
| units per class | 3 mem / 1 mul / 3 ALU | `fu_units()` |
| `TAG_W` | 6 | 64 instructions in flight |
| `IBUF_EN`, `IBUF_OOO`, `IBUF_DEPTH` | 1, 1, 8 | I-buffer presence, organisation, size |
| `RQ_DEPTH` | 16 | entries per ready queue |
| `WQ_EN`, `WQ_DEPTH` | 1, 8 | wait queue presence, size |
| `IQ_DEPTH` | 4 | issue-queue rows (slots per row = `ISSUE_W`) |
| `WQ_OUT_W` | 2 | wait-queue departures per cycle |
| `LD_WB_W` | 3 | load write-backs per cycle |
| `TIME_W` | 32 | cycle-number width |

The machine sizes, the 8-entry associative buffers and the 4 × 4 issue queue
are the proposal's. `WB_W`, `RQ_DEPTH`, `WQ_OUT_W` and `TIME_W` are this
design's own choices.

## Departures and own choices

* **Structure choices.** The First-use scoreboard, the ready-queue depth and
  its back-pressure rule, and the issue priority among I-buffer, ready queues
  and classes are filled in here. The proposal gives the three dispatch
  cases, the table with its pointers, and the two I-buffer organisations,
  but not these details.
* **Unit limits in the issue queue.** The Distance issue queue also enforces
  the per-class unit limits within a row. Unit pipelining, divides and
  structural hazards beyond "one instruction per unit per cycle" are not
  modelled.
* **No recovery.** Neither scheme has a branch-misprediction flush or
  recovery port. Instructions leave only by issuing.
* **Section 3.1 variant not built.** The Distance variant that indexes the
  availability table by logical register, so that timing overlaps renaming,
  is not implemented. It depends on the rename map and its recovery.
* **Integer datapath only.** Only the integer side of the machine is built.
  A floating-point side would be a second instance with its own registers
  and units.
* **Memory ordering.** The issue logic does not enforce memory ordering. A
  load issues as soon as its register operands are ready. Waiting for older
  store addresses is left to the load/store unit.
* **Branches.** There is no separate branch class; branches are ALU
  instructions. The "branches first" issue priority is therefore not
  modelled.
* **Reset.** Reset (asynchronous, active low) empties all queues. It marks
  every register ready (First-use) or available since cycle 0 (Distance).
* **Assertions.** Assertions flag queue overflow, writes into an occupied
  First-use entry and grants of non-offered I-buffer entries.

## Verification

Every module has a self-checking testbench. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* **Queue modules.** `tb_ready_queue`, `tb_ibuffer`, `tb_wait_queue`,
  `tb_dist_issue_queue` and `tb_reg_avail_table` compare each module against
  a reference model every cycle under random traffic. They check port
  priorities, full conditions and same-cycle interactions.
* **`tb_issue_pkg`.** Checks the package's machine sizes, unit counts and
  record layout.
* **`tb_first_use_table`.** Starts with the ADD/store example above. It then
  runs random one- and two-register waiters against a pointer-free model
  that counts missing registers per instruction.
* **`tb_first_use_issue` and `tb_distance_issue`.** These drive each scheme
  with a random renamed program over 16 logical registers:
  * ALU latency 1, multiply 3;
  * loads hit (1 cycle) or miss (7 cycles);
  * at most 64 instructions in flight.

  They check that every instruction issues exactly once, never before its
  operands are produced, and within the unit limits. They also require that
  every mechanism occurred: each steering case, two-entry waits, forwards,
  stalls, wait-queue entry and exit, row conflicts and load write-backs.
  They cover the out-of-order, in-order and no-buffer First-use forms, and
  Distance with and without a wait queue.
* **`tb_issue_logic_top`.** Runs 4000 instructions through each scheme of the
  top at its default sizes.
* **`tb_size_sweep`.** Repeats the buffer-size study: 0 to 64 entries for both
  I-buffer organisations and for the wait queue.

Measured IPC on the random programs of `tb_size_sweep` (1500 instructions,
same program within a scheme):

| buffer entries | 0 | 2 | 4 | 8 | 16 | 32 | 64 |
|---|---|---|---|---|---|---|---|
| First-use, out-of-order I-buffer | 2.25 | 2.60 | 2.59 | 2.91 | 3.04 | 3.28 | 3.07 |
| First-use, in-order I-buffer | 2.25 | 2.38 | 2.57 | 2.69 | 2.47 | 2.20 | 2.11 |
| Distance, wait queue | 2.15 | 2.57 | 2.72 | 3.09 | 2.77 | 2.50 | 2.22 |

The published trends show up:

* An in-order I-buffer helps up to about 8 entries and then hurts, because
  everything in it waits for all older entries.
* An 8-entry associative buffer brings both schemes close to each other.

The wait queue losing IPC beyond 8 entries is a property of this
implementation and is not a published result. A large wait queue fills with
long dependence chains that leave at only 2 per cycle and compete with new
dispatches for rows. These programs are synthetic, so the absolute numbers
say nothing about real workloads.

## Simulating

Any testbench runs with plain Verilator 5. For example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/issue_pkg.sv tb/tb_issue_logic_top.sv --top-module tb_issue_logic_top
./obj_dir/Vtb_issue_logic_top
```

Replace the top module name to run another testbench. `tb_issue_logic_top`
uses the top with no parameter overrides. Each testbench finishes in
seconds.
