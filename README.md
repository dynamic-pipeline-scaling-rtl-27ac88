# Dynamic pipeline scaling: an out-of-order back-end that changes its depth

A deeply pipelined processor reaches a high clock frequency, but it pays for the depth in
every cycle. Dependent instructions wait longer for each other, mispredicted paths
are longer, and the pipeline latches switch whether or not useful work goes through
them. When a power manager lowers the clock, a deep pipeline keeps all of these costs
even though the timing no longer requires them. At half the peak frequency, two
adjacent stages fit in one clock period.

Dynamic pipeline scaling (DPS) uses that slack. Every other pipeline latch is built
as a *configurable latch*. It behaves as a normal register in **deep mode**
(14 stages, up to the peak frequency) and becomes transparent in **shallow mode**
(7 stages, at most half the peak frequency). The same logic runs in both modes. In
shallow mode the pairs of stages merge, dependence chains get shorter, and the
speculative tricks that deep mode needs are switched off.

Deep pipelining has three problem areas, and this repository gives synthesizable
SystemVerilog for each of them:

* **Two-cycle register rename** with hazard detection and correction between
  consecutive rename groups.
* **Select-free two-stage issue**, with a speculative wakeup bit (W) and a
  non-speculative selected bit (S). Collisions and pileups are repaired later.
* **Split ALUs with half-word bypassing**, so that a dependent add can follow
  its producer in the next cycle even though each add takes two cycles.

These pieces are wired into an 8-wide integer back-end with a 128-entry reorder
buffer. A small controller picks the mode from the requested clock frequency. The
design also includes the load/store address unit, which is split so that the
cache index is ready one stage before the full address.

The architecture and the sizes follow the 2003 DPS thesis from NC State
(P. Ramrakhyani): 8-wide fetch, issue and retire, a 128-entry reorder buffer, a
1 GHz peak, and shallow mode at or below 500 MHz. The thesis describes mechanisms
rather than RTL. Every microarchitectural detail below that the thesis does not
pin down is a choice made here, and the text says so where it matters.

## Pipeline in the two modes

| shallow | deep      | work                                                   | module          |
|---------|-----------|--------------------------------------------------------|-----------------|
| IF      | IF1 IF2   | fetch, branch prediction (not included)                | –               |
| ID      | ID1 ID2   | decode (not included), rename, insert into queue / ROB | `dps_rename`    |
| IS      | W S       | wakeup, select                                         | `dps_scheduler` |
| RR      | RR1 RR2   | scoreboard check, register file read                   | `dps_scoreboard`, `dps_regfile` |
| EX      | EX1 EX2   | low half-word, high half-word                          | `dps_exec`      |
| A M     | A1 A2/M1 M2 | loads/stores: address, cache access                  | `dps_agen` (cache not included) |
| WB      | WB        | write-back register, register file write              | `dps_exec`, `dps_regfile` |
| RE      | RE        | in-order retirement, free physical registers          | `dps_rob`       |

WB and RE are single stages in both modes here. Splitting them would add latency
but change no result. The top module is `dps_backend`. It takes decoded groups of
up to 8 instructions. The operations are `add sub and or xor sll srl slt`, each
with two register sources and one destination.

## Configurable latches (`dps_cfg_latch`)

Each configurable latch is an edge-triggered register plus an output multiplexer.
The output is `q = transparent ? d : r`. The register `r` keeps loading even while
the latch is transparent, so the mux is the only thing a mode change touches. The
module also exposes the stored value as `stored`. Logic that must look at "what
the latch held last cycle" reads `stored` rather than `q`. In shallow mode that
avoids a combinational loop through the transparent path; the rename hazard
check below is one such case.

A real implementation would use level-sensitive latches and clock gating. This
model is functionally equivalent at the cycle level and stays friendly to
synthesis and to a two-state simulator.

Configurable latches sit in four places:

* between the rename stages;
* between wakeup and select (the request vector);
* between RR1 and RR2;
* between EX1 and EX2.

A fifth one is in the address unit, between A1 and A2.

### Mode switching (`dps_mode_ctrl`)

The frequency request `f_req` arrives in units of 100 MHz. With `F_MAX = 10`,
codes 1–5 select shallow mode and codes 6–10 select deep mode. `dps_en = 0`
forces a rigid deep pipeline.

A change of mode is carried out in four steps:

1. Dispatch stops: `drain` drives `in_ready` low.
2. The controller waits until the back-end reports that it is empty.
3. All latches flip in one cycle.
4. Dispatch resumes.

The clock actually allowed (`f_out`) is held at `F_MAX/2` while the pipeline is
still shallow. So a request for a high frequency never runs shallow logic too fast.
For a processor with a variable supply, the controller also reports the lowest
voltage that carries `f_out` in the current mode (`v_mv`, also on the top). At a
given voltage a shallow stage runs at half the deep clock:

| level | supply | deep    | shallow |
|-------|--------|---------|---------|
| 1     | 0.70 V | 200 MHz | 100 MHz |
| 2     | 0.82 V | 400 MHz | 200 MHz |
| 3     | 0.95 V | 600 MHz | 300 MHz |
| 4     | 1.07 V | 800 MHz | 400 MHz |
| 5     | 1.19 V | 1 GHz   | 500 MHz |

Shallow mode therefore costs voltage at a given frequency. Whether it saves energy
depends on how much wasted switching it removes.

Draining before a switch is this design's choice. It costs a few tens of cycles
per switch, which is negligible at the switching rate of a power manager.

## Two-cycle rename (`dps_rename`)

Single-cycle rename reads the map table for all 16 sources of a group and pops 8
registers from the free list. A dependency check then replaces any source whose
logical register is written by an earlier member of the same group.

Split over two cycles, this gains a new hazard. Stage A (ID1) reads the map table
and the free list. Stage B (ID2) does the in-group dependency check and writes the
map table. A group in stage A therefore reads map entries that the group one cycle
ahead of it, now in stage B, is about to overwrite. Two extra blocks close the gap:

* **Hazard detection (stage A).** Each source's logical register is compared
  with every destination of the group now in stage B. The design takes those
  destinations from the latch's stored side, so the same compare is harmless in
  shallow mode.
* **Hazard correction (stage B).** Where detection fired, the source takes the
  previous group's new physical register from a small "previous group" register
  instead of the stale map value. The youngest matching destination wins.
  In-group matches have priority over cross-group ones.

In shallow mode the A/B latch is transparent and detection is disabled. The
whole group is renamed in one cycle.

Each map entry carries one more bit: whether the register's current producer
makes its low half-word early (see Table 1 below). The scheduler needs that bit
to decide how a consumer is woken.

The free list is a circular FIFO of `NPHYS − 32` registers. The reorder buffer
refills it at retirement. A group is accepted only when 8 registers are free.
Map-table checkpointing for branch recovery is not included, because the back-end
has no branches.

## Select-free issue with W and S bits (`dps_scheduler`)

This is the hardest part of the design.

### Why select-free

Suppose wakeup and select take one cycle each and a consumer may request only
after its producer was *selected*. Then dependent instructions issue at best
every other cycle. The two-cycle ALU gets around that with the half-word bypass,
so issue must keep pace.

The solution is to let an instruction wake its consumers as soon as it
*requests*, before it is known to have won selection. The cost is that sometimes
it did not win.

### State

Each of the `IQ_N` (32) entries holds:

* a valid bit and a physical destination;
* two dependence vectors, stored as two `IQ_N × IQ_N` bit matrices:
  * `dep_w[i][j]`: entry *i* may be woken **speculatively** by producer *j*;
  * `dep_s[i][j]`: entry *i* must wait until producer *j* is actually
    **selected**;
* a **W** bit (woken: it has requested and is waiting for the outcome);
* an **S** bit (selected);
* an age matrix, giving the relative age of any two entries for the oldest-first
  select.

When an instruction is inserted, each source is looked up among the valid
entries' destinations. If a producer is found and is still in the queue, one bit
is set:

* in `dep_w` if that producer makes its low half-word early (the early bit
  comes from the rename map table);
* in `dep_s` otherwise.

A source with no producer in the queue is ready.

### Cycle by cycle, deep mode

1. **Wakeup (W stage).** Entry *i* requests when all of these hold:
   * it is valid, and neither W nor S is set;
   * every `dep_w` producer has W set;
   * every `dep_s` producer has S set.

   Requesting entries set W at the end of the cycle, so their speculative
   consumers can request in the very next cycle.
2. **Select (S stage).** The request vector crosses the configurable latch. An
   entry is granted when fewer than `ISSUE_W` older entries are also requesting.
   Granted entries set S, and the grants are packed onto the issue lanes. Entries
   that requested but were not granted are **collisions**: their W bit is cleared,
   so they request again one cycle later. Their speculative consumers may already
   have requested too.
3. **RR1.** The scoreboard (`dps_scoreboard`, one ready bit per physical register)
   checks that both sources of each granted instruction are really available:
   * **If they are:** the instruction is correctly issued. Its destination is
     marked ready, its entry is freed, and its column is cleared from every
     dependence vector.
   * **If they are not:** the instruction is a **pileup**, an instruction woken
     by a producer that collided. It is dropped from the pipeline and both W and
     S are cleared, so it competes again.

### Shallow mode

Wakeup and select fall in one cycle, because the request latch is transparent.
Only S wakes consumers: entries in both `dep_w` and `dep_s` wait for their
producer's S bit.
There are no pileups. An entry is freed as soon as it is selected.

### What this design chooses

The scheme of the thesis is followed throughout:

* speculative W-driven wakeup for early producers;
* non-speculative S-driven wakeup otherwise;
* W reset on a collision, W and S reset on a pileup;
* oldest-first select;
* a scoreboard check in register read.

This design chooses:

* the queue size;
* the matrix form of the dependence vectors and ages;
* that every lane can execute every operation, so there is no per-unit
  arbitration;
* the exact re-request delay of one cycle after a collision.

## Split ALU and half-word bypass (`dps_exec`)

Each of the 8 lanes is cut at bit 16. EX1 computes the low half-word and the
carry. EX2 adds the high halves with that carry. A configurable latch sits
between them, so in shallow mode one cycle computes the whole word.

**Table 1: which operations can hand on a low half early** (the consumer side is
"yes" for all of them):

| op               | low half at end of EX1? | reason                                     |
|------------------|-------------------------|--------------------------------------------|
| add, sub         | yes                     | carry ripples upward only                  |
| and, or, xor     | yes                     | bitwise                                    |
| sll              | yes                     | low result bits depend only on low source bits |
| srl, slt         | no                      | need the high half (whole word in EX2)     |

### Operand selection

The mux at the EX1 input flops picks each operand from the first of these that
holds its physical register:

1. **Half-word bypass (deep mode only).** The producer is in EX1 this very
   cycle, and must be an early producer. The consumer's low half comes from the
   producer's EX1 output. In the next cycle the consumer needs the *high* half,
   which the producer's EX2 stage has just produced. A second mux, in front of
   the EX1/EX2 latch, replaces the operand's high half with the producer's
   stored EX2 result. The lane index of that producer travels with the
   instruction.
2. **Full-word bypass from EX2.** In shallow mode this is the end of the single
   EX stage.
3. **Full-word bypass from the write-back register.**
4. **The register file value**, read in RR with write-through for same-cycle
   writes.

A dependent add in deep mode thus starts one cycle after its producer, the same
spacing as in shallow mode. A consumer of `srl` or `slt` starts two cycles later.
The scheduler guarantees this: it only wakes a consumer speculatively when the
producer is early, and an assertion checks that no half-word bypass is ever taken
from a late producer.

**Latency.** An instruction leaving register read in cycle *c* writes back in
cycle *c+3* in deep mode and *c+2* in shallow mode.

## Load/store address generation (`dps_agen`)

Addresses are split like the ALU:

* **A1** adds the low half-words of base and offset. That result is the cache
  index, which M1 needs to start the access.
* **A2** runs in parallel with M1. It adds the high halves with the A1 carry to
  form the tag bits, which M2 compares.

In shallow mode the A1/A2 latch is transparent, and index and full address arrive
together in the single M stage. The top exposes this unit on the `ag_*` inputs
and the `dc_*` outputs, where a data cache would connect. The back-end itself has
no memory operations, so the unit runs beside it under the same mode.

## Other blocks

* `dps_regfile`: `NPHYS × 32` physical register file.
  * 16 read ports, 8 write ports, plus one port for the architectural preload in
    the top.
  * Combinational read with write-through.
* `dps_rob`: 128-entry circular reorder buffer.
  * Allocates 8 entries per cycle, completes out of order and retires up to 8 in
    order.
  * At retirement it returns each instruction's *previous* physical destination
    to the free list.
* `dps_pkg`: widths, the mode and operation enums, the early-producer function,
  the split ALU functions shared by `dps_exec` and the testbenches, and the
  table of supply voltages per operating level.

## Dispatch flow control (this design's choice)

`in_ready` drops:

* while a mode switch drains;
* when the free list holds fewer than 8 registers;
* when the issue queue or reorder buffer has fewer than 16 free entries.

A group can still be in the second rename stage when the next one is accepted,
hence the margin of 16.

## Parameters (`dps_backend`)

| parameter | default | origin |
|-----------|---------|--------|
| `WIDTH`   | 8   | fetch/dispatch/retire width of the evaluated processor |
| `ISSUE_W` | 8   | issue width = number of ALU lanes |
| `ROB_N`   | 128 | reorder buffer of the evaluated processor |
| `IQ_N`    | 32  | chosen here |
| `NPHYS`   | 160 | chosen here: 32 architectural + one per ROB entry |
| `F_MAX`   | 10  | 1 GHz peak in 100 MHz units |

## Simulating

Every module lives in `rtl/<name>.sv`. Each has a self-checking testbench in
`tb/tb_<name>.sv` that prints `TB_RESULT checks=N failures=M`. The package must
come first on the command line. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal \
    rtl/dps_pkg.sv $(ls rtl/*.sv | grep -v dps_pkg) tb/tb_dps_backend.sv \
    --top-module tb_dps_backend -Mdir obj_backend
./obj_backend/Vtb_dps_backend
```

Replace `backend` with any other block name to run its unit test.

`tb_dps_backend` runs the top at its default size. It preloads 32 architectural
registers, then dispatches about 4,700 generated instructions in seven phases:

| phase | mode    | program                     |
|-------|---------|-----------------------------|
| 1     | deep    | dependent add chain         |
| 2     | deep    | dependent slt chain         |
| 3     | deep    | random mix                  |
| 4     | shallow | dependent add chain         |
| 5     | shallow | dependent slt chain         |
| 6     | shallow | random mix                  |
| 7     | deep    | random mix, at 800 MHz      |

The testbench compares every retired result with a sequential reference model.
It checks the mode each instruction retired in. For the chains it checks the
write-back spacing: one cycle for adds in both modes, two cycles for deep-mode slt.
Alongside runs a random address stream through the address unit.

The test fails unless each of these mechanisms occurred at least once:

* mode switches in both directions;
* drain;
* rename hazard corrections;
* collisions and pileups;
* speculative wakeups;
* half-word and full-word bypasses.

It runs in well under a second. The unit tests use smaller sizes, for example a
4-wide rename with 64 physical registers and a 16-entry scheduler with 2 lanes,
to reach corner cases more often.

## Size and verification status

Every block passes Verilator lint and elaboration with Yosys and slang. Coarse
Yosys synthesis at the default sizes gives:

| block            | cells  | flip-flop bits | memory bits |
|------------------|--------|----------------|-------------|
| `dps_scheduler`  | 14,654 | 224            | 4,160       |
| `dps_exec`       | 3,375  | 1,248          | 728         |
| `dps_rename`     | 1,272  | 558            | 1,432       |
| `dps_regfile`    | 410    | 0              | 8,192       |
| `dps_rob`        | 329    | 206            | 2,688       |

The scheduler dominates. Its two dependence matrices and the age matrix grow
with the square of the queue size. Synthesis of the whole back-end at full size
takes a long time: a 2-wide build finishes in seconds, a 4-wide one in under a
minute.

Each unit testbench was also run against a copy of its block with one deliberate
bug, for example:

* a dropped carry;
* a missing hazard correction;
* a wakeup on the wrong bit;
* a mode switch that does not wait for the pipeline to empty.

Every such bug was caught.

## Where this departs from the original architecture

* **Front end, memory and long-latency units are not included.** Fetch and branch
  prediction, decode, the caches, the load/store queue, multiply/divide and
  floating point are missing, and so is the address path into a data cache. The
  back-end executes register-register integer ALU operations only.
* **Issue-queue size and physical register count are chosen here.**
* **Dependence vectors carry no function-unit information,** because all lanes
  are identical.
* **Mode switches drain the back-end first.** The original leaves the switch
  procedure open.
* **No branch or exception recovery.** The ROB and rename map are never rolled
  back.
* **Reset** is synchronous and active low.
* **Configurable latches are registers with a bypass mux.** They are not
  level-sensitive latches.
* **The voltage and frequency of each mode are only selected.** The controller
  outputs the frequency the current mode allows and the supply it needs.
  Generating the clock and voltage is left to the surrounding system.
