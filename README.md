# Speculative Privacy Tracking for a 2-wide out-of-order RISC-V backend

Speculative execution lets a processor run instructions that may later be
thrown away. If one of those transient instructions changes micro-architectural
state that depends on a secret, for example by loading from a secret-dependent
address, the secret can leak through a side channel even though the
instruction never commits. Speculative Privacy Tracking (SPT) blocks that leak
without delaying everything speculative. It follows which registers may hold
data that has **not yet been revealed** by the non-speculative program (they
are *tainted*). It delays a *transmitter* (an instruction whose execution
exposes one of its operands) only while both of these hold:

* one of the operands it would expose is tainted, and
* the transmitter is still speculative.

Data that the program has already leaked non-speculatively is public, so
exposing it again speculatively costs nothing. SPT therefore works as hard at
*untainting* as at tainting.

This repository holds SystemVerilog for the SPT parts of a BOOM-style 2-wide
out-of-order backend:

* taint storage spread over the rename map table, the issue slots and the
  load/store queues;
* the blocking rules;
* every untaint mechanism;
* the Untaint Broadcast Bus that keeps the distributed taint bits consistent.

The core is **trace-driven**. It takes RISC-V instruction words and, for
memory instructions, their effective addresses. It has no register-file data,
no fetch and no caches. Taint tracking only needs to know which registers an
instruction reads and writes, and when it executes and commits.

## The rules in one page

**Taint is created only at rename.** Each map-table entry (logical to
physical register) carries one taint bit. After reset every mapping is
tainted except integer `x0`. The new mapping of a destination is set as
follows:

1. A load's destination is always tainted. Loads are the only source of
   taint, and there is no taint cache for memory.
2. Any other instruction with a destination is tainted if any register it
   reads is tainted, unless it is *conditionally deterministic* for the
   registers it names. In that case its result is known without knowing the
   operands:
   * `DET_Z`: clean if an operand is `x0` (AND, MUL);
   * `DET_ZI`: clean if `rs1` is `x0` (shifts);
   * `DET_E`: clean if `rs1 == rs2` (XOR).
3. An instruction without a destination creates no taint. A destination of
   `x0` counts as none.

**Blocking.** In an issue slot, a uop is held in the new state `s_wait` when
all three of these hold:

1. it is a transmitter;
2. its taint bits overlap its *transmit mask*, the operands it would expose;
3. it is speculative.

The LSU applies the same test to the address register of loads and stores
before they access memory. Safe uops never enter `s_wait` and pay no latency.

**Speculative or not.** This comes from the ROB's *point of no return*
(PNR). The PNR points at the oldest entry that can still squash younger ones:
in this design, a branch, JALR, load or store that has not completed. If no
entry is unsafe, the PNR points at the tail. An instruction whose ROB index
lies from the head up to and including the PNR is non-speculative
(`spt_pkg::is_nonspec`). Including the PNR entry itself is a deliberate
choice. The unsafe entry at the PNR cannot be squashed by anything older. If
it counted as speculative, a load sitting at the PNR with a tainted address
would wait for itself forever.

**Untainting.** A register becomes untainted in one of five ways.

* *Becoming non-speculative.* A blocked transmitter that reaches the window
  untaints its transmitted operands. Their values are about to be revealed
  anyway.
* *Forward propagation* (issue slot). When every operand a uop reads is
  clean, its destination is clean one cycle later.
* *Backward propagation* (issue slot). When the destination and all other
  operands are clean, the remaining operand is clean one cycle later, but only
  for uops that can be inverted. The `INV_*` class says when:
  * `INV_FUL`: always (ADD, SUB, XOR, ADDI);
  * `INV_ZR2`: if `rs2` is `x0` (register shifts, REM);
  * `INV_ZRX`: if `rs1` or `rs2` is `x0` (OR);
  * `INV_ER1`: if `rs1 == rs2` (AND);
  * `INV_ZIM`: if the immediate is 0 (immediate shifts, ORI);
  * `INV_X`: never.

  Multiplication and division are treated as not invertible.
* *Store-to-load forwarding* (LSU). A load that forwards clean store data has
  a clean destination.
* *The Untaint Broadcast Bus* (UBB) spreads each of the events above to
  every other holder of the same physical register.

## The Untaint Broadcast Bus and the timing of an event

The bus is a set of lanes, each carrying `{valid, reg_id, is_fp}` (see
`spt_pkg::ubb_lane_t`). Every writer owns as many lanes as it issues
instructions per cycle:

* the integer issue unit: 2 lanes;
* the FP issue unit: 1 lane;
* the LSU: 1 lane.

The rename stage never untaints on its own; it only listens. The bus is
combinational. Every listener clears its matching taint bits at the clock edge
that ends the cycle in which the event is on the bus. The rename stage also
bypasses the bus to lookups made in that same cycle.

An issue slot remembers which of its own registers it untainted internally in
a 4-bit *broadcast queue*: bit 0 is the destination, bits 1 to 3 are `rs1` to
`rs3`. It offers the lowest pending bit to its unit's lane arbiter. A bit stays
set until it is granted, which takes longer when older slots keep the lane
busy. A typical chain, one clock per line:

```
cycle 0  lane: p22          slot "p43 <- p22, p5" sees p22 on the bus
cycle 1  slot rs1 clean     forward rule fires (all sources clean)
cycle 2  slot pdst clean    queue = 0001; lane busy with an older slot
cycle 3  lane: p43          queue still 0001 (sent this cycle)
cycle 4                     queue = 0000; map table and all holders of p43 clean
```

`tb_spt_issue_unit` replays exactly this sequence.

## Store-to-load forwarding under SPT

A forward is secure only if every store from the forwarding store (included)
up to the load has an untainted address. Otherwise the fact that it forwarded
would reveal something about a tainted address. `spt_fwd_age_logic` finds the
youngest older store with the same address and, in the same pass, counts the
tainted-address stores in that range. The LSU forwards only when the count is
zero and the store data is available. Until then the load waits. It does not
go to memory instead, and it does not forward with a delayed untaint. When the
store data is clean, the load's destination is clean and the LSU broadcasts it
on its lane.

Loads that go to memory always return tainted data; there is no shadow cache.
A load or store whose address becomes non-speculative while still tainted
untaints the address register and broadcasts it.

Loads are chosen oldest first. A load blocked on a forward waits only on older
stores. Those become non-speculative before it does, so the load queue cannot
deadlock behind a younger blocked load.

## Module map

| module | role |
|---|---|
| `spt_pkg` | sizes, uop and lane structs, DET/INV enums, `is_nonspec` |
| `spt_decode` | RISC-V decode plus transmitter mask and DET/INV classes |
| `spt_rename` | map table with taint bits, free lists, busy table |
| `spt_rob` | 64-entry ROB with head, PNR and tail; in-order commit |
| `spt_issue_slot` | slot state machine (`s_invalid`, `s_valid`, `s_wait`), propagation, broadcast queue |
| `spt_issue_unit` | slot array, dispatch, issue select, lane arbitration |
| `spt_ubb` | lane assembly and decode into per-register untaint vectors |
| `spt_fwd_age_logic` | youngest older matching store and tainted-store count |
| `spt_lsu` | LDQ/STQ with taint, address blocking, secure forwarding, LSU lane |
| `spt_fu_pipe` | fixed-latency execution pipe (helper) |
| `spt_core` | the top: everything above wired into a 2-wide backend |

### Default sizes

From the described configuration, a 2-wide MediumBoom:

* group width 2;
* 64 ROB entries;
* UBB lanes 2 + 1 + 1.

Assumed, following the usual MediumBoom sizes:

* 80 integer and 64 FP physical registers;
* 20 integer and 16 FP issue slots;
* 16 load-queue and 16 store-queue entries.

Latencies are this design's choice: integer 1, FP 4, memory 4 cycles.

### Top-level interface (`spt_core`)

* **Input.** Each cycle, up to two instructions arrive on `in_valid`,
  `in_inst` and `in_addr`. The whole group is accepted when `in_ready` is
  high.
* **Commit.** `commit_valid` reports commits.
* **Observation.** The ROB pointers, the four bus lanes, the number of slots
  in `s_wait`, and one-cycle pulses for LSU events:
  * `ev_addr_blocked`: an address waits on taint;
  * `ev_fwd`: a forward;
  * `ev_fwd_blocked`: a blocked forward;
  * `ev_mem_req`: a memory request.

## What this design adds to or leaves out of the SPT idea

* **Follows the described SPT implementation:**
  * decentralised taint in rename, issue slots and LSU;
  * the three tainting rules and the DET and INV classes;
  * the blocking test with the transmit mask;
  * the PNR window;
  * one-cycle forward and backward propagation;
  * the broadcast queue;
  * the lane structure and per-writer lane counts;
  * the LSU owning a lane;
  * forwarding blocked until it is secure;
  * no shadow cache;
  * the counting age logic instead of an internal store-index bus.
* **Own choices where the description is silent:**
  * which instructions are transmitters beyond loads, stores and branches:
    JALR, integer divide/remainder, FP divide/sqrt;
  * the DET/INV class of instructions not named as examples;
  * bypassing the bus into rename lookups;
  * lowest-index arbitration;
  * oldest-first load selection;
  * the PNR computed by a per-cycle scan over the ROB;
  * the ROB as one flat array rather than two banks;
  * exact-address forwarding match with no byte masks;
  * all queue sizes and latencies.
* **Not modelled:**
  * fetch and branch prediction;
  * mispredict and exception squash: every branch resolves as predicted,
    and the slot `kill` input is tied low;
  * the register-file data path;
  * TLB and caches, including store data written at commit.

  Without squash, the speculation window still exists: transmitters are held
  until the PNR passes older unresolved branches and memory operations. What
  is missing is the wrong path itself.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Plain Verilator works, for example:

```
verilator --binary --timing --assert --top-module tb_spt_core \
    rtl/spt_pkg.sv rtl/*.sv tb/tb_spt_core.sv
./obj_dir/Vtb_spt_core
```

List `rtl/spt_pkg.sv` first. For a single block, give the package, the
block's files and its testbench:

* the LSU also needs `spt_fwd_age_logic.sv`;
* the issue unit also needs `spt_issue_slot.sv`.

What the testbenches cover:

* **`tb_spt_core`** runs at the default sizes with no parameter overrides. It
  feeds 4000 random instructions: ALU ops including deterministic and
  invertible ones, divides, branches, loads and stores on a four-address set,
  and FP add, divide and load. Instructions 1000 to 1199 are FP adds only,
  which fill the 1-wide FP queue and stall dispatch. It then checks:
  * that all of them commit and the core drains;
  * on every issue, the SPT rule: no transmitter issues while speculative with
    a tainted transmitted operand;
  * that no load reaches memory with a tainted speculative address.

  It also counts each mechanism and fails if one never happens. The
  mechanisms are `s_wait` in both units, traffic on every lane group, PNR
  untaint, forward and backward propagation, deterministic results, address
  blocking, forwarding, blocked forwarding, memory requests, dispatch stalls,
  PNR movement and commits. It takes about 2,500 cycles.
* **`tb_spt_gadget`** runs a bounds-check-bypass gadget twice at the default
  sizes. A load reads a value behind an unresolved bounds check, and a second
  load uses that value to form its address. When the value comes from memory
  (tainted), the second load is held until it is non-speculative: it reaches
  memory at cycle 17 after reset. When the same value is a constant, the second
  load goes to memory speculatively at cycle 10, before the bounds check has
  resolved. The test checks both outcomes, and that the first load is never
  delayed, since its address is public.
* **Per-block testbenches**:
  * `tb_spt_issue_slot` and `tb_spt_issue_unit` check the slot rules cycle by
    cycle;
  * `tb_spt_issue_unit` also replays the chain shown above;
  * `tb_spt_lsu` covers blocking, secure and blocked forwarding, memory
    latency and commit;
  * `tb_spt_rob`, `tb_spt_fwd_age_logic` and `tb_spt_ubb` compare against
    reference models in the testbench under random stimulus;
  * `tb_spt_decode` and `tb_spt_rename` check the class tables and the
    tainting rules.

## How far to trust it

`spt_core` carries its own invariants as concurrent assertions:

* every physical register index at dispatch and issue is in range;
* every renamed load destination is tainted;
* a uop is a transmitter exactly when its transmit mask is non-zero;
* the PNR lies between head and tail;
* no transmitter issues while speculative with a tainted transmitted operand.

They run in any simulation built with `--assert`.

The taint rules, the blocking test and the propagation timing are checked
against hand-worked expectations. The full core is checked for the SPT safety
property at every issue under random traffic. Those checks are only as good as
the transmitter and class tables in `spt_decode`, and those tables are partly
this design's own judgement.

The absence of squash is the largest gap. A real core must also clear taint
state, broadcast queues and LSU entries of squashed instructions, and restore
the map table's taint bits along with its mappings.
