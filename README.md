# Event-based sampling for a RISC-V core

Standard RISC-V hardware performance counters count events: cycles, retired
instructions, cache misses, branch mispredictions. A count is cumulative,
so it cannot say which instruction, or which program state, caused the
events. Event-based sampling (EBS) fixes this. Every N occurrences of a
chosen event, the hardware records a snapshot of the machine: the PC, the
counter values and a few general-purpose registers. A profiler then reads
the snapshots from memory.

This RTL adds EBS to a RISC-V core's performance monitor without
interrupts and without ever stalling the pipeline. The snapshot is taken in
the very cycle of the event that closes an interval. It is frozen in a
dedicated 14-register *sample register file*. A small state machine then
copies it, one register per cycle, into a *store buffer*. That buffer
writes to memory only when the core's own L1 caches are not using the
memory port. If the memory path is congested, the next sample is delayed.
Under sustained overload, several intervals merge into one sample, and a
status pulse reports each merge. The core never waits.

The design sits around a core rather than inside one. The core pipeline,
its caches and the L1.5/L2 memory system are not part of this code. The
top level, `rvebs_top`, exposes the signals a core provides: event pulses,
the retirement count, the committing PC, register-file ports and a CSR
port. It also exposes the signals of the cache adapter: an "L1 request
queues empty" flag and a write-request port.

## Structure

```
 core events ─► hpm_counters ──cnt_next──► ebs_trigger ──trigger──┐
 commit PC  ─────────────────────────────────────────────────────┐│
 CSR port ──► hpm_counters / ebs_csr (thresholds, maddr, ebscfg) ││
 GPR ports ─► gpr_regfile ── 4 extra read ports (ADDR0..3) ─────┐││
                                                                ▼▼▼
                                                   ebs_sample_regfile (14 x 64b)
                                                                 │ one slot / cycle
                                                                 ▼
                                                   ebs_data_select ── {addr,data} ──►
                                                   ebs_store_buffer ── L1.5 non-cacheable
                                                                       8-byte writes
```

| Module | Role |
|---|---|
| `rvebs_pkg` | Counter index space, sample slot map, CSR addresses, `mhpmebscfg` layout |
| `hpm_counters` | `mcycle`, `minstret`, `mhpmcounter3..8`, `mhpmevent3..8`, `mcountinhibit` |
| `ebs_csr` | The new CSRs: `mhpmthreshold<i>`, `mhpmmaddr`, `mhpmebscfg` |
| `ebs_trigger` | Per-counter offset registers and the trigger decision |
| `gpr_regfile` | Integer register file with four extra read ports for sampling |
| `ebs_sample_regfile` | The 14 registers that freeze one sample |
| `ebs_data_select` | Walks the sample and hands selected words to the buffer |
| `ebs_store_buffer` | FIFO that drains to memory only when the L1 queues are idle |
| `rvebs_top` | Wires everything together |

## When a sample is taken: offsets instead of overflow

Classic sampling preloads a counter with `-N` and interrupts on overflow.
That changes what software reads from the counter. Here the architectural
counters keep counting exactly as the RISC-V specification defines. Instead,
each counter `i` has a hidden `offset[i]` register. It holds the counter
value at the last time counter `i` reached its mark. Counter `i` asks for a
sample when

```
    count_next[i] >= offset[i] + mhpmthreshold[i]     (threshold != 0, EBS enabled)
```

`count_next` is the value the counter will hold after this cycle, including
this cycle's event. The request is therefore raised in the same cycle as the
event that completes the interval. The PC captured with it is the PC of the
instruction that caused the event. The comparison uses `>=` because
`minstret` can advance by two in one cycle.

When the mark is reached, `offset[i]` is loaded with `count_next[i]` at
once, even if the sample cannot be taken yet. The next interval is
therefore measured from the moment the mark was reached. A sample that has
to wait does not shift the intervals after it.

If the sampler is still busy with the previous sample, the trigger waits in
a one-deep pending flag (`sample_pending_o`). It is served in the first
cycle the sampler is free, and that sample records the machine state of
that later cycle.

If another mark is reached while a trigger is already waiting, the two
merge into one sample (`sample_lost_o` pulses). This is how the sample
count falls behind the event count when marks arrive faster than samples
can be stored. Short delays cost nothing: every mark still gets its
sample.

Several counters can have thresholds at once. If two reach their marks in
the same cycle, they share one sample. `sample_src_o` shows which counters
caused the sample, including any waiting trigger folded into it. Offsets reload from the counter
in three cases:
- the counter is written by software;
- its threshold is written;
- EBS is disabled (the offsets then track the counters).

Enabling EBS or reprogramming a threshold therefore always starts a fresh
interval.

## What a sample holds

| Slot | Content |
|---|---|
| 0 | PC of the instruction committing in the trigger cycle (always stored) |
| 1 | `mcycle` |
| 2 | `time` (platform timer input) |
| 3 | `minstret` |
| 4..9 | `mhpmcounter3..8` |
| 10..13 | the GPRs named by `ADDR0..ADDR3` in `mhpmebscfg` |

All 14 registers load together at the trigger edge, whether selected or
not. The sample is therefore consistent to the cycle. The counter values
include the triggering event. When the sample is not delayed, a counter
that advances by one per event therefore reads exactly
`offset + threshold`. The four GPRs come
from four dedicated read ports on the register file. They are addressed
continuously by the `ADDRx` fields, so the sample needs no extra read
cycles.

## Moving a sample to memory

From the cycle after the trigger, `ebs_data_select` visits slot 0, 1, …, 13,
one per cycle. A slot is sent if it is the PC or if its select bit in
`mhpmebscfg` is set. An unselected slot just uses up its cycle. A sent slot
goes to the store buffer as one 8-byte word at address
`mhpmmaddr + maddr_offset`. `maddr_offset` grows by 8 for every word the
buffer accepts. Samples are therefore packed back to back in memory, and
each sample is as long as the number of selected slots.

If the buffer is full, the walk waits on that slot (`sample_stall_o`).
While a walk runs, no new sample can be captured. The only exception is the
cycle in which the last slot completes, which gives a peak rate of one
sample every 14 cycles.

`ebs_store_buffer` is a 4-entry FIFO. Its head word becomes a non-cacheable
8-byte write request (`l15_val_o` with `l15_addr_o`, `l15_data_o`,
`l15_size_o = 3`, `l15_nc_o = 1`). A request is only *started* in a cycle
where `l1_queues_empty_i` is high, so sampling traffic always yields to the
core's own cache traffic. Once started, a request is held with a stable
payload until `l15_ack_i`.

Back-pressure flows from memory back to the trigger:

```
L1 busy → buffer fills → walk stalls → sampler stays busy → trigger pending → sample delayed (or merged)
```

Nothing in this chain reaches the core.

Timing without back-pressure:

| Cycle | What happens |
|---|---|
| t | event; `sample_trigger_o` = 1; sample captured at the edge |
| t+1 … t+14 | walk of slots 0..13, one word per selected slot into the buffer |
| t+14 | `sample_done_o`; a pending trigger may capture in this same cycle |
| from t+1 | words leave the buffer whenever the L1 queues are empty |

## Programming

| CSR | Address | Meaning |
|---|---|---|
| `mcountinhibit` | 0x320 | standard |
| `mhpmevent3..8` | 0x323–0x328 | event line counted by `mhpmcounter3..8` (0 = none) |
| `mcycle`, `minstret`, `mhpmcounter3..8` | 0xB00, 0xB02, 0xB03–0xB08 | standard |
| `mhpmthreshold<i>` | 0x7C0 + i | sampling interval for counter index i (0 = off; i = 1 reads 0) |
| `mhpmmaddr` | 0x7C9 | physical base of the sample area (aligned to 8 bytes); writing it restarts `maddr_offset` at 0 |
| `mhpmebscfg` | 0x7CA | sample contents and enable, below |

`mhpmebscfg` fields:

| Bits | Field |
|---|---|
| `[8:0]` | `cnt_en`: store counter index i (bit i) |
| `[19:16]` | `gpr_en`: store GPR slot j |
| `[24:20]`, `[29:25]`, `[34:30]`, `[39:35]` | `ADDR0..ADDR3`: register numbers of GPR slots 0..3 |
| `[63]` | `en`: global enable |

Reserved bits read as zero.

A typical setup:
1. Select the event in `mhpmevent<k>`.
2. Set `mhpmthreshold<k>`.
3. Write `mhpmmaddr` with the base of a buffer in memory.
4. Write `mhpmebscfg` with `en` and the wanted fields.

The number of bytes written so far is available as `maddr_offset_o` at the
top. No CSR exposes it.

## Top-level interface

| Port | Dir | Meaning |
|---|---|---|
| `event_i[NUM_EVENTS-1:0]` | in | one pulse per event line per cycle |
| `instret_inc_i` | in | instructions retired this cycle (0..NR_COMMIT) |
| `commit_pc_i` | in | PC of the instruction committing this cycle |
| `time_i` | in | platform timer value |
| `csr_addr_i`, `csr_we_i`, `csr_wdata_i`, `csr_rdata_o`, `csr_hit_o` | | CSR access; combinational read, write at the edge |
| `gpr_*` | | the core's register-file ports (2 read, 2 write) |
| `l1_queues_empty_i` | in | the cache adapter's L1 request queues are empty |
| `l15_*` | | write requests to the L1.5 cache and their acknowledge |
| `sample_*`, `sb_*`, `maddr_offset_o` | out | status for observation: trigger, source counters, pending, merged mark, walk busy/stall/done, buffer full/count, pointer |

The parameters are `NUM_EVENTS` (32), `NR_COMMIT` (2), `SB_DEPTH` (4),
`NR_RPORTS` (2) and `NR_WPORTS` (2). The sizes fixed by the sampling scheme
are in `rvebs_pkg`: 6 programmable counters, 4 sampled GPRs and 14 sample
registers.

## What follows the original scheme and what is chosen here

These parts follow the original scheme:
- counting continues unchanged, and triggering uses offset registers, not overflow;
- the three kinds of new CSRs;
- a 14-register sample captured in one cycle;
- four extra register-file read ports;
- a walk of one register per cycle in which the PC is always stored;
- 8-byte words and an address pointer that steps by 8;
- a small store buffer in the cache adapter that writes non-cacheable and only when the L1 request queues are empty;
- samples that are delayed rather than stalling the core.

These are this design's own choices:
- CSR addresses and the `mhpmebscfg` bit layout;
- the slot order, and counting `time` as the ninth counter (this is what
  makes the sample 14 registers);
- `>=` comparison and the offset reload rules on writes and while disabled;
- a one-deep pending trigger into which later marks merge;
- threshold 0 meaning off, and the global enable bit;
- allowing a capture in the last cycle of a walk;
- a store-buffer depth of 4 and the val/ack request handshake;
- reset of everything to zero.

The reference implementation modified a CVA6 core inside an OpenPiton
system. That integration is not reproduced:
- the L1.5 adapter's existing request queues and their arbiter are
  represented only by `l1_queues_empty_i`;
- the OpenPiton message format is replaced by the simple `l15_*` port;
- the supervisor software interface (SBI calls that get and set the events,
  thresholds, address and configuration) is software and is not included.

A sample needs 14 cycles to pass through the walk. Its last word enters
the store buffer in the walk's last cycle and reaches the L1.5 port one
cycle later, at the earliest. From trigger to the last write accepted, an
unobstructed sample therefore takes at least 16 cycles. Sample throughput
is still one per 14 cycles.

The event numbering of `event_i` is arbitrary. Map your core's event
sources onto it.

## Capacity for typical profiling runs

Thresholds, offsets and counters are 64 bits wide. Any sampling interval
from 1 to 2^64−1 works, including the range of 10 to 100 000 used in
typical accuracy studies. `maddr_offset` is 64 bits and never wraps in
practice. The size of the sample area is limited only by the memory
software reserves.

For example, 10^7 retired instructions sampled every 10 000 instructions
give 1000 samples. At the full 14 words per sample, that is 112 000 bytes.

Accuracy is 100 % as long as two conditions hold:
- consecutive marks are, on average, at least 14 cycles apart;
- the L1 queues leave enough idle cycles to drain each sample.

Below that, marks merge and fewer samples are taken.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_rvebs_top \
    -y rtl -y tb +libext+.sv rtl/rvebs_pkg.sv tb/tb_rvebs_top.sv -o sim
./obj_dir/sim
```

| Testbench | Checks |
|---|---|
| `tb_hpm_counters` | counting against a reference, event selection, inhibit, counter writes and write pulses |
| `tb_ebs_csr` | read-back, masking, alignment, write pulses |
| `tb_ebs_trigger` | a reference model of the offset rule, with random busy periods: exact triggers, source masks and offsets, delayed and simultaneous triggers |
| `tb_ebs_sample_regfile` | every slot against the capture-cycle inputs |
| `tb_ebs_data_select` | words in slot order with correct addresses for random configurations, the 14-cycle walk, back-pressure, back-to-back samples, pointer restart |
| `tb_ebs_store_buffer` | FIFO order, no request started while the L1 queues are busy, held requests, full buffer |
| `tb_gpr_regfile` | normal and extra read ports, write priority |
| `tb_rvebs_top` | end to end at the default parameters, described below |
| `tb_accuracy_bench` | sampling accuracy on a benchmark loop nest, described below |

`tb_rvebs_top` acts as the core and the memory system and runs three
phases.

**Phase 1** runs a store loop: four stores, a decrement and a branch, for
10 000 iterations, with a sample every 13 stores. The testbench checks:
- 3076 samples for 40 000 stores, with every word in memory matching its own model;
- each of the four stores owns exactly a quarter of the samples;
- clean walks take 14 cycles.

**Phase 2** runs a loop in which every fourth instruction is a missing
load, while sampling every 16 instructions with all 14 registers. Samples
are delayed and marks merge: about a quarter of the intervals produce a
sample. The testbench models the trigger rule itself and checks every
trigger and merge against that model. Every captured sample still arrives
intact.

**Phase 3** disables sampling and checks that no sample is taken.

The testbench counts every mechanism and fails if one never occurs:
triggers, delayed triggers, merged marks, back-to-back captures, a full
buffer, walk stalls, requests held back by busy L1 queues, pointer restarts
and the disabled mode.

`tb_accuracy_bench` runs a two-level loop nest of 100 × 1000 iterations.
One instruction in R of the inner loop is a load that misses in the L1
cache and keeps the L1 queues busy for a few cycles. Each sample stores the
PC and all nine counters, and every word is checked in memory. Accuracy is
the number of samples a counter triggered divided by
`floor(events / interval)`. The whole run takes about 30 s in Verilator.

| Run | Result |
|---|---|
| R = 20, 40, 60, 80, 100; `minstret` and L1D misses each every 10 000 | 100 % |
| R = 20; L1D misses every 10, 100, 1000 and 100 000 on four more counters at once | 100 % |
| R = 4; `minstret` every 16 (10 × 1000 iterations) | about 38 % |
| R = 20; `minstret` every 10 (10 × 100 iterations) | about 44 % |

The saturated figures depend on the testbench's memory model (3 busy
cycles per miss, a 50 % acknowledge rate) and on storing 10 words per
sample. They show the mechanism, not a property of a particular memory
system.

The assertions in `ebs_data_select` and `ebs_store_buffer` check two
handshake rules:
- a captured sample is never overwritten before its walk ends;
- an offered word or request stays stable until it is accepted.
