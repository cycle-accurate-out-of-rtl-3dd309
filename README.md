# A WIDTH-wide out-of-order scheduling pipeline in SystemVerilog

This is synthesizable RTL for the scheduling core of a superscalar out-of-order
processor. It models timing only. Instructions come from a trace: each has a
PC, an op type and up to three register specifiers. The pipeline decides, cycle
by cycle, when each instruction is renamed, issued, finished and retired. No
register values are computed. Branch prediction is assumed perfect and memory
is not modelled, so there are no caches, TLBs or load/store queue. What the
pipeline produces is a cycle-exact retirement stream, and from that the IPC.

The design follows a published description of a cycle-accurate C++ simulator.
That simulator is a nine-stage pipeline with a rename map table, a reorder
buffer and an issue queue, using oldest-first issue and WIDTH pipelined function
units. Its main idea is a cheap form of register renaming. **The index of an
instruction's reorder-buffer (ROB) entry is the name of its result.** There is
no separate physical register file and no free list. Allocating a ROB entry
also allocates the physical register, and retiring the entry frees it.

## The pipeline

```
 trace ──► Fetch ─DE─► Decode ─RN─► Rename ─RR─► RegRead ─DI─► Dispatch ─IQ─► Issue
                                     │  ▲                                       │
                               RMT (67 entries)                                 ▼
                                     ▲                               Execute (WIDTH FUs,
                                     │                                1/2/5-cycle timers)
   retired ◄── Retire ◄─ROB─ Writeback ◄─WB────────────────────────────────────┘
                                                  wakeup: Execute ──► IQ, DI, RR
```

The pipeline registers have these sizes:

- DE, RN, RR and DI each hold one bundle of up to WIDTH instructions.
- The issue queue (IQ) holds IQ_SIZE instructions.
- The execute list and the writeback register (WB) have WIDTH×5 places, one per
  function-unit sub-stage.
- The ROB holds ROB_SIZE instructions.

| Parameter | Default | Meaning |
|---|---|---|
| `WIDTH` | 8 | instructions per stage per cycle; also the number of function units |
| `IQ_SIZE` | 128 | issue-queue entries |
| `ROB_SIZE` | 512 | ROB entries, and so the number of physical register names (at most 512) |

The simulator was studied at WIDTH 1, 2, 4 and 8, with IQ_SIZE from 8 to 256
and ROB_SIZE from 32 to 512. The defaults are the widest machine studied: ROB
512, with the issue-queue size (128) found to be enough for WIDTH 8. Any other
point in those ranges is a parameter setting of the same RTL.

Op types 0, 1 and 2 execute in 1, 2 and 5 cycles; op type 3 is treated as 2.
There are 67 architectural registers, r0 to r66. Tags are 9 bits, and sequence
numbers and PCs are 32 bits.

## One cycle, and what each stage sees of the others

This is the part that needs the most care. The software model updates its
pipeline once per cycle by calling the stages in reverse order: Retire,
Writeback, Execute, Issue, Dispatch, RegRead, Rename, Decode, Fetch. Each stage
therefore sees the pipeline as the *older* stages have already left it in the
same cycle. In the RTL every register is updated at the clock edge, but the
effects that the reverse order makes visible are forwarded combinationally.
This reproduces the software model's timing exactly:

- **Backpressure.** A stage moves its bundle on when the next register is empty
  *or is being emptied in this cycle*. Each stage takes a `*_free` signal from
  the stage after it and returns its own. The result is one combinational ready
  chain from the IQ back to the trace port, so a stream of bundles advances one
  stage per clock. Bundles are never split.
- **Rename** needs room in the ROB for the whole bundle. Entries that Retire
  frees in the same cycle count as room (`rob_free = ROB_SIZE − count +
  retire_n`). Rename reads the RMT after this cycle's retire invalidations.
- **Dispatch** needs room in the IQ for the whole bundle. Entries that Issue
  removes in the same cycle count as room.
- **Issue** sees the wakeups from instructions that finish Execute in the same
  cycle. A consumer of an op-type-0 producer therefore issues in the cycle right
  after it: back-to-back issue.
- **RegRead** sees the ROB ready bits including the marks Writeback makes in the
  same cycle (`rdy_now = rdy | set_rdy`).
- **Retire** sees only ready bits already in the register, because it acts
  before Writeback.

Together these fix the latency of a lone instruction. If it is fetched in
cycle 0, it is renamed in cycle 2, issues in cycle 5 and finishes Execute in
cycle 5 + latency. It is written back one cycle later and retires the cycle
after that: cycle 8 for op type 0, cycle 12 for op type 2. Independent
instructions stream at WIDTH per cycle.

## Renaming with ROB tags

The rename map table (`rmt`) holds, for each architectural register, a valid
bit and the tag of its youngest in-flight producer. Rename handles a whole
bundle at once. Slot k receives ROB entry `tail + k`, modulo ROB_SIZE, which is
also its destination tag. Each source is renamed as follows:

- If an older slot of the same bundle writes the register, the source waits on
  the youngest such slot.
- Otherwise, if the RMT holds a valid entry for the register, the source waits
  on that tag.
- Otherwise the source is ready, because its value is in the architectural
  file.

Sources are renamed before the destination, so an instruction that reads and
writes the same register waits on the older producer. The RMT writes are
applied in slot order, so the youngest writer of a register wins.

When an instruction retires, its RMT entry may only be cleared if the entry
still points at *this* ROB entry. Otherwise a younger producer of the same
register has remapped it, and that mapping must survive. Retire therefore sends
the RMT a request holding both the register and the retiring tag. The RMT
compares the tags before it clears the entry: this is the stale-rename guard.
If Rename writes a register in the cycle in which its old mapping is
invalidated, the write wins.

## Wakeup in three places, and oldest-first select

An instruction finishing Execute drives its tag on the `wake` bus in that
cycle. There is one bus entry per function-unit sub-stage, WIDTH×5 entries in
all. Three places listen:

1. the IQ;
2. the DI bundle, which has been through RegRead but is not yet in the IQ;
3. the RR bundle, which has been renamed but not yet read.

All three are needed. A consumer renamed just before its producer finishes sits
in RR or DI when the only wakeup fires. If only the IQ listened, the consumer
would reach the IQ with a stale not-ready bit and wait forever. A consumer still
in RN at that moment is covered in another way. When it reaches RegRead, it
checks the ROB ready bit, which Writeback has set by then. The woken ready bits
are kept while a bundle waits in RR or DI. The listeners turn the bus into one
bit per tag before matching sources against it.

The IQ stays contiguous from entry 0. Dispatch appends behind the last entry,
and Issue removes entries by sliding the younger ones down. Entry order is
therefore program order. The software model finds the lowest sequence number
among ready entries, WIDTH times in a row. The RTL instead takes the first
WIDTH ready entries by position, which picks the same instructions. The j-th
selected instruction goes to function unit j.

## Execute, Writeback, Retire

- **Execute.** Each function unit is a chain of five slots. An instruction
  enters slot 0 with its countdown set to its latency (1, 2 or 5). It moves one
  slot per cycle and completes in the cycle in which its countdown reads 1.
- **Writeback.** WB is loaded every cycle with the completed tags. Next cycle
  they are decoded into a ROB_SIZE-bit mask that sets the ROB ready bits.
- **Retire.** Up to WIDTH consecutive ready entries retire from the ROB head
  per cycle. They are reported on `retired` in program order, each with its
  sequence number and PC.

## Top-level interface (`ooo_top`)

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset that empties everything |
| `trace_valid[WIDTH]` | in | trace slots offered this cycle, filled from slot 0 without gaps |
| `trace_in[WIDTH]` | in | `trace_instr_t`: `pc`, `op`, `dst`, `src1`, `src2` (each register has a valid bit, which is 0 for "none") |
| `trace_ready` | out | the offered bundle is taken at the next edge |
| `retired[WIDTH]` | out | instructions retiring this cycle (`valid`, `seq`, `pc`) |
| `cycle_count`, `retired_count` | out | 64-bit counters since reset; IPC = retired / cycles |
| `idle` | out | no instruction in flight |

Instructions are numbered from 0 in fetch order after reset. The shared types
are in `rtl/ooo_pkg.sv`.

## Files

| File | Block |
|---|---|
| `rtl/ooo_pkg.sv` | types, widths, `op_latency`, modular ROB index addition |
| `rtl/fetch_stage.sv` | Fetch: trace handshake, sequence numbers |
| `rtl/decode_stage.sv` | DE register, Decode |
| `rtl/rename_stage.sv` | RN register, Rename (in-bundle dependences, ROB allocation) |
| `rtl/rmt.sv` | Rename Map Table with guarded invalidation |
| `rtl/regread_stage.sv` | RR register, RegRead (ROB check, wakeup) |
| `rtl/dispatch_stage.sv` | DI register, Dispatch (IQ-room check, wakeup) |
| `rtl/issue_queue.sv` | IQ: wakeup, oldest-first select, compaction |
| `rtl/execute_unit.sv` | WIDTH pipelined universal function units |
| `rtl/writeback_stage.sv` | WB register, ROB ready marks |
| `rtl/rob.sv` | circular ROB |
| `rtl/retire_stage.sv` | Retire |
| `rtl/ooo_top.sv` | the whole pipeline |

## Verification

`tb/ooo_ref_pkg.sv` is an independent behavioural model of the same machine. It
is written as a software simulator over queues: the stages are called in reverse
order, Issue searches for the lowest sequence number, and Execute counts down
per instruction. `tb/ooo_tb_harness.sv` runs the model next to the RTL. Every
cycle it checks that both accepted the same number of trace instructions and
retired the same instructions, in the same order. At the end of each program
it checks the cycle and retired counters.

The harness also checks latencies worked out by hand:

- a lone instruction retires in cycle 8 (op type 0) or cycle 12 (op type 2);
- a dependent chain fetched in one bundle retires one instruction per cycle;
- a stream of independent instructions sustains WIDTH per cycle.

The random programs that follow use few, many or medium register pools. The
harness counts, and requires at least once:

- wakeups into the IQ, DI and RR, and the RegRead ROB check;
- RMT invalidations and stale-guard cases;
- in-bundle renames;
- out-of-order issue and full-width issue;
- all three latencies;
- ROB-full and IQ-full stalls, whose counts in the RTL must equal the model's.

| Testbench | What it runs |
|---|---|
| `tb_ooo_top` | WIDTH 4, IQ 16, ROB 32: directed programs plus 6 random programs of 2000 instructions |
| `tb_ooo_full` | the default size (8/128/512): directed programs plus 3 random programs of 6000 instructions |
| `tb_ooo_sweep` | one 3000-instruction trace on twelve configurations from the two sweeps the design was evaluated with: ROB 512 with WIDTH 1/2/4/8 and IQ 8/32/128, and WIDTH 8 / IQ 128 with ROB 32/128/256/512. Each result must match the model's cycle count, and the retirement stream must be in order. |
| `tb_<module>` | one per block, with directed checks. The IQ, ROB, execute and retire testbenches also check random stimulus against their own small models. |

On the sweep's synthetic trace (half op type 0, 16 registers), the pipeline
reproduces the trends of the original evaluation. WIDTH 1 gets no benefit from
a larger IQ. At WIDTH 4, the IPC rises from 2.65 with IQ 8 to 3.48 with IQ 32
and 3.63 with IQ 128. At WIDTH 8 with IQ 128, the IPC rises from 2.36 with ROB
32 to 4.27 with ROB 128 and 4.45 with ROB 512. The absolute numbers depend on
the trace.

Each testbench prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.
Every one of them passes. To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ooo_pkg.sv tb/ooo_ref_pkg.sv rtl/*.sv tb/ooo_tb_harness.sv tb/tb_ooo_top.sv \
  --top-module tb_ooo_top -Mdir obj && ./obj/Vtb_ooo_top
```

For a block testbench, compile `rtl/ooo_pkg.sv`, the block's file and
`tb/tb_<module>.sv`. Simulations initialise unreset state randomly
(`+verilator+rand+reset+2`); the design resets everything it reads.

## Where this departs from the software model, and what to trust

- **Same behaviour, different mechanism.** Three things are built differently
  from the software model but behave the same:
  - Oldest-first issue is a positional priority select instead of repeated
    searches by sequence number.
  - Renaming within a bundle uses comparators instead of sequential updates.
  - The execute list is a fixed 5-slot chain per function unit.

  The cycle-by-cycle agreement with the reference model covers all three.
- **Choices of this design.** These are not fixed by the software model:
  - the trace valid/ready port;
  - the reset;
  - 9-bit tags, which limit ROB_SIZE to 512;
  - 32-bit sequence numbers and PCs;
  - the treatment of op type 3;
  - which issue slot goes to which function unit.
- **Not built.** The software model records, for every instruction, the first
  cycle and duration of each stage, and prints them. The RTL instead reports
  retirements and counters. The benchmark traces the model was evaluated with
  (gcc, perl) are not included; the testbenches use synthetic traces in the
  same format.
- **Timing closure.** It has not been studied. The ready chain runs through
  every stage in one cycle, and the wakeup → select → compaction path in the IQ
  is long at IQ_SIZE 128 and WIDTH 8. Both are inherent in reproducing the
  model's same-cycle behaviour. A real implementation would pipeline them and
  accept different timing.
