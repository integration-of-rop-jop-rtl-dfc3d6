# CRA monitor: ROP/JOP detection from the ARM debug trace

Code-reuse attacks (CRAs) hijack a program without injecting code.
- Return-oriented programming (ROP) overwrites return addresses on the stack.
- Jump-oriented programming (JOP) overwrites code pointers used by indirect calls and jumps.

This design watches a running ARM program from outside the CPU. It raises an interrupt as soon as control flow breaks one of three rules:

1. **Returns**: a return must go back to the instruction after the call that it matches. This is checked with a shadow call stack.
2. **Indirect calls**: an indirect call must land on the entry of a function.
3. **Indirect jumps**: an indirect jump must stay inside the function that is running.

The monitor needs no change to the processor. It gets all its information from two channels every ARM SoC already has:
- **The debug trace port.** The CoreSight PTM/TPIU byte stream reports where each indirect branch went, and whether each direct branch was taken.
- **The system bus.** The program writes each function's entry address and size to the monitor when that function starts.

The trace alone cannot tell a call from a jump, and it never reports where a call came from. The trick that fills this gap is **binary instrumentation**, done offline by a rewriting tool (not part of this hardware):

- Every call instruction moves into a *trampoline* section at address `A + 8n`, and the program reaches it through an indirect jump.
- Every return lands on a stub at `A + 8n + 4`, which jumps back into the caller.
- Every function begins with a short store sequence, `func_info`, that writes its entry address and size to the monitor.

With this layout, the branch type can be read off the target address alone. The call's source address is the slot address `A + 8n`, and the correct return address is `A + 8n + 4`.

```
 host CPU ──PTM/TPIU bytes (trace_clk)──► PTA ──branch records──► CRA detector ──► irq
    │                                   (FIFO, decoder)            ▲     │
    └──AXI: func_info stores, configuration ───────────────────────┘     └─AXI master─► CRA region (DRAM)
```

## From trace bytes to branch records (`pta`)

The PTM trace analyzer (`rtl/pta.sv`) has three parts:
- `branch_trace_fifo`: an asynchronous byte FIFO, 32 deep, that carries the trace from the host's trace clock into the monitor clock.
- `trace_decoder`: turns bytes into records.
- A small register slave.

The decoder consumes one byte per monitor clock. It classifies each branch target `t` against the trampoline range `[TRAMP_BASE, TRAMP_END)`:

| target                      | next trace element       | record                                                 |
|-----------------------------|--------------------------|--------------------------------------------------------|
| `A + 8n`                    | branch address `x`       | **IC**, indirect call: src = `A + 8n`, tgt = `x`        |
| `A + 8n`                    | taken atom               | **DC**, direct call: src = `A + 8n`                     |
| `A + 8n + 4`                | —                        | **R**, return: tgt = `A + 8n + 4`                       |
| anything else               | —                        | **IJ**, indirect jump: tgt = `t`                        |

Not-taken atoms, and atoms outside a pending call, carry nothing the checks need, so they are dropped.

### Trace byte format

The decoder reads a simplified program-flow trace. It handles only the two packet kinds the checks need:

```
8'h00          padding, ignored
b[0] = 1       branch address, first byte:  b[6:1] = addr[7:2], b[7] = more bytes follow
  byte 1       b[6:0] = addr[14:8]   (b[7] = more)
  byte 2       b[6:0] = addr[21:15]  (b[7] = more)
  byte 3       b[6:0] = addr[28:22]  (b[7] = more)
  byte 4       b[2:0] = addr[31:29]
               address bits not sent are kept from the previous branch address
8'b1000_00E0   atom, E = 1 taken
```

The decoder does not parse a real CoreSight PTM stream. It ignores the A-sync, I-sync, exception, context-ID and cycle-count packets, and it does not handle real atom-packet layouts. Connecting it to real silicon needs a fuller packet parser in front of the classification logic. The classification, which works on complete addresses and atoms, would stay as it is.

`tb/tb_trace_pkg.sv` has an encoder for this format (`enc_branch`, `enc_atom`), which the testbenches use.

## Putting two unordered streams back in order (`trace_combiner`)

Branch records and function-boundary records reach the detector by different paths, with different delays:
- Branch records come from the PTA through the **PTM FIFO**.
- Function-boundary records come from the bus through the **MMIO FIFO**.

For one call, the `func_info` write may arrive long before its trace bytes, or long after them. The combiner restores program order with two rules:

- **START.** The first boundary record after a reset or restart is the program's first function (F.B0, normally `main`). It becomes a START event. Branch records that arrive before it are dropped.
- **Calls wait for their boundary record.**
  - A DC or IC record is held until the MMIO FIFO has the matching record. The combiner then sends one event with the call and the callee's `{entry, size}`.
  - R and IJ records pass on their own.
  - A boundary record that arrives first simply waits in its FIFO.

Every function prologue writes exactly one record, and every call produces exactly one call record. So the two FIFOs pair up one-to-one, in order.

## The checks (`cra_detector_controller`)

The controller (CDC) keeps two registers:
- `FUNC_BOUNDS`: the current function's `[entry, end)`.
- `REC_CNT`: a recursion counter.

Events are handled as follows:

| event | action |
|-------|--------|
| START | `FUNC_BOUNDS := [entry, entry+size)`; `REC_CNT := 0` |
| IC    | **JOP-call alarm** if `tgt != callee.entry`; otherwise handled as a call |
| DC / valid IC, callee entry == `FUNC_BOUNDS.entry` (recursion) | `REC_CNT++`; nothing pushed |
| DC / valid IC, other callee | push `{src + 4, FUNC_BOUNDS, REC_CNT}`; `FUNC_BOUNDS := callee`; `REC_CNT := 0` |
| R, `REC_CNT != 0` | `REC_CNT--`; the target is not checked |
| R, `REC_CNT == 0` | pop; **ROP alarm** if the stack is empty or `tgt != saved return`; otherwise restore `FUNC_BOUNDS` and `REC_CNT` |
| IJ    | **JOP-jump alarm** unless `entry <= tgt < end` |

On an alarm:
- `irq` rises and stays up until software clears it.
- The class and the two addresses of the *first* violation are kept in `ATK_TGT`/`ATK_EXP`.
- The offending event changes neither `FUNC_BOUNDS` nor the stack.
- Monitoring continues.

After an alarm, the program's real state and the monitor's model of it may differ. Software normally restarts monitoring (`CTRL[2]`) together with the program.

`REC_CNT` is saved in each stack entry, so a recursive function that calls another function keeps its count across that call. With a single global counter it would be lost. This is an extension of the original scheme.

## A shadow stack deeper than 16 entries (`shadow_stack_manager`)

The on-chip `shadow_call_stack` holds 16 entries of 104 bits each: return address, entry, end, and REC_CNT. It is a circular buffer, so the oldest 8 entries can leave, or 8 entries can come back underneath, in one clock. The shadow stack manager (SSM) works as follows:

- **Push into a full stack.** The oldest 8 entries are moved into `VICTIM_ENTRY`, `spilled_blocks` increments, and the push completes at once. In the background, the AXI master then writes the block to the **CRA region** in main memory, as block `b` (the old value of `spilled_blocks`). The next eviction waits until this write-back has finished.
- **Pop from an empty stack.**
  - If `VICTIM_ENTRY` still holds the last evicted block, those 8 entries come back on chip without any bus traffic.
  - Otherwise the block is read back from the CRA region, after any write-back still running.
  - Either way, `spilled_blocks` decrements, and the pop completes.
- **Region full.** If `REGION_BLOCKS` blocks are already spilled, the block is dropped and `STATUS[4]` is set. A later return into the lost frames will then be reported as ROP.
- **Timing.**
  - A push or pop that stays on chip takes 2 clocks.
  - A push that spills takes 3 clocks, plus any wait for the previous write-back. The write-back is 32 single-beat AXI writes.
  - A refill from memory costs 32 single-beat AXI reads, during which the detector waits.

CRA region layout: entry `i` of block `b` is at `CRA_BASE + (8b + i)*16`, stored as four 32-bit words: return address, entry, end, REC_CNT.

With the defaults, the stack covers 16 + 512·8 = 4112 frames, and the region uses 64 KiB.

## Clocks, rates and back-pressure

- **Clock domains.**
  - The trace clock (`trace_clk`, with `trace_rst_n`) is used only by the write side of `branch_trace_fifo`.
  - Everything else runs on `clk` (with `rst_n`).
  - Both resets are asynchronous and active low.
- **No stall toward the host's trace.** The trace port cannot be stalled. If the 32-byte FIFO is full, an arriving byte is dropped, and the sticky flag `trace_overflow` is set. It shows in PTA `STATUS[0]` and detector `STATUS[6]`, and it clears only with the trace-side reset. A lost byte can make the detector see a wrong branch, or miss a call. Software should treat the flag as "monitoring unreliable": reset the trace path and restart monitoring.
- **Back-pressure inside the monitor.**
  - A full PTM FIFO (16 records) stops the decoder, and the branch trace FIFO then fills.
  - A full MMIO FIFO (16 records) stalls the bus write to `FUNC_SIZE` (W channel not ready), so boundary records are not lost.
  - The exception is after trace has been lost. The combiner may then wait for a call record that never comes, and the stall would hang the host for good. So once `trace_overflow` is set, a write to a full MMIO FIFO is dropped instead.
- **Rates.**
  - The decoder needs at least one monitor clock per trace byte.
  - The detector handles one event every 2–3 clocks while the stack stays on chip.
  - A refill from memory, or a spill that has to wait for the previous write-back, pauses it for about 130–200 clocks, depending on memory latency. During that pause, the byte FIFO and the PTM FIFO must hold the incoming trace.
  - The original work reports no overflow up to a 5:1 host-to-monitor clock ratio with a 32-deep input buffer. Whether that holds here depends on how dense the trace is.
  - `tb_freq_gap` measures this for a synthetic program whose call depth swings between 0 and about 44. At 1:1 to 5:1 with one trace byte per 16 host clocks on average, no byte is lost. At one byte per 12 host clocks, bytes are lost at 5:1 but not up to 4:1.
  - Bursts on the AXI master would shorten the memory refill. That is the first thing to change for denser traces.

## Software interface

Both slaves accept AXI3 INCR bursts of 32-bit words. The register offsets are relative to each slave's base.

**PTA**

| offset | register   | |
|--------|------------|-|
| 0x00   | CTRL       | [0] enable decoding (when disabled, bytes are read and discarded) |
| 0x04   | TRAMP_BASE | `A`, forced to a multiple of 8 |
| 0x08   | TRAMP_END  | first address past the trampoline |
| 0x0C   | STATUS     | [0] trace overflow (sticky) |
| 0x10   | RECORDS    | number of branch records sent to the detector |

**Detector**

| offset | register   | |
|--------|------------|-|
| 0x00   | CTRL       | [0] enable; write 1 to [1] clears the interrupt; write 1 to [2] restarts monitoring (FIFOs, combiner, CDC and stack emptied, waits for a new START) |
| 0x04   | STATUS     | [0] irq, [2:1] class (0 none, 1 ROP, 2 JOP call, 3 JOP jump), [3] started, [4] CRA region full, [5] AXI error, [6] trace lost |
| 0x08   | CRA_BASE   | base of the CRA region |
| 0x0C   | FUNC_ENTRY | function entry (held) |
| 0x10   | FUNC_SIZE  | writing it pushes `{FUNC_ENTRY, size}` into the MMIO FIFO (stalls while full, see above) |
| 0x14   | ATK_TGT    | offending target of the first violation |
| 0x18   | ATK_EXP    | expected address: saved return (ROP), callee entry (JOP call), current function entry (JOP jump) |
| 0x1C   | DEPTH      | [7:0] on-chip entries, [15:8] REC_CNT, [31:16] spilled blocks |

A `func_info` prologue is one two-beat burst (entry, then size) to offset 0x0C. Bring-up goes in this order:
1. Program `TRAMP_BASE` and `TRAMP_END`, then set PTA `CTRL[0]`.
2. Write `CRA_BASE`, then set detector `CTRL[0]`.
3. Start the program. Its first `func_info` starts monitoring.

## Module map and parameters

```
cra_monitor                      top: two AXI slave ports, one AXI master, trace port, irq
├── pta
│   ├── branch_trace_fifo        async FIFO, DEPTH = TRACE_FIFO_DEPTH (32)
│   ├── trace_decoder
│   └── axi_slave_if
└── cra_detector
    ├── axi_slave_if
    ├── sync_fifo  (PTM FIFO,  PTM_FIFO_DEPTH = 16,  ptm_rec_t)
    ├── sync_fifo  (MMIO FIFO, MMIO_FIFO_DEPTH = 16, func_rec_t)
    ├── trace_combiner
    ├── cra_detector_controller
    └── shadow_stack_manager     SS_DEPTH = 16, SS_BLOCK = 8, REGION_BLOCKS = 512
        ├── shadow_call_stack
        └── axi_master_if
```

The shared types are in `rtl/cra_pkg.sv` (records, events, stack entry, register offsets) and `rtl/axi_pkg.sv` (AXI3 request and response structs: 32-bit address and data, 12-bit IDs, WID).

The numbers taken from the original design are:
- 16 shadow-stack entries;
- blocks of 8 entries;
- a 32-deep trace buffer.

The other sizes are this design's own choices. `shadow_stack_manager` needs `SS_BLOCK >= 2` and `SS_DEPTH` a multiple of `SS_BLOCK`. `branch_trace_fifo` needs a power-of-two depth.

Coarse synthesis of the whole monitor at the defaults gives about 920 cells, 1.9 k flip-flop bits and 4 k memory bits. The memory bits are the shadow stack, `VICTIM_ENTRY` and the FIFOs. This count is not comparable with the FPGA LUT count reported for the original prototype.

## How far this follows the original design

Taken from the original design:
- the overall structure: PTA with a branch trace FIFO and a trace decoder; a detector with PTM and MMIO FIFOs, trace combiner, controller, shadow call stack, SSM with `VICTIM_ENTRY` and an AXI master;
- the trampoline classification rule;
- the combining rules and the START event;
- the three checks, including the return address = call source + 4;
- `REC_CNT` recursion handling;
- the sizes 16, 8 and 32.

This design's own choices, where the original says nothing:
- the trace byte format;
- all register maps and the AXI front ends;
- the FIFO depths of 16;
- the spill policy: `VICTIM_ENTRY` takes the evicted block at once and is written back to memory in the background;
- the refill policy and the CRA region layout;
- "recursion" meaning "callee entry equals the current function's entry";
- saving `REC_CNT` in each stack entry;
- flagging a return with an empty stack as ROP;
- not checking returns out of recursive calls;
- the sticky interrupt with a first-violation record;
- the trace overflow flag;
- the bus stall on a full MMIO FIFO, and dropping instead of stalling once trace has been lost.

One reading differs from the original's figure. Its timing diagram labels the address sent with a call "return address". Its text says the trace carries the call's *source* address and the detector adds 4, and this design follows the text.

Not built:
- the host CPU;
- the PTM/TPIU;
- the AXI interconnect;
- the DRAM;
- the offline binary instrumentor.

The monitor's ports are where these would attach.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_sync_fifo` | random push/pop against a queue model, full/empty/level, clear |
| `tb_branch_trace_fifo` | 5:1 clock ratio, data order, an overflow phase with a dropped-byte check |
| `tb_trace_decoder` | random DC/IC/R/IJ streams with compressed addresses, padding and noise atoms, random back-pressure |
| `tb_axi_slave_if` | single and burst reads and writes, W-channel stall |
| `tb_axi_master_if` | random reads and writes against a memory with random wait states |
| `tb_shadow_call_stack` | push/pop/evict/refill against a model |
| `tb_shadow_stack_manager` | deep random push/pop: spills, background write-backs, victim and memory refills, the memory layout, 2-clock on-chip and 3-clock spilling latency |
| `tb_trace_combiner` | both arrival orders, START, dropping records before START |
| `tb_cra_detector_controller` | random programs against a reference model, every alarm class, recursion |
| `tb_pta` | configuration over AXI, trace at a 5:1 clock ratio, overflow when the output is stalled |
| `tb_cra_detector` | a 40-deep call chain with spills and refills, recursion, each alarm, MMIO stall, restart, no stall once trace is lost |
| `tb_cra_monitor` | end to end at the default parameters (below) |
| `tb_freq_gap` | the same program at host:monitor clock ratios 1:1 to 5:1 and two trace densities: reports lost trace; checks the result when nothing is lost and the loss flags and the non-hanging bus when something is |

### The end-to-end test

`tb_cra_monitor` runs a model of an instrumented program at a 5:1 trace-to-monitor clock ratio:
- 64 functions;
- direct, indirect and recursive calls;
- call depths up to about 70;
- boundary records written over the bus by a separate process, so the two streams arrive in random order.

After the program, it checks:
- no alarm was raised and no trace was lost;
- the DEPTH register matches an independent count;
- the CRA-region traffic matches the number of spills and memory refills that the program's call depth implies;
- the PTA record count matches.

Then it runs one attack of each kind:
- a return redirected into another function;
- a return to another call's stub;
- a return past the outermost frame;
- an indirect call into a function body;
- an indirect jump out of the function.

For each attack it checks the interrupt, the alarm class and clearing the interrupt. Finally it floods the trace port and checks the overflow flag in both STATUS registers. It counts spills, victim refills, memory refills, recursive calls, each branch class and bus stall cycles, and it fails if any of them is zero.

### Running with Verilator

Verilator 5 is needed; the testbenches use `--timing`. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/axi_pkg.sv rtl/cra_pkg.sv tb/tb_trace_pkg.sv tb/tb_cra_monitor.sv \
    --top-module tb_cra_monitor
./obj_dir/Vtb_cra_monitor
```

Replace `tb_cra_monitor` with any other testbench name. The end-to-end test runs at the default parameters and takes about a second.

Helpers under `tb/`:
- `axi_mem_model.sv`: a behavioural AXI memory with random wait states that counts reads and writes;
- `axi_bfm.svh`: master tasks;
- `tb_trace_pkg.sv`: the trace encoder.

Flops that are not reset start at random values in simulation, so models in the testbenches are gated on reset.
