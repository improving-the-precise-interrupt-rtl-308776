# In-line handling of software TLB-miss interrupts

Out-of-order processors with a software-managed TLB handle a TLB miss the same
way they handle any precise interrupt. They wait until the missing load or store
reaches the head of the reorder buffer (ROB). Then they flush everything behind
it, run the refill handler and fetch the flushed instructions again. When
misses are frequent, that throws away a lot of finished work. The window is
also nearly empty while the handler runs.

A TLB-refill handler is short (21 instructions here) and straight-line, so its
length is known in advance. This design uses that fact. When the excepting
instruction reaches the ROB head and the handler fits in the free ROB entries
(and the core has the queue entries and registers it needs), nothing is flushed.
User fetch pauses, the handler is fetched into the ROB beside the user
instructions already there, and user fetch then resumes where it stopped. The
instructions in flight keep executing while the handler runs. The handler's TLB
write fills the TLB and clears the miss flag, and the excepting instruction
simply accesses the TLB again. If the handler does not fit, the interrupt is
handled the conventional way: flush, run the handler, return.

The RTL covers the instruction-window side of such a core: fetch-address
control, the ROB, the fit check, the interrupt-mode controller, the register-map
source select and the data TLB. The execution core itself (issue queues,
functional units, register file and renamer tables, caches, branch predictor) is
not included. It connects through ports, and a behavioural model of it is in
the testbench.

## Taking a TLB miss

A load or store that misses in `dtlb` comes back from the execution core with
`wb.exc` set. That sets the TLB-miss flag in its ROB entry. The entry may sit
there for a while. It only matters once it becomes the head, because a flagged
head blocks retirement. At that point `inline_ctrl` compares three free counts
against the handler's needs, using `inline_fit`:

| resource | needed | why |
|---|---|---|
| ROB entries | `HLEN` (21) | nothing can retire past the flagged head, so a handler that does not fit would deadlock |
| execution-queue entries | `HIQ` (21) | the handler's instructions must be able to issue |
| physical registers | `HREGS` (8) + `front_need` | the handler's destinations, plus what instructions already in the rename stages still need |

- **It fits.** The mode register becomes `MODE_INLINE`, the status bit of the
  scheme. `inline_fetch` stops user fetch. It keeps the user PC as *nextPC* and
  fetches the handler from `HANDLER_BASE` in groups of `FW`, each instruction
  marked privileged.
- **It does not fit.** The mode becomes `MODE_TRAP`. The ROB is flushed and the
  handler is fetched. User fetch then waits until the handler's return from
  interrupt retires, and restarts at the excepting instruction. `EPC` holds the
  excepting instruction's own PC, because a TLB miss must re-execute it.

In both cases `epc` and `badvaddr` latch the excepting PC and data address, so
the handler knows which page to load.

## Where the handler goes: append and prepend

The `SCHEME` parameter selects one of two placements. The example below uses a
16-entry ROB and a 4-instruction handler, fetched two at a time. User entries
occupy 10..15, 0 and 1; the head is at 10 (flagged) and the tail at 2.

**Append** (`SCHEME_APPEND`). The handler is enqueued at the tail like any other
instructions, in entries 2..5, and user fetch continues at entry 6. No pointer
changes at all. The handler's TLB write clears the flag on entry 10, which
re-executes and retires. The handler retires later, in its turn, so it holds
ROB space until then.

**Prepend** (`SCHEME_PREPEND`, the default). The handler is placed *in front of*
the user instructions:

```
before:          head=10  tail=2      user: 10..15,0,1
prepend_start:   saved_head=10 saved_tail=2, head=tail=6
handler fetch:   handler enters 6,7 then 8,9       (tail 6 -> 8 -> 10)
prepend_restore: tail = saved_tail = 2             user fetch resumes at 2
retirement:      6,7,8,9 retire (head 6 -> 10); entry 10 waits for its flag
TLB write:       flag on entry 10 cleared, 10 re-executes and retires
```

The head needs no restore. Retiring the handler's entries brings it back to the
saved head. Because the handler leaves the ROB as soon as it finishes, the
space it borrowed is returned quickly. That is why prepend takes more misses in
line than append does. The price is the two saved-pointer registers, plus
handler instructions retiring ahead of an older user instruction. That is
harmless here: the only state they change is the TLB and the handler's
reserved registers.

`inline_rob` keeps a count register beside head and tail. It tells a full
buffer from an empty one, and stays correct while the pointers are moved.

## Keeping the window consistent

These rules let handler and user instructions share the ROB safely:

- **Privilege bit per entry.** Handler entries carry `priv=1`. User and handler
  instructions are in flight together, so one global mode bit cannot say who
  may do what. The top performs a TLB write only if its ROB entry is privileged.
  A user TLB write is refused and counted.
- **Clearing the flags.** A privileged TLB write in `MODE_INLINE` drives
  `clear_exc`. Every flagged entry (not only the head) goes back to
  not-executed and is listed in `replay_mask`, so the core re-runs its TLB
  access. Entries whose page is still missing simply miss again.
- **Killing the return from interrupt.** The handler's last instruction enters
  the ROB already finished. It fills its slot, which keeps the prepend
  arithmetic exact, but it redirects nothing, because fetch has already resumed
  at nextPC.
- **Mispredicts during the handler.** A mispredicted user branch never removes
  handler entries:
  - while the handler is being fetched, the correct target overwrites nextPC
    (`nextpc_fix`);
  - with append, if handler entries are younger than the branch, the younger
    user entries become *holes*. Holes stay in place and retire as no-ops, and
    the tail does not move;
  - while a prepended handler is being enqueued, the user entries lie between
    the saved pointers. Age is therefore measured from the saved head, and the
    saved tail is the one that moves back.
- **Register maps (`map_select`).** Normally each instruction maps its
  registers from the map left by the instruction before it. Two points need a
  different source:
  - The first handler instruction takes the committed map. The handler retires
    before the user instructions still in the ROB. When a handler instruction
    retires it releases the register its destination used to map to. That
    register must come from committed state, not from a rename that a user
    instruction has not yet made permanent.
  - The first user instruction after the handler takes the map of the last
    user instruction before it. That instruction's ROB index is kept in a
    temporary register.

  The block outputs the source and index for each enqueued instruction. The map
  tables themselves belong to the renamer in the execution core.
- **Leaving INLINE.** The mode returns to normal once the whole handler has
  been enqueued *and* the TLB has been written. Only one handler is in line at a
  time.

## Files

| file | contents |
|---|---|
| `rtl/inline_pkg.sv` | types: instruction, ROB entry, writeback record, scheme, mode, map source, counters |
| `rtl/inline_intr_top.sv` | top: wires the blocks, selects the mispredict and TLB write among the results, counts events |
| `rtl/inline_rob.sv` | reorder buffer with the prepend pointer moves, flag clear/replay, holes, flush |
| `rtl/inline_fit.sv` | the three-way fit check |
| `rtl/inline_ctrl.sv` | mode register (NORMAL / INLINE / TRAP), EPC, BadVAddr, sequencing pulses |
| `rtl/inline_fetch.sv` | user PC / nextPC, handler counter, RFI kill, conventional return |
| `rtl/map_select.sv` | register-map source select with the last-user temporary register |
| `rtl/dtlb.sv` | fully associative data TLB, 8 KB pages, round-robin refill |
| `tb/inline_env.sv` | program generator, behavioural execution core, checkers |
| `tb/inline_bench.sv` | one top plus one environment, for a chosen scheme and TLB size, optionally with in-line handling turned off |
| `tb/tb_*.sv` | self-checking testbenches (below) |

## Interface of `inline_intr_top`

All signals are on one clock `clk` with a synchronous, active-low reset `rst_n`.

- **Instruction memory.** `imem_addr` is a group address. `imem_data[0..FW-1]`
  must return the instructions at `imem_addr + 4*i` in the same cycle.
  Instructions are reduced to an operation class (`op_e`: ALU, LOAD, STORE,
  BRANCH, TLBWR, RFI) and a 32-bit immediate. The immediate is the data address
  of a load or store, or the taken target of a branch.
- **Dispatch.** In a cycle where a fetch group enters the ROB, each instruction
  that needs execution appears on `disp_valid/idx/pc/instr/priv`. Its ROB index
  is the tag for its result. `disp_map`/`disp_map_idx` give its register-map
  source.
- **Results.** `wb[p]`/`wb_idx[p]`, `WBW` ports. A result sets the done bit.
  - `exc`: a TLB miss.
  - `mispredict` + `target`: a branch resolved as taken, at most one per cycle.
  - `tlb_wr` + `tlb_vpn`/`tlb_pfn`: a TLB write.

  A write from a privileged entry updates `dtlb` at the clock edge.
- **Core bookkeeping.** The core must drop the entries in `kill_mask`
  (mispredict or flush) and re-execute those in `replay_mask`. `iq_free`,
  `preg_free` and `front_need` feed the fit check.
- **TLB lookups.** `tlb_vaddr[l]` returns `tlb_hit[l]`/`tlb_paddr[l]`
  combinationally, on `TLB_LP` ports.
- **Retirement.** `commit_valid`/`commit_entry`, up to `RW` per cycle, in ROB
  order. A hole retires with `hole=1`.
- **Status.** `mode`, `epc`, `badvaddr`, `handler_fetch`, `prepend_fetch`,
  `wait_rfi`, `rob_count`, `rob_head`, and the `stats` counters. The counters
  cover in-line and conventional interrupts, instructions flushed and how many
  of those had already finished executing, the reason for each flush, tail
  restores, replays, holes, nextPC fixes and refused TLB writes. User instructions that arrive while `mode == MODE_INLINE` should
  be held out of the execution queues until the mode changes back, as the
  evaluated machine did. Instructions that were already queued keep running;
  they are the ones whose mispredicts the rules above deal with.

Timing, cycle by cycle:
- A flagged head is acted on in the cycle it becomes the head. That cycle
  carries no enqueue.
- Handler fetch starts the next cycle, one group per cycle while the ROB
  accepts.
- In prepend the tail restore happens in the same cycle as the last handler
  group, and user fetch resumes the cycle after.
- A TLB write is visible to lookups from the next cycle. The flags clear in the
  write's own cycle.

## Parameters (top)

| parameter | default | origin |
|---|---|---|
| `SCHEME` | `SCHEME_PREPEND` | both placements are proposed; prepend performed better |
| `N` | 80 | instructions in flight in the evaluated machine |
| `FW` | 4 | 4-wide machine |
| `RW`, `WBW` | 4, 4 | own choice |
| `HLEN` | 21 | handler length of the evaluated machine |
| `HIQ`, `HREGS` | 21, 8 | own choice: one queue entry per handler instruction, and one register for each of the eight registers the evaluated machine sets aside for handlers; the real needs are not given |
| `TLB_ENTRIES` | 128 | evaluated with 16, 32, 64 and 128 |
| `TLB_LP` | 2 | own choice |
| `HANDLER_BASE`, `RESET_PC` | 0x8000, 0x10000 | own choice |

## Simulating

Verilator 5 and nothing else is needed. Search both folders as libraries and
name the package first:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/inline_pkg.sv tb/tb_inline_full.sv --top-module tb_inline_full
./obj_dir/Vtb_inline_full
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each also has
a watchdog that counts a failure if the test hangs.

| testbench | what it exercises |
|---|---|
| `tb_inline_full` | the top at its defaults (prepend, 80 entries, 4-wide, 21-instruction handler, 128-entry TLB) for 50,000 user instructions, about 1,000 TLB misses |
| `tb_inline_tlb_sizes` | the four TLB sizes (16, 32, 64, 128) with conventional handling only, append and prepend: twelve cores, 8,000 user instructions each, and a table of the results |
| `tb_inline_intr_top` | a prepend core and an append core side by side, 20,000 user instructions each |
| `tb_inline_rob` | the 16-entry, 2-wide, 4-instruction walk-through above, step by step for both schemes, plus holes, a mispredict during prepend fetch, and a flush |
| `tb_inline_fetch` | group sizes 4,4,4,4,4,1, RFI kill, nextPC resume and rewrite, conventional stop and return |
| `tb_inline_ctrl` | both schemes' pulse sequences, both orders of "handler fetched" and "TLB written", conventional path |
| `tb_inline_fit` | sweep around all three thresholds |
| `tb_dtlb` | random fills against a reference with round-robin eviction, in-place rewrite, reset |
| `tb_map_select` | map sources around handlers, mispredicts and flushes |

The three system-level benches check the following:
- every user instruction retires exactly in program order, including across
  flushes, holes and replays;
- every translation matches the page-table formula;
- the excepting instruction retires after the whole handler (prepend,
  conventional) or before any of it (append).

The first two also count each mechanism and fail if one never happened: in-line and
conventional interrupts, all three flush reasons, replays beyond the head, tail
restores (prepend) or holes (append), nextPC fixes, refused user TLB writes,
both special map sources, flushes of already finished work, and user
instructions held back during a handler.

In the full-size run, the synthetic program misses the 128-entry TLB about
once every 50 user instructions. The shorter runs of `tb_inline_tlb_sizes`
include the cold start, so they miss more often: about once every 16 to 20
instructions with 16 entries and once every 20 to 25 with 128. That is more often than
real code, so that every path is exercised. Its execution latencies are random.

`tb_inline_tlb_sizes` compares the three ways of handling a miss on that
program. It checks only the directions of the results:
- a smaller TLB misses more;
- prepend flushes fewer instructions per miss than conventional handling;
- prepend runs the program in fewer cycles;
- prepend takes at least as many misses in line as append.

A typical run shows the following:

| TLB | handling | in line | flushed per miss | cycles per instruction |
|---|---|---|---|---|
| 16 | conventional | 0% | 45 | 1.71 |
| 16 | append | 45% | 38 | 1.43 |
| 16 | prepend | 49% | 34 | 1.41 |
| 128 | conventional | 0% | 47 | 0.96 |
| 128 | append | 48% | 35 | 0.80 |
| 128 | prepend | 50% | 33 | 0.79 |

Only about half of the misses fit, because the model core keeps the ROB
nearly full. The fit check usually fails on ROB space. These figures depend on
the model and the synthetic program, so they say nothing about real programs.

## Departures and limits

- The front end fetches straight into the ROB. There are no decode or rename
  stages, and so no partial flush of those stages. When registers are short,
  the interrupt is simply handled conventionally.
- User fetch is sequential, which amounts to predicting every branch not taken.
  A taken branch is a mispredict resolved at writeback, and only one mispredict
  per cycle is accepted.
- In append, a later conventional interrupt flushes handler instructions that
  are still waiting to retire. By then the handler's TLB write has already
  happened, because INLINE is only left after it.
- Only the data TLB is built. Instruction-TLB misses, handlers of unknown
  length (which would need deadlock detection) and the handler software itself
  are outside this RTL.
- Handler addresses are not translated, as for an unmapped kernel segment.
