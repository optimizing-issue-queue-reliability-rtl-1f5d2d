# Soft-error-aware issue queue for a 4-thread SMT core

In a simultaneous multithreaded (SMT) core the issue queue (IQ) holds decoded
instructions of every thread until their operands are ready. It is large, full
most of the time, and its entries stay put for many cycles. That makes it the
structure with the highest architectural vulnerability factor (AVF): the
fraction of its bits, averaged over time, whose corruption by a particle strike
would change a program's result.

This RTL lowers the IQ's AVF without redundancy. It relies on a 1-bit *ACE tag*
carried by every instruction. The tag says whether the instruction is needed
for architecturally correct execution (ACE) or is dead, wrong-path or otherwise
un-ACE. The tags come from off-line profiling of each static instruction (PC)
and reach the core through the instruction encoding. Given that tag, the design
does three things:

1. **VISA issue** (Vulnerable InStruction Aware). Ready ACE instructions issue
   before ready un-ACE instructions, so vulnerable bits leave the queue sooner.
2. **Allocation cap with an L2-miss switch** (scheme `SCHEME_OPT2`). Every
   10,000 cycles the IPC and the ready queue length set a cap on how many IQ
   entries may be in use. If the last interval had more than 16 L2 misses, the
   next interval drops the cap and uses the FLUSH fetch policy instead.
3. **Dynamic vulnerability management, DVM** (scheme `SCHEME_DVM`). An online
   AVF estimate is compared with a reliability target, and dispatch is
   throttled so the estimate stays under that target.

Both schemes use VISA issue. The scheme is chosen statically with
`cfg_scheme`; change it only while reset is asserted.

## Structure

```
                     disp_* (8 lanes, ACE tag)         wb_* (8 result tags)
                              |                               |
   +-----------+   thread_en  v                               v
   | dispatch  |-----------> issue_queue (96 entries) -- visa_select --> iss_* (8 lanes)
   |   gate    |  disp_limit   |  occupancy, rql, wql, ace_bits
   +-----------+               |
     ^   ^   ^                 +--> iq_alloc_ctrl (IPC, RQL -> IQL cap)
     |   |   |                 +--> ace_avf_monitor (ACE-bit counter, trigger, emergencies)
     |   |   +-- dvm_ctrl <----+      |
     |   |        (serial_divider)    +--> sub_tick / avf_above_trig
     |   +------ flush_policy <-- l2_miss_tracker <-- l2_miss_start / done
     +---------- opt2_mode_sel (L2 misses per interval -> flush_mode)
                 icount_select <-- inflight (fetch thread choice)
```

| File | Role |
|------|------|
| `rtl/iq_pkg.sv` | sizes, the instruction struct `iq_inst_t`, ACE-bit sizes, `scheme_e` |
| `rtl/visa_select.sv` | ACE-first, oldest-first select of up to 8 ready entries |
| `rtl/issue_queue.sv` | 96 entries, age matrix, dispatch, wakeup, issue, per-thread flush, counts |
| `rtl/iq_alloc_ctrl.sv` | optimization 1: IPC/RQL-based allocation cap IQL |
| `rtl/opt2_mode_sel.sv` | optimization 2: chooses the cap or FLUSH for each interval |
| `rtl/l2_miss_tracker.sv` | outstanding L2 misses per thread |
| `rtl/flush_policy.sv` | FLUSH: stall and flush a thread that misses in L2 |
| `rtl/ace_avf_monitor.sv` | online AVF estimate, trigger test, emergency flag |
| `rtl/serial_divider.sv` | waiting/ready ratio division used by DVM |
| `rtl/dvm_ctrl.sv` | the DVM rules and `wq_ratio` |
| `rtl/dispatch_gate.sv` | turns the active scheme into `disp_limit` and thread enables |
| `rtl/icount_select.sv` | ICOUNT fetch thread choice |
| `rtl/smt_iq_top.sv` | the whole subsystem |

Only the issue queue and its control are designed here. The fetch unit,
decoder, renamer, reorder buffer, function units and caches are outside it and
connect through the ports of `smt_iq_top`.

## What counts as a vulnerable bit

An entry stores an `iq_inst_t`. Its fields are the thread id, the ACE tag, an
8-bit opcode/control field, two 9-bit source tags with ready bits, and a 9-bit
destination tag: 40 bits in all (`ENTRY_BITS`). An ACE instruction exposes all
40 bits. An un-ACE instruction still has some bits that matter, such as its
opcode, so it counts as `UNACE_BITS` = 8 ACE bits. The IQ reports the sum over
its valid entries every cycle as `ace_bits`. The AVF of a window is then

    AVF = sum over cycles of ace_bits / (cycles * 96 * 40)

Invalid entries count as zero. The field widths and the 8-bit un-ACE share are
this implementation's choices.

## VISA issue and program order

Program order across threads is taken to be dispatch order. The queue keeps a
96 x 96 age matrix: row *i* is the set of entries dispatched before entry *i*.
When several instructions are dispatched in the same cycle, lane order breaks
the tie. Entries are not kept compacted, so a new instruction takes any free
slot. The matrix is the only record of age.

`visa_select` gives every ready entry a rank:

* for a ready ACE entry: the number of older ready ACE entries;
* for a ready un-ACE entry: the number of all ready ACE entries, plus the
  number of older ready un-ACE entries.

The ranks of the requesters run 0 ... R-1 with no gaps. An entry is granted
when its rank is below `issue_slots`, the number of function-unit slots the
core offers this cycle (0 to 8). The rank also picks the output lane. So
`iss_inst[0]` is the highest-priority instruction, ACE instructions fill the
low lanes, and lanes `0 .. min(R, slots)-1` are valid. The result: a ready ACE
instruction overtakes every ready un-ACE one, and within each class the oldest
goes first. Select is combinational, and the granted entries are freed at the
next clock edge.

Each rank needs a 96-bit population count, and there are 96 of them. That is
most of the logic in the design. It is a direct circuit, not an optimized one.

## Dispatch, wakeup and flush

* **Dispatch.** The front end presents up to 8 lanes. Lanes are taken in order.
  A lane is accepted when its thread is enabled and fewer than
  `min(disp_limit, free entries)` earlier lanes were accepted. So the accepted
  lanes of any one thread always form a prefix. The k-th accepted lane fills
  the k-th free entry.
* **Wakeup.** Up to 8 result tags are broadcast on `wb_valid`/`wb_tag`.
  Matching sources in the queue become ready at the next edge. A source of an
  instruction dispatched in the same cycle that matches a broadcast is captured
  as ready. The earliest issue is one cycle after the broadcast.
* **Flush.** `thread_flush[t]` removes every entry of thread t at the next edge,
  and lanes of that thread are refused in that cycle. The front end must refetch
  the flushed instructions.

## Optimization 1: the allocation cap

`iq_alloc_ctrl` sums the committed instructions and the ready queue length
(RQL) over each 10,000-cycle interval. In the interval's last cycle it sets the
cap IQL for the next interval. `avg RQL` is the floor of the summed RQL divided
by 10,000.

| interval IPC | IQL |
|--------------|-----|
| 0 to 2 | min(avg RQL + 16, 32) |
| above 2 to 4 | min(avg RQL + 32, 48) |
| above 4 to 6 | min(avg RQL + 48, 64) |
| above 6 to 8 | min(avg RQL + 64, 96) |

The constants are 1/6, 1/3, 1/2 and 2/3 of `IQ_SIZE` for the additive part,
and 1/3, 1/2, 2/3 and 1 of `IQ_SIZE` for the cap. IPC is never computed: the
commit count is compared with 2, 4 and 6 times the interval length. No entry is
allocated while `occupancy >= IQL`, and `disp_limit` lets the queue fill
exactly up to IQL. Until the first interval ends, IQL is 96.

## Optimization 2: switching to FLUSH on L2 misses

A low cap hurts when L2 misses are frequent. The queue clogs with instructions
that wait on the miss. Then, when the miss resolves, too few instructions are
ready to use the core. `opt2_mode_sel` therefore counts the L2 misses of all
threads in each interval. If the count was above `T_CACHE_MISS` = 16,
`flush_mode` is set for the next interval. That interval ignores the cap and
enables `flush_policy` instead:

* A thread that takes a new L2 miss is stalled and its IQ entries are flushed,
  in the same cycle as its `l2_miss_start` pulse.
* It stays stalled until `l2_miss_tracker` shows none of its misses pending.
* The last running thread is never stalled. When several threads miss in the
  same cycle, lower thread numbers are considered first.

The L2 misses arrive as one-cycle pulses per thread, `l2_miss_start` and
`l2_miss_done`. Send at most one start and one done per thread per cycle.

## Online AVF and the reliability target

`ace_avf_monitor` accumulates `ace_bits` every cycle. Thresholds are unsigned
Q0.16 fractions: `rel_thr` = 0x8000 means an AVF target of 0.5. The *trigger*
is floor(0.9 x `rel_thr`). No division is performed; each test compares
accumulated ACE-bit cycles x 2^16 with threshold x cycles x 3840.

* Each interval has five sub-intervals of 2,000 cycles. At the end of each
  (`avf_sub_tick`), the AVF of that sub-interval is compared with the trigger.
  The result is held in `avf_above_trig` until the next sub-interval ends. It
  is 0 after reset.
* At the end of each 10,000-cycle interval, its AVF is compared with `rel_thr`
  itself. `emergency` pulses when it is higher, so counting these pulses gives
  the percentage of intervals with a vulnerability emergency.
* `interval_acc` holds the interval's ACE-bit total, from which its AVF, and
  the maximum AVF of a run, can be computed outside.

## Dynamic vulnerability management

`dvm_ctrl` applies four rules. A thread may dispatch only if rule 3 is not
stalling and it passes rule 1 or is the thread resumed by rule 4.

1. **L2 misses.** A thread with an L2 miss pending may not dispatch, starting
   in the cycle the miss is reported. Unlike FLUSH, its instructions stay in
   the queue.
2. **Adapting `wq_ratio`.** At every sub-interval end, `wq_ratio` is halved if
   the AVF was above the trigger and grows by 1 otherwise. It falls fast and
   rises slowly. It starts at 4 and saturates at 255, and halving may take it
   to 0.
3. **Waiting versus ready.** Every 50 cycles, the 7-cycle `serial_divider`
   computes floor(waiting / ready). While the last result exceeds `wq_ratio`,
   no thread may dispatch. The goal is to keep only as many waiting
   instructions as the available parallelism can use. Division by zero gives
   127 (maximal), but an empty queue (0/0) gives 0. Otherwise an empty queue
   would lock dispatch out for good.
4. **Resume.** If every thread has an L2 miss pending and the AVF is below the
   trigger, the thread with the fewest ACE instructions in its fetch queue
   (input `fq_ace_cnt`, ties to the lowest number) may dispatch anyway. Its
   instructions add few vulnerable bits, and the core keeps making progress.

The source design states rule 4 in two ways: "most un-ACE instructions" and
"fewest ACE instructions in the fetch queue". This RTL uses the second.

## Interface of `smt_iq_top`

There is one clock and a synchronous active-low reset `rst_n`. Dispatch
(`disp_valid`/`disp_inst` to `disp_ready`) and issue (`issue_slots` to
`iss_valid`/`iss_inst`) are combinational within the cycle.

| Port | Dir | Meaning |
|------|-----|---------|
| `cfg_scheme` | in | `SCHEME_OPT2` or `SCHEME_DVM` |
| `rel_thr[15:0]` | in | reliability target, AVF in Q0.16 |
| `disp_valid[7:0]`, `disp_inst[7:0]` | in | dispatch lanes (`iq_inst_t`: tid, ace, opc, src1/2 with ready, dst) |
| `disp_ready[7:0]` | out | lanes accepted this cycle |
| `wb_valid[7:0]`, `wb_tag[7:0]` | in | result tag broadcast |
| `issue_slots[3:0]` | in | issue slots available (0 to 8) |
| `iss_valid[7:0]`, `iss_inst[7:0]` | out | issued instructions, in priority order |
| `commit_cnt[3:0]` | in | instructions committed this cycle (for IPC) |
| `l2_miss_start[3:0]`, `l2_miss_done[3:0]` | in | L2 miss events per thread |
| `inflight[3:0][8:0]` | in | in-flight instructions per thread (ICOUNT) |
| `fq_ace_cnt[3:0][7:0]` | in | ACE instructions per fetch queue (DVM rule 4) |
| `fetch_valid`, `fetch_tid` | out | thread to fetch next (ICOUNT among threads not stalled) |
| `thread_flush[3:0]` | out | threads flushed this cycle; refetch them |
| `thread_dispatch_en[3:0]` | out | threads allowed to dispatch |
| `occupancy`, `rql`, `wql`, `thread_occ`, `ace_bits` | out | queue state |
| `iql`, `flush_mode` | out | optimization 1 and 2 state |
| `wq_ratio`, `dvm_ratio_stall`, `dvm_resume` | out | DVM state |
| `avf_above_trig`, `avf_sub_tick`, `emergency`, `interval_acc` | out | AVF monitor |

The parameters are `N` (96 entries), `INTV` (10,000 cycles) and `T_MISS` (16).
Widths and the thread count come from `iq_pkg`.

## Where this RTL departs from, or adds to, the source design

These sizes come from the source design: 96 entries, 4 contexts, 8-wide
dispatch, issue and commit, a 10K-cycle interval, 5 AVF samples per interval,
a 50-cycle ratio period, an L2-miss threshold of 16 and a trigger at 90%. The
rules of all three mechanisms also come from it. The following are this
implementation's own choices:

* **Entry layout.** The fields, the widths (9-bit tags, 8-bit opcode) and the
  count of 8 ACE bits for an un-ACE instruction.
* **Program order** is dispatch order, kept by an age matrix.
* **RQL in the cap formula** is the interval average. The cap starts at 96.
* **"L2 miss frequency"** is the number of misses per 10K-cycle interval, and
  it takes effect in the next interval.
* **FLUSH removes all of a thread's IQ entries**, not only those younger than
  the missing load. The front end refetches.
* **Sub-interval AVF** uses only that sub-interval's cycles. Thresholds are
  Q0.16, and the trigger is floor(9 x thr / 10).
* **`wq_ratio`** starts at 4 and is 8 bits wide. The division-by-zero rules are
  those given above. DVM rule 3 holds its verdict for 50 cycles.
* **VISA issue is also used under DVM.**
* **Not built:**
  * the STALL, DG and PDG fetch policies, which the source design only
    compares against;
  * a static-ratio variant of DVM;
  * the decoding of the ACE tag from an instruction word, whose encoding is
    not specified. The tag enters as a field of `iq_inst_t`.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module
with a reference computed in the testbench and prints
`TB_RESULT checks=N failures=M`.

* `tb_visa_select`: random dispatch orders and request sets, checked against a
  sorted list (ACE first, then oldest first): grants, ranks and count.
* `tb_issue_queue`: a list model of the queue. Each cycle it checks accepted
  lanes, issued instructions and their lane order, and all counts. It fills
  the queue to 96 entries and checks the full issue width of 8 per cycle.
* `tb_iq_alloc_ctrl`, `tb_opt2_mode_sel`, `tb_ace_avf_monitor`: full
  10K-cycle intervals. They check the interval and sub-interval timing, every
  IPC region, the 16/17-miss boundary, and trigger and emergency on both sides.
* `tb_flush_policy`, `tb_l2_miss_tracker`, `tb_dvm_ctrl`, `tb_serial_divider`
  (7-cycle latency), `tb_icount_select`, `tb_dispatch_gate`.
* `tb_smt_iq_top`: end to end at the default sizes, about 80,000 cycles.
  * **Pipeline model.** The testbench models four instruction streams with
    register dependences, 60% ACE instructions, a 96-instruction window per
    thread, 2-cycle execution and 200-cycle L2 misses.
  * **Checks on every issued instruction.** It was in the queue, its producers
    had finished, and it never issued behind an un-ACE instruction in the same
    cycle.
  * **Drain.** The queue must empty after each run.
  * **Run 1** uses `SCHEME_OPT2`: quiet intervals, then miss-heavy intervals,
    then FLUSH intervals.
  * **Run 2** uses `SCHEME_DVM`, first with a strict target and then with a
    lenient one.
  * **Mechanism counts.** It counts VISA overtaking, cap stalls, FLUSH
    intervals and flushes, DVM ratio stalls, `wq_ratio` halvings, resumes, L2
    stalls and emergencies. Any that never happens is a failure.
* `tb_workload_mix`: CPU, MIX and MEM style mixes at the default sizes.
  * **Thread mixes.** Each thread uses the same model as above. A
    computation-bound thread has no L2-missing loads; a memory-bound thread
    has 1.5% of them. CPU has four computation-bound threads, MIX two of each,
    MEM four memory-bound threads. The benchmark programs themselves cannot be
    run here: that needs the whole core.
  * **Runs.** Each mix runs five intervals under `SCHEME_OPT2`, then five under
    `SCHEME_DVM` with a target of 0.5 times the highest interval AVF seen with
    OPT2.
  * **Report.** It prints IPC, mean AVF and the number of intervals above
    target.
  * **Checks.** The same checks on every issued instruction, plus the drain
    check and a minimum IPC of 0.5. DVM must exceed the target in no more
    intervals than OPT2.
  * **Typical results.** Under OPT2, 5, 5 and 1 of 5 intervals are above
    target for CPU, MIX and MEM. Under DVM none are, at 30-55% lower IPC. The
    run takes about a minute.

Simulation uses Verilator 5 with two-state logic. Registers without a reset
start at random values, and the design resets every register that is read
(only the age-matrix rows, which are rewritten on allocation, are left
unreset). To run a testbench:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/iq_pkg.sv tb/tb_smt_iq_top.sv --top-module tb_smt_iq_top
./obj_dir/Vtb_smt_iq_top
```

Replace `tb_smt_iq_top` with any other testbench name. The end-to-end run
takes about half a minute; the others take a few seconds.

To change a size, edit `iq_pkg.sv` or override the parameters of
`smt_iq_top`. `N`, `INTV` and `T_MISS` are independent. The cap fractions
follow `N` and are floored when `N` is not a multiple of 6.
