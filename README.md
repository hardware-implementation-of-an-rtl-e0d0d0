# EDF task scheduler in hardware

A real-time operating system using Earliest Deadline First (EDF) scheduling has
to do two things each time a task becomes ready, is suspended or ends. It must
find the ready task with the earliest absolute deadline, which runs next. It
must also check that the task set is still feasible: run back to back in
deadline order, starting now, every task must finish by its deadline. In
software this costs O(n²) work on the CPU that is meant to run the tasks.
This RTL moves the work into a scheduling coprocessor. The host processor writes
the ready tasks into a table, pulses `start`, and a few hundred clocks later
(or a few dozen) reads back the task to run and a violation flag.

The feasibility rule, for tasks sorted by deadline `d_1 <= d_2 <= ... <= d_n`
with remaining execution times `c_k`:

    now + c_1 + ... + c_k  <=  d_k      for every k = 1 .. n

The coprocessor holds two engines that solve the same problem with opposite
trade-offs. The algorithms and their cycle counts follow the article
"Hardware Implementation of an Earliest Deadline First Task Scheduling
Algorithm". The RTL itself, and every detail that article leaves open, are
this design's own.

| engine | module | idea | clocks for n tasks | n = 32 | size grows with n |
|---|---|---|---|---|---|
| 1 | `edf1_scheduler` | pipelined selection sort of the table in RAM | n(n+1)/2 + 2n | 592 | no (only RAM depth) |
| 2 | `edf2_scheduler` | parallel insertion into a chain of N cells | 2n + 1 | 65 | yes, one cell per task |

Both engines give the same answer for the same table: the same next task and
the same violation flag. The end-to-end testbench checks this on every
round.

## Task records and time

All times share one unsigned unit and width, `TIME_W` = 16 bits (`edf_pkg`):
the current time, absolute deadlines and remaining execution times. Execution
times are intervals; deadlines are absolute. Each engine therefore starts
its running sum at the current time, which it samples from the shared
`time_counter` in the `start` cycle. Running sums (`cum_t`) are `TIME_W + 6`
bits wide, so even 32 maximal execution times cannot overflow them. Absolute
time itself is not protected against wrap-around. The host must keep
deadlines and the current time within one 2^16 window, or widen `TIME_W`.

A table entry (`task_t`) holds:

| field | width | meaning |
|---|---|---|
| `active` | 1 | task is ready; inactive entries are ignored by both engines |
| `tid` | 8 | task identifier, returned as `next_tid` |
| `dl` | 16 | absolute deadline |
| `ex` | 16 | remaining execution time |

Each engine keeps its table in two dual-port block RAMs (`taskinfo_ram`). One
holds the deadlines. The other holds `{active, tid, ex}`. The tasks to
consider sit in entries `0 .. count-1`, and `count` is given with `start`.

## Engine 1: pipelined selection sort

Engine 1 sorts the table in place and checks feasibility along the way. It
uses the straight-selection form of the sort, because that form needs only
one RAM read per inner-loop step:

    cum = now
    for i = 0 .. n-1:
        moved = T[i]; min = T[i]; min_idx = i
        for j = i+1 .. n-1:
            if T[j] is earlier than min: min = T[j]; min_idx = j
        T[min_idx] = moved;  T[i] = min        -- one clock, two RAM ports
        cum += min.ex;  if cum > min.dl: error  -- same clock

Here "earlier" means active, with either an inactive current minimum or a
strictly smaller deadline. On equal deadlines the lower index therefore
wins, and inactive entries sink to the end. The outer iteration with i = 0
yields the next task.

The loop body is a four-stage pipeline: read, compare, feasibility check, and
write. The check and the write share one clock. For four tasks the slots are:

    clock     1  2  3  4  5  6  7  8  9 10 11 12 13 14 15 16 17 18
    read      0  1  2  3        1  2  3        2  3        3
    compare      0  1  2  3        1  2  3        2  3        3
    check+wr                 *              *           *        *

Outer iteration i takes (n - i) read slots, one slot to compare the last
element and one write slot. The next iteration's first read comes only after
the write, so it sees the swapped table. A whole run takes
n(n+1)/2 + 2n clocks whatever the data, counted from the `start` clock (the
first read slot) to the `done` clock.

Sub-blocks, matching the engine's block diagram:

- `edf1_loop_gen` generates the loop indices i and j and the slot types
  (`rd_en`, `first`, `ew`).
- `edf1_read` turns j into a RAM address. It delays the index and the
  `first` flag by the one-clock RAM read latency.
- `edf1_compare` holds the `moved`, `min` and `min_idx` registers.
- `edf1_feasibility` holds the cumulative finish time and produces `viol`
  in the write slot.
- `edf1_control` is the host handshake. It holds `next_tid`, `next_valid`
  and the sticky `err` until the next start.

In the write slot, port A writes the minimum to place i. Port B writes the
displaced element to `min_idx`, but only if that differs from i. While idle,
the host reads and writes the table through port A, so after a run it can
read the table back in deadline order.

## Engine 2: ordered list of evaluation cells

Engine 2 never sorts in memory. It reads the table in order, one entry per
two clocks, and inserts each task into a hardware list kept in deadline
order. The list is `N` cells (`edf_cell`) chained head to tail
(`edf_task_list`). Each cell holds:

- `valid`
- `tid`
- `dl`
- `cet`: the cumulative finish time of this task, meaning the current time
  plus the execution times of this task and of every task ahead of it in the
  list.

Every cell sees two sets of inputs:

- the common bus, carrying the task being inserted (`cur`);
- the previous cell's contents and mark (`prev`, `prev_mark`).

The head cell's predecessor is a constant. It is a valid, unmarked cell
whose `cet` is the current time sampled at start.

Inserting one task takes two clocks, whatever the list length.

1. **Mark** (`mark_en`). Each cell sets `dl_mark` if it is empty or its
   deadline is strictly later than the bus deadline. The marked cells form
   a contiguous tail of the list, because the list is sorted and empty cells
   come last. An inactive bus task marks nothing.
2. **Shift and add** (`shift_en`). Every marked cell loads new contents:
   - If the previous cell is also marked, the cell takes over the previous
     cell's `valid`, `tid` and `dl`. This shifts the tail one place back.
   - If the previous cell is unmarked, the cell is the gap and takes the bus
     task.
   - In both cases its new `cet` is `prev.cet + cur.ex`.
3. **Check** (combinational). Each cell's `err_mark` is
   `valid && cet > dl`. The engine's `err` is the OR over all cells.

The single rule for `cet` does two jobs, which is the subtle point of the
design:

- A task that moves back one place carries its old sum with it, because
  `prev.cet` is the old `cet` of that same task. Adding `cur.ex` accounts
  for the new task now ahead of it.
- The gap cell's predecessor is the last task with an earlier or equal
  deadline, so `prev.cet + cur.ex` is exactly the new task's own cumulative
  finish time.
- If the new task lands at the head, the predecessor is the constant input,
  so its `cet` becomes now + its execution time.

Cells ahead of the gap keep their values, which stay correct, since nothing
was inserted ahead of them.

Example: the current time is 100, and the list holds A(dl 300, cet 150) and
B(dl 400, cet 250). Inserting C(dl 250, ex 120) marks both cells and the first
empty cell:

| place | before | after shift/add |
|---|---|---|
| 0 | A 300 / 150 | C 250 / 100+120 = 220 |
| 1 | B 400 / 250 | A 300 / 150+120 = 270 |
| 2 | empty | B 400 / 250+120 = 370 |

No cell has `cet > dl`, so the set stays feasible.

The sequencer `edf2_control` does the following:

- In the `start` clock it clears the list, samples the time and reads table
  entry 0.
- It then alternates mark and shift clocks. In each shift clock it reads the
  next entry.
- It pulses `done` one clock after the last shift, 2n + 1 clocks after
  `start`.

The list keeps its contents after the run and forms the result:

- The head cell gives `next_tid` and `next_valid`.
- The OR of the `err_mark` outputs gives `err`.
- `sorted[]` and `err_marks[]` expose every place.

The host uses RAM port B at any time, but writes only while the engine is
idle. This engine leaves the table unchanged.

## Host protocol (both engines)

1. While `busy` is low, write entries with `host_en = host_we = 1`,
   `host_addr` and `host_wdata`.
2. Pulse `start` for one clock with `count` = number of entries to consider.
   A `start` while busy is ignored.
3. Wait for the one-clock `done` pulse. `next_tid` is valid when `next_valid`
   is set (at least one active task). `err` is set if any active task would
   miss its deadline. All three stay put until the next `start`.
4. Optionally read entries back (`host_en = 1`, `host_we = 0`). The data
   arrives on `host_rdata` one clock later.

`edf_top` instantiates one shared `time_counter` and both engines:

- The time counter counts `tick` pulses, and `time_load`/`time_value` load
  it.
- Engine 1's ports have the prefix `s1_` and engine 2's the prefix `s2_`.

The reset `rst_n` is asynchronous and active low.

## Parameters

- `N` (default 32) sets the table depth of each engine and the number of list
  cells. It must not exceed `edf_pkg::MAX_TASKS` (32), which sizes the index
  width (`IDX_W` = 6) and the extra bits of the running sums.
- To go beyond 32 tasks, raise `MAX_TASKS` in `edf_pkg`.
- `TIME_W` and `TID_W` are set in `edf_pkg`.

Engine 1's logic does not depend on `N`. Engine 2 grows linearly: each cell
has three registers, a comparator for the deadline mark, an adder and a
comparator for the violation check.

## Departures from the published description and choices made here

- **Clocking of engine 2.** The original reaches two clocks per task by
  using both clock edges. Here a single rising edge gives the same count:
  mark in one clock, then shift and add merged into the next, with the
  violation compare combinational.
- **Final iteration of engine 1.** The published pseudo code stops its
  outer loop at n-1, but its pipeline schedule runs the check-and-write slot
  for the last element too. The schedule is followed, so the last task is
  also checked.
- **Active flag.** The original leaves the active test out of its listings.
  Here it is a bit in each entry, applied to both the comparison and the
  feasibility check. Inactive tasks still take their read slots in engine 1
  and their two clocks in engine 2.
- **Result format.** The result is a task identifier stored with each
  entry, not a table index. This keeps the identity of each task after
  engine 1 has reordered the table.
- **Open details.** These are all this design's own:
  - the widths;
  - the host port protocol;
  - the time counter's tick/load interface and the one counter shared by
    both engines;
  - sampling the time at `start`;
  - the RAM collision rules (read-first, port B wins).
- **Not built:**
  - the first, swap-based double loop and the plain (non-pipelined)
    selection sort, which are stepping stones to engine 1;
  - a continuously maintained list with task removal, suspension and
    execution-time counters, which is proposed only as future work;
  - the host processor itself.
- **Area.** Area figures for the original FPGA target are not reproduced.
  Cycle counts are: 592 and 65 clocks for 32 tasks here, against roughly 600
  and 65 reported.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one prints `TB_RESULT checks=N failures=M` and has a watchdog. `edf_ref_pkg`
is an independent reference model: a stable insertion sort of the active
tasks, then running sums from the current time.

- `tb_edf_top` runs the whole coprocessor at its default size (N = 32). It
  loads the same random task set into both engines and starts them
  together. It checks:
  - both run times exactly (including 592 and 65 clocks at n = 32);
  - next task, violation flag, engine 2's whole list and engine 1's sorted
    table against the model;
  - that every mechanism occurred: swaps and in-place write-backs in the
    sort, violations, skipped inactive tasks, insertion at the head, middle
    and tail, and time counter ticks and loads.
- `tb_edf_run_time_sweep` runs both engines at the default size for every
  task count from 1 to 32. It checks both closed-form run times and prints
  the run-time table. At 32 tasks that table shows 592 against 65 clocks.
  Below three tasks the two engines are nearly equal (3 against 3 clocks
  for one task, 7 against 5 for two).
- `tb_edf1_scheduler` and `tb_edf2_scheduler` do the same per engine at
  N = 8, with more rounds.
- The block testbenches check each unit against its own model, cycle by
  cycle. They include the slot stream of `edf1_loop_gen` and every
  mark/shift case of `edf_cell`.

To run one with Verilator:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/edf_pkg.sv tb/edf_ref_pkg.sv tb/tb_edf_top.sv --top-module tb_edf_top
    ./obj_dir/Vtb_edf_top

Not verified:

- timing closure or area on any device;
- behaviour when absolute time wraps around;
- `count` above `N`, which an assertion in `edf2_scheduler` flags.
