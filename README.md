# Criticality-aware scrubbing for SRAM FPGAs

SRAM FPGAs in orbit suffer single-event upsets: a particle flips a bit of the
configuration memory and silently changes the circuit. Scrubbing repairs
this. The configuration frames are read back through the FPGA's internal
configuration port (ICAP) and compared with an original ("golden") copy kept
in an external memory. Any frame that differs is rewritten.

A classic scrubber sweeps the whole device at a constant rate. It knows
nothing about the tasks running on it. A task may then run long after its
frames were last checked, and time is spent scrubbing frames whose task
will not run again for a while.

This design scrubs **per task, at times tied to the task's own execution**.
Each periodic hardware task `tau_i` sits in its own partially reconfigurable
region (PRR), a run of `eta_i` frames. Each task gets a *scrubbing task*
`s_tau_i`. This is a periodic, non-preemptive job that scrubs exactly that
region. Its period `ST_i` is a multiple of the task period `T_i`. Tasks with
higher criticality get shorter scrubbing periods. Each job is placed as late
as possible, so that it ends just before the task job it protects. That
keeps short the time in which an upset can strike unrepaired. Periods and
placement are computed offline. The RTL here stores that schedule and
carries it out cycle by cycle.

## The schedule the hardware carries out

The offline tool outputs two things:

* the scrubbing period of every task. It picks them by solving an integer
  program that minimises `sum(ST_i * criticality_i)` subject to
  `sum(SC_i / ST_i) <= bound`. Here `SC_i` is the scrubbing time of the
  region, at 1 us per frame. The bound is lowered step by step until the
  next stage succeeds.
* a non-preemptive "earliest deadline as late as possible" (EDL) schedule
  over one **LCM interval**, the least common multiple of the scrubbing
  periods. The schedule is periodic with that interval, so one interval
  describes it fully.

Job `p` of `s_tau_i` becomes available at `p*ST_i`. It must finish by
`(p+1)*ST_i`, which is when the protected task job starts. At time 0 all
hardware tasks release their first job.

The hardware does not solve this problem. It holds the result as a table
with one entry per scrubbing job: *(start instant in microseconds inside
the interval, task number)*, sorted by start time. A second table maps each
task number to its region: *(first frame, number of frames)*.

Worked example: a nano-satellite with five tasks.

| task | frames | task period | scrubbing period | scrub time |
|------|-------:|------------:|-----------------:|-----------:|
| 0 control law      |  250 |  50 ms |  50 ms | 0.25 ms |
| 1 IR earth sensor  |  150 | 100 ms | 100 ms | 0.15 ms |
| 2 gyro calibration |  100 | 100 ms | 100 ms | 0.10 ms |
| 3 encryptor        | 1200 |  10 ms |  10 ms | 1.20 ms |
| 4 video encoder    |  800 |  10 ms |  20 ms | 0.80 ms |

* The LCM interval is 100 ms and holds 19 jobs.
* The ICAP is busy 16.75 % of the time.
* The least critical task, 4, is scrubbed only every other period.
* Jobs that share a deadline are stacked back to back, ending at the
  deadline. At 100 ms, for example, the order is task 0 at 97.50 ms,
  1 at 97.75, 2 at 97.90, 3 at 98.00 and 4 at 99.20.

`tb/tb_crit_scrub_top.sv` loads exactly this table.

## Block structure

```
             host: tables, lcm_us, n_entries, enable
                         |
   +---------------------+----------------------------------------+
   | crit_scrub_top                                               |
   |                                                              |
   |  scrub_timebase --time_us, wrap--> scrub_dispatcher          |
   |                                     |   ^                    |
   |              schedule_table <-addr--+   | entry (1 cycle)    |
   |                                     |                        |
   |                       start, task --+--> task_table          |
   |                                     |    (first frame, eta)  |
   |                                     v                        |
   |                               frame_scrubber                 |
   +--------------------------------|----------------|------------+
                                    |                |
                          ICAP command / read /   golden copy
                          write streams           request / response
```

| module | role |
|---|---|
| `scrub_pkg` | shared constants and the `sched_entry_t` / `task_desc_t` structs |
| `scrub_timebase` | divides the clock down to 1 us and counts the time inside the LCM interval |
| `schedule_table` | the job table, a simple dual-port RAM with registered read |
| `task_table` | one region descriptor per task, in flip-flops, read combinationally |
| `scrub_dispatcher` | starts the next job at its instant and repeats the table every interval |
| `frame_scrubber` | read-back, bit-for-bit comparison and rewrite of each frame in a region |
| `crit_scrub_top` | wires these together; brings out the ICAP and golden-copy ports |

The ICAP, the configuration memory and the golden-copy memory are outside
the RTL. The testbenches model them in `tb/icap_model.sv` and
`tb/golden_copy_model.sv`.

## Dispatching: on time, late, and across the interval boundary

`scrub_dispatcher` holds a pointer to the next table entry. The table has a
one-cycle read latency, so an entry is usable two cycles after the pointer
moves. A job starts when all three of these hold:

* the entry is valid;
* `time_us >= start_us`;
* the frame scrubber is idle.

At that point the dispatcher raises `scrub_start` for one cycle and moves
the pointer on. A job that starts on time does so within the first three
cycles of its microsecond. After the last entry the pointer waits for the
interval wrap and then returns to entry 0.

Jobs are never preempted. If a job is still running when the next one is
due, the next job waits until the scrubber is free. It then starts with
`late_start` set and is counted in `late_count`. This happens when a region
needs many rewrites, since a rewritten frame costs about twice a clean one.
If the interval ends while jobs of it are still waiting, the dispatcher
records that it is behind. It finishes those jobs, late, before it takes
entry 0 of the new interval. The offline schedule assumes fixed budgets,
and this late-start policy is this design's own addition.

## Frame scrubbing

For each frame of the region, `frame_scrubber` does the following:

1. It sends an ICAP read command for the frame.
2. It requests the same frame's 81 words from the golden copy.
3. It joins the read-back stream with the golden-response stream: a word
   pair is consumed only when both are valid. Any differing bit marks the
   frame bad.
4. If the frame is bad, it sends an ICAP write command and forwards a second
   golden fetch of the frame to the ICAP write stream.

Then it moves to the next frame. When both memories deliver one word per
cycle, the cost is:

* a clean frame: `WORDS + 3` = 84 cycles. At 100 MHz this is inside the
  1 us per frame that the scrubbing times assume.
* a rewritten frame: about 168 cycles.

The scrubber counts frames checked and frames fixed, and it pulses
`frame_done` / `frame_fixed` for each frame.

All ports use valid/ready handshakes (a transfer happens when both are
high):

* **ICAP command** `icap_cmd_{valid,ready,write,frame}`: `write=0` reads the
  frame back, `write=1` writes it.
* **ICAP data**: a read command is answered by `WORDS` words on
  `icap_rd_*`. A write command expects `WORDS` words on `icap_wr_*`.
* **Golden copy**: requests `gold_req_{frame,word}`, with responses in order
  on `gold_rsp_*`.

A real ICAP has a vendor-specific command protocol (sync words, frame
address register, pad frames). An adapter between this frame-level port and
the primitive is needed and is not part of this RTL.

## Configuration and status

Hold `enable` low while loading. Then:

* write the regions with `task_we`, `task_wr_addr` and `task_wr_data`
  (first frame, count);
* write the jobs with `sched_we`, `sched_wr_addr` and `sched_wr_data`
  (start in us, task), in order of start time;
* set `lcm_us` and `n_entries`.

Raise `enable`: that cycle is time 0, the first release of every hardware
task.

The status outputs are `time_us`, `us_tick`, `lcm_wrap`, `lcm_cycles`,
`scrub_start`, `late_start`, `scrub_task`, `scrub_busy`, `scrub_done`,
`frame_done`, `frame_fixed` and the counters `jobs_count`, `late_count`,
`frames_checked` and `frames_fixed`. Reset (`rst_n`) is synchronous and
active low. It clears all control state. It does not clear the schedule
RAM.

## Parameters

| parameter (top) | default | meaning |
|---|---|---|
| `TICKS` | 100 | clock cycles per microsecond (100 MHz clock) |
| `WORDS` | 81 | 32-bit words per configuration frame (2,592 bits) |
| `N_TASKS` | 20 | task descriptors (largest task set evaluated) |
| `DEPTH`, `AW` | 4096, 12 | schedule table entries and address bits |

Other widths are fixed in `scrub_pkg`:

* 15-bit frame addresses, for a 30,000-frame device;
* 5-bit task numbers;
* 32-bit microsecond time stamps.

## What follows the method and what is this design's choice

These parts follow the method:

* one scrubbing job per task region, non-preemptive;
* jobs released from a stored schedule that repeats every LCM interval,
  with time 0 tied to the first task release;
* 81-word frames, a 30,000-frame device, 1 us per frame, up to 20 tasks;
* read-back, compare against the golden copy, correct on mismatch.

These parts are this design's own choices:

* the 100 MHz clock;
* the table formats and depth;
* regions as contiguous frame ranges;
* the valid/ready port protocols;
* the late-start policy;
* read-back comparison rather than blind rewriting. The method says only
  that faults are detected and then corrected from the golden copy.

Not included:

* the offline period and schedule computation (an ILP solver plus an EDL
  schedule check). It is software and its output is the two tables.
* the ICAP primitive and the golden-copy memory chip, which are vendor or
  off-chip parts.
* the user tasks themselves.

The table depth of 4,096 jobs holds the case study (19 jobs) with a wide
margin. Task sets whose LCM interval spans many seconds with short periods
can need more entries. Raise `DEPTH`/`AW` for those.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/scrub_pkg.sv tb/scrub_tb_pkg.sv tb/tb_crit_scrub_top.sv \
  --top-module tb_crit_scrub_top
./obj_dir/Vtb_crit_scrub_top
```

| testbench | what it exercises |
|---|---|
| `tb_scrub_timebase` | tick, time, wrap and interval count against a cycle count, three interval lengths |
| `tb_schedule_table` | write/read-back and read-during-write behaviour |
| `tb_task_table` | reset value, random writes, out-of-range writes ignored |
| `tb_scrub_dispatcher` | a five-job table over four intervals, with an overrun inside an interval and one across the wrap |
| `tb_frame_scrubber` | full-size frames, random upsets inside and next to the region, empty job, random back-pressure |
| `tb_crit_scrub_top` | the five-task case study at default parameters, two 100 ms intervals (20 M cycles, about 20 s) |
| `tb_workload_synthetic` | randomly generated task sets like those of the evaluation: planned in the testbench, then run for one interval each |

The end-to-end test injects scattered upsets, and 60 bad frames into task
0 just before its last job. That job overruns its 250 us budget, and the
next job starts late. The test checks:

* every job's task and start instant;
* that on-time jobs end before the task job they protect;
* that every region is clean after its job;
* that a frame outside all regions is never touched;
* the totals (16,750 frames scrubbed per interval);
* that each mechanism occurred: on-time start, late start, clean frame,
  rewritten frame, interval wrap, every task scrubbed.

`tb_workload_synthetic` plans each task set in the testbench and then runs
it on the hardware. It draws sets of 5 and 20 tasks with 1,000 to 2,000
frames each and periods of 10, 20, 25 or 50 ms. The period list is limited
so that one interval stays at 100 ms. Criticality is assigned as 1, `i` or
`i*i`. For each set it:

* chooses the scrubbing periods for a utilisation bound of 100 % or 20 %;
* builds the as-late-as-possible schedule backwards from the end of the
  interval;
* lowers the bound by 0.05 whenever the schedule fails;
* loads the result and runs the hardware.

It checks:

* exact start instants;
* no late starts;
* every job done by its deadline;
* the number of jobs per task;
* that the measured scrubber busy time stays within the planned
  utilisation.

The models in `tb/` compute the golden configuration from the address, as
`golden_word()` in `tb/scrub_tb_pkg.sv`. Upsets are held in a sparse
associative array, so full-size devices cost no memory.
