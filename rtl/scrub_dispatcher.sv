// scrub_dispatcher: releases the scrubbing jobs of the stored schedule.
//
// The schedule table lists the scrubbing jobs of one LCM interval in order
// of start time. The dispatcher keeps a pointer to the next job, reads its
// entry and, as soon as the time base reaches the entry's start instant and
// the frame scrubber is idle, starts the job (one-cycle scrub_start with the
// task identifier) and moves to the next entry. After the last entry it
// waits for the time base to start the next LCM interval and begins again at
// entry 0, so the schedule repeats every interval as the source description
// requires.
//
// Scrubbing jobs are not preempted: a job always runs to its end. If a job
// is still running when the next one is due (it took longer than its
// budget, for instance because faulty frames had to be rewritten), the due
// job starts as soon as the scrubber is free and is counted as a late start.
// If the interval ends while jobs of it are still pending, they are still
// dispatched, in order, before the new interval's first entry; these are
// late as well. Late starts are this design's policy: the source
// description schedules with fixed budgets and does not say what happens
// when a budget is exceeded.
//
// Timing: the table has a one-cycle read latency, so an entry becomes valid
// the second cycle after the pointer moves. A job whose start instant is t
// starts within the first three cycles of microsecond t when the scrubber is
// idle. scrub_busy must rise the cycle after scrub_start.
module scrub_dispatcher
  import scrub_pkg::*;
#(
  parameter int unsigned AW = SCHED_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic [AW:0]   n_entries,    // jobs in one LCM interval
  input  time_us_t      time_us,      // from the time base
  input  logic          wrap,         // new LCM interval
  output logic [AW-1:0] tbl_rd_addr,
  input  sched_entry_t  tbl_rd_data,  // entry at tbl_rd_addr, one cycle later
  input  logic          scrub_busy,
  output logic          scrub_start,
  output task_id_t      scrub_task,
  output logic          late_start,   // with scrub_start: the job starts late
  output logic [31:0]   jobs_count,
  output logic [31:0]   late_count
);

  logic [AW:0] ptr_q;
  logic        ent_ok_q;   // tbl_rd_data belongs to ptr_q
  logic        behind_q;   // jobs of the previous interval still pending

  assign tbl_rd_addr = ptr_q[AW-1:0];

  logic due;
  always_comb begin
    due = ent_ok_q && (ptr_q < n_entries) &&
          (behind_q || (time_us >= tbl_rd_data.start_us));
  end

  assign scrub_start = due && !scrub_busy;
  assign scrub_task  = tbl_rd_data.task_id;
  assign late_start  = scrub_start && (behind_q || (time_us != tbl_rd_data.start_us));

  always_ff @(posedge clk) begin
    if (!rst_n || !enable) begin
      ptr_q      <= '0;
      ent_ok_q   <= 1'b0;
      behind_q   <= 1'b0;
      jobs_count <= '0;
      late_count <= '0;
    end else begin
      logic [AW:0] nptr;
      logic        nbehind;
      logic        moved;
      nptr    = ptr_q;
      nbehind = behind_q;
      moved   = 1'b0;
      if (scrub_start) begin
        nptr       = ptr_q + 1'b1;
        moved      = 1'b1;
        jobs_count <= jobs_count + 1'b1;
        if (late_start) late_count <= late_count + 1'b1;
      end
      if (wrap) begin
        if (nptr >= n_entries) begin
          nptr  = '0;
          moved = 1'b1;
        end else begin
          nbehind = 1'b1;
        end
      end else if (nbehind && (nptr >= n_entries)) begin
        nptr    = '0;
        nbehind = 1'b0;
        moved   = 1'b1;
      end
      ptr_q    <= nptr;
      behind_q <= nbehind;
      ent_ok_q <= !moved;
    end
  end

  // A job is only started when its entry is valid and the scrubber is free.
  assert property (@(posedge clk) disable iff (!rst_n)
                   scrub_start |-> ent_ok_q && !scrub_busy);

endmodule
