// tb_scrub_dispatcher: runs a five-job schedule over four LCM intervals
// against a scrubber model whose job lengths are chosen so that one job
// starts late behind an overrunning job, and one job of an interval is only
// dispatched after the next interval has begun. Checks the order and task of
// every started job, the late flag, the start instant of on-time jobs (first
// cycles of their microsecond), that late jobs start right after the
// scrubber frees up, and the job and late counters.
module tb_scrub_dispatcher;
  import scrub_pkg::*;

  localparam int unsigned AW = 4, TICKS = 8, LCM = 50, NE = 5, NINT = 4;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic [AW:0] n_entries = AW'(NE);
  time_us_t time_us;
  logic wrap;
  logic [AW-1:0] tbl_rd_addr;
  sched_entry_t tbl_rd_data;
  logic scrub_busy;
  logic scrub_start, late_start;
  task_id_t scrub_task;
  logic [31:0] jobs_count, late_count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scrub_dispatcher #(.AW(AW)) dut (.*);

  // Schedule: start instants and tasks.
  int unsigned st [NE] = '{3, 10, 11, 30, 49};
  int unsigned tk [NE] = '{7, 2, 4, 1, 9};
  // Job length in microseconds (default: 2 cycles).
  function automatic int unsigned dur_cycles(int unsigned j);
    case (j)
      6:  return 3 * TICKS + 2;   // interval 1, entry 1 overruns into entry 2
      9:  return 3 * TICKS;       // interval 1, entry 4 runs across the wrap
      13: return 22 * TICKS;      // interval 2, entry 3 pushes entry 4 past the wrap
      default: return 2;
    endcase
  endfunction
  function automatic bit exp_late(int unsigned j);
    return (j == 7) || (j == 14);
  endfunction

  // Table model with one-cycle read latency.
  sched_entry_t tbl [1 << AW];
  always_ff @(posedge clk) tbl_rd_data <= tbl[tbl_rd_addr];

  // Time base model.
  int unsigned c = 0;
  always_ff @(posedge clk) if (enable) c <= c + 1;
  assign time_us = time_us_t'((c / TICKS) % LCM);
  assign wrap    = enable && (c % TICKS == 0) && (c > 0) && ((c / TICKS) % LCM == 0);

  // Scrubber model.
  int unsigned left = 0, idle_for = 0, j = 0;
  assign scrub_busy = (left != 0);
  always_ff @(posedge clk) begin
    if (scrub_start) left <= dur_cycles(j - 1);  // j already counts this job
    else if (left != 0) left <= left - 1;
    idle_for <= scrub_busy ? 0 : idle_for + 1;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s (job %0d) at %0t", what, j, $time);
    end
  endtask

  always @(negedge clk) if (rst_n && scrub_start) begin
    int unsigned e;
    e = j % NE;
    check(scrub_task == task_id_t'(tk[e]), "task");
    check(late_start == exp_late(j), "late flag");
    if (!exp_late(j)) begin
      check(time_us == st[e], "start instant");
      check(c % TICKS < 3, "start within the microsecond");
    end else begin
      check(idle_for <= 1, "late job starts when scrubber frees up");
    end
    j++;
  end

  initial begin
    for (int i = 0; i < NE; i++) begin
      tbl[i].start_us = st[i];
      tbl[i].task_id  = task_id_t'(tk[i]);
    end
    for (int i = NE; i < (1 << AW); i++) tbl[i] = '{start_us: 0, task_id: 31};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    enable = 1'b1;
    wait (c == NINT * LCM * TICKS + 2 * TICKS);
    @(negedge clk);
    check(j == NINT * NE, "number of starts");
    check(jobs_count == NINT * NE, "jobs_count");
    check(late_count == 2, "late_count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NINT * LCM * TICKS + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
