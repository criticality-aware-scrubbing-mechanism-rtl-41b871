// tb_workload_synthetic: synthetic task sets of the experimental evaluation,
// run on the full-size scrubbing module (default parameters).
//
// For each run the testbench draws a task set, plans it offline the way the
// method does, loads the plan and runs one LCM interval of the hardware:
//
//   * task set: eta_i a multiple of 100 frames, uniform in 1,000..2,000
//     (1,000..1,500 for 20 tasks so that the set fits the 30,000-frame
//     device); period T_i a multiple of 5 ms. To keep one LCM interval at
//     100 ms (10 M cycles) the periods are drawn from {10, 20, 25, 50} ms and
//     scrubbing periods from the multiples of T_i that divide 100 ms.
//   * criticality: method i^0 (all 1), i^1 (task i gets i) or i^2 (i*i).
//   * periods: choose ST_i minimising sum(ST_i * crit_i) subject to
//     sum(SC_i / ST_i) <= bound, SC_i = eta_i us. Exhaustive search for five
//     tasks; for more, a greedy search that repeatedly lengthens the period
//     whose step costs least objective per unit of utilisation saved.
//   * schedule: non-preemptive, as late as possible, built backwards from
//     the end of the interval. At each point the job with the latest release
//     among those whose deadline has been reached goes next (ties: higher
//     task index nearer the deadline). A job that would start before its
//     release makes the set unschedulable; the bound is then lowered by 0.05
//     and the planning repeated, as in the method's iterative heuristic.
//
// The hardware run checks that every job starts at its table instant, none
// starts late, every job ends by its deadline, every region is scrubbed the
// planned number of times, a few injected upsets are all repaired, and that
// the measured scrubbing busy time stays within the planned utilisation.
module tb_workload_synthetic;
  import scrub_pkg::*;

  localparam int unsigned LCM = 100_000;  // us
  localparam int unsigned MAXN = MAX_TASKS, MAXJ = 1024;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  time_us_t lcm_us = LCM;
  logic [SCHED_AW:0] n_entries = '0;
  logic sched_we = 1'b0, task_we = 1'b0;
  logic [SCHED_AW-1:0] sched_wr_addr = '0;
  sched_entry_t sched_wr_data = '0;
  task_id_t task_wr_addr = '0;
  task_desc_t task_wr_data = '0;
  logic icap_cmd_valid, icap_cmd_ready, icap_cmd_write;
  frame_addr_t icap_cmd_frame;
  logic icap_rd_valid, icap_rd_ready, icap_wr_valid, icap_wr_ready;
  word_t icap_rd_data, icap_wr_data;
  logic gold_req_valid, gold_req_ready, gold_rsp_valid, gold_rsp_ready;
  frame_addr_t gold_req_frame;
  word_idx_t gold_req_word;
  word_t gold_rsp_data;
  logic us_tick, lcm_wrap, scrub_start, late_start, scrub_busy, scrub_done;
  logic frame_done, frame_fixed;
  time_us_t time_us;
  task_id_t scrub_task;
  logic [31:0] lcm_cycles, jobs_count, late_count, frames_checked, frames_fixed;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  crit_scrub_top dut (.*);

  icap_model icap (
    .clk, .rst_n, .stall(1'b0),
    .cmd_valid(icap_cmd_valid), .cmd_ready(icap_cmd_ready), .cmd_write(icap_cmd_write),
    .cmd_frame(icap_cmd_frame), .rd_valid(icap_rd_valid), .rd_ready(icap_rd_ready),
    .rd_data(icap_rd_data), .wr_valid(icap_wr_valid), .wr_ready(icap_wr_ready),
    .wr_data(icap_wr_data)
  );

  golden_copy_model gold (
    .clk, .rst_n, .stall(1'b0),
    .req_valid(gold_req_valid), .req_ready(gold_req_ready), .req_frame(gold_req_frame),
    .req_word(gold_req_word), .rsp_valid(gold_rsp_valid), .rsp_ready(gold_rsp_ready),
    .rsp_data(gold_rsp_data)
  );

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- task set
  int unsigned n;
  int unsigned eta [MAXN], per [MAXN], crit [MAXN], st [MAXN], base [MAXN];
  real bound;

  // Scrubbing period candidates for a task period: multiples dividing LCM.
  function automatic int unsigned n_cand(int unsigned t);
    int unsigned c = 0;
    for (int unsigned m = 1; m * t <= LCM; m++) if (LCM % (m * t) == 0) c++;
    return c;
  endfunction
  function automatic int unsigned cand(int unsigned t, int unsigned k);
    int unsigned c = 0;
    for (int unsigned m = 1; m * t <= LCM; m++)
      if (LCM % (m * t) == 0) begin
        if (c == k) return m * t;
        c++;
      end
    return LCM;
  endfunction

  function automatic real util(int unsigned s [MAXN]);
    real u = 0.0;
    for (int i = 0; i < n; i++) u += real'(eta[i]) / real'(s[i]);
    return u;
  endfunction

  // Period selection for the current bound; returns 0 if nothing fits.
  function automatic bit find_periods();
    int unsigned s [MAXN];
    int unsigned k [MAXN];
    if (n <= 5) begin
      longint best = -1;
      int unsigned total = 1;
      for (int i = 0; i < n; i++) total *= n_cand(per[i]);
      for (int unsigned code = 0; code < total; code++) begin
        int unsigned c = code;
        longint obj = 0;
        for (int i = 0; i < n; i++) begin
          s[i] = cand(per[i], c % n_cand(per[i]));
          c /= n_cand(per[i]);
          obj += longint'(s[i]) * crit[i];
        end
        if (util(s) <= bound + 1e-9 && (best < 0 || obj < best)) begin
          best = obj;
          for (int i = 0; i < n; i++) st[i] = s[i];
        end
      end
      return best >= 0;
    end else begin
      for (int i = 0; i < n; i++) begin k[i] = 0; s[i] = cand(per[i], 0); end
      while (util(s) > bound + 1e-9) begin
        int bi = -1;
        real bcost = 0.0;
        for (int i = 0; i < n; i++) if (k[i] + 1 < n_cand(per[i])) begin
          int unsigned nx = cand(per[i], k[i] + 1);
          real saved = real'(eta[i]) / real'(s[i]) - real'(eta[i]) / real'(nx);
          real cost = (real'(nx - s[i]) * real'(crit[i]) + 1e-3) / saved;
          if (bi < 0 || cost < bcost) begin bi = i; bcost = cost; end
        end
        if (bi < 0) return 1'b0;
        k[bi]++;
        s[bi] = cand(per[bi], k[bi]);
      end
      for (int i = 0; i < n; i++) st[i] = s[i];
      return 1'b1;
    end
  endfunction

  // ---------------------------------------------------------------- schedule
  int unsigned nj;
  int unsigned j_task [MAXJ], j_rel [MAXJ], j_dl [MAXJ], j_start [MAXJ];

  // Backward as-late-as-possible schedule; table sorted by start afterwards.
  function automatic bit edl_schedule();
    bit done [MAXJ];
    int unsigned cur = LCM;
    nj = 0;
    for (int i = 0; i < n; i++)
      for (int unsigned p = 0; p < LCM / st[i]; p++) begin
        j_task[nj] = i;
        j_rel[nj]  = p * st[i];
        j_dl[nj]   = (p + 1) * st[i];
        done[nj]   = 1'b0;
        nj++;
      end
    for (int unsigned left = nj; left > 0; left--) begin
      int pick = -1;
      int unsigned latest_dl = 0;
      for (int q = 0; q < nj; q++) if (!done[q] && j_dl[q] > latest_dl) latest_dl = j_dl[q];
      if (latest_dl < cur) cur = latest_dl;
      for (int q = 0; q < nj; q++)
        if (!done[q] && j_dl[q] >= cur &&
            (pick < 0 || j_rel[q] > j_rel[pick] ||
             (j_rel[q] == j_rel[pick] && j_task[q] > j_task[pick])))
          pick = q;
      if (cur < eta[j_task[pick]] || cur - eta[j_task[pick]] < j_rel[pick]) return 1'b0;
      cur -= eta[j_task[pick]];
      j_start[pick] = cur;
      done[pick] = 1'b1;
    end
    // sort by start
    for (int a = 0; a < nj; a++)
      for (int b = a + 1; b < nj; b++)
        if (j_start[b] < j_start[a]) begin
          int unsigned t;
          t = j_start[a]; j_start[a] = j_start[b]; j_start[b] = t;
          t = j_task[a];  j_task[a]  = j_task[b];  j_task[b]  = t;
          t = j_rel[a];   j_rel[a]   = j_rel[b];   j_rel[b]   = t;
          t = j_dl[a];    j_dl[a]    = j_dl[b];    j_dl[b]    = t;
        end
    return 1'b1;
  endfunction

  // ---------------------------------------------------------------- monitor
  int unsigned mj, busy_cycles, cur_job, late_seen, done_seen;
  int unsigned scrubbed [MAXN];
  bit running = 1'b0;
  always @(negedge clk) if (running) begin
    if (scrub_busy) busy_cycles++;
    if (scrub_start) begin
      check(mj < nj, "job within table");
      if (mj < nj) begin
        check(scrub_task == task_id_t'(j_task[mj]), "job task");
        check(time_us == j_start[mj], "job start instant");
      end
      if (late_start) late_seen++;
      cur_job = mj;
      mj++;
    end
    if (scrub_done) begin
      // done is seen one cycle after the last frame: still inside the interval
      check(lcm_cycles == 0 && time_us < j_dl[cur_job], "job ends by its deadline");
      check(icap.upsets_in(base[j_task[cur_job]], eta[j_task[cur_job]]) == 0, "region clean");
      scrubbed[j_task[cur_job]]++;
      done_seen++;
    end
  end

  int unsigned runs_done = 0, iterations_total = 0, relaxed_runs = 0;

  task automatic run(int unsigned ntasks, int unsigned method, real max_util);
    int unsigned frames, iter;
    bit ok;
    int unsigned fc0;
    n = ntasks;
    frames = 0;
    for (int i = 0; i < n; i++) begin
      int unsigned hi = (n > 10) ? 15 : 20;
      int unsigned pset [4] = '{10_000, 20_000, 25_000, 50_000};
      eta[i]  = 100 * $urandom_range(10, hi);
      per[i]  = pset[$urandom_range(3)];
      crit[i] = (method == 0) ? 1 : (method == 1) ? i : i * i;
      base[i] = frames;
      frames += eta[i];
    end
    check(frames <= N_FRAMES, "task set fits the device");
    // Algorithm: lower the bound until the set is schedulable.
    bound = max_util;
    iter = 0;
    do begin
      iter++;
      ok = find_periods() && edl_schedule();
      if (!ok) bound -= 0.05;
    end while (!ok && bound > 0.0);
    check(ok, "planning found a schedule");
    iterations_total += iter;
    if (iter > 1) relaxed_runs++;
    check(nj <= SCHED_DEPTH, "schedule fits the table");
    $display("run: %0d tasks, method i^%0d, max util %0.2f -> bound %0.2f, %0d iterations, %0d jobs, planned util %0.3f",
             n, method, max_util, bound, iter, nj, util(st));
    // load
    @(negedge clk);
    enable = 1'b0;
    for (int i = 0; i < n; i++) begin
      task_we = 1'b1;
      task_wr_addr = task_id_t'(i);
      task_wr_data = '{frame_base: frame_addr_t'(base[i]), frame_count: frame_addr_t'(eta[i])};
      @(negedge clk);
    end
    task_we = 1'b0;
    for (int q = 0; q < nj; q++) begin
      sched_we = 1'b1;
      sched_wr_addr = SCHED_AW'(q);
      sched_wr_data = '{start_us: j_start[q], task_id: task_id_t'(j_task[q])};
      @(negedge clk);
    end
    sched_we = 1'b0;
    n_entries = (SCHED_AW + 1)'(nj);
    // a few upsets, one frame each in random regions
    for (int u = 0; u < 3; u++)
      icap.inject(frame_addr_t'($urandom_range(frames - 1)), $urandom_range(FRAME_WORDS - 1), 32'h10);
    for (int i = 0; i < n; i++) scrubbed[i] = 0;
    mj = 0; busy_cycles = 0; late_seen = 0; done_seen = 0;
    fc0 = frames_checked;
    running = 1'b1;
    enable = 1'b1;
    wait (lcm_cycles == 1);
    @(negedge clk);
    running = 1'b0;
    check(mj == nj && done_seen == nj, "all jobs ran");
    check(late_seen == 0 && late_count == 0, "no late start");
    for (int i = 0; i < n; i++) check(scrubbed[i] == LCM / st[i], "jobs per task");
    begin
      int unsigned expect_frames = 0;
      for (int i = 0; i < n; i++) expect_frames += eta[i] * (LCM / st[i]);
      check(frames_checked - fc0 == expect_frames, "frames scrubbed");
    end
    check(icap.upsets_total() == 0, "all upsets repaired");
    check(real'(busy_cycles) <= util(st) * real'(LCM * TICKS_PER_US), "busy time within planned utilisation");
    $display("     measured scrubber busy %0.3f of the interval", real'(busy_cycles) / real'(LCM * TICKS_PER_US));
    runs_done++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int method = 0; method < 3; method++) run(5, method, 1.0);
    run(5, 2, 0.2);
    run(20, 2, 1.0);
    check(runs_done == 5, "all runs completed");
    $display("planning iterations over all runs: %0d, runs that needed a lower bound: %0d",
             iterations_total, relaxed_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5 * (LCM * TICKS_PER_US + 50_000)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
