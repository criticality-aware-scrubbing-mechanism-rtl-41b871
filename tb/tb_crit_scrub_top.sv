// tb_crit_scrub_top: end-to-end run of the nano-satellite case study with
// every parameter at its default (100 cycles per microsecond, 81-word
// frames).
//
// Five hardware tasks occupy consecutive PRRs of 250, 150, 100, 1200 and
// 800 frames. Their scrubbing periods are 50, 100, 100, 10 and 20 ms, so the
// LCM interval is 100 ms and one interval holds 19 scrubbing jobs, each
// placed as late as possible before the task job it protects; jobs that
// share a deadline are stacked with the higher task index nearest to it.
// The testbench loads that table and runs two intervals (20 M cycles).
//
// Upsets are injected while the scrubber is idle: a few scattered ones in
// the first interval, and 60 frames of task 0 just before the last block of
// the second interval, so that task 0's job overruns its 250 us budget and
// the next job starts late. Checks: the task and start instant of every
// job, that on-time jobs end before the deadline of the task job they
// protect, that each job leaves its PRR equal to the golden copy and
// rewrites exactly its upset frames, that a frame outside every PRR is
// never touched, frame and job totals, and that each mechanism (on-time
// start, late start, clean frame, rewritten frame, LCM wrap, every task
// scrubbed) occurred.
module tb_crit_scrub_top;
  import scrub_pkg::*;

  localparam int unsigned NT = 5, NE = 19, LCM = 100_000, NINT = 2;

  // Case study (tasks 0..4).
  int unsigned eta [NT] = '{250, 150, 100, 1200, 800};
  int unsigned st_us [NT] = '{50_000, 100_000, 100_000, 10_000, 20_000};
  int unsigned base [NT];
  // Schedule of one interval, by start instant (us) and task.
  int unsigned e_start [NE] = '{ 8_800, 18_000, 19_200, 28_800, 38_000, 39_200,
                                 48_550, 48_800, 58_000, 59_200, 68_800, 78_000,
                                 79_200, 88_800, 97_500, 97_750, 97_900, 98_000,
                                 99_200};
  int unsigned e_task [NE] = '{3, 3, 4, 3, 3, 4, 0, 3, 3, 4, 3, 3, 4, 3, 0, 1, 2, 3, 4};

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  time_us_t lcm_us = LCM;
  logic [SCHED_AW:0] n_entries = NE;
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

  // Frames of task t holding at least one upset.
  function automatic int unsigned bad_frames(int unsigned t);
    int unsigned n = 0;
    for (int unsigned f = base[t]; f < base[t] + eta[t]; f++)
      if (icap.upsets_in(f, 1) != 0) n++;
    return n;
  endfunction

  // Absolute time in microseconds.
  int unsigned abs_us;
  always_comb abs_us = lcm_cycles * LCM + time_us;

  // Mechanism counters.
  int unsigned n_ontime, n_late, n_clean, n_fixed, n_wrap;
  int unsigned per_task [NT];

  // Job monitor.
  int unsigned j = 0, cur_t, cur_deadline, cur_fix0, cur_exp_fix, cur_late;
  always @(negedge clk) if (rst_n && enable) begin
    if (scrub_start) begin
      int unsigned e, k;
      e = j % NE;
      k = j / NE;
      cur_t = e_task[e];
      check(scrub_task == task_id_t'(cur_t), "job task");
      if (late_start) begin
        n_late++;
        check(k == 1 && e >= 15, "late start only behind the overrunning job");
        check(abs_us >= k * LCM + e_start[e], "late job not early");
      end else begin
        n_ontime++;
        check(time_us == e_start[e], "job start instant");
      end
      // deadline: the next execution of the protected task
      cur_deadline = k * LCM + (e_start[e] / st_us[cur_t] + 1) * st_us[cur_t];
      cur_exp_fix = bad_frames(cur_t);
      cur_fix0 = frames_fixed;
      cur_late = late_start;
      per_task[cur_t]++;
      j++;
    end
    if (scrub_done) begin
      check(icap.upsets_in(base[cur_t], eta[cur_t]) == 0, "PRR equals golden copy after job");
      check(frames_fixed - cur_fix0 == cur_exp_fix, "upset frames rewritten");
      if (!cur_late && !(cur_t == 0 && cur_exp_fix > 40))
        check(abs_us < cur_deadline, "job ends before the protected task job");
    end
    if (frame_done) begin
      if (frame_fixed) n_fixed++; else n_clean++;
    end
    if (lcm_wrap) n_wrap++;
  end

  // Upset injection, only while the scrubber is idle.
  int unsigned injected = 0;
  task automatic upset_random(int unsigned nframes);
    for (int n = 0; n < nframes; n++) begin
      int unsigned f;
      f = $urandom_range(base[NT-1] + eta[NT-1] - 1);
      icap.inject(frame_addr_t'(f), $urandom_range(FRAME_WORDS - 1), 32'(1) << $urandom_range(31));
      injected++;
    end
  endtask

  initial begin
    base[0] = 0;
    for (int t = 1; t < NT; t++) base[t] = base[t-1] + eta[t-1];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NT; t++) begin
      @(negedge clk);
      task_we = 1'b1;
      task_wr_addr = task_id_t'(t);
      task_wr_data = '{frame_base: frame_addr_t'(base[t]), frame_count: frame_addr_t'(eta[t])};
    end
    @(negedge clk);
    task_we = 1'b0;
    for (int e = 0; e < NE; e++) begin
      sched_we = 1'b1;
      sched_wr_addr = SCHED_AW'(e);
      sched_wr_data = '{start_us: e_start[e], task_id: task_id_t'(e_task[e])};
      @(negedge clk);
    end
    sched_we = 1'b0;
    // a frame outside every PRR
    icap.inject(frame_addr_t'(N_FRAMES - 1), 5, 32'h0000_0100);
    @(negedge clk);
    enable = 1'b1;
    // interval 0: scattered upsets
    foreach (e_start[i]) if (i % 4 == 1) begin
      wait (abs_us == e_start[i] - 100);
      @(negedge clk);
      check(!scrub_busy, "idle at injection");
      upset_random(4);
    end
    // interval 1: 60 upset frames in task 0 before the last block
    wait (abs_us == LCM + 97_000);
    @(negedge clk);
    check(!scrub_busy, "idle at injection");
    for (int f = 0; f < 60; f++) icap.inject(frame_addr_t'(base[0] + 4 * f), 40, 32'h0001_0000);
    wait (abs_us == NINT * LCM + 50);
    @(negedge clk);
    check(j == NINT * NE, "number of jobs");
    check(jobs_count == NINT * NE, "jobs_count");
    check(late_count == n_late, "late_count");
    check(frames_checked == NINT * 16_750, "frames scrubbed in two intervals");
    check(frames_fixed == n_fixed, "frames_fixed");
    check(icap.upsets_in(N_FRAMES - 1, 1) == 1, "frame outside the PRRs untouched");
    check(lcm_cycles == NINT, "lcm_cycles");
    check(n_ontime > 0, "mechanism: on-time start");
    check(n_late > 0, "mechanism: late start");
    check(n_clean > 0, "mechanism: clean frame");
    check(n_fixed > 60, "mechanism: rewritten frame");
    check(n_wrap == NINT, "mechanism: LCM wrap");
    for (int t = 0; t < NT; t++) check(per_task[t] == NINT * (LCM / st_us[t]), "jobs per task");
    $display("on-time %0d late %0d clean %0d fixed %0d wraps %0d injected %0d",
             n_ontime, n_late, n_clean, n_fixed, n_wrap, injected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NINT * LCM * TICKS_PER_US + 100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
