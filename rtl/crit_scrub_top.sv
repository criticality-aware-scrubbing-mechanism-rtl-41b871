// crit_scrub_top: criticality-aware scrubbing module of an SRAM FPGA.
//
// Instead of sweeping the whole configuration memory at a constant rate,
// this module scrubs the frames of each hardware task (each partially
// reconfigurable region, PRR) separately, at instants tied to that task's
// periodic execution: a scrubbing job ends just before the task job it
// protects. The scrubbing periods are chosen offline per task according to
// its criticality, and an offline as-late-as-possible (EDL) scheduler lays
// the non-preemptive scrubbing jobs of one LCM interval out in time. This
// module stores that result and executes it:
//
//   scrub_timebase   -- microsecond time inside the LCM interval
//   schedule_table   -- (start instant, task) per scrubbing job
//   scrub_dispatcher -- starts each job at its instant, counts late starts
//   task_table       -- per task: first frame and frame count of its PRR
//   frame_scrubber   -- read back, compare with the golden copy, rewrite
//
// The ICAP (configuration port of the FPGA) and the golden copy memory are
// outside this module; their valid/ready ports are brought out. The host
// loads both tables, lcm_us and n_entries while `enable` is low and then
// raises `enable`; time 0 is the release of the first job of every hardware
// task. All ports are synchronous to clk; rst_n is a synchronous active-low
// reset. The split into these blocks, the port protocols and the
// late-start policy are this design's; the per-task, EDL-scheduled,
// table-driven scrubbing is the source description's mechanism.
module crit_scrub_top
  import scrub_pkg::*;
#(
  parameter int unsigned TICKS   = TICKS_PER_US,
  parameter int unsigned WORDS   = FRAME_WORDS,
  parameter int unsigned N_TASKS = MAX_TASKS,
  parameter int unsigned DEPTH   = SCHED_DEPTH,
  parameter int unsigned AW      = SCHED_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  // configuration
  input  time_us_t      lcm_us,
  input  logic [AW:0]   n_entries,
  input  logic          sched_we,
  input  logic [AW-1:0] sched_wr_addr,
  input  sched_entry_t  sched_wr_data,
  input  logic          task_we,
  input  task_id_t      task_wr_addr,
  input  task_desc_t    task_wr_data,
  // ICAP
  output logic          icap_cmd_valid,
  input  logic          icap_cmd_ready,
  output logic          icap_cmd_write,
  output frame_addr_t   icap_cmd_frame,
  input  logic          icap_rd_valid,
  output logic          icap_rd_ready,
  input  word_t         icap_rd_data,
  output logic          icap_wr_valid,
  input  logic          icap_wr_ready,
  output word_t         icap_wr_data,
  // golden copy
  output logic          gold_req_valid,
  input  logic          gold_req_ready,
  output frame_addr_t   gold_req_frame,
  output word_idx_t     gold_req_word,
  input  logic          gold_rsp_valid,
  output logic          gold_rsp_ready,
  input  word_t         gold_rsp_data,
  // status
  output logic          us_tick,
  output time_us_t      time_us,
  output logic          lcm_wrap,
  output logic          scrub_start,
  output logic          late_start,
  output task_id_t      scrub_task,     // task of the running (or last) job
  output logic          scrub_busy,
  output logic          scrub_done,
  output logic          frame_done,
  output logic          frame_fixed,
  output logic [31:0]   lcm_cycles,
  output logic [31:0]   jobs_count,
  output logic [31:0]   late_count,
  output logic [31:0]   frames_checked,
  output logic [31:0]   frames_fixed
);

  logic [AW-1:0] tbl_rd_addr;
  sched_entry_t  tbl_rd_data;
  task_id_t      disp_task;
  task_desc_t    desc;
  task_id_t      task_q;

  scrub_timebase #(.TICKS(TICKS)) u_timebase (
    .clk, .rst_n, .enable, .lcm_us,
    .us_tick, .time_us, .wrap(lcm_wrap), .lcm_cycles
  );

  schedule_table #(.DEPTH(DEPTH), .AW(AW)) u_schedule (
    .clk, .we(sched_we), .wr_addr(sched_wr_addr), .wr_data(sched_wr_data),
    .rd_addr(tbl_rd_addr), .rd_data(tbl_rd_data)
  );

  scrub_dispatcher #(.AW(AW)) u_dispatcher (
    .clk, .rst_n, .enable, .n_entries, .time_us, .wrap(lcm_wrap),
    .tbl_rd_addr, .tbl_rd_data, .scrub_busy, .scrub_start,
    .scrub_task(disp_task), .late_start, .jobs_count, .late_count
  );

  task_table #(.N_TASKS(N_TASKS)) u_tasks (
    .clk, .rst_n, .we(task_we), .wr_addr(task_wr_addr), .wr_data(task_wr_data),
    .rd_addr(disp_task), .rd_data(desc)
  );

  frame_scrubber #(.WORDS(WORDS)) u_scrubber (
    .clk, .rst_n, .start(scrub_start),
    .frame_base(desc.frame_base), .frame_count(desc.frame_count),
    .busy(scrub_busy), .done(scrub_done),
    .icap_cmd_valid, .icap_cmd_ready, .icap_cmd_write, .icap_cmd_frame,
    .icap_rd_valid, .icap_rd_ready, .icap_rd_data,
    .icap_wr_valid, .icap_wr_ready, .icap_wr_data,
    .gold_req_valid, .gold_req_ready, .gold_req_frame, .gold_req_word,
    .gold_rsp_valid, .gold_rsp_ready, .gold_rsp_data,
    .frame_done, .frame_fixed, .frames_checked, .frames_fixed
  );

  always_ff @(posedge clk) begin
    if (!rst_n)           task_q <= '0;
    else if (scrub_start) task_q <= disp_task;
  end
  assign scrub_task = scrub_start ? disp_task : task_q;

endmodule
