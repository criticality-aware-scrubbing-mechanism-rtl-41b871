// tb_frame_scrubber: scrubs PRRs of a full-size (81-word frame) device held
// in the ICAP model, with upsets injected inside and just outside the
// scrubbed range. Checks that every frame of the range is read back once, in
// order, that exactly the upset frames are rewritten, that the range ends up
// equal to the golden copy while upsets outside it are untouched, the
// counters and pulses, the 1 us (100 cycles) per clean frame budget, and an
// empty job; then repeats with random back-pressure on both memories.
module tb_frame_scrubber;
  import scrub_pkg::*;

  localparam int unsigned WORDS = FRAME_WORDS;

  logic clk = 1'b0, rst_n = 1'b0, stall = 1'b0;
  logic start = 1'b0;
  frame_addr_t frame_base = '0, frame_count = '0;
  logic busy, done;
  logic icap_cmd_valid, icap_cmd_ready, icap_cmd_write;
  frame_addr_t icap_cmd_frame;
  logic icap_rd_valid, icap_rd_ready, icap_wr_valid, icap_wr_ready;
  word_t icap_rd_data, icap_wr_data;
  logic gold_req_valid, gold_req_ready, gold_rsp_valid, gold_rsp_ready;
  frame_addr_t gold_req_frame;
  word_idx_t gold_req_word;
  word_t gold_rsp_data;
  logic frame_done, frame_fixed;
  logic [31:0] frames_checked, frames_fixed;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  frame_scrubber #(.WORDS(WORDS)) dut (.*);

  icap_model #(.WORDS(WORDS)) icap (
    .clk, .rst_n, .stall,
    .cmd_valid(icap_cmd_valid), .cmd_ready(icap_cmd_ready), .cmd_write(icap_cmd_write),
    .cmd_frame(icap_cmd_frame), .rd_valid(icap_rd_valid), .rd_ready(icap_rd_ready),
    .rd_data(icap_rd_data), .wr_valid(icap_wr_valid), .wr_ready(icap_wr_ready),
    .wr_data(icap_wr_data)
  );

  golden_copy_model gold (
    .clk, .rst_n, .stall,
    .req_valid(gold_req_valid), .req_ready(gold_req_ready), .req_frame(gold_req_frame),
    .req_word(gold_req_word), .rsp_valid(gold_rsp_valid), .rsp_ready(gold_rsp_ready),
    .rsp_data(gold_rsp_data)
  );

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Monitor: read commands must walk the range in order; writes must follow
  // the read of the same frame.
  int unsigned next_rd, n_fixed_pulses, n_done_pulses;
  frame_addr_t last_rd;
  always @(posedge clk) if (rst_n) begin
    if (icap_cmd_valid && icap_cmd_ready) begin
      if (!icap_cmd_write) begin
        check(icap_cmd_frame == frame_addr_t'(next_rd), "read order");
        last_rd = icap_cmd_frame;
        next_rd++;
      end else begin
        check(icap_cmd_frame == last_rd, "write follows read of same frame");
      end
    end
    if (frame_fixed) n_fixed_pulses++;
    if (frame_done) n_done_pulses++;
  end

  bit bad_frame [int unsigned];

  task automatic job(int unsigned base, int unsigned count, int unsigned n_upset_frames);
    int unsigned reads0, writes0, chk0, fix0, cycles, outside;
    bad_frame.delete();
    // upsets inside the range
    for (int n = 0; n < n_upset_frames; n++) begin
      int unsigned f, nw;
      f = base + $urandom_range(count - 1);
      nw = $urandom_range(1, 3);
      for (int k = 0; k < nw; k++)
        icap.inject(frame_addr_t'(f), $urandom_range(WORDS - 1), 32'(1) << $urandom_range(31));
      if (icap.upsets_in(f, 1) != 0) bad_frame[f] = 1'b1;
    end
    // upsets just outside the range
    if (base > 0) icap.inject(frame_addr_t'(base - 1), WORDS - 1, 32'h8000_0000);
    icap.inject(frame_addr_t'(base + count), 0, 32'h0000_0001);
    outside = icap.upsets_in(base - 1, 1) + icap.upsets_in(base + count, 1);
    reads0 = icap.reads; writes0 = icap.writes; chk0 = frames_checked; fix0 = frames_fixed;
    n_fixed_pulses = 0; n_done_pulses = 0; next_rd = base;
    @(negedge clk);
    frame_base = frame_addr_t'(base);
    frame_count = frame_addr_t'(count);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    @(negedge clk);
    check(!busy, "idle after done");
    check(icap.reads - reads0 == count, "one read per frame");
    check(icap.writes - writes0 == bad_frame.num(), "rewrites = upset frames");
    check(frames_checked - chk0 == count, "frames_checked");
    check(frames_fixed - fix0 == bad_frame.num(), "frames_fixed");
    check(n_fixed_pulses == bad_frame.num(), "frame_fixed pulses");
    check(n_done_pulses == count, "frame_done pulses");
    check(icap.upsets_in(base, count) == 0, "range equals golden copy");
    check(icap.upsets_in(base - 1, 1) + icap.upsets_in(base + count, 1) == outside,
          "frames outside the range untouched");
    if (!stall && bad_frame.num() == 0)
      check(cycles <= count * TICKS_PER_US, "clean frame within 1 us");
    $display("job base=%0d count=%0d fixed=%0d cycles=%0d", base, count, bad_frame.num(), cycles);
    // clean up the outside upsets for the next job
    icap.inject(frame_addr_t'(base + count), 0, 32'h0000_0001);
    if (base > 0) icap.inject(frame_addr_t'(base - 1), WORDS - 1, 32'h8000_0000);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    job(100, 10, 0);
    job(200, 20, 6);
    job(29_000, 250, 40);
    job(0, 1, 1);
    job(29_990, 9, 0);
    // empty job
    @(negedge clk);
    frame_count = '0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(done && busy, "empty job finishes at once");
    @(negedge clk);
    check(!busy, "empty job idle");
    // with back-pressure
    stall = 1'b1;
    job(5_000, 30, 10);
    job(7_000, 5, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
