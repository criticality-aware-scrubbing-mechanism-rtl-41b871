// frame_scrubber: read-back scrubbing of the frames of one PRR.
//
// A scrubbing job covers the eta_i consecutive configuration frames of one
// task's region. For every frame the scrubber asks the ICAP to read the
// frame back and, word by word, compares the read-back data bit for bit with
// the original frame fetched from the golden copy memory. If any bit differs
// (a single-event upset), the frame is rewritten through the ICAP with the
// golden words. Then it moves to the next frame; after the last one it
// raises `done` for a cycle and becomes idle. This read-back, compare and
// correct scheme follows the source description's account of scrubbing; the
// interfaces below are this design's.
//
// Interfaces (all valid/ready, a transfer happens when both are high):
//   * start: latches frame_base and frame_count; busy is high from the next
//     cycle until the cycle after done.
//   * ICAP command: icap_cmd_write = 0 reads frame icap_cmd_frame back,
//     = 1 writes it. A read command is followed by FRAME_WORDS words on the
//     icap_rd stream; a write command expects FRAME_WORDS words on icap_wr.
//   * golden copy: requests carry (frame, word index); responses return the
//     words in request order. Up to FRAME_WORDS requests may be outstanding.
// The read-back stream and the golden response stream are joined: a word
// pair is consumed when both are valid. With a memory that answers one word
// per cycle a clean frame takes FRAME_WORDS + 3 cycles and a corrected frame
// about twice that, so at 100 MHz a clean 81-word frame fits the 1 us per
// frame budget of the source description; a corrected one does not.
module frame_scrubber
  import scrub_pkg::*;
#(
  parameter int unsigned WORDS = FRAME_WORDS
) (
  input  logic        clk,
  input  logic        rst_n,
  // job
  input  logic        start,
  input  frame_addr_t frame_base,
  input  frame_addr_t frame_count,
  output logic        busy,
  output logic        done,
  // ICAP
  output logic        icap_cmd_valid,
  input  logic        icap_cmd_ready,
  output logic        icap_cmd_write,
  output frame_addr_t icap_cmd_frame,
  input  logic        icap_rd_valid,
  output logic        icap_rd_ready,
  input  word_t       icap_rd_data,
  output logic        icap_wr_valid,
  input  logic        icap_wr_ready,
  output word_t       icap_wr_data,
  // golden copy
  output logic        gold_req_valid,
  input  logic        gold_req_ready,
  output frame_addr_t gold_req_frame,
  output word_idx_t   gold_req_word,
  input  logic        gold_rsp_valid,
  output logic        gold_rsp_ready,
  input  word_t       gold_rsp_data,
  // status
  output logic        frame_done,     // one frame finished
  output logic        frame_fixed,    // with frame_done: it was rewritten
  output logic [31:0] frames_checked,
  output logic [31:0] frames_fixed
);

  typedef enum logic [2:0] {
    S_IDLE, S_RD_CMD, S_RD_DATA, S_WR_CMD, S_WR_DATA, S_NEXT, S_DONE
  } state_t;

  state_t      state_q;
  frame_addr_t frame_q;     // frame being scrubbed
  frame_addr_t left_q;      // frames left, including the current one
  word_idx_t   req_q;       // golden requests issued for this pass
  word_idx_t   cnt_q;       // words consumed in this pass
  logic        bad_q;       // read-back differed from the golden copy

  localparam word_idx_t LAST = word_idx_t'(WORDS - 1);

  wire in_pass = (state_q == S_RD_DATA) || (state_q == S_WR_DATA);

  // Golden copy requests, in both passes.
  assign gold_req_valid = in_pass && (32'(req_q) < WORDS);
  assign gold_req_frame = frame_q;
  assign gold_req_word  = req_q;

  // ICAP commands.
  assign icap_cmd_valid = (state_q == S_RD_CMD) || (state_q == S_WR_CMD);
  assign icap_cmd_write = (state_q == S_WR_CMD);
  assign icap_cmd_frame = frame_q;

  // Read pass: join read-back and golden streams.
  wire rd_fire = (state_q == S_RD_DATA) && icap_rd_valid && gold_rsp_valid;
  // Write pass: golden stream forwarded to the ICAP.
  wire wr_fire = (state_q == S_WR_DATA) && icap_wr_ready && gold_rsp_valid;

  assign icap_rd_ready  = (state_q == S_RD_DATA) && gold_rsp_valid;
  assign icap_wr_valid  = (state_q == S_WR_DATA) && gold_rsp_valid;
  assign icap_wr_data   = gold_rsp_data;
  assign gold_rsp_ready = ((state_q == S_RD_DATA) && icap_rd_valid) ||
                          ((state_q == S_WR_DATA) && icap_wr_ready);

  wire mismatch = (icap_rd_data != gold_rsp_data);

  assign busy        = (state_q != S_IDLE);
  assign done        = (state_q == S_DONE);
  assign frame_done  = (state_q == S_NEXT);
  assign frame_fixed = (state_q == S_NEXT) && bad_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q        <= S_IDLE;
      frame_q        <= '0;
      left_q         <= '0;
      req_q          <= '0;
      cnt_q          <= '0;
      bad_q          <= 1'b0;
      frames_checked <= '0;
      frames_fixed   <= '0;
    end else begin
      if (gold_req_valid && gold_req_ready) req_q <= req_q + 1'b1;
      unique case (state_q)
        S_IDLE: if (start) begin
          frame_q <= frame_base;
          left_q  <= frame_count;
          state_q <= (frame_count == '0) ? S_DONE : S_RD_CMD;
        end
        S_RD_CMD: if (icap_cmd_ready) begin
          req_q   <= '0;
          cnt_q   <= '0;
          bad_q   <= 1'b0;
          state_q <= S_RD_DATA;
        end
        S_RD_DATA: if (rd_fire) begin
          cnt_q <= cnt_q + 1'b1;
          if (mismatch) bad_q <= 1'b1;
          if (cnt_q == LAST) state_q <= (bad_q || mismatch) ? S_WR_CMD : S_NEXT;
        end
        S_WR_CMD: if (icap_cmd_ready) begin
          req_q   <= '0;
          cnt_q   <= '0;
          state_q <= S_WR_DATA;
        end
        S_WR_DATA: if (wr_fire) begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == LAST) state_q <= S_NEXT;
        end
        S_NEXT: begin
          frames_checked <= frames_checked + 1'b1;
          if (bad_q) frames_fixed <= frames_fixed + 1'b1;
          frame_q <= frame_q + 1'b1;
          left_q  <= left_q - 1'b1;
          state_q <= (left_q == frame_addr_t'(1)) ? S_DONE : S_RD_CMD;
        end
        S_DONE: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  initial assert (WORDS >= 1 && WORDS < (1 << WORD_AW))
    else $error("frame_scrubber: WORDS out of range");

  // A job stays inside the device.
  assert property (@(posedge clk) disable iff (!rst_n)
                   start |-> (32'(frame_base) + 32'(frame_count) <= N_FRAMES));

  // A started job is not started again before it is done (non-preemptive).
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
