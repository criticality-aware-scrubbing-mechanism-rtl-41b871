// golden_copy_model: behavioural model of the external golden copy memory.
//
// Not synthesizable logic of the design: it stands for the external memory
// that holds the original configuration frames. It answers each (frame,
// word) request one cycle later with scrub_tb_pkg::golden_word(), one word
// per cycle, in order. With stall high it randomly withholds req_ready to
// exercise the scrubber's flow control.
module golden_copy_model
  import scrub_pkg::*;
  import scrub_tb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        stall,   // random back-pressure when high
  input  logic        req_valid,
  output logic        req_ready,
  input  frame_addr_t req_frame,
  input  word_idx_t   req_word,
  output logic        rsp_valid,
  input  logic        rsp_ready,
  output word_t       rsp_data
);
  logic gate;
  always_ff @(posedge clk) gate <= stall ? ($urandom_range(3) != 0) : 1'b1;

  assign req_ready = gate && (!rsp_valid || rsp_ready);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
    end else if (req_valid && req_ready) begin
      rsp_valid <= 1'b1;
      rsp_data  <= golden_word(req_frame, req_word);
    end else if (rsp_ready) begin
      rsp_valid <= 1'b0;
    end
  end
endmodule
