// task_table: PRR descriptors of the scrubbing tasks.
//
// Every scrubbing task s_tau_i covers the configuration frames of one
// hardware task tau_i, i.e. one partially reconfigurable region. This small
// register file holds, per task, the first frame of that region and its
// number of frames (eta_i in the source description). The scrubbing time of
// the task, SC_i, follows from the frame count at 1 us per frame.
//
// Interface: a host writes descriptors through (we, wr_addr, wr_data); the
// dispatcher side reads combinationally through rd_addr / rd_data (the table
// is small, so it is kept in flip-flops). Descriptors reset to zero frames,
// so an unconfigured task is scrubbed in no time. Reset and storage style
// are this design's choices.
module task_table
  import scrub_pkg::*;
#(
  parameter int unsigned N_TASKS = MAX_TASKS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  task_id_t   wr_addr,
  input  task_desc_t wr_data,
  input  task_id_t   rd_addr,
  output task_desc_t rd_data
);

  task_desc_t desc_q [N_TASKS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N_TASKS; i++) desc_q[i] <= '0;
    end else if (we && (32'(wr_addr) < N_TASKS)) begin
      desc_q[wr_addr] <= wr_data;
    end
  end

  always_comb begin
    rd_data = '0;
    if (32'(rd_addr) < N_TASKS) rd_data = desc_q[rd_addr];
  end

endmodule
