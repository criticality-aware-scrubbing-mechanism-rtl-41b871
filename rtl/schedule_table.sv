// schedule_table: the stored scrubbing schedule.
//
// One entry per scrubbing job inside one LCM interval, in order of start
// time: the start instant in microseconds from the beginning of the interval
// and the scrubbing task (PRR) to scrub. The table is written by the host
// that ran the offline scheduling heuristic and read by the dispatcher. The
// source description keeps scrubbing jobs non-preemptive so that this table
// stays small: one entry per job, not per frame.
//
// Built as a simple dual-port RAM (one write port, one read port) so that it
// maps onto block RAM. Timing: a write takes effect at the clock edge; a read
// returns the entry at rd_addr one cycle later (registered output). Reading
// and writing the same address in one cycle returns the old entry. Depth is
// this design's choice; the memory is not reset.
module schedule_table
  import scrub_pkg::*;
#(
  parameter int unsigned DEPTH = SCHED_DEPTH,
  parameter int unsigned AW    = SCHED_AW
) (
  input  logic         clk,
  input  logic         we,
  input  logic [AW-1:0] wr_addr,
  input  sched_entry_t wr_data,
  input  logic [AW-1:0] rd_addr,
  output sched_entry_t rd_data
);

  sched_entry_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(wr_addr) < DEPTH)) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

  initial assert (DEPTH <= (1 << AW)) else $error("schedule_table: DEPTH exceeds address width");

endmodule
