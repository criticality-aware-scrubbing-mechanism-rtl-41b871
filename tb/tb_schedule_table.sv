// tb_schedule_table: writes random schedule entries, reads them back with
// the one-cycle read latency, and checks read-during-write returns the old
// entry.
module tb_schedule_table;
  import scrub_pkg::*;

  localparam int unsigned DEPTH = 64, AW = 6;

  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  sched_entry_t wr_data = '0, rd_data;
  sched_entry_t ref_mem [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  schedule_table #(.DEPTH(DEPTH), .AW(AW)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1;
      wr_addr = AW'(i);
      wr_data.start_us = $urandom;
      wr_data.task_id  = task_id_t'($urandom);
      ref_mem[i] = wr_data;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      rd_addr = AW'(i);
      @(negedge clk);
      check(rd_data == ref_mem[i], "read back");
    end
    // random reads mixed with writes
    for (int n = 0; n < 300; n++) begin
      int unsigned ra = $urandom_range(DEPTH - 1);
      rd_addr = AW'(ra);
      we = $urandom_range(1);
      wr_addr = ($urandom_range(3) == 0) ? AW'(ra) : AW'($urandom_range(DEPTH - 1));
      wr_data.start_us = $urandom;
      wr_data.task_id  = task_id_t'($urandom);
      begin
        sched_entry_t expect_q;
        expect_q = ref_mem[ra];
        @(negedge clk);
        check(rd_data == expect_q, "read old data");
        if (we) ref_mem[wr_addr] = wr_data;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
