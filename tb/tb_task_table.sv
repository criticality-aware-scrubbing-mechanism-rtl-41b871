// tb_task_table: checks reset to empty descriptors, writes and combinational
// reads of all task descriptors, and that out-of-range writes are ignored.
module tb_task_table;
  import scrub_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  task_id_t wr_addr = '0, rd_addr = '0;
  task_desc_t wr_data = '0, rd_data;
  task_desc_t ref_desc [MAX_TASKS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task_table dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < MAX_TASKS; i++) begin
      rd_addr = task_id_t'(i);
      #1 check(rd_data == '0, "reset value");
      ref_desc[i] = '0;
    end
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we = 1'b1;
      wr_addr = task_id_t'($urandom_range(31));
      wr_data.frame_base  = frame_addr_t'($urandom);
      wr_data.frame_count = frame_addr_t'($urandom);
      @(negedge clk);
      we = 1'b0;
      if (wr_addr < MAX_TASKS) ref_desc[wr_addr] = wr_data;
      for (int i = 0; i < MAX_TASKS; i++) begin
        rd_addr = task_id_t'(i);
        #1 check(rd_data == ref_desc[i], "descriptor");
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
