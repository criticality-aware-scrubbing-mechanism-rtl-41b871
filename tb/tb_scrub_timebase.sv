// tb_scrub_timebase: checks the microsecond tick, the time position inside
// the LCM interval, the wrap pulse and the interval counter against a cycle
// count, for two divider ratios, with an enable drop in between.
module tb_scrub_timebase;
  import scrub_pkg::*;

  localparam int unsigned TICKS = 5;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  time_us_t lcm_us;
  logic us_tick, wrap;
  time_us_t time_us;
  logic [31:0] lcm_cycles;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scrub_timebase #(.TICKS(TICKS)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run(int unsigned lcm, int unsigned cycles);
    @(negedge clk);
    enable = 1'b0;
    lcm_us = lcm;
    @(negedge clk);
    enable = 1'b1;
    @(negedge clk);  // first running cycle: c = 0
    for (int unsigned c = 0; c < cycles; c++) begin
      int unsigned us = c / TICKS;
      check(time_us == us % lcm, "time_us");
      check(us_tick == (c % TICKS == 0), "us_tick");
      check(wrap == (c % TICKS == 0 && us > 0 && us % lcm == 0), "wrap");
      check(lcm_cycles == us / lcm, "lcm_cycles");
      @(negedge clk);
    end
  endtask

  initial begin
    lcm_us = 7;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(7, 400);
    run(3, 200);
    run(1, 50);
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
