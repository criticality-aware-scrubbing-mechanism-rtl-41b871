// scrub_timebase: microsecond time base of the scrubbing schedule.
//
// The stored scrubbing schedule is cyclic: it repeats every LCM interval (the
// least common multiple of the scrubbing periods). This block divides the
// clock down to a one-microsecond tick and counts the time position inside
// the current LCM interval, time_us = 0 .. lcm_us-1. When time_us would
// reach lcm_us it restarts at 0, raises `wrap` for one cycle and increments
// the interval counter. Time 0 is the first job of every hardware task, to
// which the first scrubbing job is synchronised.
//
// Interface: `enable` low holds everything at zero (time 0 starts on the
// first cycle enable is high). `us_tick` is high on the first clock cycle of
// every microsecond, including the first cycle after enable; time_us changes
// on that same cycle. Timing: time_us is a register, valid the cycle it
// changes. The microsecond unit follows the source description's time
// budgets; the divider and reset are this design's choices.
module scrub_timebase
  import scrub_pkg::*;
#(
  parameter int unsigned TICKS = TICKS_PER_US   // clock cycles per microsecond
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     enable,
  input  time_us_t lcm_us,        // LCM interval length, microseconds (>= 1)
  output logic     us_tick,       // first cycle of a new microsecond
  output time_us_t time_us,       // position inside the LCM interval
  output logic     wrap,          // first cycle of a new LCM interval (not the first one)
  output logic [31:0] lcm_cycles  // completed LCM intervals
);

  localparam int unsigned DIV_W = (TICKS > 1) ? $clog2(TICKS) : 1;

  logic [DIV_W-1:0] div_q;
  logic             running_q;

  wire last_div = (div_q == DIV_W'(TICKS - 1));

  always_ff @(posedge clk) begin
    if (!rst_n || !enable) begin
      div_q      <= '0;
      running_q  <= 1'b0;
      time_us    <= '0;
      lcm_cycles <= '0;
    end else begin
      running_q <= 1'b1;
      if (running_q) begin
        div_q <= last_div ? '0 : div_q + 1'b1;
        if (last_div) begin
          if (time_us + 1'b1 >= lcm_us) begin
            time_us    <= '0;
            lcm_cycles <= lcm_cycles + 1'b1;
          end else begin
            time_us <= time_us + 1'b1;
          end
        end
      end
    end
  end

  // A new microsecond starts on the cycle after the divider rolls over, and
  // on the first running cycle.
  logic tick_q, wrap_q;
  always_ff @(posedge clk) begin
    if (!rst_n || !enable) begin
      tick_q <= 1'b0;
      wrap_q <= 1'b0;
    end else begin
      tick_q <= !running_q || last_div;
      wrap_q <= running_q && last_div && (time_us + 1'b1 >= lcm_us);
    end
  end

  assign us_tick = tick_q;
  assign wrap    = wrap_q;

endmodule
