// scrub_pkg: types and constants shared by the criticality-aware scrubbing
// module.
//
// The scrubbing module protects the configuration memory of an SRAM FPGA
// task by task. Every hardware task lives in its own partially
// reconfigurable region (PRR), a run of configuration frames. An offline
// tool computes, for every task, a scrubbing period and an as-late-as-possible
// (EDL) schedule over one LCM (hyper-period) of those periods; the hardware
// stores that schedule and replays it forever.
//
// Numbers that follow the source description: a frame is 81 words of 32
// bits (2,592 bits), the device has 30,000 frames, scrubbing a frame is
// budgeted at 1 us, and the experiments use up to 20 tasks. The 100 MHz
// clock (100 cycles per microsecond), the widths of the time stamp and of
// the table entries are this design's own choices.
package scrub_pkg;

  // Configuration frame geometry.
  localparam int unsigned WORD_W       = 32;     // ICAP / frame word
  localparam int unsigned FRAME_WORDS  = 81;     // words per frame
  localparam int unsigned N_FRAMES     = 30000;  // frames in the device
  localparam int unsigned FRAME_AW     = 15;     // frame address bits
  localparam int unsigned WORD_AW      = 7;      // word-in-frame index bits

  // Scheduling.
  localparam int unsigned MAX_TASKS    = 20;     // scrubbing tasks
  localparam int unsigned TASK_W       = 5;      // task identifier bits
  localparam int unsigned TIME_W       = 32;     // time stamps, microseconds
  localparam int unsigned TICKS_PER_US = 100;    // clock cycles per microsecond
  localparam int unsigned SCHED_DEPTH  = 4096;   // schedule table entries
  localparam int unsigned SCHED_AW     = 12;

  typedef logic [FRAME_AW-1:0] frame_addr_t;
  typedef logic [WORD_AW-1:0]  word_idx_t;
  typedef logic [WORD_W-1:0]   word_t;
  typedef logic [TASK_W-1:0]   task_id_t;
  typedef logic [TIME_W-1:0]   time_us_t;

  // One scrubbing job of the stored schedule: start instant inside the LCM
  // interval (microseconds from the start of the interval) and the scrubbing
  // task it runs.
  typedef struct packed {
    time_us_t start_us;
    task_id_t task_id;
  } sched_entry_t;

  // The PRR of one scrubbing task: first frame and number of frames (eta_i).
  typedef struct packed {
    frame_addr_t frame_base;
    frame_addr_t frame_count;
  } task_desc_t;

endpackage
