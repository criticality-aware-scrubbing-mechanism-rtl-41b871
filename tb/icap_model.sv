// icap_model: behavioural model of the FPGA configuration port and memory.
//
// Not synthesizable logic of the design: it stands for the vendor's internal
// configuration access port together with the configuration frames of the
// user design. The configuration is golden_word() XOR an upset mask per
// word; masks are kept sparse in an associative array, so a 30,000-frame
// device costs only its upsets. inject() flips bits. A read command streams
// the WORDS words of the frame (starting the cycle after the command), a
// write command takes WORDS words and stores them. With stall high the
// streams pause at random. Counters record frame reads and writes.
module icap_model
  import scrub_pkg::*;
  import scrub_tb_pkg::*;
#(
  parameter int unsigned WORDS = FRAME_WORDS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        stall,   // random back-pressure when high
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic        cmd_write,
  input  frame_addr_t cmd_frame,
  output logic        rd_valid,
  input  logic        rd_ready,
  output word_t       rd_data,
  input  logic        wr_valid,
  output logic        wr_ready,
  input  word_t       wr_data
);
  word_t upset [longint];
  int unsigned reads, writes;

  typedef enum logic [1:0] {M_IDLE, M_READ, M_WRITE} mstate_t;
  mstate_t     st;
  frame_addr_t fr;
  int unsigned idx;
  logic        gate;

  function automatic longint key(frame_addr_t f, int unsigned w);
    return longint'(f) * 256 + longint'(w);
  endfunction

  function automatic word_t cfg_word(frame_addr_t f, int unsigned w);
    word_t v = golden_word(f, word_idx_t'(w));
    if (upset.exists(key(f, w))) v ^= upset[key(f, w)];
    return v;
  endfunction

  function automatic void inject(frame_addr_t f, int unsigned w, word_t mask);
    word_t m = mask;
    if (upset.exists(key(f, w))) m ^= upset[key(f, w)];
    if (m == '0) upset.delete(key(f, w));
    else upset[key(f, w)] = m;
  endfunction

  // Words of frames [base, base+count) that differ from the golden copy.
  function automatic int unsigned upsets_in(int unsigned base, int unsigned count);
    int unsigned n = 0;
    foreach (upset[k]) if (k / 256 >= base && k / 256 < base + count) n++;
    return n;
  endfunction

  function automatic int unsigned upsets_total();
    return upset.num();
  endfunction

  always_ff @(posedge clk) gate <= stall ? ($urandom_range(3) != 0) : 1'b1;

  assign cmd_ready = (st == M_IDLE);
  assign rd_valid  = (st == M_READ) && gate;
  assign rd_data   = cfg_word(fr, idx);
  assign wr_ready  = (st == M_WRITE) && gate;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= M_IDLE;
      fr <= '0;
      idx <= 0;
      reads <= 0;
      writes <= 0;
    end else begin
      case (st)
        M_IDLE: if (cmd_valid) begin
          fr  <= cmd_frame;
          idx <= 0;
          st  <= cmd_write ? M_WRITE : M_READ;
          if (cmd_write) writes <= writes + 1; else reads <= reads + 1;
        end
        M_READ: if (rd_valid && rd_ready) begin
          idx <= idx + 1;
          if (idx == WORDS - 1) st <= M_IDLE;
        end
        M_WRITE: if (wr_valid && wr_ready) begin
          inject(fr, idx, wr_data ^ cfg_word(fr, idx));
          idx <= idx + 1;
          if (idx == WORDS - 1) st <= M_IDLE;
        end
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
