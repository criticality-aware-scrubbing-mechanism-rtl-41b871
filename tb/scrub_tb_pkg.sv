// scrub_tb_pkg: shared pieces of the scrubbing testbenches.
//
// golden_word() defines the original configuration of the whole device: the
// golden copy model returns it and the ICAP model holds it, plus injected
// upsets. Word = (frame * 0x9E3779B1) ^ (word * 0x85EBCA77) ^ 0x5BD1E995,
// computed instead of stored so that full-size devices cost no memory.
package scrub_tb_pkg;
  import scrub_pkg::*;

  function automatic word_t golden_word(frame_addr_t f, word_idx_t w);
    return (32'(f) * 32'h9E37_79B1) ^ (32'(w) * 32'h85EB_CA77) ^ 32'h5BD1_E995;
  endfunction
endpackage
