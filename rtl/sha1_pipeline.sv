// sha1_pipeline: pipelined SHA-1 hashing core (top level).
//
// Hashes a message that software has already padded and cut into 512-bit
// blocks. Each block enters as sixteen 32-bit big-endian words on
// consecutive cycles; the core runs the 80 SHA-1 steps with one step per
// clock cycle behind a four-cycle adder pipeline and completes a block
// every 84 cycles (counts 0..83 of the control unit's mod-84 counter).
// Blocks of one message chain through the Reg2 chaining values; the first
// block of a message restarts from the hardwired IV.
//
// Interface:
//   ready        high when a block may start
//   cnt          the control unit's mod-84 count (0 while idle)
//   blk_start    high with word 0 of a block (only while ready)
//   blk_first    with blk_start: first block of a message
//   blk_last     with blk_start: last block; its result is the digest
//   msg_in       word 0 with blk_start, then words 1..15 on the next
//                fifteen cycles
//   digest_valid one cycle per digest word, five per message
//   digest_idx   which word: 4,3,2,1,0 = H4..H0 (the digest is H0..H4)
//   digest_word  the word
// Timing: with word 0 at cycle 0, the next block may start at cycle 84,
// and the digest words of a last block appear at cycles 82..86 (H4 first,
// H0 at cycle 86). Cascading the five words into the 160-bit digest, like
// padding, is left to the host. Splitting the core into a counter-based
// control unit and a datapath follows the document; the start/ready
// handshake and the output word order are this design's choices.
module sha1_pipeline
  import sha1_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   blk_start,
  input  logic   blk_first,
  input  logic   blk_last,
  input  word_t  msg_in,
  output logic   ready,
  output logic [CNT_W-1:0] cnt,
  output logic   digest_valid,
  output seed_t  digest_idx,
  output word_t  digest_word
);

  ctrl_t ctrl;

  sha1_cu u_cu (
    .clk       (clk),
    .rst_n     (rst_n),
    .blk_start (blk_start),
    .blk_first (blk_first),
    .blk_last  (blk_last),
    .ready     (ready),
    .cnt       (cnt),
    .ctrl      (ctrl)
  );

  sha1_dpu u_dpu (
    .clk          (clk),
    .rst_n        (rst_n),
    .ctrl         (ctrl),
    .msg_in       (msg_in),
    .digest_valid (digest_valid),
    .digest_idx   (digest_idx),
    .digest_word  (digest_word)
  );

endmodule
