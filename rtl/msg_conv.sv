// msg_conv: SHA-1 message scheduler ("Msg_conv").
//
// Turns the sixteen 32-bit words of one 512-bit block into the eighty words
// W(0)..W(79). Sixteen registers hold the last sixteen words W(t-1)..W(t-16)
// as a shift window (win[0] is the newest). On a step with `load` high the
// next word is the input word (steps 0..15, big-endian order as delivered);
// otherwise it is ROTL1(W(t-3) ^ W(t-8) ^ W(t-14) ^ W(t-16)), taken from
// window slots 2, 7, 13 and 15. The window only moves when `shift` is high.
//
// Timing: the word selected in cycle t is registered at the clock edge, so
// `w` shows W(t) during the following cycle (one cycle of latency). The
// register window of sixteen flip-flop words, the input/feedback selection
// and the 1-bit rotation follow the document; the enable signals and the
// synchronous active-low reset are this design's choices.
module msg_conv
  import sha1_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,     // take msg_in as W(t) (t < 16)
  input  logic  shift,    // advance one step
  input  word_t msg_in,   // input message word
  output word_t w         // W(t) of the previous step
);

  word_t win [BLOCK_WORDS];
  word_t w_next;

  always_comb begin
    if (load) w_next = msg_in;
    else      w_next = rotl(win[2] ^ win[7] ^ win[13] ^ win[15], 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < BLOCK_WORDS; i++) win[i] <= '0;
    end else if (shift) begin
      win[0] <= w_next;
      for (int i = 1; i < BLOCK_WORDS; i++) win[i] <= win[i-1];
    end
  end

  assign w = win[0];

endmodule
