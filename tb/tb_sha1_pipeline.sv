// tb_sha1_pipeline: end-to-end test of the pipelined SHA-1 core at its
// default configuration.
//
// Hashes the two FIPS 180 example messages ("abc", one block, and the
// 448-bit "abcdbcdecdef...nopq", two blocks) and a series of random
// messages of 0..250 bytes, padded here in the testbench. Blocks are
// started as soon as the core is ready or after random idle gaps. Every
// digest is compared with the reference model (and the two examples also
// with their published digests). Timing checks: the core is ready again
// exactly 84 cycles after a block starts, the count shown on `cnt`
// follows the cycles since the start, and the digest words of a last
// block appear 82..86 cycles after its start, H4 first and H0 last.
// Counted mechanisms, each of which must occur: blocks chained within a
// message, blocks started back to back, a new message started while the
// previous digest is still being added up, and idle gaps between blocks.
module tb_sha1_pipeline;
  import sha1_pkg::*;
  import sha1_ref_pkg::*;

  localparam int NMSG = 24;

  logic             clk = 0, rst_n = 0;
  logic             blk_start = 0, blk_first = 0, blk_last = 0;
  word_t            msg_in = '0;
  logic             ready;
  logic [CNT_W-1:0] cnt;
  logic             digest_valid;
  seed_t            digest_idx;
  word_t            digest_word;

  int checks = 0, failures = 0;
  int cyc = 0;

  // mechanism counters
  int n_chained = 0, n_back_to_back = 0, n_restart_overlap = 0, n_gap = 0;
  int n_digests = 0, n_blocks = 0;

  hash_t expected [$];
  int    last_start [$];

  sha1_pipeline dut (.clk(clk), .rst_n(rst_n), .blk_start(blk_start),
                     .blk_first(blk_first), .blk_last(blk_last), .msg_in(msg_in),
                     .ready(ready), .cnt(cnt), .digest_valid(digest_valid),
                     .digest_idx(digest_idx), .digest_word(digest_word));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Digest monitor.
  initial begin
    hash_t got;
    int    k;
    forever begin
      @(posedge clk); #1;
      if (digest_valid) begin
        got[digest_idx] = digest_word;
        checks++;
        k = cyc - last_start[0];
        if (k != 86 - int'(digest_idx)) begin
          failures++;
          $display("FAIL H%0d appeared %0d cycles after the block start", digest_idx, k);
        end
        if (digest_idx == SEED_H0) begin
          checks++;
          if (got != expected[0]) begin
            failures++;
            $display("FAIL digest %h %h %h %h %h, expected %h %h %h %h %h",
                     got[0], got[1], got[2], got[3], got[4], expected[0][0],
                     expected[0][1], expected[0][2], expected[0][3], expected[0][4]);
          end
          void'(expected.pop_front());
          void'(last_start.pop_front());
          n_digests++;
        end
      end
    end
  end

  task automatic send_message(input w32_t words[$], input bit allow_gap);
    int nb, prev_start, gap;
    hash_t h;
    block_t blk;
    nb = words.size() / 16;
    h = sha1_iv();
    for (int b = 0; b < nb; b++) begin
      for (int j = 0; j < 16; j++) blk[j] = words[16 * b + j];
      h = sha1_compress(h, blk);
    end
    expected.push_back(h);
    // called and returns at a falling edge
    for (int b = 0; b < nb; b++) begin
      while (!ready) @(negedge clk);
      gap = (allow_gap && ($urandom % 3 == 0)) ? 1 + $urandom % 5 : 0;
      if (gap > 0) begin
        n_gap++;
        repeat (gap) @(negedge clk);
      end
      if (cyc > 0 && gap == 0 && expected.size() > 1 && b == 0 && last_start.size() > 0 &&
          cyc == last_start[$] + 84)
        n_restart_overlap++;
      blk_start = 1; blk_first = (b == 0); blk_last = (b == nb - 1);
      msg_in = words[16 * b];
      if (b > 0) begin
        n_chained++;
        if (cyc == prev_start + 84) n_back_to_back++;
      end
      prev_start = cyc;
      n_blocks++;
      if (b == nb - 1) last_start.push_back(cyc);
      for (int j = 1; j < 16; j++) begin
        @(negedge clk);
        blk_start = 0; blk_first = 1'($urandom); blk_last = 1'($urandom);
        msg_in = words[16 * b + j];
      end
      @(negedge clk);
      blk_start = 0; msg_in = $urandom;
      // ready must come back exactly 84 cycles after the start
      repeat (84 - 16) begin
        checks++;
        if (ready || int'(cnt) != cyc - prev_start) begin
          failures++;
          $display("FAIL ready %b count %0d at cycle %0d, block started at %0d", ready, cnt,
                   cyc, prev_start);
        end
        @(negedge clk);
      end
      checks++;
      if (!ready || cyc != prev_start + 84) begin
        failures++;
        $display("FAIL not ready 84 cycles after start (%0d, start %0d)", cyc, prev_start);
      end
    end
  endtask

  initial begin
    w32_t  words[$];
    string s;
    hash_t fips_abc, fips_448;
    fips_abc = '{32'hA9993E36, 32'h4706816A, 32'hBA3E2571, 32'h7850C26C, 32'h9CD0D89D};
    fips_448 = '{32'h84983E44, 32'h1C3BD26E, 32'hBAAE4AA1, 32'hF95129E5, 32'hE54670F1};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    @(negedge clk);

    sha1_pad("abc", words);
    send_message(words, 0);
    checks++;
    if (expected.size() != 1 || expected[0] != fips_abc) begin
      failures++;
      $display("FAIL reference model disagrees with the published digest of abc");
    end
    sha1_pad("abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq", words);
    send_message(words, 0);
    checks++;
    if (expected[$] != fips_448) begin
      failures++;
      $display("FAIL reference model disagrees with the published 448-bit digest: %h %h", expected[$][0], expected[$][4]);
    end
    for (int m = 0; m < NMSG; m++) begin
      s = "";
      for (int i = $urandom % 251; i > 0; i--) s = {s, string'(byte'(32'h20 + $urandom % 95))};
      sha1_pad(s, words);
      send_message(words, m >= NMSG / 2);
    end
    repeat (100) @(negedge clk);

    checks++;
    if (n_digests != NMSG + 2) begin
      failures++;
      $display("FAIL %0d digests seen, expected %0d", n_digests, NMSG + 2);
    end
    checks += 4;
    if (n_chained == 0)         begin failures++; $display("FAIL no chained block");       end
    if (n_back_to_back == 0)    begin failures++; $display("FAIL no back-to-back block");  end
    if (n_restart_overlap == 0) begin failures++; $display("FAIL no overlapped restart");  end
    if (n_gap == 0)             begin failures++; $display("FAIL no idle gap");            end
    $display("blocks %0d, digests %0d, chained %0d, back-to-back %0d, restart during seed additions %0d, gaps %0d",
             n_blocks, n_digests, n_chained, n_back_to_back, n_restart_overlap, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
