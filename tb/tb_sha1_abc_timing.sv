// tb_sha1_abc_timing: the single-block timing run of the core.
//
// Hashes the padded one-block message "abc" straight after reset, as a
// host would: sixteen words on consecutive cycles, then waits for the
// digest. Checks the five digest words against the published FIPS 180
// digest A9993E36 4706816A BA3E2571 7850C26C 9CD0D89D, that the core is
// ready for the next block after exactly 84 cycles (512 bits per 84
// cycles, about 61 Mbit/s at a 10 MHz clock), that the step counter
// runs through counts 0..83, and that the last digest
// word is out no later than two cycles after that 84-cycle period (cycle
// 86 counted from the first word).
module tb_sha1_abc_timing;
  import sha1_pkg::*;

  logic             clk, rst_n;
  logic             blk_start, blk_first, blk_last;
  word_t            msg_in;
  logic             ready;
  logic [CNT_W-1:0] cnt;
  logic             digest_valid;
  seed_t            digest_idx;
  word_t            digest_word;

  int    checks = 0, failures = 0;
  int    cnt_max;
  int    cyc, t_start, t_ready, t_last_word, n_words;
  word_t got [5];
  word_t fips [5] = '{32'hA9993E36, 32'h4706816A, 32'hBA3E2571, 32'h7850C26C, 32'h9CD0D89D};
  word_t blk [16] = '{32'h61626380, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 32'h00000018};

  sha1_pipeline dut (.clk(clk), .rst_n(rst_n), .blk_start(blk_start),
                     .blk_first(blk_first), .blk_last(blk_last), .msg_in(msg_in),
                     .ready(ready), .cnt(cnt), .digest_valid(digest_valid),
                     .digest_idx(digest_idx), .digest_word(digest_word));

  initial begin
    clk = 0;
    forever #50 clk = ~clk;   // 10 MHz
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (int'(cnt) > cnt_max) cnt_max <= int'(cnt);
    if (rst_n && digest_valid) begin
      got[digest_idx] <= digest_word;
      n_words         <= n_words + 1;
      t_last_word     <= cyc;
    end
    if (ready && t_ready < 0 && cyc > t_start && t_start >= 0) t_ready <= cyc;
  end

  initial begin
    rst_n = 0; blk_start = 0; blk_first = 0; blk_last = 0; msg_in = '0;
    cnt_max = 0; t_start = -1; t_ready = -1; t_last_word = -1; n_words = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    t_start = cyc;
    for (int j = 0; j < 16; j++) begin
      blk_start = (j == 0); blk_first = (j == 0); blk_last = (j == 0);
      msg_in = blk[j];
      @(negedge clk);
    end
    blk_start = 0; msg_in = '0;
    repeat (100) @(negedge clk);

    checks++;
    if (n_words != 5) begin
      failures++;
      $display("FAIL %0d digest words, expected 5", n_words);
    end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (got[i] !== fips[i]) begin
        failures++;
        $display("FAIL H%0d = %h, expected %h", i, got[i], fips[i]);
      end
    end
    checks++;
    if (t_ready - t_start != 84) begin
      failures++;
      $display("FAIL ready again after %0d cycles, expected 84", t_ready - t_start);
    end
    checks++;
    if (t_last_word - t_start > 86) begin
      failures++;
      $display("FAIL last digest word at cycle %0d, expected by 86", t_last_word - t_start);
    end
    checks++;
    if (cnt_max != 83) begin
      failures++;
      $display("FAIL the step counter reached %0d, expected a mod-84 count (0..83)", cnt_max);
    end
    $display("digest %h %h %h %h %h; block period %0d cycles (%.1f Mbit/s at 10 MHz); last word at cycle %0d",
             got[0], got[1], got[2], got[3], got[4], t_ready - t_start,
             512.0 * 10.0 / real'(t_ready - t_start), t_last_word - t_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
