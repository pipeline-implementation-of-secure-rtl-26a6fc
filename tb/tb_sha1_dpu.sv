// tb_sha1_dpu: self-checking test of the SHA-1 datapath on its own.
// The testbench plays the control unit: from a list of block start cycles
// it produces the timing signals of the 84-cycle schedule (W selection at
// counts 0..79, RegP1 at 1..80, RegP2 at 2..81, steps at 3..82, set-up at
// 2, seed additions H4..H0 at 81..85), feeds random blocks, and compares
// every digest word with the reference model, including its index and the
// cycle it appears (82..86 after the block's start). Messages of one, two
// and three blocks run back to back and after idle gaps.
module tb_sha1_dpu;
  import sha1_pkg::*;
  import sha1_ref_pkg::*;

  localparam int NBLK = 8;

  logic  clk = 0, rst_n = 0;
  ctrl_t ctrl;
  word_t msg_in;
  logic  digest_valid;
  seed_t digest_idx;
  word_t digest_word;
  int    checks = 0, failures = 0, seen = 0;

  int    start_at [NBLK] = '{0, 84, 168, 252, 336, 420, 504, 640};
  logic  first_f  [NBLK] = '{1, 1, 0, 1, 0, 0, 1, 1};
  logic  last_f   [NBLK] = '{1, 0, 1, 0, 0, 1, 1, 1};
  block_t blocks  [NBLK];
  hash_t  chain   [NBLK];
  int     cyc;

  sha1_dpu dut (.clk(clk), .rst_n(rst_n), .ctrl(ctrl), .msg_in(msg_in),
                .digest_valid(digest_valid), .digest_idx(digest_idx),
                .digest_word(digest_word));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected chaining values after each block.
  initial begin
    hash_t h;
    for (int i = 0; i < NBLK; i++) begin
      for (int j = 0; j < 16; j++) blocks[i][j] = $urandom;
      if (first_f[i]) h = sha1_iv();
      h = sha1_compress(h, blocks[i]);
      chain[i] = h;
    end
    // the standard one-block vector "abc" as block 0
    blocks[0] = '{32'h61626380, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 32'h18};
    chain[0] = sha1_compress(sha1_iv(), blocks[0]);
  end

  initial begin
    ctrl = '0; msg_in = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (cyc = 0; cyc < 760; cyc++) begin
      @(negedge clk);
      ctrl = '0; msg_in = $urandom;
      for (int i = 0; i < NBLK; i++) begin
        int k;
        k = cyc - start_at[i];
        if (k >= 0 && k < 84) begin
          ctrl.w_load  = k < 16;
          if (k < 16) msg_in = blocks[i][k];
          ctrl.w_shift = k < 80;
          ctrl.p1_en   = k >= 1 && k <= 80;
          ctrl.k_rnd   = round_t'(k >= 1 ? (k - 1) / 20 : 0);
          ctrl.p2_en   = k >= 2 && k <= 81;
          ctrl.p2_first = k == 2;
          ctrl.step_en = k >= 3 && k <= 82;
          ctrl.f_rnd   = round_t'(k >= 3 && k <= 82 ? (k - 3) / 20 : 0);
          ctrl.init_en = k == 2;
          ctrl.init_iv = first_f[i];
        end
        if (k >= 81 && k <= 85) begin
          ctrl.seed_en  = 1;
          ctrl.seed_sel = seed_t'(85 - k);
          ctrl.seed_out = last_f[i];
        end
      end
      @(posedge clk); #1;
      // a digest word of block i is due 82..86 cycles after its start
      begin
        logic due;
        due = 0;
        for (int i = 0; i < NBLK; i++) begin
          int k;
          k = cyc + 1 - start_at[i];
          if (last_f[i] && k >= 82 && k <= 86) begin
            due = 1;
            checks++;
            if (!digest_valid || digest_idx !== seed_t'(86 - k) ||
                digest_word !== chain[i][86 - k]) begin
              failures++;
              $display("FAIL block %0d H%0d: valid %b idx %0d word %h, expected %h", i,
                       86 - k, digest_valid, digest_idx, digest_word, chain[i][86 - k]);
            end else seen++;
          end
        end
        if (!due) begin
          checks++;
          if (digest_valid) begin
            failures++;
            $display("FAIL unexpected digest word at cycle %0d", cyc);
          end
        end
      end
    end
    checks++;
    if (seen != 25) begin
      failures++;
      $display("FAIL %0d digest words seen, expected 25", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
