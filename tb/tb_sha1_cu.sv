// tb_sha1_cu: self-checking test of the mod-84 control unit.
// Starts a sequence of blocks (back to back, after idle gaps, first and
// last flags in all combinations) and checks, every cycle, the count, the
// ready flag and every timing signal against the schedule worked out here
// from the start cycles alone: W selection at counts 0..79 (input words at
// 0..15), RegP1 at 1..80, RegP2 at 2..81, steps at 3..82, Reg1 set-up at 2,
// seed additions H4..H0 at 81..85 after the start, 84 cycles per block.
module tb_sha1_cu;
  import sha1_pkg::*;

  logic             clk = 0, rst_n = 0;
  logic             blk_start = 0, blk_first = 0, blk_last = 0;
  logic             ready;
  logic [CNT_W-1:0] cnt;
  ctrl_t            ctrl, exp_c;
  int               checks = 0, failures = 0;

  // Start cycle (after reset) and flags of each block.
  int   start_at [6] = '{0, 84, 168, 260, 344, 431};
  logic first_f  [6] = '{1, 0, 0, 1, 1, 0};
  logic last_f   [6] = '{0, 0, 1, 1, 0, 1};
  int   cyc;
  int   exp_cnt;
  logic exp_ready;

  sha1_cu dut (.clk(clk), .rst_n(rst_n), .blk_start(blk_start),
               .blk_first(blk_first), .blk_last(blk_last), .ready(ready),
               .cnt(cnt), .ctrl(ctrl));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic round_t rnd(int t);
    return round_t'(t / 20);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (cyc = 0; cyc < 540; cyc++) begin
      @(negedge clk);
      blk_start = 0; blk_first = 1'($urandom); blk_last = 1'($urandom);
      exp_c = '0; exp_cnt = 0; exp_ready = 1;
      for (int i = 0; i < 6; i++) begin
        int k;
        k = cyc - start_at[i];
        if (k == 0) begin
          blk_start = 1; blk_first = first_f[i]; blk_last = last_f[i];
        end
        if (k >= 0 && k < 84) begin
          exp_cnt       = k;
          exp_ready     = (k == 0);
          exp_c.w_load  = k < 16;
          exp_c.w_shift = k < 80;
          exp_c.p1_en   = k >= 1 && k <= 80;
          if (exp_c.p1_en) exp_c.k_rnd = rnd(k - 1);
          exp_c.p2_en   = k >= 2 && k <= 81;
          exp_c.p2_first = k == 2;
          exp_c.step_en = k >= 3 && k <= 82;
          if (exp_c.step_en) exp_c.f_rnd = rnd(k - 3);
          exp_c.init_en = k == 2;
          exp_c.init_iv = first_f[i];
        end
        if (k >= 81 && k <= 85) begin
          exp_c.seed_en  = 1;
          exp_c.seed_sel = seed_t'(85 - k);
          exp_c.seed_out = last_f[i];
        end
      end
      #1;
      checks++;
      if (int'(cnt) != exp_cnt || ready !== exp_ready) begin
        failures++;
        $display("FAIL cycle %0d: cnt %0d ready %b, expected %0d %b", cyc, cnt, ready,
                 exp_cnt, exp_ready);
      end
      checks++;
      if (ctrl.w_load !== exp_c.w_load || ctrl.w_shift !== exp_c.w_shift ||
          ctrl.p1_en !== exp_c.p1_en || ctrl.p2_en !== exp_c.p2_en ||
          ctrl.p2_first !== exp_c.p2_first || ctrl.step_en !== exp_c.step_en ||
          ctrl.init_en !== exp_c.init_en || ctrl.seed_en !== exp_c.seed_en ||
          (exp_c.p1_en && ctrl.k_rnd !== exp_c.k_rnd) ||
          (exp_c.step_en && ctrl.f_rnd !== exp_c.f_rnd) ||
          (exp_c.init_en && ctrl.init_iv !== exp_c.init_iv) ||
          (exp_c.p2_first && ctrl.init_iv !== exp_c.init_iv) ||
          (exp_c.seed_en && (ctrl.seed_sel !== exp_c.seed_sel ||
                             ctrl.seed_out !== exp_c.seed_out))) begin
        failures++;
        $display("FAIL cycle %0d: ctrl %h, expected %h", cyc, ctrl, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
