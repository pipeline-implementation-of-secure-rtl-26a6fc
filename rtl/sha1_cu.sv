// sha1_cu: counter-based control unit of the pipelined SHA-1 core.
//
// A mod-84 counter walks through one block period; every timing signal for
// the datapath is decoded from its value, so the unit has no other state
// than the counter, a busy flag, the first/last flags of the current block
// and a short sequencer for the seed (chaining value) additions.
//
// Interface and timing:
//   * `ready` is high when no block is in progress. The host starts a block
//     by raising `blk_start` in a cycle where `ready` is high, together with
//     word 0 of the block and the flags `blk_first` (first block of a
//     message: chaining values start from the IV) and `blk_last` (last
//     block: its chaining values are the digest). That cycle is count 0;
//     words 1..15 follow in counts 1..15, one per cycle, with no gaps.
//   * A block occupies counts 0..83. After count 83 the core is ready again,
//     so back-to-back blocks take exactly 84 cycles each.
//   * Schedule inside a period (step t = 0..79):
//       count t      Msg_conv selects W(t)            (counts 0..79)
//       count t+1    RegP1 <= W(t) + K(t)             (counts 1..80)
//       count t+2    RegP2 <= RegP1 + E(t)            (counts 2..81)
//       count t+3    Reg1  <= step t result, A = TEMP (counts 3..82)
//     Reg1 is initialised at count 2 (from Reg2, or from the IV on a first
//     block). The five seed additions H += working variable run one per
//     cycle at counts 81, 82, 83 and at counts 0 and 1 of the next period,
//     in the order H4, H3, H2, H1, H0, each as soon as its operand is final.
// The mod-84 counter, the 84-cycle period and the overlap of the final
// additions with the last steps and with the following block follow the
// document; the exact counts of each stage, the handshake and the flags
// are this design's own choices.
module sha1_cu
  import sha1_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             blk_start,
  input  logic             blk_first,
  input  logic             blk_last,
  output logic             ready,
  output logic [CNT_W-1:0] cnt,
  output ctrl_t            ctrl
);

  logic             busy;
  logic             active;
  logic             first_q, last_q;
  logic             seed_act, seed_last;
  seed_t            seed_ph;

  assign active = busy | blk_start;
  assign ready  = ~busy;

  // Counter and block flags.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt     <= '0;
      busy    <= 1'b0;
      first_q <= 1'b0;
      last_q  <= 1'b0;
    end else begin
      if (!busy && blk_start) begin
        first_q <= blk_first;
        last_q  <= blk_last;
      end
      if (active) begin
        if (cnt == CNT_W'(PERIOD - 1)) begin
          cnt  <= '0;
          busy <= 1'b0;
        end else begin
          cnt  <= cnt + 1'b1;
          busy <= 1'b1;
        end
      end
    end
  end

  // Seed sequencer: H4 at count 81, then H3, H2, H1, H0 on the next cycles.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      seed_act  <= 1'b0;
      seed_ph   <= SEED_H4;
      seed_last <= 1'b0;
    end else if (active && cnt == CNT_W'(STEPS + 1)) begin
      seed_act  <= 1'b1;
      seed_ph   <= SEED_H3;
      seed_last <= last_q;
    end else if (seed_act) begin
      if (seed_ph == SEED_H0) seed_act <= 1'b0;
      else                    seed_ph  <= seed_t'(seed_ph - 3'd1);
    end
  end

  // Decode of the timing signals.
  always_comb begin
    ctrl          = '0;
    ctrl.w_load   = active && (cnt < CNT_W'(BLOCK_WORDS));
    ctrl.w_shift  = active && (cnt < CNT_W'(STEPS));
    ctrl.p1_en    = active && (cnt >= CNT_W'(1)) && (cnt <= CNT_W'(STEPS));
    ctrl.k_rnd    = round_of(int'(cnt) - 1);
    ctrl.p2_en    = active && (cnt >= CNT_W'(2)) && (cnt <= CNT_W'(STEPS + 1));
    ctrl.p2_first = active && (cnt == CNT_W'(2));
    ctrl.step_en  = active && (cnt >= CNT_W'(3)) && (cnt <= CNT_W'(STEPS + 2));
    ctrl.f_rnd    = round_of(int'(cnt) - 3);
    ctrl.init_en  = active && (cnt == CNT_W'(2));
    ctrl.init_iv  = first_q;
    if (active && cnt == CNT_W'(STEPS + 1)) begin
      ctrl.seed_en  = 1'b1;
      ctrl.seed_sel = SEED_H4;
      ctrl.seed_out = last_q;
    end else if (seed_act) begin
      ctrl.seed_en  = 1'b1;
      ctrl.seed_sel = seed_ph;
      ctrl.seed_out = seed_last;
    end
  end

  // The host may only start a block while the core is ready; the flags
  // belong to the start cycle.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                 blk_start |-> ready)
    else $error("blk_start while a block is in progress");

endmodule
