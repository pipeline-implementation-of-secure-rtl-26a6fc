// sha1_dpu: datapath unit of the pipelined SHA-1 core.
//
// Storage: Reg1 (A..D, the working variables read and updated every step),
// Reg2 (H0..H4, the chaining values of the block in progress), Msg_conv's
// sixteen-word window and two pipeline registers RegP1/RegP2 between the
// modulo-2^32 adders. Functional units: the logical unit, the K(t)
// selector, adders, fixed rotations (wiring only) and the seed adder.
//
// How one step is pipelined. SHA-1 step t computes
//   TEMP = ROTL5(A) + f(B,C,D) + E + W(t) + K(t)
// Of the five operands only ROTL5(A) and f(B,C,D) depend on the result of
// step t-1; E(t) equals D one step earlier. The three independent operands
// are therefore summed ahead of time in two pipeline stages:
//   RegP1 <= W(t) + K(t)          (one cycle after Msg_conv selects W(t))
//   RegP2 <= RegP1 + E(t)         (E(t) read from Reg1.D, or from H4 at t=0)
// and the step itself adds only ROTL5(A) + f + RegP2 before Reg1 shifts:
//   A <= TEMP, B <= A, C <= ROTL30(B), D <= C.
// E itself needs no register: every reader of E takes it from D (or, for
// the seed addition of H4, from C) one or two cycles earlier.
// A word entering Msg_conv thus reaches Reg1.A four cycles later, and one
// step completes per cycle.
//
// Seed additions. At the end of a block each H(i) is increased by its
// working variable. The operand of H4, H3 and H2 passes through Reg1.C at
// three consecutive cycles (counts 81, 82, 83), and those of H1 and H0 sit
// in Reg1.B and Reg1.A once the last step is done. One seed adder therefore
// updates H4, H3, H2, H1, H0 on five consecutive cycles, overlapping the
// last steps and the first two cycles of the next block, while the step
// adders would otherwise idle.
//
// Output: when the block is the last one of a message, each updated H(i)
// is also registered on `digest_word` with `digest_valid` and its index
// `digest_idx`, one cycle after its seed addition (H4 first, H0 last). All
// timing signals come from sha1_cu through `ctrl`.
//
// Follows the document: Reg1/Reg2/RegP structure, hardwired IV and K,
// Reg1 initialised from Reg2, the four-cycle adder latency and seed
// additions on idle cycles. This design's own choices: the exact split of
// the five-operand sum into stages, a single shared seed adder, the order
// of the output words and the registered output.
module sha1_dpu
  import sha1_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  ctrl_t ctrl,
  input  word_t msg_in,
  output logic  digest_valid,
  output seed_t digest_idx,
  output word_t digest_word
);

  // Reg1: working variables; Reg2: chaining values.
  word_t a, b, c, d;   // Reg1.E is not needed: E(t) is read from D
                       // one step early, and H4's operand from C
  word_t h [5];
  word_t regp1, regp2;

  word_t w_t, f_t, temp, e_src;
  word_t seed_op, seed_sum;

  msg_conv u_msg_conv (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (ctrl.w_load),
    .shift  (ctrl.w_shift),
    .msg_in (msg_in),
    .w      (w_t)
  );

  logic_unit u_logic_unit (
    .rnd (ctrl.f_rnd),
    .b   (b),
    .c   (c),
    .d   (d),
    .f   (f_t)
  );

  // E(t) for the RegP2 stage: step 0 takes the block's H4 directly.
  always_comb begin
    if (ctrl.p2_first) e_src = ctrl.init_iv ? IV_H4 : h[4];
    else               e_src = d;
  end

  assign temp = rotl(a, 5) + f_t + regp2;

  // Seed adder operand: H4..H2 take Reg1.C, H1 takes Reg1.B, H0 Reg1.A.
  always_comb begin
    case (ctrl.seed_sel)
      SEED_H0: seed_op = a;
      SEED_H1: seed_op = b;
      default: seed_op = c;
    endcase
  end

  assign seed_sum = h[ctrl.seed_sel] + seed_op;

  // Adder pipeline registers.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      regp1 <= '0;
      regp2 <= '0;
    end else begin
      if (ctrl.p1_en) regp1 <= w_t + k_of(ctrl.k_rnd);
      if (ctrl.p2_en) regp2 <= regp1 + e_src;
    end
  end

  // Reg1.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {a, b, c, d} <= '0;
    end else if (ctrl.init_en) begin
      if (ctrl.init_iv) {a, b, c, d} <= {IV_H0, IV_H1, IV_H2, IV_H3};
      else              {a, b, c, d} <= {h[0], h[1], h[2], h[3]};
    end else if (ctrl.step_en) begin
      a <= temp;
      b <= a;
      c <= rotl(b, 30);
      d <= c;
    end
  end

  // Reg2.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      h[0] <= IV_H0;
      h[1] <= IV_H1;
      h[2] <= IV_H2;
      h[3] <= IV_H3;
      h[4] <= IV_H4;
    end else if (ctrl.init_en && ctrl.init_iv) begin
      h[0] <= IV_H0;
      h[1] <= IV_H1;
      h[2] <= IV_H2;
      h[3] <= IV_H3;
      h[4] <= IV_H4;
    end else if (ctrl.seed_en) begin
      h[ctrl.seed_sel] <= seed_sum;
    end
  end

  // Output digest word.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      digest_valid <= 1'b0;
      digest_idx   <= SEED_H0;
      digest_word  <= '0;
    end else begin
      digest_valid <= ctrl.seed_en && ctrl.seed_out;
      if (ctrl.seed_en) begin
        digest_idx  <= ctrl.seed_sel;
        digest_word <= seed_sum;
      end
    end
  end

  // Timing signals that must never coincide.
  a_init_step: assert property (@(posedge clk) disable iff (!rst_n)
                                !(ctrl.init_en && (ctrl.step_en || ctrl.seed_en)))
    else $error("Reg1/Reg2 initialisation overlaps a step or a seed addition");

endmodule
