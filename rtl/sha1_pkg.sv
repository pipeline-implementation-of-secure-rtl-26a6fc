// sha1_pkg: constants, types and small functions shared by the pipelined
// SHA-1 core.
//
// Holds the SHA-1 initial chaining values H0..H4 and the four round
// constants K1..K4 (both hardwired, as in the FIPS 180 standard), the round
// index type used to pick K(t) and the logical function f(t;B,C,D), the
// fixed left rotation (a "zero cost barrel shifter": pure wiring), and the
// bundle of timing signals that the control unit sends to the datapath.
// The 84-cycle schedule constants describe when each pipeline stage works
// inside one block period; the split into stages is this design's own
// reading of the four-cycle adder pipeline.
package sha1_pkg;

  localparam int unsigned WORD_W      = 32;
  localparam int unsigned STEPS       = 80;   // SHA-1 steps per block
  localparam int unsigned BLOCK_WORDS = 16;   // 512-bit block as 32-bit words
  localparam int unsigned PERIOD      = 84;   // cycles per block (mod-84 counter)
  localparam int unsigned CNT_W       = 7;

  typedef logic [WORD_W-1:0] word_t;

  // Initial chaining values (IV) H0..H4.
  localparam word_t IV_H0 = 32'h6745_2301;
  localparam word_t IV_H1 = 32'hEFCD_AB89;
  localparam word_t IV_H2 = 32'h98BA_DCFE;
  localparam word_t IV_H3 = 32'h1032_5476;
  localparam word_t IV_H4 = 32'hC3D2_E1F0;

  // Round constants.
  localparam word_t K1 = 32'h5A82_7999;   // steps  0..19
  localparam word_t K2 = 32'h6ED9_EBA1;   // steps 20..39
  localparam word_t K3 = 32'h8F1B_BCDC;   // steps 40..59
  localparam word_t K4 = 32'hCA62_C1D6;   // steps 60..79

  // Which of the four 20-step rounds a step belongs to.
  typedef enum logic [1:0] {
    RND1 = 2'd0,   // f = Ch(B,C,D),     K1
    RND2 = 2'd1,   // f = B^C^D,         K2
    RND3 = 2'd2,   // f = Maj(B,C,D),    K3
    RND4 = 2'd3    // f = B^C^D,         K4
  } round_t;

  // Which chaining value the seed adder updates (H4 first, H0 last).
  typedef enum logic [2:0] {
    SEED_H0 = 3'd0,
    SEED_H1 = 3'd1,
    SEED_H2 = 3'd2,
    SEED_H3 = 3'd3,
    SEED_H4 = 3'd4
  } seed_t;

  // Timing signals from the control unit to the datapath.
  typedef struct packed {
    logic   w_load;     // Msg_conv takes the input word (steps 0..15)
    logic   w_shift;    // Msg_conv advances one step (steps 0..79)
    logic   p1_en;      // RegP1 <= W(t) + K(t)
    round_t k_rnd;      // round of the step in the RegP1 stage
    logic   p2_en;      // RegP2 <= RegP1 + E(t)
    logic   p2_first;   // step 0: E(0) comes from the chaining value H4
    logic   step_en;    // Reg1 <= next working variables (A = TEMP)
    round_t f_rnd;      // round of the step in the Reg1 stage
    logic   init_en;    // initialise Reg1 (and Reg2 on a first block)
    logic   init_iv;    // initialise from the hardwired IV (first block)
    logic   seed_en;    // seed adder: H(seed_sel) <= H + working variable
    seed_t  seed_sel;
    logic   seed_out;   // the sum is also a word of the final digest
  } ctrl_t;

  function automatic word_t rotl(input word_t x, input int unsigned n);
    return (x << n) | (x >> (WORD_W - n));
  endfunction

  function automatic round_t round_of(input int unsigned t);
    if (t < 20)      return RND1;
    else if (t < 40) return RND2;
    else if (t < 60) return RND3;
    else             return RND4;
  endfunction

  function automatic word_t k_of(input round_t r);
    case (r)
      RND1:    return K1;
      RND2:    return K2;
      RND3:    return K3;
      default: return K4;
    endcase
  endfunction

endpackage
