// tb_logic_unit: self-checking test of the SHA-1 round logical function.
// Applies random and corner B, C, D words in all four rounds and compares
// f with bit-by-bit truth tables worked out in the testbench.
module tb_logic_unit;
  import sha1_pkg::*;

  round_t rnd;
  word_t  b, c, d, f;
  int     checks = 0, failures = 0;

  logic_unit dut (.rnd(rnd), .b(b), .c(c), .d(d), .f(f));

  function automatic word_t expect_f(round_t r, word_t x, word_t y, word_t z);
    word_t o;
    for (int i = 0; i < 32; i++) begin
      case (r)
        RND1:       o[i] = x[i] ? y[i] : z[i];
        RND3:       o[i] = (int'(x[i]) + int'(y[i]) + int'(z[i])) >= 2;
        default:    o[i] = ^{x[i], y[i], z[i]};
      endcase
    end
    return o;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      for (int n = 0; n < 200; n++) begin
        rnd = round_t'(r);
        if (n < 8) begin
          b = {32{n[0]}}; c = {32{n[1]}}; d = {32{n[2]}};
        end else begin
          b = $urandom; c = $urandom; d = $urandom;
        end
        #1;
        checks++;
        if (f !== expect_f(rnd, b, c, d)) begin
          failures++;
          $display("FAIL round %0d b=%h c=%h d=%h f=%h exp=%h", r, b, c, d, f,
                   expect_f(rnd, b, c, d));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
