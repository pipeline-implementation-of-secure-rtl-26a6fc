// logic_unit: the SHA-1 round logical function f(t;B,C,D).
//
// Purely combinational. The round index selects one of three bitwise
// functions on the 32-bit working variables B, C and D:
//   round 1 (steps  0..19): (B & C) | (~B & D)          -- choose
//   round 2 (steps 20..39): B ^ C ^ D                   -- parity
//   round 3 (steps 40..59): (B & C) | (B & D) | (C & D) -- majority
//   round 4 (steps 60..79): B ^ C ^ D                   -- parity
// The functions are those of the document (and of FIPS 180); building the
// unit as three gate networks and a 4:1 selector is this design's choice.
module logic_unit
  import sha1_pkg::*;
(
  input  round_t rnd,
  input  word_t  b,
  input  word_t  c,
  input  word_t  d,
  output word_t  f
);

  always_comb begin
    case (rnd)
      RND1:    f = (b & c) | (~b & d);
      RND3:    f = (b & c) | (b & d) | (c & d);
      default: f = b ^ c ^ d;
    endcase
  end

endmodule
