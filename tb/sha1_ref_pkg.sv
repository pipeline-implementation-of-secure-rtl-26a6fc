// sha1_ref_pkg: plain, unpipelined SHA-1 reference used by the testbenches.
//
// sha1_compress() applies the SHA-1 compression function to one 512-bit
// block given as sixteen big-endian words, straight from the FIPS 180
// definition (80-word schedule array, five working variables, one loop).
// sha1_pad() turns a byte string into padded 32-bit words. Nothing here is
// shared with the RTL, so the testbenches compare the core against an
// independent model.
package sha1_ref_pkg;

  typedef logic [31:0] w32_t;
  typedef w32_t        hash_t [5];
  typedef w32_t        block_t [16];

  function automatic w32_t rl(input w32_t x, input int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic hash_t sha1_iv();
    hash_t h;
    h[0] = 32'h67452301; h[1] = 32'hEFCDAB89; h[2] = 32'h98BADCFE;
    h[3] = 32'h10325476; h[4] = 32'hC3D2E1F0;
    return h;
  endfunction

  function automatic hash_t sha1_compress(input hash_t h, input block_t m);
    w32_t  w [80];
    w32_t  a, b, c, d, e, f, k, t;
    hash_t r;
    for (int i = 0; i < 16; i++) w[i] = m[i];
    for (int i = 16; i < 80; i++) w[i] = rl(w[i-3] ^ w[i-8] ^ w[i-14] ^ w[i-16], 1);
    a = h[0]; b = h[1]; c = h[2]; d = h[3]; e = h[4];
    for (int i = 0; i < 80; i++) begin
      if (i < 20)      begin f = d ^ (b & (c ^ d));         k = 32'h5A827999; end
      else if (i < 40) begin f = b ^ c ^ d;                 k = 32'h6ED9EBA1; end
      else if (i < 60) begin f = (b & c) ^ (b & d) ^ (c & d); k = 32'h8F1BBCDC; end
      else             begin f = b ^ c ^ d;                 k = 32'hCA62C1D6; end
      t = rl(a, 5) + f + e + k + w[i];
      e = d; d = c; c = rl(b, 30); b = a; a = t;
    end
    r[0] = h[0] + a; r[1] = h[1] + b; r[2] = h[2] + c; r[3] = h[3] + d; r[4] = h[4] + e;
    return r;
  endfunction

  // Pads a byte string (SHA-1 padding: 0x80, zeros, 64-bit bit length).
  function automatic void sha1_pad(input string s, output w32_t words[$]);
    byte unsigned bytes[$];
    longint unsigned bits;
    bits = 64'(s.len()) * 8;
    for (int i = 0; i < s.len(); i++) bytes.push_back(s[i]);
    bytes.push_back(8'h80);
    while (bytes.size() % 64 != 56) bytes.push_back(8'h00);
    for (int i = 7; i >= 0; i--) bytes.push_back(8'(bits >> (8 * i)));
    words.delete();
    for (int i = 0; i < bytes.size(); i += 4)
      words.push_back({bytes[i], bytes[i+1], bytes[i+2], bytes[i+3]});
  endfunction

endpackage
