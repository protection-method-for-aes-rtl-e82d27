// aes_pkg: types and pure functions shared by the AES-128 datapath.
//
// The 128-bit block is kept in FIPS-197 input order: byte 0 sits in bits
// [127:120], byte 15 in bits [7:0], and byte k is state row (k % 4),
// column (k / 4). The S-box is not stored as a table: it is computed as
// the multiplicative inverse in GF(2^8) (modulus x^8+x^4+x^3+x+1, inverse
// of 0 taken as 0) followed by the FIPS-197 affine transform
// b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i with c = 8'h63.
// Everything here is combinational and synthesizable.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  localparam int unsigned NR = 10;  // rounds of AES-128

  // multiply by x in GF(2^8)
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // general GF(2^8) product, shift-and-add
  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  // inverse as a^254 (a^254 = a^-1 for a != 0, and 0 for a == 0)
  function automatic byte_t gf_inv(input byte_t a);
    byte_t sq, r;
    r  = 8'h01;
    sq = a;
    // 254 = 0b11111110: multiply the squares a^2 .. a^128
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t sbox(input byte_t a);
    byte_t b, s;
    b = gf_inv(a);
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  function automatic byte_t get_byte(input block_t s, input int unsigned k);
    return s[127 - 8*k -: 8];
  endfunction

  function automatic block_t sub_bytes(input block_t s);
    block_t o;
    for (int k = 0; k < 16; k++) o[127 - 8*k -: 8] = sbox(get_byte(s, k));
    return o;
  endfunction

  // row r is rotated left by r columns: out(r,c) = in(r, c+r mod 4)
  function automatic block_t shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(r + 4*c) -: 8] = get_byte(s, r + 4*((c + r) % 4));
    return o;
  endfunction

  function automatic word_t mix_column(input word_t w);
    byte_t a0, a1, a2, a3;
    {a0, a1, a2, a3} = w;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  function automatic block_t mix_columns(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++) o[127 - 32*c -: 32] = mix_column(s[127 - 32*c -: 32]);
    return o;
  endfunction

  // round constant of key-schedule step r (1..10): x^(r-1) in GF(2^8)
  function automatic byte_t rcon(input logic [3:0] r);
    byte_t c;
    c = 8'h01;
    for (int i = 1; i < 10; i++)
      if (i < int'(r)) c = xtime(c);
    return c;
  endfunction

endpackage
