// aes_pkg: shared types and pure functions of AES-128 (FIPS-197).
//
// The block and key are 128-bit vectors with byte 0 in bits [127:120]; the
// state is column-major, so byte i sits in row i%4, column i/4. The S-box is
// not a stored table: SubBytes computes the multiplicative inverse in
// GF(2^8) (x^254, by square-and-multiply) followed by the affine transform,
// and InvSubBytes applies the inverse affine transform before the same
// inversion. Everything here is combinational and synthesizable; the round
// functions are used by the encryption core, the decryption core and the key
// schedule. Computing the S-box instead of storing it is a choice of this
// design; the algorithm itself is the standard one the design is built on.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;

  localparam int unsigned NR = 10;  // rounds of AES-128

  // multiply by x in GF(2^8) modulo x^8+x^4+x^3+x+1
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // a^254 = a^-1 for a != 0, and 0 for a == 0
  function automatic byte_t gf_inv(input byte_t a);
    byte_t sq, r;
    sq = gf_mul(a, a);           // a^2
    r  = sq;
    for (int i = 2; i < 8; i++) begin
      sq = gf_mul(sq, sq);       // a^(2^i)
      r  = gf_mul(r, sq);
    end
    return r;                    // a^(2+4+...+128)
  endfunction

  function automatic byte_t sbox(input byte_t a);
    byte_t b, s;
    b = gf_inv(a);
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  function automatic byte_t inv_sbox(input byte_t s);
    byte_t b;
    for (int i = 0; i < 8; i++)
      b[i] = s[(i+2)%8] ^ s[(i+5)%8] ^ s[(i+7)%8];
    return gf_inv(b ^ 8'h05);
  endfunction

  function automatic byte_t get_byte(input block_t s, input int unsigned i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic block_t sub_bytes(input block_t s);
    block_t r;
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = sbox(get_byte(s, i));
    return r;
  endfunction

  function automatic block_t inv_sub_bytes(input block_t s);
    block_t r;
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = inv_sbox(get_byte(s, i));
    return r;
  endfunction

  // row r of column c moves to column (c - r) mod 4
  function automatic block_t shift_rows(input block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(4*c + row) -: 8] = get_byte(s, 4*((c + row) % 4) + row);
    return r;
  endfunction

  function automatic block_t inv_shift_rows(input block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(4*((c + row) % 4) + row) -: 8] = get_byte(s, 4*c + row);
    return r;
  endfunction

  function automatic word_t mix_column(input word_t w);
    byte_t a0, a1, a2, a3;
    {a0, a1, a2, a3} = w;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  function automatic word_t inv_mix_column(input word_t w);
    byte_t a0, a1, a2, a3;
    {a0, a1, a2, a3} = w;
    return {gf_mul(a0, 8'h0e) ^ gf_mul(a1, 8'h0b) ^ gf_mul(a2, 8'h0d) ^ gf_mul(a3, 8'h09),
            gf_mul(a0, 8'h09) ^ gf_mul(a1, 8'h0e) ^ gf_mul(a2, 8'h0b) ^ gf_mul(a3, 8'h0d),
            gf_mul(a0, 8'h0d) ^ gf_mul(a1, 8'h09) ^ gf_mul(a2, 8'h0e) ^ gf_mul(a3, 8'h0b),
            gf_mul(a0, 8'h0b) ^ gf_mul(a1, 8'h0d) ^ gf_mul(a2, 8'h09) ^ gf_mul(a3, 8'h0e)};
  endfunction

  function automatic block_t mix_columns(input block_t s);
    block_t r;
    for (int c = 0; c < 4; c++) r[127 - 32*c -: 32] = mix_column(s[127 - 32*c -: 32]);
    return r;
  endfunction

  function automatic block_t inv_mix_columns(input block_t s);
    block_t r;
    for (int c = 0; c < 4; c++) r[127 - 32*c -: 32] = inv_mix_column(s[127 - 32*c -: 32]);
    return r;
  endfunction

  // one step of the AES-128 key schedule: round key i from round key i-1
  function automatic block_t next_round_key(input block_t k, input byte_t rcon);
    word_t w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t  = {sbox(w3[23:16]) ^ rcon, sbox(w3[15:8]), sbox(w3[7:0]), sbox(w3[31:24])};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

endpackage
