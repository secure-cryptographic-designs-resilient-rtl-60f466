// aes_ref_pkg: behavioural AES-128 reference for the testbenches.
//
// Written independently of the RTL: the S-box table is built once with the
// multiply-by-3 / divide-by-3 walk over GF(2^8) (not by exponentiation as in
// the RTL), and the cipher works on a byte array with the textbook steps.
// init() must be called once before use; known-answer vectors from FIPS-197
// are checked by the testbenches that use it.
package aes_ref_pkg;

  bit [7:0] SB [256];
  bit       inited = 1'b0;

  function automatic bit [7:0] rotl8(bit [7:0] v, int n);
    return (v << n) | (v >> (8 - n));
  endfunction

  function automatic void init();
    bit [7:0] p, q, x;
    p = 8'd1;
    q = 8'd1;
    do begin
      p = p ^ (p << 1) ^ ((p & 8'h80) != 0 ? 8'h1b : 8'h00);
      q = q ^ (q << 1);
      q = q ^ (q << 2);
      q = q ^ (q << 4);
      if ((q & 8'h80) != 0) q = q ^ 8'h09;
      x = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4);
      SB[p] = x ^ 8'h63;
    end while (p != 8'd1);
    SB[0] = 8'h63;
    inited = 1'b1;
  endfunction

  function automatic bit [7:0] xt(bit [7:0] a);
    return (a << 1) ^ ((a & 8'h80) != 0 ? 8'h1b : 8'h00);
  endfunction

  // round keys 0..10 as 128-bit vectors
  function automatic void expand(input bit [127:0] key, output bit [127:0] rk [11]);
    bit [31:0] w [44];
    bit [31:0] t;
    bit [7:0]  rc;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {SB[t[23:16]], SB[t[15:8]], SB[t[7:0]], SB[t[31:24]]};
        t[31:24] = t[31:24] ^ rc;
        rc = xt(rc);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic bit [127:0] encrypt(bit [127:0] key, bit [127:0] pt);
    bit [127:0] rk [11];
    bit [7:0] s [16];
    bit [7:0] t [16];
    bit [7:0] a0, a1, a2, a3;
    expand(key, rk);
    for (int i = 0; i < 16; i++) s[i] = pt[127 - 8*i -: 8] ^ rk[0][127 - 8*i -: 8];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) s[i] = SB[s[i]];
      for (int c = 0; c < 4; c++)
        for (int row = 0; row < 4; row++) t[4*c + row] = s[4*((c + row) % 4) + row];
      s = t;
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          a0 = s[4*c]; a1 = s[4*c+1]; a2 = s[4*c+2]; a3 = s[4*c+3];
          s[4*c]   = xt(a0) ^ (xt(a1) ^ a1) ^ a2 ^ a3;
          s[4*c+1] = a0 ^ xt(a1) ^ (xt(a2) ^ a2) ^ a3;
          s[4*c+2] = a0 ^ a1 ^ xt(a2) ^ (xt(a3) ^ a3);
          s[4*c+3] = (xt(a0) ^ a0) ^ a1 ^ a2 ^ xt(a3);
        end
      for (int i = 0; i < 16; i++) s[i] = s[i] ^ rk[r][127 - 8*i -: 8];
    end
    for (int i = 0; i < 16; i++) encrypt[127 - 8*i -: 8] = s[i];
  endfunction

  function automatic bit [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
