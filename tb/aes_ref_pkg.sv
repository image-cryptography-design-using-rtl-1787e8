// aes_ref_pkg: behavioural AES-128 reference for the testbenches.
//
// Written independently of the RTL: the S-box is built from log/antilog
// tables over the generator 03 (inverse of x = 03^(255 - log x)), and the
// cipher is the plain word-level FIPS-197 algorithm on a 4x4 byte array.
// Byte 0 of a block is bits 127:120.
package aes_ref_pkg;

  typedef logic [7:0] b8;

  function automatic b8 mul2(b8 a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic b8 mul(b8 a, b8 b);
    b8 p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = mul2(a);
    end
    return p;
  endfunction

  function automatic void build_sbox(output b8 sb[256], output b8 isb[256]);
    b8  alog[256];
    int lg[256];
    b8  x = 8'h01;
    for (int i = 0; i < 255; i++) begin
      alog[i] = x;
      lg[x]   = i;
      x = x ^ mul2(x);          // times 03
    end
    for (int a = 0; a < 256; a++) begin
      b8 inv, s;
      inv = (a == 0) ? 8'h00 : alog[(255 - lg[a]) % 255];
      s = 8'h63;
      for (int bit_i = 0; bit_i < 8; bit_i++)
        s[bit_i] = s[bit_i] ^ inv[bit_i] ^ inv[(bit_i+4)%8] ^ inv[(bit_i+5)%8]
                   ^ inv[(bit_i+6)%8] ^ inv[(bit_i+7)%8];
      sb[a] = s;
    end
    for (int a = 0; a < 256; a++) isb[sb[a]] = b8'(a);
  endfunction

  function automatic void expand(input logic [127:0] key, output logic [127:0] rk[11]);
    b8 sb[256], isb[256];
    logic [31:0] w[44];
    logic [31:0] t;
    b8 rc = 8'h01;
    build_sbox(sb, isb);
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb[t[31:24]] ^ rc, sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]};
        rc = mul2(rc);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] key, logic [127:0] pt);
    b8 sb[256], isb[256];
    logic [127:0] rk[11];
    b8 s[4][4], t[4][4];
    build_sbox(sb, isb);
    expand(key, rk);
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++)
      s[r][c] = pt[127-8*(4*c+r) -: 8] ^ rk[0][127-8*(4*c+r) -: 8];
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) t[r][c] = sb[s[r][(c+r)%4]];
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++)
        if (rnd < 10)
          s[r][c] = mul(t[r][c], 2) ^ mul(t[(r+1)%4][c], 3) ^ t[(r+2)%4][c] ^ t[(r+3)%4][c];
        else
          s[r][c] = t[r][c];
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) s[r][c] ^= rk[rnd][127-8*(4*c+r) -: 8];
    end
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) encrypt[127-8*(4*c+r) -: 8] = s[r][c];
  endfunction

endpackage
