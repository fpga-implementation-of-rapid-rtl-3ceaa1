// aes_ref_pkg: behavioural AES-128 reference model for the testbenches.
//
// Written independently of the RTL package: the S-box is built at run time
// by searching each byte's multiplicative inverse in GF(2^8) and applying
// the affine map bit by bit; MixColumns uses a general GF(2^8) multiply; the
// state is a 16-entry byte array. Call ref_init() once before use.
package aes_ref_pkg;

  byte unsigned sb  [256];
  byte unsigned isb [256];

  function automatic byte unsigned gmul(byte unsigned a, byte unsigned b);
    byte unsigned p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b & 1) p ^= a;
      a = (a & 8'h80) ? byte'((a << 1) ^ 8'h1b) : byte'(a << 1);
      b >>= 1;
    end
    return p;
  endfunction

  function automatic void ref_init();
    for (int x = 0; x < 256; x++) begin
      byte unsigned inv = 0, y = 0;
      for (int c = 1; c < 256; c++) if (gmul(byte'(x), byte'(c)) == 1) inv = byte'(c);
      for (int i = 0; i < 8; i++) begin
        bit v = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
        y[i] = v ^ ((8'h63 >> i) & 1);
      end
      sb[x] = y;
    end
    for (int x = 0; x < 256; x++) isb[sb[x]] = byte'(x);
  endfunction

  typedef byte unsigned st_t [16];

  function automatic st_t to_st(logic [127:0] v);
    st_t s;
    for (int i = 0; i < 16; i++) s[i] = v[127-8*i -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(st_t s);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127-8*i -: 8] = s[i];
    return v;
  endfunction

  // all 11 round keys, [r] = round key r
  function automatic void expand(logic [127:0] key, output logic [127:0] rk [11]);
    logic [31:0] w [44];
    byte unsigned rc = 1;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb[t[31:24]], sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]};
        t[31:24] ^= rc;
        rc = gmul(rc, 2);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] key, logic [127:0] pt);
    logic [127:0] rk [11];
    st_t s, t;
    expand(key, rk);
    s = to_st(pt ^ rk[0]);
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) s[i] = sb[s[i]];
      for (int c = 0; c < 4; c++) for (int w = 0; w < 4; w++) t[4*c+w] = s[4*((c+w)%4)+w];
      s = t;
      if (r != 10)
        for (int c = 0; c < 4; c++)
          for (int w = 0; w < 4; w++)
            t[4*c+w] = gmul(s[4*c+w], 2) ^ gmul(s[4*c+(w+1)%4], 3) ^ s[4*c+(w+2)%4] ^ s[4*c+(w+3)%4];
      s = to_st(from_st(t) ^ rk[r]);
    end
    return from_st(s);
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] key, logic [127:0] ct);
    logic [127:0] rk [11];
    st_t s, t;
    expand(key, rk);
    s = to_st(ct ^ rk[10]);
    for (int r = 9; r >= 0; r--) begin
      for (int c = 0; c < 4; c++) for (int w = 0; w < 4; w++) t[4*((c+w)%4)+w] = s[4*c+w];
      for (int i = 0; i < 16; i++) s[i] = isb[t[i]];
      s = to_st(from_st(s) ^ rk[r]);
      if (r != 0) begin
        for (int c = 0; c < 4; c++)
          for (int w = 0; w < 4; w++)
            t[4*c+w] = gmul(s[4*c+w], 14) ^ gmul(s[4*c+(w+1)%4], 11) ^
                       gmul(s[4*c+(w+2)%4], 13) ^ gmul(s[4*c+(w+3)%4], 9);
        s = t;
      end
    end
    return from_st(s);
  endfunction

endpackage
