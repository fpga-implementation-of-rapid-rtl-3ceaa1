// mcs_pkg: types, sizes and AES-128 transformations shared by the memory
// ciphering system.
//
// The memory ciphering system encrypts every word the CPU writes with
// AES-128 (FIPS-197) under a key from an LFSR key generator, XORs the
// ciphertext with PIN-derived scramble data and stores the result; reads run
// the same path backwards. This package holds what the cipher, key schedule
// and scrambling modules share:
//   * the block/key width (128 bits, from the design) and the 8-bit CPU data
//     width (the design sits behind an 8-bit CPU),
//   * the round count: AES-128 has 10 rounds, the last without MixColumns,
//   * the forward and inverse S-box. They are not typed in as tables but
//     computed at elaboration: the forward table is filled by walking the
//     multiplicative group of GF(2^8) with generator 3 (p) and its inverse
//     (q = p^-1), applying the FIPS-197 affine map to q, and setting
//     S(0) = 0x63; the inverse table is the forward one read backwards,
//   * the byte-level round transformations (SubBytes, ShiftRows, MixColumns,
//     their inverses) and one step of the AES-128 key schedule, all as pure
//     functions on a 128-bit state.
//
// State layout follows FIPS-197: byte n of the state is bits
// [127-8n -: 8], and byte n sits in row n%4, column n/4.
//
// PIN and serial-number widths are this design's choice (the serial number
// is 32 bits wide, the PIN 32 bits, i.e. eight BCD digits).
package mcs_pkg;

  localparam int unsigned BLOCK_W    = 128;  // AES block and key width
  localparam int unsigned CPU_DATA_W = 8;    // 8-bit smart card CPU
  localparam int unsigned AES_NR     = 10;   // AES-128 round count
  localparam int unsigned PIN_W      = 32;   // user PIN width (8 BCD digits)
  localparam int unsigned SERIAL_W   = 32;   // card serial number width

  typedef logic [BLOCK_W-1:0]           block_t;
  typedef logic [AES_NR:0][BLOCK_W-1:0] round_keys_t;  // [r] = round key r
  typedef logic [255:0][7:0]            sbox_t;        // [x] = S(x)

  // ---------------------------------------------------------------- GF(2^8)
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] a, input int unsigned n);
    return (a << n) | (a >> (8 - n));
  endfunction

  // --------------------------------------------------------------- S-boxes
  function automatic sbox_t gen_sbox();
    sbox_t      t;
    logic [7:0] p, q, x;
    t = '0;
    p = 8'h01;
    q = 8'h01;
    for (int i = 0; i < 255; i++) begin
      p = p ^ xtime(p);                    // p *= 3
      q = q ^ {q[6:0], 1'b0};              // q /= 3
      q = q ^ {q[5:0], 2'b0};
      q = q ^ {q[3:0], 4'b0};
      if (q[7]) q = q ^ 8'h09;
      x = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4);
      t[p] = x ^ 8'h63;
    end
    t[0] = 8'h63;
    return t;
  endfunction

  function automatic sbox_t gen_inv_sbox(input sbox_t fwd);
    sbox_t t;
    t = '0;
    for (int i = 0; i < 256; i++) t[fwd[i]] = 8'(i);
    return t;
  endfunction

  localparam sbox_t SBOX     = gen_sbox();
  localparam sbox_t INV_SBOX = gen_inv_sbox(SBOX);

  // ------------------------------------------------------- byte addressing
  function automatic logic [7:0] get_byte(input block_t s, input int unsigned n);
    return s[BLOCK_W-1-8*n -: 8];
  endfunction

  // --------------------------------------------------- round transformations
  function automatic block_t sub_bytes(input block_t s);
    block_t o;
    for (int n = 0; n < 16; n++) o[BLOCK_W-1-8*n -: 8] = SBOX[get_byte(s, n)];
    return o;
  endfunction

  function automatic block_t inv_sub_bytes(input block_t s);
    block_t o;
    for (int n = 0; n < 16; n++) o[BLOCK_W-1-8*n -: 8] = INV_SBOX[get_byte(s, n)];
    return o;
  endfunction

  // Row r is rotated left by r columns: out[r][c] = in[r][(c+r)%4].
  function automatic block_t shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[BLOCK_W-1-8*(4*c+r) -: 8] = get_byte(s, 4*((c+r)%4)+r);
    return o;
  endfunction

  function automatic block_t inv_shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[BLOCK_W-1-8*(4*((c+r)%4)+r) -: 8] = get_byte(s, 4*c+r);
    return o;
  endfunction

  // Each column is the polynomial a(x), multiplied by {03}x^3+{01}x^2+{01}x+{02}.
  function automatic block_t mix_columns(input block_t s);
    block_t     o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);   a1 = get_byte(s, 4*c+1);
      a2 = get_byte(s, 4*c+2); a3 = get_byte(s, 4*c+3);
      o[BLOCK_W-1-8*(4*c)   -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      o[BLOCK_W-1-8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      o[BLOCK_W-1-8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      o[BLOCK_W-1-8*(4*c+3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction

  // Inverse: multiply by {0b}x^3+{0d}x^2+{09}x+{0e}.
  function automatic block_t inv_mix_columns(input block_t s);
    block_t     o;
    logic [7:0] a [4];
    logic [7:0] m2 [4], m4 [4], m8 [4];
    logic [7:0] m9 [4], mb [4], md [4], me [4];
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        a[r]  = get_byte(s, 4*c+r);
        m2[r] = xtime(a[r]);
        m4[r] = xtime(m2[r]);
        m8[r] = xtime(m4[r]);
        m9[r] = m8[r] ^ a[r];
        mb[r] = m8[r] ^ m2[r] ^ a[r];
        md[r] = m8[r] ^ m4[r] ^ a[r];
        me[r] = m8[r] ^ m4[r] ^ m2[r];
      end
      o[BLOCK_W-1-8*(4*c)   -: 8] = me[0] ^ mb[1] ^ md[2] ^ m9[3];
      o[BLOCK_W-1-8*(4*c+1) -: 8] = m9[0] ^ me[1] ^ mb[2] ^ md[3];
      o[BLOCK_W-1-8*(4*c+2) -: 8] = md[0] ^ m9[1] ^ me[2] ^ mb[3];
      o[BLOCK_W-1-8*(4*c+3) -: 8] = mb[0] ^ md[1] ^ m9[2] ^ me[3];
    end
    return o;
  endfunction

  // ------------------------------------------------------------ key schedule
  // Round constant of key-schedule step r (r = 1..10): x^(r-1) in GF(2^8).
  function automatic logic [7:0] rcon(input int unsigned r);
    logic [7:0] v;
    v = 8'h01;
    for (int unsigned i = 1; i < r; i++) v = xtime(v);
    return v;
  endfunction

  // Round key r from round key r-1: w0' = w0 ^ SubWord(RotWord(w3)) ^ Rcon,
  // then each following word is the previous new word XOR the old one.
  function automatic block_t key_step(input block_t k, input logic [7:0] rc);
    logic [31:0] w0, w1, w2, w3, t;
    w0 = k[127:96]; w1 = k[95:64]; w2 = k[63:32]; w3 = k[31:0];
    t  = {SBOX[w3[23:16]], SBOX[w3[15:8]], SBOX[w3[7:0]], SBOX[w3[31:24]]};
    t  = t ^ {rc, 24'h0};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

endpackage
