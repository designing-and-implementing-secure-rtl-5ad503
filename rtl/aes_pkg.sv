// aes_pkg: types and round functions of AES-128 encryption (FIPS-197).
//
// A 128-bit block is taken as 16 bytes, byte 0 in bits 127:120, and the state
// matrix is filled column by column: row r, column c holds byte 4*c + r.
// The S-box is not typed in as a table. It is computed once, at elaboration,
// from its definition: the multiplicative inverse in GF(2^8) modulo
// x^8 + x^4 + x^3 + x + 1 (with 0 mapped to 0), followed by the affine map
// s = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63.
// The inverse is found as b = a^254 by square-and-multiply.
// All functions are pure and synthesizable; sub_byte() is a 256-entry
// constant lookup.
package aes_pkg;

  localparam int unsigned BLOCK_W = 128;
  localparam int unsigned NR      = 10;   // rounds of AES-128

  typedef logic [BLOCK_W-1:0] block_t;
  typedef logic [7:0]         byte_t;

  // multiply by x in GF(2^8)
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // a^254 = a^-1 for a != 0, and 0 for a == 0
  function automatic byte_t gf_inv(byte_t a);
    byte_t r = 8'h01;
    byte_t s = a;
    // 254 = 8'b1111_1110
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, s);
      s = gf_mul(s, s);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(byte_t b, int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic byte_t sbox_calc(byte_t a);
    byte_t b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  // whole S-box as one packed constant, entry i in bits 8*i+7 : 8*i
  function automatic logic [2047:0] sbox_build();
    logic [2047:0] t = '0;
    for (int i = 0; i < 256; i++) t[8*i +: 8] = sbox_calc(byte_t'(i));
    return t;
  endfunction

  localparam logic [2047:0] SBOX_TABLE = sbox_build();

  function automatic byte_t sub_byte(byte_t a);
    return SBOX_TABLE[{a, 3'b000} +: 8];
  endfunction

  // byte k of a block, k = 0 is the most significant byte
  function automatic byte_t get_byte(block_t s, int unsigned k);
    return s[BLOCK_W-1-8*k -: 8];
  endfunction

  function automatic block_t sub_bytes(block_t s);
    block_t o;
    for (int k = 0; k < 16; k++) o[BLOCK_W-1-8*k -: 8] = sub_byte(get_byte(s, k));
    return o;
  endfunction

  // row r is rotated left by r positions: out(r,c) = in(r,(c+r) mod 4)
  function automatic block_t shift_rows(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[BLOCK_W-1-8*(4*c+r) -: 8] = get_byte(s, 4*((c+r)%4) + r);
    return o;
  endfunction

  // each column times the circulant matrix [2 3 1 1]
  function automatic block_t mix_columns(block_t s);
    block_t o;
    byte_t a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);
      a1 = get_byte(s, 4*c+1);
      a2 = get_byte(s, 4*c+2);
      a3 = get_byte(s, 4*c+3);
      o[BLOCK_W-1-8*(4*c)   -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      o[BLOCK_W-1-8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      o[BLOCK_W-1-8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      o[BLOCK_W-1-8*(4*c+3) -: 8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction

  // round key i+1 from round key i; rcon is the round constant of round i+1
  function automatic block_t next_round_key(block_t k, byte_t rcon);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t = {sub_byte(w3[23:16]) ^ rcon, sub_byte(w3[15:8]), sub_byte(w3[7:0]), sub_byte(w3[31:24])};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

endpackage
