// aes_ref_pkg: reference models for the testbenches, written independently
// of the RTL.
//
// aes_ref_encrypt() is a plain byte-array AES-128 (FIPS-197) with the full
// 44-word key schedule computed up front. Its S-box is worked out per call by
// searching for the multiplicative inverse and applying the affine map bit by
// bit. It is slow and straightforward on purpose. mac_ref() builds the MAC of
// the SecOC core from it:
//   C1 = E(data), C2 = E(C1 ^ {ID,FV}), SK = E(0), MAC = E(C2 ^ SK)
// and pdu_ref() the 64-bit PDU {data[31:0], FV, MAC[20:0]}.
package aes_ref_pkg;

  typedef logic [7:0] u8;

  function automatic u8 ref_mul(u8 a, u8 b);
    u8 p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p = p ^ a;
      b = b >> 1;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic u8 ref_sbox(u8 x);
    u8 inv = 0;
    u8 s;
    u8 c63 = 8'h63;
    if (x != 0)
      for (int c = 1; c < 256; c++)
        if (ref_mul(x, u8'(c)) == 8'h01) inv = u8'(c);
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ c63[i];
    return s;
  endfunction

  function automatic logic [127:0] aes_ref_encrypt(logic [127:0] key, logic [127:0] pt);
    logic [31:0] w [44];
    u8 s [16];
    u8 t [16];
    u8 rc = 8'h01;
    logic [31:0] tmp;
    logic [127:0] out;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      tmp = w[i-1];
      if (i % 4 == 0) begin
        tmp = {ref_sbox(tmp[23:16]), ref_sbox(tmp[15:8]), ref_sbox(tmp[7:0]), ref_sbox(tmp[31:24])};
        tmp[31:24] = tmp[31:24] ^ rc;
        rc = ref_mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ tmp;
    end
    for (int i = 0; i < 16; i++) s[i] = pt[127-8*i -: 8] ^ w[i/4][31-8*(i%4) -: 8];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) s[i] = ref_sbox(s[i]);
      // byte i sits at row i%4, column i/4
      for (int i = 0; i < 16; i++) t[i] = s[((i/4 + i%4) % 4) * 4 + i%4];
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          s[4*c]   = ref_mul(t[4*c],2) ^ ref_mul(t[4*c+1],3) ^ t[4*c+2] ^ t[4*c+3];
          s[4*c+1] = t[4*c] ^ ref_mul(t[4*c+1],2) ^ ref_mul(t[4*c+2],3) ^ t[4*c+3];
          s[4*c+2] = t[4*c] ^ t[4*c+1] ^ ref_mul(t[4*c+2],2) ^ ref_mul(t[4*c+3],3);
          s[4*c+3] = ref_mul(t[4*c],3) ^ t[4*c+1] ^ t[4*c+2] ^ ref_mul(t[4*c+3],2);
        end
      else
        for (int i = 0; i < 16; i++) s[i] = t[i];
      for (int i = 0; i < 16; i++) s[i] = s[i] ^ w[4*r + i/4][31-8*(i%4) -: 8];
    end
    for (int i = 0; i < 16; i++) out[127-8*i -: 8] = s[i];
    return out;
  endfunction

  function automatic logic [127:0] mac_ref(logic [127:0] key, logic [127:0] data,
                                           logic [10:0] id, logic [10:0] fv);
    logic [127:0] c1, c2, sk;
    c1 = aes_ref_encrypt(key, data);
    c2 = aes_ref_encrypt(key, c1 ^ {106'b0, id, fv});
    sk = aes_ref_encrypt(key, 128'b0);
    return aes_ref_encrypt(key, c2 ^ sk);
  endfunction

  function automatic logic [63:0] pdu_ref(logic [127:0] key, logic [31:0] data,
                                          logic [10:0] id, logic [10:0] fv);
    logic [127:0] m;
    m = mac_ref(key, {96'b0, data}, id, fv);
    return {data, fv, m[20:0]};
  endfunction

endpackage
