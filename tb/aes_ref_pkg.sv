// aes_ref_pkg: behavioural AES-128 reference model for the testbenches.
//
// Written independently of the RTL: the state is an array of sixteen bytes,
// the S-box value is found by searching for the multiplicative inverse
// (b with a*b = 1 in GF(2^8) modulo 0x11b) and applying the affine map bit
// by bit, and the key schedule is the word-by-word FIPS-197 KeyExpansion.
// Not synthesizable; simulation only.
package aes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [127:0] u128;
  typedef u8 bytes16_t [16];
  typedef u128 rk_t [11];

  function automatic u8 ref_mul(u8 a, u8 b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h011b << (i - 8);
    return p[7:0];
  endfunction

  function automatic u8 ref_sbox(u8 a);
    u8 inv = 8'h00, s;
    u8 aff_c = 8'h63;
    if (a != 0)
      for (int b = 1; b < 256; b++) if (ref_mul(a, u8'(b)) == 8'h01) inv = u8'(b);
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ aff_c[i];
    return s;
  endfunction

  function automatic bytes16_t to_bytes(u128 v);
    bytes16_t b;
    for (int i = 0; i < 16; i++) b[i] = v[127 - 8*i -: 8];
    return b;
  endfunction

  function automatic u128 from_bytes(bytes16_t b);
    u128 v;
    for (int i = 0; i < 16; i++) v[127 - 8*i -: 8] = b[i];
    return v;
  endfunction

  function automatic rk_t ref_expand(u128 key);
    logic [31:0] w [44];
    logic [31:0] t;
    u8 rc = 8'h01;
    rk_t rk;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = ref_mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  // One round on the state: SubBytes, ShiftRows, optional MixColumns, key.
  function automatic u128 ref_round(u128 st, u128 rk, bit final_round);
    bytes16_t s = to_bytes(st), t, k = to_bytes(rk);
    for (int i = 0; i < 16; i++) s[i] = ref_sbox(s[i]);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) t[4*c + r] = s[4*((c + r) % 4) + r];
    s = t;
    if (!final_round)
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          t[4*c + r] = ref_mul(8'h02, s[4*c + r]) ^ ref_mul(8'h03, s[4*c + (r+1)%4])
                     ^ s[4*c + (r+2)%4] ^ s[4*c + (r+3)%4];
    for (int i = 0; i < 16; i++) t[i] ^= k[i];
    return from_bytes(t);
  endfunction

  function automatic u128 ref_encrypt(u128 key, u128 pt);
    rk_t rk = ref_expand(key);
    u128 s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) s = ref_round(s, rk[r], r == 10);
    return s;
  endfunction

  function automatic u128 rand128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

endpackage
