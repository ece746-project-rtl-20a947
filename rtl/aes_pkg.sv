// aes_pkg: types, constants and the linear AES-128 functions shared by the
// cipher modules.
//
// A 128-bit AES block (state or round key) is held as a logic [127:0] with
// byte 0 of the FIPS-197 input order in bits [127:120] and byte 15 in [7:0].
// Byte i sits in row i%4 and column i/4 of the state, so a column is one
// 32-bit word and bits [127:96] are column 0.
//
// The functions here are the parts of a round that need no S-box:
// GF(2^8) doubling (xtime), general GF(2^8) multiplication, ShiftRows,
// MixColumns on one column and on the whole state, and RotWord. The S-box is
// in aes_sbox_lut and aes_sbox_logic; sbox_calc() below gives the same
// mapping as a constant function, used to fill the lookup table at
// elaboration time (multiplicative inverse in GF(2^8) with the AES polynomial
// x^8+x^4+x^3+x+1, followed by the affine map b ^ rotl(b,1..4) ^ 0x63).
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  localparam int unsigned NR      = 10;    // number of rounds for AES-128
  localparam int unsigned NRK     = NR + 1; // number of round keys

  // Selects how the S-boxes of a core are built.
  typedef enum logic {SBOX_LUT = 1'b0, SBOX_LOGIC = 1'b1} sbox_impl_e;

  // Selects the encryption core of the stream cipher.
  typedef enum logic [1:0] {
    ARCH_ITERATIVE = 2'd0,   // 128-bit datapath, one round per clock
    ARCH_PIPELINED = 2'd1,   // ten unrolled rounds, one block per clock
    ARCH_COMPACT   = 2'd2    // 8/32/64-bit datapath, round folded over clocks
  } arch_e;

  typedef byte_t sbox_table_t [256];

  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t r = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = xtime(x);
    end
    return r;
  endfunction

  // S-box value of one byte, used as a constant function to fill the table.
  function automatic byte_t sbox_calc(byte_t a);
    byte_t inv = 8'h00;
    byte_t s;
    // inv = a^254 by square-and-multiply (254 = 8'b1111_1110); 0 maps to 0
    if (a != 8'h00) begin
      inv = 8'h01;
      for (int i = 7; i >= 0; i--) begin
        inv = gf_mul(inv, inv);
        if (i != 0) inv = gf_mul(inv, a);
      end
    end
    s = inv;
    for (int i = 1; i <= 4; i++) s ^= byte_t'((inv << i) | (inv >> (8 - i)));
    return s ^ 8'h63;
  endfunction

  function automatic sbox_table_t sbox_table();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(byte_t'(i));
    return t;
  endfunction

  function automatic byte_t get_byte(block_t s, int unsigned i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic block_t shift_rows(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(r + 4*c) -: 8] = s[127 - 8*(r + 4*((c + r) % 4)) -: 8];
    return o;
  endfunction

  function automatic word_t mix_column(word_t w);
    byte_t a0, a1, a2, a3;
    {a0, a1, a2, a3} = w;
    return { xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
             a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
             a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
             xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3) };
  endfunction

  function automatic block_t mix_columns(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++) o[127 - 32*c -: 32] = mix_column(s[127 - 32*c -: 32]);
    return o;
  endfunction

  function automatic word_t rot_word(word_t w);
    return {w[23:0], w[31:24]};
  endfunction

endpackage
