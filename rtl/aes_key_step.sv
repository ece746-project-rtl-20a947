// aes_key_step: one step of the AES-128 key expansion, from round key r to
// round key r+1 (FIPS-197 KeyExpansion, four words at a time).
//
// The last word of the current key goes through RotWord and SubWord (four
// S-boxes, parameter SBOX), is XORed with the round constant rcon in its
// top byte, and the four new words follow by a running XOR:
//   w4 = w0 ^ t, w5 = w1 ^ w4, w6 = w2 ^ w5, w7 = w3 ^ w6.
// Combinational; shared by the on-the-fly generator and the key memory.
module aes_key_step
  import aes_pkg::*;
#(
  parameter sbox_impl_e SBOX = SBOX_LUT
) (
  input  block_t key_in,   // round key r
  input  byte_t  rcon,     // round constant for step r -> r+1
  output block_t key_out   // round key r+1
);

  word_t rot, sub, t, w0, w1, w2, w3;

  assign rot = rot_word(key_in[31:0]);

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    aes_sbox #(.IMPL(SBOX)) u_sbox (
      .in_byte (rot[31 - 8*i -: 8]),
      .out_byte(sub[31 - 8*i -: 8])
    );
  end

  always_comb begin
    t  = sub ^ {rcon, 24'h0};
    w0 = key_in[127:96] ^ t;
    w1 = key_in[95:64]  ^ w0;
    w2 = key_in[63:32]  ^ w1;
    w3 = key_in[31:0]   ^ w2;
    key_out = {w0, w1, w2, w3};
  end

endmodule
