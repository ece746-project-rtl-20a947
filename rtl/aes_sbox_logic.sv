// aes_sbox_logic: the AES SubBytes substitution computed in logic, without a
// table.
//
// The multiplicative inverse in GF(2^8) (AES polynomial 0x11b) is taken as
// x^254, built from an addition chain of four general GF(2^8) multipliers
// and squarings (squaring is a linear map, only XOR gates):
//   x2 = x^2, x3 = x2*x, x12 = (x3^2)^2, x15 = x12*x3,
//   x240 = x15^16, x252 = x240*x12, x254 = x252*x2.
// Zero maps to zero, as the S-box requires. The AES affine map then gives
// the output. This chain is this design's own choice of pure-logic S-box;
// a composite-field inverter is a smaller alternative with the same
// function. Purely combinational.
module aes_sbox_logic
  import aes_pkg::*;
(
  input  byte_t in_byte,   // byte to substitute
  output byte_t out_byte   // S-box of in_byte
);

  byte_t x2, x3, x6, x12, x15, x240, x252, x254;

  always_comb begin
    x2   = gf_mul(in_byte, in_byte);
    x3   = gf_mul(x2, in_byte);
    x6   = gf_mul(x3, x3);
    x12  = gf_mul(x6, x6);
    x15  = gf_mul(x12, x3);
    x240 = x15;
    for (int i = 0; i < 4; i++) x240 = gf_mul(x240, x240);
    x252 = gf_mul(x240, x12);
    x254 = gf_mul(x252, x2);
    out_byte = x254 ^ {x254[6:0], x254[7]} ^ {x254[5:0], x254[7:6]}
             ^ {x254[4:0], x254[7:5]} ^ {x254[3:0], x254[7:4]} ^ 8'h63;
  end

endmodule
