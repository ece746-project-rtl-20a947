// aes_sbox: one AES S-box, built either as the lookup table (aes_sbox_lut)
// or in logic (aes_sbox_logic) as selected by the IMPL parameter. Every S-box
// of the cores and key schedules is instantiated through this wrapper so a
// single parameter switches a whole core between the two variants.
// Combinational.
module aes_sbox
  import aes_pkg::*;
#(
  parameter sbox_impl_e IMPL = SBOX_LUT
) (
  input  byte_t in_byte,
  output byte_t out_byte
);

  if (IMPL == SBOX_LOGIC) begin : g_logic
    aes_sbox_logic u_sbox (.in_byte(in_byte), .out_byte(out_byte));
  end else begin : g_lut
    aes_sbox_lut u_sbox (.in_byte(in_byte), .out_byte(out_byte));
  end

endmodule
