// aes_sbox_lut: the AES SubBytes substitution as a 256 x 8-bit lookup table.
//
// The table is a constant array filled at elaboration time by
// aes_pkg::sbox_table(), which applies the FIPS-197 definition (inverse in
// GF(2^8), then the affine map) to every byte value. Synthesis sees a plain
// read-only table indexed by the input byte, the lookup-table S-box variant.
// Purely combinational: the output follows the input in the same cycle.
// A table S-box is one of the two variants the specification calls for.
module aes_sbox_lut
  import aes_pkg::*;
(
  input  byte_t in_byte,   // byte to substitute
  output byte_t out_byte   // S-box of in_byte
);

  localparam sbox_table_t TABLE = sbox_table();

  assign out_byte = TABLE[in_byte];

endmodule
