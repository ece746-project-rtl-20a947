// aes_round: one full-width AES encryption round on a 128-bit state.
//
// SubBytes uses sixteen S-boxes (lookup table or logic, parameter SBOX),
// followed by ShiftRows, MixColumns and AddRoundKey. When final_round is
// set MixColumns is bypassed, as the tenth AES-128 round requires. The block
// is combinational: the caller registers the result, one round per clock in
// the iterative core or one register stage per round in the pipelined core.
module aes_round
  import aes_pkg::*;
#(
  parameter sbox_impl_e SBOX = SBOX_LUT
) (
  input  block_t state_in,     // state before the round
  input  block_t round_key,    // round key of this round
  input  logic   final_round,  // 1: skip MixColumns
  output block_t state_out     // state after AddRoundKey
);

  block_t sub, shifted;

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_sbox #(.IMPL(SBOX)) u_sbox (
      .in_byte (state_in[127 - 8*i -: 8]),
      .out_byte(sub[127 - 8*i -: 8])
    );
  end

  always_comb begin
    shifted   = shift_rows(sub);
    state_out = (final_round ? shifted : mix_columns(shifted)) ^ round_key;
  end

endmodule
