// aes_key_otf: on-the-fly AES-128 round key generator.
//
// Instead of storing all eleven round keys, only the cipher key and the
// current round key are held. round_key starts as the cipher key (round key
// 0); each `advance` replaces it by the next round key through one
// aes_key_step and doubles the round constant, so the key for round r is
// ready exactly when the core runs round r. `rewind` returns to round key 0
// for the next block. Registers: cipher key, current round key, round
// constant (256 + 8 flip-flops).
//
// Timing: `load` captures key_in and round_key shows it from the next cycle.
// Priority load > rewind > advance. Synchronous active-high reset.
// On-the-fly key generation is named by the specification; this forward
// stepping generator is the simplest form of it.
module aes_key_otf
  import aes_pkg::*;
#(
  parameter sbox_impl_e SBOX = SBOX_LUT
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   load,       // capture a new cipher key
  input  block_t key_in,     // cipher key, valid with load
  input  logic   advance,    // step to the next round key
  input  logic   rewind,     // go back to round key 0
  output block_t round_key   // current round key
);

  block_t cipher_key, next_key;
  byte_t  rcon;

  aes_key_step #(.SBOX(SBOX)) u_step (
    .key_in (round_key),
    .rcon   (rcon),
    .key_out(next_key)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      cipher_key <= '0;
      round_key  <= '0;
      rcon       <= 8'h01;
    end else if (load) begin
      cipher_key <= key_in;
      round_key  <= key_in;
      rcon       <= 8'h01;
    end else if (rewind) begin
      round_key  <= cipher_key;
      rcon       <= 8'h01;
    end else if (advance) begin
      round_key  <= next_key;
      rcon       <= xtime(rcon);
    end
  end

endmodule
