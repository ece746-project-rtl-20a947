// aes_enc_pipe: pipelined AES-128 encryption core, one register stage per
// round, for counter mode.
//
// The ten rounds are unrolled into ten aes_round instances (160 S-boxes)
// with a register after the initial AddRoundKey and after every round, so a
// new 128-bit block enters each clock and its result appears eleven clocks
// after the cycle it was presented in (11 register stages). This
// works for counter mode because the next input block (IS_i + 1) never waits
// for a result. All eleven round keys are needed in the same cycle, so they
// come from the round key memory (aes_key_mem), expanded once per key.
//
// Interface and timing: key_load/key_in start the expansion and key_ready
// rises eleven clocks after the load cycle; in_valid/block_in are taken
// every clock while key_ready; out_valid/block_out follow 11 clocks later. No back-pressure:
// the user issues only blocks it has room for. Synchronous active-high reset
// clears the valid bits of the stages. Pipelining the counter-mode cipher
// follows the specification; one stage per round is this design's choice.
module aes_enc_pipe
  import aes_pkg::*;
#(
  parameter sbox_impl_e SBOX = SBOX_LUT
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   key_load,
  input  block_t key_in,
  output logic   key_ready,
  input  logic   in_valid,
  input  block_t block_in,
  output logic   out_valid,
  output block_t block_out
);

  localparam int unsigned STAGES = NR + 1;

  block_t     keys [NRK];
  block_t     unused_rd_key;
  block_t     stage_q [STAGES];
  block_t     stage_d [NR];
  logic [STAGES-1:0] valid_q;

  aes_key_mem #(.SBOX(SBOX)) u_keys (
    .clk(clk), .rst(rst), .load(key_load), .key_in(key_in),
    .ready(key_ready), .rd_idx(4'd0), .rd_key(unused_rd_key), .keys(keys)
  );

  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_round #(.SBOX(SBOX)) u_round (
      .state_in(stage_q[r-1]), .round_key(keys[r]), .final_round(r == NR),
      .state_out(stage_d[r-1])
    );
  end

  always_ff @(posedge clk) begin
    stage_q[0] <= block_in ^ keys[0];
    for (int r = 1; r < STAGES; r++) stage_q[r] <= stage_d[r-1];
  end

  always_ff @(posedge clk) begin
    if (rst) valid_q <= '0;
    else     valid_q <= {valid_q[STAGES-2:0], in_valid && key_ready};
  end

  assign out_valid = valid_q[STAGES-1];
  assign block_out = stage_q[STAGES-1];

  a_in_with_key: assert property (@(posedge clk) disable iff (rst) in_valid |-> key_ready);

endmodule
