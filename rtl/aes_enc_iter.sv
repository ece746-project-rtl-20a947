// aes_enc_iter: iterative AES-128 encryption core with a 128-bit datapath.
//
// One aes_round (sixteen S-boxes) is reused for all ten rounds, one round
// per clock, after the initial AddRoundKey in the start cycle. A block
// presented with `start` in cycle t is done in cycle t+11, and the next block
// may start in that same cycle: 128 bits per 11 clocks (11.6 bits/clock). The
// round keys come either from the on-the-fly generator (KEY_IN_MEMORY = 0,
// the default) or from the 11 x 128-bit round key memory (KEY_IN_MEMORY = 1).
//
// Interface and timing:
//   key_load/key_in  set a new cipher key; key_ready rises one clock after
//                    the load cycle (on the fly) or eleven clocks after it
//                    (memory: ten expansion steps follow round key 0).
//   start/block_in   accepted when `ready` (key_ready and not busy); the
//                    initial AddRoundKey happens in the start cycle.
//   done/block_out   done pulses for one cycle, eleven clocks after the
//                    start cycle; block_out holds the result until the next
//                    start.
// The 128-bit iterative organisation and the two key-schedule options come
// from the specification of this cipher; the cycle timing is this design's
// own. Synchronous active-high reset.
module aes_enc_iter
  import aes_pkg::*;
#(
  parameter sbox_impl_e SBOX          = SBOX_LUT,
  parameter bit         KEY_IN_MEMORY = 1'b0
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   key_load,
  input  block_t key_in,
  output logic   key_ready,
  output logic   ready,
  input  logic   start,
  input  block_t block_in,
  output logic   done,
  output block_t block_out
);

  block_t     state, round_out, rk;
  logic [3:0] round;        // round being computed while busy, 1..10
  logic       busy;
  logic       last;

  assign last  = busy && (round == 4'(NR));
  assign ready = key_ready && !busy;

  if (KEY_IN_MEMORY) begin : g_mem
    block_t unused_keys [NRK];
    aes_key_mem #(.SBOX(SBOX)) u_keys (
      .clk(clk), .rst(rst), .load(key_load), .key_in(key_in),
      .ready(key_ready), .rd_idx(busy ? round : 4'd0), .rd_key(rk),
      .keys(unused_keys)
    );
  end else begin : g_otf
    aes_key_otf #(.SBOX(SBOX)) u_keys (
      .clk(clk), .rst(rst), .load(key_load), .key_in(key_in),
      .advance(start && ready || busy && !last), .rewind(last),
      .round_key(rk)
    );
    always_ff @(posedge clk) begin
      if (rst)           key_ready <= 1'b0;
      else if (key_load) key_ready <= 1'b1;
    end
  end

  aes_round #(.SBOX(SBOX)) u_round (
    .state_in(state), .round_key(rk), .final_round(round == 4'(NR)),
    .state_out(round_out)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      round <= '0;
      state <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        state <= round_out;
        round <= round + 4'd1;
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (start && ready) begin
        state <= block_in ^ rk;
        round <= 4'd1;
        busy  <= 1'b1;
      end
    end
  end

  assign block_out = state;

  // A start while the core cannot take it would be lost.
  a_start_when_ready: assert property (@(posedge clk) disable iff (rst) start |-> ready);

endmodule
