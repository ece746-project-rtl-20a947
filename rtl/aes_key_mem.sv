// aes_key_mem: AES-128 key expansion into a memory of eleven 128-bit round
// keys (11 x 128 bits).
//
// On `load` the cipher key is written as round key 0 and the expander then
// writes one further round key per clock through a single aes_key_step, so
// the memory is complete, and `ready` high, eleven clocks after the load
// cycle. The
// keys are read by index (rd_idx -> rd_key, asynchronous read, as from a
// distributed RAM) by the iterative core, and all at once (keys) by the
// pipelined core, which needs every round key in the same cycle.
// Synchronous active-high reset clears `ready`; the memory itself is not
// cleared. The 11 x 128-bit key memory follows the specification; the
// on-chip expander and the asynchronous read are this design's choices.
module aes_key_mem
  import aes_pkg::*;
#(
  parameter sbox_impl_e SBOX = SBOX_LUT
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load,          // start expanding key_in
  input  block_t      key_in,        // cipher key, valid with load
  output logic        ready,         // all eleven round keys written
  input  logic [3:0]  rd_idx,        // round key index 0..10
  output block_t      rd_key,        // round key rd_idx
  output block_t      keys [NRK]     // all round keys
);

  block_t     mem [NRK];
  block_t     cur, nxt;
  byte_t      rcon;
  logic [3:0] wr_idx;
  logic       busy;

  aes_key_step #(.SBOX(SBOX)) u_step (.key_in(cur), .rcon(rcon), .key_out(nxt));

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      ready  <= 1'b0;
      wr_idx <= '0;
      rcon   <= 8'h01;
      cur    <= '0;
    end else if (load) begin
      mem[0] <= key_in;
      cur    <= key_in;
      rcon   <= 8'h01;
      wr_idx <= 4'd1;
      busy   <= 1'b1;
      ready  <= 1'b0;
    end else if (busy) begin
      mem[wr_idx] <= nxt;
      cur         <= nxt;
      rcon        <= xtime(rcon);
      wr_idx      <= wr_idx + 4'd1;
      if (wr_idx == 4'(NR)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
    end
  end

  assign rd_key = (rd_idx <= 4'(NR)) ? mem[rd_idx] : '0;

  always_comb
    for (int i = 0; i < NRK; i++) keys[i] = mem[i];

endmodule
