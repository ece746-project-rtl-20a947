// aes_ctr_stream: AES-128 in counter (CTR) mode used as a stream cipher,
// behind the eSTREAM-style key/IV and data handshake.
//
// The cipher encrypts the counter blocks IS_1 = IV, IS_{i+1} = IS_i + 1 and
// XORs the resulting keystream with the data, so the same circuit encrypts
// and decrypts, and the counter can run ahead of the data. Flow:
//   1. After reset key_iv_ready = 1. The user writes the key and then the IV
//      on key_iv, K_W bits per clock with key_iv_write = 1, most significant
//      word first (keyiv_loader). key_iv_ready then drops to 0.
//   2. The core takes the key (round key memory: 10 more cycles to expand;
//      on the fly: ready next cycle) and the counter is loaded with the IV.
//   3. Counter blocks are issued to the core whenever the keystream buffer
//      has room for the result; results are queued in keystream_buffer.
//      data_in_ready = 1 while keystream is buffered, which happens for the
//      first time when E_K(IV) is done.
//   4. Each clock with data_in_write = 1 and data_in_ready = 1, the D_W-bit
//      data_in is XORed with the next keystream word; the result appears on
//      data_out with write = 1 one clock later.
// If the user sends faster than the core makes keystream, data_in_ready
// drops until the next block is done (at D_W = 32 the iterative core gives
// 128 bits per 11 clocks, the bus takes them in 4).
//
// Parameters: ARCH selects the iterative 128-bit core (default), the
// pipelined one, or the compact core with a COMPACT_W-bit datapath (8, 32
// or 64; on-the-fly keys); SBOX the lookup-table (default) or logic S-box;
// KEY_IN_MEMORY the round key memory instead of on-the-fly keys (iterative
// core only; the pipelined core always uses the memory). K_W and D_W are the
// key_iv and data bus widths, KS_DEPTH the number of keystream blocks that
// may be buffered or in flight. There is no re-keying without reset.
// The mode, the interface names and the engine options follow the
// specification; bus widths, buffering, issue control and all cycle timing
// are this design's choices.
// Synchronous active-high reset.
module aes_ctr_stream
  import aes_pkg::*;
#(
  parameter int unsigned K_W           = 32,
  parameter int unsigned D_W           = 32,
  parameter arch_e       ARCH          = ARCH_ITERATIVE,
  parameter sbox_impl_e  SBOX          = SBOX_LUT,
  parameter bit          KEY_IN_MEMORY = 1'b0,
  parameter int unsigned KS_DEPTH      = 2,
  parameter int unsigned COMPACT_W     = 32
) (
  input  logic           clk,
  input  logic           reset,
  output logic           key_iv_ready,
  input  logic           key_iv_write,
  input  logic [K_W-1:0] key_iv,
  output logic           data_in_ready,
  input  logic           data_in_write,
  input  logic [D_W-1:0] data_in,
  output logic           write,
  output logic [D_W-1:0] data_out
);

  localparam int unsigned CW = $clog2(KS_DEPTH + 1);

  typedef enum logic [1:0] {ST_KEYIV, ST_INIT, ST_RUN} state_e;
  state_e state;

  block_t        key, iv, counter, ks_block;
  logic          loaded, key_ready, core_accept, issue, result;
  logic [CW-1:0] free, inflight;

  keyiv_loader #(.K_W(K_W)) u_loader (
    .clk(clk), .rst(reset), .key_iv_ready(key_iv_ready),
    .key_iv_write(key_iv_write), .key_iv(key_iv),
    .key(key), .iv(iv), .loaded(loaded)
  );

  ctr_counter #(.W(128)) u_counter (
    .clk(clk), .rst(reset), .load(loaded), .iv(iv), .inc(issue),
    .value(counter)
  );

  if (ARCH == ARCH_PIPELINED) begin : g_pipe
    aes_enc_pipe #(.SBOX(SBOX)) u_core (
      .clk(clk), .rst(reset), .key_load(loaded), .key_in(key),
      .key_ready(key_ready), .in_valid(issue), .block_in(counter),
      .out_valid(result), .block_out(ks_block)
    );
    assign core_accept = key_ready;
  end else if (ARCH == ARCH_COMPACT) begin : g_compact
    aes_enc_compact #(.W(COMPACT_W), .SBOX(SBOX)) u_core (
      .clk(clk), .rst(reset), .key_load(loaded), .key_in(key),
      .key_ready(key_ready), .ready(core_accept), .start(issue),
      .block_in(counter), .done(result), .block_out(ks_block)
    );
  end else begin : g_iter
    aes_enc_iter #(.SBOX(SBOX), .KEY_IN_MEMORY(KEY_IN_MEMORY)) u_core (
      .clk(clk), .rst(reset), .key_load(loaded), .key_in(key),
      .key_ready(key_ready), .ready(core_accept), .start(issue),
      .block_in(counter), .done(result), .block_out(ks_block)
    );
  end

  keystream_buffer #(.D_W(D_W), .DEPTH(KS_DEPTH)) u_ksbuf (
    .clk(clk), .rst(reset), .push(result), .push_block(ks_block),
    .free(free), .data_in_ready(data_in_ready),
    .data_in_write(data_in_write), .data_in(data_in),
    .write(write), .data_out(data_out)
  );

  // Issue a counter block only if its result will find a free slot.
  assign issue = (state == ST_RUN) && core_accept && (free > inflight);

  always_ff @(posedge clk) begin
    if (reset) begin
      state    <= ST_KEYIV;
      inflight <= '0;
    end else begin
      inflight <= inflight + CW'(issue) - CW'(result);
      case (state)
        ST_KEYIV: if (loaded)    state <= ST_INIT;
        ST_INIT:  if (key_ready) state <= ST_RUN;
        default:  ;
      endcase
    end
  end

  // The user may only send data the cipher said it is ready for.
  a_data_handshake: assert property (@(posedge clk) disable iff (reset)
    data_in_write |-> data_in_ready);

endmodule
