// aes_enc_compact: compact AES-128 encryption core with a W-bit datapath,
// W = 8, 32 or 64 (default 32).
//
// Instead of sixteen S-boxes working on the whole state, a round is folded
// over several clocks through a W-bit slice of logic:
//   W = 32: one column per clock (4 S-boxes, one MixColumn), 4 clocks/round;
//   W = 64: two columns per clock (8 S-boxes, two MixColumns), 2 clocks/round;
//   W = 8:  one byte per clock (1 S-box): four clocks substitute the bytes
//           of a column into a 32-bit column buffer, four more compute the
//           MixColumns output one byte at a time, 32 clocks/round.
// Because SubBytes works byte by byte it commutes with ShiftRows, so the
// state register is kept "pre-shifted": ShiftRows is applied as wiring when
// the state is loaded and at the end of each round, and every column can
// then be updated in place without a second state register. The round key
// comes from the on-the-fly generator (aes_key_otf), stepped once per round;
// its four key-schedule S-boxes are separate from the datapath ones.
//
// Interface: as aes_enc_iter. key_load/key_in set the key (key_ready one
// clock later); start/block_in are taken when `ready`; done pulses with
// block_out valid 1 + 10 * 128/W clocks after the start cycle for W >= 32
// (41 for W = 32, 21 for W = 64) and 1 + 10 * 32 = 321 clocks for W = 8.
// The three datapath widths come from the specification; the folding scheme
// and its timing are this design's own. Synchronous active-high reset.
module aes_enc_compact
  import aes_pkg::*;
#(
  parameter int unsigned W    = 32,         // datapath width: 8, 32 or 64
  parameter sbox_impl_e  SBOX = SBOX_LUT
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

  // clocks per round and the index of the last one
  localparam int unsigned STEPS = (W == 8) ? 32 : 128 / W;
  localparam int unsigned SW    = $clog2(STEPS);

  block_t        st, upd, rk;
  logic [3:0]    round;
  logic [SW-1:0] step;
  logic          busy, round_end, last;

  initial assert (W == 8 || W == 32 || W == 64) else $error("W must be 8, 32 or 64");

  assign round_end = busy && (step == SW'(STEPS - 1));
  assign last      = round_end && (round == 4'(NR));
  assign ready     = key_ready && !busy;

  aes_key_otf #(.SBOX(SBOX)) u_keys (
    .clk(clk), .rst(rst), .load(key_load), .key_in(key_in),
    .advance(start && ready || round_end && !last), .rewind(last),
    .round_key(rk)
  );

  always_ff @(posedge clk) begin
    if (rst)           key_ready <= 1'b0;
    else if (key_load) key_ready <= 1'b1;
  end

  if (W == 8) begin : g_byte
    // step = {column[1:0], phase, row[1:0]}
    logic [1:0] col, row, row1, row2, row3;
    logic [3:0] bidx;                       // state byte 4*col + row
    logic       phase;
    byte_t      sb_in, sb_out, a0, a1, a2, a3, mixed;
    word_t      colbuf;

    assign col   = step[4:3];
    assign phase = step[2];
    assign row   = step[1:0];
    assign row1  = row + 2'd1;
    assign row2  = row + 2'd2;
    assign row3  = row + 2'd3;
    assign bidx  = {col, row};

    assign sb_in = st[127 - 8*bidx -: 8];
    aes_sbox #(.IMPL(SBOX)) u_sbox (.in_byte(sb_in), .out_byte(sb_out));

    // MixColumns row `row`: 2*a[r] ^ 3*a[r+1] ^ a[r+2] ^ a[r+3]
    always_comb begin
      a0 = colbuf[31 - 8*row -: 8];
      a1 = colbuf[31 - 8*row1 -: 8];
      a2 = colbuf[31 - 8*row2 -: 8];
      a3 = colbuf[31 - 8*row3 -: 8];
      mixed = (round == 4'(NR)) ? a0 : (xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3);
      upd = st;
      if (phase) upd[127 - 8*bidx -: 8] = mixed ^ rk[127 - 8*bidx -: 8];
    end

    always_ff @(posedge clk) begin
      if (rst)                colbuf <= '0;
      else if (busy && !phase) colbuf[31 - 8*row -: 8] <= sb_out;
    end
  end else begin : g_cols
    localparam int unsigned NC = W / 32;    // columns per clock
    word_t sub [NC];
    word_t col_in [NC];
    logic [1:0] cidx [NC];

    for (genvar j = 0; j < NC; j++) begin : g_col
      assign cidx[j]   = 2'(step * NC + j);
      assign col_in[j] = st[127 - 32*cidx[j] -: 32];
      for (genvar b = 0; b < 4; b++) begin : g_sbox
        aes_sbox #(.IMPL(SBOX)) u_sbox (
          .in_byte(col_in[j][31 - 8*b -: 8]), .out_byte(sub[j][31 - 8*b -: 8]));
      end
    end

    always_comb begin
      upd = st;
      for (int j = 0; j < NC; j++)
        upd[127 - 32*cidx[j] -: 32] =
          ((round == 4'(NR)) ? sub[j] : mix_column(sub[j])) ^ rk[127 - 32*cidx[j] -: 32];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      round <= '0;
      step  <= '0;
      st    <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        if (last) begin
          st   <= upd;
          busy <= 1'b0;
          done <= 1'b1;
          step <= '0;
        end else if (round_end) begin
          st    <= shift_rows(upd);
          round <= round + 4'd1;
          step  <= '0;
        end else begin
          st   <= upd;
          step <= step + SW'(1);
        end
      end else if (start && ready) begin
        st    <= shift_rows(block_in ^ rk);
        round <= 4'd1;
        step  <= '0;
        busy  <= 1'b1;
      end
    end
  end

  assign block_out = st;

  a_start_when_ready: assert property (@(posedge clk) disable iff (rst) start |-> ready);

endmodule
