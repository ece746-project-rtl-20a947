// keystream_buffer: queue of keystream blocks E_K(IS_i) and the XOR that
// turns them into the cipher output, D_W bits per clock.
//
// Up to DEPTH 128-bit blocks are held in a circular buffer. The head block
// is used D_W bits at a time, most significant bits (byte 0) first: in each
// clock with data_in_write and data_in_ready, data_out is loaded with
// data_in XOR the next keystream word and `write` is set for one cycle, so
// the output follows the input by one clock. data_in_ready is 1 while any
// keystream is buffered. `free` tells the block issuing logic how many slots
// are empty; a push into a full buffer is a protocol error (asserted).
// Encryption and decryption are the same operation. Synchronous active-high
// reset empties the buffer. The XOR with the keystream is counter mode
// itself; the buffer and its depth are this design's own.
module keystream_buffer #(
  parameter int unsigned D_W   = 32,   // data bus width, divides 128
  parameter int unsigned DEPTH = 2     // keystream blocks held
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       push,
  input  logic [127:0]               push_block,
  output logic [$clog2(DEPTH+1)-1:0] free,
  output logic                       data_in_ready,
  input  logic                       data_in_write,
  input  logic [D_W-1:0]             data_in,
  output logic                       write,
  output logic [D_W-1:0]             data_out
);

  localparam int unsigned WPB = 128 / D_W;            // words per block
  localparam int unsigned PW  = DEPTH > 1 ? $clog2(DEPTH) : 1;
  localparam int unsigned IW  = WPB > 1 ? $clog2(WPB) : 1;
  localparam int unsigned CW  = $clog2(DEPTH + 1);

  logic [127:0]  buf_q [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] count;
  logic [IW-1:0] word_idx;
  logic [D_W-1:0] ks_word;
  logic           consume, last_word;

  initial assert (128 % D_W == 0) else $error("D_W must divide 128");

  assign data_in_ready = (count != '0);
  assign consume       = data_in_write && data_in_ready;
  assign last_word     = (word_idx == IW'(WPB - 1));
  assign free          = CW'(DEPTH) - count;
  assign ks_word       = buf_q[rd_ptr][127 - D_W*word_idx -: D_W];

  function automatic logic [PW-1:0] ptr_inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (push) buf_q[wr_ptr] <= push_block;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      count    <= '0;
      word_idx <= '0;
      write    <= 1'b0;
      data_out <= '0;
    end else begin
      write <= consume;
      if (consume) begin
        data_out <= data_in ^ ks_word;
        word_idx <= last_word ? '0 : word_idx + IW'(1);
        if (last_word) rd_ptr <= ptr_inc(rd_ptr);
      end
      if (push) wr_ptr <= ptr_inc(wr_ptr);
      count <= count + CW'(push) - CW'(consume && last_word);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst) push |-> (free != '0));

endmodule
