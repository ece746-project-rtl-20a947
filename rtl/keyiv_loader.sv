// keyiv_loader: collects the cipher key and the initialization vector from
// the k-bit key_iv bus of the stream cipher interface.
//
// After reset key_iv_ready is 1. Each clock in which key_iv_write is 1 the
// word on key_iv is shifted in: the first 128/K_W words form the key, the
// next 128/K_W words the IV, most significant word first. When the last IV
// word has been taken, key_iv_ready drops to 0 (from the next cycle) and
// `loaded` pulses for one cycle with key and iv valid; they stay valid until
// reset. Words offered while key_iv_ready is 0 are ignored. Port names and
// the key-then-IV order follow the eSTREAM interface; the word order and the
// one-word-per-write-clock reading are this design's choices.
module keyiv_loader #(
  parameter int unsigned K_W = 32       // key_iv bus width, divides 128
) (
  input  logic           clk,
  input  logic           rst,
  output logic           key_iv_ready,
  input  logic           key_iv_write,
  input  logic [K_W-1:0] key_iv,
  output logic [127:0]   key,
  output logic [127:0]   iv,
  output logic           loaded        // one-cycle pulse, all words taken
);

  localparam int unsigned WORDS = 256 / K_W;
  localparam int unsigned CW    = $clog2(WORDS + 1);

  logic [CW-1:0] count;
  logic [255:0]  shreg;

  initial assert (128 % K_W == 0) else $error("K_W must divide 128");

  always_ff @(posedge clk) begin
    if (rst) begin
      count        <= '0;
      key_iv_ready <= 1'b1;
      loaded       <= 1'b0;
      shreg        <= '0;
    end else begin
      loaded <= 1'b0;
      if (key_iv_ready && key_iv_write) begin
        shreg <= {shreg[255-K_W:0], key_iv};
        count <= count + CW'(1);
        if (count == CW'(WORDS - 1)) begin
          key_iv_ready <= 1'b0;
          loaded       <= 1'b1;
        end
      end
    end
  end

  assign key = shreg[255:128];
  assign iv  = shreg[127:0];

endmodule
