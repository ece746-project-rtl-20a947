// ctr_counter: the counter-mode input block IS_i.
//
// `load` sets the counter to the initialization vector (IS_1 = IV); every
// `inc` adds one modulo 2^W (IS_{i+1} = IS_i + 1), the whole block being one
// W-bit unsigned number with its most significant bit first. Because the
// next value never depends on a cipher output, the counter can run ahead of
// the cipher and feed a pipelined core one block per clock.
// Synchronous active-high reset to zero; load has priority over inc.
// The counter rule is the specification's; the full-width increment is the
// reading chosen here.
module ctr_counter #(
  parameter int unsigned W = 128
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,   // IS <= iv
  input  logic [W-1:0] iv,
  input  logic         inc,    // IS <= IS + 1
  output logic [W-1:0] value   // current IS_i
);

  always_ff @(posedge clk) begin
    if (rst)       value <= '0;
    else if (load) value <= iv;
    else if (inc)  value <= value + W'(1);
  end

endmodule
