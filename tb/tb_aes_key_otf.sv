// tb_aes_key_otf: steps the on-the-fly key generator through all ten round
// keys of the FIPS-197 Appendix A.1 key and of random keys, checks each
// round key against the reference key expansion, and checks that rewind
// returns to round key 0 and that a held generator keeps its key.
module tb_aes_key_otf;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic   clk = 0, rst = 1, load = 0, advance = 0, rewind = 0;
  block_t key_in = '0, round_key;
  rk_t    exp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_key_otf dut (.clk(clk), .rst(rst), .load(load), .key_in(key_in),
                   .advance(advance), .rewind(rewind), .round_key(round_key));

  task automatic check(block_t got, block_t e, string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, e);
    end
  endtask

  task automatic run_key(block_t k);
    exp = ref_expand(k);
    key_in = k; load = 1;
    @(posedge clk); #1 load = 0;
    check(round_key, exp[0], "round key 0 after load");
    for (int r = 1; r <= 10; r++) begin
      advance = 1; @(posedge clk); #1 advance = 0;
      check(round_key, exp[r], $sformatf("round key %0d", r));
    end
    @(posedge clk); #1;
    check(round_key, exp[10], "hold without advance");
    rewind = 1; advance = 1; @(posedge clk); #1 rewind = 0; advance = 0;
    check(round_key, exp[0], "rewind has priority over advance");
    for (int r = 1; r <= 10; r++) begin
      advance = 1; @(posedge clk); #1 advance = 0;
      check(round_key, exp[r], $sformatf("second pass round key %0d", r));
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    run_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    check(exp[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "reference round key 10 (FIPS-197 A.1)");
    for (int n = 0; n < 10; n++) run_key(rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
