// tb_aes_key_mem: loads keys into the round key memory, checks that `ready`
// rises eleven clocks after the load cycle, that the read port and the parallel key
// outputs hold the reference round keys, and that a second load drops
// `ready` and replaces all keys.
module tb_aes_key_mem;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic       clk = 0, rst = 1, load = 0, ready;
  logic [3:0] rd_idx = '0;
  block_t     key_in = '0, rd_key;
  block_t     keys [NRK];
  rk_t        exp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_key_mem #(.SBOX(SBOX_LOGIC)) dut (
    .clk(clk), .rst(rst), .load(load), .key_in(key_in), .ready(ready),
    .rd_idx(rd_idx), .rd_key(rd_key), .keys(keys));

  task automatic check(logic [127:0] got, logic [127:0] e, string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, e);
    end
  endtask

  task automatic run_key(block_t k);
    int cycles = 0;
    exp = ref_expand(k);
    key_in = k; load = 1;
    @(posedge clk); #1 load = 0;
    check(128'(ready), 128'(0), "ready low during expansion");
    while (!ready) begin
      @(posedge clk); #1 cycles++;
      if (cycles > 50) break;
    end
    check(128'(cycles + 1), 128'(11), "clocks from the load cycle to ready");
    for (int r = 0; r <= 10; r++) begin
      rd_idx = 4'(r); #1;
      check(rd_key, exp[r], $sformatf("read port key %0d", r));
      check(keys[r], exp[r], $sformatf("parallel key %0d", r));
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
    check(128'(ready), 128'(0), "not ready after reset");
    run_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    for (int n = 0; n < 8; n++) run_key(rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
