// tb_aes_enc_pipe: feeds the pipelined core one block per clock (counter
// blocks, then random blocks, with gaps), and checks that each result
// appears eleven clocks after the cycle it was presented in, in order, equal to the
// reference encryption, and that the core sustains one block per clock.
module tb_aes_enc_pipe;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic   clk = 0, rst = 1, key_load = 0, key_ready, in_valid = 0, out_valid;
  block_t key_in = '0, block_in = '0, block_out;
  block_t exp_q [$];
  int     time_q [$];
  int     cycle = 0, outs = 0, max_run = 0, run = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  aes_enc_pipe dut (.clk(clk), .rst(rst), .key_load(key_load), .key_in(key_in),
    .key_ready(key_ready), .in_valid(in_valid), .block_in(block_in),
    .out_valid(out_valid), .block_out(block_out));

  task automatic check(logic [127:0] got, logic [127:0] e, string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, e);
    end
  endtask

  // Scoreboard: compare every output with the queued expectation.
  always @(posedge clk) begin
    #2;
    if (!rst && out_valid) begin
      outs++;
      run++;
      if (run > max_run) max_run = run;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        check(block_out, exp_q.pop_front(), "pipelined ciphertext");
        check(128'(cycle - time_q.pop_front()), 128'(11), "latency in clocks");
      end
    end else run = 0;
  end

  task automatic feed(block_t k, block_t blk);
    block_in = blk; in_valid = 1;
    exp_q.push_back(ref_encrypt(k, blk));
    time_q.push_back(cycle);
    @(posedge clk); #1 in_valid = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    int waited = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    key_in = k; key_load = 1;
    @(posedge clk); #1 key_load = 0;
    while (!key_ready) begin @(posedge clk); #1 waited++; end
    check(128'(waited), 128'(10), "key expansion clocks after the load edge");
    for (int i = 0; i < 24; i++) feed(k, 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfeff + 128'(i));
    repeat (3) @(posedge clk);
    #1;
    for (int i = 0; i < 30; i++) begin
      if ($urandom_range(0, 2) == 0) begin @(posedge clk); #1; end
      else feed(k, rand128());
    end
    repeat (15) @(posedge clk);
    check(128'(exp_q.size()), 128'(0), "all blocks came out");
    check(128'(max_run >= 24), 128'(1), "one block per clock sustained");
    $display("pipelined blocks out: %0d, longest back-to-back run: %0d", outs, max_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
