// tb_aes_enc_iter: checks the iterative core in two configurations side by
// side: on-the-fly keys with lookup-table S-boxes (the default) and round
// key memory with logic S-boxes. Both encrypt the FIPS-197 Appendix B and
// C.1 examples and random blocks under random keys; the test checks each
// result against the reference model, the 11-clock latency from the start cycle to
// done, key_ready timing, and back-to-back blocks started in the done cycle.
module tb_aes_enc_iter;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic   clk = 0, rst = 1, key_load = 0, start = 0;
  block_t key_in = '0, block_in = '0;
  logic   key_ready [2], ready [2], done [2];
  block_t block_out [2];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_enc_iter #(.SBOX(SBOX_LUT), .KEY_IN_MEMORY(1'b0)) dut0 (
    .clk(clk), .rst(rst), .key_load(key_load), .key_in(key_in),
    .key_ready(key_ready[0]), .ready(ready[0]), .start(start && ready[0]),
    .block_in(block_in), .done(done[0]), .block_out(block_out[0]));
  aes_enc_iter #(.SBOX(SBOX_LOGIC), .KEY_IN_MEMORY(1'b1)) dut1 (
    .clk(clk), .rst(rst), .key_load(key_load), .key_in(key_in),
    .key_ready(key_ready[1]), .ready(ready[1]), .start(start && ready[1]),
    .block_in(block_in), .done(done[1]), .block_out(block_out[1]));

  task automatic check(logic [127:0] got, logic [127:0] e, string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, e);
    end
  endtask

  task automatic set_key(block_t k);
    int c0 = -1, c1 = -1;
    key_in = k; key_load = 1;
    @(posedge clk); #1 key_load = 0;
    for (int c = 1; c <= 20; c++) begin
      if (key_ready[0] && c0 < 0) c0 = c;
      if (key_ready[1] && c1 < 0) c1 = c;
      @(posedge clk); #1;
    end
    check(128'(c0), 128'(1), "on-the-fly key ready one clock after load");
    check(128'(c1), 128'(11), "key memory ready eleven clocks after load");
  endtask

  // Encrypts n blocks back to back on both cores, checking every result.
  task automatic run_blocks(block_t k, block_t first, int n, bit random_blocks);
    block_t blk = first;
    for (int b = 0; b < n; b++) begin
      block_t e = ref_encrypt(k, blk);
      int lat = 1;
      block_in = blk; start = 1;
      check(128'({ready[0], ready[1]}), 128'(3), "both cores ready at start");
      @(posedge clk); #1 start = 0;
      while (!done[0]) begin
        @(posedge clk); #1 lat++;
        if (lat > 40) break;
      end
      check(128'(lat), 128'(11), "clocks from the start cycle to the done cycle");
      check(128'(done[1]), 128'(1), "both cores done together");
      check(block_out[0], e, "ciphertext, on-the-fly keys / table S-box");
      check(block_out[1], e, "ciphertext, key memory / logic S-box");
      blk = random_blocks ? rand128() : blk + 1;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    set_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    check(ref_encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734),
          128'h3925841d02dc09fbdc118597196a0b32, "reference model, FIPS-197 Appendix B");
    run_blocks(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, 1, 0);
    check(block_out[0], 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 Appendix B ciphertext");
    set_key(128'h000102030405060708090a0b0c0d0e0f);
    run_blocks(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 1, 0);
    check(block_out[1], 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 Appendix C.1 ciphertext");
    // consecutive counter blocks, started in the done cycle of the previous one
    run_blocks(128'h000102030405060708090a0b0c0d0e0f, 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfeff, 4, 0);
    for (int n = 0; n < 6; n++) begin
      block_t k = rand128();
      set_key(k);
      run_blocks(k, rand128(), 3, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
