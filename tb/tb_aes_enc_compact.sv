// tb_aes_enc_compact: checks the compact core at W = 32 (default), 64 and 8,
// the 8- and 32-bit versions also with logic S-boxes. All encrypt the
// FIPS-197 Appendix B and C.1 examples and random blocks under random keys,
// back to back; each result is compared with the reference model and the
// clocks from the start cycle to done with 1 + 10 * (clocks per round).
module tb_aes_enc_compact;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic   clk = 0, rst = 1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(logic [127:0] got, logic [127:0] e, string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, e);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
  end

  localparam int unsigned WS [5] = '{32, 64, 8, 32, 8};
  localparam bit          LG [5] = '{0, 0, 0, 1, 1};

  for (genvar g = 0; g < 5; g++) begin : g_cfg
    localparam int unsigned W   = WS[g];
    localparam int unsigned LAT = 1 + 10 * ((W == 8) ? 32 : 128 / W);
    logic   key_load = 0, start = 0, key_ready, ready, done;
    block_t key_in = '0, block_in = '0, block_out;
    bit     fin = 0;

    if (g == 0) begin : g_dut
      aes_enc_compact dut (.clk(clk), .rst(rst), .key_load(key_load), .key_in(key_in),
        .key_ready(key_ready), .ready(ready), .start(start), .block_in(block_in),
        .done(done), .block_out(block_out));
    end else begin : g_dut
      aes_enc_compact #(.W(W), .SBOX(LG[g] ? SBOX_LOGIC : SBOX_LUT)) dut (
        .clk(clk), .rst(rst), .key_load(key_load), .key_in(key_in),
        .key_ready(key_ready), .ready(ready), .start(start), .block_in(block_in),
        .done(done), .block_out(block_out));
    end

    task automatic run(block_t k, block_t blk, int n);
      key_in = k; key_load = 1;
      @(posedge clk); #1 key_load = 0;
      check(128'(key_ready), 128'(1), $sformatf("W=%0d key ready", W));
      for (int b = 0; b < n; b++) begin
        int lat = 1;
        block_in = blk; start = 1;
        check(128'(ready), 128'(1), $sformatf("W=%0d ready at start", W));
        @(posedge clk); #1 start = 0;
        while (!done) begin
          @(posedge clk); #1 lat++;
          if (lat > 400) break;
        end
        check(128'(lat), 128'(LAT), $sformatf("W=%0d clocks from start cycle to done", W));
        check(block_out, ref_encrypt(k, blk), $sformatf("W=%0d ciphertext", W));
        blk = rand128();
      end
    endtask

    initial begin
      wait (!rst);
      #1;
      run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, 1);
      check(block_out, 128'h3925841d02dc09fbdc118597196a0b32, $sformatf("W=%0d FIPS-197 Appendix B", W));
      run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 1);
      check(block_out, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("W=%0d FIPS-197 Appendix C.1", W));
      for (int n = 0; n < 4; n++) run(rand128(), rand128(), 3);
      fin = 1;
    end
  end

  initial begin
    wait (g_cfg[0].fin && g_cfg[1].fin && g_cfg[2].fin && g_cfg[3].fin && g_cfg[4].fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
