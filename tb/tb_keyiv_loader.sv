// tb_keyiv_loader: writes a key and an IV through the loader with gaps in
// key_iv_write, at K_W = 32 (default) and K_W = 8, and checks the assembled
// key and IV, the one-cycle `loaded` pulse, that key_iv_ready drops after the
// last word, and that words written afterwards are ignored.
module tb_keyiv_loader;
  logic clk = 0, rst = 1;
  logic w32 = 0, w8 = 0;
  logic [31:0] d32 = '0;
  logic [7:0]  d8 = '0;
  logic rdy32, rdy8, ld32, ld8;
  logic [127:0] key32, iv32, key8, iv8;
  int checks = 0, failures = 0, pulses32 = 0, pulses8 = 0;

  always #5 clk = ~clk;

  keyiv_loader dut32 (.clk(clk), .rst(rst), .key_iv_ready(rdy32), .key_iv_write(w32),
                      .key_iv(d32), .key(key32), .iv(iv32), .loaded(ld32));
  keyiv_loader #(.K_W(8)) dut8 (.clk(clk), .rst(rst), .key_iv_ready(rdy8), .key_iv_write(w8),
                      .key_iv(d8), .key(key8), .iv(iv8), .loaded(ld8));

  always @(posedge clk) begin
    if (!rst && ld32) pulses32++;
    if (!rst && ld8)  pulses8++;
  end

  task automatic check(logic [127:0] got, logic [127:0] e, string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, e);
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
    logic [255:0] kiv = {128'hffffffffffffffffffffffffffffffff ^ 128'h00112233445566778899aabbccddeeff,
                         128'h0123456789abcdef0123456789abcdef};
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(128'({rdy32, rdy8}), 128'(3), "ready after reset");
    // 32-bit loader, one gap cycle after every second word
    for (int i = 0; i < 8; i++) begin
      check(128'(rdy32), 128'(1), "ready while loading (32)");
      d32 = kiv[255 - 32*i -: 32]; w32 = 1;
      @(posedge clk); #1 w32 = 0;
      if (i % 2 == 1) begin @(posedge clk); #1; end
    end
    check(128'(rdy32), 128'(0), "ready low after last word (32)");
    check(key32, kiv[255:128], "key (32)");
    check(iv32, kiv[127:0], "iv (32)");
    // 8-bit loader, random gaps
    for (int i = 0; i < 32; i++) begin
      while ($urandom_range(0, 2) == 0) begin @(posedge clk); #1; end
      d8 = kiv[255 - 8*i -: 8]; w8 = 1;
      @(posedge clk); #1 w8 = 0;
    end
    check(128'(rdy8), 128'(0), "ready low after last word (8)");
    // extra words are ignored
    d32 = 32'hdeadbeef; w32 = 1; d8 = 8'h5a; w8 = 1;
    repeat (3) @(posedge clk);
    #1 w32 = 0; w8 = 0;
    check(key32, kiv[255:128], "key unchanged by extra words (32)");
    check(iv32, kiv[127:0], "iv unchanged by extra words (32)");
    check(key8, kiv[255:128], "key (8)");
    check(iv8, kiv[127:0], "iv (8)");
    check(128'(pulses32), 128'(1), "one loaded pulse (32)");
    check(128'(pulses8), 128'(1), "one loaded pulse (8)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
