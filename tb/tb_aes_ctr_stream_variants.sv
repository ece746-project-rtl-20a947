// tb_aes_ctr_stream_variants: the same end-to-end test as tb_aes_ctr_stream
// on the other configurations of the stream cipher: the pipelined core with
// a 128-bit data bus (one block per clock once running, with
// enough keystream buffering to cover the pipeline's round trip), the iterative core
// with round keys in memory and logic S-boxes on 8-bit buses (where the core outpaces the bus, so it must never stall),
// and the
// iterative core with logic S-boxes and on-the-fly keys on a 64-bit data bus,
// and the compact core at W = 8, 32 and 64.
module tb_aes_ctr_stream_variants;
  localparam int WATCHDOG = 200000;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic clk = 0, rst = 1;
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
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
  end

  begin : g_pipe
    localparam string NAME = "pipelined D_W=128";
    localparam int unsigned KW = 32;
    localparam int unsigned DW = 128;
    localparam int unsigned INIT_LAT = 25;
    localparam int unsigned KSD = 14;
    localparam bit EXPECT_STALL = 0;
    localparam int BLK_CLK = 11;
    localparam int RATE_BLOCKS = 40, RATE_MIN = 40, RATE_MAX = 41, RAND_BLOCKS = 60;

    localparam int unsigned WPB = 128 / DW;
    logic kiv_rdy, kiv_w = 0, din_rdy, din_w = 0, wr;
    logic [KW-1:0] kiv = '0;
    logic [DW-1:0] din = '0, dout;
    logic [DW-1:0] exp_q [$];
    int n_stall = 0, n_full = 0, n_wait_keyiv = 0, n_out = 0, init_lat = 0, n_ctr_carry = 0;
    int rate_cycles = 0, first_run = 0;
    bit done = 0;

    aes_ctr_stream #(.D_W(128), .ARCH(ARCH_PIPELINED), .KS_DEPTH(14)) dut (
      .clk(clk), .reset(rst), .key_iv_ready(kiv_rdy), .key_iv_write(kiv_w), .key_iv(kiv),
      .data_in_ready(din_rdy), .data_in_write(din_w), .data_in(din), .write(wr), .data_out(dout));

    // scoreboard: every output word against the model
    always @(posedge clk) begin
      #2;
      if (!rst && wr) begin
        n_out++;
        if (exp_q.size() == 0) begin
          failures++; $display("FAIL %s: output with nothing expected", NAME);
        end else check(128'(dout), 128'(exp_q.pop_front()), {NAME, ": data_out"});
      end
    end

    // Loads key and IV with random gaps.
    task automatic load_keyiv(logic [127:0] k, logic [127:0] v);
      logic [255:0] kv = {k, v};
      for (int i = 0; i < 256 / KW; i++) begin
        while ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
        check(128'(kiv_rdy), 128'(1), {NAME, ": key_iv_ready while loading"});
        kiv = kv[255 - KW*i -: KW]; kiv_w = 1;
        @(posedge clk); #1 kiv_w = 0;
      end
      check(128'(kiv_rdy), 128'(0), {NAME, ": key_iv_ready low after key and IV"});
      while (!din_rdy) begin @(posedge clk); #1 init_lat++; if (init_lat > 2000) break; end
    endtask

    // Sends n blocks of message m (given by a function of the block index)
    // through the cipher; gap_pct percent of cycles the sender pauses.
    task automatic send(logic [127:0] k, logic [127:0] ctr0, logic [127:0] msg [$], int gap_pct);
      int run = 0;
      bit stalled = 0;
      for (int b = 0; b < msg.size(); b++) begin
        logic [127:0] ks = ref_encrypt(k, ctr0 + 128'(b));
        if (ctr0[7:0] + 8'(b) == 8'h00 && b != 0) n_ctr_carry++;
        for (int w = 0; w < WPB; w++) begin
          while (!din_rdy || $urandom_range(0, 99) < gap_pct) begin
            if (!din_rdy) begin n_stall++; stalled = 1; end
            @(posedge clk); #1;
          end
          din = msg[b][127 - DW*w -: DW]; din_w = 1;
          exp_q.push_back(din ^ ks[127 - DW*w -: DW]);
          @(posedge clk); #1 din_w = 0;
          if (!stalled) run++;
        end
      end
      if (run >= KSD * WPB) n_full++;
      first_run = run;
    endtask

    initial begin
      logic [127:0] k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
      logic [127:0] v = 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfeff;
      logic [127:0] msg [$];
      logic [127:0] ct [$];
      int t0;
      wait (!rst);
      #1;
      check(128'({kiv_rdy, din_rdy}), 128'(2), {NAME, ": after reset key_iv_ready=1, data_in_ready=0"});
      repeat (5) begin @(posedge clk); #1 n_wait_keyiv++; end
      // 1. NIST SP 800-38A F.5.1 CTR-AES128 example, checked word by word
      load_keyiv(k, v);
      check(128'(init_lat + 1), 128'(INIT_LAT), {NAME, ": clocks from last key_iv word to data_in_ready"});
      msg = '{128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
              128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710};
      ct  = '{128'h874d6191b620e3261bef6864990db6ce, 128'h9806f66b7970fdff8617187bb9fffdff,
              128'h5ae4df3edbd5d35e5b4f09020db03eab, 128'h1e031dda2fbe03d1792170a0f3009cee};
      for (int b = 0; b < 4; b++)
        check(ref_encrypt(k, v + 128'(b)) ^ msg[b], ct[b], {NAME, ": model matches SP 800-38A"});
      send(k, v, msg, 0);
      // 2. sustained rate: send as fast as allowed once the buffer is full
      repeat (40 + KSD * BLK_CLK) @(posedge clk);
      #1;
      msg = {};
      for (int b = 0; b < RATE_BLOCKS; b++) msg.push_back(rand128());
      t0 = $time;
      n_full = 0;
      send(k, v + 128'd4, msg, 0);
      rate_cycles = ($time - t0) / 10;
      check(128'(n_full), 128'(1), {NAME, $sformatf(": %0d words taken without a stall after a pause, buffer holds %0d", first_run, KSD * WPB)});
      check(128'(rate_cycles >= RATE_MIN && rate_cycles <= RATE_MAX), 128'(1),
            {NAME, $sformatf(": %0d blocks took %0d clocks", RATE_BLOCKS, rate_cycles)});
      // 3. random data with random pauses
      msg = {};
      for (int b = 0; b < RAND_BLOCKS; b++) msg.push_back(rand128());
      send(k, v + 128'(4 + RATE_BLOCKS), msg, 30);
      repeat (5) @(posedge clk);
      #1;
      check(128'(exp_q.size()), 128'(0), {NAME, ": every word came out"});
      done = 1;
    end
  end
  begin : g_mem
    localparam string NAME = "key memory, logic S-box, K_W=D_W=8";
    localparam int unsigned KW = 8;
    localparam int unsigned DW = 8;
    localparam int unsigned INIT_LAT = 25;
    localparam int unsigned KSD = 2;
    localparam bit EXPECT_STALL = 0;
    localparam int BLK_CLK = 11;
    localparam int RATE_BLOCKS = 20, RATE_MIN = 320, RATE_MAX = 322, RAND_BLOCKS = 20;

    localparam int unsigned WPB = 128 / DW;
    logic kiv_rdy, kiv_w = 0, din_rdy, din_w = 0, wr;
    logic [KW-1:0] kiv = '0;
    logic [DW-1:0] din = '0, dout;
    logic [DW-1:0] exp_q [$];
    int n_stall = 0, n_full = 0, n_wait_keyiv = 0, n_out = 0, init_lat = 0, n_ctr_carry = 0;
    int rate_cycles = 0, first_run = 0;
    bit done = 0;

    aes_ctr_stream #(.K_W(8), .D_W(8), .SBOX(SBOX_LOGIC), .KEY_IN_MEMORY(1'b1)) dut (
      .clk(clk), .reset(rst), .key_iv_ready(kiv_rdy), .key_iv_write(kiv_w), .key_iv(kiv),
      .data_in_ready(din_rdy), .data_in_write(din_w), .data_in(din), .write(wr), .data_out(dout));

    // scoreboard: every output word against the model
    always @(posedge clk) begin
      #2;
      if (!rst && wr) begin
        n_out++;
        if (exp_q.size() == 0) begin
          failures++; $display("FAIL %s: output with nothing expected", NAME);
        end else check(128'(dout), 128'(exp_q.pop_front()), {NAME, ": data_out"});
      end
    end

    // Loads key and IV with random gaps.
    task automatic load_keyiv(logic [127:0] k, logic [127:0] v);
      logic [255:0] kv = {k, v};
      for (int i = 0; i < 256 / KW; i++) begin
        while ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
        check(128'(kiv_rdy), 128'(1), {NAME, ": key_iv_ready while loading"});
        kiv = kv[255 - KW*i -: KW]; kiv_w = 1;
        @(posedge clk); #1 kiv_w = 0;
      end
      check(128'(kiv_rdy), 128'(0), {NAME, ": key_iv_ready low after key and IV"});
      while (!din_rdy) begin @(posedge clk); #1 init_lat++; if (init_lat > 2000) break; end
    endtask

    // Sends n blocks of message m (given by a function of the block index)
    // through the cipher; gap_pct percent of cycles the sender pauses.
    task automatic send(logic [127:0] k, logic [127:0] ctr0, logic [127:0] msg [$], int gap_pct);
      int run = 0;
      bit stalled = 0;
      for (int b = 0; b < msg.size(); b++) begin
        logic [127:0] ks = ref_encrypt(k, ctr0 + 128'(b));
        if (ctr0[7:0] + 8'(b) == 8'h00 && b != 0) n_ctr_carry++;
        for (int w = 0; w < WPB; w++) begin
          while (!din_rdy || $urandom_range(0, 99) < gap_pct) begin
            if (!din_rdy) begin n_stall++; stalled = 1; end
            @(posedge clk); #1;
          end
          din = msg[b][127 - DW*w -: DW]; din_w = 1;
          exp_q.push_back(din ^ ks[127 - DW*w -: DW]);
          @(posedge clk); #1 din_w = 0;
          if (!stalled) run++;
        end
      end
      if (run >= KSD * WPB) n_full++;
      first_run = run;
    endtask

    initial begin
      logic [127:0] k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
      logic [127:0] v = 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfeff;
      logic [127:0] msg [$];
      logic [127:0] ct [$];
      int t0;
      wait (!rst);
      #1;
      check(128'({kiv_rdy, din_rdy}), 128'(2), {NAME, ": after reset key_iv_ready=1, data_in_ready=0"});
      repeat (5) begin @(posedge clk); #1 n_wait_keyiv++; end
      // 1. NIST SP 800-38A F.5.1 CTR-AES128 example, checked word by word
      load_keyiv(k, v);
      check(128'(init_lat + 1), 128'(INIT_LAT), {NAME, ": clocks from last key_iv word to data_in_ready"});
      msg = '{128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
              128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710};
      ct  = '{128'h874d6191b620e3261bef6864990db6ce, 128'h9806f66b7970fdff8617187bb9fffdff,
              128'h5ae4df3edbd5d35e5b4f09020db03eab, 128'h1e031dda2fbe03d1792170a0f3009cee};
      for (int b = 0; b < 4; b++)
        check(ref_encrypt(k, v + 128'(b)) ^ msg[b], ct[b], {NAME, ": model matches SP 800-38A"});
      send(k, v, msg, 0);
      // 2. sustained rate: send as fast as allowed once the buffer is full
      repeat (40 + KSD * BLK_CLK) @(posedge clk);
      #1;
      msg = {};
      for (int b = 0; b < RATE_BLOCKS; b++) msg.push_back(rand128());
      t0 = $time;
      n_full = 0;
      send(k, v + 128'd4, msg, 0);
      rate_cycles = ($time - t0) / 10;
      check(128'(n_full), 128'(1), {NAME, $sformatf(": %0d words taken without a stall after a pause, buffer holds %0d", first_run, KSD * WPB)});
      check(128'(rate_cycles >= RATE_MIN && rate_cycles <= RATE_MAX), 128'(1),
            {NAME, $sformatf(": %0d blocks took %0d clocks", RATE_BLOCKS, rate_cycles)});
      // 3. random data with random pauses
      msg = {};
      for (int b = 0; b < RAND_BLOCKS; b++) msg.push_back(rand128());
      send(k, v + 128'(4 + RATE_BLOCKS), msg, 30);
      repeat (5) @(posedge clk);
      #1;
      check(128'(exp_q.size()), 128'(0), {NAME, ": every word came out"});
      done = 1;
    end
  end
  begin : g_logic64
    localparam string NAME = "logic S-box, D_W=64";
    localparam int unsigned KW = 32;
    localparam int unsigned DW = 64;
    localparam int unsigned INIT_LAT = 15;
    localparam int unsigned KSD = 3;
    localparam bit EXPECT_STALL = 1;
    localparam int BLK_CLK = 11;
    localparam int RATE_BLOCKS = 30, RATE_MIN = 297, RATE_MAX = 332, RAND_BLOCKS = 30;

    localparam int unsigned WPB = 128 / DW;
    logic kiv_rdy, kiv_w = 0, din_rdy, din_w = 0, wr;
    logic [KW-1:0] kiv = '0;
    logic [DW-1:0] din = '0, dout;
    logic [DW-1:0] exp_q [$];
    int n_stall = 0, n_full = 0, n_wait_keyiv = 0, n_out = 0, init_lat = 0, n_ctr_carry = 0;
    int rate_cycles = 0, first_run = 0;
    bit done = 0;

    aes_ctr_stream #(.D_W(64), .SBOX(SBOX_LOGIC), .KS_DEPTH(3)) dut (
      .clk(clk), .reset(rst), .key_iv_ready(kiv_rdy), .key_iv_write(kiv_w), .key_iv(kiv),
      .data_in_ready(din_rdy), .data_in_write(din_w), .data_in(din), .write(wr), .data_out(dout));

    // scoreboard: every output word against the model
    always @(posedge clk) begin
      #2;
      if (!rst && wr) begin
        n_out++;
        if (exp_q.size() == 0) begin
          failures++; $display("FAIL %s: output with nothing expected", NAME);
        end else check(128'(dout), 128'(exp_q.pop_front()), {NAME, ": data_out"});
      end
    end

    // Loads key and IV with random gaps.
    task automatic load_keyiv(logic [127:0] k, logic [127:0] v);
      logic [255:0] kv = {k, v};
      for (int i = 0; i < 256 / KW; i++) begin
        while ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
        check(128'(kiv_rdy), 128'(1), {NAME, ": key_iv_ready while loading"});
        kiv = kv[255 - KW*i -: KW]; kiv_w = 1;
        @(posedge clk); #1 kiv_w = 0;
      end
      check(128'(kiv_rdy), 128'(0), {NAME, ": key_iv_ready low after key and IV"});
      while (!din_rdy) begin @(posedge clk); #1 init_lat++; if (init_lat > 2000) break; end
    endtask

    // Sends n blocks of message m (given by a function of the block index)
    // through the cipher; gap_pct percent of cycles the sender pauses.
    task automatic send(logic [127:0] k, logic [127:0] ctr0, logic [127:0] msg [$], int gap_pct);
      int run = 0;
      bit stalled = 0;
      for (int b = 0; b < msg.size(); b++) begin
        logic [127:0] ks = ref_encrypt(k, ctr0 + 128'(b));
        if (ctr0[7:0] + 8'(b) == 8'h00 && b != 0) n_ctr_carry++;
        for (int w = 0; w < WPB; w++) begin
          while (!din_rdy || $urandom_range(0, 99) < gap_pct) begin
            if (!din_rdy) begin n_stall++; stalled = 1; end
            @(posedge clk); #1;
          end
          din = msg[b][127 - DW*w -: DW]; din_w = 1;
          exp_q.push_back(din ^ ks[127 - DW*w -: DW]);
          @(posedge clk); #1 din_w = 0;
          if (!stalled) run++;
        end
      end
      if (run >= KSD * WPB) n_full++;
      first_run = run;
    endtask

    initial begin
      logic [127:0] k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
      logic [127:0] v = 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfeff;
      logic [127:0] msg [$];
      logic [127:0] ct [$];
      int t0;
      wait (!rst);
      #1;
      check(128'({kiv_rdy, din_rdy}), 128'(2), {NAME, ": after reset key_iv_ready=1, data_in_ready=0"});
      repeat (5) begin @(posedge clk); #1 n_wait_keyiv++; end
      // 1. NIST SP 800-38A F.5.1 CTR-AES128 example, checked word by word
      load_keyiv(k, v);
      check(128'(init_lat + 1), 128'(INIT_LAT), {NAME, ": clocks from last key_iv word to data_in_ready"});
      msg = '{128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
              128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710};
      ct  = '{128'h874d6191b620e3261bef6864990db6ce, 128'h9806f66b7970fdff8617187bb9fffdff,
              128'h5ae4df3edbd5d35e5b4f09020db03eab, 128'h1e031dda2fbe03d1792170a0f3009cee};
      for (int b = 0; b < 4; b++)
        check(ref_encrypt(k, v + 128'(b)) ^ msg[b], ct[b], {NAME, ": model matches SP 800-38A"});
      send(k, v, msg, 0);
      // 2. sustained rate: send as fast as allowed once the buffer is full
      repeat (40 + KSD * BLK_CLK) @(posedge clk);
      #1;
      msg = {};
      for (int b = 0; b < RATE_BLOCKS; b++) msg.push_back(rand128());
      t0 = $time;
      n_full = 0;
      send(k, v + 128'd4, msg, 0);
      rate_cycles = ($time - t0) / 10;
      check(128'(n_full), 128'(1), {NAME, $sformatf(": %0d words taken without a stall after a pause, buffer holds %0d", first_run, KSD * WPB)});
      check(128'(rate_cycles >= RATE_MIN && rate_cycles <= RATE_MAX), 128'(1),
            {NAME, $sformatf(": %0d blocks took %0d clocks", RATE_BLOCKS, rate_cycles)});
      // 3. random data with random pauses
      msg = {};
      for (int b = 0; b < RAND_BLOCKS; b++) msg.push_back(rand128());
      send(k, v + 128'(4 + RATE_BLOCKS), msg, 30);
      repeat (5) @(posedge clk);
      #1;
      check(128'(exp_q.size()), 128'(0), {NAME, ": every word came out"});
      done = 1;
    end
  end
  begin : g_compact8
    localparam string NAME = "compact W=8, D_W=8";
    localparam int unsigned KW = 32;
    localparam int unsigned DW = 8;
    localparam int unsigned INIT_LAT = 325;
    localparam int unsigned KSD = 2;
    localparam bit EXPECT_STALL = 1;
    localparam int BLK_CLK = 321;
    localparam int RATE_BLOCKS = 4, RATE_MIN = 642, RATE_MAX = 1286, RAND_BLOCKS = 3;

    localparam int unsigned WPB = 128 / DW;
    logic kiv_rdy, kiv_w = 0, din_rdy, din_w = 0, wr;
    logic [KW-1:0] kiv = '0;
    logic [DW-1:0] din = '0, dout;
    logic [DW-1:0] exp_q [$];
    int n_stall = 0, n_full = 0, n_wait_keyiv = 0, n_out = 0, init_lat = 0, n_ctr_carry = 0;
    int rate_cycles = 0, first_run = 0;
    bit done = 0;

    aes_ctr_stream #(.D_W(8), .ARCH(ARCH_COMPACT), .COMPACT_W(8)) dut (
      .clk(clk), .reset(rst), .key_iv_ready(kiv_rdy), .key_iv_write(kiv_w), .key_iv(kiv),
      .data_in_ready(din_rdy), .data_in_write(din_w), .data_in(din), .write(wr), .data_out(dout));

    // scoreboard: every output word against the model
    always @(posedge clk) begin
      #2;
      if (!rst && wr) begin
        n_out++;
        if (exp_q.size() == 0) begin
          failures++; $display("FAIL %s: output with nothing expected", NAME);
        end else check(128'(dout), 128'(exp_q.pop_front()), {NAME, ": data_out"});
      end
    end

    // Loads key and IV with random gaps.
    task automatic load_keyiv(logic [127:0] k, logic [127:0] v);
      logic [255:0] kv = {k, v};
      for (int i = 0; i < 256 / KW; i++) begin
        while ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
        check(128'(kiv_rdy), 128'(1), {NAME, ": key_iv_ready while loading"});
        kiv = kv[255 - KW*i -: KW]; kiv_w = 1;
        @(posedge clk); #1 kiv_w = 0;
      end
      check(128'(kiv_rdy), 128'(0), {NAME, ": key_iv_ready low after key and IV"});
      while (!din_rdy) begin @(posedge clk); #1 init_lat++; if (init_lat > 2000) break; end
    endtask

    // Sends n blocks of message m (given by a function of the block index)
    // through the cipher; gap_pct percent of cycles the sender pauses.
    task automatic send(logic [127:0] k, logic [127:0] ctr0, logic [127:0] msg [$], int gap_pct);
      int run = 0;
      bit stalled = 0;
      for (int b = 0; b < msg.size(); b++) begin
        logic [127:0] ks = ref_encrypt(k, ctr0 + 128'(b));
        if (ctr0[7:0] + 8'(b) == 8'h00 && b != 0) n_ctr_carry++;
        for (int w = 0; w < WPB; w++) begin
          while (!din_rdy || $urandom_range(0, 99) < gap_pct) begin
            if (!din_rdy) begin n_stall++; stalled = 1; end
            @(posedge clk); #1;
          end
          din = msg[b][127 - DW*w -: DW]; din_w = 1;
          exp_q.push_back(din ^ ks[127 - DW*w -: DW]);
          @(posedge clk); #1 din_w = 0;
          if (!stalled) run++;
        end
      end
      if (run >= KSD * WPB) n_full++;
      first_run = run;
    endtask

    initial begin
      logic [127:0] k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
      logic [127:0] v = 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfeff;
      logic [127:0] msg [$];
      logic [127:0] ct [$];
      int t0;
      wait (!rst);
      #1;
      check(128'({kiv_rdy, din_rdy}), 128'(2), {NAME, ": after reset key_iv_ready=1, data_in_ready=0"});
      repeat (5) begin @(posedge clk); #1 n_wait_keyiv++; end
      // 1. NIST SP 800-38A F.5.1 CTR-AES128 example, checked word by word
      load_keyiv(k, v);
      check(128'(init_lat + 1), 128'(INIT_LAT), {NAME, ": clocks from last key_iv word to data_in_ready"});
      msg = '{128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
              128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710};
      ct  = '{128'h874d6191b620e3261bef6864990db6ce, 128'h9806f66b7970fdff8617187bb9fffdff,
              128'h5ae4df3edbd5d35e5b4f09020db03eab, 128'h1e031dda2fbe03d1792170a0f3009cee};
      for (int b = 0; b < 4; b++)
        check(ref_encrypt(k, v + 128'(b)) ^ msg[b], ct[b], {NAME, ": model matches SP 800-38A"});
      send(k, v, msg, 0);
      // 2. sustained rate: send as fast as allowed once the buffer is full
      repeat (40 + KSD * BLK_CLK) @(posedge clk);
      #1;
      msg = {};
      for (int b = 0; b < RATE_BLOCKS; b++) msg.push_back(rand128());
      t0 = $time;
      n_full = 0;
      send(k, v + 128'd4, msg, 0);
      rate_cycles = ($time - t0) / 10;
      check(128'(n_full), 128'(1), {NAME, $sformatf(": %0d words taken without a stall after a pause, buffer holds %0d", first_run, KSD * WPB)});
      check(128'(rate_cycles >= RATE_MIN && rate_cycles <= RATE_MAX), 128'(1),
            {NAME, $sformatf(": %0d blocks took %0d clocks", RATE_BLOCKS, rate_cycles)});
      // 3. random data with random pauses
      msg = {};
      for (int b = 0; b < RAND_BLOCKS; b++) msg.push_back(rand128());
      send(k, v + 128'(4 + RATE_BLOCKS), msg, 30);
      repeat (5) @(posedge clk);
      #1;
      check(128'(exp_q.size()), 128'(0), {NAME, ": every word came out"});
      done = 1;
    end
  end
  begin : g_compact32
    localparam string NAME = "compact W=32, D_W=32";
    localparam int unsigned KW = 32;
    localparam int unsigned DW = 32;
    localparam int unsigned INIT_LAT = 45;
    localparam int unsigned KSD = 2;
    localparam bit EXPECT_STALL = 1;
    localparam int BLK_CLK = 41;
    localparam int RATE_BLOCKS = 10, RATE_MIN = 328, RATE_MAX = 412, RAND_BLOCKS = 6;

    localparam int unsigned WPB = 128 / DW;
    logic kiv_rdy, kiv_w = 0, din_rdy, din_w = 0, wr;
    logic [KW-1:0] kiv = '0;
    logic [DW-1:0] din = '0, dout;
    logic [DW-1:0] exp_q [$];
    int n_stall = 0, n_full = 0, n_wait_keyiv = 0, n_out = 0, init_lat = 0, n_ctr_carry = 0;
    int rate_cycles = 0, first_run = 0;
    bit done = 0;

    aes_ctr_stream #(.ARCH(ARCH_COMPACT)) dut (
      .clk(clk), .reset(rst), .key_iv_ready(kiv_rdy), .key_iv_write(kiv_w), .key_iv(kiv),
      .data_in_ready(din_rdy), .data_in_write(din_w), .data_in(din), .write(wr), .data_out(dout));

    // scoreboard: every output word against the model
    always @(posedge clk) begin
      #2;
      if (!rst && wr) begin
        n_out++;
        if (exp_q.size() == 0) begin
          failures++; $display("FAIL %s: output with nothing expected", NAME);
        end else check(128'(dout), 128'(exp_q.pop_front()), {NAME, ": data_out"});
      end
    end

    // Loads key and IV with random gaps.
    task automatic load_keyiv(logic [127:0] k, logic [127:0] v);
      logic [255:0] kv = {k, v};
      for (int i = 0; i < 256 / KW; i++) begin
        while ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
        check(128'(kiv_rdy), 128'(1), {NAME, ": key_iv_ready while loading"});
        kiv = kv[255 - KW*i -: KW]; kiv_w = 1;
        @(posedge clk); #1 kiv_w = 0;
      end
      check(128'(kiv_rdy), 128'(0), {NAME, ": key_iv_ready low after key and IV"});
      while (!din_rdy) begin @(posedge clk); #1 init_lat++; if (init_lat > 2000) break; end
    endtask

    // Sends n blocks of message m (given by a function of the block index)
    // through the cipher; gap_pct percent of cycles the sender pauses.
    task automatic send(logic [127:0] k, logic [127:0] ctr0, logic [127:0] msg [$], int gap_pct);
      int run = 0;
      bit stalled = 0;
      for (int b = 0; b < msg.size(); b++) begin
        logic [127:0] ks = ref_encrypt(k, ctr0 + 128'(b));
        if (ctr0[7:0] + 8'(b) == 8'h00 && b != 0) n_ctr_carry++;
        for (int w = 0; w < WPB; w++) begin
          while (!din_rdy || $urandom_range(0, 99) < gap_pct) begin
            if (!din_rdy) begin n_stall++; stalled = 1; end
            @(posedge clk); #1;
          end
          din = msg[b][127 - DW*w -: DW]; din_w = 1;
          exp_q.push_back(din ^ ks[127 - DW*w -: DW]);
          @(posedge clk); #1 din_w = 0;
          if (!stalled) run++;
        end
      end
      if (run >= KSD * WPB) n_full++;
      first_run = run;
    endtask

    initial begin
      logic [127:0] k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
      logic [127:0] v = 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfeff;
      logic [127:0] msg [$];
      logic [127:0] ct [$];
      int t0;
      wait (!rst);
      #1;
      check(128'({kiv_rdy, din_rdy}), 128'(2), {NAME, ": after reset key_iv_ready=1, data_in_ready=0"});
      repeat (5) begin @(posedge clk); #1 n_wait_keyiv++; end
      // 1. NIST SP 800-38A F.5.1 CTR-AES128 example, checked word by word
      load_keyiv(k, v);
      check(128'(init_lat + 1), 128'(INIT_LAT), {NAME, ": clocks from last key_iv word to data_in_ready"});
      msg = '{128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
              128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710};
      ct  = '{128'h874d6191b620e3261bef6864990db6ce, 128'h9806f66b7970fdff8617187bb9fffdff,
              128'h5ae4df3edbd5d35e5b4f09020db03eab, 128'h1e031dda2fbe03d1792170a0f3009cee};
      for (int b = 0; b < 4; b++)
        check(ref_encrypt(k, v + 128'(b)) ^ msg[b], ct[b], {NAME, ": model matches SP 800-38A"});
      send(k, v, msg, 0);
      // 2. sustained rate: send as fast as allowed once the buffer is full
      repeat (40 + KSD * BLK_CLK) @(posedge clk);
      #1;
      msg = {};
      for (int b = 0; b < RATE_BLOCKS; b++) msg.push_back(rand128());
      t0 = $time;
      n_full = 0;
      send(k, v + 128'd4, msg, 0);
      rate_cycles = ($time - t0) / 10;
      check(128'(n_full), 128'(1), {NAME, $sformatf(": %0d words taken without a stall after a pause, buffer holds %0d", first_run, KSD * WPB)});
      check(128'(rate_cycles >= RATE_MIN && rate_cycles <= RATE_MAX), 128'(1),
            {NAME, $sformatf(": %0d blocks took %0d clocks", RATE_BLOCKS, rate_cycles)});
      // 3. random data with random pauses
      msg = {};
      for (int b = 0; b < RAND_BLOCKS; b++) msg.push_back(rand128());
      send(k, v + 128'(4 + RATE_BLOCKS), msg, 30);
      repeat (5) @(posedge clk);
      #1;
      check(128'(exp_q.size()), 128'(0), {NAME, ": every word came out"});
      done = 1;
    end
  end
  begin : g_compact64
    localparam string NAME = "compact W=64, logic S-box, D_W=16";
    localparam int unsigned KW = 16;
    localparam int unsigned DW = 16;
    localparam int unsigned INIT_LAT = 25;
    localparam int unsigned KSD = 2;
    localparam bit EXPECT_STALL = 1;
    localparam int BLK_CLK = 21;
    localparam int RATE_BLOCKS = 10, RATE_MIN = 168, RATE_MAX = 212, RAND_BLOCKS = 6;

    localparam int unsigned WPB = 128 / DW;
    logic kiv_rdy, kiv_w = 0, din_rdy, din_w = 0, wr;
    logic [KW-1:0] kiv = '0;
    logic [DW-1:0] din = '0, dout;
    logic [DW-1:0] exp_q [$];
    int n_stall = 0, n_full = 0, n_wait_keyiv = 0, n_out = 0, init_lat = 0, n_ctr_carry = 0;
    int rate_cycles = 0, first_run = 0;
    bit done = 0;

    aes_ctr_stream #(.K_W(16), .D_W(16), .ARCH(ARCH_COMPACT), .COMPACT_W(64), .SBOX(SBOX_LOGIC)) dut (
      .clk(clk), .reset(rst), .key_iv_ready(kiv_rdy), .key_iv_write(kiv_w), .key_iv(kiv),
      .data_in_ready(din_rdy), .data_in_write(din_w), .data_in(din), .write(wr), .data_out(dout));

    // scoreboard: every output word against the model
    always @(posedge clk) begin
      #2;
      if (!rst && wr) begin
        n_out++;
        if (exp_q.size() == 0) begin
          failures++; $display("FAIL %s: output with nothing expected", NAME);
        end else check(128'(dout), 128'(exp_q.pop_front()), {NAME, ": data_out"});
      end
    end

    // Loads key and IV with random gaps.
    task automatic load_keyiv(logic [127:0] k, logic [127:0] v);
      logic [255:0] kv = {k, v};
      for (int i = 0; i < 256 / KW; i++) begin
        while ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
        check(128'(kiv_rdy), 128'(1), {NAME, ": key_iv_ready while loading"});
        kiv = kv[255 - KW*i -: KW]; kiv_w = 1;
        @(posedge clk); #1 kiv_w = 0;
      end
      check(128'(kiv_rdy), 128'(0), {NAME, ": key_iv_ready low after key and IV"});
      while (!din_rdy) begin @(posedge clk); #1 init_lat++; if (init_lat > 2000) break; end
    endtask

    // Sends n blocks of message m (given by a function of the block index)
    // through the cipher; gap_pct percent of cycles the sender pauses.
    task automatic send(logic [127:0] k, logic [127:0] ctr0, logic [127:0] msg [$], int gap_pct);
      int run = 0;
      bit stalled = 0;
      for (int b = 0; b < msg.size(); b++) begin
        logic [127:0] ks = ref_encrypt(k, ctr0 + 128'(b));
        if (ctr0[7:0] + 8'(b) == 8'h00 && b != 0) n_ctr_carry++;
        for (int w = 0; w < WPB; w++) begin
          while (!din_rdy || $urandom_range(0, 99) < gap_pct) begin
            if (!din_rdy) begin n_stall++; stalled = 1; end
            @(posedge clk); #1;
          end
          din = msg[b][127 - DW*w -: DW]; din_w = 1;
          exp_q.push_back(din ^ ks[127 - DW*w -: DW]);
          @(posedge clk); #1 din_w = 0;
          if (!stalled) run++;
        end
      end
      if (run >= KSD * WPB) n_full++;
      first_run = run;
    endtask

    initial begin
      logic [127:0] k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
      logic [127:0] v = 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfeff;
      logic [127:0] msg [$];
      logic [127:0] ct [$];
      int t0;
      wait (!rst);
      #1;
      check(128'({kiv_rdy, din_rdy}), 128'(2), {NAME, ": after reset key_iv_ready=1, data_in_ready=0"});
      repeat (5) begin @(posedge clk); #1 n_wait_keyiv++; end
      // 1. NIST SP 800-38A F.5.1 CTR-AES128 example, checked word by word
      load_keyiv(k, v);
      check(128'(init_lat + 1), 128'(INIT_LAT), {NAME, ": clocks from last key_iv word to data_in_ready"});
      msg = '{128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
              128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710};
      ct  = '{128'h874d6191b620e3261bef6864990db6ce, 128'h9806f66b7970fdff8617187bb9fffdff,
              128'h5ae4df3edbd5d35e5b4f09020db03eab, 128'h1e031dda2fbe03d1792170a0f3009cee};
      for (int b = 0; b < 4; b++)
        check(ref_encrypt(k, v + 128'(b)) ^ msg[b], ct[b], {NAME, ": model matches SP 800-38A"});
      send(k, v, msg, 0);
      // 2. sustained rate: send as fast as allowed once the buffer is full
      repeat (40 + KSD * BLK_CLK) @(posedge clk);
      #1;
      msg = {};
      for (int b = 0; b < RATE_BLOCKS; b++) msg.push_back(rand128());
      t0 = $time;
      n_full = 0;
      send(k, v + 128'd4, msg, 0);
      rate_cycles = ($time - t0) / 10;
      check(128'(n_full), 128'(1), {NAME, $sformatf(": %0d words taken without a stall after a pause, buffer holds %0d", first_run, KSD * WPB)});
      check(128'(rate_cycles >= RATE_MIN && rate_cycles <= RATE_MAX), 128'(1),
            {NAME, $sformatf(": %0d blocks took %0d clocks", RATE_BLOCKS, rate_cycles)});
      // 3. random data with random pauses
      msg = {};
      for (int b = 0; b < RAND_BLOCKS; b++) msg.push_back(rand128());
      send(k, v + 128'(4 + RATE_BLOCKS), msg, 30);
      repeat (5) @(posedge clk);
      #1;
      check(128'(exp_q.size()), 128'(0), {NAME, ": every word came out"});
      done = 1;
    end
  end

  initial begin
    wait (g_pipe.done && g_mem.done && g_logic64.done && g_compact8.done && g_compact32.done && g_compact64.done);
      $display("%s: words out %0d, stall cycles %0d, cycles buffer full %0d, counter byte carries %0d, key/IV wait cycles %0d, init latency %0d, rate %0d clocks",
               g_pipe.NAME, g_pipe.n_out, g_pipe.n_stall, g_pipe.n_full, g_pipe.n_ctr_carry, g_pipe.n_wait_keyiv, g_pipe.init_lat + 1, g_pipe.rate_cycles);
      if (g_pipe.EXPECT_STALL) check(128'(g_pipe.n_stall > 0), 128'(1), {g_pipe.NAME, ": data_in_ready stall seen"});
      else check(128'(g_pipe.n_stall), 128'(0), {g_pipe.NAME, ": core keeps up, no stall"});
      check(128'(g_pipe.n_full > 0), 128'(1), {g_pipe.NAME, ": keystream buffer full seen"});
      check(128'(g_pipe.n_ctr_carry > 0), 128'(1), {g_pipe.NAME, ": counter carry seen"});
      check(128'(g_pipe.n_wait_keyiv > 0), 128'(1), {g_pipe.NAME, ": idle before key/IV seen"});
      $display("%s: words out %0d, stall cycles %0d, cycles buffer full %0d, counter byte carries %0d, key/IV wait cycles %0d, init latency %0d, rate %0d clocks",
               g_mem.NAME, g_mem.n_out, g_mem.n_stall, g_mem.n_full, g_mem.n_ctr_carry, g_mem.n_wait_keyiv, g_mem.init_lat + 1, g_mem.rate_cycles);
      if (g_mem.EXPECT_STALL) check(128'(g_mem.n_stall > 0), 128'(1), {g_mem.NAME, ": data_in_ready stall seen"});
      else check(128'(g_mem.n_stall), 128'(0), {g_mem.NAME, ": core keeps up, no stall"});
      check(128'(g_mem.n_full > 0), 128'(1), {g_mem.NAME, ": keystream buffer full seen"});
      check(128'(g_mem.n_ctr_carry > 0), 128'(1), {g_mem.NAME, ": counter carry seen"});
      check(128'(g_mem.n_wait_keyiv > 0), 128'(1), {g_mem.NAME, ": idle before key/IV seen"});
      $display("%s: words out %0d, stall cycles %0d, cycles buffer full %0d, counter byte carries %0d, key/IV wait cycles %0d, init latency %0d, rate %0d clocks",
               g_logic64.NAME, g_logic64.n_out, g_logic64.n_stall, g_logic64.n_full, g_logic64.n_ctr_carry, g_logic64.n_wait_keyiv, g_logic64.init_lat + 1, g_logic64.rate_cycles);
      if (g_logic64.EXPECT_STALL) check(128'(g_logic64.n_stall > 0), 128'(1), {g_logic64.NAME, ": data_in_ready stall seen"});
      else check(128'(g_logic64.n_stall), 128'(0), {g_logic64.NAME, ": core keeps up, no stall"});
      check(128'(g_logic64.n_full > 0), 128'(1), {g_logic64.NAME, ": keystream buffer full seen"});
      check(128'(g_logic64.n_ctr_carry > 0), 128'(1), {g_logic64.NAME, ": counter carry seen"});
      check(128'(g_logic64.n_wait_keyiv > 0), 128'(1), {g_logic64.NAME, ": idle before key/IV seen"});
      $display("%s: words out %0d, stall cycles %0d, cycles buffer full %0d, counter byte carries %0d, key/IV wait cycles %0d, init latency %0d, rate %0d clocks",
               g_compact8.NAME, g_compact8.n_out, g_compact8.n_stall, g_compact8.n_full, g_compact8.n_ctr_carry, g_compact8.n_wait_keyiv, g_compact8.init_lat + 1, g_compact8.rate_cycles);
      if (g_compact8.EXPECT_STALL) check(128'(g_compact8.n_stall > 0), 128'(1), {g_compact8.NAME, ": data_in_ready stall seen"});
      else check(128'(g_compact8.n_stall), 128'(0), {g_compact8.NAME, ": core keeps up, no stall"});
      check(128'(g_compact8.n_full > 0), 128'(1), {g_compact8.NAME, ": keystream buffer full seen"});
      check(128'(g_compact8.n_ctr_carry > 0), 128'(1), {g_compact8.NAME, ": counter carry seen"});
      check(128'(g_compact8.n_wait_keyiv > 0), 128'(1), {g_compact8.NAME, ": idle before key/IV seen"});
      $display("%s: words out %0d, stall cycles %0d, cycles buffer full %0d, counter byte carries %0d, key/IV wait cycles %0d, init latency %0d, rate %0d clocks",
               g_compact32.NAME, g_compact32.n_out, g_compact32.n_stall, g_compact32.n_full, g_compact32.n_ctr_carry, g_compact32.n_wait_keyiv, g_compact32.init_lat + 1, g_compact32.rate_cycles);
      if (g_compact32.EXPECT_STALL) check(128'(g_compact32.n_stall > 0), 128'(1), {g_compact32.NAME, ": data_in_ready stall seen"});
      else check(128'(g_compact32.n_stall), 128'(0), {g_compact32.NAME, ": core keeps up, no stall"});
      check(128'(g_compact32.n_full > 0), 128'(1), {g_compact32.NAME, ": keystream buffer full seen"});
      check(128'(g_compact32.n_ctr_carry > 0), 128'(1), {g_compact32.NAME, ": counter carry seen"});
      check(128'(g_compact32.n_wait_keyiv > 0), 128'(1), {g_compact32.NAME, ": idle before key/IV seen"});
      $display("%s: words out %0d, stall cycles %0d, cycles buffer full %0d, counter byte carries %0d, key/IV wait cycles %0d, init latency %0d, rate %0d clocks",
               g_compact64.NAME, g_compact64.n_out, g_compact64.n_stall, g_compact64.n_full, g_compact64.n_ctr_carry, g_compact64.n_wait_keyiv, g_compact64.init_lat + 1, g_compact64.rate_cycles);
      if (g_compact64.EXPECT_STALL) check(128'(g_compact64.n_stall > 0), 128'(1), {g_compact64.NAME, ": data_in_ready stall seen"});
      else check(128'(g_compact64.n_stall), 128'(0), {g_compact64.NAME, ": core keeps up, no stall"});
      check(128'(g_compact64.n_full > 0), 128'(1), {g_compact64.NAME, ": keystream buffer full seen"});
      check(128'(g_compact64.n_ctr_carry > 0), 128'(1), {g_compact64.NAME, ": counter carry seen"});
      check(128'(g_compact64.n_wait_keyiv > 0), 128'(1), {g_compact64.NAME, ": idle before key/IV seen"});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
