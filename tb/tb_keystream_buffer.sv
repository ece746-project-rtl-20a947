// tb_keystream_buffer: pushes random keystream blocks into the buffer and
// consumes them in random patterns, at D_W = 32, DEPTH = 2 (the default) and
// at D_W = 8, DEPTH = 3. A queue model checks every data_out word (data_in
// XOR keystream, most significant word first, one clock later with write),
// data_in_ready and the free-slot count, and the test counts that the buffer
// ran both empty and full.
module tb_keystream_buffer;
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One test bench instance per configuration.
  for (genvar g = 0; g < 2; g++) begin : g_cfg
    localparam int unsigned DW = g == 0 ? 32 : 8;
    localparam int unsigned DP = g == 0 ? 2 : 3;
    localparam int unsigned WPB = 128 / DW;
    logic push = 0, rdy, din_w = 0, wr;
    logic [127:0] blk = '0;
    logic [DW-1:0] din = '0, dout, exp_out;
    logic [$clog2(DP+1)-1:0] free;
    logic [127:0] q [$];
    int word = 0, n_full = 0, n_empty_want = 0, n_words = 0;
    logic exp_wr = 0;
    bit done = 0;

    if (g == 0) begin : g_dut
      keystream_buffer dut (.clk(clk), .rst(rst), .push(push), .push_block(blk), .free(free),
        .data_in_ready(rdy), .data_in_write(din_w), .data_in(din), .write(wr), .data_out(dout));
    end else begin : g_dut
      keystream_buffer #(.D_W(DW), .DEPTH(DP)) dut (.clk(clk), .rst(rst), .push(push),
        .push_block(blk), .free(free), .data_in_ready(rdy), .data_in_write(din_w),
        .data_in(din), .write(wr), .data_out(dout));
    end

    initial begin
      repeat (2) @(posedge clk);
      #1 rst = 0;
      for (int c = 0; c < 3000; c++) begin
        // state checks before this cycle's edge
        check(128'(free), 128'(DP - q.size()), "free slots");
        check(128'(rdy), 128'(q.size() != 0), "data_in_ready");
        check(128'(wr), 128'(exp_wr), "write");
        if (exp_wr) check(128'(dout), 128'(exp_out), "data_out");
        if (free == 0) n_full++;
        // random stimulus
        push = (q.size() < DP) && ($urandom_range(0, 3) == 0);
        blk  = rand128();
        din  = DW'($urandom());
        din_w = (q.size() != 0) && ($urandom_range(0, 2) != 0);
        if (q.size() == 0) n_empty_want++;
        exp_wr = din_w;
        if (din_w) begin
          exp_out = din ^ q[0][127 - DW*word -: DW];
          n_words++;
        end
        @(posedge clk); #1;
        if (din_w) begin
          word++;
          if (word == WPB) begin word = 0; void'(q.pop_front()); end
        end
        if (push) q.push_back(blk);
      end
      check(128'(n_full > 0), 128'(1), "buffer ran full");
      check(128'(n_empty_want > 0), 128'(1), "buffer ran empty");
      $display("cfg D_W=%0d DEPTH=%0d: words %0d, cycles full %0d, cycles empty %0d",
               DW, DP, n_words, n_full, n_empty_want);
      done = 1;
    end
  end

  initial begin
    wait (g_cfg[0].done && g_cfg[1].done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
