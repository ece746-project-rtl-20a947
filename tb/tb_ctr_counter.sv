// tb_ctr_counter: checks loading of the IV, +1 per inc, hold without inc,
// load priority over inc, and carries across bytes, words and the 2^128
// wrap-around of the 128-bit counter.
module tb_ctr_counter;
  logic clk = 0, rst = 1, load = 0, inc = 0;
  logic [127:0] iv = '0, value, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ctr_counter dut (.clk(clk), .rst(rst), .load(load), .iv(iv), .inc(inc), .value(value));

  task automatic check(string what);
    checks++;
    if (value !== model) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, value, model);
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
    logic [127:0] starts [4] = '{128'h0123456789abcdef0123456789abcdef,
                                 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfeff,
                                 128'h000000000000000000000000fffffffe,
                                 128'hfffffffffffffffffffffffffffffffd};
    @(posedge clk); #1 rst = 0; model = '0;
    check("reset value");
    foreach (starts[s]) begin
      iv = starts[s]; load = 1; inc = 1;
      @(posedge clk); #1 load = 0; inc = 0; model = starts[s];
      check("load has priority over inc");
      for (int i = 0; i < 40; i++) begin
        inc = ($urandom_range(0, 3) != 0);
        @(posedge clk); #1;
        if (inc) model = model + 1;
        check("increment");
      end
      inc = 0;
    end
    check("wrapped past 2^128");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
