// tb_aes_round: checks one AES round (with and without MixColumns) for both
// S-box variants against the reference model, on random states and keys and
// on the first round of the FIPS-197 Appendix B example.
module tb_aes_round;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  block_t st, rk, out_lut, out_logic;
  logic   fin;
  int checks = 0, failures = 0;

  aes_round #(.SBOX(SBOX_LUT))   dut_lut   (.state_in(st), .round_key(rk), .final_round(fin), .state_out(out_lut));
  aes_round #(.SBOX(SBOX_LOGIC)) dut_logic (.state_in(st), .round_key(rk), .final_round(fin), .state_out(out_logic));

  task automatic check(block_t got, block_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // FIPS-197 Appendix B, round 1: start of round 19 3d e3 be ..., key a0 fa fe 17 ...
    st  = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    rk  = 128'ha0fafe1788542cb123a339392a6c7605;
    fin = 1'b0;
    #1;
    check(out_lut,   128'ha49c7ff2689f352b6b5bea43026a5049, "FIPS-197 round 1 (lut)");
    check(out_logic, 128'ha49c7ff2689f352b6b5bea43026a5049, "FIPS-197 round 1 (logic)");
    for (int n = 0; n < 400; n++) begin
      st  = rand128();
      rk  = rand128();
      fin = n[0];
      #1;
      check(out_lut,   ref_round(st, rk, fin), "random round (lut)");
      check(out_logic, ref_round(st, rk, fin), "random round (logic)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
