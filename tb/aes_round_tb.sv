// aes_round_tb: checks a full round (with MixColumns) on FIPS-197 round 1,
// and full and final rounds on random states and keys against the reference.
module aes_round_tb;
  import aes_ref_pkg::*;
  logic [127:0] state_in, round_key, state_out;
  logic         final_round;
  int checks = 0, failures = 0;

  aes_round dut (.state_in, .round_key, .final_round, .state_out);

  task automatic check(logic [127:0] s, logic [127:0] k, bit f, logic [127:0] exp);
    state_in = s; round_key = k; final_round = f; #1;
    checks++;
    if (state_out !== exp) begin
      failures++;
      $display("FAIL round(%032h, %032h, final=%0d) = %032h, expected %032h",
               s, k, f, state_out, exp);
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
    // FIPS-197 Appendix B: round 1 input, round key 1, round 2 input
    check(128'h193de3bea0f4e22b9ac68d2ae9f84808, 128'ha0fafe1788542cb123a339392a6c7605, 1'b0,
          128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int n = 0; n < 200; n++) begin
      logic [127:0] s, k;
      bit f;
      s = rand128(); k = rand128(); f = bit'(n % 2);
      check(s, k, f, ref_round(s, k, f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
