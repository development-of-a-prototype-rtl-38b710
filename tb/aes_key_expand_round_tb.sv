// aes_key_expand_round_tb: walks the key schedule of the NIST test key
// through all ten steps (round constants 01..36) and compares every round key
// with the reference; round keys 1 and 10 are also checked against the values
// printed in FIPS-197 Appendix A.1. Then random keys and round constants.
module aes_key_expand_round_tb;
  import aes_ref_pkg::*;
  logic [127:0] key_in, key_out;
  logic [7:0]   rcon;
  int checks = 0, failures = 0;

  aes_key_expand_round dut (.key_in, .rcon, .key_out);

  task automatic check(logic [127:0] k, logic [7:0] rc, logic [127:0] exp);
    key_in = k; rcon = rc; #1;
    checks++;
    if (key_out !== exp) begin
      failures++;
      $display("FAIL expand(%032h, rcon %02h) = %032h, expected %032h", k, rc, key_out, exp);
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
    logic [7:0] rc;
    check(NIST_KEY, 8'h01, 128'ha0fafe1788542cb123a339392a6c7605);
    check(ref_round_key(NIST_KEY, 9), 8'h36, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    rc = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      check(ref_round_key(NIST_KEY, r-1), rc, ref_round_key(NIST_KEY, r));
      rc = pmul(rc, 8'h02);
    end
    for (int n = 0; n < 100; n++) begin
      logic [127:0] k;
      logic [7:0]   c;
      k = rand128(); c = 8'($urandom);
      // one step of the schedule with an arbitrary constant, built from the
      // reference S-box
      begin
        logic [31:0] w0, w1, w2, w3, t;
        {w0, w1, w2, w3} = k;
        t = {ref_sbox(w3[23:16]) ^ c, ref_sbox(w3[15:8]), ref_sbox(w3[7:0]), ref_sbox(w3[31:24])};
        w0 ^= t; w1 ^= w0; w2 ^= w1; w3 ^= w2;
        check(k, c, {w0, w1, w2, w3});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
