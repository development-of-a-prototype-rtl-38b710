// aes_sub_bytes_tb: applies the FIPS-197 round-1 state and random states to
// SubBytes and compares with the reference model.
module aes_sub_bytes_tb;
  import aes_ref_pkg::*;
  logic [127:0] state_in, state_out;
  int checks = 0, failures = 0;

  aes_sub_bytes dut (.state_in, .state_out);

  task automatic check(logic [127:0] s, logic [127:0] exp);
    state_in = s; #1;
    checks++;
    if (state_out !== exp) begin
      failures++;
      $display("FAIL sub_bytes(%032h) = %032h, expected %032h", s, state_out, exp);
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
    // FIPS-197 Appendix B, round 1: start of round -> after SubBytes
    check(128'h193de3bea0f4e22b9ac68d2ae9f84808, 128'hd42711aee0bf98f1b8b45de51e415230);
    for (int n = 0; n < 200; n++) begin
      logic [127:0] s;
      s = rand128();
      check(s, ref_sub_bytes(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
