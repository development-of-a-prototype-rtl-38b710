// aes_mix_columns_tb: checks MixColumns on the FIPS-197 round-1 state, on the
// usual single-column test column db 13 53 45 -> 8e 4d a1 bc, and on random
// states against the reference model.
module aes_mix_columns_tb;
  import aes_ref_pkg::*;
  logic [127:0] state_in, state_out;
  int checks = 0, failures = 0;

  aes_mix_columns dut (.state_in, .state_out);

  task automatic check(logic [127:0] s, logic [127:0] exp);
    state_in = s; #1;
    checks++;
    if (state_out !== exp) begin
      failures++;
      $display("FAIL mix_columns(%032h) = %032h, expected %032h", s, state_out, exp);
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
    check(128'hd4bf5d30e0b452aeb84111f11e2798e5, 128'h046681e5e0cb199a48f8d37a2806264c);
    check(128'hdb135345_f20a225c_01010101_c6c6c6c6, 128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6);
    for (int n = 0; n < 200; n++) begin
      logic [127:0] s;
      s = rand128();
      check(s, ref_mix_columns(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
