// aes_shift_rows_tb: checks ShiftRows on a state whose bytes are their own
// indices (so every byte's destination is visible), on the FIPS-197 round-1
// state and on random states against the reference model.
module aes_shift_rows_tb;
  import aes_ref_pkg::*;
  logic [127:0] state_in, state_out;
  int checks = 0, failures = 0;

  aes_shift_rows dut (.state_in, .state_out);

  task automatic check(logic [127:0] s, logic [127:0] exp);
    state_in = s; #1;
    checks++;
    if (state_out !== exp) begin
      failures++;
      $display("FAIL shift_rows(%032h) = %032h, expected %032h", s, state_out, exp);
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
    // byte i = i: row 1 moves one left, row 2 two, row 3 three
    check(128'h000102030405060708090a0b0c0d0e0f, 128'h00050a0f04090e03080d02070c01060b);
    check(128'hd42711aee0bf98f1b8b45de51e415230, 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    for (int n = 0; n < 200; n++) begin
      logic [127:0] s;
      s = rand128();
      check(s, ref_shift_rows(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
