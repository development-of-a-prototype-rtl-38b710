// aes_sbox_tb: checks all 256 S-box entries against the reference model (log /
// antilog construction) and a few entries quoted in the AES standard.
module aes_sbox_tb;
  import aes_ref_pkg::*;
  logic [7:0] in_byte, out_byte;
  int checks = 0, failures = 0;

  aes_sbox dut (.in_byte, .out_byte);

  task automatic check(logic [7:0] a, logic [7:0] exp);
    in_byte = a; #1;
    checks++;
    if (out_byte !== exp) begin
      failures++;
      $display("FAIL sbox(%02h) = %02h, expected %02h", a, out_byte, exp);
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
    check(8'h00, 8'h63); check(8'h01, 8'h7c); check(8'h53, 8'hed);
    check(8'hff, 8'h16); check(8'h19, 8'hd4); check(8'hcf, 8'h8a);
    for (int a = 0; a < 256; a++) check(8'(a), ref_sbox(8'(a)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
