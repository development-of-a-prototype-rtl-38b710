// security_module_tb: end-to-end test of the security module at its default
// parameters (100 MHz clock, 115200 baud, the built-in key). The testbench
// plays the PC: it sends plaintext blocks over the serial line, decodes the
// serial reply on its own, and compares it with the NIST SP 800-38A F.1.1
// ciphertexts (the module's default key is that test key) and with the
// reference model for further random blocks.
// Mechanisms counted, each of which must occur at least once: a block
// encrypted by the core (busy), a byte dropped because it arrived while a
// block was in flight (rx_dropped), a malformed frame rejected (frame_err).
module security_module_tb;
  import aes_ref_pkg::*;

  localparam int unsigned CPB = (100_000_000 + 115_200 / 2) / 115_200;   // 868

  logic clk = 1'b0, rst, uart_rxd, uart_txd;
  logic block_done, busy, rx_dropped, frame_err;
  int checks = 0, failures = 0;
  int n_blocks = 0, n_busy = 0, n_dropped = 0, n_frame_err = 0;
  logic busy_d = 1'b0;
  logic [7:0] reply [$];

  security_module dut (.*);

  always #5 clk = ~clk;   // 100 MHz

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      if (block_done) n_blocks++;
      if (busy && !busy_d) n_busy++;
      if (rx_dropped) n_dropped++;
      if (frame_err) n_frame_err++;
    end
    busy_d <= busy;
  end

  // PC receiver: find the start bit edge, sample every bit in its middle.
  initial begin
    @(negedge rst);
    forever begin
      logic [7:0] b;
      @(negedge uart_txd);
      repeat (CPB / 2) @(posedge clk);
      if (uart_txd) continue;                  // not a start bit
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = uart_txd;
      end
      repeat (CPB) @(posedge clk);
      if (!uart_txd) begin
        failures++;
        $display("FAIL reply frame without stop bit");
      end
      reply.push_back(b);
    end
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic send_byte(logic [7:0] b, bit stop = 1'b1);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rxd = f[i];
      repeat (CPB) @(posedge clk);
    end
    uart_rxd = 1'b1;
    repeat (CPB) @(posedge clk);   // stop bit plus one idle bit
  endtask

  task automatic encrypt_block(logic [127:0] p, logic [127:0] exp, bit poke = 1'b0);
    logic [127:0] got;
    int t;
    for (int i = 0; i < 16; i++) send_byte(p[127-8*i -: 8]);
    if (poke) send_byte(8'h5A);              // PC does not wait for the reply
    t = 0;
    while (reply.size() < 16 && t < 400 * CPB) begin @(posedge clk); t++; end
    for (int i = 0; i < 16; i++) got[127-8*i -: 8] = (reply.size() > 0) ? reply.pop_front() : 8'h00;
    check($sformatf("ciphertext %032h, expected %032h", got, exp), got == exp);
    repeat (4 * CPB) @(posedge clk);
  endtask

  initial begin
    rst = 1'b1; uart_rxd = 1'b1;
    repeat (10) @(posedge clk);
    rst = 1'b0;
    repeat (2 * CPB) @(posedge clk);

    for (int b = 0; b < 4; b++) encrypt_block(NIST_PT[b], NIST_CT[b], b == 1);
    send_byte(8'hC3, 1'b0);                   // malformed frame, must be ignored
    repeat (2 * CPB) @(posedge clk);
    for (int n = 0; n < 2; n++) begin
      logic [127:0] p;
      p = rand128();
      encrypt_block(p, ref_encrypt(NIST_KEY, p));
    end

    check($sformatf("blocks completed %0d, expected 6", n_blocks), n_blocks == 6);
    check($sformatf("blocks encrypted %0d, expected 6", n_busy), n_busy == 6);
    check($sformatf("dropped bytes %0d (must occur)", n_dropped), n_dropped == 1);
    check($sformatf("frame errors %0d (must occur)", n_frame_err), n_frame_err == 1);
    check("no stray reply bytes", reply.size() == 0);
    $display("mechanisms: blocks=%0d encryptions=%0d dropped=%0d frame_err=%0d",
             n_blocks, n_busy, n_dropped, n_frame_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
