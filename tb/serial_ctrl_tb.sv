// serial_ctrl_tb: feeds received bytes straight into the controller, plays
// the AES core with the reference model (done a few clocks after start) and a
// transmitter whose tx_ready comes and goes at random. Checks that each 16
// bytes give exactly one start with the block assembled first-byte-first,
// that the 16 ciphertext bytes leave in the same order, and that bytes sent
// while a block is in flight are dropped and flagged.
module serial_ctrl_tb;
  import aes_ref_pkg::*;

  logic         clk = 1'b0, rst;
  logic [7:0]   rx_data, tx_data;
  logic         rx_valid, tx_valid, tx_ready;
  logic         aes_start, aes_done, rx_dropped, block_done;
  logic [127:0] plaintext, ciphertext;
  int checks = 0, failures = 0;
  int n_start = 0, n_dropped = 0, n_block = 0;
  logic [7:0] tx_q [$];

  serial_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // AES core model: done 7 clocks after start, ciphertext from the reference.
  initial begin
    aes_done = 1'b0; ciphertext = '0;
    forever begin
      @(posedge clk);
      if (!rst && aes_start) begin
        logic [127:0] p;
        p = plaintext;
        repeat (6) @(posedge clk);
        ciphertext <= ref_encrypt(NIST_KEY, p);
        aes_done   <= 1'b1;
        @(posedge clk);
        aes_done   <= 1'b0;
      end
    end
  end

  // Transmitter model: random ready, records accepted bytes.
  always @(posedge clk) begin
    if (!rst) begin
      if (tx_valid && tx_ready) tx_q.push_back(tx_data);
      if (aes_start) n_start++;
      if (rx_dropped) n_dropped++;
      if (block_done) n_block++;
    end
    tx_ready <= ($urandom_range(0, 2) == 0);
  end

  task automatic send_byte(logic [7:0] b);
    @(negedge clk);
    rx_data = b; rx_valid = 1'b1;
    @(negedge clk);
    rx_valid = 1'b0; rx_data = 8'($urandom);
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; rx_valid = 1'b0; rx_data = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int blk = 0; blk < 6; blk++) begin
      logic [127:0] p, exp;
      p   = (blk < 4) ? NIST_PT[blk] : rand128();
      exp = ref_encrypt(NIST_KEY, p);
      for (int i = 0; i < 16; i++) begin
        send_byte(p[127-8*i -: 8]);
        if (i == 14) check("no start before the 16th byte", n_start == blk);
      end
      @(posedge clk); @(negedge clk);
      check($sformatf("block %0d: one start", blk), n_start == blk + 1);
      check($sformatf("block %0d: plaintext %032h", blk, plaintext), plaintext == p);
      if (blk == 2) send_byte(8'hEE);      // arrives while encrypting
      while (tx_q.size() < 16) @(negedge clk);
      if (blk == 3) begin                   // arrives after the block is sent
        repeat (2) @(negedge clk);
      end
      begin
        logic [127:0] got;
        for (int i = 0; i < 16; i++) got[127-8*i -: 8] = tx_q.pop_front();
        check($sformatf("block %0d: ciphertext %032h, expected %032h", blk, got, exp), got == exp);
      end
      repeat (3) @(negedge clk);
      check($sformatf("block %0d: block_done count %0d", blk, n_block), n_block == blk + 1);
    end
    check($sformatf("dropped bytes %0d, expected 1", n_dropped), n_dropped == 1);
    check("no extra transmitted bytes", tx_q.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
