// aes_128_encrypt_tb: end-to-end test of the iterative AES-128 core.
//  - NIST SP 800-38A F.1.1 blocks, the first with key_load and start in the
//    same clock (as in the original design's simulation trace), the others
//    with the stored key;
//  - FIPS-197 C.1 after loading a new key on its own;
//  - start pulses while busy must be ignored;
//  - start held high: the same ciphertext comes out again every 11 clocks;
//  - random keys and plaintexts against the reference model.
// The latency from the start clock to done must be 10 clocks.
module aes_128_encrypt_tb;
  import aes_ref_pkg::*;

  logic         sys_clk = 1'b0;
  logic         rst, start, key_load, busy, done;
  logic [127:0] key_in, plaintext_in, ciphertext_out;
  int checks = 0, failures = 0;

  aes_128_encrypt dut (.*);

  always #5 sys_clk = ~sys_clk;

  initial begin
    repeat (20000) @(posedge sys_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  // Start one block and wait for done; check the result and the latency.
  task automatic run_block(logic [127:0] pt, logic [127:0] k, bit load, logic [127:0] exp,
                           bit poke_busy = 0);
    int n;
    @(negedge sys_clk);
    plaintext_in = pt; key_in = k; key_load = load; start = 1'b1;
    @(negedge sys_clk);   // start was sampled at the clock edge before this
    start = 1'b0; key_load = 1'b0;
    plaintext_in = rand128(); key_in = rand128();   // inputs may change while busy
    n = 0;
    while (!done) begin
      @(negedge sys_clk);
      if (poke_busy && n == 3) start = 1'b1;       // must be ignored
      if (poke_busy && n == 4) start = 1'b0;
      n++;
    end
    expect_eq("ciphertext", ciphertext_out, exp);
    checks++;
    if (n != 10) begin
      failures++;
      $display("FAIL latency %0d clocks, expected 10", n);
    end
    @(negedge sys_clk);
    checks++;
    if (done || busy) begin
      failures++;
      $display("FAIL core did not return to idle after done");
    end
  endtask

  initial begin
    int dones;
    rst = 1'b1; start = 1'b0; key_load = 1'b0; key_in = '0; plaintext_in = '0;
    repeat (3) @(posedge sys_clk);
    @(negedge sys_clk) rst = 1'b0;

    run_block(NIST_PT[0], NIST_KEY, 1'b1, NIST_CT[0]);
    for (int i = 1; i < 4; i++) run_block(NIST_PT[i], 128'h0, 1'b0, NIST_CT[i]);

    // load a new key without starting, then encrypt with the stored key
    @(negedge sys_clk) key_in = FIPS_KEY; key_load = 1'b1;
    @(negedge sys_clk) key_load = 1'b0; key_in = '0;
    run_block(FIPS_PT, 128'h0, 1'b0, FIPS_CT, 1'b1);

    // start and key_load held high, as in the original trace
    @(negedge sys_clk);
    plaintext_in = NIST_PT[0]; key_in = NIST_KEY; key_load = 1'b1; start = 1'b1;
    dones = 0;
    repeat (44) begin
      @(negedge sys_clk);
      if (done) begin
        dones++;
        expect_eq("held start", ciphertext_out, NIST_CT[0]);
      end
    end
    start = 1'b0; key_load = 1'b0;
    checks++;
    if (dones != 4) begin
      failures++;
      $display("FAIL %0d blocks in 44 clocks with start held, expected 4", dones);
    end
    repeat (12) @(negedge sys_clk);

    for (int n = 0; n < 50; n++) begin
      logic [127:0] k, p;
      k = rand128(); p = rand128();
      run_block(p, k, 1'b1, ref_encrypt(k, p));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
