// uart_tx_tb: sends bytes through the transmitter (16 clocks per bit) and
// decodes txd independently: the start bit must last exactly 16 clocks,
// data bits are sampled mid-bit LSB first, the stop bit must be high, and
// tx_ready must stay low for the 160 clocks of a frame.
module uart_tx_tb;
  localparam int unsigned CPB = 16;

  logic       clk = 1'b0, rst, tx_valid, tx_ready, txd;
  logic [7:0] tx_data;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  initial begin
    rst = 1'b1; tx_valid = 1'b0; tx_data = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (3) @(negedge clk);
    check("idle line high and ready", txd == 1'b1 && tx_ready == 1'b1);
    for (int n = 0; n < 30; n++) begin
      logic [7:0] b, got;
      int busy_clks;
      b = (n == 0) ? 8'h00 : (n == 1) ? 8'hff : 8'($urandom);
      @(negedge clk);
      tx_data = b; tx_valid = 1'b1;
      @(negedge clk);                 // accepted at the edge just passed
      tx_valid = 1'b0; tx_data = 8'($urandom);
      // start bit: low for CPB clocks counted from the accepting edge
      check("ready drops", tx_ready == 1'b0);
      check("start bit", txd == 1'b0);
      repeat (CPB / 2) @(negedge clk);
      check("start bit middle", txd == 1'b0);
      got = '0;
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(negedge clk);
        got[i] = txd;
      end
      repeat (CPB) @(negedge clk);
      check("stop bit", txd == 1'b1);
      check($sformatf("data %02h got %02h", b, got), got == b);
      busy_clks = 9 * CPB + CPB / 2;
      while (!tx_ready) begin @(negedge clk); busy_clks++; end
      check($sformatf("frame length %0d", busy_clks), busy_clks == 10 * CPB);
      if (n % 3 == 0) repeat ($urandom_range(0, 40)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
