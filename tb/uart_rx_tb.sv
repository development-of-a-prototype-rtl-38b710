// uart_rx_tb: drives 8N1 frames into the receiver (32 clocks per bit) and
// checks the received bytes, including frames sent 3 % fast and slow, a frame
// with a low stop bit (frame_err, no byte) and a short glitch (ignored).
module uart_rx_tb;
  localparam int unsigned CPB = 32;

  logic       clk = 1'b0, rst, rxd;
  logic [7:0] rx_data;
  logic       rx_valid, frame_err;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  logic [7:0] last_byte;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (!rst && rx_valid) begin n_valid++; last_byte = rx_data; end
    if (!rst && frame_err) n_err++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [7:0] b, int bit_clks, bit stop = 1'b1);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (bit_clks) @(posedge clk);
    end
    rxd = 1'b1;
    repeat (2 * CPB) @(posedge clk);
  endtask

  task automatic expect_byte(logic [7:0] b, int nv, int ne);
    checks++;
    if (n_valid != nv || n_err != ne || (nv > 0 && last_byte !== b)) begin
      failures++;
      $display("FAIL byte %02h: valid count %0d (exp %0d), err count %0d (exp %0d), last %02h",
               b, n_valid, nv, n_err, ne, last_byte);
    end
  endtask

  initial begin
    int nv;
    rst = 1'b1; rxd = 1'b1;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (4) @(posedge clk);
    nv = 0;
    for (int n = 0; n < 40; n++) begin
      logic [7:0] b;
      b = (n == 0) ? 8'h00 : (n == 1) ? 8'hff : (n == 2) ? 8'h55 : 8'($urandom);
      send(b, CPB);
      nv++;
      expect_byte(b, nv, 0);
    end
    send(8'hA5, CPB - 1); nv++; expect_byte(8'hA5, nv, 0);   // 3 % fast
    send(8'h3C, CPB + 1); nv++; expect_byte(8'h3C, nv, 0);   // 3 % slow
    send(8'h81, CPB, 1'b0);                                  // broken stop bit
    repeat (CPB) @(posedge clk);
    expect_byte(8'h3C, nv, 1);
    rxd = 1'b0; repeat (3) @(posedge clk); rxd = 1'b1;       // glitch
    repeat (20 * CPB) @(posedge clk);
    expect_byte(8'h3C, nv, 1);
    send(8'h96, CPB); nv++; expect_byte(8'h96, nv, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
