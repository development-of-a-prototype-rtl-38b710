// uart_tx: asynchronous serial transmitter, 8 data bits, no parity, 1 stop
// bit, least significant bit first.
//
// Handshake: a byte is accepted in a clock where tx_valid and tx_ready are
// both high. tx_ready is high only while the transmitter is idle. The frame
// (start bit 0, eight data bits, stop bit 1) then goes out on txd, each bit
// lasting CLKS_PER_BIT clocks, so a byte takes 10*CLKS_PER_BIT clocks; tx_ready
// returns high in the clock after the stop bit ends. txd idles high.
// The document only states that the module sends data back to the PC over a
// serial link; the frame format and handshake are this design's choices.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868   // 100 MHz / 115200 baud
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] tx_data,
  input  logic       tx_valid,
  output logic       tx_ready,
  output logic       txd
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic          active_q;
  logic [CW-1:0] cnt_q;
  logic [3:0]    bit_q;      // 0 = start, 1..8 = data, 9 = stop
  logic [9:0]    frame_q;    // bits still to send, LSB goes out first

  always_comb tx_ready = !active_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      active_q <= 1'b0;
      cnt_q    <= '0;
      bit_q    <= '0;
      frame_q  <= '1;
      txd      <= 1'b1;
    end else if (!active_q) begin
      txd <= 1'b1;
      if (tx_valid) begin
        frame_q  <= {1'b1, tx_data, 1'b0};
        txd      <= 1'b0;          // start bit goes out at once
        active_q <= 1'b1;
        cnt_q    <= '0;
        bit_q    <= '0;
      end
    end else begin
      if (cnt_q == CW'(CLKS_PER_BIT - 1)) begin
        cnt_q <= '0;
        if (bit_q == 4'd9) begin
          active_q <= 1'b0;
          txd      <= 1'b1;
        end else begin
          bit_q <= bit_q + 4'd1;
          txd   <= frame_q[bit_q + 4'd1];
        end
      end else begin
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  // The accepted byte must not be changed by the handshake while sending.
  a_ready_idle: assert property (@(posedge clk) disable iff (rst)
    active_q |-> !tx_ready);

endmodule
