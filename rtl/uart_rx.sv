// uart_rx: asynchronous serial receiver, 8 data bits, no parity, 1 stop bit,
// least significant bit first (the usual PC serial port format).
//
// The rx line passes a two-flop synchroniser. A falling edge starts a frame;
// the start bit is re-checked half a bit later, then each data bit and the
// stop bit are sampled in the middle of their bit time, CLKS_PER_BIT clocks
// apart. A frame whose stop bit is high gives a one-clock rx_valid pulse with
// the byte on rx_data; a low stop bit gives a frame_err pulse instead and the
// byte is discarded. rx_data holds its value until the next good frame.
// The document only states that the module talks to a PC over a serial link;
// the frame format, oversampling scheme and error handling are this design's
// choices.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 868   // 100 MHz / 115200 baud
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic [7:0] rx_data,
  output logic       rx_valid,
  output logic       frame_err
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  state_e          state_q;
  logic [CW-1:0]   cnt_q;
  logic [2:0]      bit_q;
  logic [7:0]      shift_q;
  logic [1:0]      sync_q;
  logic            rx_s;

  always_comb rx_s = sync_q[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_q    <= 2'b11;
      state_q   <= S_IDLE;
      cnt_q     <= '0;
      bit_q     <= '0;
      shift_q   <= '0;
      rx_data   <= '0;
      rx_valid  <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync_q    <= {sync_q[0], rxd};
      rx_valid  <= 1'b0;
      frame_err <= 1'b0;
      case (state_q)
        S_IDLE: begin
          cnt_q <= '0;
          if (!rx_s) state_q <= S_START;
        end
        S_START: begin   // wait to the middle of the start bit
          if (cnt_q == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt_q   <= '0;
            bit_q   <= '0;
            state_q <= rx_s ? S_IDLE : S_DATA;   // glitch: back to idle
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_DATA: begin
          if (cnt_q == CW'(CLKS_PER_BIT - 1)) begin
            cnt_q   <= '0;
            shift_q <= {rx_s, shift_q[7:1]};
            bit_q   <= bit_q + 3'd1;
            if (bit_q == 3'd7) state_q <= S_STOP;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_STOP: begin
          if (cnt_q == CW'(CLKS_PER_BIT - 1)) begin
            cnt_q   <= '0;
            state_q <= S_IDLE;
            if (rx_s) begin
              rx_data  <= shift_q;
              rx_valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
