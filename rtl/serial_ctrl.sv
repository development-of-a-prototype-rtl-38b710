// serial_ctrl: block framing between the serial port and the AES core.
//
// The PC sends a 16-byte plaintext block, first byte = most significant byte
// (byte 0 of the AES state, i.e. the order of the block's hex string). After
// the 16th byte the controller pulses aes_start with the assembled block on
// plaintext, waits for aes_done, latches the ciphertext and sends its 16
// bytes back in the same order through the transmitter's valid/ready
// handshake. Then it is ready for the next block.
// Bytes that arrive while a block is being encrypted or sent back are not
// stored; each such byte gives a one-clock rx_dropped pulse. The PC is
// expected to wait for the 16 reply bytes before sending the next block.
// The document gives the purpose (carry data from PC to FPGA and back); the
// block framing, byte order and flow control are this design's choices.
module serial_ctrl (
  input  logic            clk,
  input  logic            rst,
  // from the receiver
  input  logic [7:0]      rx_data,
  input  logic            rx_valid,
  // to the transmitter
  output logic [7:0]      tx_data,
  output logic            tx_valid,
  input  logic            tx_ready,
  // to / from the AES core
  output logic            aes_start,
  output aes_pkg::block_t plaintext,
  input  aes_pkg::block_t ciphertext,
  input  logic            aes_done,
  // status
  output logic            rx_dropped,
  output logic            block_done
);
  import aes_pkg::*;

  typedef enum logic [1:0] {S_RECV, S_ENCRYPT, S_SEND} state_e;

  state_e     state_q;
  logic [3:0] cnt_q;
  block_t     out_q;

  always_comb begin
    tx_data  = out_q[127:120];
    tx_valid = (state_q == S_SEND);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q    <= S_RECV;
      cnt_q      <= '0;
      plaintext  <= '0;
      out_q      <= '0;
      aes_start  <= 1'b0;
      rx_dropped <= 1'b0;
      block_done <= 1'b0;
    end else begin
      aes_start  <= 1'b0;
      rx_dropped <= 1'b0;
      block_done <= 1'b0;
      case (state_q)
        S_RECV: begin
          if (rx_valid) begin
            plaintext <= {plaintext[119:0], rx_data};
            cnt_q     <= cnt_q + 4'd1;
            if (cnt_q == 4'd15) begin
              aes_start <= 1'b1;
              state_q   <= S_ENCRYPT;
            end
          end
        end
        S_ENCRYPT: begin
          rx_dropped <= rx_valid;
          if (aes_done) begin
            out_q   <= ciphertext;
            cnt_q   <= '0;
            state_q <= S_SEND;
          end
        end
        S_SEND: begin
          rx_dropped <= rx_valid;
          if (tx_ready) begin
            out_q <= {out_q[119:0], 8'h00};
            cnt_q <= cnt_q + 4'd1;
            if (cnt_q == 4'd15) begin
              cnt_q      <= '0;
              block_done <= 1'b1;
              state_q    <= S_RECV;
            end
          end
        end
        default: state_q <= S_RECV;
      endcase
    end
  end

endmodule
