// security_module: FPGA security module that encrypts data from a PC with
// AES-128 under a constant key, placed on a data-communication link to stop a
// man-in-the-middle from reading or altering the traffic.
//
// Data path: uart_rx -> serial_ctrl (collects a 16-byte plaintext block) ->
// aes_128_encrypt (10 rounds, key expansion alongside the rounds) ->
// serial_ctrl (sends the 16 ciphertext bytes) -> uart_tx.
// The key is the parameter KEY, fixed when the FPGA is built: no key travels
// over the serial link and no key pins are needed. It is loaded into the
// core together with every block (key_load tied to start).
//
// Ports: clk (board clock, CLK_FREQ_HZ), rst (synchronous, active high),
// uart_rxd / uart_txd (serial line to the PC, 8N1 at BAUD_RATE, idle high).
// Status outputs: block_done pulses when the last ciphertext byte has been
// handed to the transmitter, busy is high while a block is being encrypted,
// rx_dropped / frame_err pulse for a byte that was ignored or malformed.
// Timing per block: 16 bytes in (160 bit times), 11 clocks of encryption, 16
// bytes out (160 bit times).
// The constant key, AES-128 and the PC serial link follow the document; the
// default key is the one it tests with. Clock rate, baud rate and framing are
// this design's choices (100 MHz is the board oscillator of the target board).
module security_module #(
  parameter int unsigned     CLK_FREQ_HZ = 100_000_000,
  parameter int unsigned     BAUD_RATE   = 115_200,
  parameter aes_pkg::block_t KEY         = 128'h2B7E1516_28AED2A6_ABF71588_09CF4F3C
) (
  input  logic clk,
  input  logic rst,
  input  logic uart_rxd,
  output logic uart_txd,
  output logic block_done,
  output logic busy,
  output logic rx_dropped,
  output logic frame_err
);
  import aes_pkg::*;

  localparam int unsigned CLKS_PER_BIT = (CLK_FREQ_HZ + BAUD_RATE / 2) / BAUD_RATE;

  logic [7:0] rx_data, tx_data;
  logic       rx_valid, tx_valid, tx_ready;
  logic       aes_start, aes_done;
  block_t     plaintext, ciphertext;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst, .rxd(uart_rxd),
    .rx_data, .rx_valid, .frame_err
  );

  serial_ctrl u_ctrl (
    .clk, .rst,
    .rx_data, .rx_valid,
    .tx_data, .tx_valid, .tx_ready,
    .aes_start, .plaintext, .ciphertext, .aes_done,
    .rx_dropped, .block_done
  );

  aes_128_encrypt u_aes (
    .sys_clk       (clk),
    .rst,
    .start         (aes_start),
    .key_load      (aes_start),
    .key_in        (KEY),
    .plaintext_in  (plaintext),
    .ciphertext_out(ciphertext),
    .busy,
    .done          (aes_done)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst,
    .tx_data, .tx_valid, .tx_ready,
    .txd(uart_txd)
  );

endmodule
