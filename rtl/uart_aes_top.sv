// uart_aes_top: UART link with byte encryption on the way out and decryption
// on the way in.
//
// data_in is encrypted (XOR with KEY, then the AES S-box) and the ciphertext
// is sent by the transmitter when tx_start is pulsed. The serial line
// tx_data is looped into the receiver, whose parallel byte is decrypted
// (inverse AES S-box, then XOR with KEY) into data_out. One baud-rate
// generator feeds both ends, so transmitter and receiver run at the same
// symbol rate by construction.
//
// Interface: clk, rst (synchronous, active high), data_in[7:0], tx_start in;
// tx_done (1-clock pulse), rx_done (level), data_out[7:0] out, and for
// observation the serial line tx_data, the transmitter's tx_busy and
// ec_data[7:0], the plaintext XOR KEY before the S-box.
// Parameters: DIV clocks per symbol (4 = 25 MBd at 100 MHz), KEY the 8-bit
// key shared by both ends.
// Timing: start bit -> tx_done = 9 * DIV clocks; rx_done rises on the same
// tick; data_out shows the decrypted byte one clock after rx_done rises.
//
// The five blocks and their connections follow the source design; bringing
// tx_data, tx_busy and ec_data out as ports and holding the key in a
// parameter are this design's choices.
module uart_aes_top
  import uart_aes_pkg::*;
#(
  parameter int unsigned DIV = DEFAULT_DIV,
  parameter byte_t       KEY = DEFAULT_KEY
) (
  input  logic  clk,
  input  logic  rst,
  input  byte_t data_in,
  input  logic  tx_start,
  output logic  tx_done,
  output logic  rx_done,
  output logic  tx_data,
  output logic  tx_busy,
  output byte_t ec_data,
  output byte_t data_out
);

  logic  baud_tick;
  byte_t enc_data;
  byte_t rx_parallel_data;

  baud_gen #(.DIV(DIV)) u_baud_gen (
    .clk       (clk),
    .rst       (rst),
    .baud_tick (baud_tick)
  );

  aes_encrypt u_encrypt (
    .data_in  (data_in),
    .key      (KEY),
    .ec_data  (ec_data),
    .enc_data (enc_data)
  );

  uart_tx u_tx (
    .clk       (clk),
    .rst       (rst),
    .baud_tick (baud_tick),
    .tx_start  (tx_start),
    .enc_data  (enc_data),
    .tx_data   (tx_data),
    .tx_busy   (tx_busy),
    .tx_done   (tx_done)
  );

  uart_rx u_rx (
    .clk              (clk),
    .rst              (rst),
    .baud_tick        (baud_tick),
    .rx_in            (tx_data),
    .rx_parallel_data (rx_parallel_data),
    .rx_done          (rx_done)
  );

  aes_decrypt u_decrypt (
    .clk              (clk),
    .rst              (rst),
    .rx_done          (rx_done),
    .rx_parallel_data (rx_parallel_data),
    .key              (KEY),
    .data_out         (data_out)
  );

endmodule
