// aes_decrypt: byte decryptor behind the UART receiver.
//
// Inverts aes_encrypt: the received ciphertext is passed through the inverse
// AES S-box (InvSubBytes) and then XORed with the same key, which returns the
// original plaintext byte.
//
// Interface: rx_parallel_data and key in; data_out out (8 bits each).
// rx_done is the receiver's "byte held" level.
// Timing: data_out is a register, cleared to 8'h00 by rst, and loaded on
// every clock edge at which rx_done is high, so it shows the decrypted byte
// one clock after rx_done rises and holds it until the next frame ends.
//
// The inverse S-box follows the source design. Undoing the XOR after the
// inverse S-box, and registering the output, are this design's choices.
module aes_decrypt
  import uart_aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  rx_done,
  input  byte_t rx_parallel_data,
  input  byte_t key,
  output byte_t data_out
);

  byte_t plain;

  always_comb plain = aes_inv_sbox(rx_parallel_data) ^ key;

  always_ff @(posedge clk) begin
    if (rst)          data_out <= '0;
    else if (rx_done) data_out <= plain;
  end

endmodule
