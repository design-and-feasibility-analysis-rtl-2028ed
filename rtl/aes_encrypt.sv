// aes_encrypt: byte encryptor in front of the UART transmitter.
//
// One AES round step on a single byte: the plaintext is XORed with the key
// (the AddRoundKey step, result ec_data), and the result is substituted
// through the AES S-box (SubBytes, result enc_data), which is what the
// transmitter sends. Mixing with the key and then a non-linear substitution
// gives a ciphertext with no linear relation to the plaintext.
//
// Interface: data_in and key in, ec_data and enc_data out, all 8 bits.
// Timing: purely combinational, no clock; the transmitter latches enc_data
// when a transfer starts.
//
// The XOR-then-S-box order and the AES S-box follow the source design; the
// key being a port (the top drives it from a parameter) is this design's
// choice.
module aes_encrypt
  import uart_aes_pkg::*;
(
  input  byte_t data_in,
  input  byte_t key,
  output byte_t ec_data,
  output byte_t enc_data
);

  always_comb begin
    ec_data  = data_in ^ key;
    enc_data = aes_sbox(ec_data);
  end

endmodule
