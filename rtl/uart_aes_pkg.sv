// uart_aes_pkg: constants and byte-level cipher functions shared by the
// encryptor and decryptor of the encrypted UART link.
//
// The AES S-box is not stored as a typed-in table. It is computed from its
// definition: the multiplicative inverse in GF(2^8) modulo the AES polynomial
// x^8+x^4+x^3+x+1 (0x11b), with 0 mapped to 0, followed by the AES affine map
//   s = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63.
// The inverse S-box undoes the affine map first,
//   b = rotl(s,1) ^ rotl(s,3) ^ rotl(s,6) ^ 8'h05,
// then takes the field inverse. Synthesis folds each function into an
// 8-input look-up table, which is how the S-box is normally built in logic.
// All functions are purely combinational.
package uart_aes_pkg;

  typedef logic [7:0] byte_t;

  // Default key; the link's own choice of example value.
  localparam byte_t DEFAULT_KEY = 8'h05;

  // Clock divide ratio for one UART symbol (25 MBd from a 100 MHz clock).
  localparam int unsigned DEFAULT_DIV = 4;

  // Number of data bits per UART frame.
  localparam int unsigned DATA_BITS = 8;

  function automatic byte_t rotl8(input byte_t v, input int unsigned n);
    return byte_t'((v << n) | (v >> (8 - n)));
  endfunction

  // Multiply by x in GF(2^8).
  function automatic byte_t xtime(input byte_t a);
    return a[7] ? byte_t'((a << 1) ^ 8'h1b) : byte_t'(a << 1);
  endfunction

  // Shift-and-add multiplication in GF(2^8).
  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t acc;
    byte_t p;
    acc = '0;
    p   = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc = acc ^ p;
      p = xtime(p);
    end
    return acc;
  endfunction

  // Field inverse as a^254 (a^-1 for a != 0; 0 maps to 0).
  // 254 = 2+4+8+16+32+64+128, so multiply the seven successive squares.
  function automatic byte_t gf_inv(input byte_t a);
    byte_t sq;
    byte_t res;
    sq  = a;
    res = 8'h01;
    for (int i = 0; i < 7; i++) begin
      sq  = gf_mul(sq, sq);
      res = gf_mul(res, sq);
    end
    return res;
  endfunction

  function automatic byte_t aes_sbox(input byte_t a);
    byte_t b;
    b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic byte_t aes_inv_sbox(input byte_t s);
    return gf_inv(rotl8(s, 1) ^ rotl8(s, 3) ^ rotl8(s, 6) ^ 8'h05);
  endfunction

endpackage
