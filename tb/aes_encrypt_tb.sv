// aes_encrypt_tb: exhaustive check of the byte encryptor.
// For every plaintext byte and a set of keys, ec_data must equal
// data_in ^ key and enc_data must equal the reference S-box of ec_data.
// Also checks the three example vectors (6c,05)->69, (74,05)->71,
// (3e,45)->7b and a few published S-box entries.
`timescale 1ns/1ps
module aes_encrypt_tb;
  `include "aes_ref_sbox.svh"

  logic [7:0] data_in, key, ec_data, enc_data;
  logic [7:0] sbox [256];
  logic [7:0] inv_sbox [256];
  int checks = 0, failures = 0;

  aes_encrypt dut (.data_in(data_in), .key(key), .ec_data(ec_data), .enc_data(enc_data));

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  task automatic apply(input logic [7:0] d, input logic [7:0] k);
    data_in = d;
    key     = k;
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] keys [5];
    fill_ref_sbox(sbox, inv_sbox);
    // published FIPS-197 entries, as a check of the reference itself
    check(sbox[8'h00], 8'h63, "ref sbox[00]");
    check(sbox[8'h53], 8'hed, "ref sbox[53]");
    check(sbox[8'hff], 8'h16, "ref sbox[ff]");

    // the example vectors
    apply(8'h6c, 8'h05); check(ec_data, 8'h69, "ec_data 6c^05");
    apply(8'h74, 8'h05); check(ec_data, 8'h71, "ec_data 74^05");
    apply(8'h3e, 8'h45); check(ec_data, 8'h7b, "ec_data 3e^45");
    apply(8'h53, 8'h00); check(enc_data, 8'hed, "enc_data 53,key 00");
    apply(8'h00, 8'h00); check(enc_data, 8'h63, "enc_data 00,key 00");

    keys = '{8'h00, 8'h05, 8'h45, 8'hff, 8'ha7};
    foreach (keys[k]) begin
      for (int d = 0; d < 256; d++) begin
        apply(8'(d), keys[k]);
        check(ec_data, 8'(d) ^ keys[k], $sformatf("ec_data d=%02h k=%02h", d, keys[k]));
        check(enc_data, sbox[8'(d) ^ keys[k]], $sformatf("enc_data d=%02h k=%02h", d, keys[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
