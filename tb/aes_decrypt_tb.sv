// aes_decrypt_tb: checks the byte decryptor.
// After reset data_out must be 00. For every plaintext byte x and several
// keys the ciphertext sbox[x ^ key] (reference S-box) is presented with
// rx_done high; data_out must equal x one clock later, and must hold while
// rx_done is low even if rx_parallel_data changes.
`timescale 1ns/1ps
module aes_decrypt_tb;
  `include "aes_ref_sbox.svh"

  logic clk = 1'b0;
  logic rst, rx_done;
  logic [7:0] rx_parallel_data, key, data_out;
  logic [7:0] sbox [256];
  logic [7:0] inv_sbox [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_decrypt dut (.clk(clk), .rst(rst), .rx_done(rx_done),
                   .rx_parallel_data(rx_parallel_data), .key(key), .data_out(data_out));

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] keys [3];
    fill_ref_sbox(sbox, inv_sbox);
    rst = 1'b1; rx_done = 1'b0; rx_parallel_data = 8'h5a; key = 8'h05;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(data_out, 8'h00, "data_out after reset");
    @(posedge clk); #1;
    check(data_out, 8'h00, "data_out holds 00 while rx_done low");

    keys = '{8'h05, 8'h45, 8'h3c};
    foreach (keys[k]) begin
      key = keys[k];
      for (int x = 0; x < 256; x++) begin
        rx_parallel_data = sbox[8'(x) ^ key];
        rx_done = 1'b1;
        @(posedge clk); #1;
        check(data_out, 8'(x), $sformatf("decrypt x=%02h k=%02h", x, key));
        rx_done = 1'b0;
        rx_parallel_data = ~rx_parallel_data;
        @(posedge clk); #1;
        check(data_out, 8'(x), $sformatf("hold x=%02h k=%02h", x, key));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
