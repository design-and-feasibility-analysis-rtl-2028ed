// uart_aes_full_tb: the link at its default configuration (DIV = 4, i.e.
// 25 MBd from a 100 MHz clock, KEY = 05), sending every byte value once,
// the three example bytes 6c, 74, 3e first.
// For each byte it checks ec_data = data_in ^ 05, that the line carries the
// reference S-box of that value (LSB first), that tx_done and the rise of
// rx_done come 36 clocks (360 ns) after the start bit began, and that
// data_out equals data_in one clock after rx_done.
`timescale 1ns/1ps
module uart_aes_full_tb;
  `include "aes_ref_sbox.svh"

  localparam int DIV = 4;
  localparam logic [7:0] KEY = 8'h05;

  logic clk = 1'b0;
  logic rst, tx_start, tx_done, rx_done, tx_data, tx_busy;
  logic [7:0] data_in, ec_data, data_out;
  logic [7:0] sbox [256];
  logic [7:0] inv_sbox [256];
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  uart_aes_top dut (
    .clk(clk), .rst(rst), .data_in(data_in), .tx_start(tx_start),
    .tx_done(tx_done), .rx_done(rx_done), .tx_data(tx_data),
    .tx_busy(tx_busy), .ec_data(ec_data), .data_out(data_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic transfer(input logic [7:0] b);
    int t0, t_tx, t_rx;
    logic [7:0] got;
    @(negedge clk);
    data_in = b;
    #1 check(ec_data == (b ^ KEY), $sformatf("ec_data %02h for %02h", ec_data, b));
    tx_start = 1'b1;
    @(negedge clk);
    tx_start = 1'b0;
    while (tx_data === 1'b1) begin
      @(posedge clk); #1;
    end
    t0 = cyc;
    repeat (DIV + DIV / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      #1 got[i] = tx_data;
      if (i < 7) repeat (DIV) @(posedge clk);
    end
    check(got == sbox[b ^ KEY], $sformatf("line %02h, expected ciphertext %02h", got, sbox[b ^ KEY]));
    t_tx = -1; t_rx = -1;
    while ((t_tx < 0 || t_rx < 0) && cyc < t0 + 11 * DIV) begin
      @(posedge clk); #1;
      if (tx_done && t_tx < 0) t_tx = cyc;
      if (rx_done && t_rx < 0) t_rx = cyc;
    end
    check(t_tx - t0 == 9 * DIV, $sformatf("tx_done after %0d clocks", t_tx - t0));
    check(t_rx - t0 == 9 * DIV, $sformatf("rx_done after %0d clocks", t_rx - t0));
    @(posedge clk); #1;
    check(data_out == b, $sformatf("data_out %02h, expected %02h", data_out, b));
    wait (tx_busy === 1'b0);
  endtask

  initial begin
    fill_ref_sbox(sbox, inv_sbox);
    rst = 1'b1; tx_start = 1'b0; data_in = 8'h00;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(data_out == 8'h00 && tx_data === 1'b1 && !rx_done && !tx_done, "reset state");
    transfer(8'h6c);
    transfer(8'h74);
    transfer(8'h3e);
    for (int v = 0; v < 256; v++) transfer(8'(v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
