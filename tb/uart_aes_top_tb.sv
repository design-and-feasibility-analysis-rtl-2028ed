// uart_aes_top_tb: end-to-end test of the encrypted UART link.
//
// Three links run side by side on one 100 MHz clock:
//   link 0: default parameters (DIV = 4, 25 MBd; KEY = 05)
//   link 1: DIV = 8  (12.5 MBd), KEY = 05
//   link 2: DIV = 12 (8.33 MBd), KEY = 45
// Each first sends the three example bytes 6c, 74, 3e, then random bytes,
// with tx_start placed at random phases of the baud tick. For every byte:
//   - ec_data must be data_in ^ KEY while data_in is applied;
//   - the frame on tx_data must carry the reference S-box of data_in ^ KEY,
//     LSB first, i.e. the line carries ciphertext, not plaintext;
//   - tx_done and the rise of rx_done must come exactly 9*DIV clocks after
//     the start bit began (360, 720 and 1080 ns);
//   - data_out must equal data_in one clock after rx_done and hold after.
// Mechanisms counted (each must occur): frames at each of the three rates,
// a tx_start ignored while busy, rx_done cleared by the next frame, a
// changed data_in after tx_start not affecting the frame in flight.
`timescale 1ns/1ps
module uart_aes_top_tb;
  `include "aes_ref_sbox.svh"

  localparam int NLINK = 3;
  localparam int DIVS [NLINK] = '{4, 8, 12};
  localparam logic [7:0] KEYS [NLINK] = '{8'h05, 8'h05, 8'h45};
  localparam int NRANDOM = 30;

  logic clk = 1'b0;
  logic rst;
  logic [7:0] data_in  [NLINK];
  logic       tx_start [NLINK];
  logic       tx_done  [NLINK];
  logic       rx_done  [NLINK];
  logic       tx_data  [NLINK];
  logic       tx_busy  [NLINK];
  logic [7:0] ec_data  [NLINK];
  logic [7:0] data_out [NLINK];

  logic [7:0] sbox [256];
  logic [7:0] inv_sbox [256];
  int checks = 0, failures = 0;
  int cyc = 0;
  int frames [NLINK];
  int busy_ignored = 0, done_cleared = 0, input_changed = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // link 0 uses the defaults: this is the full-size configuration
  uart_aes_top u_link0 (
    .clk(clk), .rst(rst), .data_in(data_in[0]), .tx_start(tx_start[0]),
    .tx_done(tx_done[0]), .rx_done(rx_done[0]), .tx_data(tx_data[0]),
    .tx_busy(tx_busy[0]), .ec_data(ec_data[0]), .data_out(data_out[0]));

  uart_aes_top #(.DIV(8), .KEY(8'h05)) u_link1 (
    .clk(clk), .rst(rst), .data_in(data_in[1]), .tx_start(tx_start[1]),
    .tx_done(tx_done[1]), .rx_done(rx_done[1]), .tx_data(tx_data[1]),
    .tx_busy(tx_busy[1]), .ec_data(ec_data[1]), .data_out(data_out[1]));

  uart_aes_top #(.DIV(12), .KEY(8'h45)) u_link2 (
    .clk(clk), .rst(rst), .data_in(data_in[2]), .tx_start(tx_start[2]),
    .tx_done(tx_done[2]), .rx_done(rx_done[2]), .tx_data(tx_data[2]),
    .tx_busy(tx_busy[2]), .ec_data(ec_data[2]), .data_out(data_out[2]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic transfer(input int l, input logic [7:0] b, input bit poke);
    int d, t0, t_tx, t_rx;
    logic [7:0] key, cipher, got;
    bit had_done;
    d = DIVS[l];
    key = KEYS[l];
    cipher = sbox[b ^ key];
    had_done = rx_done[l];
    repeat ($urandom_range(0, d)) @(posedge clk);
    @(negedge clk);
    data_in[l] = b;
    #1 check(ec_data[l] == (b ^ key), $sformatf("link %0d ec_data %02h", l, ec_data[l]));
    tx_start[l] = 1'b1;
    @(negedge clk);
    tx_start[l] = 1'b0;
    data_in[l] = ~b;               // must not reach the frame in flight
    input_changed++;
    while (tx_data[l] === 1'b1) begin
      @(posedge clk); #1;
    end
    t0 = cyc;
    if (had_done) begin
      // rx_done falls once the receiver sees this start bit
      repeat (d + 1) @(posedge clk);
      #1 check(rx_done[l] === 1'b0, $sformatf("link %0d rx_done cleared by new frame", l));
      done_cleared++;
      repeat (d / 2 - 1) @(posedge clk);
    end else begin
      repeat (d + d / 2) @(posedge clk);
    end
    // now in the middle of data bit 0
    for (int i = 0; i < 8; i++) begin
      #1 got[i] = tx_data[l];
      if (poke && i == 4) begin
        @(negedge clk);
        data_in[l] = 8'h00; tx_start[l] = 1'b1;
        @(negedge clk);
        tx_start[l] = 1'b0;
        busy_ignored++;
        repeat (d - 1) @(posedge clk);
      end else if (i < 7) begin
        repeat (d) @(posedge clk);
      end
    end
    check(got == cipher, $sformatf("link %0d line carries %02h, expected ciphertext %02h",
                                   l, got, cipher));
    t_tx = -1; t_rx = -1;
    while ((t_tx < 0 || t_rx < 0) && cyc < t0 + 11 * d) begin
      @(posedge clk); #1;
      if (tx_done[l] && t_tx < 0) t_tx = cyc;
      if (rx_done[l] && t_rx < 0) t_rx = cyc;
    end
    check(t_tx - t0 == 9 * d, $sformatf("link %0d tx_done after %0d clocks, expected %0d",
                                        l, t_tx - t0, 9 * d));
    check(t_rx - t0 == 9 * d, $sformatf("link %0d rx_done after %0d clocks, expected %0d",
                                        l, t_rx - t0, 9 * d));
    if (frames[l] == 0)
      $display("link %0d (DIV=%0d): start bit to tx_done %0d ns", l, d, (t_tx - t0) * 10);
    @(posedge clk); #1;
    check(data_out[l] == b, $sformatf("link %0d data_out %02h, expected %02h", l, data_out[l], b));
    wait (tx_busy[l] === 1'b0);
    repeat (2 * d) begin
      @(posedge clk); #1;
      check(tx_data[l] === 1'b1 && data_out[l] == b && rx_done[l] === 1'b1,
            $sformatf("link %0d idle and holding %02h", l, b));
    end
    frames[l]++;
  endtask

  task automatic run_link(input int l);
    transfer(l, 8'h6c, 1'b0);
    transfer(l, 8'h74, 1'b1);
    transfer(l, 8'h3e, 1'b0);
    for (int i = 0; i < NRANDOM; i++) transfer(l, 8'($urandom), i == 7);
  endtask

  initial begin
    fill_ref_sbox(sbox, inv_sbox);
    rst = 1'b1;
    for (int l = 0; l < NLINK; l++) begin
      data_in[l] = 8'h00;
      tx_start[l] = 1'b0;
      frames[l] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int l = 0; l < NLINK; l++)
      check(tx_data[l] === 1'b1 && data_out[l] == 8'h00 && rx_done[l] === 1'b0 &&
            tx_done[l] === 1'b0, $sformatf("link %0d reset state", l));
    fork
      run_link(0);
      run_link(1);
      run_link(2);
    join
    for (int l = 0; l < NLINK; l++) begin
      $display("link %0d: %0d frames", l, frames[l]);
      check(frames[l] == NRANDOM + 3, $sformatf("link %0d frame count", l));
    end
    $display("mechanisms: busy_ignored=%0d done_cleared=%0d input_changed=%0d",
             busy_ignored, done_cleared, input_changed);
    check(busy_ignored > 0, "tx_start while busy exercised");
    check(done_cleared > 0, "rx_done clearing exercised");
    check(input_changed > 0, "data_in change after tx_start exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
