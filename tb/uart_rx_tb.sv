// uart_rx_tb: checks the receiver with frames made by the testbench.
// A tick source (one clock in DIV) paces a behavioural line driver that
// changes the line just after a tick, as the transmitter does: start bit,
// 8 data bits LSB first, stop bit, then a random number of idle symbols.
// rx_done must rise on the tick that ends the 8th data bit (9 symbols after
// the start bit began), rx_parallel_data must then hold the byte, and
// rx_done must fall when the next start bit is seen.
`timescale 1ns/1ps
module uart_rx_tb;
  localparam int DIV = 6;

  logic clk = 1'b0;
  logic rst, baud_tick, rx_in;
  logic [7:0] rx_parallel_data;
  logic rx_done;
  int checks = 0, failures = 0;
  int cyc = 0;
  int done_cleared = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int tcnt;
  always_ff @(posedge clk) begin
    if (rst) begin
      tcnt <= 0;
      baud_tick <= 1'b0;
    end else begin
      tcnt <= (tcnt == DIV - 1) ? 0 : tcnt + 1;
      baud_tick <= (tcnt == DIV - 1);
    end
  end

  uart_rx dut (.clk(clk), .rst(rst), .baud_tick(baud_tick), .rx_in(rx_in),
               .rx_parallel_data(rx_parallel_data), .rx_done(rx_done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // wait for a tick and put a new value on the line just after it
  task automatic drive_symbol(input logic v);
    do @(posedge clk); while (baud_tick !== 1'b1);
    #1 rx_in = v;
  endtask

  task automatic frame(input logic [7:0] b, input bit first);
    int t0;
    drive_symbol(1'b0);
    t0 = cyc;
    for (int i = 0; i < 8; i++) begin
      drive_symbol(b[i]);
      if (i == 0 && !first) begin
        check(rx_done === 1'b0, "rx_done cleared by the next start bit");
        done_cleared++;
      end
      if (i < 7) check(rx_done === 1'b0, "rx_done low during frame");
    end
    check(rx_done === 1'b0, "rx_done low before last bit sampled");
    drive_symbol(1'b1);   // stop bit; the last data bit is sampled on this tick
    check(rx_done === 1'b1, "rx_done after the 9th symbol");
    check(cyc - t0 == 9 * DIV, "rx_done 9 symbols after the start bit");
    check(rx_parallel_data == b, $sformatf("byte sent %02h got %02h", b, rx_parallel_data));
    repeat ($urandom_range(0, 3)) begin
      drive_symbol(1'b1);
      check(rx_done === 1'b1 && rx_parallel_data == b, "byte held while idle");
    end
  endtask

  initial begin
    rst = 1'b1; rx_in = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(rx_done === 1'b0 && rx_parallel_data == 8'h00, "reset state");
    frame(8'h50, 1'b1);
    frame(8'ha3, 1'b0);
    frame(8'h21, 1'b0);
    frame(8'h00, 1'b0);
    frame(8'hff, 1'b0);
    for (int i = 0; i < 40; i++) frame(8'($urandom), 1'b0);
    check(done_cleared > 0, "rx_done clearing exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
