// uart_tx_tb: checks the transmitter against an independent line monitor.
// The testbench makes its own baud tick (one clock in DIV). For a series of
// bytes (fixed and random) it pulses tx_start and then watches tx_data:
// the start bit must begin on a tick, every symbol must last DIV clocks,
// the 8 data bits must arrive LSB first, the stop symbol must be high, and
// tx_done must pulse exactly 9*DIV clocks after the start bit began. A
// tx_start given while busy must be ignored, and the line must stay high
// between frames.
`timescale 1ns/1ps
module uart_tx_tb;
  localparam int DIV = 4;

  logic clk = 1'b0;
  logic rst, baud_tick, tx_start;
  logic [7:0] enc_data;
  logic tx_data, tx_busy, tx_done;
  int checks = 0, failures = 0;
  int cyc = 0;
  int busy_ignored = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // independent tick source
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

  uart_tx dut (.clk(clk), .rst(rst), .baud_tick(baud_tick), .tx_start(tx_start),
               .enc_data(enc_data), .tx_data(tx_data), .tx_busy(tx_busy), .tx_done(tx_done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sends one byte and checks the frame. Optionally pokes tx_start with a
  // different byte in the middle of the frame.
  task automatic send(input logic [7:0] b, input bit poke);
    int t_start, t_done;
    logic [7:0] got;
    @(negedge clk);
    enc_data = b;
    tx_start = 1'b1;
    @(negedge clk);
    tx_start = 1'b0;
    enc_data = ~b;
    // wait for the start bit; line must stay high meanwhile
    while (tx_data === 1'b1) begin
      @(posedge clk); #1;
    end
    t_start = cyc;
    check(tcnt == 1, "start bit begins on a tick");  // the tick was high on the edge just passed
    // sample the middle of each symbol
    repeat (DIV / 2) @(posedge clk);
    #1 check(tx_data === 1'b0, "start bit low");
    for (int i = 0; i < 8; i++) begin
      if (poke && i == 3) begin
        @(negedge clk);
        enc_data = 8'h00; tx_start = 1'b1;
        @(negedge clk);
        tx_start = 1'b0;
        repeat (DIV - 2) @(posedge clk);
        busy_ignored++;
      end else begin
        repeat (DIV) @(posedge clk);
      end
      #1 got[i] = tx_data;
      check(tx_busy === 1'b1, "busy during frame");
    end
    check(got == b, $sformatf("data bits: sent %02h got %02h", b, got));
    // tx_done must come exactly 9 symbols after the start bit began
    while (tx_done !== 1'b1 && cyc < t_start + 12 * DIV) begin
      @(posedge clk); #1;
    end
    t_done = cyc;
    check(t_done - t_start == 9 * DIV,
          $sformatf("tx_done after %0d clocks, expected %0d", t_done - t_start, 9 * DIV));
    check(tx_data === 1'b1, "stop bit high");
    @(posedge clk); #1;
    check(tx_done === 1'b0, "tx_done one clock wide");
    wait (tx_busy === 1'b0);
    #1;
    check(cyc - t_start == 10 * DIV, "frame length is 10 symbols");
    // the ignored request must not have started another frame
    repeat (3 * DIV) begin
      @(posedge clk); #1;
      check(tx_data === 1'b1 && tx_busy === 1'b0, "idle after frame");
    end
  endtask

  initial begin
    rst = 1'b1; tx_start = 1'b0; enc_data = 8'h00;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(tx_data === 1'b1 && tx_busy === 1'b0 && tx_done === 1'b0, "idle after reset");
    send(8'hf9, 1'b0);   // Sbox(6c ^ 05)
    send(8'ha3, 1'b1);
    send(8'h21, 1'b0);
    send(8'h00, 1'b0);
    send(8'hff, 1'b0);
    for (int i = 0; i < 20; i++) send(8'($urandom), i == 5);
    check(busy_ignored == 2, "busy requests exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
