// baud_gen_tb: checks the baud tick of two generators, the default
// (DIV = 4) and DIV = 12. The first tick must come DIV clocks after reset is
// released, each tick must last one clock, and ticks must be exactly DIV
// clocks apart.
`timescale 1ns/1ps
module baud_gen_tb;
  logic clk = 1'b0;
  logic rst;
  logic tick4, tick12;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  baud_gen              dut4  (.clk(clk), .rst(rst), .baud_tick(tick4));
  baud_gen #(.DIV(12))  dut12 (.clk(clk), .rst(rst), .baud_tick(tick12));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Counts clocks since reset release and checks every tick's position.
  task automatic watch(input int div, ref logic tick, input int nticks);
    int cyc = 0, seen = 0;
    while (seen < nticks) begin
      @(posedge clk); #1;
      cyc++;
      checks++;
      if (tick !== ((cyc % div) == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL DIV=%0d cycle %0d tick=%0b", div, cyc, tick);
      end
      if (tick) seen++;
    end
  endtask

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    fork
      watch(4, tick4, 50);
      watch(12, tick12, 20);
    join
    // reset in the middle of a count restarts it
    rst = 1'b1;
    @(posedge clk); #1 rst = 1'b0;
    checks++;
    if (tick4 !== 1'b0) failures++;
    watch(4, tick4, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
