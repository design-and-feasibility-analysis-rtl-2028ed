// baud_gen: baud-rate generator shared by the UART transmitter and receiver.
//
// A modulo-DIV counter: it counts clock cycles 0 .. DIV-1 and emits a
// one-clock baud_tick on the cycle it wraps, so one tick marks one UART
// symbol of DIV clock periods. With the default DIV = 4 (a four-state
// counter) and a 100 MHz clock the symbol rate is 25 MBd; DIV = 8 and 12
// give 12.5 MBd and 8.33 MBd.
//
// Interface: clk, rst (synchronous, active high) in; baud_tick out.
// Timing: after reset is released the first tick comes DIV clocks later,
// then one every DIV clocks. The counter runs freely; nothing restarts it.
//
// The four-stage divider and the single tick feeding both TX and RX follow
// the source design; the free-running counter and the clock frequency are
// this design's choices.
module baud_gen #(
  parameter int unsigned DIV = 4
) (
  input  logic clk,
  input  logic rst,
  output logic baud_tick
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      baud_tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt       <= '0;
      baud_tick <= 1'b1;
    end else begin
      cnt       <= cnt + 1'b1;
      baud_tick <= 1'b0;
    end
  end

  initial assert (DIV >= 2) else $error("baud_gen: DIV must be at least 2");

endmodule
