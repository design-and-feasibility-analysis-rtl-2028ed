// uart_rx: state-machine UART receiver driven by the transmitter's tick.
//
// The receiver shares the transmitter's clock and baud_tick, so it needs no
// oversampling: it samples rx_in once per tick. The transmitter changes the
// line on a tick, so the sample taken on the next tick sees a bit that has
// been stable for a whole symbol. A low sample while idle is a start bit; the
// next 8 samples are shifted in LSB first. The assembled byte is then copied
// to rx_parallel_data and rx_done is raised.
//
// Interface: clk, rst (synchronous, active high), baud_tick, rx_in in;
// rx_parallel_data[7:0], rx_done out.
// Timing: rx_done rises on the tick that ends the last data bit (the same
// tick that ends the transmitter's 9th symbol) and stays high until the next
// start bit is seen; rx_parallel_data is valid while rx_done is high.
//
// Sampling on the shared tick and storing the bits in a register that is then
// assigned to rx_parallel_data follow the source design. LSB-first order,
// the level-type rx_done and the absence of a stop-bit check are this
// design's choices.
module uart_rx
  import uart_aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  baud_tick,
  input  logic  rx_in,
  output byte_t rx_parallel_data,
  output logic  rx_done
);

  typedef enum logic {
    RX_IDLE,  // waiting for a start bit
    RX_DATA   // shifting in data bits
  } rx_state_e;

  rx_state_e  state;
  logic [6:0] shreg;       // the last 7 samples, newest in bit 6
  logic [2:0] bitcnt;
  byte_t      next_shreg;

  always_comb next_shreg = {rx_in, shreg};

  always_ff @(posedge clk) begin
    if (rst) begin
      state            <= RX_IDLE;
      shreg            <= '0;
      bitcnt           <= '0;
      rx_parallel_data <= '0;
      rx_done          <= 1'b0;
    end else if (baud_tick) begin
      unique case (state)
        RX_IDLE: if (!rx_in) begin
          bitcnt  <= '0;
          rx_done <= 1'b0;
          state   <= RX_DATA;
        end
        RX_DATA: begin
          shreg  <= next_shreg[7:1];
          bitcnt <= bitcnt + 1'b1;
          if (bitcnt == 3'(DATA_BITS - 1)) begin
            rx_parallel_data <= next_shreg;
            rx_done          <= 1'b1;
            state            <= RX_IDLE;
          end
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

endmodule
