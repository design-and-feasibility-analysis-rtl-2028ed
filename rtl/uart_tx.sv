// uart_tx: state-machine UART transmitter.
//
// On tx_start (taken only when idle) the byte on enc_data is stored in a
// shift register. The transmitter then waits for the next baud_tick and sends
// one frame on tx_data, changing the line only on baud_tick:
//   start bit (low, the "preparation" symbol), 8 data bits LSB first,
//   then one stop bit (high).
// tx_done is pulsed for one clock on the tick that ends the last data bit,
// i.e. exactly 9 symbol periods after the start bit began. The stop symbol
// follows tx_done; a new frame is accepted once it has ended.
//
// Interface: clk, rst (synchronous, active high), baud_tick, tx_start,
// enc_data[7:0] in; tx_data (idle high), tx_busy, tx_done out.
// Timing: tx_start -> start bit after 1..DIV clocks (next tick); start bit ->
// tx_done = 9 symbols; tx_start -> ready again = at most 11 symbols.
//
// The state-machine structure, the storing of the byte in a register and the
// 9-symbol transfer time follow the source design. Bit order, the stop bit,
// ignoring tx_start while busy and the tx_busy output are this design's
// choices.
module uart_tx
  import uart_aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  baud_tick,
  input  logic  tx_start,
  input  byte_t enc_data,
  output logic  tx_data,
  output logic  tx_busy,
  output logic  tx_done
);

  typedef enum logic [2:0] {
    TX_IDLE,   // line high, waiting for tx_start
    TX_ARM,    // byte stored, waiting for the next tick
    TX_START,  // start bit on the line
    TX_DATA,   // data bits on the line
    TX_STOP    // stop bit on the line
  } tx_state_e;

  tx_state_e   state;
  byte_t       shreg;
  logic [2:0]  bitcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= TX_IDLE;
      shreg   <= '0;
      bitcnt  <= '0;
      tx_data <= 1'b1;
      tx_done <= 1'b0;
    end else begin
      tx_done <= 1'b0;
      unique case (state)
        TX_IDLE: begin
          tx_data <= 1'b1;
          if (tx_start) begin
            shreg <= enc_data;
            state <= TX_ARM;
          end
        end
        TX_ARM: if (baud_tick) begin
          tx_data <= 1'b0;
          state   <= TX_START;
        end
        TX_START: if (baud_tick) begin
          tx_data <= shreg[0];
          shreg   <= shreg >> 1;
          bitcnt  <= '0;
          state   <= TX_DATA;
        end
        TX_DATA: if (baud_tick) begin
          if (bitcnt == 3'(DATA_BITS - 1)) begin
            tx_data <= 1'b1;
            tx_done <= 1'b1;
            state   <= TX_STOP;
          end else begin
            tx_data <= shreg[0];
            shreg   <= shreg >> 1;
            bitcnt  <= bitcnt + 1'b1;
          end
        end
        TX_STOP: if (baud_tick) state <= TX_IDLE;
        default: state <= TX_IDLE;
      endcase
    end
  end

  always_comb tx_busy = (state != TX_IDLE);

  // The line must rest high whenever no frame is being sent.
  a_idle_high: assert property (@(posedge clk) disable iff (rst)
                                (state == TX_IDLE || state == TX_ARM) |-> tx_data);
  // tx_done is a single-clock pulse.
  a_done_pulse: assert property (@(posedge clk) disable iff (rst)
                                 tx_done |=> !tx_done);

endmodule
