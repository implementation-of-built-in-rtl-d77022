// uart_tx: UART transmitter with an optional signature field.
//
// A high `write` while `txrdy` is high captures `parallel_in` and the `mode`
// pin. The transmitter then waits for `cts` (clear to send) to be high and
// sends one frame on `serial_out`: a low start bit, the 8 data bits LSB
// first, in MISR mode the 8 signature bits LSB first, and a high stop bit.
// The line rests high between frames. One bit lasts one clock: the clock is
// the bit clock (the document runs it at 9600 Hz for 9600 bit/s).
//
// In MISR mode the capture edge also pulses `sig_start`, which starts the
// signature generator (MISR_TX) on the captured byte `tx_data`. The
// generator needs 5 clocks; the signature is first needed at the ninth bit
// after the start bit, so it never delays the frame.
//
// Timing (clock edges): write seen on edge w; start bit driven from the first
// edge on which cts is high after w (at the earliest w+1); data bit i from
// that edge + 1 + i; signature bit j from that edge + 9 + j; stop bit after
// the last payload bit. txrdy is low from edge w until the edge that puts
// the stop bit on the line, so the next byte can be written during the stop
// bit; the stop bit then lasts at least two clocks.
//
// From the document: pin names and meanings, frame format, LSB-first order,
// write held high for at least one clock, cts gating transmission, and mode
// selecting MISR frames. This design's own choices: cts is looked at only
// before the start bit, a write while busy is ignored, and mode is latched
// with the data.
module uart_tx
  import bist_uart_pkg::*;
(
  input  logic  clk,
  input  logic  rst,          // synchronous, active high
  // CPU side
  input  data_t parallel_in,
  input  logic  write,
  input  logic  mode,         // 1 = MISR mode, 0 = normal
  output logic  txrdy,        // ready to take a byte
  // line side
  input  logic  cts,          // clear to send
  output logic  serial_out,
  // signature generator (MISR_TX)
  output logic  sig_start,
  output data_t tx_data,      // captured byte, held for the generator
  input  sig_t  signature,
  input  logic  sig_valid
);

  typedef enum logic [1:0] {
    TX_IDLE,    // line high, txrdy high
    TX_WAIT,    // byte captured, waiting for cts
    TX_BITS,    // payload bits on the line
    TX_STOP     // stop bit on the line
  } tx_state_e;

  localparam int unsigned NPAY = DATA_BITS + SIG_BITS;

  tx_state_e                   state;
  uart_mode_e                  mode_q;
  logic [$clog2(NPAY)-1:0]     idx;
  logic [NPAY-1:0]             payload;

  assign payload   = {signature, tx_data};
  assign txrdy     = (state == TX_IDLE);
  assign sig_start = (state == TX_IDLE) && write && mode;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= TX_IDLE;
      mode_q     <= MODE_NORMAL;
      idx        <= '0;
      tx_data    <= '0;
      serial_out <= 1'b1;
    end else begin
      unique case (state)
        TX_IDLE: begin
          serial_out <= 1'b1;
          if (write) begin
            tx_data <= parallel_in;
            mode_q  <= uart_mode_e'(mode);
            state   <= TX_WAIT;
          end
        end
        TX_WAIT: begin
          if (cts) begin
            serial_out <= 1'b0;          // start bit
            idx        <= '0;
            state      <= TX_BITS;
          end
        end
        TX_BITS: begin
          serial_out <= payload[idx];
          if (32'(idx) == payload_bits(mode_q) - 1) state <= TX_STOP;
          else                                      idx   <= idx + 1'b1;
        end
        TX_STOP: begin
          serial_out <= 1'b1;            // stop bit
          state      <= TX_IDLE;
        end
        default: state <= TX_IDLE;
      endcase
    end
  end

  // The signature must be complete before its first bit is put on the line.
  a_sig_ready: assert property (@(posedge clk) disable iff (rst)
    (state == TX_BITS && mode_q == MODE_MISR && 32'(idx) >= DATA_BITS) |-> sig_valid);

endmodule
