// uart_rx: UART receiver with an optional signature field.
//
// While idle (`ctr`, clear to receive, high) the receiver samples
// `serial_in` on every clock and takes the first low sample as a start bit.
// It then samples one bit per clock: 8 data bits LSB first and, if `mode`
// was high at the start bit, 8 signature bits LSB first, and finally the
// stop bit. When the stop bit is sampled, the data byte appears on
// `parallel_out`, `rxrdy` goes high and `frame_done` pulses for one clock
// with the received signature on `rx_sig`.
//
// As soon as the 8th data bit is in, `sig_start` pulses so that the
// signature generator (MISR_RX) can rebuild the signature from `rx_data`
// while the signature bits are still arriving.
//
// Timing: start bit sampled on edge s; data bit i on edge s+1+i; signature
// bit j on edge s+9+j; stop bit on edge s+9 (normal) or s+17 (MISR), which is
// also the edge that updates parallel_out, rxrdy and frame_done.
//
// The clock is the bit clock, one sample per bit, as in the document, where
// the serial line is looped back from the transmitter on the same clock.
// From the document: the idle wait for a high-to-low transition, the store
// register, the parallel output and the rxrdy/ctr pins. This design's own
// choices: rxrdy stays high until the next start bit, the stop bit's value
// is not checked, and mode is latched at the start bit.
module uart_rx
  import bist_uart_pkg::*;
(
  input  logic  clk,
  input  logic  rst,          // synchronous, active high
  // line side
  input  logic  serial_in,
  output logic  ctr,          // clear to receive
  // CPU side
  input  logic  mode,         // 1 = MISR mode, 0 = normal
  output data_t parallel_out,
  output logic  rxrdy,        // a received byte is on parallel_out
  // towards MISR_RX and the tester
  output logic  frame_start,  // start bit seen
  output logic  sig_start,    // data byte complete
  output data_t rx_data,      // store register, data part
  output sig_t  rx_sig,       // store register, signature part
  output logic  frame_done,   // stop bit sampled
  output logic  frame_misr    // the frame being / last received was a MISR frame
);

  typedef enum logic [1:0] {
    RX_IDLE,
    RX_BITS,
    RX_STOP
  } rx_state_e;

  localparam int unsigned NPAY = DATA_BITS + SIG_BITS;

  rx_state_e               state;
  uart_mode_e              mode_q;
  logic [$clog2(NPAY)-1:0] idx;
  logic [NPAY-1:0]         store;

  assign ctr         = (state == RX_IDLE);
  assign frame_start = (state == RX_IDLE) && !serial_in;
  assign sig_start   = (state == RX_BITS) && mode_q == MODE_MISR
                       && 32'(idx) == DATA_BITS - 1;
  assign rx_data     = store[DATA_BITS-1:0];
  assign rx_sig      = store[NPAY-1:DATA_BITS];
  assign frame_misr  = (mode_q == MODE_MISR);

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= RX_IDLE;
      mode_q       <= MODE_NORMAL;
      idx          <= '0;
      store        <= '0;
      parallel_out <= '0;
      rxrdy        <= 1'b0;
      frame_done   <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      unique case (state)
        RX_IDLE: begin
          if (!serial_in) begin
            mode_q <= uart_mode_e'(mode);
            idx    <= '0;
            rxrdy  <= 1'b0;
            state  <= RX_BITS;
          end
        end
        RX_BITS: begin
          store[idx] <= serial_in;
          if (32'(idx) == payload_bits(mode_q) - 1) state <= RX_STOP;
          else                                      idx   <= idx + 1'b1;
        end
        RX_STOP: begin
          parallel_out <= rx_data;
          rxrdy        <= 1'b1;
          frame_done   <= 1'b1;
          state        <= RX_IDLE;
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

endmodule
