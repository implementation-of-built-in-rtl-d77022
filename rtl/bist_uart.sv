// bist_uart: UART with built-in self test by signature.
//
// In normal mode (mode = 0) it is a plain UART: a byte written on
// parallel_in is sent on serial_out as start bit, 8 data bits LSB first and
// stop bit, and a frame arriving on serial_in is turned back into a byte on
// parallel_out. In MISR mode (mode = 1) the transmitter's signature
// generator (MISR_TX) compacts the byte into an 8-bit signature, which is
// sent right after the data bits in the same frame. The receiver's generator
// (MISR_RX) rebuilds the signature from the received data, and the tester
// compares the two and raises `error` if they differ.
//
// Blocks and connections follow the document's block diagram: MISR_TX
// between parallel input and transmitter, MISR_RX between receiver and
// tester, the tester driving the error pin. Pins follow its pin table. For
// a loopback test, tie serial_out to serial_in and ctr to cts.
//
// Timing: one bit per clock (the clock is the bit clock), 10 bits per
// normal frame and 18 per MISR frame; the signature takes 5 clocks and is
// built while the data bits are on the line, so it adds no time. `error` is
// valid from the clock after the receiver's rxrdy rises and holds until the
// next start bit. Reset is synchronous and active high.
module bist_uart
  import bist_uart_pkg::*;
(
  input  logic  clk,
  input  logic  reset,        // clears all control logic and registers
  input  logic  mode,         // 1 = MISR mode, 0 = normal mode
  // transmitter
  input  data_t parallel_in,
  input  logic  write,
  output logic  txrdy,
  input  logic  cts,
  output logic  serial_out,
  // receiver
  input  logic  serial_in,
  output logic  ctr,
  output data_t parallel_out,
  output logic  rxrdy,
  output logic  error
);

  // MISR_TX
  logic  tx_sig_start, tx_sig_valid;
  data_t tx_data;
  sig_t  tx_sig;

  // MISR_RX
  logic  rx_sig_start, rx_sig_valid;
  data_t rx_data;
  sig_t  rx_sig_line, rx_sig_calc;
  logic  rx_frame_start, rx_frame_done, rx_frame_misr;

  uart_tx u_tx (
    .clk         (clk),
    .rst         (reset),
    .parallel_in (parallel_in),
    .write       (write),
    .mode        (mode),
    .txrdy       (txrdy),
    .cts         (cts),
    .serial_out  (serial_out),
    .sig_start   (tx_sig_start),
    .tx_data     (tx_data),
    .signature   (tx_sig),
    .sig_valid   (tx_sig_valid)
  );

  misr_siggen u_misr_tx (
    .clk       (clk),
    .rst       (reset),
    .start     (tx_sig_start),
    .d         (tx_data),
    .valid     (tx_sig_valid),
    .signature (tx_sig)
  );

  uart_rx u_rx (
    .clk          (clk),
    .rst          (reset),
    .serial_in    (serial_in),
    .ctr          (ctr),
    .mode         (mode),
    .parallel_out (parallel_out),
    .rxrdy        (rxrdy),
    .frame_start  (rx_frame_start),
    .sig_start    (rx_sig_start),
    .rx_data      (rx_data),
    .rx_sig       (rx_sig_line),
    .frame_done   (rx_frame_done),
    .frame_misr   (rx_frame_misr)
  );

  misr_siggen u_misr_rx (
    .clk       (clk),
    .rst       (reset),
    .start     (rx_sig_start),
    .d         (rx_data),
    .valid     (rx_sig_valid),
    .signature (rx_sig_calc)
  );

  sig_tester u_tester (
    .clk        (clk),
    .rst        (reset),
    .clear      (rx_frame_start),
    .check      (rx_frame_done && rx_frame_misr),
    .calc_valid (rx_sig_valid),
    .sig_calc   (rx_sig_calc),
    .sig_recv   (rx_sig_line),
    .error      (error)
  );

endmodule
