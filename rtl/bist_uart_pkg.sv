// bist_uart_pkg: constants and types shared by the BIST UART.
//
// The UART moves one byte per frame, LSB first, one bit per clock. In MISR
// mode an 8-bit signature follows the data bits in the same frame. The
// signature is formed by an 8-stage multiple input signature register (MISR)
// that is clocked a fixed number of times (5) with the data byte held on its
// parallel inputs.
//
// Byte width, signature width and the 5-cycle signature time are the
// document's figures. The feedback polynomial is this design's choice: the
// value below is the one that reproduces the published example (data 8'hAA
// gives the signature bits 1,0,1,0,0,0,0,0 on the line, LSB first, i.e.
// 8'h05).
package bist_uart_pkg;

  localparam int unsigned DATA_BITS  = 8;   // data frame, LSB to MSB
  localparam int unsigned SIG_BITS   = 8;   // signature word = number of MISR stages
  localparam int unsigned SIG_CYCLES = 5;   // clocks to build the signature

  // Feedback taps of the MISR: bit i set means the last stage (Q7) is folded
  // into the input of stage i. 8'hD9 = x^8 + x^7 + x^6 + x^4 + x^3 + 1.
  localparam logic [SIG_BITS-1:0] MISR_POLY = 8'hD9;

  typedef logic [DATA_BITS-1:0] data_t;
  typedef logic [SIG_BITS-1:0]  sig_t;

  // Operating mode, taken from the mode pin at the start of a frame.
  typedef enum logic {
    MODE_NORMAL = 1'b0,   // start, 8 data bits, stop
    MODE_MISR   = 1'b1    // start, 8 data bits, 8 signature bits, stop
  } uart_mode_e;

  // Number of bits between start and stop bit for a given mode.
  function automatic int unsigned payload_bits(uart_mode_e m);
    return (m == MODE_MISR) ? DATA_BITS + SIG_BITS : DATA_BITS;
  endfunction

endpackage
