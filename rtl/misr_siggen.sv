// misr_siggen: signature generator, used twice in the UART: as MISR_TX on
// the byte being sent and as MISR_RX on the byte just received.
//
// A `start` pulse empties the MISR and arms a down-counter. On each of the
// next CYCLES clocks the MISR compacts `d`, which the caller must hold steady
// over that time. After the last of them `valid` goes high and `signature`
// holds the result until the next `start`. 
//
// Timing: start on edge n; d is compacted on edges n+1 .. n+CYCLES; valid and
// the final signature are seen after edge n+CYCLES, i.e. CYCLES clocks after
// start. The 5-clock time is the document's; holding the data on the
// parallel inputs for that time and the start/valid handshake are this
// design's choices.
module misr_siggen
  import bist_uart_pkg::*;
#(
  parameter int unsigned       WIDTH  = SIG_BITS,
  parameter int unsigned       CYCLES = SIG_CYCLES,
  parameter logic [WIDTH-1:0]  POLY   = MISR_POLY
) (
  input  logic             clk,
  input  logic             rst,        // synchronous, active high
  input  logic             start,      // begin a new signature
  input  logic [WIDTH-1:0] d,          // word to compact, held until valid
  output logic             valid,      // signature complete
  output logic [WIDTH-1:0] signature
);

  localparam int unsigned CW = $clog2(CYCLES + 1);

  logic [CW-1:0] remaining;

  always_ff @(posedge clk) begin
    if (rst) begin
      remaining <= '0;
      valid     <= 1'b0;
    end else if (start) begin
      remaining <= CW'(CYCLES);
      valid     <= 1'b0;
    end else if (remaining != '0) begin
      remaining <= remaining - 1'b1;
      valid     <= (remaining == CW'(1));
    end
  end

  logic busy;
  assign busy = (remaining != '0);

  misr #(.WIDTH(WIDTH), .POLY(POLY)) u_misr (
    .clk   (clk),
    .rst   (rst),
    .clear (start),
    .en    (busy),
    .d     (d),
    .q     (signature)
  );

endmodule
