// sig_tester: the comparator ("tester") at the end of the BIST path.
//
// When `check` is high it compares the signature rebuilt by MISR_RX from the
// received data (`sig_calc`) with the signature that came over the line
// (`sig_recv`) and sets `error` if they differ, or if the rebuilt signature
// is not complete yet (`calc_valid` low). `error` then holds until `clear`
// (a new frame starts) or reset. Both inputs are registered, so `error`
// changes on the clock edge after `check`.
//
// The document gives the comparison and the error pin; the hold-until-next-
// frame behaviour and the treatment of an incomplete signature are this
// design's choices.
module sig_tester
  import bist_uart_pkg::*;
(
  input  logic clk,
  input  logic rst,          // synchronous, active high
  input  logic clear,        // new frame: drop the old verdict
  input  logic check,        // compare now
  input  logic calc_valid,   // sig_calc is complete
  input  sig_t sig_calc,     // from MISR_RX
  input  sig_t sig_recv,     // from the receiver's store register
  output logic error
);

  always_ff @(posedge clk) begin
    if (rst)        error <= 1'b0;
    else if (check) error <= !calc_valid || (sig_calc != sig_recv);
    else if (clear) error <= 1'b0;
  end

endmodule
