// misr: multiple input signature register, a chain of D flip-flops with XOR
// gates in the feedback path.
//
// Each clock with `en` high, stage i takes the XOR of its parallel input d[i],
// the previous stage's output q[i-1] (nothing for stage 0) and, where POLY
// has bit i set, the last stage's output q[WIDTH-1]. With POLY = 0 it is a
// plain shift register that XORs in the input word; the feedback taps turn it
// into a signature compactor. `clear` empties the register and takes
// priority over `en`. Reset is synchronous and active high.
//
// Interface: d is sampled on the rising edge of clk; q is the register
// itself, so the new signature is visible one clock after each enabled edge.
//
// The document gives the structure (8 stages, D flip-flops, XOR gates in the
// feedback, the number of flip-flops setting the signature width) but not
// the tap positions; the default comes from the package and is chosen to
// reproduce the document's example signature.
module misr
  import bist_uart_pkg::*;
#(
  parameter int unsigned       WIDTH = SIG_BITS,
  parameter logic [WIDTH-1:0]  POLY  = MISR_POLY
) (
  input  logic             clk,
  input  logic             rst,     // synchronous, active high
  input  logic             clear,   // empty the register
  input  logic             en,      // compact d into the register
  input  logic [WIDTH-1:0] d,       // parallel inputs D0..D(WIDTH-1)
  output logic [WIDTH-1:0] q        // stage outputs Q0..Q(WIDTH-1)
);

  logic [WIDTH-1:0] q_next;

  always_comb begin
    q_next = {q[WIDTH-2:0], 1'b0} ^ d;
    if (q[WIDTH-1]) q_next ^= POLY;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) q <= '0;
    else if (en)      q <= q_next;
  end

endmodule
