// tb_misr: self-checking test of the 8-stage signature register.
//
// Checks the document's example (8'hAA held for 5 clocks gives 8'h05), then
// random words with random enable and clear against the reference model,
// clear taking priority over enable, and the hold when enable is low.
module tb_misr;
  import tb_misr_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst, clear, en;
  logic [7:0] d, q, model;
  int         checks = 0, failures = 0;

  misr dut (.clk(clk), .rst(rst), .clear(clear), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; clear = 1'b0; en = 1'b0; d = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    check("after reset", q, 8'h00);

    // Document example: AA, five clocks.
    d = 8'hAA; en = 1'b1;
    repeat (5) @(posedge clk);
    #1 check("signature of AA", q, 8'h05);
    check("model agrees on AA", misr_sig(8'hAA), 8'h05);

    // Hold.
    en = 1'b0; d = 8'h3C;
    repeat (3) @(posedge clk);
    #1 check("hold", q, 8'h05);

    // Clear beats enable.
    clear = 1'b1; en = 1'b1;
    @(posedge clk); #1;
    check("clear", q, 8'h00);
    clear = 1'b0;

    // Random run against the model.
    model = '0;
    for (int n = 0; n < 500; n++) begin
      d     = 8'($urandom);
      en    = ($urandom % 4) != 0;
      clear = ($urandom % 16) == 0;
      @(posedge clk); #1;
      if (clear)   model = '0;
      else if (en) model = misr_step(model, d);
      check("random", q, model);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
