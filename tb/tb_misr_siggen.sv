// tb_misr_siggen: self-checking test of the 5-clock signature generator.
//
// For the document's byte 8'hAA and random bytes: pulses start, counts the
// clocks until valid (must be 5), compares the signature with the
// reference model, and checks that valid and the signature hold afterwards
// and that a new start drops valid at once.
module tb_misr_siggen;
  import tb_misr_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst, start, valid;
  logic [7:0] d, sig;
  int         checks = 0, failures = 0;

  misr_siggen dut (.clk(clk), .rst(rst), .start(start), .d(d),
                   .valid(valid), .signature(sig));

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic run(logic [7:0] byte_in);
    int cycles = 0;
    d = byte_in; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    check("valid drops on start", valid, 0);
    while (!valid && cycles < 20) begin
      @(posedge clk); #1;
      cycles++;
    end
    check("clocks to signature", cycles, 5);
    check("signature", sig, misr_sig(byte_in));
    d = ~byte_in;                     // inputs no longer matter
    repeat (3) @(posedge clk);
    #1 check("signature holds", sig, misr_sig(byte_in));
    check("valid holds", valid, 1);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; start = 1'b0; d = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check("not valid after reset", valid, 0);
    run(8'hAA);
    check("document signature of AA", sig, 8'h05);
    for (int n = 0; n < 100; n++) run(8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
