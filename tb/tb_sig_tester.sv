// tb_sig_tester: self-checking test of the signature comparator.
//
// Random sequences of clear, check, valid flag and signature pairs (half of
// them equal) against a reference of the verdict register: on check the
// error is set when the signatures differ or the rebuilt one is incomplete,
// on clear it is dropped, otherwise it holds.
module tb_sig_tester;
  logic       clk = 1'b0;
  logic       rst, clear, check_i, calc_valid, error, model;
  logic [7:0] sig_calc, sig_recv;
  int         checks = 0, failures = 0;
  int         n_err = 0, n_ok = 0;

  sig_tester dut (.clk(clk), .rst(rst), .clear(clear), .check(check_i),
                  .calc_valid(calc_valid), .sig_calc(sig_calc),
                  .sig_recv(sig_recv), .error(error));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; clear = 1'b0; check_i = 1'b0; calc_valid = 1'b0;
    sig_calc = '0; sig_recv = '0;
    @(posedge clk); #1;
    rst = 1'b0; model = 1'b0;
    checks++; if (error !== 1'b0) failures++;
    for (int n = 0; n < 1000; n++) begin
      clear      = ($urandom % 5) == 0;
      check_i    = ($urandom % 3) == 0;
      calc_valid = ($urandom % 8) != 0;
      sig_calc   = 8'($urandom);
      sig_recv   = ($urandom % 2) ? sig_calc : 8'($urandom);
      @(posedge clk); #1;
      if (check_i)    model = !calc_valid || (sig_calc != sig_recv);
      else if (clear) model = 1'b0;
      if (check_i && model) n_err++;
      if (check_i && !model) n_ok++;
      checks++;
      if (error !== model) begin
        failures++;
        $display("FAIL step %0d: error=%0b expected %0b", n, error, model);
      end
    end
    if (n_err == 0 || n_ok == 0) begin
      failures++;
      $display("FAIL both verdicts must occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
