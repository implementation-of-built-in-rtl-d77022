// tb_uart_tx: self-checking test of the transmitter.
//
// A small stand-in for MISR_TX (a misr_siggen instance) supplies the
// signature, as in the full design. For each byte the testbench writes it
// with a one-clock write pulse, holds cts low for a chosen number of clocks,
// then follows serial_out clock by clock: the start bit must appear on the
// clock after cts is seen high, then the data bits LSB first, in MISR mode
// the signature bits LSB first, then one stop bit, with which txrdy rises.
// It also checks the document's two example frames for 8'hAA, that a write
// while busy is ignored, and that cts is only looked at before the start
// bit.
module tb_uart_tx;
  import tb_misr_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst, write, mode, cts, txrdy, serial_out;
  logic       sig_start, sig_valid;
  logic [7:0] parallel_in, tx_data, sig;
  int         checks = 0, failures = 0;

  uart_tx dut (
    .clk(clk), .rst(rst), .parallel_in(parallel_in), .write(write), .mode(mode),
    .txrdy(txrdy), .cts(cts), .serial_out(serial_out),
    .sig_start(sig_start), .tx_data(tx_data), .signature(sig), .sig_valid(sig_valid)
  );

  misr_siggen u_sig (.clk(clk), .rst(rst), .start(sig_start), .d(tx_data),
                     .valid(sig_valid), .signature(sig));

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Sends one byte and returns the payload bits in line order (first bit
  // in the most significant position of the used width).
  task automatic send(input logic [7:0] b, input logic m, input int delay,
                      input bit poke_busy, output logic [15:0] line);
    logic [15:0] pay;
    int          n;
    pay  = {misr_sig(b), b};
    n    = m ? 16 : 8;
    line = '0;
    while (!txrdy) begin @(posedge clk); #1; end
    parallel_in = b; mode = m; write = 1'b1; cts = (delay == 0);
    @(posedge clk); #1;
    write = 1'b0; parallel_in = ~b; mode = ~m;
    check("txrdy low after write", txrdy, 0);
    repeat (delay) begin
      check("line idle while cts low", serial_out, 1);
      @(posedge clk); #1;
    end
    cts = 1'b1;
    @(posedge clk); #1;
    check("start bit", serial_out, 0);
    cts = 1'b0;                            // not looked at after the start bit
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      line = {line[14:0], serial_out};
      check($sformatf("payload bit %0d", i), serial_out, pay[i]);
      check("txrdy low in frame", txrdy, 0);
      if (poke_busy && i == 3) begin
        write = 1'b1; parallel_in = 8'h5A;
      end else begin
        write = 1'b0;
      end
    end
    @(posedge clk); #1;
    check("stop bit", serial_out, 1);
    check("txrdy back with the stop bit", txrdy, 1);
    @(posedge clk); #1;
    check("line idle", serial_out, 1);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] line;
    rst = 1'b1; write = 1'b0; mode = 1'b0; cts = 1'b0; parallel_in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check("idle line after reset", serial_out, 1);
    check("txrdy after reset", txrdy, 1);

    // Document examples for 8'hAA.
    send(8'hAA, 1'b0, 0, 1'b0, line);
    check("normal frame of AA", line[7:0], 8'b01010101);
    send(8'hAA, 1'b1, 2, 1'b0, line);
    check("MISR frame of AA", line, 16'b0101010110100000);

    // A write while busy is ignored: no second frame follows.
    send(8'h3C, 1'b1, 1, 1'b1, line);
    write = 1'b0; cts = 1'b1;
    repeat (25) begin
      @(posedge clk); #1;
      check("no frame from ignored write", serial_out, 1);
    end
    cts = 1'b0;

    for (int k = 0; k < 60; k++)
      send(8'($urandom), 1'($urandom), int'($urandom % 4), 1'b0, line);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
