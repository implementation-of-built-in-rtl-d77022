// tb_bist_uart: end-to-end test of the BIST UART in loopback.
//
// serial_out is wired back to serial_in through a line model that can flip
// one chosen bit of a frame, and ctr drives cts through a gate that the
// testbench can close to hold the transmitter back. The clock runs at the
// bit rate of 9600 bit/s (period 104.167 us). Each transfer writes a byte
// with a one-clock write pulse and checks:
//   - the bit time on the line (104.167 us) and the frame length: the
//     receiver reports the byte n+2 clocks after the start bit is driven,
//     n = 8 (normal) or 16 (MISR) payload bits;
//   - the received byte, including a corrupted one;
//   - the error pin against a signature worked out by the testbench's own
//     MISR model from the received data and compared with the signature the
//     transmitter was expected to send;
//   - that error drops again at the next start bit.
// The document's examples are run first: 8'hAA in normal mode, in MISR mode
// without error, and in MISR mode with data bit 5 flipped (received as
// 8'h8A, error high). Then random bytes, modes, flips and cts holds.
// Each mechanism is counted and must occur at least once: normal frame,
// MISR frame, error raised, error-free MISR frame, cts hold, mode switch
// between frames, write ignored while busy.
module tb_bist_uart;
  import tb_misr_ref_pkg::*;

  localparam realtime BIT_TIME = 104167ns;

  logic       clk = 1'b0;
  logic       reset, mode, write, cts, serial_out, serial_in, ctr;
  logic       txrdy, rxrdy, error;
  logic [7:0] parallel_in, parallel_out;
  logic       cts_gate, flip;
  int         checks = 0, failures = 0;

  int n_normal = 0, n_misr = 0, n_error = 0, n_clean = 0, n_stall = 0;
  int n_switch = 0, n_ignored = 0;
  logic last_mode = 1'b0;

  bist_uart dut (
    .clk(clk), .reset(reset), .mode(mode),
    .parallel_in(parallel_in), .write(write), .txrdy(txrdy),
    .cts(cts), .serial_out(serial_out),
    .serial_in(serial_in), .ctr(ctr), .parallel_out(parallel_out),
    .rxrdy(rxrdy), .error(error)
  );

  assign serial_in = serial_out ^ flip;
  assign cts       = ctr & cts_gate;

  always #(BIT_TIME / 2) clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // One transfer. inject < 0: clean line; otherwise payload bit `inject`
  // is flipped. hold: clocks for which cts is held low after the write.
  // poke_busy: pulse write with another byte in the middle of the frame.
  task automatic xfer(input logic [7:0] b, input logic m, input int inject,
                      input int hold, input bit poke_busy);
    int          n, cyc;
    logic [15:0] pay, got;
    logic [7:0]  exp_data, exp_sig_calc;
    realtime     t0;
    n   = m ? 16 : 8;
    pay = {misr_sig(b), b};
    if (inject >= 0) pay[inject] = ~pay[inject];
    exp_data     = pay[7:0];
    exp_sig_calc = misr_sig(exp_data);

    while (!txrdy) begin @(posedge clk); #1; end
    if (m != last_mode) n_switch++;
    last_mode = m;
    parallel_in = b; mode = m; write = 1'b1; cts_gate = (hold == 0);
    @(posedge clk); #1;
    write = 1'b0; parallel_in = ~b;
    if (hold > 0) n_stall++;
    repeat (hold) begin
      check("line idle while cts held", serial_out, 1);
      @(posedge clk); #1;
    end
    cts_gate = 1'b1;
    cyc = 0;
    while (serial_out && cyc < 50) begin @(posedge clk); #1; cyc++; end
    check("start bit within a clock of cts", cyc, 1);
    t0 = $realtime;
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      if (i == 0) begin
        check("bit time in ns", 32'(int'($realtime - t0)), 32'd104167);
        check("error drops at start bit", error, 0);
      end
      got[i] = serial_out;
      flip   = (i == inject);
      if (poke_busy && i == 4) begin
        write = 1'b1; parallel_in = 8'hC3;
        n_ignored++;
      end else begin
        write = 1'b0;
      end
    end
    @(posedge clk); #1;
    flip = 1'b0;
    check("stop bit", serial_out, 1);
    if (m) check("sent signature", got[15:8], misr_sig(b));
    check("sent data", got[7:0], b);
    cyc = n + 1;
    while (!rxrdy && cyc < 40) begin @(posedge clk); #1; cyc++; end
    check("clocks from start bit to rxrdy", cyc, n + 2);
    check("received byte", parallel_out, exp_data);
    @(posedge clk); #1;
    if (m) begin
      logic exp_err;
      exp_err = (exp_sig_calc != pay[15:8]);
      check("error pin", error, exp_err);
      if (exp_err) n_error++; else n_clean++;
      n_misr++;
    end else begin
      check("no error in normal mode", error, 0);
      n_normal++;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int counts[7];
    reset = 1'b1; mode = 1'b0; write = 1'b0; parallel_in = '0;
    cts_gate = 1'b0; flip = 1'b0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    check("line idle after reset", serial_out, 1);
    check("txrdy after reset", txrdy, 1);
    check("ctr after reset", ctr, 1);
    check("error after reset", error, 0);

    // Document examples.
    xfer(8'hAA, 1'b0, -1, 0, 1'b0);
    xfer(8'hAA, 1'b1, -1, 3, 1'b0);
    check("AA clean: no error", error, 0);
    xfer(8'hAA, 1'b1, 5, 0, 1'b0);
    check("AA with bit 5 flipped: received 8A", parallel_out, 8'h8A);
    check("AA with bit 5 flipped: error", error, 1);

    xfer(8'h96, 1'b1, -1, 0, 1'b1);            // write ignored while busy
    for (int k = 0; k < 60; k++)
      xfer(8'($urandom), 1'($urandom),
           ($urandom % 3 == 0) ? int'($urandom % 16) : -1,
           ($urandom % 4 == 0) ? int'(1 + $urandom % 3) : 0,
           1'($urandom % 8 == 0));

    counts = '{n_normal, n_misr, n_error, n_clean, n_stall, n_switch, n_ignored};
    $display("mechanisms: normal=%0d misr=%0d error=%0d clean=%0d cts_hold=%0d",
             n_normal, n_misr, n_error, n_clean, n_stall);
    $display("            mode_switch=%0d write_ignored=%0d", n_switch, n_ignored);
    foreach (counts[i]) begin
      checks++;
      if (counts[i] == 0) begin
        failures++;
        $display("FAIL mechanism %0d never happened", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
