// tb_uart_rx: self-checking test of the receiver.
//
// Drives serial_in one bit per clock with frames built by the testbench:
// normal frames and MISR frames whose signature field is either the
// reference signature or a random word. Checks ctr and rxrdy around the
// frame, the frame_start and sig_start strobes on the clock they are due,
// and, on the clock after the stop bit, parallel_out, the store register's
// data and signature parts and the one-clock frame_done pulse. Frames are
// sent with idle gaps of 0 to 3 clocks.
module tb_uart_rx;
  import tb_misr_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst, serial_in, ctr, mode, rxrdy;
  logic       frame_start, sig_start, frame_done, frame_misr;
  logic [7:0] parallel_out, rx_data, rx_sig;
  int         checks = 0, failures = 0;

  uart_rx dut (
    .clk(clk), .rst(rst), .serial_in(serial_in), .ctr(ctr), .mode(mode),
    .parallel_out(parallel_out), .rxrdy(rxrdy), .frame_start(frame_start),
    .sig_start(sig_start), .rx_data(rx_data), .rx_sig(rx_sig),
    .frame_done(frame_done), .frame_misr(frame_misr)
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic frame(input logic [7:0] b, input logic m, input logic [7:0] s,
                       input int gap);
    logic [15:0] pay;
    int          n;
    pay = {s, b};
    n   = m ? 16 : 8;
    repeat (gap) begin
      serial_in = 1'b1;
      @(posedge clk); #1;
      check("ctr high when idle", ctr, 1);
    end
    serial_in = 1'b0; mode = m;
    #1 check("frame_start strobe", frame_start, 1);
    @(posedge clk); #1;
    mode = ~m;                               // latched at the start bit
    check("ctr low in frame", ctr, 0);
    check("rxrdy drops at start bit", rxrdy, 0);
    check("frame kind", frame_misr, m);
    for (int i = 0; i < n; i++) begin
      serial_in = pay[i];
      check("sig_start only after 8th data bit", sig_start, m && i == 7);
      check("no frame_start in frame", frame_start, 0);
      @(posedge clk); #1;
    end
    serial_in = 1'b1;                        // stop bit
    check("no frame_done before stop", frame_done, 0);
    @(posedge clk); #1;
    check("parallel_out", parallel_out, b);
    check("rx_data", rx_data, b);
    if (m) check("rx_sig", rx_sig, s);
    check("rxrdy", rxrdy, 1);
    check("frame_done", frame_done, 1);
    check("ctr back", ctr, 1);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    rst = 1'b1; serial_in = 1'b1; mode = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check("ctr after reset", ctr, 1);
    check("rxrdy after reset", rxrdy, 0);
    frame(8'hAA, 1'b0, 8'h00, 2);
    frame(8'hAA, 1'b1, 8'h05, 1);
    @(posedge clk); #1;
    check("frame_done is one clock", frame_done, 0);
    check("rxrdy holds", rxrdy, 1);
    check("parallel_out holds", parallel_out, 8'hAA);
    for (int k = 0; k < 80; k++) begin
      b = 8'($urandom);
      frame(b, 1'($urandom), ($urandom % 2) ? misr_sig(b) : 8'($urandom),
            int'($urandom % 4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
