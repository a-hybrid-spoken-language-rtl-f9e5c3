// tb_uart_tx: serial transmitter at 9600 baud from 50 MHz (5208 clocks/bit).
// Offers random bytes back to back and with gaps, decodes the line at
// mid-bit, checks every bit lasts 5208 clocks, the stop bit is high and
// ready stays low for exactly 10 bit times per frame.
`timescale 1ns/1ps
module tb_uart_tx;
  localparam int CPB = 5208;
  logic clk = 0, rst_n = 0, valid = 0, ready, txd;
  logic [7:0] data = 0;
  always #10 clk = ~clk;
  uart_tx dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] sent[$];
  int nrx = 0;
  // line decoder
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      check(txd == 0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      check(txd == 1, "stop bit");
      check(sent.size() > 0 && b == sent.pop_front(), $sformatf("byte %02h", b));
      nrx++;
    end
  end

  // every line level lasts a whole number of bit times
  int cyc = 0, last_edge = 0;
  logic txd_q = 1;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && txd != txd_q) begin
      if (txd == 1'b1)      // a low level ended: start bit and zero data bits
        check((cyc - last_edge) % CPB == 0, $sformatf("level of %0d cycles", cyc - last_edge));
      last_edge = cyc;
    end
    txd_q <= txd;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    last_edge = cyc;
    for (int k = 0; k < 10; k++) begin
      int t0;
      @(negedge clk);
      data = (k == 0) ? 8'h55 : 8'($urandom);
      valid = 1;
      check(ready, "ready when idle or at frame end");
      sent.push_back(data);
      @(negedge clk);
      valid = 0;
      t0 = 1;
      while (!ready) begin @(negedge clk); t0++; end
      check(t0 == 10 * CPB, $sformatf("frame length %0d", t0));
      if (k % 3 == 2) repeat ($urandom_range(1, 2 * CPB)) @(negedge clk);
    end
    repeat (12 * CPB) @(posedge clk);
    check(nrx == 10, $sformatf("received %0d bytes", nrx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
