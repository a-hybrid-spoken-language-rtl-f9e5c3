// tb_uart_rx: serial receiver at 9600 baud from 50 MHz (5208 clocks/bit).
// Sends random bytes, with random idle gaps, and checks each received byte
// and that it is delivered between 9 and 10 bit times after the start edge.
// A frame with a low stop bit must raise frame_err and deliver nothing.
`timescale 1ns/1ps
module tb_uart_rx;
  localparam int CPB = 5208;
  logic clk = 0, rst_n = 0, rxd = 1, valid, frame_err;
  logic [7:0] data;
  always #10 clk = ~clk;
  uart_rx dut (.*);

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

  task automatic send(logic [7:0] b, bit stop);
    rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk); end
    rxd = stop; repeat (CPB) @(posedge clk);
    rxd = 1;
  endtask

  int cyc = 0, t_start = 0, nvalid = 0, nerr = 0;
  logic [7:0] got;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (valid) begin nvalid++; got = data; 
      check(cyc - t_start >= 9 * CPB && cyc - t_start <= 10 * CPB,
            $sformatf("latency %0d cycles", cyc - t_start));
    end
    if (frame_err) nerr++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    for (int k = 0; k < 12; k++) begin
      logic [7:0] b;
      int n0;
      b = 8'($urandom);
      if (k == 0) b = 8'h00;
      if (k == 1) b = 8'hFF;
      n0 = nvalid;
      t_start = cyc;
      send(b, 1'b1);
      repeat ($urandom_range(0, 3 * CPB)) @(posedge clk);
      check(nvalid == n0 + 1, "one byte delivered");
      check(got == b, $sformatf("byte %02h got %02h", b, got));
    end
    begin
      int n0;
      n0 = nvalid;
      send(8'hA5, 1'b0);
      repeat (2 * CPB) @(posedge clk);
      check(nvalid == n0, "no byte on framing error");
      check(nerr == 1, "framing error flagged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
