// tb_clock_divider: checks the divider at its default ratio of 5208.
// Ticks must come exactly every 5208 enabled cycles, none while disabled,
// and a clear must restart the count.
`timescale 1ns/1ps
module tb_clock_divider;
  localparam int DIV = 5208;
  logic clk = 0, rst_n = 0, en = 0, clr = 0, tick;
  always #10 clk = ~clk;
  clock_divider dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, last = -1, nticks = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (tick) begin
      nticks++;
      if (last >= 0) check(cyc - last == DIV, $sformatf("tick spacing %0d", cyc - last));
      last = cyc;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); en = 1;
    // the DIV-th enabled cycle (counting the one in which en rose) ticks
    for (int i = 1; i <= DIV; i++) begin
      @(negedge clk);
      check(tick == (i == DIV - 1), $sformatf("first tick at cycle %0d", i));
      if (tick) break;
    end
    repeat (5 * DIV + 1) @(negedge clk);
    check(nticks == 6, $sformatf("six ticks, got %0d", nticks));
    en = 0;
    repeat (3 * DIV) begin
      @(negedge clk);
      check(!tick, "no tick while disabled");
    end
    clr = 1; @(negedge clk); clr = 0; en = 1; last = -1;
    for (int i = 1; i <= DIV; i++) begin
      check(tick == (i == DIV), "tick after clear");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
