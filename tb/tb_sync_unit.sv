// tb_sync_unit: random producer and consumer around the byte buffer.
// Every byte must come out once, in order; the input side must refuse
// bytes only when four are waiting.
`timescale 1ns/1ps
module tb_sync_unit;
  import nlp_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  byte_t in_byte = 0, out_byte;
  always #5 clk = ~clk;
  sync_unit dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte_t model[$];
  int nout = 0, nfull = 0;
  always @(posedge clk) if (rst_n) begin
    check(in_ready == (model.size() < 4), "in_ready only below four bytes");
    check(out_valid == (model.size() > 0), "out_valid when holding bytes");
    if (!in_ready) nfull++;
    if (out_valid && out_ready) begin
      check(out_byte == model[0], "byte order");
      void'(model.pop_front());
      nout++;
    end
    if (in_valid && in_ready) model.push_back(in_byte);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 2) != 0);
      in_byte   = 8'($urandom);
      out_ready = (k < 1500) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (10) @(negedge clk);
    check(model.size() == 0 && nout > 1000, "drained");
    check(nfull > 0, "buffer filled at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
