// tb_key_generator: exhaustive check of the byte-to-key mapping.
// Every byte must give the key ((b << 3) | (b >> 5)) ^ 5A, all 256 keys must
// differ, and the reverse direction must return the byte.
`timescale 1ns/1ps
module tb_key_generator;
  logic [7:0] byte_in = 0, key_out, key_in = 0, byte_out;
  key_generator dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen[256];
    for (int b = 0; b < 256; b++) begin
      int exp;
      byte_in = 8'(b);
      exp = (((b << 3) | (b >> 5)) & 255) ^ 8'h5A;
      #1;
      check(int'(key_out) == exp, $sformatf("key of %0d", b));
      check(!seen[key_out], "key unique");
      seen[key_out] = 1;
      key_in = key_out;
      #1;
      check(byte_out == 8'(b), $sformatf("reverse of %0d", b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
