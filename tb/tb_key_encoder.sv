// tb_key_encoder: random operation sequences against Table 1 of the
// encoding: start 127, end 63, equal keys 191, different keys 0 (and 0 for
// a query word missing from the library). Output one cycle after input.
`timescale 1ns/1ps
module tb_key_encoder;
  import nlp_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, qvalid = 0, code_valid, code_last;
  enc_op_e op = ENC_START;
  byte_t qkey = 0, ikey = 0, code;
  logic [3:0] idx_in = 0, idx_out;
  always #5 clk = ~clk;
  key_encoder dut (.*);

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

  initial begin
    int nm = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      int exp, o;
      bit v;
      @(negedge clk);
      o = $urandom_range(0, 2);
      v = ($urandom_range(0, 4) != 0);
      op = enc_op_e'(o);
      qkey = 8'($urandom); ikey = ($urandom_range(0, 1)) ? qkey : 8'($urandom);
      qvalid = ($urandom_range(0, 5) != 0);
      idx_in = 4'($urandom);
      in_valid = v;
      exp = (o == 0) ? 127 : (o == 2) ? 63 : (qvalid && qkey == ikey) ? 191 : 0;
      if (exp == 191) nm++;
      @(negedge clk);
      in_valid = 0;
      check(code_valid == v, "valid one cycle later");
      if (v) begin
        check(int'(code) == exp, $sformatf("op %0d code %0d exp %0d", o, code, exp));
        check(code_last == (o == 2), "last flag on end code");
        check(idx_out == idx_in, "index follows");
      end
    end
    check(nm > 100, "matches exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
