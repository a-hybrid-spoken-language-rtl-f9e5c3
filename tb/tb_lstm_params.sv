// tb_lstm_params: the weight/bias store loads its defaults at reset
// (input 16x-10, forget 8, output 8, update 4x-2 in Q8.8) and each write
// changes exactly the addressed value.
`timescale 1ns/1ps
module tb_lstm_params;
  import nlp_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  gate_e gate = G_INPUT;
  logic [1:0] field = 0;
  fx_t wdata = 0;
  lstm_param_t params;
  always #5 clk = ~clk;
  lstm_params dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int val(lstm_param_t p, int g, int f);
    return f == 0 ? int'(p[g].wx) : f == 1 ? int'(p[g].wh) : int'(p[g].b);
  endfunction

  initial begin
    int w[4][3];
    default_weights(w);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int g = 0; g < 4; g++)
      for (int f = 0; f < 3; f++)
        check(val(params, g, f) == w[g][f], $sformatf("default g%0d f%0d", g, f));
    for (int k = 0; k < 200; k++) begin
      int g, f, d;
      g = $urandom_range(0, 3); f = $urandom_range(0, 3);
      d = $signed(16'($urandom));
      @(negedge clk); we = 1; gate = gate_e'(g); field = 2'(f); wdata = fx_t'(d);
      @(negedge clk); we = 0;
      if (f < 3) w[g][f] = d;
      for (int gg = 0; gg < 4; gg++)
        for (int ff = 0; ff < 3; ff++)
          check(val(params, gg, ff) == w[gg][ff], $sformatf("after write %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
