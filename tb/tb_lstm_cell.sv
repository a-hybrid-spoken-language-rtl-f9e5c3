// tb_lstm_cell: random weights, inputs and step/clear patterns against a
// reference model of the cell equations (piecewise-linear sigmoid and tanh,
// Q8.8 with floor rounding and 16-bit saturation). Also checks the default
// weights on the four key-encoder codes.
`timescale 1ns/1ps
module tb_lstm_cell;
  import nlp_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, step = 0, out_valid;
  fx_t x = 0, h, c;
  lstm_param_t p;
  always #5 clk = ~clk;
  lstm_cell dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(int w[4][3]);
    for (int g = 0; g < 4; g++) begin
      p[g].wx = fx_t'(w[g][0]); p[g].wh = fx_t'(w[g][1]); p[g].b = fx_t'(w[g][2]);
    end
  endtask

  initial begin
    int w[4][3];
    int rh = 0, rc = 0;
    default_weights(w);
    load(w);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // default weights: only the match code (191) writes the cell
    begin
      int codes[5] = '{127, 191, 0, 191, 63};
      foreach (codes[k]) begin
        @(negedge clk); x = fx_t'(codes[k]); step = 1;
        @(negedge clk); step = 0;
        lstm_ref(w, codes[k], rh, rc);
        check(out_valid && int'(h) == rh && int'(c) == rc,
              $sformatf("code %0d: h %0d c %0d exp %0d %0d", codes[k], h, c, rh, rc));
      end
      check(rh >= 128, "a match drives h above one half");
    end
    for (int k = 0; k < 3000; k++) begin
      bit st, cl;
      if (k % 50 == 0) begin
        for (int g = 0; g < 4; g++)
          for (int f = 0; f < 3; f++) w[g][f] = $signed(16'($urandom)) >>> $urandom_range(2, 6);
        load(w);
      end
      st = ($urandom_range(0, 3) != 0);
      cl = ($urandom_range(0, 30) == 0);
      @(negedge clk);
      x = fx_t'($signed(16'($urandom)) >>> $urandom_range(4, 8));
      step = st; clear = cl;
      if (cl) begin rh = 0; rc = 0; end
      else if (st) lstm_ref(w, int'(x), rh, rc);
      @(negedge clk); step = 0; clear = 0;
      check(out_valid == (st && !cl), "out_valid");
      check(int'(h) == rh && int'(c) == rc, $sformatf("step %0d: h %0d c %0d exp %0d %0d", k, h, c, rh, rc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
