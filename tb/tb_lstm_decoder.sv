// tb_lstm_decoder: random code sequences, grouped into words and sentences,
// against two reference cells: the training cell restarts for every word
// and runs over its codes; the prediction cell takes the training output
// once per word and restarts per sentence. word_done must follow the end
// code by two cycles. One write through the weight port is also checked
// to reach only the addressed layer.
`timescale 1ns/1ps
module tb_lstm_decoder;
  import nlp_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, word_start = 0, sent_start = 0, code_valid = 0, code_last = 0;
  byte_t code = 0;
  logic pw_we = 0, pw_layer = 0;
  gate_e pw_gate = G_INPUT;
  logic [1:0] pw_field = 0;
  fx_t pw_wdata = 0;
  logic word_done, match;
  fx_t train_h, pred_c, pred_h;
  always #5 clk = ~clk;
  lstm_decoder dut (.*);

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

  int wt[4][3], wp[4][3];
  int th, tc, ph, pc;
  int nmatch = 0;

  task automatic run_word(bit new_sent, int nq);
    @(negedge clk);
    word_start = 1; sent_start = new_sent;
    th = 0; tc = 0;
    if (new_sent) begin ph = 0; pc = 0; end
    @(negedge clk);
    word_start = 0; sent_start = 0;
    for (int k = 0; k < nq + 2; k++) begin
      int cv;
      cv = (k == 0) ? 127 : (k == nq + 1) ? 63 : ($urandom_range(0, 4) == 0 ? 191 : 0);
      code = 8'(cv); code_valid = 1; code_last = (k == nq + 1);
      lstm_ref(wt, cv, th, tc);
      @(negedge clk);
    end
    code_valid = 0; code_last = 0;
    check(!word_done, "word_done not yet");
    @(negedge clk);
    check(word_done, "word_done two cycles after the end code");
    lstm_ref(wp, th, ph, pc);
    check(int'(train_h) == th, $sformatf("training h %0d exp %0d", train_h, th));
    check(match == (th >= 128), "match flag");
    check(int'(pred_c) == pc && int'(pred_h) == ph,
          $sformatf("prediction c %0d exp %0d", pred_c, pc));
    if (match) nmatch++;
  endtask

  initial begin
    default_weights(wt);
    default_weights(wp);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 30; s++) begin
      int nw;
      nw = $urandom_range(1, 7);
      for (int w = 0; w < nw; w++) run_word(w == 0, $urandom_range(1, 8));
    end
    check(nmatch > 10, "matches exercised");
    // overwrite the prediction layer's update-gate bias
    @(negedge clk); pw_we = 1; pw_layer = 1; pw_gate = G_UPDATE; pw_field = 2; pw_wdata = 16'sd100;
    @(negedge clk); pw_we = 0;
    wp[3][2] = 100;
    for (int w = 0; w < 6; w++) run_word(w == 0, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
