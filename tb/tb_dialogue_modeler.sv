// tb_dialogue_modeler: scripted passes over a 9-word library of three
// sentences. For each word the test plays the compare results and the
// decoder result (match flag and the prediction cell value, 256 per
// matching word so far in the sentence). The held response must stay put
// during a pass and take the best sentence at its end: score = pred_c +
// 256 * ordered pairs, first sentence on ties, none when nothing scores.
// The generated bytes, read under a random ready pattern, must spell the
// sentence's words separated by spaces and closed by a line feed.
`timescale 1ns/1ps
module tb_dialogue_modeler;
  import nlp_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic pass_start = 0, pass_done = 0, word_start = 0, info_eos = 0;
  logic [7:0] info_addr = 0, gen_addr, resp_start, resp_end;
  logic cmp_valid = 0, cmp_match = 0, word_done = 0, match = 0;
  logic [3:0] cmp_idx = 0;
  fx_t pred_c = 0;
  word_t gen_word;
  byte_t out_byte;
  logic out_valid, out_ready = 0, busy, resp_done, resp_found;
  logic signed [19:0] resp_score;
  always #5 clk = ~clk;
  dialogue_modeler dut (.*);

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

  string txt[9] = '{"alpha", "beta", "gamma", "delta", "eps", "zeta", "eta", "theta", "iota"};
  bit    eos[9] = '{0, 0, 1, 0, 0, 0, 1, 0, 1};
  word_t lib[256];
  assign gen_word = lib[gen_addr];

  string rx = "";
  always @(posedge clk) if (rst_n && out_valid && out_ready) rx = {rx, string'(out_byte)};
  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);

  // qpos[p] = query position matched by library word p, -1 for none
  task automatic run_pass(int qpos[9], output string exp, output int esc);
    int m = 0, pairs = 0, prev = -1, s0 = 0, best = 0, bs = -1, be = -1;
    logic [7:0] hs, he;
    logic signed [19:0] hsc;
    hs = resp_start; he = resp_end; hsc = resp_score;
    @(negedge clk); pass_start = 1; @(negedge clk); pass_start = 0;
    for (int p = 0; p < 9; p++) begin
      info_addr = 8'(p); info_eos = eos[p];
      word_start = 1; @(negedge clk); word_start = 0;
      for (int j = 0; j < 4; j++) begin
        cmp_valid = 1; cmp_idx = 4'(j); cmp_match = (qpos[p] == j);
        @(negedge clk);
      end
      cmp_valid = 0; cmp_match = 0;
      if (qpos[p] >= 0) begin
        m++;
        if (prev >= 0 && qpos[p] == prev + 1) pairs++;
      end
      prev = qpos[p];
      match = (qpos[p] >= 0); pred_c = fx_t'(256 * m);
      word_done = 1; @(negedge clk); word_done = 0;
      check(resp_start == hs && resp_end == he && resp_score == hsc, "output held during the pass");
      if (eos[p]) begin
        if (256 * (m + pairs) > best) begin best = 256 * (m + pairs); bs = s0; be = p; end
        m = 0; pairs = 0; prev = -1; s0 = p + 1;
      end
    end
    exp = "";
    for (int p = bs; bs >= 0 && p <= be; p++) exp = (p == bs) ? txt[p] : {exp, " ", txt[p]};
    exp = {exp, "\n"};
    esc = best;
    rx = "";
    pass_done = 1; @(negedge clk); pass_done = 0;
  endtask

  initial begin
    int cases[5][9] = '{
      '{-1, -1, -1,   0,  1, -1,  2,   0, -1},   // sentence 1: 3 matches, 1 pair
      '{ 0,  2, -1,  -1,  0,  1, -1,  -1, -1},   // 2 matches vs 2 matches + 1 pair -> sentence 1
      '{-1, -1, -1,  -1, -1, -1, -1,  -1, -1},   // nothing matches
      '{ 1,  2,  3,   3, -1, -1, -1,   0,  1},   // sentence 0 wins
      '{ 0,  1, -1,   0,  1, -1, -1,  -1, -1}    // tie of sentences 0 and 1 -> sentence 0
    };
    for (int a = 0; a < 256; a++) lib[a] = '0;
    foreach (txt[p]) lib[p] = pack_word(txt[p]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (cases[c]) begin
      string exp;
      int esc;
      run_pass(cases[c], exp, esc);
      check(busy, "generating after the pass");
      wait (resp_done);
      @(negedge clk);
      check(resp_score == 20'(esc), $sformatf("case %0d score %0d exp %0d", c, resp_score, esc));
      check(resp_found == (esc > 0), "found flag");
      check(rx == exp, $sformatf("case %0d text '%s' exp '%s'", c, rx, exp));
      check(!busy, "idle after the response");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
