// tb_word_shift_register: feeds text byte by byte and compares the words
// produced with words packed independently from the same text (lower case,
// punctuation dropped, at most 10 characters, right-aligned). Also checks
// query_end on line ends and the one-cycle latency after the delimiter.
`timescale 1ns/1ps
module tb_word_shift_register;
  import nlp_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, word_valid, query_end;
  logic [7:0] in_byte = 0;
  word_t word;
  always #5 clk = ~clk;
  word_shift_register dut (.*);

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

  word_t got[$];
  int nend = 0;
  always @(posedge clk) if (rst_n) begin
    if (word_valid) got.push_back(word);
    if (query_end) nend++;
  end

  task automatic feed(string s);
    for (int i = 0; i < s.len(); i++) begin
      @(negedge clk);
      in_byte = s[i]; in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
  endtask

  initial begin
    string lines[4] = '{"Give the FOUNDER of Samsung?\n",
                        "What is the main feature of S6, cost-effectiveness!\n",
                        "  two  spaces \n",
                        "supercalifragilistic word\n"};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (lines[l]) begin
      word_t exp[$];
      int e0;
      split_words(lines[l], exp);
      got.delete();
      e0 = nend;
      feed(lines[l]);
      repeat (3) @(negedge clk);
      check(got.size() == exp.size(), $sformatf("line %0d: %0d words, expected %0d", l, got.size(), exp.size()));
      foreach (exp[k])
        check(k < got.size() && got[k] == exp[k], $sformatf("line %0d word %0d '%s'", l, k, word_text(exp[k])));
      check(nend == e0 + 1, "one query_end per line");
    end
    // latency: the word appears in the cycle after the delimiter byte
    @(negedge clk); in_byte = "a"; in_valid = 1;
    @(negedge clk); in_byte = " ";
    @(negedge clk); in_valid = 0;
    check(word_valid && word == WORD_W'("a"), "word valid one cycle after delimiter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
