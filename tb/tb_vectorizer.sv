// tb_vectorizer: searches a 40-word library (with repeated words) for every
// stored word and for absent ones. The result must be the address of
// the word's first occurrence, found must be set only for present words,
// and done must come k+1 cycles after start (k = first address), or
// count+1 cycles for an absent word.
`timescale 1ns/1ps
module tb_vectorizer;
  import nlp_pkg::*;
  localparam int N = 40;
  logic clk = 0, rst_n = 0, start = 0, busy, done, found;
  word_t word = '0, lib_word;
  logic [8:0] lib_count = 9'(N);
  logic [7:0] lib_addr, byte_val;
  always #5 clk = ~clk;
  vectorizer dut (.*);

  word_t lib[256];
  assign lib_word = lib[lib_addr];

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

  task automatic lookup(word_t w, int exp_addr);
    int t;
    @(negedge clk); word = w; start = 1;
    @(negedge clk); start = 0; t = 1;
    while (!done) begin @(negedge clk); t++; end
    if (exp_addr >= 0) begin
      check(found && byte_val == 8'(exp_addr), $sformatf("word at %0d -> %0d", exp_addr, byte_val));
      check(t == exp_addr + 2, $sformatf("latency %0d for address %0d", t, exp_addr));
    end else begin
      check(!found, "absent word not found");
      check(t == N + 2, $sformatf("latency %0d for absent word", t));
    end
  endtask

  initial begin
    for (int a = 0; a < 256; a++) lib[a] = {16'hABCD, 64'(a % 17 + 1)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < N; a++) lookup(lib[a], a % 17);
    lookup({16'hABCD, 64'd99}, -1);
    lookup(80'd0, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
