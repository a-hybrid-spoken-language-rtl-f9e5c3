// tb_rld: reverse lookup dictionary over a 30-word library with repeats.
// The library is built so that repeats start early (words 6 and 7 are
// equal), so numbering in order of first appearance differs from the
// addresses. Expected byte values are worked out here: the value of a word
// is the number of distinct words stored before its first occurrence.
// After build, the key table entry of each address must be the key of
// that value; equal words share a key, and the address mapping must turn a
// key back into the address of the first occurrence. Word requests must
// return the same keys and report absent words. A second build over a
// 12-word library with repeats at addresses 2, 10 and 11 checks the
// numbering 0 1 1 2 3 4 5 6 7 8 2 3 directly.
`timescale 1ns/1ps
module tb_rld;
  import nlp_pkg::*;
  localparam int N = 30;
  logic clk = 0, rst_n = 0, build = 0, ready, req_start = 0, req_done, req_found;
  logic [8:0] lib_count = 9'(N);
  logic [7:0] fetch_addr, scan_addr, look_addr_a = 0, look_addr_b = 0, rev_addr;
  word_t fetch_word, scan_word, req_word = '0;
  byte_t req_key, look_key_a, look_key_b, rev_key = 0;
  always #5 clk = ~clk;
  rld dut (.*);

  word_t lib[256];
  assign fetch_word = lib[fetch_addr];
  assign scan_word  = lib[scan_addr];

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

  function automatic int first_of(word_t w);
    for (int a = 0; a < N; a++) if (lib[a] == w) return a;
    return -1;
  endfunction
  function automatic int value_of(word_t w);
    int f, n;
    f = first_of(w);
    n = 0;
    for (int a = 0; a < f; a++) if (first_of(lib[a]) == a) n++;
    return n;
  endfunction
  function automatic byte_t keyf(int b);
    return 8'((((b << 3) | (b >> 5)) & 255) ^ 8'h5A);
  endfunction

  initial begin
    for (int a = 0; a < 256; a++) lib[a] = 80'((a * a) % 13) * 80'h1_0000_0001 + 80'h77;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); build = 1; @(negedge clk); build = 0;
    check(!ready, "not ready while building");
    wait (ready);
    @(negedge clk);
    for (int a = 0; a < N; a++) begin
      look_addr_a = 8'(a); look_addr_b = 8'(N - 1 - a);
      #1;
      check(look_key_a == keyf(value_of(lib[a])), $sformatf("key of address %0d", a));
      check(look_key_b == keyf(value_of(lib[N - 1 - a])), "second lookup port");
      rev_key = look_key_a;
      #1;
      check(int'(rev_addr) == first_of(lib[a]), $sformatf("address mapping of %0d", a));
    end
    check(value_of(lib[7]) == 6 && value_of(lib[8]) == 5, "model: values follow first appearance");
    for (int k = 0; k < 14; k++) begin
      word_t w;
      int f;
      w = (k < 12) ? lib[k * 2] : 80'hDEAD;
      f = first_of(w);
      @(negedge clk); req_word = w; req_start = 1;
      @(negedge clk); req_start = 0;
      while (!req_done) @(negedge clk);
      check(req_found == (f >= 0), "request found flag");
      if (f >= 0) check(req_key == keyf(value_of(w)), $sformatf("request key for word %0d", k));
    end
    // Second build: a 12-word library whose words 2, 10 and 11 repeat words
    // 1, 3 and 4 must number its addresses 0 1 1 2 3 4 5 6 7 8 2 3.
    begin
      int exp_val[12] = '{0, 1, 1, 2, 3, 4, 5, 6, 7, 8, 2, 3};
      for (int a = 0; a < 12; a++) lib[a] = 80'h6100 + 80'(a);
      lib[2] = lib[1]; lib[10] = lib[3]; lib[11] = lib[4];
      lib_count = 9'd12;
      @(negedge clk); build = 1; @(negedge clk); build = 0;
      wait (ready);
      @(negedge clk);
      for (int a = 0; a < 12; a++) begin
        look_addr_a = 8'(a);
        #1;
        check(look_key_a == keyf(exp_val[a]), $sformatf("numbered build: address %0d", a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
