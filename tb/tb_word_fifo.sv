// tb_word_fifo: the 8-word query FIFO.
// A 3-word query must switch to read mode on its end; a 10-word query must
// switch after the 8th word, drop the rest until its end, and read back the
// first 8 in order; after the last read the FIFO is writable again.
`timescale 1ns/1ps
module tb_word_fifo;
  import nlp_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0, query_end = 0, rd_en = 0, wr_n_rd, empty;
  word_t wr_data = '0, rd_data;
  logic [3:0] count;
  always #5 clk = ~clk;
  word_fifo dut (.*);

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

  task automatic put(word_t w, bit last);
    @(negedge clk); wr_data = w; wr_en = 1; query_end = last;
    @(negedge clk); wr_en = 0; query_end = 0;
  endtask

  task automatic query(int n, int seed);
    word_t exp[$];
    int m;
    check(!wr_n_rd, "write mode before a query");
    for (int i = 0; i < n; i++) begin
      word_t w;
      w = {seed[15:0], 64'(i) * 64'h9E37_79B9_7F4A_7C15};
      if (i < QWORDS_DEF) exp.push_back(w);
      put(w, i == n - 1);
      if (i == QWORDS_DEF - 1) check(wr_n_rd, "read mode once full");
    end
    check(wr_n_rd, "read mode after the query");
    m = exp.size();
    check(count == 4'(m), $sformatf("count %0d", count));
    for (int i = 0; i < m; i++) begin
      check(!empty && rd_data == exp[i], $sformatf("read word %0d", i));
      @(negedge clk); rd_en = 1;
      @(negedge clk); rd_en = 0;
    end
    check(empty && !wr_n_rd, "empty and writable after reading all");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    query(3, 1);
    query(10, 2);
    query(8, 3);
    query(1, 4);
    // a bare line end with nothing stored keeps the FIFO in write mode
    @(negedge clk); query_end = 1; @(negedge clk); query_end = 0;
    check(!wr_n_rd && empty, "empty line ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
