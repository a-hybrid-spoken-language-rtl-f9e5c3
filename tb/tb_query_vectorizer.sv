// tb_query_vectorizer: a model FIFO holding n query words and a model
// dictionary that answers each request after a random delay with a key
// derived from the word. The block must read the words in order, store one
// key per word with its found flag, raise keys_ready with the right count,
// and hold it until released.
`timescale 1ns/1ps
module tb_query_vectorizer;
  import nlp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic fifo_wr_n_rd = 0, fifo_empty = 1, fifo_rd, rld_ready = 1;
  word_t fifo_word, req_word;
  logic [3:0] fifo_count = 0, qcount;
  logic req_start, req_done = 0, req_found = 0, keys_ready, release_keys = 0;
  byte_t req_key = 0;
  byte_t qkey [8];
  logic qfound [8];
  always #5 clk = ~clk;
  query_vectorizer dut (.*);

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

  // model FIFO
  word_t fm[8];
  int    rp = 0, wp = 0;
  assign fifo_word = fm[rp[2:0]];
  always @(posedge clk) if (fifo_rd && rp < wp) begin
    rp <= rp + 1;
    if (rp + 1 == wp) begin fifo_wr_n_rd <= 0; fifo_empty <= 1; end
  end
  // model dictionary: key = low byte xor high byte, found when bit 0 clear
  initial begin
    forever begin
      word_t w;
      @(posedge clk);
      if (req_start) begin
        w = req_word;
        repeat ($urandom_range(1, 6)) @(posedge clk);
        req_key   <= w[7:0] ^ w[79:72];
        req_found <= !w[0];
        req_done  <= 1;
        @(posedge clk);
        req_done  <= 0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 1; n <= 8; n++) begin
      word_t ws[$];
      @(negedge clk);
      rp = 0; wp = n;
      ws.delete();
      for (int i = 0; i < n; i++) begin
        word_t w;
        w = {8'($urandom), 64'($urandom), 8'($urandom)};
        ws.push_back(w); fm[i] = w;
      end
      fifo_count = 4'(n); fifo_empty = 0; fifo_wr_n_rd = 1;
      wait (keys_ready);
      @(negedge clk);
      check(qcount == 4'(n), $sformatf("qcount %0d for %0d words", qcount, n));
      check(rp == wp, "all words read");
      for (int i = 0; i < n; i++) begin
        check(qkey[i] == (ws[i][7:0] ^ ws[i][79:72]), $sformatf("key %0d of %0d", i, n));
        check(qfound[i] == !ws[i][0], "found flag");
      end
      repeat (5) @(negedge clk);
      check(keys_ready, "keys held until release");
      release_keys = 1; @(negedge clk); release_keys = 0;
      @(negedge clk);
      check(!keys_ready, "released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
