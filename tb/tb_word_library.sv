// tb_word_library: 256-word library with its address generator.
// Writes random words and sentence flags, reads them back on all three
// ports (asynchronous), checks the count, the limit of 256 words and clear.
`timescale 1ns/1ps
module tb_word_library;
  import nlp_pkg::*;
  localparam int D = 256;
  logic clk = 0, rst_n = 0, clear = 0, wr_en = 0, wr_eos = 0;
  word_t wr_word = '0;
  logic [8:0] count;
  logic [7:0] rd_addr [3];
  word_t rd_word [3];
  logic rd_eos [3];
  always #5 clk = ~clk;
  word_library dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t m[D];
  bit    e[D];

  initial begin
    foreach (rd_addr[i]) rd_addr[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(count == 0, "empty after clear");
    for (int a = 0; a < D + 4; a++) begin
      @(negedge clk);
      wr_word = {$urandom, $urandom, 16'($urandom)};
      wr_eos  = 1'($urandom);
      wr_en   = 1;
      if (a < D) begin m[a] = wr_word; e[a] = wr_eos; end
    end
    @(negedge clk); wr_en = 0;
    check(count == 9'(D), $sformatf("count %0d", count));
    for (int k = 0; k < 600; k++) begin
      for (int p = 0; p < 3; p++) rd_addr[p] = 8'($urandom);
      #1;
      for (int p = 0; p < 3; p++)
        check(rd_word[p] == m[rd_addr[p]] && rd_eos[p] == e[rd_addr[p]],
              $sformatf("port %0d addr %0d", p, rd_addr[p]));
    end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(count == 0, "count cleared");
    @(negedge clk); wr_word = 80'h1234; wr_eos = 1; wr_en = 1;
    @(negedge clk); wr_en = 0; rd_addr[0] = 0; rd_addr[1] = 1;
    #1;
    check(count == 1 && rd_word[0] == 80'h1234 && rd_eos[0], "rewrite at address 0");
    check(rd_word[1] == m[1], "address 1 unchanged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
