// tb_main_control_unit: runs passes over libraries of 1 to 6 words with 0
// to 8 query keys, answering word_done after a random delay. Checks the
// state order S1 S2 S3 S4.. S5 S6 S7 S8 S9, QEN only in S2 and IEN only in
// S9, the encoder operations and query indices, the information address
// sequence, one pass_start and one pass_done per pass, sent_start after an
// end-of-sentence word, and the cycles per word: qcount + 8 plus the wait.
`timescale 1ns/1ps
module tb_main_control_unit;
  import nlp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done, info_eos = 0, word_done = 0;
  logic [3:0] qcount = 0, enc_idx, state_num;
  logic qen, ien, pass_start, pass_done, word_start, sent_start, enc_valid;
  enc_op_e enc_op;
  logic [7:0] info_addr;
  int nwords = 1;
  always #5 clk = ~clk;
  assign done = (int'(info_addr) == nwords - 1);
  main_control_unit dut (.*);

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

  // word_done responder: 1..4 cycles after entering S7
  initial begin
    forever begin
      @(negedge clk);
      if (state_num == 4'd7) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        word_done = 1;
        @(negedge clk);
        word_done = 0;
        while (state_num == 4'd7) @(negedge clk);
      end
    end
  end

  int n_ps = 0, n_pd = 0;
  always @(posedge clk) if (rst_n) begin
    check(qen == (state_num == 4'd2), "QEN only in S2");
    check(ien == (state_num == 4'd9), "IEN only in S9");
    if (pass_start) n_ps++;
    if (pass_done) n_pd++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state_num == 4'd1, "idle in S1");
    repeat (5) @(negedge clk);
    check(state_num == 4'd1, "S1 holds without START");
    for (int pass = 0; pass < 12; pass++) begin
      int q;
      q = $urandom_range(0, 8);
      nwords = $urandom_range(1, 6);
      qcount = 4'(q);
      start = 1;
      @(negedge clk);
      start = 0;
      for (int w = 0; w < nwords; w++) begin
        int t;
        bit eos;
        check(state_num == 4'd2 && word_start, "S2 starts each word");
        check(sent_start == (w == 0 || eos), "sentence start flag");
        check(int'(info_addr) == w, $sformatf("info address %0d", info_addr));
        eos = ($urandom_range(0, 2) == 0);
        info_eos = eos;
        @(negedge clk);
        check(state_num == 4'd3 && enc_valid && enc_op == ENC_START, "S3 start code");
        @(negedge clk);
        for (int j = 0; j < q; j++) begin
          check(state_num == 4'd4 && enc_valid && enc_op == ENC_COMPARE && int'(enc_idx) == j,
                $sformatf("S4 compare %0d", j));
          @(negedge clk);
        end
        check(state_num == 4'd5 && enc_valid && enc_op == ENC_END, "S5 end code");
        @(negedge clk);
        check(state_num == 4'd6 && !enc_valid, "S6");
        @(negedge clk);
        t = 0;
        while (state_num == 4'd7) begin @(negedge clk); t++; end
        check(t >= 1 && t <= 4, "S7 waits for word_done");
        check(state_num == 4'd8, "S8");
        @(negedge clk);
        check(state_num == 4'd9 && ien, "S9");
        check(pass_done == (w == nwords - 1), "DONE only on the last word");
        @(negedge clk);
      end
      check(state_num == 4'd1, "back to S1 after DONE");
      check(n_ps == pass + 1 && n_pd == pass + 1, "one pass_start and pass_done per pass");
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
