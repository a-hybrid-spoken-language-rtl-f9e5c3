// tb_nlproc_table4: the ten-question product-support workload.
//
// Loads the ten-sentence sample information text and asks the ten questions
// that go with it, worded as a user would type them (some end in a question
// mark, some do not). Question i is meant to be answered by sentence i of
// the text. Every serial response is checked against a reference answer
// computed here from the text alone (one point per sentence word found
// among the first eight query words, one per ordered neighbouring pair,
// first highest positive score wins), together with the held score. The
// test then reports how many of the ten responses are the intended
// sentence, and checks that number against the count the reference model
// predicts, so the accuracy of the scoring rule on this workload is
// visible. The bit time is shortened to 16 clocks; everything else is at
// its default size.
`timescale 1ns/1ps
module tb_nlproc_table4;
  import nlp_pkg::*;
  import tb_util_pkg::*;

  localparam int CPB = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rxd = 1'b1, txd, rx_frame_err;
  logic lib_clear = 0, lib_we = 0, lib_eos = 0, lib_build = 0, lib_ready;
  word_t lib_word = '0;
  logic [8:0] lib_count;
  logic pw_we = 0, pw_layer = 0;
  gate_e pw_gate = G_INPUT;
  logic [1:0] pw_field = 0;
  fx_t pw_wdata = 0;
  logic qen, ien, fifo_wr_n_rd, resp_busy, resp_done, resp_found;
  logic [3:0] state;
  logic [7:0] resp_start, resp_end;
  logic signed [19:0] resp_score;

  nlproc #(.CLKS_PER_BIT(CPB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ serial helpers
  task automatic send_byte(byte b);
    rxd = 1'b0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd = b[i]; repeat (CPB) @(posedge clk);
    end
    rxd = 1'b1; repeat (CPB) @(posedge clk);
  endtask

  task automatic send_line(string s);
    for (int i = 0; i < s.len(); i++) send_byte(s[i]);
    send_byte(8'h0A);
  endtask

  string rx_line = "";
  string lines[$];
  initial begin
    forever begin
      byte b;
      @(negedge txd);
      repeat (CPB + CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        b[i] = txd;
        repeat (CPB) @(posedge clk);
      end
      if (txd !== 1'b1) begin
        failures++;
        $display("FAIL: transmit stop bit");
      end
      if (b == 8'h0A) begin
        lines.push_back(rx_line);
        rx_line = "";
      end else begin
        rx_line = {rx_line, string'(b)};
      end
    end
  end

  // ------------------------------------------------------ reference model
  word_t lw[$];
  bit    le[$];

  function automatic void reference(string q, output string ans, output int sc);
    word_t qw[$], qs[$];
    int best = 0, bs = -1, be = -1;
    int m = 0, pairs = 0, prev = -1, s0 = 0;
    split_words(q, qw);
    for (int i = 0; i < qw.size() && i < QWORDS_DEF; i++) qs.push_back(qw[i]);
    for (int p = 0; p < lw.size(); p++) begin
      int fi = -1;
      for (int j = 0; j < qs.size(); j++)
        if (qs[j] == lw[p]) begin fi = j; break; end
      if (fi >= 0) begin
        m++;
        if (prev >= 0 && fi == prev + 1) pairs++;
      end
      prev = fi;
      if (le[p] || p == lw.size() - 1) begin
        if (256 * (m + pairs) > best) begin
          best = 256 * (m + pairs); bs = s0; be = p;
        end
        m = 0; pairs = 0; prev = -1; s0 = p + 1;
      end
    end
    ans = "";
    for (int p = bs; bs >= 0 && p <= be; p++)
      ans = (p == bs) ? word_text(lw[p]) : {ans, " ", word_text(lw[p])};
    sc = best;
  endfunction

  // ---------------------------------------------------------------- test
  string queries[NSENT] = '{
    "Give the founder of Samsung?",
    "Identify the current focus of Samsung",
    "Which OS is present in S6?",
    "Give the location of Samsung?",
    "S6 was released in?",
    "What is the main feature of S6",
    "Tell the RAM size of S6",
    "How much does S6 cost?",
    "Is Samsung a local company?",
    "The main competitor of Samsung is"
  };

  function automatic string normalized(string s);
    word_t ws[$];
    string r;
    r = "";
    split_words(s, ws);
    foreach (ws[k]) r = (k == 0) ? word_text(ws[k]) : {r, " ", word_text(ws[k])};
    return r;
  endfunction

  initial begin
    word_t ws[$];
    int n_right, n_right_ref;
    n_right = 0;
    n_right_ref = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    lib_clear <= 1; @(posedge clk); lib_clear <= 0;
    for (int s = 0; s < NSENT; s++) begin
      split_words(info_sentence(s), ws);
      foreach (ws[k]) begin
        lib_we   <= 1;
        lib_word <= ws[k];
        lib_eos  <= (k == ws.size() - 1);
        lw.push_back(ws[k]);
        le.push_back(k == ws.size() - 1);
        @(posedge clk);
      end
    end
    lib_we <= 0;
    lib_build <= 1; @(posedge clk); lib_build <= 0;
    wait (lib_ready);

    foreach (queries[qi]) begin
      string exp, want;
      int    esc;
      int    nl;
      reference(queries[qi], exp, esc);
      want = normalized(info_sentence(qi));
      if (exp == want) n_right_ref++;
      nl = lines.size();
      send_line(queries[qi]);
      wait (resp_done);
      @(posedge clk);
      check(resp_score == 20'(esc), $sformatf("score q%0d: got %0d exp %0d", qi, resp_score, esc));
      wait (lines.size() == nl + 1);
      check(lines[nl] == exp, $sformatf("response q%0d: got '%s' exp '%s'", qi, lines[nl], exp));
      if (lines[nl] == want) n_right++;
      if (lines[nl] == want)
        $display("q%0d '%s' -> '%s'", qi + 1, queries[qi], lines[nl]);
      else
        $display("q%0d '%s' -> '%s' (intended sentence not chosen)", qi + 1, queries[qi], lines[nl]);
    end
    check(n_right == n_right_ref, $sformatf("intended answers %0d, reference predicts %0d",
                                            n_right, n_right_ref));
    check(rx_frame_err == 0, "no framing errors");
    $display("intended sentence returned for %0d of %0d questions", n_right, NSENT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
