// tb_nlproc: end-to-end test of the language processor.
//
// Loads the sample information text (ten sentences) into the word library,
// builds the dictionary, then sends queries over the serial line and
// decodes the serial response. Each response is compared with a reference
// answer computed here from the text alone: a sentence scores one point per
// word that appears among the first eight query words plus one per pair of
// neighbouring words that match neighbouring query words, and the first
// sentence with the highest positive score is the answer (a bare line feed
// when none scores). The held score is checked too. The bit time is
// shortened to 16 clocks so the test runs quickly.
// The test also counts the mechanisms it must exercise: a match and a
// mismatch code, an over-long query filling the FIFO, a query ended before
// the FIFO filled, a query word unknown to the library, a word truncated to
// 10 characters, an ordered word pair, a query with no answer, the control
// unit looping back (DONE = 0) and returning to idle (DONE = 1), and the
// output buffer holding the response generator back.
`timescale 1ns/1ps
module tb_nlproc;
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

  // ------------------------------------------------------ event counters
  int n_match = 0, n_nomatch = 0, n_fifo_full = 0, n_short = 0;
  int n_unknown = 0, n_trunc = 0, n_pair = 0, n_noresp = 0;
  int n_loop = 0, n_idle = 0, n_backpressure = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.code_valid && !dut.code_last && dut.code == CODE_MATCH) n_match++;
    if (dut.code_valid && dut.code == CODE_NOMATCH) n_nomatch++;
    if (dut.u_fifo.wr_en && !dut.u_fifo.wr_n_rd && !dut.u_fifo.skip &&
        dut.u_fifo.n == 4'(QWORDS_DEF - 1) && !dut.u_fifo.query_end) n_fifo_full++;
    if (dut.u_fifo.query_end && !dut.fifo_wr_n_rd && dut.u_fifo.n != 0 &&
        dut.u_fifo.n < 4'(QWORDS_DEF - 1)) n_short++;
    if (dut.rq_done && !dut.rq_found) n_unknown++;
    if (dut.rx_valid && dut.u_sr.len == 4'd10 && dut.rx_byte != " " &&
        dut.rx_byte != 8'h0A) n_trunc++;
    if (dut.word_done && dut.u_dm.pair_now) n_pair++;
    if (dut.pass_done && dut.u_dm.best_sc == 0) n_noresp++;
    if (dut.ien && !dut.done) n_loop++;
    if (dut.ien && dut.done) n_idle++;
    if (dut.dm_valid && !dut.dm_ready) n_backpressure++;
  end

  // ---------------------------------------------------------------- test
  string queries[$] = '{
    "Give the founder of Samsung?",
    "Which OS is present in S6?",
    "Tell the RAM size of S6",
    "How much does S6 cost?",
    "Give the location of Samsung?",
    "The main competitor of Samsung is",
    "Is Samsung a local company?",
    "Identify the current focus of Samsung",
    "What is the main feature of S6 which is cost-effectiveness",
    "Please xyzzy quux",
    "S6 was released in?"
  };

  initial begin
    word_t ws[$];
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
    @(posedge clk);
    check(lib_count == 9'(lw.size()), "library word count");
    lib_build <= 1; @(posedge clk); lib_build <= 0;
    wait (lib_ready);
    // dictionary: words are numbered in order of first appearance, equal
    // words share a number and a key, distinct words do not
    begin
      int val[$];
      int ndist;
      ndist = 0;
      for (int a = 0; a < lw.size(); a++) begin
        int first;
        first = a;
        for (int b = 0; b < a; b++) if (lw[b] == lw[a]) begin first = b; break; end
        if (first == a) begin val.push_back(ndist); ndist++; end
        else            val.push_back(val[first]);
        check(dut.u_rld.key_tab[a] == byte_to_key(8'(val[a])), $sformatf("key of word %0d", a));
      end
    end

    foreach (queries[qi]) begin
      string exp;
      int    esc;
      int    nl;
      reference(queries[qi], exp, esc);
      nl = lines.size();
      send_line(queries[qi]);
      wait (resp_done);
      @(posedge clk);
      check(resp_score == 20'(esc), $sformatf("score q%0d: got %0d exp %0d", qi, resp_score, esc));
      check(resp_found == (esc > 0), $sformatf("found flag q%0d", qi));
      wait (lines.size() == nl + 1);
      check(lines[nl] == exp, $sformatf("response q%0d: got '%s' exp '%s'", qi, lines[nl], exp));
      $display("query '%s' -> '%s'", queries[qi], lines[nl]);
    end

    check(rx_frame_err == 0, "no framing errors");
    check(n_match > 0,        "match code seen");
    check(n_nomatch > 0,      "no-match code seen");
    check(n_fifo_full > 0,    "query FIFO filled by an over-long query");
    check(n_short > 0,        "short query ended before FIFO full");
    check(n_unknown > 0,      "query word unknown to the library");
    check(n_trunc > 0,        "word truncated to 10 characters");
    check(n_pair > 0,         "ordered word pair scored");
    check(n_noresp > 0,       "query without an answer");
    check(n_loop > 0,         "control loop S9 -> S2");
    check(n_idle > 0,         "control return S9 -> S1");
    check(n_backpressure > 0, "output buffer back-pressure");
    $display("events: match=%0d nomatch=%0d full=%0d short=%0d unknown=%0d trunc=%0d pair=%0d noresp=%0d loop=%0d idle=%0d bp=%0d",
             n_match, n_nomatch, n_fifo_full, n_short, n_unknown, n_trunc, n_pair,
             n_noresp, n_loop, n_idle, n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
