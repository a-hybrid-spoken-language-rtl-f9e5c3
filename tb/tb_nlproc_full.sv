// tb_nlproc_full: the language processor at its default size.
//
// All parameters keep their defaults: 5208 clocks per bit (9600 baud from a
// 50 MHz clock), a 256-word library and an 8-word query FIFO. The sample
// information text is loaded and the library filled to all 256 addresses
// with filler sentences and a final sentence ending at address FF; the
// dictionary is built, and three queries are sent over the serial line at
// full bit time, the last one answered by the sentence at the library end.
// The serial responses are compared with the expected sentences, and the
// transmitter's bit time is measured on the line (every level lasts a
// multiple of 5208 clocks).
`timescale 1ns/1ps
module tb_nlproc_full;
  import nlp_pkg::*;
  import tb_util_pkg::*;

  localparam int CPB = CLKS_PER_BIT_DEF;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;    // 50 MHz

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

  nlproc dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
      repeat (CPB / 2) @(posedge clk);
      check(txd == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      check(txd == 1'b1, "stop bit");
      if (b == 8'h0A) begin
        lines.push_back(rx_line);
        rx_line = "";
      end else begin
        rx_line = {rx_line, string'(b)};
      end
    end
  end

  // Every level on the transmit line lasts a whole number of bit times
  realtime last_edge = 0;
  int      n_edges = 0;
  always @(txd) if (rst_n) begin
    if (n_edges > 0) begin
      longint d;
      d = longint'(($realtime - last_edge) / 20.0);
      if (txd == 1'b1 || d < 10 * CPB)   // idle gaps between responses are free
        check(d % CPB == 0 && d > 0, $sformatf("transmit level lasted %0d clocks", d));
    end
    last_edge = $realtime;
    n_edges++;
  end

  initial begin
    word_t ws[$];
    int nfill, nw;
    string q[3]   = '{"Give the founder of Samsung?", "Which OS is present in S6?",
                      "What is the warranty period?"};
    string exp[3] = '{"the founder of samsung is lee byung", "s6 uses android os",
                      "warranty period is two years"};
    repeat (5) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    lib_clear <= 1; @(posedge clk); lib_clear <= 0;
    nw = 0;
    for (int s = 0; s < NSENT; s++) begin
      split_words(info_sentence(s), ws);
      foreach (ws[k]) begin
        lib_we   <= 1;
        lib_word <= ws[k];
        lib_eos  <= (k == ws.size() - 1);
        nw++;
        @(posedge clk);
      end
    end
    // pad with filler sentences of unique words so that the final sentence
    // ends exactly at the last library address (FF)
    nfill = 256 - 5 - nw;
    for (int k = 0; k < nfill; k++) begin
      lib_we   <= 1;
      lib_word <= pack_word($sformatf("f%0d", k));
      lib_eos  <= (k % 9 == 8) || (k == nfill - 1);
      @(posedge clk);
    end
    split_words("Warranty period is two years.", ws);
    foreach (ws[k]) begin
      lib_we   <= 1;
      lib_word <= ws[k];
      lib_eos  <= (k == ws.size() - 1);
      @(posedge clk);
    end
    lib_we <= 0;
    @(posedge clk);
    check(lib_count == 256, $sformatf("library full: count %0d", lib_count));
    lib_build <= 1; @(posedge clk); lib_build <= 0;
    wait (lib_ready);
    for (int i = 0; i < 3; i++) begin
      int nl;
      nl = lines.size();
      send_line(q[i]);
      wait (lines.size() == nl + 1);
      check(lines[nl] == exp[i], $sformatf("response %0d: got '%s'", i, lines[nl]));
      $display("query '%s' -> '%s' at %0t score %0d start %0d", q[i], lines[nl], $time, resp_score, resp_start);
    end
    check(resp_end == 8'hFF, $sformatf("last response ends at address FF, got %0h", resp_end));
    check(rx_frame_err == 0, "no framing errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
