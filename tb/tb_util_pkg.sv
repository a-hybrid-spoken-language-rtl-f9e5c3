// tb_util_pkg: helpers shared by the testbenches.
//
// Text handling that mirrors the processor's word rules, written separately
// from the RTL: words are split at spaces and line ends, upper case is
// folded to lower case, the marks ? . ! , are dropped, a word keeps its
// first 10 characters and is packed right-aligned into 80 bits. Also holds
// a sample information text (ten sentences about a phone maker and its
// handset) and a bit-exact model of the fixed-point LSTM step.
package tb_util_pkg;
  import nlp_pkg::*;

  function automatic bit is_punct(byte c);
    return c == "?" || c == "." || c == "!" || c == ",";
  endfunction

  // Normalise and pack one word (no spaces inside)
  function automatic word_t pack_word(string s);
    word_t w = '0;
    int    n = 0;
    for (int i = 0; i < s.len(); i++) begin
      byte c = s[i];
      if (is_punct(c)) continue;
      if (c >= "A" && c <= "Z") c = c | 8'h20;
      if (n < WORD_BYTES) begin
        w = {w[WORD_W-9:0], c};
        n++;
      end
    end
    return w;
  endfunction

  // Split a line into packed, non-empty words
  function automatic void split_words(string line, ref word_t ws[$]);
    string cur = "";
    ws.delete();
    for (int i = 0; i <= line.len(); i++) begin
      byte c = (i < line.len()) ? line[i] : 8'h20;
      if (c == " " || c == 8'h0A || c == 8'h0D) begin
        if (pack_word(cur) != '0) ws.push_back(pack_word(cur));
        cur = "";
      end else begin
        cur = {cur, string'(c)};
      end
    end
  endfunction

  // Unpack a word back into text
  function automatic string word_text(word_t w);
    string s = "";
    for (int b = WORD_BYTES - 1; b >= 0; b--)
      if (w[8*b +: 8] != 0) s = {s, string'(w[8*b +: 8])};
    return s;
  endfunction

  localparam int NSENT = 10;
  function automatic string info_sentence(int i);
    case (i)
      0: return "The founder of Samsung is Lee Byung.";
      1: return "Samsung current focus is on smartphones.";
      2: return "S6 uses Android OS.";
      3: return "Samsung location is in South Korea.";
      4: return "S6 was released in 2015.";
      5: return "S6 main feature is cost-effective.";
      6: return "S6 RAM size is 3GB.";
      7: return "S6 cost is 1000 Ringgits.";
      8: return "Samsung is an MNC company.";
      default: return "Samsung main competitor is Apple.";
    endcase
  endfunction

  // Reference LSTM step, written from the cell equations
  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction
  function automatic int mulq(int a, int b);
    longint p = longint'(a) * longint'(b);
    return sat16(p >>> 8);     // floor division by 256
  endfunction
  function automatic int sigq(int z);
    int t = (z >>> 2) + 128;
    return t < 0 ? 0 : (t > 256 ? 256 : t);
  endfunction
  function automatic int tanhq(int z);
    return z > 256 ? 256 : (z < -256 ? -256 : z);
  endfunction
  // w[g][0..2] = wx, wh, b for g = input, forget, output, update
  function automatic void lstm_ref(input int w[4][3], input int x,
                                   inout int h, inout int c);
    int z[4];
    int gi, gf, go, gg, cn;
    for (int g = 0; g < 4; g++)
      z[g] = sat16(longint'(mulq(w[g][0], x)) + longint'(mulq(w[g][1], h)) + longint'(w[g][2]));
    gi = sigq(z[0]); gf = sigq(z[1]); go = sigq(z[2]); gg = tanhq(z[3]);
    cn = sat16(longint'(mulq(gf, c)) + longint'(mulq(gi, gg)));
    h  = mulq(go, tanhq(cn));
    c  = cn;
  endfunction

  // Default weights, as decimal Q8.8 numbers
  function automatic void default_weights(output int w[4][3]);
    w[0] = '{4096, 0, -2560};
    w[1] = '{0, 0, 2048};
    w[2] = '{0, 0, 2048};
    w[3] = '{1024, 0, -512};
  endfunction
endpackage
