// dialogue_modeler: picks the response sentence and spells it out.
//
// Index detect: during a pass over the information text it watches the key
// encoder's compare results to note, for each information word, the first
// query position it matched. From the LSTM decoder's per-word results it
// counts, within a sentence, ordered pairs: consecutive information words
// that match consecutive query words. At the end of each sentence (word
// with `eos`, or the last library word) it scores the sentence as
//   score = pred_c + 256 * ordered_pairs      (Q8.8, i.e. matches + pairs)
// and keeps the first sentence with the highest positive score.
// Output hold: the registers resp_start/resp_end/resp_score keep the
// previous response until a pass ends (`pass_done`), then take the new one.
// Output generation: after a pass it reads the chosen sentence's words
// (through the dictionary's key table and address mapping, via `gen_addr` /
// `gen_word`) and emits their characters on a valid/ready byte stream,
// words separated by a space and the sentence closed by a line feed. If no
// sentence scored above zero only the line feed is sent. `busy` is high
// while generating; `resp_done` pulses after the final byte is accepted.
// The description names these three parts and says the score depends on the
// matching keywords and their order; the scoring formula, the sentence
// flags and the byte framing are this implementation's choices.
module dialogue_modeler
  import nlp_pkg::*;
#(
  parameter int unsigned DEPTH = LIB_DEPTH_DEF,
  parameter int unsigned NQ    = QWORDS_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // pass control from the main control unit
  input  logic                     pass_start,
  input  logic                     pass_done,
  input  logic                     word_start,
  input  logic [$clog2(DEPTH)-1:0] info_addr,
  input  logic                     info_eos,
  // key encoder compare results
  input  logic                     cmp_valid,
  input  logic                     cmp_match,
  input  logic [$clog2(NQ+1)-1:0]  cmp_idx,
  // LSTM decoder results
  input  logic                     word_done,
  input  logic                     match,
  input  fx_t                      pred_c,
  // output generation
  output logic [$clog2(DEPTH)-1:0] gen_addr,
  input  word_t                    gen_word,
  output byte_t                    out_byte,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic                     busy,
  output logic                     resp_done,
  // output hold
  output logic [$clog2(DEPTH)-1:0] resp_start,
  output logic [$clog2(DEPTH)-1:0] resp_end,
  output logic signed [19:0]       resp_score,
  output logic                     resp_found
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned QW = $clog2(NQ + 1);
  localparam int unsigned BW = $clog2(WORD_BYTES);

  // ---------------------------------------------------------- index detect
  logic                 seen_m;           // current word matched some query word
  logic [QW-1:0]        first_q;
  logic                 prev_m;
  logic [QW-1:0]        prev_q;
  logic [7:0]           pairs;
  logic [AW-1:0]        sent_a;
  logic                 new_sent;
  logic [AW-1:0]        best_s, best_e;
  logic signed [19:0]   best_sc;
  logic signed [19:0]   score;
  logic                 pair_now;

  always_comb begin
    pair_now = match && prev_m && seen_m && (first_q == prev_q + 1'b1);
    score    = 20'(pred_c) + ($signed({12'd0, pairs + 8'(pair_now)}) <<< 8);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen_m   <= 1'b0;
      first_q  <= '0;
      prev_m   <= 1'b0;
      prev_q   <= '0;
      pairs    <= '0;
      sent_a   <= '0;
      new_sent <= 1'b1;
      best_s   <= '0;
      best_e   <= '0;
      best_sc  <= '0;
    end else begin
      if (pass_start) begin
        new_sent <= 1'b1;
        prev_m   <= 1'b0;
        pairs    <= '0;
        best_sc  <= '0;
        best_s   <= '0;
        best_e   <= '0;
      end
      if (word_start) begin
        seen_m <= 1'b0;
        if (new_sent) begin
          sent_a   <= info_addr;
          new_sent <= 1'b0;
        end
      end
      if (cmp_valid && cmp_match && !seen_m) begin
        seen_m  <= 1'b1;
        first_q <= cmp_idx;
      end
      if (word_done) begin
        prev_m <= match && seen_m;
        prev_q <= first_q;
        pairs  <= pairs + 8'(pair_now);
        if (info_eos) begin
          if (score > best_sc) begin
            best_sc <= score;
            best_s  <= sent_a;
            best_e  <= info_addr;
          end
          new_sent <= 1'b1;
          prev_m   <= 1'b0;
          pairs    <= '0;
        end
      end
    end
  end

  // ----------------------------------------------- output hold + generation
  typedef enum logic [1:0] {O_IDLE, O_CHAR, O_SEP} ost_e;
  ost_e          ost;
  logic [AW-1:0] ga;
  logic [BW-1:0] bi;      // byte index, WORD_BYTES-1 (first char) down to 0
  byte_t         ch;

  assign gen_addr = ga;
  assign busy     = (ost != O_IDLE);
  assign ch       = gen_word[8*bi +: 8];

  always_comb begin
    out_valid = 1'b0;
    out_byte  = CH_LF;
    if (ost == O_CHAR) begin
      out_valid = (ch != 8'd0);
      out_byte  = ch;
    end else if (ost == O_SEP) begin
      out_valid = 1'b1;
      out_byte  = (!resp_found || ga == resp_end) ? CH_LF : CH_SPACE;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_start <= '0;
      resp_end   <= '0;
      resp_score <= '0;
      resp_found <= 1'b0;
      ost        <= O_IDLE;
      ga         <= '0;
      bi         <= '0;
      resp_done  <= 1'b0;
    end else begin
      resp_done <= 1'b0;
      unique case (ost)
        O_IDLE: if (pass_done) begin
          resp_start <= best_s;
          resp_end   <= best_e;
          resp_score <= best_sc;
          resp_found <= (best_sc > 0);
          ga         <= best_s;
          bi         <= BW'(WORD_BYTES - 1);
          ost        <= (best_sc > 0) ? O_CHAR : O_SEP;
        end
        O_CHAR: if (ch == 8'd0 || out_ready) begin
          if (bi == '0) ost <= O_SEP;
          else          bi  <= bi - 1'b1;
        end
        O_SEP: if (out_ready) begin
          if (!resp_found || ga == resp_end) begin
            ost       <= O_IDLE;
            resp_done <= 1'b1;
          end else begin
            ga  <= ga + 1'b1;
            bi  <= BW'(WORD_BYTES - 1);
            ost <= O_CHAR;
          end
        end
        default: ost <= O_IDLE;
      endcase
    end
  end
endmodule
