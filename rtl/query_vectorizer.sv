// query_vectorizer: turns the words held in the query FIFO into query keys.
//
// When the FIFO switches to read mode (`fifo_wr_n_rd` high) and the reverse
// lookup dictionary is ready, the block reads the words out one by one, has
// the dictionary vectorize and key each word, and stores the keys, in query
// order, with a flag telling whether the word exists in the information
// text. It then raises `keys_ready` (the START condition of the main control
// unit) and holds the keys until `release` pulses, after which it can take
// the next query. Per word: one cycle to issue the request, the dictionary's
// scan time, one cycle to store the key and pop the FIFO.
module query_vectorizer
  import nlp_pkg::*;
#(
  parameter int unsigned NQ = QWORDS_DEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // query FIFO read side
  input  logic                    fifo_wr_n_rd,
  input  logic                    fifo_empty,
  input  word_t                   fifo_word,
  input  logic [$clog2(NQ+1)-1:0] fifo_count,
  output logic                    fifo_rd,
  // dictionary service
  input  logic                    rld_ready,
  output logic                    req_start,
  output word_t                   req_word,
  input  logic                    req_done,
  input  logic                    req_found,
  input  byte_t                   req_key,
  // query keys
  output logic                    keys_ready,
  input  logic                    release_keys,
  output byte_t                   qkey   [NQ],
  output logic                    qfound [NQ],
  output logic [$clog2(NQ+1)-1:0] qcount
);
  localparam int unsigned QW = $clog2(NQ + 1);
  localparam int unsigned QI = (NQ > 1) ? $clog2(NQ) : 1;

  typedef enum logic [1:0] {Q_IDLE, Q_REQ, Q_WAIT, Q_HOLD} qst_e;
  qst_e    st;
  logic [QW-1:0] j;

  assign req_word  = fifo_word;
  assign req_start = (st == Q_REQ);
  assign fifo_rd   = (st == Q_WAIT) && req_done;
  assign keys_ready = (st == Q_HOLD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= Q_IDLE;
      j      <= '0;
      qcount <= '0;
      for (int i = 0; i < NQ; i++) begin
        qkey[i]   <= '0;
        qfound[i] <= 1'b0;
      end
    end else begin
      unique case (st)
        Q_IDLE: if (fifo_wr_n_rd && !fifo_empty && rld_ready) begin
          st     <= Q_REQ;
          j      <= '0;
          qcount <= fifo_count;
        end
        Q_REQ: st <= Q_WAIT;
        Q_WAIT: if (req_done) begin
          qkey[QI'(j)]   <= req_key;
          qfound[QI'(j)] <= req_found;
          j         <= j + 1'b1;
          st        <= (j == qcount - 1'b1) ? Q_HOLD : Q_REQ;
        end
        Q_HOLD: if (release_keys) st <= Q_IDLE;
        default: st <= Q_IDLE;
      endcase
    end
  end
endmodule
