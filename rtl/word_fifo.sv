// word_fifo: holds the first DEPTH words of a query (8 in the description).
//
// Words are written in arrival order while the FIFO is in write mode
// (`wr_n_rd` low, the active-low ~W/R of the description). When the FIFO
// becomes full, `wr_n_rd` goes high and the words can be read out
// sequentially. This implementation also switches to read mode when the
// query ends with the FIFO holding at least one word, so short queries are
// processed; words of a longer query past the DEPTH-th are discarded until
// its end. When the last word has been read the FIFO returns to write mode.
// Reads: `rd_data` shows the oldest word while `wr_n_rd` is high; `rd_en`
// pops it. `count` is the number of words captured for the current query.
// An assertion flags a pop in write mode or from an empty FIFO; its
// `disable iff (!rst_n)` is why lint reports rst_n as used both
// asynchronously and synchronously. That use is in the check only.
module word_fifo
  import nlp_pkg::*;
#(
  parameter int unsigned DEPTH = QWORDS_DEF,
  parameter int unsigned W     = WORD_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [W-1:0]               wr_data,
  input  logic                       wr_en,
  input  logic                       query_end,
  input  logic                       rd_en,
  output logic [W-1:0]               rd_data,
  output logic                       wr_n_rd,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rp;
  logic [CW-1:0] n;        // words written for this query
  logic [CW-1:0] left;     // words not yet read
  logic          skip;     // dropping the tail of an over-long query

  assign rd_data = mem[rp];
  assign empty   = (left == '0);
  assign count   = n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp      <= '0;
      n       <= '0;
      left    <= '0;
      skip    <= 1'b0;
      wr_n_rd <= 1'b0;
    end else if (!wr_n_rd) begin
      // write mode
      if (skip) begin
        if (query_end) skip <= 1'b0;
      end else begin
        if (wr_en) begin
          n    <= n + 1'b1;
          left <= left + 1'b1;
        end
        if (wr_en && n == CW'(DEPTH - 1)) begin
          wr_n_rd <= 1'b1;
          skip    <= !query_end;
          rp      <= '0;
        end else if (query_end && (n != '0 || wr_en)) begin
          wr_n_rd <= 1'b1;
          rp      <= '0;
        end
      end
    end else begin
      // read mode
      if (query_end) skip <= 1'b0;
      if (rd_en && left != '0) begin
        rp   <= rp + 1'b1;
        left <= left - 1'b1;
        if (left == CW'(1)) begin
          wr_n_rd <= 1'b0;
          n       <= '0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!wr_n_rd && !skip && wr_en && n < CW'(DEPTH))
      mem[AW'(n)] <= wr_data;
  end

  a_no_pop_when_empty: assert property (@(posedge clk) disable iff (!rst_n)
    rd_en |-> (wr_n_rd && !empty));
endmodule
