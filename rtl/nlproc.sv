// nlproc: LSTM-based hardware language processor (top level).
//
// A query sentence arrives as text on a 9600-baud serial line. Its words are
// collected (shift register, 8-word FIFO), turned into byte values by the
// vectorizer and into keys by the key generator, all through the reverse
// lookup dictionary (RLD) built over the information text stored in the word
// library. For every word of the information text the control unit then
// streams the query keys against that word's key through the key encoder;
// the resulting codes drive the LSTM decoder (training layer per word,
// prediction layer per sentence), and the dialogue modeler scores each
// sentence and sends the best one back, character by character, through the
// synchronization buffer and the UART transmitter.
// Interface:
//   rxd / txd          serial query in, response out (8N1, CLKS_PER_BIT
//                      clocks per bit, 5208 = 9600 baud at 50 MHz)
//   lib_*              information-text loading: `lib_clear` restarts the
//                      address generator, each `lib_we` stores one 80-bit
//                      right-aligned word with its end-of-sentence flag;
//                      `lib_build` then builds the dictionary (`lib_ready`)
//   pw_*               write port of the LSTM weight and bias stores
//   qen, ien, state    control-unit status; resp_* the held response
// A query is processed only when the dictionary is ready, the library holds
// at least one word and no response is being sent. Load the library before
// sending queries. The main memory of the description's block diagram has
// no described function and is not part of this design. The decoder's
// `train_h` and `pred_h` outputs end in local signals nothing reads: the dialogue
// modeler uses only `match` and the prediction cell state.
module nlproc
  import nlp_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = CLKS_PER_BIT_DEF,
  parameter int unsigned DEPTH        = LIB_DEPTH_DEF,
  parameter int unsigned NQ           = QWORDS_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     rxd,
  output logic                     txd,
  output logic                     rx_frame_err,
  // information text loading
  input  logic                     lib_clear,
  input  logic                     lib_we,
  input  word_t                    lib_word,
  input  logic                     lib_eos,
  input  logic                     lib_build,
  output logic                     lib_ready,
  output logic [$clog2(DEPTH+1)-1:0] lib_count,
  // LSTM weight/bias write port
  input  logic                     pw_we,
  input  logic                     pw_layer,
  input  gate_e                    pw_gate,
  input  logic [1:0]               pw_field,
  input  fx_t                      pw_wdata,
  // status
  output logic                     qen,
  output logic                     ien,
  output logic [3:0]               state,
  output logic                     fifo_wr_n_rd,
  output logic                     resp_busy,
  output logic                     resp_done,
  output logic                     resp_found,
  output logic [$clog2(DEPTH)-1:0] resp_start,
  output logic [$clog2(DEPTH)-1:0] resp_end,
  output logic signed [19:0]       resp_score
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned QW = $clog2(NQ + 1);
  localparam int unsigned QI = (NQ > 1) ? $clog2(NQ) : 1;

  // ------------------------------------------------------ query input path
  byte_t rx_byte;
  logic  rx_valid;
  word_t sr_word;
  logic  sr_valid, sr_qend;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk(clk), .rst_n(rst_n), .rxd(rxd),
    .data(rx_byte), .valid(rx_valid), .frame_err(rx_frame_err)
  );

  word_shift_register u_sr (
    .clk(clk), .rst_n(rst_n), .in_byte(rx_byte), .in_valid(rx_valid),
    .word(sr_word), .word_valid(sr_valid), .query_end(sr_qend)
  );

  word_t         f_word;
  logic          f_rd, f_empty;
  logic [QW-1:0] f_count;

  word_fifo #(.DEPTH(NQ)) u_fifo (
    .clk(clk), .rst_n(rst_n), .wr_data(sr_word), .wr_en(sr_valid),
    .query_end(sr_qend), .rd_en(f_rd), .rd_data(f_word),
    .wr_n_rd(fifo_wr_n_rd), .empty(f_empty), .count(f_count)
  );

  // --------------------------------------------------- library and the RLD
  logic [AW-1:0] lib_ra [3];
  word_t         lib_rw [3];
  logic          lib_re [3];

  word_library #(.DEPTH(DEPTH), .NRD(3)) u_lib (
    .clk(clk), .rst_n(rst_n), .clear(lib_clear), .wr_en(lib_we),
    .wr_word(lib_word), .wr_eos(lib_eos), .count(lib_count),
    .rd_addr(lib_ra), .rd_word(lib_rw), .rd_eos(lib_re)
  );

  logic          rq_start, rq_done, rq_found;
  word_t         rq_word;
  byte_t         rq_key, info_key, gen_key;
  logic [AW-1:0] info_addr, gen_addr, gen_waddr;

  rld #(.DEPTH(DEPTH)) u_rld (
    .clk(clk), .rst_n(rst_n), .build(lib_build), .lib_count(lib_count),
    .ready(lib_ready),
    .fetch_addr(lib_ra[0]), .fetch_word(lib_rw[0]),
    .scan_addr(lib_ra[1]), .scan_word(lib_rw[1]),
    .req_start(rq_start), .req_word(rq_word), .req_done(rq_done),
    .req_found(rq_found), .req_key(rq_key),
    .look_addr_a(info_addr), .look_key_a(info_key),
    .look_addr_b(gen_addr), .look_key_b(gen_key),
    .rev_key(gen_key), .rev_addr(gen_waddr)
  );

  // Port 2 serves both the current word's sentence flag during a pass and
  // the output generator's word reads afterwards.
  assign lib_ra[2] = resp_busy ? gen_waddr : info_addr;

  // ---------------------------------------------------------- query keys
  byte_t         qkey   [NQ];
  logic          qfound [NQ];
  logic [QW-1:0] qcount;
  logic          keys_ready, pass_start, pass_done;

  query_vectorizer #(.NQ(NQ)) u_qv (
    .clk(clk), .rst_n(rst_n),
    .fifo_wr_n_rd(fifo_wr_n_rd), .fifo_empty(f_empty), .fifo_word(f_word),
    .fifo_count(f_count), .fifo_rd(f_rd),
    .rld_ready(lib_ready), .req_start(rq_start), .req_word(rq_word),
    .req_done(rq_done), .req_found(rq_found), .req_key(rq_key),
    .keys_ready(keys_ready), .release_keys(pass_done),
    .qkey(qkey), .qfound(qfound), .qcount(qcount)
  );

  // -------------------------------------------------------- main control
  logic          start, done, word_start, sent_start, enc_valid, word_done;
  enc_op_e       enc_op;
  logic [QW-1:0] enc_idx;

  assign start = keys_ready && lib_ready && (lib_count != '0) && !resp_busy;
  assign done  = ({1'b0, info_addr} == lib_count - 1'b1);

  main_control_unit #(.DEPTH(DEPTH), .NQ(NQ)) u_mcu (
    .clk(clk), .rst_n(rst_n), .start(start), .done(done), .qcount(qcount),
    .info_eos(lib_re[2]), .word_done(word_done),
    .qen(qen), .ien(ien), .pass_start(pass_start), .pass_done(pass_done),
    .word_start(word_start), .sent_start(sent_start),
    .enc_valid(enc_valid), .enc_op(enc_op), .enc_idx(enc_idx),
    .info_addr(info_addr), .state_num(state)
  );

  // --------------------------------------------------------- key encoder
  byte_t         code;
  logic          code_valid, code_last;
  logic [QW-1:0] code_idx;
  logic [QI-1:0] qsel;

  assign qsel = (enc_idx < QW'(NQ)) ? QI'(enc_idx) : '0;

  key_encoder #(.NQ(NQ)) u_enc (
    .clk(clk), .rst_n(rst_n), .in_valid(enc_valid), .op(enc_op),
    .qkey(qkey[qsel]), .qvalid(qfound[qsel]), .ikey(info_key),
    .idx_in(enc_idx), .code(code), .code_valid(code_valid),
    .code_last(code_last), .idx_out(code_idx)
  );

  // -------------------------------------------------------- LSTM decoder
  logic match;
  fx_t  train_h, pred_c, pred_h;

  lstm_decoder u_dec (
    .clk(clk), .rst_n(rst_n), .word_start(word_start), .sent_start(sent_start),
    .code(code), .code_valid(code_valid), .code_last(code_last),
    .pw_we(pw_we), .pw_layer(pw_layer), .pw_gate(pw_gate),
    .pw_field(pw_field), .pw_wdata(pw_wdata),
    .word_done(word_done), .match(match), .train_h(train_h),
    .pred_c(pred_c), .pred_h(pred_h)
  );

  // ---------------------------------------------------- dialogue modeler
  byte_t dm_byte, su_byte;
  logic  dm_valid, dm_ready, su_valid, tx_ready;

  dialogue_modeler #(.DEPTH(DEPTH), .NQ(NQ)) u_dm (
    .clk(clk), .rst_n(rst_n), .pass_start(pass_start), .pass_done(pass_done),
    .word_start(word_start), .info_addr(info_addr),
    .info_eos(lib_re[2] || done),
    .cmp_valid(code_valid), .cmp_match(code == CODE_MATCH), .cmp_idx(code_idx),
    .word_done(word_done), .match(match), .pred_c(pred_c),
    .gen_addr(gen_addr), .gen_word(lib_rw[2]),
    .out_byte(dm_byte), .out_valid(dm_valid), .out_ready(dm_ready),
    .busy(resp_busy), .resp_done(resp_done),
    .resp_start(resp_start), .resp_end(resp_end), .resp_score(resp_score),
    .resp_found(resp_found)
  );

  sync_unit u_sync (
    .clk(clk), .rst_n(rst_n), .in_byte(dm_byte), .in_valid(dm_valid),
    .in_ready(dm_ready), .out_byte(su_byte), .out_valid(su_valid),
    .out_ready(tx_ready)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk(clk), .rst_n(rst_n), .data(su_byte), .valid(su_valid),
    .ready(tx_ready), .txd(txd)
  );
endmodule
