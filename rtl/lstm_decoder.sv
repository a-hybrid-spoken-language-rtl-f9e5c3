// lstm_decoder: training and prediction LSTM layers with their weight stores.
//
// Input layer: the key encoder's codes (127, 63, 191, 0) enter as Q8.8
// values code/256, i.e. about 0.5, 0.25, 0.75 and 0: four separate ranges.
// Training layer: one LSTM cell that runs over the code sequence of one
// information word (start code, one code per query word, end code); its
// state is cleared by `word_start`. With the default weights only the match
// code opens its input gate, so its output h ends near 1 when the word
// occurs in the query and at 0 when it does not; `match` is h >= 0.5.
// Prediction layer: a second LSTM cell that takes the training layer's
// final h once per information word and runs along a sentence, so its cell
// state `pred_c` grows with the number of matching words in the sentence;
// `sent_start` clears it before the first word of a sentence. The
// dialogue modeler compares these per-sentence values to find the response.
// Timing: the training cell steps in the cycle a code arrives; one cycle
// after the end code the prediction cell steps; `word_done` pulses one
// cycle after that with `match`, `train_h`, `pred_c`, `pred_h` valid.
// Each layer's weights and biases sit in an lstm_params store written
// through `pw_*` (`pw_layer` 0 training, 1 prediction). The training
// layer's cell state stays internal: only its output h leaves the layer.
module lstm_decoder
  import nlp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       word_start,
  input  logic       sent_start,
  input  byte_t      code,
  input  logic       code_valid,
  input  logic       code_last,
  // weight/bias write port
  input  logic       pw_we,
  input  logic       pw_layer,
  input  gate_e      pw_gate,
  input  logic [1:0] pw_field,
  input  fx_t        pw_wdata,
  // results
  output logic       word_done,
  output logic       match,
  output fx_t        train_h,
  output fx_t        pred_c,
  output fx_t        pred_h
);
  lstm_param_t p_train, p_pred;
  fx_t         train_c;
  logic        train_ov, pred_ov, last_d;

  lstm_params u_w_train (
    .clk(clk), .rst_n(rst_n), .we(pw_we && !pw_layer), .gate(pw_gate),
    .field(pw_field), .wdata(pw_wdata), .params(p_train)
  );
  lstm_params u_w_pred (
    .clk(clk), .rst_n(rst_n), .we(pw_we && pw_layer), .gate(pw_gate),
    .field(pw_field), .wdata(pw_wdata), .params(p_pred)
  );

  lstm_cell u_train (
    .clk(clk), .rst_n(rst_n), .clear(word_start), .step(code_valid),
    .x(fx_t'({8'd0, code})), .p(p_train),
    .h(train_h), .c(train_c), .out_valid(train_ov)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_d <= 1'b0;
    else        last_d <= code_valid && code_last;
  end

  lstm_cell u_pred (
    .clk(clk), .rst_n(rst_n), .clear(sent_start), .step(last_d && train_ov),
    .x(train_h), .p(p_pred),
    .h(pred_h), .c(pred_c), .out_valid(pred_ov)
  );

  assign word_done = pred_ov;
  assign match     = (train_h >= MATCH_TH);
endmodule
