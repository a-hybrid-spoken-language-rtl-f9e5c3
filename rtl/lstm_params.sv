// lstm_params: weight and bias storage of one LSTM layer.
//
// Holds, for each of the four gates (input, forget, output, update), an
// input weight, a recurrent weight and a bias, each a signed Q8.8 number.
// All twelve values load from DEF at reset and can be overwritten one at a
// time through the write port (`we`, `gate`, `field`: 0 input weight,
// 1 recurrent weight, 2 bias). The complete set is always visible on
// `params` for the LSTM cell. The description gives the separate weight and
// bias memories of each gate and says the weights were predetermined by
// simulation so that cell values stay between 25% and 75% of full scale;
// the actual values, the format and the write port are this
// implementation's own.
module lstm_params
  import nlp_pkg::*;
#(
  parameter lstm_param_t DEF = LSTM_PARAM_DEF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  gate_e       gate,
  input  logic [1:0]  field,
  input  fx_t         wdata,
  output lstm_param_t params
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      params <= DEF;
    end else if (we) begin
      unique case (field)
        2'd0:    params[gate].wx <= wdata;
        2'd1:    params[gate].wh <= wdata;
        2'd2:    params[gate].b  <= wdata;
        default: ;
      endcase
    end
  end
endmodule
