// lstm_cell: one fixed-point LSTM cell, one time step per `step`.
//
// The memory cell c is guarded by four gates computed from the input x and
// the previous output h:
//   i = sig(Wi x + Ui h + bi)     input gate
//   f = sig(Wf x + Uf h + bf)     forget gate
//   o = sig(Wo x + Uo h + bo)     output gate
//   g = tanh(Wg x + Ug h + bg)    update (candidate) gate
//   c' = f c + i g,   h' = o tanh(c')
// All values are signed Q8.8; products are rounded toward minus infinity and
// saturated to 16 bits. sig and tanh are the piecewise-linear forms
// clamp(z/4 + 1/2, 0, 1) and clamp(z, -1, 1). The gate structure follows
// the description; number format and activation shapes are this
// implementation's choices. Timing: the whole step is computed in the cycle
// `step` is high and c, h are updated at its end; `out_valid` pulses one
// cycle later together with the new h and c. `clear` zeroes the state
// (and has priority over `step`).
module lstm_cell
  import nlp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        step,
  input  fx_t         x,
  input  lstm_param_t p,
  output fx_t         h,
  output fx_t         c,
  output logic        out_valid
);
  fx_t z [4];
  fx_t gi, gf, go, gg, c_n, h_n;

  always_comb begin
    for (int g = 0; g < 4; g++)
      z[g] = fx_sat(32'(fx_mul(p[g].wx, x)) + 32'(fx_mul(p[g].wh, h)) + 32'(p[g].b));
    gi  = hsigmoid(z[G_INPUT]);
    gf  = hsigmoid(z[G_FORGET]);
    go  = hsigmoid(z[G_OUTPUT]);
    gg  = htanh(z[G_UPDATE]);
    c_n = fx_sat(32'(fx_mul(gf, c)) + 32'(fx_mul(gi, gg)));
    h_n = fx_mul(go, htanh(c_n));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h         <= '0;
      c         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= step && !clear;
      if (clear) begin
        h <= '0;
        c <= '0;
      end else if (step) begin
        h <= h_n;
        c <= c_n;
      end
    end
  end
endmodule
