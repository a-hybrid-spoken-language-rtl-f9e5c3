// nlp_pkg: constants and types shared by the language-processor blocks.
//
// The numbers that come from the design description are the 50 MHz clock
// divided by 5208 for 9600 baud, the 80-bit (10-character) word, the 8-word
// query FIFO, the 8-bit word-library address (256 words) and the four key
// encoder codes 127, 63, 191 and 0. The fixed-point format of the LSTM
// (signed Q8.8), the key scrambling function and the default gate weights
// are this implementation's own choices.
package nlp_pkg;

  localparam int unsigned CLKS_PER_BIT_DEF = 5208;  // 50 MHz / 9600 baud
  localparam int unsigned WORD_BYTES       = 10;    // 80-bit word register
  localparam int unsigned WORD_W           = 8 * WORD_BYTES;
  localparam int unsigned QWORDS_DEF       = 8;     // first 8 words of a query
  localparam int unsigned LIB_AW           = 8;     // library address 00..FF
  localparam int unsigned LIB_DEPTH_DEF    = 1 << LIB_AW;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [7:0]        byte_t;

  // Key encoder output values
  localparam byte_t CODE_QSTART   = 8'd127;
  localparam byte_t CODE_QEND     = 8'd63;
  localparam byte_t CODE_MATCH    = 8'd191;
  localparam byte_t CODE_NOMATCH  = 8'd0;

  typedef enum logic [1:0] {
    ENC_START   = 2'd0,
    ENC_COMPARE = 2'd1,
    ENC_END     = 2'd2
  } enc_op_e;

  // Character classes seen by the word shift register
  localparam byte_t CH_SPACE = 8'h20;
  localparam byte_t CH_LF    = 8'h0A;
  localparam byte_t CH_CR    = 8'h0D;

  // Key generator: a fixed bijection on 8 bits (rotate left by 3, then XOR).
  localparam byte_t KEY_SALT = 8'h5A;

  function automatic byte_t byte_to_key(byte_t b);
    byte_t r;
    r = {b[4:0], b[7:5]};
    return r ^ KEY_SALT;
  endfunction

  function automatic byte_t key_to_byte(byte_t k);
    byte_t r;
    r = k ^ KEY_SALT;
    return {r[2:0], r[7:3]};
  endfunction

  // ---------------------------------------------------------------- LSTM
  // Signed Q8.8 fixed point: 256 represents 1.0.
  localparam int unsigned FX_W   = 16;
  localparam int unsigned FX_FRAC = 8;
  typedef logic signed [FX_W-1:0] fx_t;
  localparam fx_t FX_ONE = 16'sd256;

  // Gate order in the weight/bias storage
  typedef enum logic [1:0] {
    G_INPUT  = 2'd0,
    G_FORGET = 2'd1,
    G_OUTPUT = 2'd2,
    G_UPDATE = 2'd3     // candidate ("update") gate, tanh activation
  } gate_e;

  // One gate: input weight, recurrent weight, bias
  typedef struct packed {
    fx_t wx;
    fx_t wh;
    fx_t b;
  } gate_param_t;

  typedef gate_param_t [3:0] lstm_param_t;   // indexed by gate_e

  // Default weights: the input gate opens only for the highest input range,
  // forget and output gates are held open, the update gate is positive for
  // the same range. Values in Q8.8.
  localparam lstm_param_t LSTM_PARAM_DEF = '{
    '{wx: 16'sd1024, wh: 16'sd0, b: -16'sd512},   // G_UPDATE  : 4x - 2
    '{wx: 16'sd0,    wh: 16'sd0, b: 16'sd2048},   // G_OUTPUT  : 8
    '{wx: 16'sd0,    wh: 16'sd0, b: 16'sd2048},   // G_FORGET  : 8
    '{wx: 16'sd4096, wh: 16'sd0, b: -16'sd2560}   // G_INPUT   : 16x - 10
  };

  // Training-layer output at or above this value marks an information word
  // as matching the query (0.5).
  localparam fx_t MATCH_TH = 16'sd128;

  function automatic fx_t fx_sat(logic signed [31:0] v);
    if (v > 32'sd32767)       return 16'sd32767;
    else if (v < -32'sd32768) return -16'sd32768;
    else                      return v[15:0];
  endfunction

  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [31:0] p;
    p = 32'(a) * 32'(b);
    return fx_sat(p >>> FX_FRAC);
  endfunction

  // Piecewise-linear sigmoid: clamp(z/4 + 0.5, 0, 1)
  function automatic fx_t hsigmoid(fx_t z);
    logic signed [16:0] t;
    t = 17'(z >>> 2) + 17'sd128;
    if (t < 0)        return 16'sd0;
    else if (t > 256) return FX_ONE;
    else              return t[15:0];
  endfunction

  // Piecewise-linear tanh: clamp(z, -1, 1)
  function automatic fx_t htanh(fx_t z);
    if (z > FX_ONE)       return FX_ONE;
    else if (z < -FX_ONE) return -FX_ONE;
    else                  return z;
  endfunction

endpackage
