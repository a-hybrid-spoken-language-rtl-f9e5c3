// key_encoder: comparator that encodes query/information key pairs.
//
// For each information word the control unit sends a sequence of
// operations: ENC_START, then one ENC_COMPARE per query key, then ENC_END.
// The encoder answers each with one of four 8-bit values (Table 1 of the
// design description):
//   query text start           -> 127
//   query text end             -> 63
//   information key == query   -> 191
//   information key <> query   -> 0
// A query word that is absent from the information text (`qvalid` low)
// never matches. The output is registered: `code`, `code_valid`,
// `code_last` (set with the end code) and `idx_out` (the query position of
// a compare) appear one cycle after `in_valid`.
module key_encoder
  import nlp_pkg::*;
#(
  parameter int unsigned NQ = QWORDS_DEF
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  enc_op_e                     op,
  input  byte_t                       qkey,
  input  logic                        qvalid,
  input  byte_t                       ikey,
  input  logic [$clog2(NQ+1)-1:0]     idx_in,
  output byte_t                       code,
  output logic                        code_valid,
  output logic                        code_last,
  output logic [$clog2(NQ+1)-1:0]     idx_out
);
  byte_t c;

  always_comb begin
    unique case (op)
      ENC_START:   c = CODE_QSTART;
      ENC_END:     c = CODE_QEND;
      ENC_COMPARE: c = (qvalid && qkey == ikey) ? CODE_MATCH : CODE_NOMATCH;
      default:     c = CODE_NOMATCH;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code       <= '0;
      code_valid <= 1'b0;
      code_last  <= 1'b0;
      idx_out    <= '0;
    end else begin
      code_valid <= in_valid;
      code_last  <= in_valid && (op == ENC_END);
      if (in_valid) begin
        code    <= c;
        idx_out <= idx_in;
      end
    end
  end
endmodule
