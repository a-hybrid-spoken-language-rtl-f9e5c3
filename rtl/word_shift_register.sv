// word_shift_register: assembles received characters into 80-bit words.
//
// Each byte from the UART receiver is shifted into an 80-bit register, one
// character per byte, while a counter tracks the word length. A word ends at
// a space or at a line end (LF or CR); the word is then presented on `word`
// with a one-cycle `word_valid`. A line end also raises `query_end` (in the
// same cycle as the last word, or alone if the line ended after a space).
// The register holds at most WORD_BYTES characters (80 bits, as described);
// characters past that are dropped, so long words are truncated.
// Choices of this implementation: upper-case letters are folded to lower
// case, the punctuation marks ? . ! , are dropped, and the word is
// right-aligned (last character in bits 7:0, unused upper bytes zero).
// Timing: `word_valid` follows the delimiter byte's `in_valid` by one cycle.
module word_shift_register
  import nlp_pkg::*;
#(
  parameter int unsigned MAX_BYTES = WORD_BYTES
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [7:0]             in_byte,
  input  logic                   in_valid,
  output logic [8*MAX_BYTES-1:0] word,
  output logic                   word_valid,
  output logic                   query_end
);
  localparam int unsigned CW = $clog2(MAX_BYTES + 1);

  logic [8*MAX_BYTES-1:0] sh;
  logic [CW-1:0]          len;
  logic                   is_delim, is_eol, is_punct;
  logic [7:0]             ch;

  always_comb begin
    is_eol   = (in_byte == CH_LF) || (in_byte == CH_CR);
    is_delim = (in_byte == CH_SPACE) || is_eol;
    is_punct = (in_byte == "?") || (in_byte == ".") || (in_byte == "!") ||
               (in_byte == ",");
    ch       = (in_byte >= "A" && in_byte <= "Z") ? (in_byte | 8'h20) : in_byte;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh         <= '0;
      len        <= '0;
      word       <= '0;
      word_valid <= 1'b0;
      query_end  <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      query_end  <= 1'b0;
      if (in_valid) begin
        if (is_delim) begin
          if (len != '0) begin
            word       <= sh;
            word_valid <= 1'b1;
          end
          query_end <= is_eol;
          sh        <= '0;
          len       <= '0;
        end else if (!is_punct && len != CW'(MAX_BYTES)) begin
          sh  <= {sh[8*MAX_BYTES-9:0], ch};
          len <= len + 1'b1;
        end
      end
    end
  end
endmodule
