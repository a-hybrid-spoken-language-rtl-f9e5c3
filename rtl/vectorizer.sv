// vectorizer: locates a word of text in the word library as an 8-bit value.
//
// The result `byte_val` is the library address at which the word first
// occurs, so equal words always receive equal results and every word of
// the information text has one. The reverse lookup dictionary turns this
// address into the word's byte value (words numbered in order of first
// appearance). On `start` the block latches `word` and scans
// the word library from address 0 upward, one address per cycle, through
// its read port (`lib_addr`/`lib_word`). It stops at the first equal entry
// or after `lib_count` entries. `done` pulses with `found` and `byte_val`
// valid (byte_val is 0 when the word is absent). Latency: `done` is set by
// the (k+1)th rising edge after the edge that samples `start` for a word
// first found at address k, by the (lib_count+1)th for an absent word.
// The description says only that the word is converted to an 8-bit value
// by the dictionary; the sequential first-occurrence search is this
// implementation's choice.
module vectorizer
  import nlp_pkg::*;
#(
  parameter int unsigned DEPTH = LIB_DEPTH_DEF
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  word_t                      word,
  input  logic [$clog2(DEPTH+1)-1:0] lib_count,
  output logic [$clog2(DEPTH)-1:0]   lib_addr,
  input  word_t                      lib_word,
  output logic                       busy,
  output logic                       done,
  output logic                       found,
  output byte_t                      byte_val
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  word_t         target;
  logic [CW-1:0] a;

  assign lib_addr = AW'(a);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      target   <= '0;
      a        <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      found    <= 1'b0;
      byte_val <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          target <= word;
          a      <= '0;
          busy   <= 1'b1;
        end
      end else if (a >= lib_count) begin
        busy     <= 1'b0;
        done     <= 1'b1;
        found    <= 1'b0;
        byte_val <= '0;
      end else if (lib_word == target) begin
        busy     <= 1'b0;
        done     <= 1'b1;
        found    <= 1'b1;
        byte_val <= byte_t'(a);
      end else begin
        a <= a + 1'b1;
      end
    end
  end
endmodule
