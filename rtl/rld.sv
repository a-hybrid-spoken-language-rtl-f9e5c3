// rld: reverse lookup dictionary.
//
// The dictionary turns words into keys and keys back into words. It owns
// the vectorizer (word -> library address of its first occurrence) and a
// key_generator (byte value <-> key) and works in two phases.
//  Build: on `build` it walks the word library from address 0 to
//  lib_count-1 and vectorizes each stored word. A word seen for the first
//  time gets the next byte value (0, 1, 2, ... in order of appearance); a
//  repeated word gets the value of its first occurrence. So a text whose
//  words 1 and 2 are equal numbers its words 0, 1, 1, 2, 3, ... Three tables
//  are filled: the byte value per library address, the first library
//  address per byte value, and the key per library address. `ready` rises
//  when they are complete (one scan per word: at most DEPTH*(DEPTH+3)
//  cycles).
//  Service: when ready, a requester may present a word with `req_start`
//  (the query path does this for every query word); `req_done` pulses with
//  the word's key and `req_found` (0 for a word absent from the library).
//  Two asynchronous lookup ports read the key table by address, and the
//  address-mapping port converts a key back into the library address of
//  the first occurrence of its word (`rev_key` -> byte value -> `rev_addr`),
//  from which the caller reads the word.
// The description asks only for a unique key per word and for recovering a
// word from its key; the numbering in order of first appearance follows the
// values in its RLD waveform, and the table organisation is this design's.
// `req_start` while not ready is ignored. Library access uses two read
// ports: one to fetch the word being built, one for the vectorizer's scan.
module rld
  import nlp_pkg::*;
#(
  parameter int unsigned DEPTH = LIB_DEPTH_DEF
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       build,
  input  logic [$clog2(DEPTH+1)-1:0] lib_count,
  output logic                       ready,
  // library access
  output logic [$clog2(DEPTH)-1:0]   fetch_addr,
  input  word_t                      fetch_word,
  output logic [$clog2(DEPTH)-1:0]   scan_addr,
  input  word_t                      scan_word,
  // word -> key service
  input  logic                       req_start,
  input  word_t                      req_word,
  output logic                       req_done,
  output logic                       req_found,
  output byte_t                      req_key,
  // key table lookups
  input  logic [$clog2(DEPTH)-1:0]   look_addr_a,
  output byte_t                      look_key_a,
  input  logic [$clog2(DEPTH)-1:0]   look_addr_b,
  output byte_t                      look_key_b,
  // key -> address mapping
  input  byte_t                      rev_key,
  output logic [$clog2(DEPTH)-1:0]   rev_addr
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  typedef enum logic [1:0] {R_IDLE, R_FETCH, R_WAIT, R_READY} rst_e;
  rst_e          st;
  logic [CW-1:0] ba;          // build address
  logic [CW-1:0] nd;          // distinct words numbered so far
  byte_t         key_tab [DEPTH];
  byte_t         val_tab [DEPTH];   // byte value of each library address
  logic [AW-1:0] adr_tab [DEPTH];   // first library address of each value
  logic          is_new;
  byte_t         bval;

  logic  v_start, v_busy, v_done, v_found;
  word_t v_word;
  byte_t v_loc, k_out, rev_byte;

  vectorizer #(.DEPTH(DEPTH)) u_vec (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (v_start),
    .word     (v_word),
    .lib_count(lib_count),
    .lib_addr (scan_addr),
    .lib_word (scan_word),
    .busy     (v_busy),
    .done     (v_done),
    .found    (v_found),
    .byte_val (v_loc)
  );

  key_generator u_keygen (
    .byte_in (bval),
    .key_out (k_out),
    .key_in  (rev_key),
    .byte_out(rev_byte)
  );

  // A word is new when its first occurrence is the address being built
  assign is_new     = (st == R_WAIT) && (v_loc == byte_t'(ba));
  assign bval       = is_new ? byte_t'(nd) : val_tab[AW'(v_loc)];
  assign fetch_addr = AW'(ba);
  assign ready      = (st == R_READY);
  assign v_start    = (st == R_FETCH) || (st == R_READY && req_start && !v_busy);
  assign v_word     = (st == R_FETCH) ? fetch_word : req_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= R_IDLE;
      ba <= '0;
      nd <= '0;
    end else if (build) begin
      st <= R_IDLE;
      ba <= '0;
      nd <= '0;
      if (lib_count != '0) st <= R_FETCH;
      else                 st <= R_READY;
    end else begin
      unique case (st)
        R_IDLE:  ;
        R_FETCH: st <= R_WAIT;
        R_WAIT: if (v_done) begin
          if (ba == lib_count - 1'b1) st <= R_READY;
          else                        st <= R_FETCH;
          ba <= ba + 1'b1;
          if (is_new) nd <= nd + 1'b1;
        end
        R_READY: ;
        default: st <= R_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st == R_WAIT && v_done) begin
      key_tab[AW'(ba)] <= k_out;
      val_tab[AW'(ba)] <= bval;
      if (is_new) adr_tab[AW'(nd)] <= AW'(ba);
    end
  end

  // Service results: only requests made in R_READY reach here
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_done  <= 1'b0;
      req_found <= 1'b0;
      req_key   <= '0;
    end else begin
      req_done <= (st == R_READY) && v_done;
      if ((st == R_READY) && v_done) begin
        req_found <= v_found;
        req_key   <= k_out;
      end
    end
  end

  assign look_key_a = key_tab[look_addr_a];
  assign look_key_b = key_tab[look_addr_b];
  assign rev_addr   = adr_tab[AW'(rev_byte)];
endmodule
