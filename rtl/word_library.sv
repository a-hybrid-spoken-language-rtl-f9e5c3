// word_library: RAM holding the information text, one word per address.
//
// The information text (the paragraph the processor answers from) is
// written at run time, word by word, through `wr_en`/`wr_word`. An address
// generator inside the block supplies the write address: it restarts at
// 00 on `clear` and advances by one after each write, up to DEPTH words
// (addresses 00 to FF for the default 256). `count` tells how many words are
// stored. Next to each word the block keeps an end-of-sentence flag,
// written with the word, which marks the last word of each sentence; the
// flag is this implementation's way of delimiting candidate responses.
// Words are stored in the same right-aligned 80-bit form the word shift
// register produces. NRD independent read ports are asynchronous (the data
// follows the address in the same cycle). Writes past DEPTH are ignored.
module word_library
  import nlp_pkg::*;
#(
  parameter int unsigned DEPTH = LIB_DEPTH_DEF,
  parameter int unsigned NRD   = 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       wr_en,
  input  word_t                      wr_word,
  input  logic                       wr_eos,
  output logic [$clog2(DEPTH+1)-1:0] count,
  input  logic [$clog2(DEPTH)-1:0]   rd_addr [NRD],
  output word_t                      rd_word [NRD],
  output logic                       rd_eos  [NRD]
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  word_t         mem     [DEPTH];
  logic          eos_mem [DEPTH];
  logic [CW-1:0] wa;    // address generator

  assign count = wa;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           wa <= '0;
    else if (clear)                       wa <= '0;
    else if (wr_en && wa != CW'(DEPTH))   wa <= wa + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!clear && wr_en && wa != CW'(DEPTH)) begin
      mem[AW'(wa)]     <= wr_word;
      eos_mem[AW'(wa)] <= wr_eos;
    end
  end

  for (genvar i = 0; i < NRD; i++) begin : g_rd
    assign rd_word[i] = mem[rd_addr[i]];
    assign rd_eos[i]  = eos_mem[rd_addr[i]];
  end
endmodule
