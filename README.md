# nlproc: an LSTM-based hardware question-answering processor

`nlproc` takes a typed or transcribed question and replies with the best-matching
sentence from a stored information text. It is written in SystemVerilog.
The question arrives as ASCII text on a 9600-baud serial line, ending with a line feed.
The processor splits the question into words and turns each word into an 8-bit key.
It then compares those keys against every word of the information text, which
is held in an on-chip word library. The comparison results drive a small
two-layer LSTM decoder and a sentence scorer. The highest-scoring sentence is
sent back on the serial line, with words separated by spaces and a line feed at the end.

Example with the default information text used by the testbenches (a product
sheet about a phone maker):

    query   : Give the founder of Samsung?
    response: the founder of samsung is lee byung

The design targets a 50 MHz clock (5208 clocks per serial bit). All default
sizes match that target:
- a 256-word library (8-bit addresses 00 to FF)
- words of up to 10 characters (80 bits)
- queries of up to 8 words

## Data flow

```
rxd -> uart_rx -> word_shift_register -> word_fifo -> query_vectorizer --+
                                                         (keys of query) |
lib_* -> word_library <-> rld (vectorizer + key_generator, key table)  <-+
                                 |
                     main_control_unit (S1..S9)
                                 |
          key_encoder -> lstm_decoder (training + prediction layer)
                                 |
                         dialogue_modeler -> sync_unit -> uart_tx -> txd
```

1. **Receive.** `uart_rx` (8N1, LSB first, mid-bit sampling) delivers bytes.
   `word_shift_register` collects the characters of a word into an 80-bit
   register:
   - Upper case is folded to lower case.
   - The marks `? . ! ,` are dropped.
   - Characters after the tenth are discarded.
   - A space ends a word. LF or CR ends the word and the query.
2. **Query FIFO.** `word_fifo` keeps the first 8 words of the query. Its
   active-low `~W/R` flag (`wr_n_rd`) switches to read mode when the FIFO is
   full or the query ends. Words after the eighth are dropped.
3. **Keys.** `query_vectorizer` reads the FIFO. It asks the reverse lookup
   dictionary (`rld`) for each word's key and holds up to 8 keys.
   - Words get *byte values* in order of first appearance in the library:
     0, 1, 2, and so on. A repeated word gets the value of its first
     occurrence. The `vectorizer` finds a word's first occurrence with a
     sequential scan. `rld` keeps a value table per library address and a
     first-address table per value.
   - The *key* is `rotl3(byte) ^ 8'h5A`, computed by `key_generator`. The
     mapping is a bijection, so a key can be turned back into a byte value
     and, through the first-address table, into a library address.
   - Words that are not in the library get no key and never match.
   - When all keys are ready, START is raised.
4. **Control.** `main_control_unit` runs one loop S2..S9 per information
   word:

   | state | action |
   |---|---|
   | S1 | idle, QEN = IEN = 0, wait for START |
   | S2 | QEN = 1, clear the training layer (and the prediction layer at a sentence start) |
   | S3 | query start code |
   | S4 | one compare per query key |
   | S5 | query end code |
   | S6, S7 | wait for the two LSTM layers |
   | S8 | index detect takes the result |
   | S9 | IEN = 1; DONE returns to S1, otherwise go to the next word and S2 |

5. **Key encoder.** `key_encoder` outputs one code per operation:

   | event | code |
   |---|---|
   | query start | 127 |
   | query end | 63 |
   | query key equals the information key | 191 |
   | no match | 0 |

6. **LSTM decoder.** `lstm_decoder` has two LSTM layers, each with one cell.
   Each layer has its own weight and bias store (`lstm_params`).
   - The *training layer* runs one step per code, with input x = code/256.
     Codes 63, 127 and 191 therefore sit at 25%, 50% and 75% of full scale.
     With the default weights, its output after a word's code sequence is
     at least 0.5 exactly when a 191 (match) code was seen. That is the
     word's `match` flag.
   - The *prediction layer* takes one step per information word, using the
     training output as input. It is cleared at each sentence start, so its
     cell state grows with the number of matching words in the sentence.
7. **Dialogue modeler.** `dialogue_modeler` has three parts:
   - Index detect scores every sentence:
     `score = prediction cell state + 1.0 × (number of neighbouring matching
     words whose query positions are consecutive)`. The second term rewards
     keywords that appear in the same order as in the question.
   - Output hold keeps the first sentence with the highest positive score.
   - Output generation reads that sentence word by word. It goes through the
     dictionary key table and the key-to-address mapping, then emits the
     characters.
   - If no sentence scores above zero, the response is a bare line feed.
8. **Transmit.** `sync_unit`, a 4-byte valid/ready buffer, feeds `uart_tx`.
   `uart_tx` uses `clock_divider` for its bit timing and sends frames back
   to back.

## Arithmetic

LSTM values are signed Q8.8 (16 bits, 1.0 = 256), and every product and sum
saturates. The gate nonlinearities are piecewise linear:

- sigmoid(z) ≈ clamp(z/4 + 0.5, 0, 1)
- tanh(z) ≈ clamp(z, −1, 1)

```
i = sig(wx_i x + wh_i h + b_i)   f = sig(...)   o = sig(...)
u = tanh(wx_u x + wh_u h + b_u)
c' = f c + i u                   h' = o tanh(c')
```

Default weights (Q8.8 integers). All recurrent weights are 0, and both layers
start with the same defaults:

| gate | wx | b |
|---|---|---|
| input | 4096 | −2560 |
| forget | 0 | 2048 |
| output | 0 | 2048 |
| update (candidate) | 1024 | −512 |

Any weight or bias of either layer can be rewritten through the `pw_*` port.

## Top-level interface (`nlproc`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `rxd` / `txd` | in / out | serial query / response, idle high |
| `rx_frame_err` | out | pulse: a received frame had a low stop bit |
| `lib_clear` | in | restart the library address generator at 00 |
| `lib_we`, `lib_word`, `lib_eos` | in | store one word (80-bit, right-aligned, lower case, last character in bits 7:0) and its end-of-sentence flag |
| `lib_build` / `lib_ready` | in / out | build the dictionary after loading / dictionary ready |
| `lib_count` | out | number of stored words |
| `pw_we`, `pw_layer`, `pw_gate`, `pw_field`, `pw_wdata` | in | write a weight (field 0 input, 1 recurrent) or bias (field 2) |
| `qen`, `ien`, `state` | out | control-unit status, `state` = 1..9 |
| `fifo_wr_n_rd` | out | query FIFO mode (~W/R) |
| `resp_busy`, `resp_done` | out | response being sent / pulse at its last byte |
| `resp_found`, `resp_start`, `resp_end`, `resp_score` | out | held response: found flag, first and last library address, score (Q8.8) |

Parameters:
- `CLKS_PER_BIT` (5208)
- `DEPTH` (256 library words)
- `NQ` (8 query words)

Use the processor in three steps:
1. Load the library with `lib_clear` followed by one `lib_we` per word.
2. Pulse `lib_build` and wait for `lib_ready`.
3. Send queries.

A query is only processed when the dictionary is ready, the library is not
empty and no response is being sent.

Timing:
- Building the dictionary takes about N²/2 cycles for N words, because each
  word is found by a sequential scan.
- Keying a query takes up to N cycles per query word.
- The pass over the information text takes about (query words + 10) cycles
  per library word.
- At 9600 baud the serial transfers dominate. A 30-character question takes
  31 ms to receive.

## Departures and own choices

The functional description this design follows gives the block structure, the
9600-baud link, the 80-bit word, the 8-word query FIFO, the 8-bit library
addresses, the four encoder codes and the S1..S9 state diagram (S1, S2 and S9
outputs only). It does not give the following, so they are this design's own
choices:

- word delimiters, case folding and punctuation handling
- the key function (the numbering of byte values in order of first
  appearance matches the values shown in the source's dictionary waveform)
- how the dictionary is stored
- what states S3 to S8 do
- the LSTM equations, number format, nonlinearities and weights
- the scoring formula, tie-break and no-match response
- the synchronization unit (only a name in the source)
- the decoder's input and output layers: here the input layer is the code/256
  scaling and the output layer is the match threshold

Where this design departs from the source:

- Pacing. The source runs the shift register from a divided clock under the
  control unit. Here everything runs on the system clock. The receiver's byte
  strobe shifts the word register, and the divider only times the
  transmitter's bits.
- Query keys. The source draws separate key generators for the query and the
  information text. Here both go through the one dictionary, so a query word
  gets exactly the key of the same word in the text.
- Loading. The information text is written through a parallel word port
  instead of being downloaded as a file. The source does not describe that
  download path.

Two blocks are not built:
- A "main memory" box appears in the source's block diagram, but its function
  is not described.
- The speech recognizer and the speech synthesizer run as software on a host.

The loaded text lives in a 256 × 80-bit memory array (20.7 kbit). With the
dictionary tables (6 kbit), generic synthesis gives about 1100 cells,
1080 flip-flops and 27.5 kbit of memory.

## Verification status

Every module has its own self-checking testbench. Each testbench was also run
against a deliberately broken copy of its module and caught the fault. All
testbenches pass under Verilator 5 with random initial state. Generic
synthesis with Yosys reports no latches and no combinational loops. No
FPGA or ASIC implementation was timed, so the achievable clock rate is not
known.

## Files

- `rtl/nlp_pkg.sv`: shared constants, types, key functions, Q8.8 helpers.
- `rtl/*.sv`: one module per file. The names match the blocks above, plus
  `clock_divider`, `word_library` and `lstm_cell`.
- `tb/tb_util_pkg.sv`: text helpers, the example information text and a
  software LSTM reference model.
- `tb/tb_<module>.sv`: a self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.
- `tb/tb_nlproc.sv`: end-to-end test with a short bit time (16 clocks). It
  sends 11 queries and compares every response with a reference model. It
  also counts that each mechanism was exercised:
  - match and no match
  - FIFO full and short query
  - unknown word and over-long word
  - ordered pair
  - no response
  - both DONE branches
  - transmit back-pressure
- `tb/tb_nlproc_full.sv`: end-to-end test at the default sizes (5208 clocks
  per bit, 256-word library, 8 query words). It fills all 256 library
  addresses and checks three queries. The last query is answered by the
  sentence that ends at address FF. It also checks that every line
  transition falls on a bit boundary.
- `tb/tb_nlproc_table4.sv`: the ten-question product-support workload at
  default sizes, with a 16-clock bit time. Each response is checked against the
  reference model. It also reports how often the intended sentence wins: 7 of 10.

## Simulation

With Verilator 5 (any SystemVerilog simulator with timing support works the
same way):

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/nlp_pkg.sv tb/tb_util_pkg.sv tb/tb_nlproc.sv --top-module tb_nlproc
./obj_dir/Vtb_nlproc
```

Replace `tb_nlproc` with any other testbench name. `tb_nlproc_full` simulates
about 0.18 s of serial traffic at 50 MHz, which takes a few seconds.

## Limitations

- Matching is exact on the first 10 characters. There are no synonyms and
  no stemming, so "located" does not match "location".
- Only the first 8 query words count.
- The ordered-pair bonus can outweigh keyword count, and common words such as
  "the", "of" and "is" count like any other. On the ten-question workload the
  intended sentence wins 7 times. The three misses ("Identify the current
  focus of Samsung", "Give the location of Samsung?", "The main competitor of
  Samsung is") all return the founder sentence, because "of samsung" forms an
  ordered pair there. A stop-word list or a different scoring rule in
  `dialogue_modeler` would change this.
- The LSTM weights are fixed values chosen by hand. There is no on-chip
  training.
