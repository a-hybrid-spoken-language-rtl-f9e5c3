// main_control_unit: the state machine that sequences the language processor.
//
// Nine states, S1 to S9, as in the description's state diagram:
//   S1  idle, QEN = 0, IEN = 0; stays until START (query keys ready)
//   S2  QEN = 1: the query keys are offered again for the next information
//       word; the training layer is cleared (and the prediction layer too
//       when a new sentence begins)
//   S3  key encoder: query start code
//   S4  key encoder: one compare per query key (stays QCOUNT cycles)
//   S5  key encoder: query end code
//   S6  wait for the LSTM training layer result
//   S7  wait for the LSTM prediction layer result (`word_done`)
//   S8  index detect has taken the word's result
//   S9  IEN = 1: advance to the next information word; DONE = 1 (the last
//       library word was processed) returns to S1, DONE = 0 returns to S2
// The description gives S1, S2 and S9 with their QEN/IEN outputs and the
// START/DONE transitions, but not what S3 to S8 do; their contents here
// are this implementation's. `pass_start` pulses on S1 -> S2, `pass_done`
// on S9 -> S1. Per information word the loop S2..S9 takes QCOUNT + 8 cycles
// plus the pipeline waits, about QCOUNT + 10 cycles.
module main_control_unit
  import nlp_pkg::*;
#(
  parameter int unsigned DEPTH = LIB_DEPTH_DEF,
  parameter int unsigned NQ    = QWORDS_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     done,
  input  logic [$clog2(NQ+1)-1:0]  qcount,
  input  logic                     info_eos,
  input  logic                     word_done,
  output logic                     qen,
  output logic                     ien,
  output logic                     pass_start,
  output logic                     pass_done,
  output logic                     word_start,
  output logic                     sent_start,
  output logic                     enc_valid,
  output enc_op_e                  enc_op,
  output logic [$clog2(NQ+1)-1:0]  enc_idx,
  output logic [$clog2(DEPTH)-1:0] info_addr,
  output logic [3:0]               state_num
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned QW = $clog2(NQ + 1);

  typedef enum logic [3:0] {S1 = 4'd1, S2, S3, S4, S5, S6, S7, S8, S9} mcu_st_e;
  mcu_st_e       st;
  logic [QW-1:0] j;
  logic          new_sent;

  assign state_num  = st;
  assign qen        = (st == S2);
  assign ien        = (st == S9);
  assign word_start = (st == S2);
  assign sent_start = (st == S2) && new_sent;
  assign enc_valid  = (st == S3) || (st == S4) || (st == S5);
  assign enc_idx    = j;
  assign pass_start = (st == S1) && start;
  assign pass_done  = (st == S9) && done;

  always_comb begin
    unique case (st)
      S3:      enc_op = ENC_START;
      S5:      enc_op = ENC_END;
      default: enc_op = ENC_COMPARE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S1;
      j         <= '0;
      info_addr <= '0;
      new_sent  <= 1'b1;
    end else begin
      unique case (st)
        S1: if (start) begin
          st        <= S2;
          info_addr <= '0;
          new_sent  <= 1'b1;
        end
        S2: begin
          j  <= '0;
          st <= S3;
        end
        S3: st <= (qcount == '0) ? S5 : S4;
        S4: begin
          if (j == qcount - 1'b1) st <= S5;
          j <= j + 1'b1;
        end
        S5: st <= S6;
        S6: st <= S7;
        S7: if (word_done) st <= S8;
        S8: begin
          new_sent <= info_eos;
          st       <= S9;
        end
        S9: begin
          if (done) begin
            st <= S1;
          end else begin
            info_addr <= info_addr + 1'b1;
            st        <= S2;
          end
        end
        default: st <= S1;
      endcase
    end
  end
endmodule
