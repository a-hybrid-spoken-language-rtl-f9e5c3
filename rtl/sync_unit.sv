// sync_unit: byte buffer between the dialogue modeler and the UART
// transmitter.
//
// The dialogue modeler produces response characters at clock speed while
// the transmitter takes one byte per ten bit times. This block is a small
// first-in first-out buffer with valid/ready handshakes on both sides that
// lets the modeler run ahead by DEPTH bytes and presents the bytes to the
// transmitter in order. The description only names a synchronization unit
// on this path; the buffer is this implementation's reading of it.
// Timing: a byte accepted in one cycle can be offered on the output in the
// next; `in_ready` is low when DEPTH bytes are waiting. An assertion checks
// that an offered output byte stays stable until taken. Its reset
// qualifier is the only synchronous use of rst_n that lint reports.
module sync_unit
  import nlp_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  byte_t in_byte,
  input  logic  in_valid,
  output logic  in_ready,
  output byte_t out_byte,
  output logic  out_valid,
  input  logic  out_ready
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  byte_t         buf_q [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [CW-1:0] n;
  logic          push, pop;

  assign in_ready  = (n != CW'(DEPTH));
  assign out_valid = (n != '0);
  assign out_byte  = buf_q[rp];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
      n  <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      n <= n + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) buf_q[wp] <= in_byte;
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_byte));
endmodule
