// clock_divider: divides the system clock into a one-cycle enable strobe.
//
// The language processor runs on one 50 MHz clock; the slower bit rate of
// the serial link is produced by dividing that clock by an integer (5208 for
// 9600 baud). Instead of a second clock this block issues `tick` for one
// cycle every DIV cycles while `en` is high, which keeps the design in a
// single clock domain. `clr` restarts the count so a user can align the
// ticks to an event (the transmitter clears it at the start of a frame).
// Timing: `tick` is high during the DIV-th enabled cycle after `clr`, then
// during every DIV-th enabled cycle; an edge that sees it is DIV cycles
// after the previous one.
module clock_divider #(
  parameter int unsigned DIV = nlp_pkg::CLKS_PER_BIT_DEF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic clr,
  output logic tick
);
  localparam int unsigned CW = $clog2(DIV + 1);
  logic [CW-1:0] cnt;

  assign tick = en && !clr && (cnt == CW'(DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cnt <= '0;
    else if (clr)   cnt <= '0;
    else if (tick)  cnt <= '0;
    else if (en)    cnt <= cnt + 1'b1;
  end
endmodule
