// uart_tx: asynchronous serial transmitter, 8 data bits, no parity, 1 stop bit.
//
// A byte offered with `valid` while `ready` is high is sent as a low start
// bit, 8 data bits LSB first and a high stop bit, each CLKS_PER_BIT system
// clocks long (5208 at 50 MHz for 9600 baud). The bit timing comes from a
// clock_divider instance that is cleared when a frame starts. The line idles
// high. `ready` is low from the accepting cycle until the last cycle of the
// stop bit, so a byte offered then follows with no idle gap: a frame takes
// exactly 10 bit times and back-to-back frames need no extra cycle.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = nlp_pkg::CLKS_PER_BIT_DEF
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);
  logic       busy;
  logic [9:0] frame;   // stop, data[7:0], start: shifted out LSB first
  logic [3:0] left;
  logic       tick;

  clock_divider #(.DIV(CLKS_PER_BIT)) u_baud (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (busy),
    .clr  (!busy),
    .tick (tick)
  );

  logic frame_end;
  assign frame_end = tick && (left == 4'd0);
  assign ready     = !busy || frame_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      frame <= '1;
      left  <= '0;
      txd   <= 1'b1;
    end else if (ready) begin
      if (valid) begin
        busy  <= 1'b1;
        frame <= {1'b1, data, 1'b0} >> 1;
        left  <= 4'd9;
        txd   <= 1'b0;            // start bit
      end else begin
        busy  <= 1'b0;
        txd   <= 1'b1;
      end
    end else if (tick) begin
      txd   <= frame[0];
      frame <= {1'b1, frame[9:1]};
      left  <= left - 1'b1;
    end
  end
endmodule
