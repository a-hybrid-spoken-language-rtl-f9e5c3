// uart_rx: asynchronous serial receiver, 8 data bits, no parity, 1 stop bit.
//
// The line idles high. A high-to-low transition is taken as a start bit;
// the receiver waits half a bit time, checks that the line is still low,
// then samples the 8 data bits (LSB first) one bit time apart at the middle
// of each bit, and finally samples the stop bit. The byte is delivered only
// if the stop bit is high; otherwise `frame_err` pulses. The bit time is
// CLKS_PER_BIT system clocks (5208 at 50 MHz gives 9600 baud, as in the
// design description). Mid-bit sampling and the two-flop synchroniser are
// this implementation's choices.
// Interface: `data`/`valid` carry one byte with a one-cycle `valid` pulse,
// issued at the middle of the stop bit (about 9.5 bit times after the start
// edge).
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = nlp_pkg::CLKS_PER_BIT_DEF
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} st_e;
  st_e           st;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [7:0]    sh;
  logic          rx_s1, rx_s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_s1 <= 1'b1;
      rx_s2 <= 1'b1;
    end else begin
      rx_s1 <= rxd;
      rx_s2 <= rx_s1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= IDLE;
      cnt       <= '0;
      bitn      <= '0;
      sh        <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (st)
        IDLE: begin
          cnt <= '0;
          if (!rx_s2) st <= START;
        end
        START: begin
          if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt  <= '0;
            bitn <= '0;
            st   <= rx_s2 ? IDLE : DATA;   // glitch: back to idle
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        DATA: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt  <= '0;
            sh   <= {rx_s2, sh[7:1]};
            bitn <= bitn + 1'b1;
            if (bitn == 3'd7) st <= STOP;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        STOP: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt <= '0;
            st  <= IDLE;
            if (rx_s2) begin
              data  <= sh;
              valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
