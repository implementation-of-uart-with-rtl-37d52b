// baud_gen: baud rate generator, a frequency divider.
//
// It divides the system clock by DIV and produces a one-cycle enable pulse,
// bclk, once every DIV clocks. With the default 32 MHz clock and DIV = 208
// the pulse rate is 153.85 kHz, 16 times the 9600 baud line rate, which the
// receiver and the transmitter use as their 16x sampling/bit clock.
// The divider value and the 16x scheme follow the reference design. Emitting
// an enable in the system clock domain, instead of a divided clock that
// drives other flip-flops, is this design's choice; the rate is the same.
//
// Interface: clk, rst (asynchronous, active high), bclk (output, high for one
// clk cycle every DIV cycles). Timing: the first pulse comes DIV cycles after
// reset is released, and then exactly every DIV cycles.
module baud_gen
  import uart_pkg::*;
#(
  parameter int unsigned DIV = DEF_BAUD_DIV
) (
  input  logic clk,
  input  logic rst,
  output logic bclk
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cnt  <= '0;
      bclk <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      bclk <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      bclk <= 1'b0;
    end
  end

endmodule
