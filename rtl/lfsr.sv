// lfsr: Galois linear feedback shift register, the BIST pattern source.
//
// On each cycle with step high the register shifts right by one and, when
// the bit shifted out is 1, is XORed with TAPS. The default TAPS = 8'hB8
// realises x^8 + x^6 + x^5 + x^4 + 1, a maximal-length polynomial, so from
// any non-zero seed the register runs through all 255 non-zero bytes before
// it repeats. Using an LFSR as the test-pattern generator follows the
// reference design; the polynomial, seed and Galois form are this design's
// choice. load reloads SEED (load wins over step); a zero SEED is replaced
// by 1, since the all-zero state would lock the register.
//
// Interface: clk, rst (asynchronous, active high), load, step, q (current
// pattern). Timing: q changes on the clock edge after step.
module lfsr #(
  parameter int unsigned   WIDTH = 8,
  parameter logic [WIDTH-1:0] TAPS = 8'hB8,
  parameter logic [WIDTH-1:0] SEED = 8'h01
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic             step,
  output logic [WIDTH-1:0] q
);

  localparam logic [WIDTH-1:0] START = (SEED == '0) ? WIDTH'(1) : SEED;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       q <= START;
    else if (load) q <= START;
    else if (step) q <= (q >> 1) ^ (q[0] ? TAPS : '0);
  end

  a_never_zero: assert property (@(posedge clk) disable iff (rst) q != '0);

endmodule
