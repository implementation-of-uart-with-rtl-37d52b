// uart_rx: UART receiver, serial to parallel.
//
// RXD is first passed through two flip-flops (rxd_sync) so that the state
// machine never looks at a changing input. Every 16x baud tick (bclk) the
// five-state machine advances:
//   R_START  waits for rxd_sync low, the start of a start bit.
//   R_CENTER requires the line to stay low for START_LOW consecutive ticks
//            (8 = half a bit); a shorter low pulse is treated as noise and
//            the machine returns to R_START. The 8th low tick is the middle
//            of the start bit.
//   R_WAIT   counts 15 ticks; on the 16th tick it moves to R_SAMPLE, or to
//            R_STOP once FRAMELEN data bits (and the parity bit) are in.
//   R_SAMPLE samples rxd_sync into the shift register, LSB first, then
//            returns to R_WAIT.
//   R_STOP   is the middle of the stop bit: the frame is finished, rbuf is
//            loaded and rec_ready pulses; the state machine returns to
//            R_START without waiting for the rest of the stop bit.
// The state names, the 16x counting, the half-bit start check, FRAMELEN and
// rbuf follow the reference design. Sampling the parity and stop bits to
// report parity_err and frame_err is this design's addition, for the status
// register; the state machine's path does not depend on them.
//
// Interface: bclk is the 16x tick enable from baud_gen; rxd the serial line
// (idle high). rbuf, parity_err and frame_err are valid from the cycle
// rec_ready pulses until the next frame ends. rst is asynchronous, active
// high. Timing: rec_ready pulses at the tick in the middle of the stop bit.
module uart_rx
  import uart_pkg::*;
#(
  parameter int unsigned FRAMELEN   = DEF_FRAMELEN,
  parameter bit          PARITY_EN  = 1'b1,
  parameter bit          ODD_PARITY = 1'b0,
  parameter int unsigned START_LOW  = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                bclk,
  input  logic                rxd,
  output logic [FRAMELEN-1:0] rbuf,
  output logic                rec_ready,
  output logic                parity_err,
  output logic                frame_err
);

  // Bits sampled before the stop bit: data plus the optional parity bit.
  localparam int unsigned NBITS = FRAMELEN + (PARITY_EN ? 1 : 0);
  localparam int unsigned BW    = $clog2(NBITS + 1);

  logic [1:0]          sync;
  logic                rxd_sync;
  rx_state_e           state;
  logic [3:0]          rcnt16;
  logic [BW-1:0]       bitcnt;
  logic [NBITS-1:0]    shreg;

  assign rxd_sync = sync[1];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) sync <= 2'b11;
    else     sync <= {sync[0], rxd};
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state      <= R_START;
      rcnt16     <= '0;
      bitcnt     <= '0;
      shreg      <= '0;
      rbuf       <= '0;
      rec_ready  <= 1'b0;
      parity_err <= 1'b0;
      frame_err  <= 1'b0;
    end else begin
      rec_ready <= 1'b0;
      if (bclk) begin
        unique case (state)
          R_START: begin
            if (!rxd_sync) begin
              rcnt16 <= 4'd1;
              state  <= R_CENTER;
            end
          end
          R_CENTER: begin
            if (rxd_sync) begin
              state <= R_START;              // low pulse too short: noise
            end else if (rcnt16 == 4'(START_LOW - 1)) begin
              rcnt16 <= '0;
              bitcnt <= '0;
              state  <= R_WAIT;
            end else begin
              rcnt16 <= rcnt16 + 1'b1;
            end
          end
          R_WAIT: begin
            if (rcnt16 == 4'd14) begin
              rcnt16 <= '0;
              state  <= (bitcnt == BW'(NBITS)) ? R_STOP : R_SAMPLE;
            end else begin
              rcnt16 <= rcnt16 + 1'b1;
            end
          end
          R_SAMPLE: begin
            shreg  <= {rxd_sync, shreg[NBITS-1:1]};
            bitcnt <= bitcnt + 1'b1;
            state  <= R_WAIT;
          end
          R_STOP: begin
            rbuf       <= shreg[FRAMELEN-1:0];
            parity_err <= PARITY_EN ? ((^shreg) ^ ODD_PARITY) : 1'b0;
            frame_err  <= ~rxd_sync;
            rec_ready  <= 1'b1;
            state      <= R_START;
          end
          default: state <= R_START;
        endcase
      end
    end
  end

  // Only the counting states may run the 16x counter past its range.
  a_rcnt_range: assert property (@(posedge clk) disable iff (rst)
    (state == R_WAIT) |-> (rcnt16 <= 4'd14));
  a_ready_pulse: assert property (@(posedge clk) disable iff (rst)
    rec_ready |=> !rec_ready);

endmodule
