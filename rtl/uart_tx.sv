// uart_tx: UART transmitter, parallel to serial.
//
// A frame is 1 start bit (0), FRAMELEN data bits LSB first, one parity bit
// (even by default: the bit makes the number of ones even) and 1 stop bit
// (1). Each bit lasts 16 ticks of the 16x baud enable bclk. The state
// machine and its counter conditions follow the transmit state diagram:
//   X_IDLE   line high. xmit_cmd_p loads txdbuf and raises a request; the
//            next tick moves to X_START.
//   X_START  start bit; leaves for X_WAIT when XCNT16 = 15 (16th tick).
//   X_WAIT   holds the current bit. When XCNT16 = 14 it goes to X_SHIFT, or
//            to X_STOP if the bit on the line is the last one (the parity
//            bit, XBITCNT = FRAMELEN).
//   X_SHIFT  puts the next bit on the line on the 16th tick, then X_WAIT.
//   X_STOP   drives the stop bit; when XCNT16 = 15 and no new command pulse
//            is present it returns to X_IDLE and pulses txd_done.
// TXD is driven from a flip-flop, so it changes only on bclk ticks.
// Latching the command until the next tick, so that a one-cycle xmit_cmd_p
// is never missed between ticks, is this design's choice.
//
// Interface: bclk (16x tick), xmit_cmd_p (one-cycle command), txdbuf (byte
// to send, sampled in the xmit_cmd_p cycle), txd (serial out, idle high),
// txd_done (one cycle at the end of the stop bit), busy (a frame is pending
// or in progress). A command given while busy is ignored. rst is
// asynchronous, active high.
// Timing: the start bit begins at the first tick after the command; the
// frame lasts (FRAMELEN + 3) * 16 ticks; the stop bit is followed by at least
// one idle tick before the next start bit.
module uart_tx
  import uart_pkg::*;
#(
  parameter int unsigned FRAMELEN   = DEF_FRAMELEN,
  parameter bit          PARITY_EN  = 1'b1,
  parameter bit          ODD_PARITY = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                bclk,
  input  logic                xmit_cmd_p,
  input  logic [FRAMELEN-1:0] txdbuf,
  output logic                txd,
  output logic                txd_done,
  output logic                busy
);

  // Index of the last bit before the stop bit.
  localparam int unsigned LAST = FRAMELEN - 1 + (PARITY_EN ? 1 : 0);
  localparam int unsigned NB   = LAST + 1;
  localparam int unsigned BW   = $clog2(NB + 1);

  tx_state_e        state;
  logic [4:0]       xcnt16;
  logic [BW-1:0]    xbitcnt;
  logic [NB-1:0]    shreg;     // bits still to send, LSB next
  logic             req;

  assign busy = req || (state != X_IDLE);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state    <= X_IDLE;
      xcnt16   <= '0;
      xbitcnt  <= '0;
      shreg    <= '0;
      req      <= 1'b0;
      txd      <= 1'b1;
      txd_done <= 1'b0;
    end else begin
      txd_done <= 1'b0;
      if (xmit_cmd_p && !busy) begin
        req <= 1'b1;
        if (PARITY_EN) shreg <= NB'({(^txdbuf) ^ ODD_PARITY, txdbuf});
        else           shreg <= NB'(txdbuf);
      end
      if (bclk) begin
        unique case (state)
          X_IDLE: begin
            txd <= 1'b1;
            if (req) begin
              req     <= 1'b0;
              txd     <= 1'b0;           // start bit
              xcnt16  <= '0;
              xbitcnt <= '0;
              state   <= X_START;
            end
          end
          X_START: begin
            if (xcnt16 == 5'b01111) begin
              xcnt16 <= '0;
              txd    <= shreg[0];        // first data bit
              state  <= X_WAIT;
            end else begin
              xcnt16 <= xcnt16 + 1'b1;
            end
          end
          X_WAIT: begin
            if (xcnt16 == 5'b01110) begin
              xcnt16 <= '0;
              state  <= (xbitcnt == BW'(LAST)) ? X_STOP : X_SHIFT;
            end else begin
              xcnt16 <= xcnt16 + 1'b1;
            end
          end
          X_SHIFT: begin
            shreg   <= {1'b1, shreg[NB-1:1]};
            txd     <= shreg[1];
            xbitcnt <= xbitcnt + 1'b1;
            state   <= X_WAIT;
          end
          X_STOP: begin
            if (xcnt16 == 5'd0) txd <= 1'b1;   // 16th tick of the last bit
            if (xcnt16 == 5'b01111 && !xmit_cmd_p) begin
              xcnt16   <= '0;
              txd_done <= 1'b1;
              state    <= X_IDLE;
            end else if (xcnt16 != 5'b01111) begin
              xcnt16 <= xcnt16 + 1'b1;
            end
          end
          default: state <= X_IDLE;
        endcase
      end
    end
  end

  a_idle_high: assert property (@(posedge clk) disable iff (rst)
    (state == X_IDLE) |-> txd);
  a_done_pulse: assert property (@(posedge clk) disable iff (rst)
    txd_done |=> !txd_done);

endmodule
