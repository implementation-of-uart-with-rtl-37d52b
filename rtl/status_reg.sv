// status_reg: host-visible UART status register.
//
// Collects the state of the link in one status_t word (see uart_pkg) so the
// host can check the integrity of what it receives:
//   rx_ready   set when a frame is received, cleared when the host pulses
//              rd_ack after taking rbuf (a frame in the same cycle wins);
//   parity_err, frame_err  the error flags of the last received frame;
//   overrun    set when a frame arrives while rx_ready is still set and not
//              being acknowledged, i.e. a byte was lost; cleared by rd_ack;
//   tx_busy, bist_mode  live copies of the transmitter and BIST state;
//   bist_done, bist_pass  result of the last built-in self test.
// A status register for error checking is named by the reference design;
// the bit set and the set/clear rules are this design's own.
//
// Interface: rec_ready is the receiver's one-cycle frame pulse, sampled
// together with parity_err and frame_err; rd_ack is a one-cycle host
// acknowledge. status is registered: it shows an event one cycle after it.
module status_reg
  import uart_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    rec_ready,
  input  logic    parity_err,
  input  logic    frame_err,
  input  logic    rd_ack,
  input  logic    tx_busy,
  input  logic    bist_mode,
  input  logic    bist_done,
  input  logic    bist_pass,
  output status_t status
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      status <= '0;
    end else begin
      status.tx_busy   <= tx_busy;
      status.bist_mode <= bist_mode;
      status.bist_done <= bist_done;
      status.bist_pass <= bist_pass;
      if (rec_ready) begin
        status.rx_ready   <= 1'b1;
        status.parity_err <= parity_err;
        status.frame_err  <= frame_err;
        if (status.rx_ready && !rd_ack) status.overrun <= 1'b1;
        else if (rd_ack)                status.overrun <= 1'b0;
      end else if (rd_ack) begin
        status.rx_ready <= 1'b0;
        status.overrun  <= 1'b0;
      end
    end
  end

endmodule
