// uart_top: 8-bit UART with built-in self test and status register.
//
// One baud rate generator divides the system clock down to a 16x baud tick
// shared by the receiver and the transmitter. The receiver turns RXD into
// rbuf[7:0] with rec_ready; the transmitter sends txdbuf_in on TXD when the
// (conditioned) transmit command arrives. Frames are 1 start bit, 8 data
// bits LSB first, 1 even parity bit and 1 stop bit. The baud generator,
// receiver, transmitter, their port names and the 32 MHz / 9600 baud / M =
// 208 numbers follow the reference design's top level.
//
// The self test and the status register are named, but not detailed, by the
// reference design; their form here is this design's. A rising edge on
// bist_start runs the test: the transmitter output is looped back into the
// receiver inside the chip, txd_out is held idle (high), external rxd,
// xmit_cmd and txdbuf_in are ignored, and BIST_PATTERNS LFSR bytes are sent
// and checked. rec_ready and txd_done_out stay low during the test. The
// result appears in status (bist_done, bist_pass) and bist_errors. Start the
// test only while the link is idle.
//
// Interface: clk32mhz, reset (asynchronous, active high), rxd, txd_out;
// xmit_cmd (level, any width: one rising edge sends one frame), txdbuf_in;
// rec_ready (one cycle) with rbuf; txd_done_out (one cycle at end of the stop
// bit); rd_ack (host has read rbuf, clears status.rx_ready); status (see
// uart_pkg::status_t). Timing: one bit = 16 * BAUD_DIV clocks.
module uart_top
  import uart_pkg::*;
#(
  parameter int unsigned SYS_CLK_HZ    = DEF_SYS_CLK_HZ,
  parameter int unsigned BAUD          = DEF_BAUD,
  parameter int unsigned FRAMELEN      = DEF_FRAMELEN,
  parameter int unsigned BIST_PATTERNS = 255
) (
  input  logic                clk32mhz,
  input  logic                reset,
  input  logic                rxd,
  input  logic                xmit_cmd,
  input  logic [FRAMELEN-1:0] txdbuf_in,
  input  logic                rd_ack,
  input  logic                bist_start,
  output logic                txd_out,
  output logic                txd_done_out,
  output logic                rec_ready,
  output logic [FRAMELEN-1:0] rbuf,
  output status_t             status,
  output logic [7:0]          bist_errors
);

  localparam int unsigned DIV     = SYS_CLK_HZ / (OVERSAMPLE * BAUD);
  localparam int unsigned TIMEOUT = 2 * (FRAMELEN + 3) * OVERSAMPLE * DIV;

  logic                bclk;
  logic                host_cmd_p;
  logic                tx_cmd_p;
  logic [FRAMELEN-1:0] tx_data;
  logic                txd;
  logic                txd_done;
  logic                tx_busy;
  logic                rx_in;
  logic                rx_ready;
  logic                parity_err;
  logic                frame_err;
  logic                bist_mode;
  logic                bist_cmd;
  logic [FRAMELEN-1:0] bist_data;
  logic                bist_done;
  logic                bist_pass;

  baud_gen #(.DIV(DIV)) u1_baud (
    .clk  (clk32mhz),
    .rst  (reset),
    .bclk (bclk)
  );

  cmd_pulse u_cmd (
    .clk        (clk32mhz),
    .rst        (reset),
    .xmit_cmd   (xmit_cmd),
    .xmit_cmd_p (host_cmd_p)
  );

  assign tx_cmd_p = bist_mode ? bist_cmd  : host_cmd_p;
  assign tx_data  = bist_mode ? bist_data : txdbuf_in;

  uart_tx #(.FRAMELEN(FRAMELEN)) u3_transfer (
    .clk        (clk32mhz),
    .rst        (reset),
    .bclk       (bclk),
    .xmit_cmd_p (tx_cmd_p),
    .txdbuf     (tx_data),
    .txd        (txd),
    .txd_done   (txd_done),
    .busy       (tx_busy)
  );

  // Internal loopback while the self test runs.
  assign rx_in        = bist_mode ? txd : rxd;
  assign txd_out      = bist_mode ? 1'b1 : txd;
  assign txd_done_out = txd_done & ~bist_mode;

  uart_rx #(.FRAMELEN(FRAMELEN)) u2_receiver (
    .clk        (clk32mhz),
    .rst        (reset),
    .bclk       (bclk),
    .rxd        (rx_in),
    .rbuf       (rbuf),
    .rec_ready  (rx_ready),
    .parity_err (parity_err),
    .frame_err  (frame_err)
  );

  assign rec_ready = rx_ready & ~bist_mode;

  bist_ctrl #(
    .FRAMELEN (FRAMELEN),
    .NPAT     (BIST_PATTERNS),
    .TIMEOUT  (TIMEOUT),
    .EW       (8)
  ) u_bist (
    .clk        (clk32mhz),
    .rst        (reset),
    .start      (bist_start),
    .tx_busy    (tx_busy),
    .rec_ready  (rx_ready),
    .rbuf       (rbuf),
    .parity_err (parity_err),
    .frame_err  (frame_err),
    .bist_mode  (bist_mode),
    .tx_cmd     (bist_cmd),
    .tx_data    (bist_data),
    .done       (bist_done),
    .pass       (bist_pass),
    .err_cnt    (bist_errors)
  );

  status_reg u_status (
    .clk        (clk32mhz),
    .rst        (reset),
    .rec_ready  (rec_ready),
    .parity_err (parity_err),
    .frame_err  (frame_err),
    .rd_ack     (rd_ack),
    .tx_busy    (tx_busy),
    .bist_mode  (bist_mode),
    .bist_done  (bist_done),
    .bist_pass  (bist_pass),
    .status     (status)
  );

endmodule
