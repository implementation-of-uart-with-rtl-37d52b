// uart_pkg: constants and types shared by the UART, its BIST and its status
// register.
//
// The clock and line rate are the design's reference point: a 32 MHz system
// clock and 9600 baud, sampled at 16 times the baud rate, which gives the
// baud rate divider M = 32e6 / (16 * 9600) = 208 (fraction dropped). Frames
// carry 8 data bits, LSB first, then one even parity bit and one stop bit.
// The two state enumerations carry the state names of the receiver and the
// transmitter state machines. The status word layout is this design's own.
package uart_pkg;

  localparam int unsigned DEF_SYS_CLK_HZ = 32_000_000;
  localparam int unsigned DEF_BAUD       = 9600;
  localparam int unsigned OVERSAMPLE = 16;
  localparam int unsigned DEF_BAUD_DIV   = DEF_SYS_CLK_HZ / (OVERSAMPLE * DEF_BAUD); // 208
  localparam int unsigned DEF_FRAMELEN   = 8;

  // Receiver states: wait for start bit, find its middle, wait for the next
  // sampling point, sample, take the stop bit.
  typedef enum logic [2:0] {
    R_START,
    R_CENTER,
    R_WAIT,
    R_SAMPLE,
    R_STOP
  } rx_state_e;

  // Transmitter states: idle, start bit, wait within a bit, shift out the
  // next bit, stop bit.
  typedef enum logic [2:0] {
    X_IDLE,
    X_START,
    X_WAIT,
    X_SHIFT,
    X_STOP
  } tx_state_e;

  // Host-visible status word, bit 0 first.
  typedef struct packed {
    logic bist_pass;   // [7] last BIST run found no error
    logic bist_done;   // [6] a BIST run has finished since reset
    logic bist_mode;   // [5] BIST loopback is running
    logic tx_busy;     // [4] transmitter is sending a frame
    logic overrun;     // [3] a frame arrived while rx_ready was still set
    logic frame_err;   // [2] last frame had a low stop bit
    logic parity_err;  // [1] last frame failed the parity check
    logic rx_ready;    // [0] rbuf holds a byte the host has not taken yet
  } status_t;

endpackage
