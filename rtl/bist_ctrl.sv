// bist_ctrl: built-in self test of the UART by internal loopback.
//
// While a test runs, bist_mode is high: the top level then feeds the
// transmitter's TXD back into the receiver, holds the external TXD idle and
// gives the transmitter's data and command inputs to this block. The test
// sends NPAT bytes taken from an LFSR. For each one it waits until the
// transmitter is free, pulses tx_cmd with the pattern on tx_data, and waits
// for the receiver's rec_ready. The byte is counted as an error if rbuf
// differs from the pattern or the receiver reports a parity or framing
// error. If no frame arrives within TIMEOUT clock cycles the run counts one
// error and ends at once. At the end, done is set and pass tells whether the
// error count is zero; both hold until the next start.
// That the UART carries a BIST built around an LFSR pattern generator comes
// from the reference design; the loopback scheme, the compare-per-byte check,
// the timeout and the error counter are this design's own.
//
// Interface: start (a rising edge starts a run when idle), tx_busy,
// rec_ready, rbuf, parity_err, frame_err from the UART; bist_mode, tx_cmd
// (one cycle), tx_data, done, pass, err_cnt (saturates at all ones).
// rst is asynchronous, active high. Start the test while the UART is idle.
// Timing: one pattern takes one frame time plus about one bit time.
module bist_ctrl #(
  parameter int unsigned FRAMELEN = 8,
  parameter int unsigned NPAT     = 255,
  parameter int unsigned TIMEOUT  = 73_216,  // 2 frames of 11 bits at 16 x 208 clocks
  parameter int unsigned EW       = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic                tx_busy,
  input  logic                rec_ready,
  input  logic [FRAMELEN-1:0] rbuf,
  input  logic                parity_err,
  input  logic                frame_err,
  output logic                bist_mode,
  output logic                tx_cmd,
  output logic [FRAMELEN-1:0] tx_data,
  output logic                done,
  output logic                pass,
  output logic [EW-1:0]       err_cnt
);

  typedef enum logic [1:0] {B_IDLE, B_SEND, B_WAIT, B_END} bist_state_e;

  localparam int unsigned PW = $clog2(NPAT + 1);
  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  bist_state_e         state;
  logic                start_q;
  logic [PW-1:0]       sent;
  logic [TW-1:0]       timer;
  logic                lfsr_load;
  logic                lfsr_step;
  logic [FRAMELEN-1:0] pattern;
  logic                bad;

  lfsr #(.WIDTH(FRAMELEN), .TAPS(FRAMELEN'(8'hB8)), .SEED(FRAMELEN'(1))) u_lfsr (
    .clk  (clk),
    .rst  (rst),
    .load (lfsr_load),
    .step (lfsr_step),
    .q    (pattern)
  );

  assign bad       = (rbuf != pattern) || parity_err || frame_err;
  assign lfsr_load = (state == B_IDLE) && start && !start_q;
  assign lfsr_step = (state == B_WAIT) && rec_ready;
  assign bist_mode = (state != B_IDLE);
  assign tx_data   = pattern;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state   <= B_IDLE;
      start_q <= 1'b0;
      sent    <= '0;
      timer   <= '0;
      tx_cmd  <= 1'b0;
      done    <= 1'b0;
      pass    <= 1'b0;
      err_cnt <= '0;
    end else begin
      start_q <= start;
      tx_cmd  <= 1'b0;
      unique case (state)
        B_IDLE: begin
          if (start && !start_q) begin
            sent    <= '0;
            err_cnt <= '0;
            done    <= 1'b0;
            pass    <= 1'b0;
            state   <= B_SEND;
          end
        end
        B_SEND: begin
          if (!tx_busy && !tx_cmd) begin
            tx_cmd <= 1'b1;
            timer  <= '0;
            state  <= B_WAIT;
          end
        end
        B_WAIT: begin
          if (rec_ready) begin
            if (bad && err_cnt != '1) err_cnt <= err_cnt + 1'b1;
            sent  <= sent + 1'b1;
            state <= (sent == PW'(NPAT - 1)) ? B_END : B_SEND;
          end else if (timer == TW'(TIMEOUT - 1)) begin
            if (err_cnt != '1) err_cnt <= err_cnt + 1'b1;
            state <= B_END;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        B_END: begin
          done  <= 1'b1;
          pass  <= (err_cnt == '0);
          state <= B_IDLE;
        end
        default: state <= B_IDLE;
      endcase
    end
  end

  a_cmd_only_in_test: assert property (@(posedge clk) disable iff (rst)
    tx_cmd |-> bist_mode);

endmodule
