// tb_uart_top_full: the UART at its default parameters, a 32 MHz clock
// (31.25 ns period) and 9600 baud, so one bit is 16 * 208 = 3328 clocks.
// It sends one byte from the host and measures the bit time on txd_out,
// receives the example frame 0 01101100 0 1 on rxd (rbuf must read 8'h36),
// and runs the complete self test of 255 LFSR patterns, which must pass.
module tb_uart_top_full;
  import uart_pkg::*;
  logic clk = 1'b0;
  logic reset, rxd, xmit_cmd, rd_ack, bist_start;
  logic [7:0] txdbuf_in, rbuf, bist_errors;
  logic txd_out, txd_done_out, rec_ready;
  status_t status;
  int checks = 0, failures = 0;

  localparam int BITCLK = 16 * 208;

  uart_top dut (
    .clk32mhz(clk), .reset(reset), .rxd(rxd), .xmit_cmd(xmit_cmd), .txdbuf_in(txdbuf_in),
    .rd_ack(rd_ack), .bist_start(bist_start), .txd_out(txd_out), .txd_done_out(txd_done_out),
    .rec_ready(rec_ready), .rbuf(rbuf), .status(status), .bist_errors(bist_errors));

  always #15.625ns clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [10:0] bits;
    int t0, t1, c0;
    logic [10:0] frame;
    reset = 1'b1; rxd = 1'b1; xmit_cmd = 1'b0; rd_ack = 1'b0; bist_start = 1'b0; txdbuf_in = '0;
    repeat (5) @(posedge clk);
    #1 reset = 1'b0;
    repeat (10) @(negedge clk);

    // host transmit of 8'h36, decoded and timed
    @(negedge clk); txdbuf_in = 8'h36; xmit_cmd = 1'b1;
    repeat (4) @(negedge clk); xmit_cmd = 1'b0;
    @(negedge txd_out); t0 = cyc;
    repeat (BITCLK / 2) @(posedge clk);
    for (int i = 0; i < 11; i++) begin
      #1 bits[i] = txd_out;
      if (i < 10) repeat (BITCLK) @(posedge clk);
    end
    checks++;
    if (bits !== 11'b1_0_00110110_0) begin failures++; $display("txd frame %b", bits); end
    @(posedge txd_done_out); t1 = cyc;
    // txd_done is one tick before the end of the 11th bit: 11 bits less 1/16
    checks++;
    if (t1 - t0 < 11 * BITCLK - 2 * 208 || t1 - t0 > 11 * BITCLK) begin
      failures++; $display("frame took %0d clocks", t1 - t0);
    end
    $display("baud: %0d clocks per bit, %0d bit/s", BITCLK, 32_000_000 / BITCLK);

    // receive the example frame, first bit on the left: 0 0110110 0 0 1
    frame = 11'b1_0_00110110_0;
    c0 = cyc;
    for (int i = 0; i < 11; i++) begin
      @(negedge clk) rxd = frame[i];
      repeat (BITCLK - 1) @(negedge clk);
    end
    rxd = 1'b1;
    checks++;
    if (!status.rx_ready || rbuf !== 8'h36 || status.parity_err || status.frame_err) begin
      failures++; $display("rx: rbuf=%02h status=%08b", rbuf, status);
    end
    @(negedge clk) rd_ack = 1'b1; @(negedge clk) rd_ack = 1'b0;

    // full self test
    @(negedge clk) bist_start = 1'b1; @(negedge clk) bist_start = 1'b0;
    c0 = cyc;
    wait (status.bist_done);
    $display("self test: %0d clocks, pass=%b errors=%0d", cyc - c0, status.bist_pass, bist_errors);
    checks++;
    if (!status.bist_pass || bist_errors != 0) failures++;
    // 255 frames of 11 bits back to back; the run ends in the middle of the
    // last stop bit, so it takes 254 * 11 + 10.5 bits plus a tick or two
    checks++;
    if (cyc - c0 < (254 * 11 + 10) * BITCLK || cyc - c0 > (254 * 11 + 11) * BITCLK) begin
      failures++; $display("self test took %0d clocks", cyc - c0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
