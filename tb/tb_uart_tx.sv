// tb_uart_tx: sends bytes through the transmitter with a 16x tick every 4
// clocks (one bit = 64 clocks) and decodes TXD independently: after the
// falling edge of the start bit it samples the line in the middle of each of
// the 11 bit times and checks start bit, data (LSB first), even parity and
// stop bit. It also checks that TXD changes only on bit boundaries, that
// txd_done comes at the end of the stop bit, that frames can follow each
// other with no gap longer than one tick, and that a command given while a
// frame is in progress is ignored.
module tb_uart_tx;
  logic clk = 1'b0;
  logic rst, bclk, xmit_cmd_p, txd, txd_done, busy;
  logic [7:0] txdbuf;
  int checks = 0, failures = 0;

  localparam int DIVT = 4;
  localparam int BITCLK = 16 * DIVT;

  int cyc = 0;
  int frames = 0, done_cnt = 0, done_cyc = 0;
  logic [7:0] q_data [$];

  uart_tx dut (.clk(clk), .rst(rst), .bclk(bclk), .xmit_cmd_p(xmit_cmd_p), .txdbuf(txdbuf),
               .txd(txd), .txd_done(txd_done), .busy(busy));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    bclk <= ((cyc % DIVT) == DIVT - 1);
    if (txd_done) begin done_cnt++; done_cyc = cyc; end
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Independent frame decoder.
  int last_end = -1;
  int last_t0 = 0;
  bit b2b = 1'b0;   // frames are being sent back to back
  initial begin
    logic [10:0] bits;
    logic [7:0] exp;
    int t0, prev;
    logic lvl;
    forever begin
      @(negedge txd);
      t0 = cyc;
      last_t0 = t0;
      if (last_end >= 0) begin
        checks++;
        if (b2b && t0 - last_end > BITCLK + DIVT) begin
          failures++; $display("gap of %0d clocks between frames", t0 - last_end);
        end
        if (t0 - last_end < BITCLK) begin
          failures++; $display("stop bit only %0d clocks", t0 - last_end);
        end
      end
      lvl = txd;
      prev = t0;
      for (int c = 1; c < 11 * BITCLK; c++) begin
        @(posedge clk); #1;
        if (c % BITCLK == BITCLK / 2) bits[c / BITCLK] = txd;
        if (txd != lvl) begin
          checks++;
          if ((cyc - t0) % BITCLK != 0) begin
            failures++; $display("TXD edge %0d clocks into the frame", cyc - t0);
          end
          lvl = txd;
        end
      end
      last_end = t0 + 10 * BITCLK;
      exp = q_data.pop_front();
      frames++;
      checks++;
      if (bits !== {1'b1, ^exp, exp, 1'b0}) begin
        failures++; $display("frame %b, want %b", bits, {1'b1, ^exp, exp, 1'b0});
      end
    end
  end

  task automatic send(input logic [7:0] d);
    @(negedge clk);
    txdbuf = d; xmit_cmd_p = 1'b1;
    q_data.push_back(d);
    @(negedge clk);
    xmit_cmd_p = 1'b0; txdbuf = 8'h00;
  endtask

  initial begin
    int f0;
    rst = 1'b1; xmit_cmd_p = 1'b0; txdbuf = '0;
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    checks++;
    if (txd !== 1'b1) failures++;
    repeat (50) @(negedge clk);

    send(8'h36);
    wait (!busy);
    repeat (2 * BITCLK) @(negedge clk);
    checks++;
    if (frames != 1 || done_cnt != 1) failures++;
    // txd_done 15 ticks into the stop bit, i.e. 11 bits after the start edge
    checks++;
    if (done_cyc - last_t0 < 11 * BITCLK - 2 * DIVT || done_cyc - last_t0 > 11 * BITCLK + DIVT) begin
      failures++; $display("txd_done %0d clocks after start", done_cyc - last_t0);
    end

    // back-to-back frames, each command given as soon as busy drops
    send(8'h55);
    @(negedge clk);
    wait (!busy);
    b2b = 1'b1;
    for (int k = 0; k < 12; k++) begin
      send(8'($urandom));
      @(negedge clk);
      wait (!busy);
    end

    // a command during a frame is ignored
    repeat (2 * BITCLK) @(negedge clk);
    b2b = 1'b0;
    f0 = frames;
    send(8'hF0);
    repeat (3 * BITCLK) @(negedge clk);
    @(negedge clk); txdbuf = 8'h0F; xmit_cmd_p = 1'b1; @(negedge clk); xmit_cmd_p = 1'b0;
    wait (!busy);
    repeat (20 * BITCLK) @(negedge clk);
    checks++;
    if (frames != f0 + 1) begin failures++; $display("command during frame was not ignored"); end
    $display("frames decoded: %0d", frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
