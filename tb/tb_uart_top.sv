// tb_uart_top: end-to-end test of the UART with self test, at a reduced
// clock/baud ratio (SYS_CLK_HZ = 640, BAUD = 10: a 16x tick every 4 clocks,
// one bit = 64 clocks) and the full 255-pattern self test. A serial line
// model drives rxd and decodes txd_out independently. Each mechanism is
// counted and must happen at least once:
//   tx        host bytes sent on txd_out, decoded correctly
//   long_cmd  a transmit command held for many bits sends one frame only
//   rx        frames on rxd delivered in rbuf with rec_ready
//   duplex    a byte sent and another received at the same time
//   parity    a bad parity bit sets status.parity_err
//   framing   a low stop bit sets status.frame_err
//   overrun   a second frame before rd_ack sets status.overrun
//   glitch    a short low pulse on rxd is not taken as a start bit
//   ack       rd_ack clears status.rx_ready
//   bist      a self-test run passes with zero errors, with txd_out idle and
//             rec_ready silent during the run
module tb_uart_top;
  import uart_pkg::*;
  logic clk = 1'b0;
  logic reset, rxd, xmit_cmd, rd_ack, bist_start;
  logic [7:0] txdbuf_in, rbuf, bist_errors;
  logic txd_out, txd_done_out, rec_ready;
  status_t status;
  int checks = 0, failures = 0;

  localparam int BITCLK = 64;

  uart_top #(.SYS_CLK_HZ(640), .BAUD(10)) dut (
    .clk32mhz(clk), .reset(reset), .rxd(rxd), .xmit_cmd(xmit_cmd), .txdbuf_in(txdbuf_in),
    .rd_ack(rd_ack), .bist_start(bist_start), .txd_out(txd_out), .txd_done_out(txd_done_out),
    .rec_ready(rec_ready), .rbuf(rbuf), .status(status), .bist_errors(bist_errors));

  always #5 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_tx = 0, n_long = 0, n_rx = 0, n_duplex = 0, n_parity = 0, n_framing = 0;
  int n_overrun = 0, n_glitch = 0, n_ack = 0, n_bist = 0;

  // received-frame log
  int nrec = 0;
  logic [7:0] last_rbuf;
  int ndone = 0;
  bit in_bist = 1'b0;
  int bist_leaks = 0;
  always @(posedge clk) begin
    if (rec_ready) begin nrec++; last_rbuf = rbuf; end
    if (txd_done_out) ndone++;
    if (in_bist && (rec_ready || !txd_out || txd_done_out)) bist_leaks++;
  end

  // txd_out decoder
  logic [7:0] txq [$];
  int ntxd = 0;
  initial begin
    logic [10:0] bits;
    logic [7:0] exp;
    forever begin
      @(negedge txd_out);
      repeat (BITCLK / 2) @(posedge clk);
      for (int i = 0; i < 11; i++) begin
        #1 bits[i] = txd_out;
        if (i < 10) repeat (BITCLK) @(posedge clk);
      end
      ntxd++;
      checks++;
      if (txq.size() == 0) begin
        failures++; $display("unexpected frame on txd_out %b", bits);
      end else begin
        exp = txq.pop_front();
        if (bits !== {1'b1, ^exp, exp, 1'b0}) begin
          failures++; $display("txd_out frame %b want %b", bits, {1'b1, ^exp, exp, 1'b0});
        end else n_tx++;
      end
    end
  end

  task automatic serial_in(input logic [7:0] d, input logic bad_par, input logic stop);
    logic [10:0] bits = {stop, (^d) ^ bad_par, d, 1'b0};
    for (int i = 0; i < 11; i++) begin
      rxd = bits[i];
      repeat (BITCLK) @(negedge clk);
    end
    rxd = 1'b1;
  endtask

  task automatic host_send(input logic [7:0] d, input int hold);
    @(negedge clk);
    txdbuf_in = d; xmit_cmd = 1'b1;
    txq.push_back(d);
    repeat (hold) @(negedge clk);
    xmit_cmd = 1'b0;
  endtask

  task automatic ack();
    @(negedge clk); rd_ack = 1'b1; @(negedge clk); rd_ack = 1'b0; @(negedge clk);
  endtask

  task automatic expect_rx(input logic [7:0] d, input int n0, input string what);
    checks++;
    if (nrec != n0 + 1 || last_rbuf !== d) begin
      failures++; $display("%s: %0d frames, rbuf %02h want %02h", what, nrec - n0, last_rbuf, d);
    end
  endtask

  initial begin
    int n0, t0;
    logic [7:0] d;
    reset = 1'b1; rxd = 1'b1; xmit_cmd = 1'b0; rd_ack = 1'b0; bist_start = 1'b0; txdbuf_in = '0;
    repeat (5) @(posedge clk);
    #1 reset = 1'b0;
    repeat (100) @(negedge clk);

    // host transmit
    for (int k = 0; k < 5; k++) begin
      host_send(8'($urandom), 2);
      repeat (13 * BITCLK) @(negedge clk);
    end

    // long command: one frame only
    n0 = ntxd;
    host_send(8'hC3, 30 * BITCLK);
    repeat (13 * BITCLK) @(negedge clk);
    checks++;
    if (ntxd == n0 + 1) n_long++; else begin failures++; $display("long command sent %0d frames", ntxd - n0); end

    // receive: the example frame, then random bytes, each acknowledged
    n0 = nrec; serial_in(8'h36, 1'b0, 1'b1); repeat (BITCLK) @(negedge clk);
    expect_rx(8'h36, n0, "rx 0x36");
    checks++;
    if (status.rx_ready && !status.parity_err && !status.frame_err) n_rx++; else failures++;
    ack();
    checks++;
    if (!status.rx_ready) n_ack++; else failures++;
    for (int k = 0; k < 5; k++) begin
      d = 8'($urandom);
      n0 = nrec; serial_in(d, 1'b0, 1'b1); repeat (BITCLK) @(negedge clk);
      expect_rx(d, n0, "rx random");
      n_rx++;
      ack();
    end

    // full duplex: transmit and receive at once
    n0 = nrec;
    t0 = ntxd;
    fork
      host_send(8'h5A, 2);
      serial_in(8'hA7, 1'b0, 1'b1);
    join
    repeat (3 * BITCLK) @(negedge clk);
    expect_rx(8'hA7, n0, "duplex rx");
    checks++;
    if (ntxd == t0 + 1 && nrec == n0 + 1) n_duplex++; else failures++;
    ack();

    // parity error
    n0 = nrec; serial_in(8'h11, 1'b1, 1'b1); repeat (BITCLK) @(negedge clk);
    checks++;
    if (status.parity_err && !status.frame_err) n_parity++; else begin failures++; $display("parity not flagged"); end
    ack();

    // framing error (the low stop bit also starts a break frame; let it pass)
    n0 = nrec; serial_in(8'h22, 1'b0, 1'b0);
    repeat (BITCLK / 4) @(negedge clk);
    checks++;
    if (status.frame_err) n_framing++; else begin failures++; $display("framing error not flagged"); end
    repeat (12 * BITCLK) @(negedge clk);
    ack();

    // overrun
    serial_in(8'h01, 1'b0, 1'b1);
    serial_in(8'h02, 1'b0, 1'b1);
    repeat (BITCLK) @(negedge clk);
    checks++;
    if (status.overrun && last_rbuf == 8'h02) n_overrun++; else begin failures++; $display("overrun not flagged"); end
    ack();
    checks++;
    if (status.overrun || status.rx_ready) failures++;

    // glitch rejection
    n0 = nrec;
    rxd = 1'b0; repeat (12) @(negedge clk); rxd = 1'b1;
    repeat (12 * BITCLK) @(negedge clk);
    checks++;
    if (nrec == n0) n_glitch++; else begin failures++; $display("glitch taken as frame"); end

    // built-in self test
    n0 = ndone;
    in_bist = 1'b1;
    @(negedge clk); bist_start = 1'b1; @(negedge clk); bist_start = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (!status.bist_mode) begin failures++; $display("bist not running"); end
    wait (status.bist_done);
    in_bist = 1'b0;
    checks++;
    if (status.bist_pass && bist_errors == 0 && bist_leaks == 0 && ndone == n0) n_bist++;
    else begin failures++; $display("bist: pass=%b errors=%0d leaks=%0d", status.bist_pass, bist_errors, bist_leaks); end

    // normal traffic works again afterwards
    n0 = nrec; serial_in(8'h96, 1'b0, 1'b1); repeat (BITCLK) @(negedge clk);
    expect_rx(8'h96, n0, "rx after bist");
    host_send(8'h69, 2);
    repeat (13 * BITCLK) @(negedge clk);
    checks++;
    if (txq.size() != 0) failures++;

    $display("mechanisms: tx=%0d long_cmd=%0d rx=%0d duplex=%0d parity=%0d framing=%0d overrun=%0d glitch=%0d ack=%0d bist=%0d",
             n_tx, n_long, n_rx, n_duplex, n_parity, n_framing, n_overrun, n_glitch, n_ack, n_bist);
    checks++; if (n_tx == 0) failures++;
    checks++; if (n_long == 0) failures++;
    checks++; if (n_rx == 0) failures++;
    checks++; if (n_duplex == 0) failures++;
    checks++; if (n_parity == 0) failures++;
    checks++; if (n_framing == 0) failures++;
    checks++; if (n_overrun == 0) failures++;
    checks++; if (n_glitch == 0) failures++;
    checks++; if (n_ack == 0) failures++;
    checks++; if (n_bist == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
