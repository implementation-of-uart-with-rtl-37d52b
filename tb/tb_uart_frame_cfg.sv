// tb_uart_frame_cfg: transmitter-to-receiver loopback in two frame
// configurations other than the default, to exercise the FRAMELEN, PARITY_EN
// and ODD_PARITY parameters:
//   A: 7 data bits, no parity  (frame of 9 bits)
//   B: 8 data bits, odd parity (frame of 11 bits)
// Each pair shares a baud_gen with DIV = 3. Every byte sent must arrive
// unchanged with no parity or framing error. The frame length on the line is
// measured from the start edge to the end of the stop bit and must be
// (1 + data + parity + 1) * 16 ticks. In configuration B the parity bit on
// the line is decoded and must make the count of ones odd.
module tb_uart_frame_cfg;
  logic clk = 1'b0;
  logic rst, bclk;
  int checks = 0, failures = 0;
  localparam int DIV = 3;
  localparam int BITCLK = 16 * DIV;

  baud_gen #(.DIV(DIV)) u_baud (.clk(clk), .rst(rst), .bclk(bclk));

  // configuration A
  logic a_cmd, a_txd, a_done, a_busy, a_rdy, a_pe, a_fe;
  logic [6:0] a_data, a_rbuf;
  uart_tx #(.FRAMELEN(7), .PARITY_EN(1'b0)) u_atx (
    .clk(clk), .rst(rst), .bclk(bclk), .xmit_cmd_p(a_cmd), .txdbuf(a_data),
    .txd(a_txd), .txd_done(a_done), .busy(a_busy));
  uart_rx #(.FRAMELEN(7), .PARITY_EN(1'b0)) u_arx (
    .clk(clk), .rst(rst), .bclk(bclk), .rxd(a_txd), .rbuf(a_rbuf),
    .rec_ready(a_rdy), .parity_err(a_pe), .frame_err(a_fe));

  // configuration B
  logic b_cmd, b_txd, b_done, b_busy, b_rdy, b_pe, b_fe;
  logic [7:0] b_data, b_rbuf;
  uart_tx #(.FRAMELEN(8), .ODD_PARITY(1'b1)) u_btx (
    .clk(clk), .rst(rst), .bclk(bclk), .xmit_cmd_p(b_cmd), .txdbuf(b_data),
    .txd(b_txd), .txd_done(b_done), .busy(b_busy));
  uart_rx #(.FRAMELEN(8), .ODD_PARITY(1'b1)) u_brx (
    .clk(clk), .rst(rst), .bclk(bclk), .rxd(b_txd), .rbuf(b_rbuf),
    .rec_ready(b_rdy), .parity_err(b_pe), .frame_err(b_fe));

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  // frame length on the line: start edge to the end of the stop bit, which is
  // one tick after txd_done
  task automatic measure(ref logic txd, ref logic done, input int nbits, input string name);
    int t0;
    @(negedge txd); t0 = cyc;
    @(posedge done);
    checks++;
    if (cyc - t0 + DIV < nbits * BITCLK - 1 || cyc - t0 + DIV > nbits * BITCLK + 1) begin
      failures++; $display("%s: frame of %0d clocks, want %0d", name, cyc - t0 + DIV, nbits * BITCLK);
    end
  endtask

  initial begin
    int n;
    logic [6:0] da;
    logic [7:0] db;
    logic [10:0] bits;
    rst = 1'b1; a_cmd = 1'b0; b_cmd = 1'b0; a_data = '0; b_data = '0;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    repeat (10) @(negedge clk);

    for (n = 0; n < 20; n++) begin
      da = 7'($urandom);
      @(negedge clk); a_data = da; a_cmd = 1'b1; @(negedge clk); a_cmd = 1'b0;
      fork
        measure(a_txd, a_done, 9, "A");
        begin
          @(posedge a_rdy); #1;
          checks++;
          if (a_rbuf !== da || a_pe || a_fe) begin
            failures++; $display("A: got %02h pe=%b fe=%b want %02h", a_rbuf, a_pe, a_fe, da);
          end
        end
      join
      repeat (BITCLK) @(negedge clk);
    end

    for (n = 0; n < 20; n++) begin
      db = 8'($urandom);
      @(negedge clk); b_data = db; b_cmd = 1'b1; @(negedge clk); b_cmd = 1'b0;
      fork
        measure(b_txd, b_done, 11, "B");
        begin
          @(negedge b_txd);
          repeat (BITCLK / 2) @(posedge clk);
          for (int i = 0; i < 11; i++) begin
            #1 bits[i] = b_txd;
            if (i < 10) repeat (BITCLK) @(posedge clk);
          end
          checks++;
          if (bits !== {1'b1, ~(^db), db, 1'b0}) begin
            failures++; $display("B: line %b", bits);
          end
        end
        begin
          @(posedge b_rdy); #1;
          checks++;
          if (b_rbuf !== db || b_pe || b_fe) begin
            failures++; $display("B: got %02h pe=%b fe=%b want %02h", b_rbuf, b_pe, b_fe, db);
          end
        end
      join
      repeat (BITCLK) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
