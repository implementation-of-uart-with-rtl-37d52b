// tb_uart_rx: drives serial frames into the receiver, with a 16x tick every
// 4 clocks (one bit = 64 clocks), and checks rbuf, the error flags and the
// time of rec_ready. Covered: the 11-bit example frame 0 01101100 0 1
// (start, data LSB first, even parity, stop) that must give rbuf = 8'h36;
// random bytes; a bad parity bit; a low stop bit; short low glitches that
// must not start a frame; a sender whose bit time is 3 % short or long;
// frames sent back to back.
module tb_uart_rx;
  logic clk = 1'b0;
  logic rst, bclk, rxd;
  logic [7:0] rbuf;
  logic rec_ready, parity_err, frame_err;
  int checks = 0, failures = 0;

  localparam int DIVT = 4;
  localparam int BITCLK = 16 * DIVT;

  int cyc = 0, ndone = 0, done_cyc = 0, start_cyc = 0;
  logic [7:0] got;
  logic got_pe, got_fe;

  uart_rx dut (.clk(clk), .rst(rst), .bclk(bclk), .rxd(rxd), .rbuf(rbuf),
               .rec_ready(rec_ready), .parity_err(parity_err), .frame_err(frame_err));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    bclk <= ((cyc % DIVT) == DIVT - 1);
    if (rec_ready) begin
      ndone++;
      done_cyc = cyc;
      got = rbuf; got_pe = parity_err; got_fe = frame_err;
    end
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int bit_len = BITCLK;   // the sender's bit time; varied to model baud mismatch

  task automatic send_bits(input logic [10:0] bits);  // bits[0] goes first
    @(negedge clk);
    start_cyc = cyc;
    for (int i = 0; i < 11; i++) begin
      rxd = bits[i];
      repeat (bit_len) @(negedge clk);
    end
  endtask

  function automatic logic [10:0] frame_of(input logic [7:0] d, input logic bad_par, input logic stop);
    return {stop, (^d) ^ bad_par, d, 1'b0};
  endfunction

  task automatic expect_frame(input logic [7:0] d, input logic pe, input logic fe, input int n0);
    repeat (BITCLK) @(negedge clk);
    checks++;
    if (ndone != n0 + 1) begin failures++; $display("frames %0d want %0d", ndone, n0 + 1); end
    checks++;
    if (got !== d || got_pe !== pe || got_fe !== fe) begin
      failures++; $display("got %02h pe=%b fe=%b want %02h pe=%b fe=%b", got, got_pe, got_fe, d, pe, fe);
    end
    // rec_ready comes at the middle of the stop bit, 10.5 bits after the
    // falling edge of the start bit, give or take a tick and the synchroniser.
    checks++;
    if (bit_len == BITCLK && (done_cyc - start_cyc < 672 - 8 || done_cyc - start_cyc > 672 + 8)) begin
      failures++; $display("rec_ready %0d clocks after start edge", done_cyc - start_cyc);
    end
  endtask

  initial begin
    int n0;
    logic [7:0] d;
    int bit_len_set [2] = '{BITCLK - 2, BITCLK + 2};
    rst = 1'b1; rxd = 1'b1;
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    repeat (100) @(negedge clk);

    // the example frame, first bit on the left: 0 0110110 0 0 1
    n0 = ndone;
    send_bits(11'b1_0_00110110_0);
    expect_frame(8'h36, 1'b0, 1'b0, n0);

    for (int k = 0; k < 30; k++) begin
      d = 8'($urandom);
      n0 = ndone;
      send_bits(frame_of(d, 1'b0, 1'b1));
      expect_frame(d, 1'b0, 1'b0, n0);
    end

    n0 = ndone; send_bits(frame_of(8'hA5, 1'b1, 1'b1)); expect_frame(8'hA5, 1'b1, 1'b0, n0);
    n0 = ndone; send_bits(frame_of(8'h3C, 1'b0, 1'b0));
    rxd = 1'b1;
    expect_frame(8'h3C, 1'b0, 1'b1, n0);
    // the low stop bit itself looks like a start bit; let that frame pass
    repeat (12 * BITCLK) @(negedge clk);

    // glitches shorter than half a bit are ignored
    for (int w = 1; w <= 6 * DIVT; w += 5) begin
      n0 = ndone;
      rxd = 1'b0; repeat (w) @(negedge clk); rxd = 1'b1;
      repeat (12 * BITCLK) @(negedge clk);
      checks++;
      if (ndone != n0) begin failures++; $display("glitch of %0d clocks taken as a frame", w); end
    end

    // a sender 3 % slow or fast is still received correctly
    foreach (bit_len_set[j]) begin
      bit_len = bit_len_set[j];
      for (int k = 0; k < 8; k++) begin
        d = 8'($urandom);
        n0 = ndone;
        send_bits(frame_of(d, 1'b0, 1'b1));
        expect_frame(d, 1'b0, 1'b0, n0);
      end
    end
    bit_len = BITCLK;

    // back to back: next start bit right after the stop bit
    n0 = ndone;
    send_bits(frame_of(8'h81, 1'b0, 1'b1));
    send_bits(frame_of(8'h7E, 1'b0, 1'b1));
    expect_frame(8'h7E, 1'b0, 1'b0, n0 + 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
