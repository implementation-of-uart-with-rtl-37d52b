// tb_status_reg: drives the status register's event inputs directly and
// checks each bit of the status word against the expected set/clear rules:
// rx_ready set by a frame and cleared by rd_ack, error flags taken from each
// frame, overrun on a second frame before rd_ack, live copies of the
// transmitter and BIST inputs.
module tb_status_reg;
  import uart_pkg::*;
  logic clk = 1'b0;
  logic rst, rec_ready, parity_err, frame_err, rd_ack, tx_busy, bist_mode, bist_done, bist_pass;
  status_t status;
  int checks = 0, failures = 0;

  status_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_s(input logic [7:0] v, input string what);
    checks++;
    if (status !== v) begin failures++; $display("%s: status=%08b want %08b", what, status, v); end
  endtask

  task automatic frame(input logic pe, input logic fe, input logic ack);
    @(negedge clk);
    rec_ready = 1'b1; parity_err = pe; frame_err = fe; rd_ack = ack;
    @(negedge clk);
    rec_ready = 1'b0; parity_err = 1'b0; frame_err = 1'b0; rd_ack = 1'b0;
  endtask

  task automatic ack();
    @(negedge clk); rd_ack = 1'b1; @(negedge clk); rd_ack = 1'b0;
  endtask

  initial begin
    rst = 1'b1;
    {rec_ready, parity_err, frame_err, rd_ack, tx_busy, bist_mode, bist_done, bist_pass} = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    @(negedge clk); expect_s(8'b0000_0000, "after reset");
    frame(0, 0, 0);        expect_s(8'b0000_0001, "good frame");
    ack();                 expect_s(8'b0000_0000, "acknowledged");
    frame(1, 0, 0);        expect_s(8'b0000_0011, "parity error");
    frame(0, 1, 0);        expect_s(8'b0000_1101, "framing error and overrun");
    ack();                 expect_s(8'b0000_0100, "ack clears ready and overrun");
    frame(0, 0, 0);        expect_s(8'b0000_0001, "next frame clears errors");
    frame(0, 0, 1);        expect_s(8'b0000_0001, "frame with ack: no overrun");
    @(negedge clk); tx_busy = 1'b1; @(negedge clk); expect_s(8'b0001_0001, "tx busy");
    tx_busy = 1'b0; bist_mode = 1'b1; @(negedge clk); expect_s(8'b0010_0001, "bist mode");
    bist_mode = 1'b0; bist_done = 1'b1; bist_pass = 1'b1; @(negedge clk);
    expect_s(8'b1100_0001, "bist result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
