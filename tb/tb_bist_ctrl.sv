// tb_bist_ctrl: runs the self-test controller against a simple loopback
// model of the UART: each tx_cmd makes the model busy for a while and then
// return the byte on rbuf with a rec_ready pulse. Three runs of NPAT = 20:
// a clean link (pass, no errors, 20 commands, the LFSR sequence on tx_data);
// a link that corrupts three chosen bytes or flags an error (fail, error
// count 3); a dead link (timeout: fail, one error, the run ends early).
module tb_bist_ctrl;
  logic clk = 1'b0;
  logic rst, start, tx_busy, rec_ready, parity_err, frame_err;
  logic [7:0] rbuf, tx_data, err_cnt;
  logic bist_mode, tx_cmd, done, pass;
  int checks = 0, failures = 0;

  localparam int NPAT = 20;

  // model behaviour: 0 clean, 1 faulty, 2 dead
  int mode = 0;
  int ncmd = 0;
  logic [7:0] ref_lfsr;
  int seq_errs = 0;

  bist_ctrl #(.NPAT(NPAT), .TIMEOUT(400)) dut (
    .clk(clk), .rst(rst), .start(start), .tx_busy(tx_busy), .rec_ready(rec_ready),
    .rbuf(rbuf), .parity_err(parity_err), .frame_err(frame_err), .bist_mode(bist_mode),
    .tx_cmd(tx_cmd), .tx_data(tx_data), .done(done), .pass(pass), .err_cnt(err_cnt));

  always #5 clk = ~clk;

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Loopback model: busy for 120 clocks, byte returned after 100.
  initial begin
    logic [7:0] d;
    tx_busy = 1'b0; rec_ready = 1'b0; rbuf = '0; parity_err = 1'b0; frame_err = 1'b0;
    forever begin
      @(posedge clk);
      if (tx_cmd) begin
        d = tx_data;
        // pattern sequence of x^8+x^6+x^5+x^4+1 from seed 1, shifting right
        if (d !== ref_lfsr) seq_errs++;
        ref_lfsr = (ref_lfsr >> 1) ^ (ref_lfsr[0] ? 8'hB8 : 8'h00);
        ncmd++;
        #1 tx_busy = 1'b1;
        if (mode != 2) begin
          repeat (100) @(posedge clk);
          #1;
          rbuf = d; parity_err = 1'b0; frame_err = 1'b0;
          if (mode == 1 && ncmd == 3)  rbuf = d ^ 8'h10;
          if (mode == 1 && ncmd == 7)  parity_err = 1'b1;
          if (mode == 1 && ncmd == 19) frame_err = 1'b1;
          rec_ready = 1'b1;
          @(posedge clk); #1 rec_ready = 1'b0;
          repeat (19) @(posedge clk);
        end else begin
          repeat (120) @(posedge clk);
        end
        #1 tx_busy = 1'b0;
      end
    end
  end

  task automatic run(input int m, input logic exp_pass, input int exp_err, input int exp_cmd);
    int t;
    mode = m; ncmd = 0; ref_lfsr = 8'h01; seq_errs = 0;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    @(negedge clk);
    checks++;
    if (!bist_mode || done) begin failures++; $display("run %0d: not started", m); end
    t = 0;
    while (!done && t < 20_000) begin @(negedge clk); t++; end
    checks++;
    if (!done) begin failures++; $display("run %0d: no done", m); end
    checks++;
    if (pass !== exp_pass || err_cnt !== 8'(exp_err)) begin
      failures++; $display("run %0d: pass=%b err=%0d want %b %0d", m, pass, err_cnt, exp_pass, exp_err);
    end
    checks++;
    if (ncmd != exp_cmd) begin failures++; $display("run %0d: %0d commands want %0d", m, ncmd, exp_cmd); end
    checks++;
    if (seq_errs != 0) begin failures++; $display("run %0d: pattern sequence wrong %0d times", m, seq_errs); end
    checks++;
    if (bist_mode) begin failures++; $display("run %0d: still in test mode", m); end
    repeat (200) @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; start = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (bist_mode || done || tx_cmd) failures++;
    run(0, 1'b1, 0, NPAT);
    run(1, 1'b0, 3, NPAT);
    run(2, 1'b0, 1, 1);
    run(0, 1'b1, 0, NPAT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
